// tb_wit_greedy_full: end-to-end test of wit_greedy with every parameter at
// its default (distance 11: 11 x 10 ancillas per layer, 11-layer window,
// 20-node pairing window, 39-node queue, 8 weight-table copies, 6-level
// ladder at its reset values). Loads the full 133,210-word weight tables,
// decodes 150 layers at a 2 % ancilla flip rate (with some 10 % layers) one
// at a time against the reference model, flushes, then feeds back-to-back
// dense layers. Stimulus and model are in wit_greedy_harness.
module tb_wit_greedy_full;
  localparam int D = 11, QDEPTH = 39, WW = 8, LEVELS = 6, ZW = 6;
  localparam int ROWS = D, COLS = D - 1, NPL = ROWS * COLS;
  localparam int NW = ZW + 4 + 4;
  localparam int AW = $clog2(D * NPL * NPL + NPL);
  localparam int QW = $clog2(QDEPTH + 1), LVW = 3;
  logic clk, rst_n, syn_valid, flush, wt_we, awt_we;
  logic [NPL-1:0] syn_layer;
  logic [AW-1:0] wt_waddr;
  logic [WW-1:0] wt_wdata, awt_val, pair_w;
  logic [LVW-1:0] awt_idx;
  logic pair_valid, pair_boundary, busy, round_done, overflow;
  logic [NW-1:0] pair_a, pair_b;
  logic [15:0] round_cycles;
  logic [QW-1:0] q_count;
  logic [31:0] ovf_count, n_rounds, n_final, n_steps;

  wit_greedy dut (.*);

  wit_greedy_harness #(.D(11), .N_ACT(20), .QDEPTH(39), .NUM_TABLES(8), .WW(8),
                       .LEVELS(6), .ZW(6), .LAYERS(150), .FLIP_PERMILLE(20),
                       .BURST_PERMILLE(100), .STRESS_LAYERS(20), .SET_LADDER(0),
                       .REQUIRE_ALL(0)) harness (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", harness.checks, harness.failures + 1);
    $finish;
  end
endmodule
