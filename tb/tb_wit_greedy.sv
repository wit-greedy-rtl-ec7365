// tb_wit_greedy: end-to-end test of wit_greedy at a reduced size (distance
// 3: 3 x 2 ancillas per layer, 3-layer window, 5-node pairing window,
// 8-node queue, 3 weight-table copies, 4-level ladder), so that the queue
// overflows and every kind of round occurs. Stimulus and reference model are
// in wit_greedy_harness.
module tb_wit_greedy;
  localparam int D = 3, N_ACT = 5, QDEPTH = 8, NUM_TABLES = 3, WW = 8, LEVELS = 4, ZW = 6;
  localparam int ROWS = D, COLS = D - 1, NPL = ROWS * COLS;
  localparam int NW = ZW + 2 + 1;
  localparam int AW = $clog2(D * NPL * NPL + NPL);
  localparam int QW = $clog2(QDEPTH + 1), LVW = 2;
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

  wit_greedy #(.D(D), .N_ACT(N_ACT), .QDEPTH(QDEPTH), .NUM_TABLES(NUM_TABLES),
               .WW(WW), .LEVELS(LEVELS), .ZW(ZW)) dut (.*);

  wit_greedy_harness #(.D(D), .N_ACT(N_ACT), .QDEPTH(QDEPTH), .NUM_TABLES(NUM_TABLES),
                       .WW(WW), .LEVELS(LEVELS), .ZW(ZW), .LAYERS(400),
                       .FLIP_PERMILLE(150), .STRESS_LAYERS(40), .SET_LADDER(1),
                       .REQUIRE_ALL(1)) harness (.*);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", harness.checks, harness.failures + 1);
    $finish;
  end
endmodule
