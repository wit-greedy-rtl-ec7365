// tb_wit_greedy_sweep: the latency evaluation of the published design, as
// far as it can be repeated: distances 5, 7 and 9, each with its published
// pairing window and queue size (9/15, 12/21, 15/29), 8 table copies and
// the reset ladder. Each decoder gets 10,000 random syndrome layers at a 1 %
// ancilla flip rate (the published condition is six times the average
// error rate, whose value is not given) one at a time, checked against the
// reference model, and the clocks per round are printed. Distance 11 at its
// full size is run by tb_wit_greedy_full.
module tb_wit_greedy_sweep;
  localparam int N = 3;
  localparam int DS [N] = '{5, 7, 9};
  localparam int NS [N] = '{9, 12, 15};
  localparam int QS [N] = '{15, 21, 29};
  localparam int WW = 8, LEVELS = 6, ZW = 6, NT = 8, LAYERS = 10000;
  bit done_all;
  int checks, failures;
  bit dn [N];
  int ck [N], fl [N];

  for (genvar g = 0; g < N; g++) begin : g_d
    localparam int D = DS[g], N_ACT = NS[g], QDEPTH = QS[g];
    localparam int NPL = D * (D - 1);
    localparam int XW = $clog2(D - 1), YW = $clog2(D);
    localparam int NW = ZW + YW + XW;
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

    wit_greedy #(.D(D), .N_ACT(N_ACT), .QDEPTH(QDEPTH), .NUM_TABLES(NT),
                 .WW(WW), .LEVELS(LEVELS), .ZW(ZW)) dut (.*);

    wit_greedy_harness #(.D(D), .N_ACT(N_ACT), .QDEPTH(QDEPTH), .NUM_TABLES(NT),
                         .WW(WW), .LEVELS(LEVELS), .ZW(ZW), .LAYERS(LAYERS),
                         .FLIP_PERMILLE(10), .BURST_PERMILLE(10), .STRESS_LAYERS(0),
                         .SET_LADDER(0), .REQUIRE_ALL(0), .FINISH(0)) harness (.*);

    always_comb begin
      dn[g] = harness.done;
      ck[g] = harness.checks;
      fl[g] = harness.failures;
    end
  end

  initial begin
    #1;
    wait (dn[0] && dn[1] && dn[2]);
    checks = 0; failures = 0;
    for (int g = 0; g < N; g++) begin checks += ck[g]; failures += fl[g]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    $display("watchdog expired");
    checks = 0; failures = 1;
    for (int g = 0; g < N; g++) begin checks += ck[g]; failures += fl[g]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
