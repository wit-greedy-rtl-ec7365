// tb_allow_weight_table: self-checking test of allow_weight_table.
// Checks the reset ladder ((k+1)*63/4 and 62 for 4 levels of 6 bits), that a
// non-final round stops one level short of the last, that a final round
// reaches the last level, that step beyond the end is ignored, and that
// written thresholds are used.
module tb_allow_weight_table;
  localparam int LEVELS = 4, WW = 6, LVW = 2;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [LVW-1:0] cfg_idx = '0;
  logic [WW-1:0] cfg_val = '0;
  logic restart = 0, final_round = 0, step = 0;
  logic [WW-1:0] allowed;
  logic [LVW-1:0] level;
  logic at_end;
  int checks = 0, failures = 0;
  int thr [LEVELS];

  allow_weight_table #(.LEVELS(LEVELS), .WW(WW)) dut (.*);
  always #5 clk = ~clk;

  task automatic run_round(input bit fin);
    int last;
    last = fin ? LEVELS - 1 : LEVELS - 2;
    @(negedge clk); restart = 1; final_round = fin;
    @(negedge clk); restart = 0; final_round = 0;
    for (int k = 0; k <= last + 2; k++) begin
      int ek;
      ek = (k > last) ? last : k;
      checks++;
      if (int'(level) != ek || int'(allowed) != thr[ek] || at_end != (ek == last)) begin
        failures++;
        $display("fin=%0d k=%0d level %0d allowed %0d end %0d exp level %0d allowed %0d", fin, k, level, allowed, at_end, ek, thr[ek]);
      end
      step = 1;
      @(negedge clk);
      step = 0;
    end
  endtask

  initial begin
    for (int k = 0; k < LEVELS - 1; k++) thr[k] = ((k + 1) * 63) / LEVELS;
    thr[LEVELS-1] = 62;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_round(0);
    run_round(1);
    for (int k = 0; k < LEVELS; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_idx = LVW'(k); cfg_val = WW'(3 * k + 1 + ($urandom % 3)); thr[k] = int'(cfg_val);
    end
    @(negedge clk) cfg_we = 0;
    run_round(1);
    run_round(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
