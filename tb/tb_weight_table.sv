// tb_weight_table: self-checking test of weight_table.
// Writes random weights to a 37-word table, then reads random addresses
// (interleaved with further writes) and checks that each word appears one
// clock after the read, that rdata holds while re is low, and that an
// address beyond the table reads as the all-ones "never" weight.
module tb_weight_table;
  localparam int DEPTH = 37, WW = 8, AW = 6;
  logic clk = 0;
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WW-1:0] wdata = '0, rdata;
  logic [WW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  weight_table #(.DEPTH(DEPTH), .WW(WW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = WW'($urandom); model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 500; n++) begin
      logic [WW-1:0] expv, held;
      @(negedge clk);
      re = 1;
      raddr = AW'($urandom % (DEPTH + 5));
      expv = (int'(raddr) < DEPTH) ? model[raddr] : '1;
      // a write to a different address in the same clock
      we = ($urandom % 2) == 1;
      waddr = AW'($urandom % DEPTH);
      if (waddr == raddr) we = 0;
      wdata = WW'($urandom);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0; re = 0;
      checks++;
      if (rdata !== expv) begin failures++; $display("addr %0d got %h exp %h", raddr, rdata, expv); end
      held = rdata;
      raddr = AW'($urandom % DEPTH);
      @(negedge clk);
      checks++;
      if (rdata !== held) begin failures++; $display("rdata changed without re"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
