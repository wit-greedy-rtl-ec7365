// tb_syndrome_merge: self-checking test of syndrome_merge.
// Feeds random encoded rows of a 5 x 4 layer, one layer on most clocks, and
// checks that each layer comes out exactly three clocks later as the
// row-major list of {z, y, x} nodes with the right total.
module tb_syndrome_merge;
  localparam int ROWS = 5, COLS = 4, ZW = 4;
  localparam int XW = 2, YW = 3, CW = 3, NPL = 20, LW = 5, NW = ZW + YW + XW;
  logic clk = 0, rst_n = 0;
  logic row_valid = 0;
  logic [CW-1:0] row_cnt [ROWS];
  logic [XW-1:0] row_col [ROWS][COLS];
  logic [ZW-1:0] row_z = '0;
  logic lay_valid;
  logic [LW-1:0] lay_cnt;
  logic [NW-1:0] lay_node [NPL];
  int checks = 0, failures = 0, cyc = 0;

  syndrome_merge #(.ROWS(ROWS), .COLS(COLS), .ZW(ZW)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { int n; logic [NW-1:0] node [NPL]; int c; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && lay_valid) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (cyc - e.c != 3) begin failures++; $display("latency %0d", cyc - e.c); end
      checks++;
      if (int'(lay_cnt) != e.n) begin failures++; $display("cnt %0d exp %0d", lay_cnt, e.n); end
      for (int k = 0; k < e.n; k++) begin
        checks++;
        if (lay_node[k] != e.node[k]) begin failures++; $display("node %0d %h exp %h", k, lay_node[k], e.node[k]); end
      end
    end
  end

  initial begin
    for (int y = 0; y < ROWS; y++) begin
      row_cnt[y] = '0;
      for (int k = 0; k < COLS; k++) row_col[y][k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      exp_t e;
      @(negedge clk);
      row_valid = ($urandom % 4) != 0;
      row_z = ZW'($urandom);
      e.n = 0; e.c = cyc;
      for (int y = 0; y < ROWS; y++) begin
        int c;
        c = 0;
        for (int x = 0; x < COLS; x++) begin
          if (($urandom % 3) == 0) begin
            row_col[y][c] = XW'(x);
            e.node[e.n] = {row_z, YW'(y), XW'(x)};
            c++; e.n++;
          end
        end
        row_cnt[y] = CW'(c);
        for (int k = c; k < COLS; k++) row_col[y][k] = XW'($urandom);  // junk beyond count
      end
      if (row_valid) q.push_back(e);
    end
    @(negedge clk) row_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d layers missing", q.size()); end
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
