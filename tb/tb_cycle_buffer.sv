// tb_cycle_buffer: self-checking test of cycle_buffer.
// Streams random layers (random gaps, random densities) into a 5 x 4 layer
// buffer and checks that each layer comes out two clocks later as per-row
// counts and compacted column lists, with consecutive layer numbers.
module tb_cycle_buffer;
  localparam int ROWS = 5, COLS = 4, ZW = 4;
  localparam int XW = 2, CW = 3;
  logic clk = 0, rst_n = 0;
  logic syn_valid = 0;
  logic [ROWS*COLS-1:0] syn_layer = '0;
  logic row_valid;
  logic [CW-1:0] row_cnt [ROWS];
  logic [XW-1:0] row_col [ROWS][COLS];
  logic [ZW-1:0] row_z;
  int checks = 0, failures = 0;

  cycle_buffer #(.ROWS(ROWS), .COLS(COLS), .ZW(ZW)) dut (.*);

  always #5 clk = ~clk;

  logic [ROWS*COLS-1:0] sent [$];
  logic [ROWS*COLS-1:0] vin [$];   // valid/data history for latency check
  int exp_z = 0;
  int cyc = 0, sent_cyc [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && row_valid) begin
      logic [ROWS*COLS-1:0] l;
      int lat;
      l = sent.pop_front();
      lat = cyc - sent_cyc.pop_front();
      checks++;
      if (lat != 2) begin failures++; $display("latency %0d", lat); end
      checks++;
      if (int'(row_z) != exp_z % (1 << ZW)) begin failures++; $display("z %0d exp %0d", row_z, exp_z); end
      exp_z++;
      for (int y = 0; y < ROWS; y++) begin
        int c;
        c = 0;
        for (int x = 0; x < COLS; x++) begin
          if (l[y*COLS + x]) begin
            checks++;
            if (c >= int'(row_cnt[y]) || int'(row_col[y][c]) != x) begin
              failures++; $display("row %0d item %0d exp col %0d got %0d", y, c, x, row_col[y][c]);
            end
            c++;
          end
        end
        checks++;
        if (int'(row_cnt[y]) != c) begin failures++; $display("row %0d cnt %0d exp %0d", y, row_cnt[y], c); end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      syn_valid = ($urandom % 3) != 0;
      for (int b = 0; b < ROWS*COLS; b++) syn_layer[b] = ($urandom % 4) < (n % 4);
      if (syn_valid) begin sent.push_back(syn_layer); sent_cyc.push_back(cyc); end
    end
    @(negedge clk) syn_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d layers never came out", sent.size()); end
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
