// tb_matching_pair_table: self-checking test of matching_pair_table.
// Runs random rounds on a 6-node window: clear, then record random disjoint
// pairs (some to the boundary) with idle clocks in between, and checks the
// pair stream one clock later, the stored rows and the matched-node mask.
module tb_matching_pair_table;
  localparam int N_ACT = 6, NW = 8, WW = 8, IW = 3, CW = 3;
  logic clk = 0, rst_n = 0;
  logic clear = 0, rec_valid = 0;
  logic [IW-1:0] rec_i = '0, rec_j = '0;
  logic [WW-1:0] rec_w = '0;
  logic [NW-1:0] snap_node [N_ACT];
  logic [N_ACT-1:0] matched_mask;
  logic [CW-1:0] mp_cnt;
  logic [IW-1:0] mp_i [N_ACT];
  logic [IW-1:0] mp_j [N_ACT];
  logic pair_valid, pair_boundary;
  logic [NW-1:0] pair_a, pair_b;
  logic [WW-1:0] pair_w;
  int checks = 0, failures = 0, n_bnd = 0;

  matching_pair_table #(.N_ACT(N_ACT), .NW(NW), .WW(WW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < N_ACT; i++) snap_node[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      int order [N_ACT];
      logic [N_ACT-1:0] mask;
      int cnt, k;
      for (int i = 0; i < N_ACT; i++) begin snap_node[i] = NW'($urandom); order[i] = i; end
      order.shuffle();
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      checks++;
      if (matched_mask != '0 || mp_cnt != '0) begin failures++; $display("clear failed"); end
      mask = '0; cnt = 0; k = 0;
      while (k < N_ACT) begin
        int a, b;
        a = order[k];
        if (k + 1 < N_ACT && ($urandom % 3) != 0) begin b = order[k+1]; k += 2; end
        else begin b = a; k += 1; n_bnd++; end
        rec_valid = 1; rec_i = IW'(a); rec_j = IW'(b); rec_w = WW'($urandom);
        mask[a] = 1; mask[b] = 1;
        @(negedge clk);
        rec_valid = 0;
        checks++;
        if (!pair_valid || pair_a != snap_node[a] || pair_b != snap_node[b] ||
            pair_boundary != (a == b) || pair_w != rec_w) begin
          failures++; $display("pair out wrong round %0d", r);
        end
        checks++;
        if (mp_i[cnt] != IW'(a) || mp_j[cnt] != IW'(b) || matched_mask != mask) begin
          failures++; $display("row/mask wrong round %0d", r);
        end
        cnt++;
        if ($urandom % 2) begin
          @(negedge clk);
          checks++;
          if (pair_valid) begin failures++; $display("pair_valid not a pulse"); end
        end
      end
      checks++;
      if (int'(mp_cnt) != cnt) begin failures++; $display("mp_cnt %0d exp %0d", mp_cnt, cnt); end
    end
    checks++;
    if (n_bnd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
