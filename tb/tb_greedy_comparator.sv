// tb_greedy_comparator: self-checking test of greedy_comparator.
// For a 5-node window (15 entries) applies random flags, weights (from a
// small range so that ties are common) and allowed weights, and checks the
// chosen entry against a plain search: first flagged entry of least weight,
// only if that weight is allowed; entry order (0,0),(0,1)..(0,4),(1,1),...
module tb_greedy_comparator;
  localparam int N_ACT = 5, WW = 8, P = 15, PW = 4, IW = 3;
  logic [P-1:0]  flag;
  logic [WW-1:0] weight [P];
  logic [WW-1:0] allowed;
  logic          found, any_flag;
  logic [PW-1:0] sel;
  logic [IW-1:0] sel_i, sel_j;
  logic [WW-1:0] sel_w;
  int checks = 0, failures = 0, n_found = 0, n_blocked = 0;
  int ei [P], ej [P];

  greedy_comparator #(.N_ACT(N_ACT), .WW(WW)) dut (.*);

  initial begin
    int e;
    e = 0;
    for (int i = 0; i < N_ACT; i++)
      for (int j = i; j < N_ACT; j++) begin ei[e] = i; ej[e] = j; e++; end
    for (int n = 0; n < 3000; n++) begin
      int best, bw;
      flag = P'($urandom) & P'($urandom);
      for (int k = 0; k < P; k++) weight[k] = WW'($urandom % 6);
      allowed = WW'($urandom % 7);
      #1;
      best = -1; bw = 1 << WW;
      for (int k = 0; k < P; k++)
        if (flag[k] && int'(weight[k]) < bw) begin bw = int'(weight[k]); best = k; end
      if (best >= 0 && bw > int'(allowed)) begin best = -1; n_blocked++; end
      checks++;
      if (any_flag != (flag != '0)) begin failures++; $display("any_flag"); end
      checks++;
      if (found != (best >= 0)) begin failures++; $display("found %0d exp %0d", found, best >= 0); end
      else if (best >= 0) begin
        n_found++;
        checks++;
        if (int'(sel) != best || int'(sel_i) != ei[best] || int'(sel_j) != ej[best] || int'(sel_w) != bw) begin
          failures++;
          $display("sel %0d (%0d,%0d) w%0d exp %0d (%0d,%0d) w%0d", sel, sel_i, sel_j, sel_w, best, ei[best], ej[best], bw);
        end
      end
    end
    checks++;
    if (n_found == 0 || n_blocked == 0) begin failures++; $display("filter cases not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
