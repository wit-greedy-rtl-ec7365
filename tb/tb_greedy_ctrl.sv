// tb_greedy_ctrl: self-checking test of greedy_ctrl.
// A scripted stand-in for the datapath answers the controller: load_done L
// clocks after start, then M clocks with a pair found, S clocks with pairs
// left but none allowed, then the end of the ladder. Checked per round: the
// number of match and step pulses, one pop, round_cycles = L + M + S + 3,
// the final-round decision (old head node, full queue, flush), and that an
// empty queue starts no round.
module tb_greedy_ctrl;
  localparam int WIN = 4, ZW = 4, QDEPTH = 9, QW = 4;
  logic clk = 0, rst_n = 0;
  logic layer_in = 0, flush = 0;
  logic [QW-1:0] q_count = '0;
  logic q_full = 0;
  logic [ZW-1:0] head_z = '0;
  logic load_done = 0, found = 0, any_flag = 0, at_end = 0;
  logic start, final_round, match, step, pop, busy, round_done;
  logic [15:0] round_cycles;
  logic [31:0] n_rounds, n_final, n_steps;
  int checks = 0, failures = 0;
  int layers = 0;

  greedy_ctrl #(.WIN(WIN), .ZW(ZW), .QDEPTH(QDEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic new_layer();
    @(negedge clk) layer_in = 1;
    @(negedge clk) layer_in = 0;
    layers++;
  endtask

  // one round with the given script; expect_final is the expected decision
  task automatic round(input int L, input int M, input int S, input bit expect_final);
    int nm, ns, np, t;
    nm = 0; ns = 0; np = 0;
    t = 0;
    while (!start) begin @(negedge clk); t++; if (t > 5) break; end
    checks++;
    if (!start) begin failures++; $display("round did not start"); return; end
    checks++;
    if (final_round != expect_final) begin failures++; $display("final_round %0d exp %0d", final_round, expect_final); end
    for (int k = 1; k <= L; k++) begin
      @(negedge clk);
      load_done = (k == L);
    end
    @(negedge clk) load_done = 0;
    found = 1; any_flag = 1; at_end = 0;
    for (int k = 0; k < M; k++) begin
      nm += match; ns += step;
      @(negedge clk);
    end
    found = 0;
    for (int k = 0; k < S; k++) begin
      nm += match; ns += step;
      @(negedge clk);
    end
    at_end = 1;
    nm += match; ns += step;
    @(negedge clk);
    np += pop;
    at_end = 0; any_flag = 0;
    @(negedge clk);
    checks++;
    if (nm != M || ns != S || np != 1) begin failures++; $display("matches %0d/%0d steps %0d/%0d pops %0d", nm, M, ns, S, np); end
    checks++;
    if (int'(round_cycles) != L + M + S + 3 || !round_done) begin
      failures++; $display("round_cycles %0d exp %0d", round_cycles, L + M + S + 3);
    end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // empty queue: no round
    new_layer();
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("round on empty queue"); end
    end
    // ordinary rounds, head node young
    for (int r = 0; r < 20; r++) begin
      q_count = QW'(1 + $urandom % 5);
      head_z = ZW'(layers - 1);
      new_layer();
      round(1 + $urandom % 4, $urandom % 4, $urandom % 3, 1'b0);
    end
    // head node WIN layers behind the next layer number: final
    q_count = 3;
    head_z = ZW'(layers + 1 - WIN);
    new_layer();
    round(2, 1, 0, 1'b1);
    // full queue: final
    head_z = ZW'(layers);
    q_full = 1; q_count = QDEPTH;
    new_layer();
    round(3, 2, 1, 1'b1);
    q_full = 0; q_count = 2;
    // flush without a new layer: final rounds until the queue is empty
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    round(2, 1, 0, 1'b1);
    round(2, 1, 0, 1'b1);
    q_count = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("flush did not end with empty queue"); end
    checks++;
    if (n_rounds != 24 || n_final != 4) begin failures++; $display("rounds %0d final %0d", n_rounds, n_final); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
