// tb_syndrome_queue: self-checking test of syndrome_queue.
// Random pops from the window and random layer pushes on a 7-deep queue with
// a 4-node window, compared each clock with a list model: order kept, popped
// nodes gone, nodes beyond the depth dropped and counted as overflows.
module tb_syndrome_queue;
  localparam int QDEPTH = 7, N_ACT = 4, NPL = 6, NW = 8, LW = 3, QW = 3;
  logic clk = 0, rst_n = 0;
  logic push_valid = 0;
  logic [LW-1:0] push_cnt = '0;
  logic [NW-1:0] push_node [NPL];
  logic pop_valid = 0;
  logic [N_ACT-1:0] pop_mask = '0;
  logic [NW-1:0] win_node [N_ACT];
  logic [N_ACT-1:0] win_valid;
  logic [QW-1:0] count;
  logic full, overflow;
  logic [31:0] ovf_count;
  int checks = 0, failures = 0, n_ovf = 0, n_pop = 0;
  logic [NW-1:0] model [$];

  syndrome_queue #(.QDEPTH(QDEPTH), .N_ACT(N_ACT), .NPL(NPL), .NW(NW)) dut (.*);
  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (int'(count) != model.size()) begin failures++; $display("count %0d exp %0d", count, model.size()); end
    checks++;
    if (full != (model.size() == QDEPTH)) begin failures++; $display("full wrong"); end
    for (int i = 0; i < N_ACT; i++) begin
      checks++;
      if (win_valid[i] != (i < model.size())) begin failures++; $display("win_valid %0d", i); end
      else if (i < model.size()) begin
        checks++;
        if (win_node[i] != model[i]) begin failures++; $display("win %0d %h exp %h", i, win_node[i], model[i]); end
      end
    end
    checks++;
    if (int'(ovf_count) != n_ovf) begin failures++; $display("ovf_count %0d exp %0d", ovf_count, n_ovf); end
  endtask

  initial begin
    logic [NW-1:0] nxt;
    nxt = 1;
    for (int k = 0; k < NPL; k++) push_node[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [NW-1:0] kept [$];
      int room;
      @(negedge clk);
      compare();
      pop_valid = ($urandom % 2) == 0;
      pop_mask  = '0;
      for (int i = 0; i < N_ACT; i++)
        if (i < model.size() && ($urandom % 2)) pop_mask[i] = 1'b1;
      push_valid = ($urandom % 3) == 0;
      push_cnt   = LW'($urandom % (NPL + 1));
      for (int k = 0; k < NPL; k++) begin push_node[k] = nxt; nxt++; end
      // model
      kept.delete();
      for (int i = 0; i < model.size(); i++)
        if (!(pop_valid && i < N_ACT && pop_mask[i])) kept.push_back(model[i]);
        else n_pop++;
      model = kept;
      if (push_valid) begin
        room = QDEPTH - model.size();
        if (int'(push_cnt) > room) n_ovf++;
        for (int k = 0; k < int'(push_cnt) && k < room; k++) model.push_back(push_node[k]);
      end
    end
    @(negedge clk);
    push_valid = 0; pop_valid = 0;
    compare();
    checks++;
    if (n_ovf == 0 || n_pop == 0) begin failures++; $display("overflow or pop never exercised"); end
    $display("pops=%0d overflows=%0d", n_pop, n_ovf);
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
