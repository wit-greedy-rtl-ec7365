// syndrome_queue: register queue of active syndrome nodes, oldest first.
//
// Every clock it may (a) drop any of the first N_ACT entries (pop_mask, the
// nodes matched by the decoder) and (b) append a whole layer of up to NPL
// nodes at its tail (push_*). Dropped entries are squeezed out and the rest
// keep their order; the new layer is then written behind them. Nodes of a
// layer that do not fit into the QDEPTH slots are lost: overflow pulses for
// one clock and ovf_count counts such layers (the "buffer overflow times" the
// decoder is judged by). The first N_ACT entries form the pairing window
// (win_node / win_valid) read by the decoder.
// The depth is the document's queue size; the one-clock pop-and-append and
// the overflow policy (drop the newest nodes) are this design's choice.
module syndrome_queue #(
  parameter int QDEPTH = 39,
  parameter int N_ACT  = 20,
  parameter int NPL    = 110,
  parameter int NW     = 14,
  localparam int LW    = $clog2(NPL + 1),
  localparam int QW    = $clog2(QDEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_valid,
  input  logic [LW-1:0]    push_cnt,
  input  logic [NW-1:0]    push_node [NPL],
  input  logic             pop_valid,
  input  logic [N_ACT-1:0] pop_mask,
  output logic [NW-1:0]    win_node [N_ACT],
  output logic [N_ACT-1:0] win_valid,
  output logic [QW-1:0]    count,
  output logic             full,
  output logic             overflow,
  output logic [31:0]      ovf_count
);

  logic [NW-1:0] q [QDEPTH];
  logic [NW-1:0] q_n [QDEPTH];
  logic [QW-1:0] cnt_n;
  logic          ovf_n;

  always_comb begin
    logic [QW-1:0] kept;
    int            room;
    for (int s = 0; s < QDEPTH; s++) q_n[s] = '0;
    // squeeze out popped entries
    kept = '0;
    for (int i = 0; i < QDEPTH; i++) begin
      if (QW'(i) < count && !(pop_valid && i < N_ACT && pop_mask[i % N_ACT])) begin
        q_n[kept] = q[i];
        kept      = kept + 1'b1;
      end
    end
    // append the new layer behind them
    room  = QDEPTH - int'(kept);
    ovf_n = push_valid && (int'(push_cnt) > room);
    cnt_n = kept;
    if (push_valid) begin
      for (int s = 0; s < QDEPTH; s++) begin
        if (QW'(s) >= kept && (s - int'(kept)) < int'(push_cnt))
          q_n[s] = push_node[(s - int'(kept)) % NPL];
      end
      cnt_n = ovf_n ? QW'(QDEPTH) : QW'(int'(kept) + int'(push_cnt));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      overflow  <= 1'b0;
      ovf_count <= '0;
      for (int s = 0; s < QDEPTH; s++) q[s] <= '0;
    end else begin
      q        <= q_n;
      count    <= cnt_n;
      overflow <= ovf_n;
      if (ovf_n) ovf_count <= ovf_count + 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < N_ACT; i++) begin
      win_node[i]  = (i < QDEPTH) ? q[i % QDEPTH] : '0;
      win_valid[i] = QW'(i) < count;
    end
  end
  assign full = (count == QW'(QDEPTH));

  // The decoder may only pop nodes that are in the queue.
  a_pop_valid_only : assert property (@(posedge clk) disable iff (!rst_n)
    pop_valid |-> ((pop_mask & ~win_valid) == '0));

endmodule
