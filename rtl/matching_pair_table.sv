// matching_pair_table: record of the pairs matched in the current round.
//
// clear empties it at the start of a round. Each rec_valid clock stores one
// matched pair (window indices rec_i, rec_j; rec_i == rec_j for a match to
// the boundary; weight rec_w) at row mp_cnt, marks both nodes in
// matched_mask, and on the next clock presents the pair with the nodes'
// {z,y,x} coordinates on the pair_* outputs for Pauli frame generation
// (pair_valid high for one clock). matched_mask is what the syndrome queue
// pops at the end of the round.
// Its place between the comparator and Pauli frame generation and the
// feedback of matched nodes to the queue follow the document; the row format
// and the output stream are this design's choice.
module matching_pair_table #(
  parameter int N_ACT = 20,
  parameter int NW    = 14,
  parameter int WW    = 8,
  localparam int IW   = (N_ACT > 1) ? $clog2(N_ACT) : 1,
  localparam int CW   = $clog2(N_ACT + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             rec_valid,
  input  logic [IW-1:0]    rec_i,
  input  logic [IW-1:0]    rec_j,
  input  logic [WW-1:0]    rec_w,
  input  logic [NW-1:0]    snap_node [N_ACT],
  output logic [N_ACT-1:0] matched_mask,
  output logic [CW-1:0]    mp_cnt,
  output logic [IW-1:0]    mp_i [N_ACT],
  output logic [IW-1:0]    mp_j [N_ACT],
  output logic             pair_valid,
  output logic [NW-1:0]    pair_a,
  output logic [NW-1:0]    pair_b,
  output logic             pair_boundary,
  output logic [WW-1:0]    pair_w
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      matched_mask  <= '0;
      mp_cnt        <= '0;
      pair_valid    <= 1'b0;
      pair_a        <= '0;
      pair_b        <= '0;
      pair_boundary <= 1'b0;
      pair_w        <= '0;
      for (int r = 0; r < N_ACT; r++) begin
        mp_i[r] <= '0;
        mp_j[r] <= '0;
      end
    end else begin
      pair_valid <= 1'b0;
      if (clear) begin
        matched_mask <= '0;
        mp_cnt       <= '0;
      end else if (rec_valid) begin
        matched_mask[rec_i] <= 1'b1;
        matched_mask[rec_j] <= 1'b1;
        if (int'(mp_cnt) < N_ACT) begin
          mp_i[int'(mp_cnt) % N_ACT] <= rec_i;
          mp_j[int'(mp_cnt) % N_ACT] <= rec_j;
        end
        mp_cnt        <= mp_cnt + 1'b1;
        pair_valid    <= 1'b1;
        pair_a        <= snap_node[rec_i];
        pair_b        <= snap_node[rec_j];
        pair_boundary <= (rec_i == rec_j);
        pair_w        <= rec_w;
      end
    end
  end

  // A node is matched at most once per round.
  a_match_once : assert property (@(posedge clk) disable iff (!rst_n)
    rec_valid && !clear |-> !matched_mask[rec_i] && !matched_mask[rec_j]);

endmodule
