// greedy_ctrl: sequencer of one decoding round.
//
// A round is started from IDLE when a new layer has reached the syndrome
// queue (layer_in) or a flush is pending, and the queue is not empty:
//   START  snapshot of the pairing window, loading of the pairing table,
//          restart of the allowed-weight ladder, clearing of the
//          matching-pair table (one clock);
//   LOAD   wait for the pairing table (load_done);
//   MATCH  each clock: match the pair the comparator found (one pair per
//          clock), else move one level up the allowed-weight ladder if
//          unmatched pairs are left and the ladder has a level left, else
//          finish;
//   POP    remove the matched nodes from the syndrome queue (one clock).
// A round is final (the whole ladder is used, so every node in the window is
// matched, at worst to the boundary) when a flush is pending, the queue is
// full, or the oldest node is WIN-1 layers older than the newest layer, the
// last moment before it would leave the decoding window.
// round_cycles is the length of the last round in clocks, START to POP.
// The flow (queue, pairing table, greedy comparator, matching-pair table,
// pop of matched nodes) is the document's; the states, the round trigger and
// the final-round rule are this design's choice.
module greedy_ctrl #(
  parameter int WIN    = 11,
  parameter int ZW     = 6,
  parameter int QDEPTH = 39,
  localparam int QW    = $clog2(QDEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          layer_in,
  input  logic          flush,
  input  logic [QW-1:0] q_count,
  input  logic          q_full,
  input  logic [ZW-1:0] head_z,
  input  logic          load_done,
  input  logic          found,
  input  logic          any_flag,
  input  logic          at_end,
  output logic          start,
  output logic          final_round,
  output logic          match,
  output logic          step,
  output logic          pop,
  output logic          busy,
  output logic          round_done,
  output logic [15:0]   round_cycles,
  output logic [31:0]   n_rounds,
  output logic [31:0]   n_final,
  output logic [31:0]   n_steps
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_LOAD, S_MATCH, S_POP} state_t;
  state_t        st;
  logic          pending, flushing;
  logic [ZW-1:0] next_z;     // layer number the next layer will get
  logic [15:0]   cyc;
  logic          old_head;

  // age of the oldest node relative to the newest layer
  assign old_head    = (q_count != '0) && (int'(ZW'(next_z - head_z)) >= WIN);
  assign final_round = flushing || q_full || old_head;

  assign start = (st == S_START);
  assign match = (st == S_MATCH) && found;
  assign step  = (st == S_MATCH) && !found && any_flag && !at_end;
  assign pop   = (st == S_POP);
  assign busy  = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      pending      <= 1'b0;
      flushing     <= 1'b0;
      next_z       <= '0;
      cyc          <= '0;
      round_done   <= 1'b0;
      round_cycles <= '0;
      n_rounds     <= '0;
      n_final      <= '0;
      n_steps      <= '0;
    end else begin
      round_done <= 1'b0;
      if (layer_in) begin
        pending <= 1'b1;
        next_z  <= next_z + 1'b1;
      end
      if (flush) flushing <= 1'b1;
      if (st != S_IDLE) cyc <= cyc + 1'b1;
      unique case (st)
        S_IDLE: begin
          if (q_count == '0) begin
            if (!layer_in) pending <= 1'b0;
            if (!flush) flushing <= 1'b0;
          end else if (pending || flushing) begin
            if (!layer_in) pending <= 1'b0;
            st  <= S_START;
            cyc <= '0;
          end
        end
        S_START: begin
          st       <= S_LOAD;
          n_rounds <= n_rounds + 1'b1;
          if (final_round) n_final <= n_final + 1'b1;
        end
        S_LOAD:  if (load_done) st <= S_MATCH;
        S_MATCH: begin
          if (step) n_steps <= n_steps + 1'b1;
          if (!found && !step) st <= S_POP;
        end
        S_POP: begin
          st           <= S_IDLE;
          round_done   <= 1'b1;
          round_cycles <= cyc + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
