// allow_weight_table: the ladder of allowed weights of the iterative greedy
// matching.
//
// LEVELS thresholds, in increasing order, held in registers and writable
// through cfg_we/cfg_idx/cfg_val. A decoding round begins at level 0
// (restart); step moves to the next level when nothing more can be matched
// under the current one. allowed is the threshold of the current level.
// The last level is used only in a final round (restart with final_round
// high): a non-final round ends after level LEVELS-2 and leaves pairs heavier
// than that threshold for a later round, when more layers have arrived.
// at_end is high on the last level of the round.
// Reset values: threshold k = (k+1)*(2^WW-1)/LEVELS for k < LEVELS-1, and
// 2^WW-2 (every weight except the "never" value) for the last level.
// The document shows the allowed-weight register and its table; the number
// of levels, their values and the final-round rule are this design's choice.
module allow_weight_table #(
  parameter int LEVELS = 6,
  parameter int WW     = 8,
  localparam int LVW   = (LEVELS > 1) ? $clog2(LEVELS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cfg_we,
  input  logic [LVW-1:0] cfg_idx,
  input  logic [WW-1:0]  cfg_val,
  input  logic           restart,
  input  logic           final_round,
  input  logic           step,
  output logic [WW-1:0]  allowed,
  output logic [LVW-1:0] level,
  output logic           at_end
);

  logic [WW-1:0] thr [LEVELS];
  logic          fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LEVELS; k++)
        thr[k] <= (k == LEVELS - 1) ? WW'((1 << WW) - 2)
                                    : WW'(((k + 1) * ((1 << WW) - 1)) / LEVELS);
      level <= '0;
      fin   <= 1'b0;
    end else begin
      if (cfg_we && int'(cfg_idx) < LEVELS) thr[cfg_idx] <= cfg_val;
      if (restart) begin
        level <= '0;
        fin   <= final_round;
      end else if (step && !at_end) begin
        level <= level + 1'b1;
      end
    end
  end

  always_comb begin
    allowed = thr[int'(level) % LEVELS];
    at_end  = fin ? (int'(level) >= LEVELS - 1) : (int'(level) >= LEVELS - 2);
  end

endmodule
