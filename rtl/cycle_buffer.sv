// cycle_buffer: input register for one syndrome layer plus the parallel row
// encoders of the active-syndrome encoding stage.
//
// A layer (ROWS x COLS ancilla bits, bit y*COLS+x is the ancilla in row y,
// column x; 1 = active node) is registered when syn_valid is high and gets
// the next layer number z (ZW bits, wrapping). On the following clock every
// row is encoded at once: its active columns are compacted, lowest column
// first, into row_col[y][0..row_cnt[y]-1]. So a layer leaves as encoded rows
// two clocks after it arrived; a new layer may arrive every clock.
// The document specifies the one-clock encoding of whole rows in parallel
// and that these buffers are flip-flops; the compaction order, the layer
// numbering and the two-register structure are this design's choice.
module cycle_buffer #(
  parameter int ROWS = 11,
  parameter int COLS = 10,
  parameter int ZW   = 6,
  localparam int XW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int CW  = $clog2(COLS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 syn_valid,
  input  logic [ROWS*COLS-1:0] syn_layer,
  output logic                 row_valid,
  output logic [CW-1:0]        row_cnt [ROWS],
  output logic [XW-1:0]        row_col [ROWS][COLS],
  output logic [ZW-1:0]        row_z
);

  logic                 buf_valid;
  logic [ROWS*COLS-1:0] buf_layer;
  logic [ZW-1:0]        buf_z, next_z;

  // Stage 0: cycle buffer register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_valid <= 1'b0;
      buf_layer <= '0;
      buf_z     <= '0;
      next_z    <= '0;
    end else begin
      buf_valid <= syn_valid;
      if (syn_valid) begin
        buf_layer <= syn_layer;
        buf_z     <= next_z;
        next_z    <= next_z + 1'b1;
      end
    end
  end

  // Stage 1: all rows compacted in parallel.
  logic [CW-1:0] enc_cnt [ROWS];
  logic [XW-1:0] enc_col [ROWS][COLS];

  always_comb begin
    for (int y = 0; y < ROWS; y++) begin
      enc_cnt[y] = '0;
      for (int k = 0; k < COLS; k++) enc_col[y][k] = '0;
      for (int x = 0; x < COLS; x++) begin
        if (buf_layer[y*COLS + x]) begin
          enc_col[y][enc_cnt[y]] = XW'(x);
          enc_cnt[y] = enc_cnt[y] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_valid <= 1'b0;
      row_z     <= '0;
      for (int y = 0; y < ROWS; y++) begin
        row_cnt[y] <= '0;
        for (int k = 0; k < COLS; k++) row_col[y][k] <= '0;
      end
    end else begin
      row_valid <= buf_valid;
      if (buf_valid) begin
        row_z   <= buf_z;
        row_cnt <= enc_cnt;
        row_col <= enc_col;
      end
    end
  end

endmodule
