// syndrome_merge: merges the encoded rows of one layer into a single compact
// list of active nodes, ready to be appended to the syndrome queue.
//
// Three pipeline stages, one layer per clock:
//   1. register the rows and compute each row's start offset (exclusive
//      prefix sum of the row counts) and the layer total;
//   2. scatter: node k of the list is column row_col[y][k-off[y]] of the row
//      y whose range [off[y], off[y]+cnt[y]) contains k;
//   3. output register: lay_valid/lay_cnt/lay_node, one clock pulse per layer
//      (also for a layer with no active node, so that the decoder sees time
//      pass).
// A node is packed as {z, y, x}. Nodes keep row-major order (row 0 first,
// lower column first). The document fixes the three-stage pipeline; what each
// stage does is this design's choice.
module syndrome_merge #(
  parameter int ROWS = 11,
  parameter int COLS = 10,
  parameter int ZW   = 6,
  localparam int XW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int YW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int CW  = $clog2(COLS + 1),
  localparam int NPL = ROWS * COLS,
  localparam int LW  = $clog2(NPL + 1),
  localparam int NW  = ZW + YW + XW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          row_valid,
  input  logic [CW-1:0] row_cnt [ROWS],
  input  logic [XW-1:0] row_col [ROWS][COLS],
  input  logic [ZW-1:0] row_z,
  output logic          lay_valid,
  output logic [LW-1:0] lay_cnt,
  output logic [NW-1:0] lay_node [NPL]
);

  // ---- stage 1: offsets ----
  logic          s1_valid;
  logic [CW-1:0] s1_cnt [ROWS];
  logic [XW-1:0] s1_col [ROWS][COLS];
  logic [ZW-1:0] s1_z;
  logic [LW-1:0] s1_off [ROWS];
  logic [LW-1:0] s1_tot;
  logic [LW-1:0] off_c [ROWS];
  logic [LW-1:0] tot_c;

  always_comb begin
    tot_c = '0;
    for (int y = 0; y < ROWS; y++) begin
      off_c[y] = tot_c;
      tot_c    = tot_c + LW'(row_cnt[y]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_z     <= '0;
      s1_tot   <= '0;
      for (int y = 0; y < ROWS; y++) begin
        s1_cnt[y] <= '0;
        s1_off[y] <= '0;
        for (int k = 0; k < COLS; k++) s1_col[y][k] <= '0;
      end
    end else begin
      s1_valid <= row_valid;
      if (row_valid) begin
        s1_cnt <= row_cnt;
        s1_col <= row_col;
        s1_z   <= row_z;
        s1_off <= off_c;
        s1_tot <= tot_c;
      end
    end
  end

  // ---- stage 2: scatter ----
  logic          s2_valid;
  logic [LW-1:0] s2_tot;
  logic [NW-1:0] s2_node [NPL];
  logic [NW-1:0] scat [NPL];

  always_comb begin
    for (int k = 0; k < NPL; k++) scat[k] = '0;
    for (int y = 0; y < ROWS; y++) begin
      for (int k = 0; k < COLS; k++) begin
        if (CW'(k) < s1_cnt[y])
          scat[s1_off[y] + LW'(k)] = {s1_z, YW'(y), s1_col[y][k]};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_tot   <= '0;
      for (int k = 0; k < NPL; k++) s2_node[k] <= '0;
    end else begin
      s2_valid <= s1_valid;
      if (s1_valid) begin
        s2_tot  <= s1_tot;
        s2_node <= scat;
      end
    end
  end

  // ---- stage 3: output register towards the queue ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lay_valid <= 1'b0;
      lay_cnt   <= '0;
      for (int k = 0; k < NPL; k++) lay_node[k] <= '0;
    end else begin
      lay_valid <= s2_valid;
      if (s2_valid) begin
        lay_cnt  <= s2_tot;
        lay_node <= s2_node;
      end
    end
  end

endmodule
