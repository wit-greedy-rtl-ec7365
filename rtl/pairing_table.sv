// pairing_table: the register table of all node pairs of the pairing window.
//
// On start it takes a snapshot of the window (the first N_ACT nodes of the
// syndrome queue) and fills one {flag, weight} entry per pair (i, j), i < j,
// and one boundary entry (i, i) per node, P = N_ACT*(N_ACT+1)/2 entries in
// the order given by wit_pkg::pair_i/pair_j. NUM_TABLES entries are looked up
// per clock, one in each copy of the weight table, so loading takes
// ceil(P/NUM_TABLES) issue clocks plus one clock of read latency; load_done
// pulses on the clock after the last entry is written.
// An entry's flag is set when both nodes are present, their layers are less
// than WIN apart and the weight is not the all-ones "never" value; for a
// boundary entry, when the node is present. While matching, clr_valid with
// node indices clr_i/clr_j clears the flag of every entry that contains
// either node, in one clock.
// The table of registers, the parallel table queries and the flag clearing
// follow the document; the boundary entries and the address map are this
// design's choice.
module pairing_table
  import wit_pkg::*;
#(
  parameter int N_ACT      = 20,
  parameter int NUM_TABLES = 8,
  parameter int ROWS       = 11,
  parameter int COLS       = 10,
  parameter int WIN        = 11,
  parameter int ZW         = 6,
  parameter int WW         = 8,
  localparam int XW    = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int YW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int NW    = ZW + YW + XW,
  localparam int NPL   = ROWS * COLS,
  localparam int DEPTH = WIN * NPL * NPL + NPL,
  localparam int AW    = $clog2(DEPTH),
  localparam int P     = N_ACT * (N_ACT + 1) / 2,
  localparam int G     = (P + NUM_TABLES - 1) / NUM_TABLES,
  localparam int GW    = (G > 1) ? $clog2(G) : 1,
  localparam int IW    = (N_ACT > 1) ? $clog2(N_ACT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NW-1:0]    win_node  [N_ACT],
  input  logic [N_ACT-1:0] win_valid,
  output logic             rd_en,
  output logic [AW-1:0]    rd_addr [NUM_TABLES],
  input  logic [WW-1:0]    rd_data [NUM_TABLES],
  output logic             load_done,
  input  logic             clr_valid,
  input  logic [IW-1:0]    clr_i,
  input  logic [IW-1:0]    clr_j,
  output logic [P-1:0]     flag,
  output logic [WW-1:0]    weight [P],
  output logic [NW-1:0]    snap_node [N_ACT]
);

  typedef int pidx_t [P];
  function automatic pidx_t mk_pi();
    pidx_t r;
    for (int e = 0; e < P; e++) r[e] = pair_i(N_ACT, e);
    return r;
  endfunction
  function automatic pidx_t mk_pj();
    pidx_t r;
    for (int e = 0; e < P; e++) r[e] = pair_j(N_ACT, e);
    return r;
  endfunction
  localparam pidx_t PI = mk_pi();
  localparam pidx_t PJ = mk_pj();

  logic [N_ACT-1:0] snap_valid;
  logic             loading;
  logic [GW-1:0]    grp;
  logic             rsp_valid, rsp_last;
  logic [GW-1:0]    rsp_grp;
  logic [NUM_TABLES-1:0] iss_ok, rsp_ok;

  // ---- address generation for the current group ----
  always_comb begin
    for (int t = 0; t < NUM_TABLES; t++) begin
      int e, i, j;
      logic [NW-1:0] a, b;
      logic [ZW-1:0] dz;
      int na, nb;
      e  = int'(grp) * NUM_TABLES + t;
      i  = (e < P) ? PI[e % P] : 0;
      j  = (e < P) ? PJ[e % P] : 0;
      a  = snap_node[i];
      b  = snap_node[j];
      dz = b[NW-1 -: ZW] - a[NW-1 -: ZW];
      na = int'(a[XW+YW-1 -: YW]) * COLS + int'(a[XW-1:0]);
      nb = int'(b[XW+YW-1 -: YW]) * COLS + int'(b[XW-1:0]);
      if (i == j) begin
        rd_addr[t] = AW'(WIN * NPL * NPL + na);
        iss_ok[t]  = (e < P) && snap_valid[i];
      end else begin
        rd_addr[t] = AW'((int'(dz) * NPL + na) * NPL + nb);
        iss_ok[t]  = (e < P) && snap_valid[i] && snap_valid[j] && (int'(dz) < WIN);
      end
    end
  end
  assign rd_en = loading;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loading    <= 1'b0;
      grp        <= '0;
      rsp_valid  <= 1'b0;
      rsp_last   <= 1'b0;
      rsp_grp    <= '0;
      rsp_ok     <= '0;
      load_done  <= 1'b0;
      snap_valid <= '0;
      flag       <= '0;
      for (int i = 0; i < N_ACT; i++) snap_node[i] <= '0;
      for (int e = 0; e < P; e++) weight[e] <= '0;
    end else begin
      load_done <= rsp_valid && rsp_last;
      rsp_valid <= loading;
      rsp_last  <= loading && (int'(grp) == G - 1);
      rsp_grp   <= grp;
      rsp_ok    <= iss_ok;
      if (start) begin
        snap_node  <= win_node;
        snap_valid <= win_valid;
        loading    <= 1'b1;
        grp        <= '0;
        flag       <= '0;
      end else if (loading) begin
        if (int'(grp) == G - 1) loading <= 1'b0;
        else grp <= grp + 1'b1;
      end
      // responses of the previous clock's lookups
      if (rsp_valid) begin
        for (int t = 0; t < NUM_TABLES; t++) begin
          if (int'(rsp_grp) * NUM_TABLES + t < P) begin
            weight[(int'(rsp_grp) * NUM_TABLES + t) % P] <= rd_data[t];
            flag[(int'(rsp_grp) * NUM_TABLES + t) % P]   <= rsp_ok[t] && (rd_data[t] != '1);
          end
        end
      end
      // clear every pair that contains a matched node
      if (clr_valid) begin
        for (int e = 0; e < P; e++) begin
          if (PI[e] == int'(clr_i) || PJ[e] == int'(clr_i) ||
              PI[e] == int'(clr_j) || PJ[e] == int'(clr_j))
            flag[e] <= 1'b0;
        end
      end
    end
  end

  a_no_clear_while_loading : assert property (@(posedge clk) disable iff (!rst_n)
    clr_valid |-> !(loading || rsp_valid));

endmodule
