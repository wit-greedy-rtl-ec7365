// wit_greedy: weighted iterative greedy decoder for one syndrome type of a
// distance-D planar surface code.
//
// Data flow (one layer of ROWS x COLS syndrome bits per code cycle):
//   syn_layer -> cycle_buffer (register + parallel row encoding)
//             -> syndrome_merge (3-stage merge into a {z,y,x} node list)
//             -> syndrome_queue (QDEPTH nodes, oldest first)
//   per round: the first N_ACT queue nodes -> pairing_table, filled from
//   NUM_TABLES copies of the pre-calculated weight_table -> greedy_comparator
//   (first least-weight pair under the allowed weight of allow_weight_table)
//   -> matching_pair_table -> pair_* outputs; matched nodes are popped from
//   the queue at the end of the round. greedy_ctrl sequences the round.
// Interface: the weight tables (all copies at once) and the allowed-weight
// ladder are written through wt_* and awt_* before decoding. flush forces
// final rounds until the queue is empty. Each matched pair appears for one
// clock on pair_valid with both nodes' {z,y,x} (pair_a == pair_b and
// pair_boundary high for a match to the boundary) and its weight; they are
// meant for the Pauli frame, which is outside this module.
// Timing: a layer reaches the queue 5 clocks after syn_valid; a round takes
// 1 + ceil(P/NUM_TABLES) + 2 clocks to load, one clock per matched pair, one
// per ladder step, one to finish and one to pop (P = N_ACT*(N_ACT+1)/2).
// Defaults are the document's d = 11 configuration: 20-node pairing window,
// 39-entry queue, window of 11 layers; table count, weight width and ladder
// length are this design's choice.
module wit_greedy #(
  parameter int D          = 11,
  parameter int N_ACT      = 20,
  parameter int QDEPTH     = 39,
  parameter int NUM_TABLES = 8,
  parameter int WW         = 8,
  parameter int LEVELS     = 6,
  parameter int ZW         = 6,
  localparam int ROWS  = D,
  localparam int COLS  = D - 1,
  localparam int WIN   = D,
  localparam int XW    = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int YW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int NW    = ZW + YW + XW,
  localparam int NPL   = ROWS * COLS,
  localparam int LW    = $clog2(NPL + 1),
  localparam int DEPTH = WIN * NPL * NPL + NPL,
  localparam int AW    = $clog2(DEPTH),
  localparam int QW    = $clog2(QDEPTH + 1),
  localparam int LVW   = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int CW    = $clog2(COLS + 1),
  localparam int IW    = (N_ACT > 1) ? $clog2(N_ACT) : 1,
  localparam int P     = N_ACT * (N_ACT + 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // syndrome input
  input  logic                 syn_valid,
  input  logic [ROWS*COLS-1:0] syn_layer,
  input  logic                 flush,
  // weight-table and ladder configuration
  input  logic                 wt_we,
  input  logic [AW-1:0]        wt_waddr,
  input  logic [WW-1:0]        wt_wdata,
  input  logic                 awt_we,
  input  logic [LVW-1:0]       awt_idx,
  input  logic [WW-1:0]        awt_val,
  // matched pairs towards Pauli frame generation
  output logic                 pair_valid,
  output logic [NW-1:0]        pair_a,
  output logic [NW-1:0]        pair_b,
  output logic                 pair_boundary,
  output logic [WW-1:0]        pair_w,
  // status
  output logic                 busy,
  output logic                 round_done,
  output logic [15:0]          round_cycles,
  output logic [QW-1:0]        q_count,
  output logic                 overflow,
  output logic [31:0]          ovf_count,
  output logic [31:0]          n_rounds,
  output logic [31:0]          n_final,
  output logic [31:0]          n_steps
);

  // ---- active syndrome encoding ----
  logic          row_valid;
  logic [CW-1:0] row_cnt [ROWS];
  logic [XW-1:0] row_col [ROWS][COLS];
  logic [ZW-1:0] row_z;

  cycle_buffer #(.ROWS(ROWS), .COLS(COLS), .ZW(ZW)) u_cbuf (
    .clk, .rst_n, .syn_valid, .syn_layer,
    .row_valid, .row_cnt, .row_col, .row_z);

  logic          lay_valid;
  logic [LW-1:0] lay_cnt;
  logic [NW-1:0] lay_node [NPL];

  syndrome_merge #(.ROWS(ROWS), .COLS(COLS), .ZW(ZW)) u_merge (
    .clk, .rst_n, .row_valid, .row_cnt, .row_col, .row_z,
    .lay_valid, .lay_cnt, .lay_node);

  // ---- syndrome queue ----
  logic [NW-1:0]    win_node [N_ACT];
  logic [N_ACT-1:0] win_valid;
  logic             q_full, pop;
  logic [N_ACT-1:0] matched_mask;

  syndrome_queue #(.QDEPTH(QDEPTH), .N_ACT(N_ACT), .NPL(NPL), .NW(NW)) u_queue (
    .clk, .rst_n,
    .push_valid(lay_valid), .push_cnt(lay_cnt), .push_node(lay_node),
    .pop_valid(pop), .pop_mask(matched_mask),
    .win_node, .win_valid, .count(q_count), .full(q_full),
    .overflow, .ovf_count);

  // ---- pairing table and weight tables ----
  logic          start, load_done, match, step, final_round;
  logic          rd_en;
  logic [AW-1:0] rd_addr [NUM_TABLES];
  logic [WW-1:0] rd_data [NUM_TABLES];
  logic [P-1:0]  pt_flag;
  logic [WW-1:0] pt_weight [P];
  logic [NW-1:0] snap_node [N_ACT];
  logic [IW-1:0] sel_i, sel_j;

  for (genvar t = 0; t < NUM_TABLES; t++) begin : g_wt
    weight_table #(.DEPTH(DEPTH), .WW(WW)) u_wt (
      .clk, .we(wt_we), .waddr(wt_waddr), .wdata(wt_wdata),
      .re(rd_en), .raddr(rd_addr[t]), .rdata(rd_data[t]));
  end

  pairing_table #(.N_ACT(N_ACT), .NUM_TABLES(NUM_TABLES), .ROWS(ROWS), .COLS(COLS),
                  .WIN(WIN), .ZW(ZW), .WW(WW)) u_pt (
    .clk, .rst_n, .start, .win_node, .win_valid,
    .rd_en, .rd_addr, .rd_data, .load_done,
    .clr_valid(match), .clr_i(sel_i), .clr_j(sel_j),
    .flag(pt_flag), .weight(pt_weight), .snap_node);

  // ---- greedy matching ----
  logic [WW-1:0]  allowed, sel_w;
  logic [LVW-1:0] level;
  logic           at_end, found, any_flag;
  logic [$clog2(P)-1:0] sel;

  allow_weight_table #(.LEVELS(LEVELS), .WW(WW)) u_awt (
    .clk, .rst_n, .cfg_we(awt_we), .cfg_idx(awt_idx), .cfg_val(awt_val),
    .restart(start), .final_round, .step, .allowed, .level, .at_end);

  greedy_comparator #(.N_ACT(N_ACT), .WW(WW)) u_cmp (
    .flag(pt_flag), .weight(pt_weight), .allowed,
    .found, .sel, .sel_i, .sel_j, .sel_w, .any_flag);

  logic [$clog2(N_ACT+1)-1:0] mp_cnt;
  logic [IW-1:0] mp_i [N_ACT];
  logic [IW-1:0] mp_j [N_ACT];

  matching_pair_table #(.N_ACT(N_ACT), .NW(NW), .WW(WW)) u_mpt (
    .clk, .rst_n, .clear(start), .rec_valid(match), .rec_i(sel_i), .rec_j(sel_j),
    .rec_w(sel_w), .snap_node, .matched_mask, .mp_cnt, .mp_i, .mp_j,
    .pair_valid, .pair_a, .pair_b, .pair_boundary, .pair_w);

  greedy_ctrl #(.WIN(WIN), .ZW(ZW), .QDEPTH(QDEPTH)) u_ctrl (
    .clk, .rst_n, .layer_in(lay_valid), .flush, .q_count, .q_full,
    .head_z(win_node[0][NW-1 -: ZW]), .load_done, .found, .any_flag, .at_end,
    .start, .final_round, .match, .step, .pop, .busy, .round_done, .round_cycles,
    .n_rounds, .n_final, .n_steps);

endmodule
