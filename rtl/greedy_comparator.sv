// greedy_comparator: picks the pair to match in the current clock.
//
// Purely combinational, compares all P pairing-table entries at once:
//   1. the least weight among the flagged (still unmatched) entries;
//   2. the filter: an entry qualifies if its flag is set, its weight is that
//      least weight and it does not exceed the current allowed weight;
//   3. the first qualifying entry in table order wins (priority select).
// Outputs: found, the winning entry index sel, its nodes sel_i/sel_j (equal
// for a node-to-boundary entry) and weight sel_w; any_flag tells whether any
// unmatched entry is left at all. The two comparator ranks, the sign-bit and
// allowed-weight filter and "first entry of least weight" follow the
// document; the min-reduction written as a loop is this design's choice.
module greedy_comparator
  import wit_pkg::*;
#(
  parameter int N_ACT = 20,
  parameter int WW    = 8,
  localparam int P    = N_ACT * (N_ACT + 1) / 2,
  localparam int PW   = (P > 1) ? $clog2(P) : 1,
  localparam int IW   = (N_ACT > 1) ? $clog2(N_ACT) : 1
) (
  input  logic [P-1:0]  flag,
  input  logic [WW-1:0] weight [P],
  input  logic [WW-1:0] allowed,
  output logic          found,
  output logic [PW-1:0] sel,
  output logic [IW-1:0] sel_i,
  output logic [IW-1:0] sel_j,
  output logic [WW-1:0] sel_w,
  output logic          any_flag
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

  logic [WW-1:0] wmin;
  logic [P-1:0]  qual;

  // rank 1: least weight of the unmatched entries
  always_comb begin
    wmin = '1;
    for (int e = 0; e < P; e++)
      if (flag[e] && weight[e] < wmin) wmin = weight[e];
  end

  // rank 2: sign-bit and allowed-weight filter
  always_comb begin
    for (int e = 0; e < P; e++)
      qual[e] = flag[e] && (weight[e] == wmin) && (weight[e] <= allowed);
  end

  // first qualifying entry
  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int e = P - 1; e >= 0; e--) begin
      if (qual[e]) begin
        found = 1'b1;
        sel   = PW'(e);
      end
    end
    sel_i    = IW'(PI[int'(sel) % P]);
    sel_j    = IW'(PJ[int'(sel) % P]);
    sel_w    = weight[int'(sel) % P];
    any_flag = |flag;
  end

endmodule
