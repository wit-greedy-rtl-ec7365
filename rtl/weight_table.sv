// weight_table: one copy of the pre-calculated weight table.
//
// A DEPTH x WW memory holding the weight of the lightest path between every
// pair of nodes of the decoding window, plus each node's weight to the
// boundary (address map in wit_pkg). The weights are computed off-line from
// the measured error rates of the qubits and written through the write port
// (we/waddr/wdata) before decoding. Reads are synchronous: rdata holds the
// word at raddr one clock after re is high. The decoder keeps
// several identical copies so that several pairs are looked up per clock.
// That the table stores shortest-path weights per node pair is the
// document's; the width, the address map and the single write port shared by
// all copies are this design's choice.
module weight_table #(
  parameter int DEPTH = 133210,
  parameter int WW    = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [WW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [WW-1:0] rdata
);

  logic [WW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= (int'(raddr) < DEPTH) ? mem[raddr] : '1;
  end

endmodule
