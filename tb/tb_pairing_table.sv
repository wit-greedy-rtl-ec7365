// tb_pairing_table: self-checking test of pairing_table.
// A 5-node window over a 3 x 2 layer with a 3-layer window and 3 table
// copies (modelled here as plain arrays with one clock of read latency).
// For random windows it checks every entry's weight and flag against the
// address map computed here, that load_done comes ceil(15/3)+2 clocks after
// start, and that clearing a matched pair drops exactly the entries that
// contain one of its nodes.
module tb_pairing_table;
  localparam int N_ACT = 5, NT = 3, ROWS = 3, COLS = 2, WIN = 3, ZW = 4, WW = 8;
  localparam int XW = 1, YW = 2, NW = ZW + YW + XW, NPL = 6;
  localparam int DEPTH = WIN * NPL * NPL + NPL, AW = $clog2(DEPTH);
  localparam int P = 15, G = 5, IW = 3;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [NW-1:0] win_node [N_ACT];
  logic [N_ACT-1:0] win_valid = '0;
  logic rd_en;
  logic [AW-1:0] rd_addr [NT];
  logic [WW-1:0] rd_data [NT];
  logic load_done;
  logic clr_valid = 0;
  logic [IW-1:0] clr_i = '0, clr_j = '0;
  logic [P-1:0] flag;
  logic [WW-1:0] weight [P];
  logic [NW-1:0] snap_node [N_ACT];
  int checks = 0, failures = 0;
  logic [WW-1:0] mem [DEPTH];
  int ei [P], ej [P];

  pairing_table #(.N_ACT(N_ACT), .NUM_TABLES(NT), .ROWS(ROWS), .COLS(COLS),
                  .WIN(WIN), .ZW(ZW), .WW(WW)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk)
    if (rd_en) for (int t = 0; t < NT; t++) rd_data[t] <= mem[rd_addr[t]];

  function automatic int nidx(logic [NW-1:0] v);
    return int'(v[XW+YW-1:XW]) * COLS + int'(v[XW-1:0]);
  endfunction

  initial begin
    int e;
    e = 0;
    for (int i = 0; i < N_ACT; i++)
      for (int j = i; j < N_ACT; j++) begin ei[e] = i; ej[e] = j; e++; end
    for (int a = 0; a < DEPTH; a++) mem[a] = (($urandom % 8) == 0) ? '1 : WW'($urandom % 50);
    for (int t = 0; t < NT; t++) rd_data[t] = '0;
    for (int i = 0; i < N_ACT; i++) win_node[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 100; r++) begin
      logic [P-1:0] eflag;
      int z, nv, lat;
      z = $urandom % 16;
      nv = $urandom % (N_ACT + 1);
      for (int i = 0; i < N_ACT; i++) begin
        int y, x;
        z = (z + (($urandom % 3) == 0 ? 1 : 0)) % 16;
        y = $urandom % ROWS; x = $urandom % COLS;
        win_node[i] = {ZW'(z), YW'(y), XW'(x)};
        win_valid[i] = i < nv;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!load_done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != G + 2) begin failures++; $display("load latency %0d exp %0d", lat, G + 2); end
      for (int k = 0; k < P; k++) begin
        int i, j, addr, dz;
        bit ok;
        i = ei[k]; j = ej[k];
        dz = (int'(win_node[j][NW-1 -: ZW]) - int'(win_node[i][NW-1 -: ZW]) + 16) % 16;
        if (i == j) begin addr = WIN * NPL * NPL + nidx(win_node[i]); ok = win_valid[i]; end
        else begin
          addr = (dz * NPL + nidx(win_node[i])) * NPL + nidx(win_node[j]);
          ok = win_valid[i] && win_valid[j] && dz < WIN;
        end
        eflag[k] = ok && (mem[addr % DEPTH] != '1);
        checks++;
        if (flag[k] != eflag[k] || (eflag[k] && weight[k] != mem[addr % DEPTH])) begin
          failures++;
          $display("round %0d entry %0d (%0d,%0d): flag %0d w %0d exp flag %0d w %0d",
                   r, k, i, j, flag[k], weight[k], eflag[k], mem[addr % DEPTH]);
        end
      end
      // clear two matched nodes
      begin
        int a, b;
        a = $urandom % N_ACT; b = $urandom % N_ACT;
        @(negedge clk);
        clr_valid = 1; clr_i = IW'(a); clr_j = IW'(b);
        @(negedge clk);
        clr_valid = 0;
        for (int k = 0; k < P; k++) begin
          bit hit;
          hit = ei[k] == a || ej[k] == a || ei[k] == b || ej[k] == b;
          checks++;
          if (flag[k] != (eflag[k] && !hit)) begin failures++; $display("clear entry %0d wrong", k); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
