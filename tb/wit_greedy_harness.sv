// wit_greedy_harness: stimulus and reference model for end-to-end tests of
// wit_greedy; the test tops instantiate it next to the decoder.
//
// 1. Builds a random weighted decoding graph for a distance-D planar code:
//    horizontal edges (data qubits, including the left/right boundary
//    edges), vertical edges between rows, and time edges between layers
//    (measurement errors), integer weights 1..9. The weight of a node pair
//    is the lightest path between them inside a WIN-layer window (paths do
//    not pass through the boundary), that of a node to the boundary the
//    lightest path to any boundary edge; both are clipped to 254. They are
//    found by repeated edge relaxation and written into the decoder's weight
//    tables.
// 2. Phase A: random layers (each ancilla active with FLIP_PERMILLE/1000,
//    two layers in every 11 with BURST_PERMILLE/1000), one at a time, each after the decoder has gone idle. A reference model
//    keeps its own queue and replays every round: pairing window, entry
//    flags, the allowed-weight ladder, first least-weight pair per clock,
//    final-round rule, overflow. Every matched pair (order, nodes, weight),
//    the round length (ceil(P/NUM_TABLES) + matches + steps + 5 clocks) and
//    the overflow count are compared. Then a flush, also modelled.
// 3. Phase B (if STRESS_LAYERS > 0): layers on back-to-back clocks while the
//    decoder is busy; checks the pair stream is well formed and that a flush
//    drains the queue.
// With FINISH = 0 it sets done instead of ending the simulation, so that
// several harnesses can share one test top.
// Mechanisms counted (each must occur): node-node match, boundary match,
// ladder step, non-final round leaving nodes, final round for an old head
// node, for a full queue and for a flush, queue overflow.
module wit_greedy_harness #(
  parameter int D             = 3,
  parameter int N_ACT         = 5,
  parameter int QDEPTH        = 8,
  parameter int NUM_TABLES    = 3,
  parameter int WW            = 8,
  parameter int LEVELS        = 4,
  parameter int ZW            = 6,
  parameter int LAYERS        = 300,
  parameter int FLIP_PERMILLE = 150,
  parameter int STRESS_LAYERS = 40,
  parameter int BURST_PERMILLE = 950,
  parameter bit SET_LADDER    = 1,
  parameter bit REQUIRE_ALL   = 1,
  parameter bit FINISH        = 1,
  localparam int ROWS  = D,
  localparam int COLS  = D - 1,
  localparam int WIN   = D,
  localparam int XW    = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int YW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int NW    = ZW + YW + XW,
  localparam int NPL   = ROWS * COLS,
  localparam int DEPTH = WIN * NPL * NPL + NPL,
  localparam int AW    = $clog2(DEPTH),
  localparam int QW    = $clog2(QDEPTH + 1),
  localparam int LVW   = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int P     = N_ACT * (N_ACT + 1) / 2,
  localparam int G     = (P + NUM_TABLES - 1) / NUM_TABLES
) (
  output logic                 clk,
  output logic                 rst_n,
  output logic                 syn_valid,
  output logic [ROWS*COLS-1:0] syn_layer,
  output logic                 flush,
  output logic                 wt_we,
  output logic [AW-1:0]        wt_waddr,
  output logic [WW-1:0]        wt_wdata,
  output logic                 awt_we,
  output logic [LVW-1:0]       awt_idx,
  output logic [WW-1:0]        awt_val,
  input  logic                 pair_valid,
  input  logic [NW-1:0]        pair_a,
  input  logic [NW-1:0]        pair_b,
  input  logic                 pair_boundary,
  input  logic [WW-1:0]        pair_w,
  input  logic                 busy,
  input  logic                 round_done,
  input  logic [15:0]          round_cycles,
  input  logic [QW-1:0]        q_count,
  input  logic                 overflow,
  input  logic [31:0]          ovf_count,
  input  logic [31:0]          n_rounds,
  input  logic [31:0]          n_final,
  input  logic [31:0]          n_steps
);
  localparam int V = WIN * NPL;
  localparam int INF = 1 << 20;

  int checks = 0, failures = 0;
  int cyc = 0;
  bit done = 0;   // set at the end when FINISH = 0


  // ---------------- weights ----------------
  int wh [ROWS][COLS+1];
  int wv [ROWS][COLS];
  int wtm [ROWS][COLS];
  logic [WW-1:0] table_w [DEPTH];
  int thr [LEVELS];

  function automatic int vid(int z, int y, int x);
    return (z * ROWS + y) * COLS + x;
  endfunction

  // lightest paths from one set of sources by repeated relaxation
  task automatic relax(ref int dst [V]);
    bit changed;
    changed = 1;
    while (changed) begin
      changed = 0;
      for (int z = 0; z < WIN; z++)
        for (int y = 0; y < ROWS; y++)
          for (int x = 0; x < COLS; x++) begin
            int u, c;
            u = vid(z, y, x);
            c = dst[u];
            if (x > 0        && dst[vid(z, y, x-1)] + wh[y][x]   < c) c = dst[vid(z, y, x-1)] + wh[y][x];
            if (x < COLS - 1 && dst[vid(z, y, x+1)] + wh[y][x+1] < c) c = dst[vid(z, y, x+1)] + wh[y][x+1];
            if (y > 0        && dst[vid(z, y-1, x)] + wv[y-1][x] < c) c = dst[vid(z, y-1, x)] + wv[y-1][x];
            if (y < ROWS - 1 && dst[vid(z, y+1, x)] + wv[y][x]   < c) c = dst[vid(z, y+1, x)] + wv[y][x];
            if (z > 0        && dst[vid(z-1, y, x)] + wtm[y][x]  < c) c = dst[vid(z-1, y, x)] + wtm[y][x];
            if (z < WIN - 1  && dst[vid(z+1, y, x)] + wtm[y][x]  < c) c = dst[vid(z+1, y, x)] + wtm[y][x];
            if (c < dst[u]) begin dst[u] = c; changed = 1; end
          end
    end
  endtask

  function automatic logic [WW-1:0] clip(int v);
    return (v > 254) ? WW'(254) : WW'(v);
  endfunction

  task automatic build_tables();
    int dst [V];
    for (int y = 0; y < ROWS; y++) begin
      for (int x = 0; x <= COLS; x++) wh[y][x] = 1 + $urandom % 9;
      for (int x = 0; x < COLS; x++) begin wv[y][x] = 1 + $urandom % 9; wtm[y][x] = 1 + $urandom % 9; end
    end
    for (int s = 0; s < NPL; s++) begin
      for (int u = 0; u < V; u++) dst[u] = INF;
      dst[s] = 0;
      relax(dst);
      for (int dz = 0; dz < WIN; dz++)
        for (int t = 0; t < NPL; t++)
          table_w[(dz * NPL + s) * NPL + t] = clip(dst[dz * NPL + t]);
    end
    for (int u = 0; u < V; u++) dst[u] = INF;
    for (int y = 0; y < ROWS; y++) begin
      dst[vid(0, y, 0)] = wh[y][0];
      if (wh[y][COLS] < dst[vid(0, y, COLS-1)]) dst[vid(0, y, COLS-1)] = wh[y][COLS];
    end
    relax(dst);
    for (int t = 0; t < NPL; t++) table_w[WIN * NPL * NPL + t] = clip(dst[t]);
  endtask

  // ---------------- reference model ----------------
  typedef struct packed { logic [NW-1:0] a; logic [NW-1:0] b; logic bnd; logic [WW-1:0] w; } pair_t;
  logic [NW-1:0] mq [$];
  int next_z = 0;
  int m_ovf = 0;
  pair_t got [$];
  int last_cycles;
  // mechanism counters
  int c_pair = 0, c_bnd = 0, c_step = 0, c_left = 0, c_fin_age = 0, c_fin_full = 0, c_fin_flush = 0;
  int c_rounds = 0, cyc_sum = 0, cyc_min = INF, cyc_max = 0;

  function automatic int nidx(logic [NW-1:0] v);
    return int'(v[XW+YW-1 -: YW]) * COLS + int'(v[XW-1:0]);
  endfunction
  function automatic int zof(logic [NW-1:0] v);
    return int'(v[NW-1 -: ZW]);
  endfunction

  // replay one round; returns expected pairs, updates the model queue
  task automatic model_round(input bit flushing, output pair_t exp [$], output int steps);
    int n, e, lvl, last;
    bit fin, full, old;
    int ei [P], ej [P], ew [P];
    bit ef [P];
    bit matched [N_ACT];
    logic [NW-1:0] kept [$];
    exp.delete();
    steps = 0;
    n = (mq.size() < N_ACT) ? mq.size() : N_ACT;
    full = mq.size() == QDEPTH;
    old  = ((next_z - zof(mq[0])) % (1 << ZW) + (1 << ZW)) % (1 << ZW) >= WIN;
    fin  = flushing || full || old;
    if (flushing) c_fin_flush++;
    else if (full) c_fin_full++;
    else if (old) c_fin_age++;
    e = 0;
    for (int i = 0; i < N_ACT; i++) begin
      matched[i] = 0;
      for (int j = i; j < N_ACT; j++) begin
        ei[e] = i; ej[e] = j; ef[e] = 0; ew[e] = 0;
        if (i < n && j < n) begin
          int dz, addr;
          dz = ((zof(mq[j]) - zof(mq[i])) % (1 << ZW) + (1 << ZW)) % (1 << ZW);
          if (i == j) addr = WIN * NPL * NPL + nidx(mq[i]);
          else        addr = (dz * NPL + nidx(mq[i])) * NPL + nidx(mq[j]);
          if (i == j || dz < WIN) begin
            ew[e] = (addr < DEPTH) ? int'(table_w[addr]) : 255;
            ef[e] = ew[e] != 255;
          end
        end
        e++;
      end
    end
    lvl = 0;
    last = fin ? LEVELS - 1 : LEVELS - 2;
    forever begin
      int best, bw;
      bit any;
      best = -1; bw = INF; any = 0;
      for (int k = 0; k < P; k++)
        if (ef[k]) begin
          any = 1;
          if (ew[k] < bw) begin bw = ew[k]; best = k; end
        end
      if (best >= 0 && bw <= thr[lvl]) begin
        pair_t p;
        p.a = mq[ei[best]]; p.b = mq[ej[best]]; p.bnd = ei[best] == ej[best]; p.w = WW'(bw);
        exp.push_back(p);
        if (p.bnd) c_bnd++; else c_pair++;
        matched[ei[best]] = 1; matched[ej[best]] = 1;
        for (int k = 0; k < P; k++)
          if (matched[ei[k]] || matched[ej[k]]) ef[k] = 0;
      end else if (any && lvl < last) begin
        lvl++; steps++;
      end else begin
        if (any) c_left++;
        break;
      end
    end
    for (int i = 0; i < mq.size(); i++)
      if (!(i < N_ACT && matched[i])) kept.push_back(mq[i]);
    mq = kept;
  endtask

  task automatic model_push(input logic [ROWS*COLS-1:0] l);
    int room, added;
    room = QDEPTH - mq.size();
    added = 0;
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++)
        if (l[y*COLS + x]) begin
          if (added < room) mq.push_back({ZW'(next_z), YW'(y), XW'(x)});
          added++;
        end
    if (added > room) m_ovf++;
    next_z++;
  endtask

  task automatic compare_round(input pair_t exp [$], input int steps, input bit check_time);
    int expc;
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("round: %0d pairs, expected %0d", got.size(), exp.size());
    end else begin
      foreach (exp[k]) begin
        checks++;
        if (got[k] != exp[k]) begin
          failures++;
          $display("pair %0d: got a=%h b=%h bnd=%0d w=%0d exp a=%h b=%h bnd=%0d w=%0d", k,
                   got[k].a, got[k].b, got[k].bnd, got[k].w, exp[k].a, exp[k].b, exp[k].bnd, exp[k].w);
        end
      end
    end
    expc = G + exp.size() + steps + 5;
    if (check_time) begin
      checks++;
      if (last_cycles != expc) begin failures++; $display("round took %0d clocks, expected %0d", last_cycles, expc); end
    end
    c_step += steps;
    c_rounds++;
    cyc_sum += last_cycles;
    if (last_cycles < cyc_min) cyc_min = last_cycles;
    if (last_cycles > cyc_max) cyc_max = last_cycles;
    got.delete();
  endtask

  // ---------------- clock, monitors ----------------
  initial clk = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int rounds_seen = 0;
  always @(posedge clk) begin
    if (rst_n && pair_valid) begin
      pair_t p;
      p.a = pair_a; p.b = pair_b; p.bnd = pair_boundary; p.w = pair_w;
      got.push_back(p);
      checks++;
      if (pair_boundary != (pair_a == pair_b)) begin failures++; $display("boundary flag inconsistent"); end
    end
    if (rst_n && round_done) begin
      rounds_seen <= rounds_seen + 1;
      last_cycles <= int'(round_cycles);
    end
  end

  task automatic wait_idle();
    repeat (8) @(negedge clk);
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  // ---------------- main sequence ----------------
  initial begin
    pair_t exp [$];
    int steps, r0, n_ovf_events;
    rst_n = 0; syn_valid = 0; syn_layer = '0; flush = 0;
    wt_we = 0; wt_waddr = '0; wt_wdata = '0; awt_we = 0; awt_idx = '0; awt_val = '0;
    build_tables();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      wt_we = 1; wt_waddr = AW'(a); wt_wdata = table_w[a];
      @(negedge clk);
    end
    wt_we = 0;
    for (int k = 0; k < LEVELS; k++)
      thr[k] = (k == LEVELS - 1) ? (1 << WW) - 2 : ((k + 1) * ((1 << WW) - 1)) / LEVELS;
    if (SET_LADDER) begin
      for (int k = 0; k < LEVELS - 1; k++) begin
        awt_we = 1; awt_idx = LVW'(k); awt_val = WW'(k + 2); thr[k] = k + 2;
        @(negedge clk);
      end
      awt_we = 0;
    end
    // ---- phase A: one layer at a time, checked against the model ----
    for (int n = 0; n < LAYERS; n++) begin
      int per;
      per = FLIP_PERMILLE;
      if (n % 11 >= 9) per = BURST_PERMILLE;     // occasional pairs of dense layers
      syn_valid = 1;
      for (int b = 0; b < ROWS*COLS; b++) syn_layer[b] = ($urandom % 1000) < per;
      @(negedge clk);
      syn_valid = 0;
      r0 = rounds_seen;
      model_push(syn_layer);
      wait_idle();
      if (mq.size() > 0) begin
        model_round(1'b0, exp, steps);
        checks++;
        if (rounds_seen != r0 + 1) begin failures++; $display("layer %0d: %0d rounds, expected 1", n, rounds_seen - r0); end
        compare_round(exp, steps, 1'b1);
      end else begin
        checks++;
        if (rounds_seen != r0 || got.size() != 0) begin failures++; $display("layer %0d: unexpected round", n); end
      end
      checks++;
      if (int'(q_count) != mq.size()) begin failures++; $display("layer %0d: queue %0d, expected %0d", n, q_count, mq.size()); end
    end
    checks++;
    if (int'(ovf_count) != m_ovf) begin failures++; $display("overflows %0d, expected %0d", ovf_count, m_ovf); end
    // flush
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    while (mq.size() > 0) begin
      r0 = rounds_seen;
      while (rounds_seen == r0) @(negedge clk);
      @(negedge clk);
      model_round(1'b1, exp, steps);
      compare_round(exp, steps, 1'b1);
    end
    wait_idle();
    checks++;
    if (q_count != '0) begin failures++; $display("flush left %0d nodes", q_count); end
    n_ovf_events = m_ovf;
    // ---- phase B: back-to-back layers ----
    if (STRESS_LAYERS > 0) begin
      for (int n = 0; n < STRESS_LAYERS; n++) begin
        syn_valid = 1;
        for (int b = 0; b < ROWS*COLS; b++) syn_layer[b] = ($urandom % 1000) < 500;
        @(negedge clk);
      end
      syn_valid = 0;
      repeat (20) @(negedge clk);
      flush = 1;
      @(negedge clk) flush = 0;
      wait_idle();
      while (busy || q_count != '0) @(negedge clk);
      checks++;
      if (int'(ovf_count) <= n_ovf_events) begin failures++; $display("no overflow under back-to-back layers"); end
      got.delete();
    end
    // ---- mechanisms ----
    $display("D=%0d N_ACT=%0d QDEPTH=%0d layers=%0d", D, N_ACT, QDEPTH, LAYERS);
    $display("rounds %0d  clocks/round min %0d avg %0d max %0d (checked rounds)", c_rounds, cyc_min,
             (c_rounds > 0) ? cyc_sum / c_rounds : 0, cyc_max);
    $display("pairs %0d boundary %0d steps %0d rounds-leaving-nodes %0d final(age) %0d final(full) %0d final(flush) %0d overflows %0d",
             c_pair, c_bnd, c_step, c_left, c_fin_age, c_fin_full, c_fin_flush, m_ovf);
    if (REQUIRE_ALL) begin
      checks++;
      if (c_pair == 0 || c_bnd == 0 || c_step == 0 || c_left == 0 || c_fin_age == 0 ||
          c_fin_full == 0 || c_fin_flush == 0 || m_ovf == 0) begin
        failures++; $display("a mechanism never occurred");
      end
    end else begin
      checks++;
      if (c_pair == 0 || c_bnd == 0) begin failures++; $display("a mechanism never occurred"); end
    end
    if (FINISH) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    done = 1;
  end
endmodule
