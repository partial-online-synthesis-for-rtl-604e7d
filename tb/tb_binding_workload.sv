// tb_binding_workload: binding and placement evaluation on a 20-container
// fabric.
//
// The testbench contains a small run-time binder, as the software of the
// host would run it, and uses it to produce CGRI configurations for random
// fabric configurations, which are then executed on the RTL. The SI is the
// five-operation graph o0,o1 (T0) -> o2,o3 (T1) -> o4 (T2) with
// o0 = T0(A,B), o1 = T0(B,A), o2 = T1(o0), o3 = T1(o1), o4 = T2(o2,o3),
// in two variants with fixed control steps:
//   variant 1 (one FGRA of each type): o1 | o0 | o2 | o3 | o4
//   variant 2 (two T0 FGRAs):          o0 o1 | o2 | o3 | o4
// For every fabric configuration (random containers hold the required FGRAs,
// the remaining containers hold random other FGRAs or are empty), every
// reach D in {2, 6, 10} containers per cycle, 2 or all 4 links made
// available to the binder, and both variants, the SI is
// bound twice: First Fit (first container of the right type, left to right)
// and Communication-Aware (the candidate whose input transfers allow the
// earliest start). Results go to the first free word of the producer's
// connector memory, transfers to the first free link (first fit). A
// transfer over distance d keeps its route for ceil(d/D) cycles (transfer
// delay); when no link is free the operation moves to a later cycle (link
// saturation). The hardware result must equal a reference computation, the
// latency must be K+1 for K words, and neither error flag may rise. Both
// hazards must occur at least once.
//
// Placement phase: starting from random fabric configurations in which most
// containers are empty or hold an FGRA of another SI (type T3, replaceable),
// the FGRAs variant 2 still lacks are loaded one by one in random order,
// each placed either by Cluster Placement (candidate giving the smallest
// span between the leftmost and rightmost container of the variant's FGRAs)
// or by Connectivity Placement (candidate with the smallest sum of
// distance x connectivity to all configured FGRAs). Candidates are empty or
// T3 containers; ties go to the leftmost. Connectivity counts the graph's
// transfers between two types in either direction (T0-T1: 2, T1-T2: 2).
// Each placement is bound with Communication-Aware binding (D = 2, 4 links)
// and executed; the result is checked and the latencies of both placements
// are reported.
module tb_binding_workload;
  import cgri_pkg::*;
  localparam int N = 20, DEPTH = 256, MAXC = 64, NOPS = 5;
  localparam int unsigned CFG_W = cfg_width(N);
  localparam int unsigned NW    = (CFG_W + 31) / 32;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned WW    = $clog2(NW);
  localparam int N_FABRICS = 100, N_PLACE = 100;

  typedef struct packed {
    conn_cfg_t [N-1:0] conn;
    glob_cfg_t         g;
  } cfg_word_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic          cfg_we;
  logic [AW-1:0] cfg_wentry;
  logic [WW-1:0] cfg_wword;
  logic [31:0]   cfg_wdata;
  logic          si_start;
  logic [AW-1:0] si_base;
  word_t         si_opnd [2];
  logic          si_busy, si_done;
  word_t         si_result;
  logic [N-1:0]  fgra_start;
  word_t         fgra_opnd   [N][N_IN];
  word_t         fgra_result [N];
  logic          cfg_conflict, cfg_route_err;
  logic [2:0]    ftype [N];

  int checks = 0, failures = 0, cycle = 0;
  int n_tdh = 0, n_lsh = 0, n_err_cycles = 0;
  int sum_lat [2];        // per binder
  int n_better [2];       // binder strictly better than the other
  int place_lat [2] = '{0, 0};  // Cluster, Connectivity
  bit in_run = 1'b0;
  int n_links_used = N_LINKS;  // links the binder may use

  mgra_fabric #(.N_CONT(N)) dut (.*);

  for (genvar p = 0; p < N; p++) begin : g_cont
    fgra_model u_fgra (.clk, .rst_n, .ftype(ftype[p]), .start(fgra_start[p]),
                       .opnd(fgra_opnd[p]), .result(fgra_result[p]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (in_run && (cfg_conflict || cfg_route_err)) n_err_cycles++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cycle, what);
    end
  endtask

  function automatic word_t t0(word_t a, word_t b); return a * 3 + b; endfunction
  function automatic word_t t1(word_t a, word_t b);
    return {a[23:0], a[31:24]} ^ 32'h5A5A_5A5A ^ b;
  endfunction
  function automatic word_t t2(word_t a, word_t b); return a - b; endfunction

  // ---------------- the SI ----------------
  // op types (fgra_model encoding): T0 = 1, T1 = 2, T2 = 3
  // input sources: -1 none, -2 SI operand A, -3 SI operand B, k = op k
  int op_type [NOPS] = '{1, 1, 2, 2, 3};
  int op_in   [NOPS][2] = '{'{-2, -3}, '{-3, -2}, '{0, -1}, '{1, -1}, '{2, 3}};
  int op_cs   [2][NOPS] = '{'{1, 0, 2, 3, 4}, '{0, 0, 1, 2, 3}};
  int n_cs    [2] = '{5, 4};

  function automatic int lat_of(int ty); return (ty == 2) ? 2 : 1; endfunction

  // ---------------- binder state ----------------
  typedef struct {
    bit link_occ [MAXC][N_LINKS][N];
    int port_addr[MAXC][N][N_LINKS];   // -1 free
    bit in_used  [MAXC][N][N_IN];
    bit start_used[MAXC][N];
    bit wr_used  [MAXC][N];
    int mem_next [N];
  } bstate_t;

  bstate_t   st;
  cfg_word_t prog [MAXC];
  int        res_conn [NOPS], res_addr [NOPS], ready [NOPS];
  int        maxcy;

  function automatic void src_of(int k, output int c, output int a, output int r);
    if (k == -2) begin c = 0; a = 7; r = 1; end
    else if (k == -3) begin c = 1; a = 7; r = 1; end
    else begin c = res_conn[k]; a = res_addr[k]; r = ready[k]; end
  endfunction

  function automatic int ceil_div(int a, int b); return (a + b - 1) / b; endfunction

  // Try to bind op o to container c starting at cycle t; commit if asked.
  // Returns 0 on success, 1 if a link/port was missing, 2 for other reasons.
  function automatic int try_bind(int o, int c, int t, int d_reach, bit commit);
    automatic bstate_t s = st;
    automatic int lat = lat_of(op_type[o]);
    if (t + lat >= MAXC - 1) return 2;
    if (s.start_used[t][c] || s.wr_used[t + lat - 1][c] || s.mem_next[c] >= 7) return 2;
    for (int i = 0; i < 2; i++) begin
      automatic int k = op_in[o][i];
      automatic int sc, sa, r, d, need, f;
      automatic bit found = 1'b0;
      if (k == -1) continue;
      src_of(k, sc, sa, r);
      d    = (sc > c) ? sc - c : c - sc;
      need = (d == 0) ? 1 : ceil_div(d, d_reach);
      f    = t - need + 1;
      if (f < r) return 2;
      for (int cy = f; cy <= t; cy++) if (s.in_used[cy][c][i]) return 2;
      if (d == 0) begin
        for (int p = 0; p < int'(N_LINKS) && !found; p++)
          if (s.port_addr[t][c][p] == -1 || s.port_addr[t][c][p] == sa) begin
            found = 1'b1;
            s.port_addr[t][c][p] = sa;
            s.in_used[t][c][i] = 1'b1;
            if (commit) begin
              prog[t].conn[c].lnk[p].rd_addr = MEM_AW'(sa);
              prog[t].conn[c].in_sel[i].src  = IN_LOCAL;
              prog[t].conn[c].in_sel[i].link = LINK_W'(p);
            end
          end
        if (!found) return 1;
      end else begin
        automatic int lo = (sc < c) ? sc : c;
        automatic int hi = (sc < c) ? c : sc;
        for (int l = 0; l < n_links_used && !found; l++) begin
          automatic bit ok = 1'b1;
          for (int cy = f; cy <= t && ok; cy++) begin
            if (!(s.port_addr[cy][sc][l] == -1 || s.port_addr[cy][sc][l] == sa)) ok = 1'b0;
            for (int p = lo; p <= hi; p++) if (s.link_occ[cy][l][p]) ok = 1'b0;
          end
          if (ok) begin
            found = 1'b1;
            for (int cy = f; cy <= t; cy++) begin
              s.port_addr[cy][sc][l] = sa;
              s.in_used[cy][c][i] = 1'b1;
              for (int p = lo; p <= hi; p++) s.link_occ[cy][l][p] = 1'b1;
              if (commit) begin
                prog[cy].conn[sc].lnk[l].drive   = 1'b1;
                prog[cy].conn[sc].lnk[l].rd_addr = MEM_AW'(sa);
                if (lo > 0)     prog[cy].conn[lo].lnk[l].cut   = 1'b1;
                if (hi + 1 < N) prog[cy].conn[hi+1].lnk[l].cut = 1'b1;
                prog[cy].conn[c].in_sel[i].src  = (sc < c) ? IN_LEFT : IN_RIGHT;
                prog[cy].conn[c].in_sel[i].link = LINK_W'(l);
              end
            end
            if (commit && need > 1) n_tdh++;
          end
        end
        if (!found) return 1;
      end
    end
    if (commit) begin
      s.start_used[t][c] = 1'b1;
      s.wr_used[t + lat - 1][c] = 1'b1;
      prog[t].conn[c].start = 1'b1;
      prog[t + lat - 1].conn[c].wr_src  = WR_FGRA;
      prog[t + lat - 1].conn[c].wr_addr = MEM_AW'(s.mem_next[c]);
      res_conn[o] = c;
      res_addr[o] = s.mem_next[c];
      ready[o]    = t + lat;
      s.mem_next[c]++;
      if (t + lat > maxcy) maxcy = t + lat;
      st = s;
    end
    return 0;
  endfunction

  // earliest start of op o on container c from cycle t_min; -1 if none
  function automatic int earliest(int o, int c, int t_min, int d_reach, output bit saturated);
    saturated = 1'b0;
    for (int t = t_min; t < MAXC - 3; t++) begin
      automatic int r = try_bind(o, c, t, d_reach, 1'b0);
      if (r == 0) return t;
      if (r == 1) saturated = 1'b1;
    end
    return -1;
  endfunction

  // Bind the whole SI variant; returns the number of configuration words.
  function automatic int bind_si(int v, int d_reach, bit cab);
    automatic int t_cs = 1;
    for (int cy = 0; cy < MAXC; cy++) begin
      prog[cy] = '0;
      for (int p = 0; p < N; p++) begin
        for (int l = 0; l < int'(N_LINKS); l++) begin
          st.port_addr[cy][p][l] = -1;
          st.link_occ[cy][l][p] = 1'b0;
        end
        for (int i = 0; i < int'(N_IN); i++) st.in_used[cy][p][i] = 1'b0;
        st.start_used[cy][p] = 1'b0;
        st.wr_used[cy][p] = 1'b0;
      end
    end
    for (int p = 0; p < N; p++) st.mem_next[p] = 0;
    // cycle 0: SI operands into connectors 0 and 1, word 7
    prog[0].conn[0].wr_src = WR_OPND0; prog[0].conn[0].wr_addr = 3'd7;
    prog[0].conn[1].wr_src = WR_OPND1; prog[0].conn[1].wr_addr = 3'd7;
    st.wr_used[0][0] = 1'b1; st.wr_used[0][1] = 1'b1;
    maxcy = 1;
    for (int cs = 0; cs < n_cs[v]; cs++) begin
      automatic bit used [N];
      automatic int t_end = t_cs;
      foreach (used[p]) used[p] = 1'b0;
      for (int o = 0; o < NOPS; o++) begin
        automatic int best_c = -1, best_t = MAXC;
        automatic bit best_sat = 1'b0;
        if (op_cs[v][o] != cs) continue;
        for (int c = 0; c < N; c++) begin
          automatic bit sat;
          automatic int t;
          if (int'(ftype[c]) != op_type[o] || used[c] || st.mem_next[c] >= 7) continue;
          t = earliest(o, c, t_cs, d_reach, sat);
          if (t < 0) continue;
          if (!cab) begin best_c = c; best_t = t; best_sat = sat; break; end
          if (t < best_t) begin best_c = c; best_t = t; best_sat = sat; end
        end
        if (best_c < 0) return -1;
        if (best_sat) n_lsh++;
        void'(try_bind(o, best_c, best_t, d_reach, 1'b1));
        used[best_c] = 1'b1;
        if (best_t > t_end) t_end = best_t;
      end
      t_cs = t_end + 1;
    end
    // result word
    if (ready[4] > maxcy) maxcy = ready[4];
    prog[maxcy].g.res_en   = 1'b1;
    prog[maxcy].g.res_conn = CONN_IDX_W'(res_conn[4]);
    prog[maxcy].g.res_addr = MEM_AW'(res_addr[4]);
    prog[maxcy].g.last     = 1'b1;
    return maxcy + 1;
  endfunction

  // ---------------- placement (runtime-system software) ----------------
  localparam int T_R = 4;  // replaceable FGRA type (another SI's)

  function automatic int conn_w(int tx, int ty);
    if ((tx == 1 && ty == 2) || (tx == 2 && ty == 1)) return 2;
    if ((tx == 2 && ty == 3) || (tx == 3 && ty == 2)) return 2;
    return 0;
  endfunction

  function automatic bit needed_type(int ty); return ty >= 1 && ty <= 3; endfunction

  // container for a new FGRA of type tp; connectivity = 1 selects
  // Connectivity Placement, 0 Cluster Placement
  function automatic int place(int tp, bit connectivity);
    automatic int best_c = -1;
    automatic longint best = 0;
    for (int c = 0; c < N; c++) begin
      automatic longint score = 0;
      if (!(ftype[c] == 3'd0 || int'(ftype[c]) == T_R)) continue;
      if (connectivity) begin
        for (int q = 0; q < N; q++)
          if (q != c && ftype[q] != 3'd0)
            score += conn_w(tp, int'(ftype[q])) * ((q > c) ? q - c : c - q);
      end else begin
        automatic int lo = c, hi = c;
        for (int q = 0; q < N; q++)
          if (q != c && needed_type(int'(ftype[q]))) begin
            if (q < lo) lo = q;
            if (q > hi) hi = q;
          end
        score = hi - lo;
      end
      if (best_c < 0 || score < best) begin best_c = c; best = score; end
    end
    return best_c;
  endfunction

  task automatic write_prog(int k);
    for (int e = 0; e < k; e++)
      for (int w = 0; w < int'(NW); w++) begin
        automatic logic [NW*32-1:0] x = (NW*32)'(prog[e]);
        @(negedge clk);
        cfg_we = 1'b1; cfg_wentry = AW'(e); cfg_wword = WW'(w);
        cfg_wdata = x[w*32 +: 32];
      end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic run_si(int k, word_t a, word_t b, output word_t res);
    automatic int tc;
    @(negedge clk);
    si_start = 1'b1; si_base = '0; si_opnd[0] = a; si_opnd[1] = b;
    tc = cycle;
    in_run = 1'b1;
    @(negedge clk);
    si_start = 1'b0;
    while (!si_done) @(negedge clk);
    in_run = 1'b0;
    check(cycle - tc == k + 1, $sformatf("latency %0d expected %0d", cycle - tc, k + 1));
    res = si_result;
  endtask

  initial begin
    automatic int reach [3] = '{2, 6, 10};
    cfg_we = 0; cfg_wentry = '0; cfg_wword = '0; cfg_wdata = '0;
    si_start = 0; si_base = '0; si_opnd = '{default: '0};
    foreach (ftype[p]) ftype[p] = 3'd0;
    foreach (sum_lat[i]) begin sum_lat[i] = 0; n_better[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int fab = 0; fab < N_FABRICS; fab++) begin
      // random fabric configuration: two T0, one T1, one T2 at distinct
      // containers, others random
      automatic int perm [N];
      foreach (perm[p]) perm[p] = p;
      perm.shuffle();
      foreach (ftype[p]) ftype[p] = 3'($urandom_range(0, 4));
      ftype[perm[0]] = 3'd1; ftype[perm[1]] = 3'd1;
      ftype[perm[2]] = 3'd2; ftype[perm[3]] = 3'd3;
      for (int nl = 2; nl <= int'(N_LINKS); nl += 2)
      for (int di = 0; di < 3; di++)
        for (int v = 0; v < 2; v++) begin
          automatic int lat [2];
          n_links_used = nl;
          for (int cab = 0; cab < 2; cab++) begin
            automatic word_t a = $urandom, b = $urandom, r;
            automatic word_t e = t2(t1(t0(a, b), 0), t1(t0(b, a), 0));
            automatic int k = bind_si(v, reach[di], cab[0]);
            check(k > 0, "binding found");
            if (k <= 0) continue;
            write_prog(k);
            run_si(k, a, b, r);
            check(r == e, $sformatf("fabric %0d D=%0d variant %0d binder %0d: result %h expected %h",
                                    fab, reach[di], v + 1, cab, r, e));
            lat[cab] = k + 1;
            sum_lat[cab] += k + 1;
          end
          if (lat[0] < lat[1]) n_better[0]++;
          if (lat[1] < lat[0]) n_better[1]++;
        end
    end
    // ---------------- placement phase ----------------
    for (int fab = 0; fab < N_PLACE; fab++) begin
      automatic logic [2:0] init [N];
      automatic int need [4] = '{0, 2, 1, 1};
      automatic int order [$];
      foreach (init[p]) begin
        automatic int r = $urandom_range(0, 9);
        init[p] = (r < 4) ? 3'd0 : (r < 8) ? 3'(T_R) : 3'($urandom_range(1, 3));
      end
      // FGRAs still missing for variant 2 (kept ones count)
      foreach (init[p]) if (needed_type(int'(init[p])) && need[init[p]] > 0) need[init[p]]--;
      for (int ty = 1; ty <= 3; ty++) repeat (need[ty]) order.push_back(ty);
      order.shuffle();
      for (int alg = 0; alg < 2; alg++) begin
        automatic word_t a = $urandom, b = $urandom, r;
        automatic word_t e = t2(t1(t0(a, b), 0), t1(t0(b, a), 0));
        automatic int k;
        ftype = init;
        foreach (order[i]) begin
          automatic int c = place(order[i], alg[0]);
          check(c >= 0, "placement found a container");
          if (c < 0) continue;
          check(ftype[c] == 3'd0 || int'(ftype[c]) == T_R, "only empty or replaceable containers");
          ftype[c] = 3'(order[i]);
        end
        n_links_used = N_LINKS;
        k = bind_si(1, 2, 1'b1);
        check(k > 0, "binding after placement");
        if (k <= 0) continue;
        write_prog(k);
        run_si(k, a, b, r);
        check(r == e, $sformatf("placement %0d alg %0d: result %h expected %h", fab, alg, r, e));
        place_lat[alg] += k + 1;
      end
    end
    check(place_lat[0] > 0 && place_lat[1] > 0, "both placements ran");
    $display("placement phase: total latency Cluster=%0d Connectivity=%0d over %0d fabrics",
             place_lat[0], place_lat[1], N_PLACE);
    check(n_err_cycles == 0, "error flag raised by a bound configuration");
    check(n_tdh > 0, "no transfer delay hazard occurred");
    check(n_lsh > 0, "no link saturation hazard occurred");
    $display("transfer delays=%0d link saturations=%0d", n_tdh, n_lsh);
    $display("total latency FFB=%0d CAB=%0d; FFB faster %0d times, CAB faster %0d times",
             sum_lat[0], sum_lat[1], n_better[0], n_better[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
