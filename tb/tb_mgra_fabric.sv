// tb_mgra_fabric: end-to-end test of the fabric at its default size
// (10 containers, 4 links, 256 configuration entries).
//
// The testbench plays the runtime system and the processor. It places FGRA
// stand-ins (fgra_model) into containers, builds the per-cycle CGRI
// configuration of an SI variant by hand, writes it into the configuration
// memory 32 bits at a time and invokes the SI with two register operands.
// The SI is the five-operation data-flow graph o0,o1 (type T0) -> o2,o3
// (type T1) -> o4 (type T2): o0 = T0(A,B), o1 = T0(B,A), o2 = T1(o0),
// o3 = T1(o1), result o4 = T2(o2,o3).
//   placement P1: T0 in c0, T1 in c3, T2 in c8 (one FGRA per type). The
//     transfer c3->c8 spans 5 containers; with a reach of D = 4 containers
//     per cycle the route is held for ceil(5/4) = 2 cycles before o4 starts.
//   placement P2 (after reconfiguring containers): T0 in c0 and c1, T1 in
//     c3, T2 in c5; o0 and o1 run in the same cycle and no transfer delay
//     is needed.
//   segment program: one link carries three transfers in one cycle, split
//     by cuts; the results are combined into one SI result.
//   faulty program: drives one link segment twice and reads an undriven
//     link; both error flags must rise.
// Results are checked against a reference computation, every SI latency
// against K+1 cycles for K configuration words, and each mechanism
// (local operand, leftward/rightward transfer, several transfers on one
// link, held route, pipeline stall, back-to-back invocation, container
// reconfiguration, both error flags) is counted and must occur.
module tb_mgra_fabric;
  import cgri_pkg::*;
  localparam int unsigned N      = 10;
  localparam int unsigned DEPTH  = 256;
  localparam int unsigned CFG_W  = cfg_width(N);
  localparam int unsigned NW     = (CFG_W + 31) / 32;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned WW     = $clog2(NW);

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

  cfg_word_t prog [32];
  int        plen;
  int checks = 0, failures = 0, cycle = 0;

  // mechanism counters
  int n_local = 0, n_left = 0, n_right = 0, n_multi = 0, n_hold = 0;
  int n_stall = 0, n_b2b = 0, n_reconf = 0, n_conflict = 0, n_route_err = 0;

  mgra_fabric dut (.*);

  for (genvar p = 0; p < int'(N); p++) begin : g_cont
    fgra_model u_fgra (.clk, .rst_n, .ftype(ftype[p]), .start(fgra_start[p]),
                       .opnd(fgra_opnd[p]), .result(fgra_result[p]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- observe the configuration the hardware applies ----
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (si_busy) begin
      automatic bit any_start = |fgra_start;
      automatic bit any_drive = 1'b0;
      n_stall++;
      if (cfg_conflict)  n_conflict++;
      if (cfg_route_err) n_route_err++;
      for (int p = 0; p < int'(N); p++) begin
        for (int i = 0; i < int'(N_IN); i++)
          if (fgra_start[p])
            case (dut.conn_cfg[p].in_sel[i].src)
              IN_LOCAL: n_local++;
              IN_LEFT:  n_left++;
              IN_RIGHT: n_right++;
              default: ;
            endcase
      end
      for (int s = 0; s < int'(N_LINKS); s++) begin
        automatic int drivers = 0;
        for (int p = 0; p < int'(N); p++)
          if (dut.conn_cfg[p].lnk[s].drive) begin
            drivers++;
            any_drive = 1'b1;
          end
        if (drivers > 1 && !cfg_conflict) n_multi++;
      end
      if (any_drive && !any_start) n_hold++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cycle, what);
    end
  endtask

  // ---- reference functions of the FGRA types ----
  function automatic word_t t0(word_t a, word_t b); return a * 3 + b; endfunction
  function automatic word_t t1(word_t a, word_t b);
    return {a[23:0], a[31:24]} ^ 32'h5A5A_5A5A ^ b;
  endfunction
  function automatic word_t t2(word_t a, word_t b); return a - b; endfunction

  // ---- configuration builder ----
  task automatic new_prog(int k);
    plen = k;
    for (int e = 0; e < k; e++) prog[e] = '0;
    prog[k-1].g.last = 1'b1;
  endtask
  // write SI operand `which` into connector c at address a
  task automatic load(int e, int c, int which, int a);
    prog[e].conn[c].wr_src  = which ? WR_OPND1 : WR_OPND0;
    prog[e].conn[c].wr_addr = MEM_AW'(a);
  endtask
  // transfer word a of connector src on link s to operand i of connector dst
  task automatic xfer(int e, int src, int a, int dst, int i, int s);
    prog[e].conn[src].lnk[s].drive   = 1'b1;
    prog[e].conn[src].lnk[s].rd_addr = MEM_AW'(a);
    prog[e].conn[dst].in_sel[i].src  = (src < dst) ? IN_LEFT : IN_RIGHT;
    prog[e].conn[dst].in_sel[i].link = LINK_W'(s);
  endtask
  task automatic cut(int e, int c, int s);
    prog[e].conn[c].lnk[s].cut = 1'b1;
  endtask
  // operand i of connector c from its own word a, through read port s
  task automatic local_op(int e, int c, int a, int i, int s);
    prog[e].conn[c].lnk[s].rd_addr  = MEM_AW'(a);
    prog[e].conn[c].in_sel[i].src   = IN_LOCAL;
    prog[e].conn[c].in_sel[i].link  = LINK_W'(s);
  endtask
  task automatic start(int e, int c); prog[e].conn[c].start = 1'b1; endtask
  task automatic wr_res(int e, int c, int a);
    prog[e].conn[c].wr_src  = WR_FGRA;
    prog[e].conn[c].wr_addr = MEM_AW'(a);
  endtask
  task automatic result(int e, int c, int a);
    prog[e].g.res_en   = 1'b1;
    prog[e].g.res_conn = CONN_IDX_W'(c);
    prog[e].g.res_addr = MEM_AW'(a);
  endtask

  task automatic write_prog(int base);
    for (int e = 0; e < plen; e++)
      for (int k = 0; k < int'(NW); k++) begin
        automatic logic [NW*32-1:0] w = (NW*32)'(prog[e]);
        @(negedge clk);
        cfg_we = 1'b1; cfg_wentry = AW'(base + e); cfg_wword = WW'(k);
        cfg_wdata = w[k*32 +: 32];
      end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // invoke an SI of k words at base; returns the result. If chain is set the
  // caller is already at the negedge of the previous si_done cycle.
  task automatic run_si(int base, int k, word_t a, word_t b, output word_t res,
                        input bit chain = 1'b0);
    automatic int t0c;
    if (!chain) @(negedge clk);
    else n_b2b++;
    si_start = 1'b1; si_base = AW'(base); si_opnd[0] = a; si_opnd[1] = b;
    t0c = cycle;
    @(negedge clk);
    si_start = 1'b0;
    while (!si_done) @(negedge clk);
    check(cycle - t0c == k + 1, $sformatf("SI latency %0d, expected %0d", cycle - t0c, k + 1));
    res = si_result;
  endtask

  // ---- programs ----
  localparam int BASE_V1 = 0, BASE_V2 = 40, BASE_SEG = 80, BASE_BAD = 120;

  task automatic build_v1();  // placement P1: T0 c0, T1 c3, T2 c8
    new_prog(8);
    load(0, 0, 0, 0); load(0, 1, 1, 0);              // A -> c0[0], B -> c1[0]
    local_op(1, 0, 0, 0, 0); xfer(1, 1, 0, 0, 1, 0);  // o0 = T0(A,B) at c0
    start(1, 0); wr_res(1, 0, 1);
    xfer(2, 1, 0, 0, 0, 0); local_op(2, 0, 0, 1, 2);  // o1 = T0(B,A) at c0
    start(2, 0); wr_res(2, 0, 2);
    xfer(2, 0, 1, 3, 0, 1); start(2, 3);             // o2 = T1(o0) at c3
    xfer(3, 0, 2, 3, 0, 1); start(3, 3);             // o3 = T1(o1) at c3
    wr_res(3, 3, 0);                                 // o2 -> c3[0]
    wr_res(4, 3, 1);                                 // o3 -> c3[1]
    for (int e = 5; e <= 6; e++) begin               // c3 -> c8, held 2 cycles
      xfer(e, 3, 0, 8, 0, 0); xfer(e, 3, 1, 8, 1, 1);
    end
    start(6, 8); wr_res(6, 8, 0);                    // o4 = T2(o2,o3) at c8
    result(7, 8, 0);
  endtask

  task automatic build_v2();  // placement P2: T0 c0,c1, T1 c3, T2 c5
    new_prog(7);
    load(0, 0, 0, 0); load(0, 1, 1, 0);
    local_op(1, 0, 0, 0, 0); xfer(1, 1, 0, 0, 1, 0);  // o0 = T0(A,B) at c0
    local_op(1, 1, 0, 0, 1); xfer(1, 0, 0, 1, 1, 1);  // o1 = T0(B,A) at c1
    start(1, 0); start(1, 1); wr_res(1, 0, 1); wr_res(1, 1, 1);
    xfer(2, 0, 1, 3, 0, 0); start(2, 3);             // o2 = T1(o0) at c3
    cut(3, 1, 1); xfer(3, 1, 1, 3, 0, 1); start(3, 3); // o3 = T1(o1) at c3
    wr_res(3, 3, 0);
    wr_res(4, 3, 1);
    xfer(5, 3, 0, 5, 0, 2); xfer(5, 3, 1, 5, 1, 3);  // o4 = T2(o2,o3) at c5
    start(5, 5); wr_res(5, 5, 0);
    result(6, 5, 0);
  endtask

  task automatic build_seg();  // placement P2, three transfers on link 2
    new_prog(6);
    load(0, 0, 0, 3); load(0, 2, 1, 3); load(0, 6, 0, 3);  // A, B, A
    xfer(1, 0, 3, 1, 0, 2);                           // [c0,c1]: A -> c1
    cut(1, 2, 2); xfer(1, 2, 3, 3, 0, 2);             // [c2,c3]: B -> c3
    cut(1, 4, 2); xfer(1, 6, 3, 5, 0, 2);             // [c4,c6]: A -> c5
    cut(1, 7, 2);
    start(1, 1); start(1, 3); start(1, 5);
    wr_res(1, 1, 4); wr_res(1, 5, 4);                 // 3A -> c1[4], A -> c5[4]
    wr_res(2, 3, 4);                                  // T1(B) -> c3[4]
    xfer(3, 1, 4, 5, 0, 0); xfer(3, 3, 4, 5, 1, 1);   // x = T2(3A, T1(B))
    start(3, 5); wr_res(3, 5, 5);
    local_op(4, 5, 5, 0, 0); local_op(4, 5, 4, 1, 1); // y = T2(x, A)
    start(4, 5); wr_res(4, 5, 6);
    result(5, 5, 6);
  endtask

  task automatic build_bad();
    new_prog(2);
    xfer(0, 0, 0, 4, 0, 0); prog[0].conn[2].lnk[0].drive = 1'b1;  // two drivers
    prog[0].conn[6].in_sel[0].src  = IN_RIGHT;                       // undriven
    prog[0].conn[6].in_sel[0].link = 2'd3;
  endtask

  initial begin
    automatic word_t r;
    cfg_we = 0; cfg_wentry = '0; cfg_wword = '0; cfg_wdata = '0;
    si_start = 0; si_base = '0; si_opnd = '{default: '0};
    foreach (ftype[p]) ftype[p] = 3'd0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- placement P1 ----
    ftype[0] = 3'd1; ftype[3] = 3'd2; ftype[8] = 3'd3;
    build_v1(); write_prog(BASE_V1);
    for (int n = 0; n < 20; n++) begin
      automatic word_t a = $urandom, b = $urandom;
      automatic word_t e = t2(t1(t0(a, b), 0), t1(t0(b, a), 0));
      run_si(BASE_V1, 8, a, b, r, n % 2 == 1);
      check(r == e, $sformatf("P1 result %h expected %h", r, e));
    end

    // ---- reconfigure containers: P1 -> P2 ----
    ftype[8] = 3'd0; ftype[1] = 3'd1; ftype[5] = 3'd3; n_reconf++;
    build_v2(); write_prog(BASE_V2);
    build_seg(); write_prog(BASE_SEG);
    for (int n = 0; n < 20; n++) begin
      automatic word_t a = $urandom, b = $urandom;
      automatic word_t e = t2(t1(t0(a, b), 0), t1(t0(b, a), 0));
      automatic word_t e2 = t2(t2(t0(a, 0), t1(b, 0)), a);
      run_si(BASE_V2, 7, a, b, r, n % 2 == 1);
      check(r == e, $sformatf("P2 result %h expected %h", r, e));
      run_si(BASE_SEG, 6, a, b, r, 1'b1);
      check(r == e2, $sformatf("segment result %h expected %h", r, e2));
    end

    // ---- faulty configuration ----
    build_bad(); write_prog(BASE_BAD);
    run_si(BASE_BAD, 2, 0, 0, r);

    // every mechanism must have happened
    check(n_local > 0,     "local operand never used");
    check(n_left > 0,      "no rightward transfer");
    check(n_right > 0,     "no leftward transfer");
    check(n_multi > 0,     "no link carried several transfers");
    check(n_hold > 0,      "no held route");
    check(n_stall > 0,     "no pipeline stall");
    check(n_b2b > 0,       "no back-to-back SI");
    check(n_reconf > 0,    "no container reconfiguration");
    check(n_conflict > 0,  "link conflict never flagged");
    check(n_route_err > 0, "route error never flagged");
    $display("local=%0d from_left=%0d from_right=%0d multi=%0d hold=%0d stall=%0d b2b=%0d reconf=%0d conflict=%0d route_err=%0d",
             n_local, n_left, n_right, n_multi, n_hold, n_stall, n_b2b, n_reconf, n_conflict, n_route_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
