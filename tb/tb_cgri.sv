// tb_cgri: self-checking test of the CGRI (connectors plus links).
// Phase 1 loads every local memory word with SI operands. Phase 2 runs
// random cycles of legal transfers: each link is cut into random
// non-overlapping intervals, one end of an interval drives a stored word
// and the other end takes it as an FGRA operand. The testbench's FGRA
// stand-in returns a function of the operands, which the configuration
// writes back to memory, so later transfers carry computed data. Expected
// operands, the result path and the error flags come from a reference copy
// of all local memories. Phase 3 provokes a doubly driven segment and an
// operand read from an undriven link.
module tb_cgri;
  import cgri_pkg::*;
  localparam int unsigned N = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  conn_cfg_t             cfg        [N];
  word_t                 opnd       [2];
  logic  [N-1:0]         fgra_start;
  word_t                 fgra_opnd  [N][N_IN];
  word_t                 fgra_result[N];
  logic [CONN_IDX_W-1:0] res_conn;
  logic [MEM_AW-1:0]     res_addr;
  word_t                 res_data;
  logic                  conflict, route_err;

  word_t ref_mem [N][MEM_WORDS];
  word_t exp_op  [N][N_IN];
  int checks = 0, failures = 0, n_xfer = 0, n_multi = 0, n_right = 0, n_left = 0;

  cgri #(.N_CONT(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in for the FGRAs: a single-cycle function of the operands
  for (genvar p = 0; p < int'(N); p++) begin : g_fgra
    assign fgra_result[p] = fgra_start[p] ? (fgra_opnd[p][0] * 5 + fgra_opnd[p][1] + p) : '0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  task automatic clear_cfg();
    foreach (cfg[p]) cfg[p] = '0;
  endtask

  initial begin
    clear_cfg();
    opnd = '{default: '0}; res_conn = '0; res_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: load all memories from the SI operand path
    for (int a = 0; a < int'(MEM_WORDS); a++) begin
      @(negedge clk);
      clear_cfg();
      opnd[0] = $urandom; opnd[1] = $urandom;
      for (int p = 0; p < int'(N); p++) begin
        cfg[p].wr_src  = (p % 2 == 0) ? WR_OPND0 : WR_OPND1;
        cfg[p].wr_addr = MEM_AW'(a);
        ref_mem[p][a]  = opnd[p % 2];
      end
    end
    // phase 2: random legal routing
    for (int t = 0; t < 2000; t++) begin
      automatic int used [N];
      @(negedge clk);
      clear_cfg();
      foreach (used[p]) used[p] = 0;
      foreach (exp_op[p, i]) exp_op[p][i] = '0;
      for (int s = 0; s < int'(N_LINKS); s++) begin
        automatic int p = $urandom_range(0, 1);
        automatic int segs = 0;
        while (p < int'(N) - 1) begin
          automatic int a = p;
          automatic int b = $urandom_range(a + 1, N - 1);
          automatic int src, dst;
          if ($urandom_range(0, 1)) begin src = a; dst = b; end
          else begin src = b; dst = a; end
          if (used[dst] < int'(N_IN)) begin
            automatic int i = used[dst];
            automatic int ad = $urandom_range(0, MEM_WORDS - 1);
            used[dst]++;
            if (a > 0) cfg[a].lnk[s].cut = 1'b1;
            if (b + 1 < int'(N)) cfg[b+1].lnk[s].cut = 1'b1;
            cfg[src].lnk[s].drive   = 1'b1;
            cfg[src].lnk[s].rd_addr = MEM_AW'(ad);
            cfg[dst].in_sel[i].src  = (src < dst) ? IN_LEFT : IN_RIGHT;
            cfg[dst].in_sel[i].link = LINK_W'(s);
            exp_op[dst][i] = ref_mem[src][ad];
            n_xfer++;
            segs++;
            if (src < dst) n_right++; else n_left++;
          end
          p = b + 1 + $urandom_range(0, 1);
        end
        if (segs > 1) n_multi++;
      end
      for (int p = 0; p < int'(N); p++) begin
        cfg[p].start = (used[p] > 0);
        if (used[p] > 0 && $urandom_range(0, 1)) begin
          cfg[p].wr_src  = WR_FGRA;
          cfg[p].wr_addr = MEM_AW'($urandom_range(0, MEM_WORDS - 1));
        end
      end
      res_conn = CONN_IDX_W'($urandom_range(0, N - 1));
      res_addr = MEM_AW'($urandom_range(0, MEM_WORDS - 1));
      #1;
      check(!conflict, "no conflict on legal routing");
      check(!route_err, "no route error on legal routing");
      check(res_data == ref_mem[res_conn][res_addr], "result path");
      for (int p = 0; p < int'(N); p++) begin
        check(fgra_start[p] == (used[p] > 0), "start");
        for (int i = 0; i < int'(N_IN); i++)
          check(fgra_opnd[p][i] == exp_op[p][i], $sformatf("operand %0d of connector %0d", i, p));
      end
      @(posedge clk);
      for (int p = 0; p < int'(N); p++)
        if (cfg[p].wr_src == WR_FGRA)
          ref_mem[p][cfg[p].wr_addr] = exp_op[p][0] * 5 + exp_op[p][1] + p;
    end
    // phase 3: errors
    @(negedge clk);
    clear_cfg();
    cfg[1].lnk[2].drive = 1'b1;
    cfg[3].lnk[2].drive = 1'b1;
    #1 check(conflict, "two drivers in one segment");
    cfg[3].lnk[2].cut = 1'b1;
    #1 check(!conflict, "cut separates the two drivers");
    cfg[0].in_sel[0].src  = IN_RIGHT;
    cfg[0].in_sel[0].link = 2'd1;
    #1 check(route_err, "operand from an undriven link");
    @(negedge clk);
    clear_cfg();
    check(n_multi > 0 && n_left > 0 && n_right > 0, "coverage");
    $display("transfers=%0d rightward=%0d leftward=%0d links with several transfers=%0d",
             n_xfer, n_right, n_left, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
