// tb_si_sequencer: self-checking test of the SI sequencer.
// A behavioural synchronous configuration memory in the testbench holds
// random SI programs of 1..24 words. Each SI invocation is checked for: the
// word applied in each cycle (entry base+i in cycle 1+i), the zero
// configuration while idle, busy, the cycle of si_done (K+1 cycles after
// si_start for K words) and the captured result. Half of the invocations
// are issued back to back in the si_done cycle.
module tb_si_sequencer;
  import cgri_pkg::*;
  localparam int unsigned W = 350, DEPTH = 256, AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic si_start, busy, si_done, cfg_ren;
  logic [AW-1:0] si_base, cfg_raddr;
  word_t si_result, res_data;
  logic [W-1:0] cfg_rdata, cfg_active;
  logic [W-1:0] mem [DEPTH];
  int cycle = 0;
  int checks = 0, failures = 0, n_b2b = 0;

  si_sequencer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (cfg_ren) cfg_rdata <= mem[cfg_raddr];
  end
  // result path: a word that changes every cycle
  assign res_data = word_t'(cycle * 32'h9E37_79B9);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", cycle, what);
    end
  endtask

  function automatic logic [W-1:0] rand_word(bit last, bit res_en);
    logic [W-1:0] w;
    glob_cfg_t g;
    for (int i = 0; i < int'(W); i += 32) w[i +: 32] = $urandom;
    g = glob_cfg_t'(w[GLOB_CFG_W-1:0]);
    g.last = last;
    g.res_en = res_en;
    w[GLOB_CFG_W-1:0] = g;
    return w;
  endfunction

  initial begin
    automatic word_t exp_result = '0;
    automatic bit    chained = 1'b0;
    si_start = 0; si_base = '0; cfg_rdata = '0;
    repeat (2) @(posedge clk);
    check(cfg_active == '0 && !busy, "idle after reset");
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      automatic int k    = $urandom_range(1, 24);
      automatic int base = $urandom_range(0, DEPTH - 1);
      automatic int t0;
      for (int i = 0; i < k; i++)
        mem[(base + i) % DEPTH] = rand_word(i == k - 1, $urandom_range(0, 2) == 0);
      if (!chained) begin
        @(negedge clk);
        check(cfg_active == '0, "zero configuration while idle");
      end
      si_start = 1; si_base = AW'(base);
      t0 = cycle;
      @(negedge clk);
      si_start = 0;
      for (int i = 0; i < k; i++) begin
        automatic logic [W-1:0] e = mem[(base + i) % DEPTH];
        automatic glob_cfg_t g = glob_cfg_t'(e[GLOB_CFG_W-1:0]);
        check(cycle - t0 == 1 + i, "cycle of applied word");
        check(busy, "busy while running");
        check(cfg_active == e, "applied configuration word");
        check(!si_done, "no early done");
        if (g.res_en) exp_result = res_data;
        if (i < k - 1) @(negedge clk);
      end
      @(negedge clk);
      check(si_done && !busy, "done pulse");
      check(cycle - t0 == k + 1, "SI latency K+1");
      check(si_result == exp_result, "captured result");
      chained = ($urandom_range(0, 1) == 1);
      if (chained) n_b2b++;
      else begin
        @(negedge clk);
        check(!si_done, "done is a single pulse");
      end
    end
    check(n_b2b > 0, "back-to-back invocations happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
