// tb_config_mem: self-checking test of the configuration memory.
// Writes random entries 32 bits at a time, in random piece order, then
// reads them back and checks the one-cycle read latency and that rdata
// holds while ren is low.
module tb_config_mem;
  localparam int unsigned W = 350, DEPTH = 256;
  localparam int unsigned AW = $clog2(DEPTH), NW = (W + 31) / 32, WW = $clog2(NW);

  logic clk = 1'b0;
  logic we, ren;
  logic [AW-1:0] wentry, raddr;
  logic [WW-1:0] wword;
  logic [31:0]   wdata;
  logic [W-1:0]  rdata;
  logic [NW*32-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  config_mem #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ren = 0; wentry = '0; raddr = '0; wword = '0; wdata = '0;
    for (int e = 0; e < int'(DEPTH); e++) begin
      int order [NW];
      foreach (order[k]) order[k] = k;
      order.shuffle();
      for (int k = 0; k < int'(NW); k++) begin
        @(negedge clk);
        we = 1; wentry = AW'(e); wword = WW'(order[k]); wdata = $urandom;
        ref_mem[e][order[k]*32 +: 32] = wdata;
      end
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      automatic int e = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      ren = 1; raddr = AW'(e);
      @(negedge clk);
      ren = 0; raddr = AW'($urandom_range(0, DEPTH - 1));
      checks++;
      if (rdata !== ref_mem[e][W-1:0]) failures++;
      @(negedge clk);
      checks++;  // held while ren is low
      if (rdata !== ref_mem[e][W-1:0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
