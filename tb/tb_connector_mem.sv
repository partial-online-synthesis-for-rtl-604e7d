// tb_connector_mem: self-checking test of the connector's local memory.
// Checks the cleared state after reset, then random writes against a
// reference array, reading all ports every cycle; a read in the cycle of a
// write must still return the old word (write visible one cycle later).
module tb_connector_mem;
  import cgri_pkg::*;
  localparam int unsigned N_RD = N_LINKS + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic we;
  logic [MEM_AW-1:0] waddr;
  word_t wdata;
  logic [MEM_AW-1:0] raddr [N_RD];
  word_t rdata [N_RD];
  word_t ref_mem [MEM_WORDS];
  int checks = 0, failures = 0;

  connector_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0;
    foreach (raddr[r]) raddr[r] = '0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // after reset every word reads zero
    for (int a = 0; a < int'(MEM_WORDS); a++) begin
      foreach (raddr[r]) raddr[r] = MEM_AW'(a);
      #1;
      foreach (rdata[r]) begin
        checks++;
        if (rdata[r] !== '0) failures++;
      end
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 2) != 0);
      waddr = MEM_AW'($urandom_range(0, MEM_WORDS - 1));
      wdata = $urandom;
      foreach (raddr[r]) raddr[r] = MEM_AW'($urandom_range(0, MEM_WORDS - 1));
      #1;
      foreach (rdata[r]) begin
        checks++;
        if (rdata[r] !== ref_mem[raddr[r]]) begin
          failures++;
          if (failures < 10)
            $display("port %0d addr %0d got %h exp %h", r, raddr[r], rdata[r], ref_mem[raddr[r]]);
        end
      end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
