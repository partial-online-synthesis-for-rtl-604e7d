// connector_mem: the small local memory of one CGRI connector.
//
// An operation that runs in a container stores its result in the memory of
// the connector attached to that container; later control steps read it back
// to send it over the links. The prototype gives each connector 8 words. The
// memory here is a register file with one write port and N_RD asynchronous
// read ports (one per link plus one for the SI result path), so that a
// connector can send several stored results on different links in the same
// cycle. The number of read ports, the combinational read and the clearing
// of all words on reset are choices of this design.
//
// Timing: a write presented in cycle t (we, waddr, wdata) is visible on the
// read ports from cycle t+1. Reads in cycle t see the contents before the
// write of cycle t.
module connector_mem
  import cgri_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS,
  parameter int unsigned N_RD  = N_LINKS + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [$clog2(WORDS)-1:0]   waddr,
  input  word_t                      wdata,
  input  logic [$clog2(WORDS)-1:0]   raddr [N_RD],
  output word_t                      rdata [N_RD]
);

  word_t mem [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(WORDS); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int r = 0; r < int'(N_RD); r++) rdata[r] = mem[raddr[r]];
  end

endmodule
