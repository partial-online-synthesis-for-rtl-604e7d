// config_mem: on-chip configuration memory of the CGRI.
//
// When placement and binding of an SI variant are done, the runtime system
// writes one configuration word per cycle of the SI into this memory; when
// the SI is invoked the sequencer reads them back one per clock. The document
// states that the configuration lives in an on-chip memory and that the
// prototype uses 1024 bits of CGRI configuration per cycle. The depth
// (DEPTH entries, 256 by default), the 32-bit write port and the synchronous
// read are this design's choices.
//
// Write port: a W-bit entry is written in 32-bit pieces; wword selects the
// piece (piece k holds bits 32k+31..32k, bits above W are dropped).
// Read port: rdata shows entry raddr one cycle after ren; it holds its value
// while ren is low.
module config_mem #(
  parameter int unsigned W     = 350,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned NW   = (W + 31) / 32,
  localparam int unsigned WW   = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wentry,
  input  logic [WW-1:0] wword,
  input  logic [31:0]   wdata,
  input  logic          ren,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [NW*32-1:0] mem [DEPTH];
  logic [NW*32-1:0] rword;

  always_ff @(posedge clk) begin
    if (we && int'(wword) < int'(NW)) mem[wentry][wword*32 +: 32] <= wdata;
    if (ren) rword <= mem[raddr];
  end

  assign rdata = rword[W-1:0];

endmodule
