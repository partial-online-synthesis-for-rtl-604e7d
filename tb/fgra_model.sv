// fgra_model: behavioural stand-in for the FGRA loaded into one container.
// Testbench only. Real FGRAs are circuits synthesized for the fine-grained
// fabric; this model only reproduces their interface towards the CGRI: two
// operand words sampled with start and one result word. The FGRA type loaded
// into the container is an input so that a testbench can "reconfigure" the
// container between SIs. Types and latencies:
//   T0: a*3 + b,                    1 cycle (result combinational)
//   T1: rotl(a,8) ^ 32'h5A5A5A5A ^ b, 2 cycles (result one clock after start,
//       held until the next start; a new start may follow every cycle)
//   T2: a - b,                      1 cycle
//   T3: a ^ b,                      1 cycle (an FGRA of some other SI)
//   EMPTY: result 0.
module fgra_model
  import cgri_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  [2:0] ftype,   // 0 empty, 1 T0, 2 T1, 3 T2, 4 T3
  input  logic  start,
  input  word_t opnd [N_IN],
  output word_t result
);
  word_t f, held;

  always_comb begin
    unique case (ftype)
      3'd1:    f = opnd[0] * 3 + opnd[1];
      3'd2:    f = {opnd[0][23:0], opnd[0][31:24]} ^ 32'h5A5A_5A5A ^ opnd[1];
      3'd3:    f = opnd[0] - opnd[1];
      3'd4:    f = opnd[0] ^ opnd[1];
      default: f = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     held <= '0;
    else if (start) held <= f;
  end

  assign result = (ftype == 3'd2) ? held : f;
endmodule
