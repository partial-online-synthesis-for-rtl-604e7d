// link_array: the links of the CGRI, running past all connectors.
//
// Each of the N_LINKS links is a chain of segments between neighbouring
// connectors. In every cycle a link can be cut at any connector boundary, so
// one link carries several data transfers at once as long as their container
// intervals do not overlap; a transfer from container a to container b uses
// the segments between a and b only. This follows the document's description
// of links and communication segments.
//
// How the segments are built is this design's choice: instead of a tristate
// bus each link is two unidirectional chains, one carrying values rightwards
// and one leftwards, with no combinational loop. At connector p:
//   from_left[p][s]  = word driven by the nearest driver to the left of p on
//                      link s within the same segment (0 if none),
//   from_right[p][s] = the same for the right side.
// cut[p][s] separates connector p from connector p-1 on link s (cut[0] is
// ignored, the chain ends there anyway).
//
// conflict is raised when two connectors drive the same segment of a link in
// the same cycle, which a correct binding never produces; the second driver
// overrides the first in the direction it sends. The whole block is
// combinational.
module link_array
  import cgri_pkg::*;
#(
  parameter int unsigned N_CONT = 10
) (
  input  logic  [N_LINKS-1:0] drive      [N_CONT],
  input  logic  [N_LINKS-1:0] cut        [N_CONT],
  input  word_t               data       [N_CONT][N_LINKS],
  output word_t               from_left  [N_CONT][N_LINKS],
  output word_t               from_right [N_CONT][N_LINKS],
  output logic  [N_LINKS-1:0] valid_left [N_CONT],
  output logic  [N_LINKS-1:0] valid_right[N_CONT],
  output logic                conflict
);

  always_comb begin
    conflict = 1'b0;
    for (int s = 0; s < int'(N_LINKS); s++) begin
      // rightward chain
      from_left[0][s]  = '0;
      valid_left[0][s] = 1'b0;
      for (int p = 1; p < int'(N_CONT); p++) begin
        if (cut[p][s]) begin
          from_left[p][s]  = '0;
          valid_left[p][s] = 1'b0;
        end else if (drive[p-1][s]) begin
          from_left[p][s]  = data[p-1][s];
          valid_left[p][s] = 1'b1;
        end else begin
          from_left[p][s]  = from_left[p-1][s];
          valid_left[p][s] = valid_left[p-1][s];
        end
      end
      // leftward chain
      from_right[N_CONT-1][s]  = '0;
      valid_right[N_CONT-1][s] = 1'b0;
      for (int p = int'(N_CONT) - 2; p >= 0; p--) begin
        if (cut[p+1][s]) begin
          from_right[p][s]  = '0;
          valid_right[p][s] = 1'b0;
        end else if (drive[p+1][s]) begin
          from_right[p][s]  = data[p+1][s];
          valid_right[p][s] = 1'b1;
        end else begin
          from_right[p][s]  = from_right[p+1][s];
          valid_right[p][s] = valid_right[p+1][s];
        end
      end
      // a driver that sees another driver on its left in the same segment
      for (int p = 0; p < int'(N_CONT); p++)
        if (drive[p][s] && valid_left[p][s]) conflict = 1'b1;
    end
  end

endmodule
