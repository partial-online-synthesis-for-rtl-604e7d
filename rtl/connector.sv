// connector: the CGRI node attached to one container.
//
// Every cycle of an SI the connector is told by its configuration field
// (cgri_pkg::conn_cfg_t) what to do:
//  * for each link s, read local memory at lnk[s].rd_addr and, if
//    lnk[s].drive, put that word on link s; lnk[s].cut splits link s at the
//    connector's left boundary;
//  * for each FGRA operand input, pick a word arriving on a link from the
//    left or the right, or a word of its own memory (read port `link`), and
//    hand it to the FGRA of its container together with `start`;
//  * at the end of the cycle, write the FGRA result or one of the two SI
//    operands from the processor into local memory at wr_addr.
// A result-path read port (res_addr -> res_data) lets the sequencer pick up
// the SI result. The document gives the connector's role and its 8-word
// memory; the field layout, the two-operand FGRA interface and the error flag
// are this design's choices.
//
// Timing: link drive, operand selection and the FGRA handshake are
// combinational within the cycle; the memory write takes effect at the next
// clock edge, so a single-cycle FGRA finishes a control step in one cycle.
// route_err is raised when an operand input selects a link side on which no
// connector drives in this cycle, or a link index that does not exist.
module connector
  import cgri_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  conn_cfg_t           cfg,
  // links at this connector
  input  word_t               from_left   [N_LINKS],
  input  word_t               from_right  [N_LINKS],
  input  logic  [N_LINKS-1:0] valid_left,
  input  logic  [N_LINKS-1:0] valid_right,
  output logic  [N_LINKS-1:0] drive,
  output logic  [N_LINKS-1:0] cut,
  output word_t               link_data   [N_LINKS],
  // SI operands from the processor pipeline
  input  word_t               opnd        [2],
  // FGRA in the attached container
  output logic                fgra_start,
  output word_t               fgra_opnd   [N_IN],
  input  word_t               fgra_result,
  // SI result path
  input  logic [MEM_AW-1:0]   res_addr,
  output word_t               res_data,
  output logic                route_err
);

  localparam int unsigned N_RD = N_LINKS + 1;

  logic [MEM_AW-1:0] raddr [N_RD];
  word_t             rdata [N_RD];
  logic              we;
  word_t             wdata;

  always_comb begin
    for (int s = 0; s < int'(N_LINKS); s++) begin
      raddr[s]     = cfg.lnk[s].rd_addr;
      drive[s]     = cfg.lnk[s].drive;
      cut[s]       = cfg.lnk[s].cut;
      link_data[s] = rdata[s];
    end
    raddr[N_LINKS] = res_addr;
    res_data       = rdata[N_LINKS];
  end

  always_comb begin
    route_err = 1'b0;
    for (int i = 0; i < int'(N_IN); i++) begin
      fgra_opnd[i] = '0;
      if (cfg.in_sel[i].src != IN_NONE && int'(cfg.in_sel[i].link) >= int'(N_LINKS)) begin
        // link index beyond the built links (possible when N_LINKS is not a
        // power of two): read zero and flag it
        route_err = 1'b1;
      end else begin
        unique case (cfg.in_sel[i].src)
          IN_LEFT: begin
            fgra_opnd[i] = from_left[cfg.in_sel[i].link];
            if (!valid_left[cfg.in_sel[i].link]) route_err = 1'b1;
          end
          IN_RIGHT: begin
            fgra_opnd[i] = from_right[cfg.in_sel[i].link];
            if (!valid_right[cfg.in_sel[i].link]) route_err = 1'b1;
          end
          IN_LOCAL: fgra_opnd[i] = rdata[int'(cfg.in_sel[i].link)];
          default:  fgra_opnd[i] = '0;
        endcase
      end
    end
  end

  assign fgra_start = cfg.start;

  always_comb begin
    we = 1'b1;
    unique case (cfg.wr_src)
      WR_FGRA:  wdata = fgra_result;
      WR_OPND0: wdata = opnd[0];
      WR_OPND1: wdata = opnd[1];
      default: begin
        wdata = '0;
        we    = 1'b0;
      end
    endcase
  end

  connector_mem #(.WORDS(MEM_WORDS), .N_RD(N_RD)) u_mem (
    .clk, .rst_n, .we, .waddr(cfg.wr_addr), .wdata, .raddr, .rdata
  );

endmodule
