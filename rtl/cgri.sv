// cgri: the coarse-grained reconfigurable infrastructure of the fabric.
//
// One connector per container, all attached to the same N_LINKS links
// (link_array). The CGRI has no state of its own besides the connectors'
// local memories: everything it does in a cycle is set by that cycle's
// configuration, one conn_cfg_t per connector, which the SI sequencer
// replaces every clock cycle. This structure (connectors joined by links,
// one connector per container) is the document's; the flat fields and the
// error flags are this design's.
//
// res_conn/res_addr select one word of one connector's memory as the SI
// result (res_data, combinational). conflict flags two drivers on one link
// segment; route_err flags an FGRA operand that selects an undriven link.
// Both mean the configuration is wrong; the hardware still does something
// defined (see link_array).
module cgri
  import cgri_pkg::*;
#(
  parameter int unsigned N_CONT = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  conn_cfg_t             cfg        [N_CONT],
  input  word_t                 opnd       [2],
  output logic  [N_CONT-1:0]    fgra_start,
  output word_t                 fgra_opnd  [N_CONT][N_IN],
  input  word_t                 fgra_result[N_CONT],
  input  logic [CONN_IDX_W-1:0] res_conn,
  input  logic [MEM_AW-1:0]     res_addr,
  output word_t                 res_data,
  output logic                  conflict,
  output logic                  route_err
);

  logic [N_LINKS-1:0] drive       [N_CONT];
  logic [N_LINKS-1:0] cut         [N_CONT];
  word_t              link_data   [N_CONT][N_LINKS];
  word_t              from_left   [N_CONT][N_LINKS];
  word_t              from_right  [N_CONT][N_LINKS];
  logic [N_LINKS-1:0] valid_left  [N_CONT];
  logic [N_LINKS-1:0] valid_right [N_CONT];
  word_t              conn_res    [N_CONT];
  logic [N_CONT-1:0]  conn_err;

  link_array #(.N_CONT(N_CONT)) u_links (
    .drive, .cut, .data(link_data), .from_left, .from_right,
    .valid_left, .valid_right, .conflict
  );

  for (genvar p = 0; p < int'(N_CONT); p++) begin : g_conn
    connector u_conn (
      .clk, .rst_n,
      .cfg         (cfg[p]),
      .from_left   (from_left[p]),
      .from_right  (from_right[p]),
      .valid_left  (valid_left[p]),
      .valid_right (valid_right[p]),
      .drive       (drive[p]),
      .cut         (cut[p]),
      .link_data   (link_data[p]),
      .opnd,
      .fgra_start  (fgra_start[p]),
      .fgra_opnd   (fgra_opnd[p]),
      .fgra_result (fgra_result[p]),
      .res_addr,
      .res_data    (conn_res[p]),
      .route_err   (conn_err[p])
    );
  end

  assign route_err = |conn_err;

  always_comb begin
    res_data = '0;
    for (int p = 0; p < int'(N_CONT); p++)
      if (int'(res_conn) == p) res_data = conn_res[p];
  end

endmodule
