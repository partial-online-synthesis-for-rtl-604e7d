// mgra_fabric: the mixed-grained reconfigurable fabric beside the processor.
//
// Fine-grained reconfigurable accelerators (FGRAs) sit in containers that
// are reconfigured at run time; the coarse-grained reconfigurable
// infrastructure (CGRI) connects the containers so that several FGRAs
// together execute a special instruction (SI). The CGRI configuration for
// every cycle of an SI variant is produced at run time by software
// (placement and binding) and written into config_mem; an SI invocation then
// replays it cycle by cycle through si_sequencer into the cgri. The FGRAs
// themselves are outside this module: each container appears as a port
// group (fgra_start, fgra_opnd, fgra_result).
//
// Configuration word layout (cgri_pkg): bits [GLOB_CFG_W-1:0] hold the
// global field, connector p occupies the next CONN_CFG_W bits at index p.
// With the defaults (10 containers, 4 links) a word is 350 bits, inside the
// 1024-bit per-cycle budget of the prototype; a wider word only draws an
// elaboration-time warning.
//
// Interfaces: cfg_* is the processor's write port into the configuration
// memory; si_* is the SI handshake (see si_sequencer for the timing);
// cfg_conflict / cfg_route_err report a configuration that drives a link
// segment twice or reads an undriven one.
module mgra_fabric
  import cgri_pkg::*;
#(
  parameter int unsigned N_CONT    = 10,
  parameter int unsigned CFG_DEPTH = 256,
  localparam int unsigned CFG_W    = cfg_width(N_CONT),
  localparam int unsigned CFG_AW   = $clog2(CFG_DEPTH),
  localparam int unsigned CFG_NW   = (CFG_W + 31) / 32,
  localparam int unsigned CFG_WW   = (CFG_NW > 1) ? $clog2(CFG_NW) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration memory write port (runtime system)
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_wentry,
  input  logic [CFG_WW-1:0] cfg_wword,
  input  logic [31:0]       cfg_wdata,
  // SI interface to the processor pipeline
  input  logic              si_start,
  input  logic [CFG_AW-1:0] si_base,
  input  word_t             si_opnd    [2],
  output logic              si_busy,
  output logic              si_done,
  output word_t             si_result,
  // containers
  output logic [N_CONT-1:0] fgra_start,
  output word_t             fgra_opnd  [N_CONT][N_IN],
  input  word_t             fgra_result[N_CONT],
  // configuration errors
  output logic              cfg_conflict,
  output logic              cfg_route_err
);

  initial begin
    // the prototype's budget; larger fabrics may exceed it, so only warn
    if (CFG_W > CFG_BUDGET)
      $warning("configuration word of %0d bits exceeds %0d", CFG_W, CFG_BUDGET);
    if (N_CONT > (1 << CONN_IDX_W))
      $error("N_CONT %0d exceeds the result-select field", N_CONT);
  end

  logic              cfg_ren;
  logic [CFG_AW-1:0] cfg_raddr;
  logic [CFG_W-1:0]  cfg_rdata;
  logic [CFG_W-1:0]  cfg_active;
  glob_cfg_t         glob;
  conn_cfg_t         conn_cfg [N_CONT];
  word_t             res_data;

  config_mem #(.W(CFG_W), .DEPTH(CFG_DEPTH)) u_cfg_mem (
    .clk, .we(cfg_we), .wentry(cfg_wentry), .wword(cfg_wword),
    .wdata(cfg_wdata), .ren(cfg_ren), .raddr(cfg_raddr), .rdata(cfg_rdata)
  );

  si_sequencer #(.W(CFG_W), .DEPTH(CFG_DEPTH)) u_seq (
    .clk, .rst_n, .si_start, .si_base, .busy(si_busy), .si_done, .si_result,
    .cfg_ren, .cfg_raddr, .cfg_rdata, .cfg_active, .res_data
  );

  assign glob = glob_cfg_t'(cfg_active[GLOB_CFG_W-1:0]);
  always_comb begin
    for (int p = 0; p < int'(N_CONT); p++)
      conn_cfg[p] = conn_cfg_t'(cfg_active[GLOB_CFG_W + p*CONN_CFG_W +: CONN_CFG_W]);
  end

  cgri #(.N_CONT(N_CONT)) u_cgri (
    .clk, .rst_n, .cfg(conn_cfg), .opnd(si_opnd), .fgra_start, .fgra_opnd,
    .fgra_result, .res_conn(glob.res_conn), .res_addr(glob.res_addr),
    .res_data, .conflict(cfg_conflict), .route_err(cfg_route_err)
  );

endmodule
