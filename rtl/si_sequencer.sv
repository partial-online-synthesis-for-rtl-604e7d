// si_sequencer: runs one SI on the CGRI, reconfiguring it every cycle.
//
// The processor invokes an SI by pulsing si_start with si_base, the address
// of the SI variant's first configuration word in config_mem. The sequencer
// then reads consecutive words and hands each one to the CGRI for exactly
// one clock cycle, until it has applied a word whose global `last` bit is
// set. In a cycle whose word has res_en set it captures the selected local
// memory word as the SI result. The document says that the CGRI is
// reconfigured cycle by cycle from an on-chip configuration memory when an
// SI is invoked; the start/busy/done handshake and the `last` marker are this
// design's choices.
//
// Timing for an SI variant of K configuration words starting at cycle 0
// (si_start high): word i is applied in cycle 1+i, so cycles 1..K; busy is
// high in cycles 1..K; si_done pulses in cycle K+1 with si_result valid
// (held until the next result capture). A new si_start is accepted in the
// si_done cycle. While idle the applied configuration is all zeros, which
// writes nothing and drives no link.
module si_sequencer
  import cgri_pkg::*;
#(
  parameter int unsigned W     = 350,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side
  input  logic          si_start,
  input  logic [AW-1:0] si_base,
  output logic          busy,
  output logic          si_done,
  output word_t         si_result,
  // configuration memory read port
  output logic          cfg_ren,
  output logic [AW-1:0] cfg_raddr,
  input  logic [W-1:0]  cfg_rdata,
  // configuration applied to the CGRI in this cycle
  output logic [W-1:0]  cfg_active,
  input  word_t         res_data
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e        state;
  logic [AW-1:0] ptr;
  glob_cfg_t     glob;

  assign glob       = glob_cfg_t'(cfg_active[GLOB_CFG_W-1:0]);
  assign busy       = (state == S_RUN);
  assign cfg_active = (state == S_RUN) ? cfg_rdata : '0;

  always_comb begin
    cfg_ren   = 1'b0;
    cfg_raddr = ptr;
    if (state == S_IDLE) begin
      cfg_ren   = si_start;
      cfg_raddr = si_base;
    end else begin
      cfg_ren   = !glob.last;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ptr       <= '0;
      si_done   <= 1'b0;
      si_result <= '0;
    end else begin
      si_done <= 1'b0;
      unique case (state)
        S_IDLE: if (si_start) begin
          state <= S_RUN;
          ptr   <= si_base + 1'b1;
        end
        S_RUN: begin
          ptr <= ptr + 1'b1;
          if (glob.res_en) si_result <= res_data;
          if (glob.last) begin
            state   <= S_IDLE;
            si_done <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The processor must not invoke an SI while one is running.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !si_start);

endmodule
