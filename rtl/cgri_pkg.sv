// cgri_pkg: shared constants and configuration types of the coarse-grained
// reconfigurable infrastructure (CGRI) that joins the fine-grained
// reconfigurable accelerators (FGRAs) of a mixed-grained fabric.
//
// A CGRI configuration is one word per clock cycle of a special instruction
// (SI). It holds one connector field per container plus a small global field
// for the sequencer and the result path. The number of links (4) and the size
// of a connector's local memory (8 words) are the prototype figures; the data
// width (32 bits, the word of the SPARC V8 host), the number of FGRA operand
// inputs (2) and all field encodings are choices of this design.
package cgri_pkg;

  localparam int unsigned DATA_W    = 32;  // link and memory word width
  localparam int unsigned N_LINKS   = 4;   // links l0..l3 between neighbours
  localparam int unsigned LINK_W    = (N_LINKS > 1) ? $clog2(N_LINKS) : 1;
  localparam int unsigned MEM_WORDS = 8;   // local memory of one connector
  localparam int unsigned MEM_AW    = $clog2(MEM_WORDS);
  localparam int unsigned N_IN      = 2;   // operand inputs of one FGRA
  localparam int unsigned CONN_IDX_W = 5;  // up to 32 containers
  localparam int unsigned CFG_BUDGET = 1024; // configuration bits per cycle

  typedef logic [DATA_W-1:0] word_t;

  // Where an FGRA operand input takes its data from.
  typedef enum logic [1:0] {
    IN_NONE  = 2'd0,  // input unused in this cycle (reads zero)
    IN_LEFT  = 2'd1,  // link `link`, value arriving from the left neighbour side
    IN_RIGHT = 2'd2,  // link `link`, value arriving from the right neighbour side
    IN_LOCAL = 2'd3   // own local memory, read port `link` (distance 0)
  } in_src_e;

  typedef struct packed {
    in_src_e                src;
    logic [LINK_W-1:0]      link;
  } in_sel_t;

  // What is written into the local memory at the end of the cycle.
  typedef enum logic [1:0] {
    WR_NONE  = 2'd0,
    WR_FGRA  = 2'd1,  // result of the FGRA in this container
    WR_OPND0 = 2'd2,  // first SI operand from the processor pipeline
    WR_OPND1 = 2'd3   // second SI operand from the processor pipeline
  } wr_src_e;

  // Per connector and per link: drive the link with the word read at
  // rd_addr, and/or cut the link at the connector's left boundary so that
  // the link segments on the two sides carry independent transfers.
  typedef struct packed {
    logic              drive;
    logic              cut;
    logic [MEM_AW-1:0] rd_addr;
  } link_port_cfg_t;

  typedef struct packed {
    link_port_cfg_t [N_LINKS-1:0] lnk;
    in_sel_t        [N_IN-1:0]    in_sel;
    logic                         start;   // FGRA operands valid this cycle
    wr_src_e                      wr_src;
    logic [MEM_AW-1:0]            wr_addr;
  } conn_cfg_t;

  typedef struct packed {
    logic                  last;      // final cycle of the SI
    logic                  res_en;    // capture the SI result this cycle
    logic [CONN_IDX_W-1:0] res_conn;  // connector holding the result
    logic [MEM_AW-1:0]     res_addr;  // its local memory address
  } glob_cfg_t;

  localparam int unsigned CONN_CFG_W = $bits(conn_cfg_t);
  localparam int unsigned GLOB_CFG_W = $bits(glob_cfg_t);

  // Width of a whole configuration word for n containers; the global field
  // sits in the low bits, connector p above it at index p.
  function automatic int unsigned cfg_width(input int unsigned n);
    return n * CONN_CFG_W + GLOB_CFG_W;
  endfunction

endpackage
