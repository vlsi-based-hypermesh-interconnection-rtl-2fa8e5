// hm_pkg: types and constants shared by the hypermesh network and node blocks.
//
// The network moves fixed-length packets of 8-bit flits: one header flit
// followed by two payload flits, which together carry one 16-bit word of the
// node's local bus. The flit width (8 bits) and the local bus width (16 bits)
// are the document's numbers; the packet layout, the header encoding and all
// opcode encodings below are this design's own choices.
//
// Header flit layout (for networks of up to 8 x 8 nodes, 3-bit coordinates):
//   [7]   broadcast: 1 = delivered at every node that receives it,
//                    0 = point-to-point, delivered only at (row, col)
//   [6]   unused, zero
//   [5:3] destination row
//   [2:0] destination column
package hm_pkg;

  localparam int unsigned FLIT_W    = 8;   // network data path width
  localparam int unsigned WORD_W    = 16;  // local bus / system bus width
  localparam int unsigned COORD_W   = 3;   // row/column field in the header
  localparam int unsigned MAX_N     = 8;   // largest n x n with one-flit header
  localparam int unsigned PKT_FLITS = 1 + WORD_W / FLIT_W;  // header + payload

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    logic               bcast;
    logic               rsvd;
    logic [COORD_W-1:0] row;
    logic [COORD_W-1:0] col;
  } hdr_t;

  typedef struct packed {
    hdr_t  hdr;
    word_t data;
  } pkt_t;

  // Network coprocessor instructions (Table 3-1 of the design description plus
  // NPTP, which selects point-to-point routed transfers).
  typedef enum logic [3:0] {
    NC_NOP  = 4'd0,
    NC_NRBC = 4'd1,  // row broadcast initialize
    NC_NCBC = 4'd2,  // column broadcast initialize
    NC_NPTP = 4'd3,  // point-to-point initialize, data = {row, col}
    NC_NRWA = 4'd4,  // read word alternate, data = words per source
    NC_NRRW = 4'd5,  // read row word, data = {words, io, start}
    NC_NRCW = 4'd6,  // read column word, data = {words, io, start}
    NC_NSN  = 4'd7,  // source next: one word from the network
    NC_NDN  = 4'd8   // destination next: one word into the network
  } nc_op_t;

  // Transmit mode set by NRBC / NCBC / NPTP
  typedef enum logic [1:0] {
    TX_ROW_BC = 2'd0,
    TX_COL_BC = 2'd1,
    TX_POINT  = 2'd2
  } tx_mode_t;

  // Arithmetic coprocessor control codes (FPCTRL)
  typedef enum logic [1:0] {
    FP_CLEAR  = 2'd0,  // clear accumulator
    FP_MAC    = 2'd1,  // multiply-accumulate one left and one right operand
    FP_UNLOAD = 2'd2   // unload accumulator to the result buffer and clear
  } fp_ctrl_t;

  // Node system bus: where a word comes from and where it goes in one cycle
  typedef enum logic [2:0] {
    SRC_NONE = 3'd0,
    SRC_IMM  = 3'd1,  // literal from the control processor
    SRC_NSN  = 3'd2,  // network source next
    SRC_SSN  = 3'd3,  // memory stream source next
    SRC_FPSN = 3'd4   // arithmetic result buffer
  } src_t;

  typedef enum logic [2:0] {
    DST_NONE = 3'd0,
    DST_NDN  = 3'd1,  // network destination next
    DST_SDN  = 3'd2,  // memory stream destination next
    DST_FPL  = 3'd3,  // arithmetic left operand buffer
    DST_FPR  = 3'd4,  // arithmetic right operand buffer
    DST_CP   = 3'd5   // back to the control processor
  } dst_t;

  typedef enum logic [1:0] {
    MEM_NONE = 2'd0,
    MEM_SRW  = 2'd1,  // start read stream at address (imm)
    MEM_SWW  = 2'd2   // start write stream at address (imm)
  } mem_op_t;

  // One microinstruction of the node's control processor
  typedef struct packed {
    src_t     src;
    dst_t     dst;
    logic [2:0] src_stream;
    logic [2:0] dst_stream;
    nc_op_t   nc_op;      // NC set-up instruction; parameter taken from imm
    mem_op_t  mem_op;     // stream start; stream = dst_stream, address = imm
    logic     fp_exec;
    fp_ctrl_t fp_ctrl;
    word_t    imm;
  } uop_t;

endpackage
