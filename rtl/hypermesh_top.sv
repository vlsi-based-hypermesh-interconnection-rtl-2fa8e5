// hypermesh_top: an n x n hypermesh multicomputer for array processing.
//
// Two layers of n x n nodes. The processing layer is n*n node processors
// (pe_node: memory coprocessor with data memory, arithmetic coprocessor, and
// a 16-bit system bus); the communication layer is n*n network coprocessors
// wired as a hypermesh (hm_network): every node can send directly to all other
// nodes of its row and of its column, a single output bus per node carries
// both broadcasts and point-to-point packets, and any node reaches any other
// in at most two hops through a pivot node. Node processor (r,c) talks to
// network coprocessor (r,c) over its local bus.
//
// The control processors that issue each node's microinstructions are not
// part of this design: their microinstruction streams (uop_*) are ports, one
// per node (index r*n+c). The row and column I/O links of the network, where
// an I/O layer of network controllers or a host attaches, are ports as well.
// Defaults are the document's main configuration: 4 x 4 nodes, 8-bit network
// buses, 16-bit local buses, 64-bit operands. DIAGONAL = 1 gives the diagonal
// hypermesh variant. Event outputs report pivot forwarding, multiply-
// accumulates and node stalls, one bit per node.
module hypermesh_top
  import hm_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter bit          DIAGONAL  = 1'b0,
  parameter int unsigned OPW       = 64,
  parameter int unsigned MEM_WORDS = 4096,
  parameter int unsigned CH_DEPTH  = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  // control processors
  input  logic [N*N-1:0] uop_valid,
  input  uop_t           uop [N*N],
  output logic [N*N-1:0] uop_ready,
  output word_t          cp_data [N*N],
  // I/O links
  input  flit_t          row_io_data [N],
  input  logic [N-1:0]   row_io_req  [N],
  output logic [N-1:0]   row_io_ack  [N],
  input  flit_t          col_io_data [N],
  input  logic [N-1:0]   col_io_req  [N],
  output logic [N-1:0]   col_io_ack  [N],
  output flit_t          node_out_data [N*N],
  output logic [N*N-1:0] row_out_req,
  input  logic [N*N-1:0] row_out_ack,
  output logic [N*N-1:0] col_out_req,
  input  logic [N*N-1:0] col_out_ack,
  // activity
  output logic [N*N-1:0] fwd_event,
  output logic [N*N-1:0] mac_event,
  output logic [N*N-1:0] stall_event
);
  localparam int unsigned NN = N * N;

  logic [NN-1:0] nc_cmd_valid, nc_cmd_ready;
  nc_op_t        nc_cmd_op   [NN];
  word_t         nc_cmd_data [NN];
  word_t         nc_rsp_data [NN];

  for (genvar i = 0; i < NN; i++) begin : g_pe
    pe_node #(.OPW(OPW), .MEM_WORDS(MEM_WORDS)) u_pe (
      .clk, .rst_n,
      .uop_valid(uop_valid[i]), .uop(uop[i]), .uop_ready(uop_ready[i]), .cp_data(cp_data[i]),
      .nc_cmd_valid(nc_cmd_valid[i]), .nc_cmd_op(nc_cmd_op[i]), .nc_cmd_data(nc_cmd_data[i]),
      .nc_cmd_ready(nc_cmd_ready[i]), .nc_rsp_data(nc_rsp_data[i]),
      .mac_event(mac_event[i]), .stall_event(stall_event[i])
    );
  end

  hm_network #(.N(N), .DIAGONAL(DIAGONAL), .CH_DEPTH(CH_DEPTH)) u_net (
    .clk, .rst_n,
    .cmd_valid(nc_cmd_valid), .cmd_op(nc_cmd_op), .cmd_data(nc_cmd_data),
    .cmd_ready(nc_cmd_ready), .rsp_data(nc_rsp_data),
    .row_io_data, .row_io_req, .row_io_ack, .col_io_data, .col_io_req, .col_io_ack,
    .node_out_data, .row_out_req, .row_out_ack, .col_out_req, .col_out_ack,
    .fwd_event
  );
endmodule
