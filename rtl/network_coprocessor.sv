// network_coprocessor: one network controller (NC) chip of the hypermesh
// communication layer, serving one node.
//
// It joins the instruction unit (nc_sequencer), which the node processor
// drives over the 16-bit local bus, to the router (hm_router), which owns one
// 8-bit output bus and 2n 8-bit input buses with two control lines (req, ack)
// per channel. Pin count of this interface, not counting clock, reset and the
// local bus handshake, is 8(2n+1) data + 16 local bus + 8n control, close to
// the document's estimate IO(n) = 24n + 26. Timing: see the two sub-blocks;
// a word sent by NDN reaches a neighbouring node's channel buffer 5 cycles
// later (1 cycle in the injection queue, 1 decision cycle, 3 flits).
module network_coprocessor
  import hm_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned ROW       = 0,
  parameter int unsigned COL       = 0,
  parameter bit          DIAGONAL  = 1'b0,
  parameter int unsigned CH_DEPTH  = 4,
  parameter int unsigned INJ_DEPTH = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  // local bus
  input  logic           cmd_valid,
  input  nc_op_t         cmd_op,
  input  word_t          cmd_data,
  output logic           cmd_ready,
  output word_t          rsp_data,
  // network buses
  input  flit_t          in_data [2*N],
  input  logic [2*N-1:0] in_req,
  output logic [2*N-1:0] in_ack,
  output flit_t          out_data,
  output logic [2*N-1:0] out_req,
  input  logic [2*N-1:0] out_ack,
  output logic           fwd_event
);
  logic               inj_valid, inj_ready, rd_dim, rd_io, rd_valid, rd_pop;
  tx_mode_t           inj_mode;
  logic [COORD_W-1:0] inj_row, inj_col, rd_idx;
  word_t              inj_data, rd_data;

  nc_sequencer #(.N(N)) u_seq (
    .clk, .rst_n,
    .cmd_valid, .cmd_op, .cmd_data, .cmd_ready, .rsp_data,
    .inj_valid, .inj_mode, .inj_row, .inj_col, .inj_data, .inj_ready,
    .rd_dim, .rd_idx, .rd_io, .rd_valid, .rd_data, .rd_pop
  );

  hm_router #(
    .N(N), .ROW(ROW), .COL(COL), .DIAGONAL(DIAGONAL),
    .CH_DEPTH(CH_DEPTH), .INJ_DEPTH(INJ_DEPTH)
  ) u_router (
    .clk, .rst_n,
    .in_data, .in_req, .in_ack, .out_data, .out_req, .out_ack,
    .inj_valid, .inj_mode, .inj_row, .inj_col, .inj_data, .inj_ready,
    .rd_dim, .rd_idx, .rd_io, .rd_valid, .rd_data, .rd_pop,
    .fwd_event
  );
endmodule
