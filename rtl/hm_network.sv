// hm_network: the communication layer of an n x n hypermesh.
//
// n*n network coprocessors, node (r,c) at index r*n+c. Each node's single
// output bus is heard by the other n-1 nodes of its row and the other n-1
// nodes of its column group, so every node has direct links to 2(n-1) nodes
// and the network diameter is 2. With DIAGONAL = 0 the column group of (r,c)
// is column c (the hypermesh); with DIAGONAL = 1 it is the diagonal
// (r + c) mod n (the diagonal hypermesh), which keeps the row buses and
// replaces the column buses by skewed ones.
//
// Each row and each column group also has an I/O link: row r's I/O port drives
// input slot c of every node (r,c) with its own req/ack per node, and every
// node's output bus can address the row I/O port through its own row slot
// (row_out_req / row_out_ack, data = node_out_data). The same holds for column
// groups. These ports are where the I/O layer of network controllers, or a
// host, attaches. Bus wiring follows the document; the I/O slot convention is
// this design's.
//
// Local bus per node: cmd_* / rsp_data, see nc_sequencer. fwd_event[i] pulses
// when node i takes a packet into its pivot forward queue.
module hm_network
  import hm_pkg::*;
#(
  parameter int unsigned N        = 4,
  parameter bit          DIAGONAL = 1'b0,
  parameter int unsigned CH_DEPTH = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  // local buses
  input  logic [N*N-1:0] cmd_valid,
  input  nc_op_t         cmd_op   [N*N],
  input  word_t          cmd_data [N*N],
  output logic [N*N-1:0] cmd_ready,
  output word_t          rsp_data [N*N],
  // row I/O links (index r), column-group I/O links (index g)
  input  flit_t          row_io_data [N],
  input  logic [N-1:0]   row_io_req  [N],   // [r][c]: to node (r,c)
  output logic [N-1:0]   row_io_ack  [N],
  input  flit_t          col_io_data [N],
  input  logic [N-1:0]   col_io_req  [N],   // [g][k]: to the row-k member of group g
  output logic [N-1:0]   col_io_ack  [N],
  // node outputs towards the I/O ports
  output flit_t          node_out_data [N*N],
  output logic [N*N-1:0] row_out_req,
  input  logic [N*N-1:0] row_out_ack,
  output logic [N*N-1:0] col_out_req,
  input  logic [N*N-1:0] col_out_ack,
  output logic [N*N-1:0] fwd_event
);
  localparam int unsigned NN = N * N;

  flit_t          in_data  [NN][2*N];
  logic [2*N-1:0] in_req   [NN];
  logic [2*N-1:0] in_ack   [NN];
  flit_t          out_data [NN];
  logic [2*N-1:0] out_req  [NN];
  logic [2*N-1:0] out_ack  [NN];

  function automatic int unsigned grp(input int unsigned r, input int unsigned c);
    return DIAGONAL ? (r + c) % N : c;
  endfunction
  // column of the row-k member of column group g
  function automatic int unsigned member_col(input int unsigned g, input int unsigned k);
    return DIAGONAL ? (g + N - k) % N : g;
  endfunction

  for (genvar i = 0; i < NN; i++) begin : g_node
    network_coprocessor #(
      .N(N), .ROW(i / N), .COL(i % N), .DIAGONAL(DIAGONAL), .CH_DEPTH(CH_DEPTH)
    ) u_nc (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[i]), .cmd_op(cmd_op[i]), .cmd_data(cmd_data[i]),
      .cmd_ready(cmd_ready[i]), .rsp_data(rsp_data[i]),
      .in_data(in_data[i]), .in_req(in_req[i]), .in_ack(in_ack[i]),
      .out_data(out_data[i]), .out_req(out_req[i]), .out_ack(out_ack[i]),
      .fwd_event(fwd_event[i])
    );
    assign node_out_data[i] = out_data[i];
  end

  // bus wiring
  always_comb begin
    for (int unsigned r = 0; r < N; r++) begin
      for (int unsigned c = 0; c < N; c++) begin
        automatic int unsigned i = r * N + c;
        automatic int unsigned g = grp(r, c);
        for (int unsigned k = 0; k < N; k++) begin
          // row slot k of node (r,c)
          if (k == c) begin
            in_data[i][k]   = row_io_data[r];
            in_req[i][k]    = row_io_req[r][c];
            row_io_ack[r][c] = in_ack[i][k];
            out_ack[i][k]   = row_out_ack[i];
            row_out_req[i]  = out_req[i][k];
          end else begin
            in_data[i][k]   = out_data[r * N + k];
            in_req[i][k]    = out_req[r * N + k][c];
            out_ack[i][k]   = in_ack[r * N + k][c];
          end
          // column-group slot k of node (r,c): the row-k member of group g
          if (k == r) begin
            in_data[i][N + k] = col_io_data[g];
            in_req[i][N + k]  = col_io_req[g][r];
            col_io_ack[g][r]  = in_ack[i][N + k];
            out_ack[i][N + k] = col_out_ack[i];
            col_out_req[i]    = out_req[i][N + k];
          end else begin
            in_data[i][N + k] = out_data[k * N + member_col(g, k)];
            in_req[i][N + k]  = out_req[k * N + member_col(g, k)][N + r];
            out_ack[i][N + k] = in_ack[k * N + member_col(g, k)][N + r];
          end
        end
      end
    end
  end
endmodule
