// nc_sequencer: instruction unit of a network coprocessor (NC).
//
// The node processor drives the NC over its 16-bit local bus with the small
// instruction set of the design (Table 3-1 in its description):
//   NRBC  later NDN words go to every node of the row (row broadcast)
//   NCBC  later NDN words go to every node of the column (column broadcast)
//   NPTP  later NDN words go to one node, routed through a pivot if needed;
//         data = {row[15:8], col[7:0]}   (this instruction is an addition:
//         the document's table is only a sample and its routing needs it)
//   NDN   one word from the bus into the network in the current mode
//   NRRW  read row words:    data = {words per source[15:8], io[7], start[6:0]}
//   NRCW  read column words: same format
//   NRWA  read word alternate: data[7:0] = words per source; reads that many
//         words from row source k, then from column source k, then k+1 ...
//   NSN   one word from the current network source onto the bus; the next
//         source is readied automatically (same node, next row node or next
//         column node)
// NSN and NDN complete in the cycle they are presented when the data or room
// is there; otherwise cmd_ready stays low (the node waits). NSN's word is on
// rsp_data combinationally in the accepting cycle. With io set, NRRW/NRCW read
// the row or column I/O link and do not cycle. A words-per-source value of 0 is
// taken as 1. Parameter field layouts and the reset state (fixed source: row
// node 0, row broadcast mode) are this design's choices.
module nc_sequencer
  import hm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // local bus
  input  logic               cmd_valid,
  input  nc_op_t             cmd_op,
  input  word_t              cmd_data,
  output logic               cmd_ready,
  output word_t              rsp_data,
  // to the router
  output logic               inj_valid,
  output tx_mode_t           inj_mode,
  output logic [COORD_W-1:0] inj_row,
  output logic [COORD_W-1:0] inj_col,
  output word_t              inj_data,
  input  logic               inj_ready,
  output logic               rd_dim,
  output logic [COORD_W-1:0] rd_idx,
  output logic               rd_io,
  input  logic               rd_valid,
  input  word_t              rd_data,
  output logic               rd_pop
);
  typedef enum logic [1:0] {RD_FIXED, RD_ROW, RD_COL, RD_ALT} rd_mode_t;

  tx_mode_t           tx_mode;
  logic [COORD_W-1:0] dst_row, dst_col;
  rd_mode_t           rd_mode;
  logic [7:0]         per_src, wcnt;
  logic               nsn, ndn;

  function automatic logic [COORD_W-1:0] next_idx(input logic [COORD_W-1:0] i);
    return (i == COORD_W'(N - 1)) ? '0 : i + 1'b1;
  endfunction

  assign nsn = cmd_valid && cmd_op == NC_NSN;
  assign ndn = cmd_valid && cmd_op == NC_NDN;

  always_comb begin
    unique case (cmd_op)
      NC_NSN:  cmd_ready = rd_valid;
      NC_NDN:  cmd_ready = inj_ready;
      default: cmd_ready = 1'b1;
    endcase
  end

  assign rsp_data  = rd_data;
  assign rd_pop    = nsn && rd_valid;
  assign inj_valid = ndn;
  assign inj_mode  = tx_mode;
  assign inj_row   = dst_row;
  assign inj_col   = dst_col;
  assign inj_data  = cmd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_mode <= TX_ROW_BC;
      dst_row <= '0;
      dst_col <= '0;
      rd_mode <= RD_FIXED;
      rd_dim  <= 1'b0;
      rd_idx  <= '0;
      rd_io   <= 1'b0;
      per_src <= 8'd1;
      wcnt    <= '0;
    end else if (cmd_valid && cmd_ready) begin
      unique case (cmd_op)
        NC_NRBC: tx_mode <= TX_ROW_BC;
        NC_NCBC: tx_mode <= TX_COL_BC;
        NC_NPTP: begin
          tx_mode <= TX_POINT;
          dst_row <= cmd_data[8 +: COORD_W];
          dst_col <= cmd_data[0 +: COORD_W];
        end
        NC_NRRW, NC_NRCW: begin
          rd_mode <= cmd_data[7] ? RD_FIXED : (cmd_op == NC_NRRW ? RD_ROW : RD_COL);
          rd_dim  <= (cmd_op == NC_NRCW);
          rd_io   <= cmd_data[7];
          rd_idx  <= cmd_data[0 +: COORD_W];
          per_src <= (cmd_data[15:8] == 8'd0) ? 8'd1 : cmd_data[15:8];
          wcnt    <= '0;
        end
        NC_NRWA: begin
          rd_mode <= RD_ALT;
          rd_dim  <= 1'b0;
          rd_io   <= 1'b0;
          rd_idx  <= '0;
          per_src <= (cmd_data[7:0] == 8'd0) ? 8'd1 : cmd_data[7:0];
          wcnt    <= '0;
        end
        NC_NSN: begin
          if (wcnt + 8'd1 >= per_src && rd_mode != RD_FIXED) begin
            wcnt <= '0;
            unique case (rd_mode)
              RD_ROW, RD_COL: rd_idx <= next_idx(rd_idx);
              RD_ALT: begin
                rd_dim <= !rd_dim;
                if (rd_dim) rd_idx <= next_idx(rd_idx);
              end
              default: ;
            endcase
          end else if (rd_mode != RD_FIXED) begin
            wcnt <= wcnt + 8'd1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
