// hm_router: the routing part of one network coprocessor in an n x n
// hypermesh (node ROW, COL).
//
// Every node owns one output bus that all nodes of its row and of its column
// group hear, so any node is at most two hops from any other. The router
// implements the document's four router operations:
//  * injection  - words from the local node enter an injection FIFO together
//                 with the transmit mode (row broadcast, column broadcast or
//                 point-to-point to a destination node);
//  * buffering  - each of the 2n input buses has a FIFO of its own (link_rx);
//  * forwarding - a point-to-point packet that reaches a node that is not its
//                 destination is a "pivot" packet: it is moved to the forward
//                 queue and sent on along the other dimension;
//  * delivery   - other packets wait in their channel FIFO until the node reads
//                 them, naming the channel (row or column, source index).
// Routing follows the document's two-step algorithm: a node (i,j) sends to
// (r,s) directly when i = r or j = s, otherwise to the pivot (i,s) in its own
// row, which forwards it down column s. With DIAGONAL = 1 the column buses are
// replaced by the diagonal buses of the diagonal hypermesh: the group of node
// (r,c) is (r + c) mod n, and the pivot is the node of the source row that is
// in the destination's group.
//
// Channel numbering (inputs, and req/ack lines of the output bus): 0..n-1 are
// row slots, n..2n-1 are column-group slots, slot k being the node in row or
// column-group position k. A node's own slot in each set is its I/O link: the
// row I/O link comes in on slot COL and the column I/O link on slot n+ROW, and
// a point-to-point word addressed to the node itself leaves on row slot COL to
// the row's I/O port. Copies of the node's own broadcasts are kept in two
// "self" FIFOs so that reading source index COL (row) or ROW (column) returns
// the node's own broadcast word, as the matrix-multiply slice needs.
//
// Forwarded packets take the output bus before newly injected ones. The
// forward queue holds n packets, the document's bound on the messages queued
// at one pivot. Queue depths, the priorities and the I/O slot convention are
// this design's choices.
module hm_router
  import hm_pkg::*;
#(
  parameter int unsigned N         = 4,  // network is N x N
  parameter int unsigned ROW       = 0,
  parameter int unsigned COL       = 0,
  parameter bit          DIAGONAL  = 1'b0,
  parameter int unsigned CH_DEPTH  = 4,  // packets per input channel
  parameter int unsigned INJ_DEPTH = 4,  // injection queue, in words
  parameter int unsigned FWD_DEPTH = N   // forward (pivot) queue, in packets
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input buses
  input  flit_t                in_data [2*N],
  input  logic [2*N-1:0]       in_req,
  output logic [2*N-1:0]       in_ack,
  // output bus
  output flit_t                out_data,
  output logic [2*N-1:0]       out_req,
  input  logic [2*N-1:0]       out_ack,
  // injection from the sequencer
  input  logic                 inj_valid,
  input  tx_mode_t             inj_mode,
  input  logic [COORD_W-1:0]   inj_row,
  input  logic [COORD_W-1:0]   inj_col,
  input  word_t                inj_data,
  output logic                 inj_ready,
  // delivery to the sequencer
  input  logic                 rd_dim,   // 0 row, 1 column
  input  logic [COORD_W-1:0]   rd_idx,
  input  logic                 rd_io,    // read the I/O link of that dimension
  output logic                 rd_valid,
  output word_t                rd_data,
  input  logic                 rd_pop,
  // status
  output logic                 fwd_event  // a pivot packet entered the forward queue
);
  localparam int unsigned NCH = 2 * N;
  localparam int unsigned CHW = $clog2(NCH);

  // ---------------------------------------------------------------- helpers
  function automatic int unsigned group_of(input int unsigned r, input int unsigned c);
    return DIAGONAL ? (r + c) % N : c;
  endfunction

  function automatic logic [COORD_W-1:0] pivot_col(input int unsigned dr, input int unsigned dc);
    // column in row ROW whose group equals the destination's group
    return DIAGONAL ? COORD_W'((dr + dc + N - ROW) % N) : COORD_W'(dc);
  endfunction

  function automatic logic is_fwd(input pkt_t p);
    if (p.hdr.bcast) return 1'b0;
    if (p.hdr.row == COORD_W'(ROW) && p.hdr.col == COORD_W'(COL)) return 1'b0;
    return (p.hdr.row == COORD_W'(ROW)) ||
           (group_of(int'(p.hdr.row), int'(p.hdr.col)) == group_of(ROW, COL));
  endfunction

  // mask of the receiver(s) for a point-to-point packet leaving this node
  function automatic logic [NCH-1:0] point_mask(input int unsigned dr, input int unsigned dc);
    logic [NCH-1:0] m;
    m = '0;
    if (dr == ROW)                                  m[dc]     = 1'b1;  // same row (own slot = row I/O)
    else if (group_of(dr, dc) == group_of(ROW, COL)) m[N + dr] = 1'b1; // same column group
    else                                             m[pivot_col(dr, dc)] = 1'b1; // to the pivot
    return m;
  endfunction

  // ------------------------------------------------------------ input side
  pkt_t           ch_head  [NCH];
  logic [NCH-1:0] ch_valid, ch_pop, ch_fwd, fwd_pop, rd_pop_ch;

  for (genvar k = 0; k < NCH; k++) begin : g_rx
    link_rx #(.DEPTH(CH_DEPTH)) u_rx (
      .clk, .rst_n,
      .bus_data(in_data[k]), .req(in_req[k]), .ack(in_ack[k]),
      .head(ch_head[k]), .head_valid(ch_valid[k]), .pop(ch_pop[k])
    );
    assign ch_fwd[k] = ch_valid[k] && is_fwd(ch_head[k]);
    assign ch_pop[k] = fwd_pop[k] || rd_pop_ch[k];
  end

  // -------------------------------------------------------- forward engine
  pkt_t fwd_head, fwd_in;
  logic fwd_empty, fwd_full, fwd_wr, fwd_rd;
  logic [$clog2(FWD_DEPTH+1)-1:0] fwd_count;
  logic [CHW-1:0] fwd_sel;
  logic           fwd_any;

  always_comb begin
    fwd_any = 1'b0;
    fwd_sel = '0;
    for (int k = NCH - 1; k >= 0; k--) begin
      if (ch_fwd[k]) begin
        fwd_any = 1'b1;
        fwd_sel = CHW'(k);
      end
    end
  end

  assign fwd_wr    = fwd_any && !fwd_full;
  assign fwd_in    = ch_head[fwd_sel];
  assign fwd_event = fwd_wr;
  always_comb begin
    fwd_pop = '0;
    if (fwd_wr) fwd_pop[fwd_sel] = 1'b1;
  end

  hm_fifo #(.WIDTH($bits(pkt_t)), .DEPTH(FWD_DEPTH)) u_fwd (
    .clk, .rst_n,
    .wr_en(fwd_wr), .wr_data(fwd_in),
    .rd_en(fwd_rd), .rd_data(fwd_head),
    .empty(fwd_empty), .full(fwd_full), .count(fwd_count)
  );

  // ------------------------------------------------------- injection queue
  typedef struct packed {
    tx_mode_t           mode;
    logic [COORD_W-1:0] row;
    logic [COORD_W-1:0] col;
    word_t              data;
  } inj_t;

  inj_t inj_in, inj_head;
  logic inj_empty, inj_full, inj_rd;
  logic [$clog2(INJ_DEPTH+1)-1:0] inj_count;

  assign inj_in    = '{mode: inj_mode, row: inj_row, col: inj_col, data: inj_data};
  assign inj_ready = !inj_full;

  hm_fifo #(.WIDTH($bits(inj_t)), .DEPTH(INJ_DEPTH)) u_inj (
    .clk, .rst_n,
    .wr_en(inj_valid && !inj_full), .wr_data(inj_in),
    .rd_en(inj_rd), .rd_data(inj_head),
    .empty(inj_empty), .full(inj_full), .count(inj_count)
  );

  // self copies of own broadcasts
  word_t self_rdata [2];
  logic [1:0] self_empty, self_full, self_wr, self_rd;
  for (genvar d = 0; d < 2; d++) begin : g_self
    logic [$clog2(CH_DEPTH+1)-1:0] cnt;
    hm_fifo #(.WIDTH(WORD_W), .DEPTH(CH_DEPTH)) u_self (
      .clk, .rst_n,
      .wr_en(self_wr[d]), .wr_data(inj_head.data),
      .rd_en(self_rd[d]), .rd_data(self_rdata[d]),
      .empty(self_empty[d]), .full(self_full[d]), .count(cnt)
    );
  end

  // --------------------------------------------------------- output side
  pkt_t           tx_pkt, inj_pkt;
  logic [NCH-1:0] tx_mask, inj_mask, row_bc_mask, col_bc_mask;
  logic           tx_valid, tx_ready, inj_ok, tx_busy;

  always_comb begin
    row_bc_mask = '0;
    col_bc_mask = '0;
    for (int k = 0; k < int'(N); k++) begin
      if (k != int'(COL)) row_bc_mask[k]     = 1'b1;
      if (k != int'(ROW)) col_bc_mask[N + k] = 1'b1;
    end
  end

  always_comb begin
    inj_pkt.hdr.rsvd = 1'b0;
    inj_pkt.data     = inj_head.data;
    unique case (inj_head.mode)
      TX_ROW_BC: begin
        inj_pkt.hdr.bcast = 1'b1;
        inj_pkt.hdr.row   = COORD_W'(ROW);
        inj_pkt.hdr.col   = COORD_W'(COL);
        inj_mask          = row_bc_mask;
        inj_ok            = !self_full[0];
      end
      TX_COL_BC: begin
        inj_pkt.hdr.bcast = 1'b1;
        inj_pkt.hdr.row   = COORD_W'(ROW);
        inj_pkt.hdr.col   = COORD_W'(COL);
        inj_mask          = col_bc_mask;
        inj_ok            = !self_full[1];
      end
      default: begin
        inj_pkt.hdr.bcast = 1'b0;
        inj_pkt.hdr.row   = inj_head.row;
        inj_pkt.hdr.col   = inj_head.col;
        inj_mask          = point_mask(int'(inj_head.row), int'(inj_head.col));
        inj_ok            = 1'b1;
      end
    endcase
  end

  // forwarded packets first
  always_comb begin
    if (!fwd_empty) begin
      tx_pkt   = fwd_head;
      tx_mask  = point_mask(int'(fwd_head.hdr.row), int'(fwd_head.hdr.col));
      tx_valid = 1'b1;
    end else begin
      tx_pkt   = inj_pkt;
      tx_mask  = inj_mask;
      tx_valid = !inj_empty && inj_ok;
    end
  end

  assign fwd_rd     = tx_ready && !fwd_empty;
  assign inj_rd     = tx_ready && fwd_empty;
  assign self_wr[0] = inj_rd && inj_head.mode == TX_ROW_BC;
  assign self_wr[1] = inj_rd && inj_head.mode == TX_COL_BC;

  link_tx #(.NREQ(NCH)) u_tx (
    .clk, .rst_n,
    .in_pkt(tx_pkt), .in_mask(tx_mask), .in_valid(tx_valid), .in_ready(tx_ready),
    .bus_data(out_data), .req(out_req), .ack(out_ack), .busy(tx_busy)
  );

  // ---------------------------------------------------------- delivery side
  logic           rd_self;
  logic           rd_self_dim;
  logic [CHW-1:0] rd_ch;

  always_comb begin
    rd_self     = 1'b0;
    rd_self_dim = rd_dim;
    if (rd_io)       rd_ch = rd_dim ? CHW'(N + ROW) : CHW'(COL);
    else             rd_ch = rd_dim ? CHW'(N + int'(rd_idx)) : CHW'(rd_idx);
    if (!rd_io && !rd_dim && rd_idx == COORD_W'(COL)) rd_self = 1'b1;
    if (!rd_io &&  rd_dim && rd_idx == COORD_W'(ROW)) rd_self = 1'b1;
  end

  always_comb begin
    if (rd_self) begin
      rd_valid = !self_empty[rd_self_dim];
      rd_data  = self_rdata[rd_self_dim];
    end else begin
      rd_valid = ch_valid[rd_ch] && !ch_fwd[rd_ch];
      rd_data  = ch_head[rd_ch].data;
    end
  end

  // the reader's pop depends on rd_valid, so it is decoded separately
  always_comb begin
    rd_pop_ch = '0;
    self_rd   = '0;
    if (rd_self) self_rd[rd_self_dim] = rd_pop && rd_valid;
    else         rd_pop_ch[rd_ch]     = rd_pop && rd_valid;
  end

  // a channel is never popped by the forward engine and the reader at once
  a_single_pop: assert property (@(posedge clk) disable iff (!rst_n) (fwd_pop & rd_pop_ch) == '0);

  initial begin
    assert (N >= 2 && N <= MAX_N) else $error("hm_router: N must be 2..%0d", MAX_N);
  end
endmodule
