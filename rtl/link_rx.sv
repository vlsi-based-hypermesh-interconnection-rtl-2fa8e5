// link_rx: receiving end of one unidirectional network bus (one input channel
// of a network coprocessor).
//
// Each input channel has a buffer of its own, as the design asks for
// ("a separate buffer for each channel"). Flow control is receiver
// controlled: ack is high while the channel buffer has room for one more whole
// packet. A sender may only start a packet while it sees ack high; it then
// holds req high for exactly PKT_FLITS consecutive cycles, one flit per cycle,
// header first. Because a channel has a single sender and the room is checked
// before the packet starts, the packet is always accepted in full.
//
// The flits are assembled into a packet and pushed into the channel FIFO on
// the last flit. The head packet is offered on head/head_valid and removed by
// pop. The buffer depth and this level-style use of the two control lines are
// this design's choices: the document gives two control lines per channel and
// a send/acknowledge protocol but no timing.
module link_rx
  import hm_pkg::*;
#(
  parameter int unsigned DEPTH = 4   // packets buffered per channel
) (
  input  logic  clk,
  input  logic  rst_n,
  // bus side
  input  flit_t bus_data,
  input  logic  req,
  output logic  ack,
  // router side
  output pkt_t  head,
  output logic  head_valid,
  input  logic  pop
);
  localparam int unsigned CW = $clog2(PKT_FLITS);

  logic [CW-1:0]                  fcnt;
  logic [PKT_FLITS*FLIT_W-1:0]    shreg;
  logic                           push, empty, full;
  logic [$clog2(DEPTH+1)-1:0]     count;
  pkt_t                           pkt_in;

  assign push   = req && (fcnt == CW'(PKT_FLITS - 1));
  assign pkt_in = pkt_t'({shreg[(PKT_FLITS-1)*FLIT_W-1:0], bus_data});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcnt  <= '0;
      shreg <= '0;
    end else if (req) begin
      shreg <= {shreg[(PKT_FLITS-1)*FLIT_W-1:0], bus_data};
      fcnt  <= push ? '0 : fcnt + 1'b1;
    end
  end

  hm_fifo #(.WIDTH($bits(pkt_t)), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_en(push), .wr_data(pkt_in),
    .rd_en(pop), .rd_data(head),
    .empty, .full, .count
  );

  assign ack        = !full;
  assign head_valid = !empty;

  a_push_room: assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
endmodule
