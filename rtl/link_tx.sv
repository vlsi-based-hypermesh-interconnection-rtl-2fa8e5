// link_tx: transmitting end of a network coprocessor's single output bus.
//
// A node has one 8-bit output bus that every node of its row and of its
// column (or diagonal) group listens to; per receiver there is a req line out
// and an ack line back. To send a packet to one receiver or broadcast it to
// several, link_tx waits until every selected receiver shows ack, then holds
// the selected req lines high for PKT_FLITS cycles and puts one flit per
// cycle on the bus, header first. It takes the next packet from its source at
// the earliest one cycle after the last flit, so the bus carries a packet
// every PKT_FLITS+1 cycles when nothing stalls.
//
// Interface: in_pkt/in_mask/in_valid is the packet to send and the set of
// receivers; in_ready pulses in the cycle the packet is taken. The one-cycle
// gap between packets and the all-acks rule for broadcasts are this design's
// reading of the document's send/acknowledge protocol.
module link_tx
  import hm_pkg::*;
#(
  parameter int unsigned NREQ = 8    // receivers on this bus (2n)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pkt_t            in_pkt,
  input  logic [NREQ-1:0] in_mask,
  input  logic            in_valid,
  output logic            in_ready,
  output flit_t           bus_data,
  output logic [NREQ-1:0] req,
  input  logic [NREQ-1:0] ack,
  output logic            busy
);
  localparam int unsigned CW = $clog2(PKT_FLITS);

  logic [PKT_FLITS*FLIT_W-1:0] shreg;
  logic [NREQ-1:0]             mask_q;
  logic [CW-1:0]               fcnt;
  logic                        sending;

  assign in_ready = !sending && in_valid && (in_mask != '0) && ((ack & in_mask) == in_mask);
  assign busy     = sending;
  assign req      = sending ? mask_q : '0;
  assign bus_data = sending ? shreg[PKT_FLITS*FLIT_W-1 -: FLIT_W] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending <= 1'b0;
      fcnt    <= '0;
      mask_q  <= '0;
      shreg   <= '0;
    end else if (!sending) begin
      if (in_ready) begin
        sending <= 1'b1;
        fcnt    <= '0;
        mask_q  <= in_mask;
        shreg   <= in_pkt;
      end
    end else begin
      shreg <= shreg << FLIT_W;
      if (fcnt == CW'(PKT_FLITS - 1)) sending <= 1'b0;
      else                            fcnt    <= fcnt + 1'b1;
    end
  end
endmodule
