// tb_link_tx: self-checking test of a network output-bus transmitter.
// A broadcast to three receivers must wait until all three show ack, then
// drive exactly those req lines for three cycles with header and payload
// flits in order; the next packet may start only after a one-cycle gap.
module tb_link_tx;
  import hm_pkg::*;
  localparam int NREQ = 8;
  logic clk = 0, rst_n = 0;
  pkt_t in_pkt;
  logic [NREQ-1:0] in_mask, req, ack;
  logic in_valid, in_ready, busy;
  flit_t bus_data;
  int checks = 0, failures = 0;
  int start_cycle [$];
  int cyc = 0;

  link_tx #(.NREQ(NREQ)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bus monitor: collect frames
  logic [PKT_FLITS*FLIT_W-1:0] frame;
  int fcount = 0;
  pkt_t got [$];
  logic [NREQ-1:0] got_mask [$];
  always @(posedge clk) if (rst_n) begin
    if (req != '0) begin
      if (fcount == 0) begin start_cycle.push_back(cyc); got_mask.push_back(req); end
      frame = {frame[(PKT_FLITS-1)*FLIT_W-1:0], bus_data};
      fcount++;
      if (fcount == int'(PKT_FLITS)) begin got.push_back(pkt_t'(frame)); fcount = 0; end
    end else begin
      if (fcount != 0) begin failures++; $display("FAIL: req dropped inside a packet"); fcount = 0; end
    end
  end

  initial begin
    pkt_t p1, p2;
    in_valid = 0; in_mask = '0; in_pkt = '0; ack = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    p1 = '{hdr: hdr_t'(8'h85), data: 16'hBEEF};
    p2 = '{hdr: hdr_t'(8'h13), data: 16'h0F0F};
    in_pkt <= p1; in_mask <= 8'b0000_1011; in_valid <= 1;
    ack <= 8'b0000_0011;                       // one receiver not ready
    repeat (4) @(posedge clk);
    check(req == '0, "no transfer while a selected receiver withholds ack");
    ack <= 8'b1111_1011;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1;
    in_pkt <= p2; in_mask <= 8'b0100_0000;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid <= 0;
    repeat (8) @(posedge clk);
    check(got.size() == 2, "two packets on the bus");
    if (got.size() == 2) begin
      check(got[0] == p1, "broadcast packet flits in order");
      check(got[1] == p2, "point packet flits in order");
      check(got_mask[0] == 8'b0000_1011, "broadcast drives all selected req lines");
      check(got_mask[1] == 8'b0100_0000, "point packet drives one req line");
      check(start_cycle[1] - start_cycle[0] == int'(PKT_FLITS) + 1, "packet every PKT_FLITS+1 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
