// tb_link_rx: self-checking test of one network input channel.
// Sends packets as a bus sender would (req high for three flit cycles while
// ack is high), fills the channel buffer to check that ack drops when no room
// is left for another packet, then pops and compares every packet in order.
module tb_link_rx;
  import hm_pkg::*;
  localparam int DEPTH = 3;
  logic clk = 0, rst_n = 0;
  flit_t bus_data;
  logic req, ack, head_valid, pop;
  pkt_t head;
  int checks = 0, failures = 0;
  pkt_t sent [$];

  link_rx #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input pkt_t p);
    logic [PKT_FLITS*FLIT_W-1:0] v;
    v = p;
    for (int f = 0; f < int'(PKT_FLITS); f++) begin
      req      <= 1'b1;
      bus_data <= v[(PKT_FLITS-1-f)*FLIT_W +: FLIT_W];
      @(posedge clk);
    end
    req <= 1'b0;
    sent.push_back(p);
  endtask

  initial begin
    req = 0; bus_data = '0; pop = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(ack && !head_valid, "empty channel acks");
    for (int i = 0; i < DEPTH; i++) begin
      pkt_t p;
      p.hdr = hdr_t'(8'h80 | 8'(i));
      p.data = word_t'(16'h1234 + 16'(i * 977));
      check(ack, "ack before packet");
      send(p);
      @(posedge clk);
    end
    #1;
    check(!ack, "ack low when full");
    check(head_valid, "head valid");
    for (int i = 0; i < DEPTH; i++) begin
      pkt_t exp;
      exp = sent.pop_front();
      check(head_valid && head == exp, $sformatf("packet %0d order/content", i));
      pop <= 1'b1;
      @(posedge clk);
      pop <= 1'b0;
      #1;
      check(ack, "ack after pop");
    end
    @(posedge clk); #1;
    check(!head_valid, "empty after pops");
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
