// tb_hm_router: self-checking test of one router, node (1,2) of a 4 x 4
// hypermesh. Neighbour buses are driven and observed by the testbench.
// Checks: receiver selection for row broadcast, same-row, same-column,
// pivot-routed and self-addressed (row I/O) words; forwarding of a pivot
// packet down the destination column and of an I/O-link packet; delivery of
// packets from row, column and I/O channels to the reader; the self copy of
// a broadcast; and the injection-to-bus latency.
module tb_hm_router;
  import hm_pkg::*;
  localparam int N = 4, R = 1, C = 2;
  logic clk = 0, rst_n = 0;
  flit_t in_data [2*N];
  logic [2*N-1:0] in_req, in_ack, out_req, out_ack;
  flit_t out_data;
  logic inj_valid, inj_ready, rd_dim, rd_io, rd_valid, rd_pop, fwd_event;
  tx_mode_t inj_mode;
  logic [COORD_W-1:0] inj_row, inj_col, rd_idx;
  word_t inj_data, rd_data;
  int checks = 0, failures = 0, cyc = 0, fwd_count = 0;

  hm_router #(.N(N), .ROW(R), .COL(C)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fwd_event) fwd_count <= fwd_count + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // output bus monitor
  logic [PKT_FLITS*FLIT_W-1:0] frame;
  int fc = 0;
  pkt_t got [$];
  logic [2*N-1:0] got_mask [$];
  int got_cyc [$];
  int last_cyc;
  always @(posedge clk) if (rst_n && out_req != '0) begin
    if (fc == 0) begin got_mask.push_back(out_req); got_cyc.push_back(cyc); end
    frame = {frame[(PKT_FLITS-1)*FLIT_W-1:0], out_data};
    fc++;
    if (fc == int'(PKT_FLITS)) begin got.push_back(pkt_t'(frame)); fc = 0; end
  end

  task automatic inject(input tx_mode_t m, input int r, input int c, input word_t d);
    inj_valid <= 1; inj_mode <= m; inj_row <= COORD_W'(r); inj_col <= COORD_W'(c); inj_data <= d;
    @(posedge clk);
    inj_valid <= 0;
  endtask

  task automatic drive(input int ch, input pkt_t p);
    logic [PKT_FLITS*FLIT_W-1:0] v;
    v = p;
    while (!in_ack[ch]) @(posedge clk);
    for (int f = 0; f < int'(PKT_FLITS); f++) begin
      in_req[ch] <= 1'b1;
      in_data[ch] <= v[(PKT_FLITS-1-f)*FLIT_W +: FLIT_W];
      @(posedge clk);
    end
    in_req[ch] <= 1'b0;
  endtask

  task automatic expect_out(input logic [2*N-1:0] mask, input pkt_t p, input string what);
    int t = 0;
    while (got.size() == 0 && t < 50) begin @(posedge clk); t++; end
    check(got.size() > 0, {what, ": packet sent"});
    if (got.size() > 0) begin
      pkt_t g; logic [2*N-1:0] m;
      g = got.pop_front(); m = got_mask.pop_front(); last_cyc = got_cyc.pop_front();
      check(m == mask, $sformatf("%s: receivers %b, expected %b", what, m, mask));
      check(g == p, $sformatf("%s: packet %h, expected %h", what, g, p));
    end
  endtask

  task automatic read_word(input bit dim, input int idx, input bit io, input word_t exp, input string what);
    int t = 0;
    rd_dim <= dim; rd_idx <= COORD_W'(idx); rd_io <= io;
    @(posedge clk); #1;
    while (!rd_valid && t < 50) begin @(posedge clk); #1; t++; end
    check(rd_valid && rd_data == exp, $sformatf("%s: read %h, expected %h", what, rd_data, exp));
    rd_pop <= 1; @(posedge clk); rd_pop <= 0;
  endtask

  function automatic pkt_t mk(input bit bc, input int r, input int c, input word_t d);
    pkt_t p;
    p.hdr.bcast = bc; p.hdr.rsvd = 0; p.hdr.row = COORD_W'(r); p.hdr.col = COORD_W'(c); p.data = d;
    return p;
  endfunction

  initial begin
    int t0;
    for (int k = 0; k < 2*N; k++) in_data[k] = '0;
    in_req = '0; out_ack = '1; inj_valid = 0; inj_mode = TX_ROW_BC; inj_row = 0; inj_col = 0;
    inj_data = 0; rd_dim = 0; rd_idx = 0; rd_io = 0; rd_pop = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // row broadcast: all row slots but our own, latency from injection
    t0 = cyc;
    inject(TX_ROW_BC, 0, 0, 16'hA001);
    expect_out(8'b0000_1011, mk(1, R, C, 16'hA001), "row broadcast");
    // column broadcast
    inject(TX_COL_BC, 0, 0, 16'hA002);
    expect_out(8'b1101_0000, mk(1, R, C, 16'hA002), "column broadcast");
    // point to same row, same column, via pivot, to self (row I/O)
    inject(TX_POINT, 1, 0, 16'hB001);
    expect_out(8'b0000_0001, mk(0, 1, 0, 16'hB001), "same-row point");
    inject(TX_POINT, 3, 2, 16'hB002);
    expect_out(8'b1000_0000, mk(0, 3, 2, 16'hB002), "same-column point");
    inject(TX_POINT, 3, 0, 16'hB003);
    expect_out(8'b0000_0001, mk(0, 3, 0, 16'hB003), "to pivot (1,0)");
    inject(TX_POINT, 1, 2, 16'hB004);
    expect_out(8'b0000_0100, mk(0, 1, 2, 16'hB004), "self address to row I/O");

    // we are the pivot for a packet from (1,0) to (3,2)
    drive(0, mk(0, 3, 2, 16'hC001));
    expect_out(8'b1000_0000, mk(0, 3, 2, 16'hC001), "pivot forward down column");
    // packet from the row I/O link to (0,2): forwarded to column slot 0
    drive(C, mk(0, 0, 2, 16'hC002));
    expect_out(8'b0001_0000, mk(0, 0, 2, 16'hC002), "I/O link forward");
    // packet from the column I/O link to (1,0): forwarded along the row
    drive(N + R, mk(0, 1, 0, 16'hC003));
    expect_out(8'b0000_0001, mk(0, 1, 0, 16'hC003), "column I/O link forward");
    check(fwd_count == 3, $sformatf("three pivot forwards counted (%0d)", fwd_count));

    // deliveries
    drive(N + 0, mk(0, R, C, 16'hD001));   // from (0,2), addressed to us
    drive(3, mk(1, R, 3, 16'hD002));       // row broadcast from (1,3)
    drive(C, mk(1, R, C, 16'hD003));       // broadcast on the row I/O link
    read_word(1, 0, 0, 16'hD001, "column channel delivery");
    read_word(0, 3, 0, 16'hD002, "row channel delivery");
    read_word(0, 0, 1, 16'hD003, "row I/O delivery");
    read_word(0, C, 0, 16'hA001, "self copy of row broadcast");
    read_word(1, R, 0, 16'hA002, "self copy of column broadcast");

    // latency: injection at t0, first flit after 1 queue + 1 decision cycle
    inject(TX_POINT, 1, 3, 16'hE001);
    t0 = cyc;
    expect_out(8'b0000_1000, mk(0, 1, 3, 16'hE001), "latency packet");
    check(last_cyc - t0 == 2, $sformatf("first flit sampled two edges after the word is queued (%0d)", last_cyc - t0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
