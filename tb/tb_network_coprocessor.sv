// tb_network_coprocessor: self-checking test of one network coprocessor,
// node (0,1) of a 4 x 4 hypermesh, driven through its local bus with the NC
// instructions while the testbench plays the other nodes' buses. Checks the
// packets and receivers produced by NRBC/NDN and NPTP/NDN (direct and through
// a pivot), reading words that arrive from row and column nodes with NRRW,
// NRCW and NSN, and the time from NDN to the first flit on the bus.
module tb_network_coprocessor;
  import hm_pkg::*;
  localparam int N = 4, R = 0, C = 1;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, fwd_event;
  nc_op_t cmd_op;
  word_t cmd_data, rsp_data;
  flit_t in_data [2*N];
  logic [2*N-1:0] in_req, in_ack, out_req, out_ack;
  flit_t out_data;
  int checks = 0, failures = 0, cyc = 0;

  network_coprocessor #(.N(N), .ROW(R), .COL(C)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [PKT_FLITS*FLIT_W-1:0] frame;
  int fc = 0;
  pkt_t got [$];
  logic [2*N-1:0] got_mask [$];
  int got_cyc [$];
  always @(posedge clk) if (rst_n && out_req != '0) begin
    if (fc == 0) begin got_mask.push_back(out_req); got_cyc.push_back(cyc); end
    frame = {frame[(PKT_FLITS-1)*FLIT_W-1:0], out_data};
    fc++;
    if (fc == int'(PKT_FLITS)) begin got.push_back(pkt_t'(frame)); fc = 0; end
  end

  task automatic issue(input nc_op_t op, input word_t d);
    cmd_valid = 1; cmd_op = op; cmd_data = d;
    #1;
    while (!cmd_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    cmd_valid = 0;
  endtask

  task automatic nsn(output word_t w);
    cmd_valid = 1; cmd_op = NC_NSN; cmd_data = '0;
    #1;
    while (!cmd_ready) begin @(posedge clk); #1; end
    w = rsp_data;
    @(posedge clk); #1;
    cmd_valid = 0;
  endtask

  task automatic drive(input int ch, input pkt_t p);
    logic [PKT_FLITS*FLIT_W-1:0] v;
    v = p;
    while (!in_ack[ch]) begin @(posedge clk); #1; end
    for (int f = 0; f < int'(PKT_FLITS); f++) begin
      in_req[ch] = 1'b1;
      in_data[ch] = v[(PKT_FLITS-1-f)*FLIT_W +: FLIT_W];
      @(posedge clk); #1;
    end
    in_req[ch] = 1'b0;
  endtask

  task automatic expect_out(input logic [2*N-1:0] mask, input pkt_t p, input string what);
    int t = 0;
    while (got.size() == 0 && t < 50) begin @(posedge clk); #1; t++; end
    check(got.size() > 0, {what, ": packet sent"});
    if (got.size() > 0) begin
      pkt_t g; logic [2*N-1:0] m;
      g = got.pop_front(); m = got_mask.pop_front(); void'(got_cyc.pop_front());
      check(m == mask && g == p, $sformatf("%s: %b %h, expected %b %h", what, m, g, mask, p));
    end
  endtask

  function automatic pkt_t mk(input bit bc, input int r, input int c, input word_t d);
    pkt_t p;
    p.hdr.bcast = bc; p.hdr.rsvd = 0; p.hdr.row = COORD_W'(r); p.hdr.col = COORD_W'(c); p.data = d;
    return p;
  endfunction

  initial begin
    word_t w;
    int t0;
    for (int k = 0; k < 2*N; k++) in_data[k] = '0;
    in_req = '0; out_ack = '1; cmd_valid = 0; cmd_op = NC_NOP; cmd_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    issue(NC_NRBC, '0);
    t0 = cyc;
    issue(NC_NDN, 16'h5A5A);
    expect_out(8'b0000_1101, mk(1, R, C, 16'h5A5A), "row broadcast");
    issue(NC_NCBC, '0);
    issue(NC_NDN, 16'h6B6B);
    expect_out(8'b1110_0000, mk(1, R, C, 16'h6B6B), "column broadcast");
    issue(NC_NPTP, {8'd2, 8'd3});
    issue(NC_NDN, 16'h7C7C);
    expect_out(8'b0000_1000, mk(0, 2, 3, 16'h7C7C), "point via pivot (0,3)");
    issue(NC_NPTP, {8'd3, 8'd1});
    issue(NC_NDN, 16'h8D8D);
    expect_out(8'b1000_0000, mk(0, 3, 1, 16'h8D8D), "point down own column");

    // arrivals: row nodes 3 and 0, column nodes 2 and 3
    drive(3, mk(1, R, 3, 16'h1003));
    drive(0, mk(0, R, C, 16'h1000));
    drive(N + 2, mk(1, 2, C, 16'h1102));
    drive(N + 3, mk(0, R, C, 16'h1103));
    issue(NC_NRRW, {8'd1, 1'b0, 7'd3});
    nsn(w); check(w == 16'h1003, "NRRW: first from row node 3");
    nsn(w); check(w == 16'h1000, "NRRW: next from row node 0");
    nsn(w); check(w == 16'h5A5A, "NRRW: then row index 1, the node's own broadcast");
    issue(NC_NRCW, {8'd1, 1'b0, 7'd2});
    nsn(w); check(w == 16'h1102, "NRCW: first from column node 2");
    nsn(w); check(w == 16'h1103, "NRCW: next from column node 3");
    nsn(w); check(w == 16'h6B6B, "NRCW: wraps to index 0, the node's own broadcast");
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
