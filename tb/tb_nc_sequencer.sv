// tb_nc_sequencer: self-checking test of the network coprocessor instruction
// unit. A model router answers every read with the channel it was asked for,
// so the order of sources chosen by NRWA, NRRW and NRCW can be compared with
// an independently computed sequence. Also checks the transmit mode and
// destination set by NRBC, NCBC and NPTP, and that NSN and NDN wait while the
// router has no data or no room.
module tb_nc_sequencer;
  import hm_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, inj_valid, inj_ready, rd_dim, rd_io, rd_valid, rd_pop;
  nc_op_t cmd_op;
  word_t cmd_data, rsp_data, inj_data, rd_data;
  tx_mode_t inj_mode;
  logic [COORD_W-1:0] inj_row, inj_col, rd_idx;
  int checks = 0, failures = 0;

  nc_sequencer #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  assign rd_data = {8'h00, 3'b000, rd_io, rd_dim, rd_idx};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(input nc_op_t op, input word_t d);
    cmd_valid = 1; cmd_op = op; cmd_data = d;
    #1;
    while (!cmd_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    cmd_valid = 0;
  endtask

  // one NSN, returning the word
  task automatic nsn(output word_t w);
    cmd_valid = 1; cmd_op = NC_NSN; cmd_data = '0;
    #1;
    while (!cmd_ready) begin @(posedge clk); #1; end
    w = rsp_data;
    @(posedge clk); #1;
    cmd_valid = 0;
  endtask

  function automatic word_t src(input bit io, input bit dim, input int idx);
    return {8'h00, 3'b000, io, dim, COORD_W'(idx)};
  endfunction

  initial begin
    word_t w;
    bit ok;
    cmd_valid = 0; cmd_op = NC_NOP; cmd_data = '0; inj_ready = 1; rd_valid = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;

    // NRWA 4: row k x4, column k x4, k = 0..n-1, then wraps
    issue(NC_NRWA, 16'd4);
    ok = 1;
    for (int k = 0; k < N + 1; k++)
      for (int d = 0; d < 2; d++)
        for (int i = 0; i < 4; i++) begin
          nsn(w);
          if (w != src(0, d[0], k % N)) begin ok = 0; $display("k%0d d%0d i%0d got %h", k, d, i, w); end
        end
    check(ok, "NRWA source order");

    // NRRW: 2 words per source starting at row node 2
    issue(NC_NRRW, {8'd2, 1'b0, 7'd2});
    ok = 1;
    for (int j = 0; j < 8; j++) begin
      nsn(w);
      if (w != src(0, 0, (2 + j / 2) % N)) ok = 0;
    end
    check(ok, "NRRW source order");

    // NRCW: 1 word per source from column node 3
    issue(NC_NRCW, {8'd1, 1'b0, 7'd3});
    ok = 1;
    for (int j = 0; j < 5; j++) begin
      nsn(w);
      if (w != src(0, 1, (3 + j) % N)) ok = 0;
    end
    check(ok, "NRCW source order");

    // NRCW with io: fixed on the column I/O link
    issue(NC_NRCW, {8'd1, 1'b1, 7'd0});
    nsn(w); check(w == src(1, 1, 0), "I/O link read");
    nsn(w); check(w == src(1, 1, 0), "I/O link read does not cycle");

    // NSN waits for data
    rd_valid <= 0;
    cmd_valid <= 1; cmd_op <= NC_NSN;
    repeat (3) begin @(posedge clk); #1; check(!cmd_ready && !rd_pop, "NSN waits for data"); end
    rd_valid <= 1; #1;
    check(cmd_ready && rd_pop, "NSN completes when data arrives");
    @(posedge clk); cmd_valid <= 0;

    // transmit modes
    issue(NC_NCBC, '0);
    cmd_valid <= 1; cmd_op <= NC_NDN; cmd_data <= 16'h1111; #1;
    check(inj_valid && inj_mode == TX_COL_BC && inj_data == 16'h1111, "NDN after NCBC");
    @(posedge clk); cmd_valid <= 0;
    issue(NC_NPTP, {8'd2, 8'd3});
    cmd_valid <= 1; cmd_op <= NC_NDN; cmd_data <= 16'h2222; inj_ready <= 0; #1;
    check(inj_mode == TX_POINT && inj_row == 2 && inj_col == 3, "NPTP destination");
    check(!cmd_ready, "NDN waits for room");
    inj_ready <= 1; #1;
    check(cmd_ready && inj_valid, "NDN completes with room");
    @(posedge clk); cmd_valid <= 0;
    issue(NC_NRBC, '0);
    #1 check(inj_mode == TX_ROW_BC, "NRBC");

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
