// tb_hypermesh_top: end-to-end test of the whole multicomputer at its default
// size (4 x 4 nodes, 64-bit operands). The testbench plays the sixteen control
// processors, each issuing a microprogram to its node:
//   1. matrix multiply C = A x B (one 64-bit element per node, as in the
//      document's hypermesh matrix-multiply microcode): store A(i,j) and
//      B(i,j) in data memory, broadcast A(i,j) along the row and B(i,j) along
//      the column from a memory stream, read the n row and n column words
//      alternately (NRWA) into the left and right operand buffers with a
//      multiply-accumulate per pair, unload, write C(i,j) to memory, read it
//      back to the control processor and compare with a reference product
//      (arithmetic modulo 2^64);
//   2. transpose: every off-diagonal node sends the low word of C(i,j) to
//      node (j,i) point to point; every such packet needs a pivot, and the
//      receiver reads it from the column channel of the source's row;
//   3. I/O links: a packet enters on row 0's I/O link at node (0,1) addressed
//      to node (2,1), which must forward it down its column; node (3,3) sends
//      a word to itself, which leaves on its row I/O port and is captured.
// It counts every mechanism (row and column broadcasts, pivot forwards,
// multiply-accumulates, stalls, I/O input and I/O output) and counts a
// failure for any that never happened.
module tb_hypermesh_top;
  import hm_pkg::*;
  localparam int N = 4, NN = N * N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NN-1:0] uop_valid, uop_ready, fwd_event, mac_event, stall_event;
  uop_t  uop [NN];
  word_t cp_data [NN];
  flit_t row_io_data [N], col_io_data [N], node_out_data [NN];
  logic [N-1:0] row_io_req [N], row_io_ack [N], col_io_req [N], col_io_ack [N];
  logic [NN-1:0] row_out_req, row_out_ack, col_out_req, col_out_ack;

  hypermesh_top dut (.*);

  int checks = 0, failures = 0;
  int n_fwd = 0, n_mac = 0, n_stall = 0, n_rowbc = 0, n_colbc = 0, n_io_in = 0, n_io_out = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    n_fwd   += $countones(fwd_event);
    n_mac   += $countones(mac_event);
    n_stall += $countones(stall_event);
  end

  function automatic uop_t mk(src_t s, dst_t d, int sst = 0, int dstr = 0, nc_op_t nc = NC_NOP,
                              mem_op_t m = MEM_NONE, bit ex = 0, fp_ctrl_t c = FP_CLEAR,
                              word_t imm = '0);
    uop_t u;
    u.src = s; u.dst = d; u.src_stream = 3'(sst); u.dst_stream = 3'(dstr);
    u.nc_op = nc; u.mem_op = m; u.fp_exec = ex; u.fp_ctrl = c; u.imm = imm;
    return u;
  endfunction

  // issue one microinstruction on node i; returns the word sent to the CP
  task automatic run(input int i, input uop_t u, output word_t w);
    uop_valid[i] = 1; uop[i] = u;
    #1;
    while (!uop_ready[i]) begin @(posedge clk); #1; end
    w = cp_data[i];
    @(posedge clk); #1;
    uop_valid[i] = 0;
  endtask

  longint unsigned A [N][N], B [N][N], C [N][N], got [N][N];

  task automatic matmul(input int x);
    int r = x / N, c = x % N;
    word_t w;
    longint unsigned res = 0;
    run(x, mk(SRC_NONE, DST_NONE, 0, 0, NC_NOP, MEM_SWW, 0, FP_CLEAR, 16'd0), w);
    for (int k = 0; k < 4; k++) run(x, mk(SRC_IMM, DST_SDN, 0, 0, .imm(A[r][c][16*k +: 16])), w);
    for (int k = 0; k < 4; k++) run(x, mk(SRC_IMM, DST_SDN, 0, 0, .imm(B[r][c][16*k +: 16])), w);
    run(x, mk(SRC_NONE, DST_NONE, 0, 1, NC_NOP, MEM_SRW, .imm(16'd0)), w);
    run(x, mk(SRC_NONE, DST_NONE, .nc(NC_NRBC)), w);
    for (int k = 0; k < 4; k++) begin run(x, mk(SRC_SSN, DST_NDN, 1), w); n_rowbc++; end
    run(x, mk(SRC_NONE, DST_NONE, .nc(NC_NCBC)), w);
    for (int k = 0; k < 4; k++) begin run(x, mk(SRC_SSN, DST_NDN, 1), w); n_colbc++; end
    run(x, mk(SRC_NONE, DST_NONE, .nc(NC_NRWA), .ex(1), .c(FP_CLEAR), .imm(16'd4)), w);
    for (int k = 0; k < N; k++) begin
      for (int q = 0; q < 4; q++) run(x, mk(SRC_NSN, DST_FPL), w);
      for (int q = 0; q < 4; q++) run(x, mk(SRC_NSN, DST_FPR, .ex(q == 3), .c(FP_MAC)), w);
    end
    run(x, mk(SRC_NONE, DST_NONE, .ex(1), .c(FP_UNLOAD)), w);
    run(x, mk(SRC_NONE, DST_NONE, 0, 2, NC_NOP, MEM_SWW, .imm(16'd8)), w);
    for (int k = 0; k < 4; k++) run(x, mk(SRC_FPSN, DST_SDN, 0, 2), w);
    run(x, mk(SRC_NONE, DST_NONE, 0, 3, NC_NOP, MEM_SRW, .imm(16'd8)), w);
    for (int k = 0; k < 4; k++) begin
      run(x, mk(SRC_SSN, DST_CP, 3), w);
      res[16*k +: 16] = w;
    end
    got[r][c] = res;
  endtask

  word_t tr [N][N];
  task automatic transpose(input int x);
    int r = x / N, c = x % N;
    word_t w;
    if (r == c) return;
    run(x, mk(SRC_NONE, DST_NONE, 0, 4, NC_NOP, MEM_SRW, .imm(16'd8)), w);
    run(x, mk(SRC_NONE, DST_NONE, .nc(NC_NPTP), .imm({8'(c), 8'(r)})), w);
    run(x, mk(SRC_SSN, DST_NDN, 4), w);
    // receive C(c,r): it comes from row c, through the pivot (c,c)
    run(x, mk(SRC_NONE, DST_NONE, .nc(NC_NRCW), .imm({8'd1, 1'b0, 7'(c)})), w);
    run(x, mk(SRC_NSN, DST_CP), w);
    tr[r][c] = w;
  endtask

  // capture packets leaving on the row I/O port of node 15
  flit_t io_flits [$];
  always @(posedge clk) if (rst_n && row_out_req[NN-1]) io_flits.push_back(node_out_data[NN-1]);

  task automatic io_send(input int r, input int c, input flit_t hdr, input word_t d);
    flit_t f [3] = '{hdr, d[15:8], d[7:0]};
    row_io_req[r][c] = 0;
    while (!row_io_ack[r][c]) begin @(posedge clk); #1; end
    for (int k = 0; k < 3; k++) begin
      row_io_req[r][c] = 1; row_io_data[r] = f[k];
      @(posedge clk); #1;
    end
    row_io_req[r][c] = 0;
    n_io_in++;
  endtask

  initial begin
    word_t w;
    uop_valid = '0;
    for (int i = 0; i < NN; i++) uop[i] = '0;
    for (int k = 0; k < N; k++) begin
      row_io_data[k] = '0; col_io_data[k] = '0; row_io_req[k] = '0; col_io_req[k] = '0;
    end
    row_out_ack = '1; col_out_ack = '1;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      A[r][c] = {$urandom, $urandom}; B[r][c] = {$urandom, $urandom};
    end
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      C[r][c] = 0;
      for (int k = 0; k < N; k++) C[r][c] += A[r][k] * B[k][c];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // 1. matrix multiply
    for (int x = 0; x < NN; x++) fork automatic int xx = x; matmul(xx); join_none
    wait fork;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      check(got[r][c] == C[r][c], $sformatf("C(%0d,%0d) = %h, expected %h", r, c, got[r][c], C[r][c]));
    check(n_mac == NN * N, $sformatf("%0d multiply-accumulates, expected %0d", n_mac, NN * N));
    $display("matrix multiply done at cycle %0t", $time);

    // 2. transpose through pivots
    n_fwd = 0;
    for (int x = 0; x < NN; x++) fork automatic int xx = x; transpose(xx); join_none
    wait fork;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) if (r != c)
      check(tr[r][c] == C[c][r][15:0], $sformatf("transpose (%0d,%0d) = %h", r, c, tr[r][c]));
    check(n_fwd == N * (N - 1), $sformatf("%0d pivot forwards, expected %0d", n_fwd, N * (N - 1)));

    // 3a. I/O input: row 0 I/O link into node (0,1), addressed to (2,1)
    fork
      io_send(0, 1, flit_t'({1'b0, 1'b0, 3'd2, 3'd1}), 16'hBEEF);
      begin
        run(2 * N + 1, mk(SRC_NONE, DST_NONE, .nc(NC_NRCW), .imm({8'd1, 1'b0, 7'd0})), w);
        run(2 * N + 1, mk(SRC_NSN, DST_CP), w);
        check(w == 16'hBEEF, $sformatf("I/O word at (2,1) = %h", w));
      end
    join
    // 3b. I/O output: node (3,3) addresses itself; the word leaves on the row I/O port
    run(NN - 1, mk(SRC_NONE, DST_NONE, .nc(NC_NPTP), .imm({8'd3, 8'd3})), w);
    run(NN - 1, mk(SRC_IMM, DST_NDN, .imm(16'h1234)), w);
    repeat (8) @(posedge clk);
    n_io_out = io_flits.size() / 3;
    check(io_flits.size() == 3 && io_flits[0] == 8'h1B && io_flits[1] == 8'h12 && io_flits[2] == 8'h34,
          $sformatf("row I/O output of node (3,3): %0d flits", io_flits.size()));

    $display("events: row-bc words %0d, col-bc words %0d, forwards %0d, MACs %0d, stalls %0d, io in %0d, io out %0d",
             n_rowbc, n_colbc, n_fwd, n_mac, n_stall, n_io_in, n_io_out);
    if (n_rowbc == 0)  begin failures++; $display("FAIL: no row broadcast"); end
    if (n_colbc == 0)  begin failures++; $display("FAIL: no column broadcast"); end
    if (n_fwd == 0)    begin failures++; $display("FAIL: no pivot forward"); end
    if (n_mac == 0)    begin failures++; $display("FAIL: no multiply-accumulate"); end
    if (n_stall == 0)  begin failures++; $display("FAIL: no stall"); end
    if (n_io_in == 0)  begin failures++; $display("FAIL: no I/O input"); end
    if (n_io_out == 0) begin failures++; $display("FAIL: no I/O output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
