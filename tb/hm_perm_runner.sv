// hm_perm_runner: test driver for one hm_network instance (used by
// tb_hm_network). It plays the node processors of an N x N hypermesh (or
// diagonal hypermesh) through their local buses and runs, one after another:
//   * the permutations bit reversal, perfect shuffle, exchange (lowest bit),
//     butterfly and shift by one on row-major node numbers: every node sends
//     one word to its image with NPTP/NDN, and every destination reads it from
//     the channel it must arrive on (row slot of the source if in the same
//     row, otherwise column-group slot of the source's row, directly or via
//     the pivot);
//   * flooding (all-to-all broadcast): every node broadcasts along its row,
//     then re-broadcasts the n row words along its column, after which every
//     node must hold all N*N words.
// For each permutation it counts, per node, the packets the node forwarded
// as a pivot and compares them with the pivot loads computed here from the
// routing rule, and it reports the largest pivot load (the number of routing
// steps the permutation needs is one more than that, at most).
module hm_perm_runner
  import hm_pkg::*;
#(
  parameter int N        = 4,
  parameter bit DIAGONAL = 1'b0,
  parameter int MAXLOAD_LIMIT = 99   // largest pivot load allowed for the four bit permutations
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_fwd,
  output int   n_bcast
);
  localparam int NN = N * N;
  localparam int B  = $clog2(NN);

  logic [NN-1:0] cmd_valid, cmd_ready, fwd_event;
  nc_op_t cmd_op [NN];
  word_t cmd_data [NN], rsp_data [NN];
  flit_t row_io_data [N], col_io_data [N], node_out_data [NN];
  logic [N-1:0] row_io_req [N], row_io_ack [N], col_io_req [N], col_io_ack [N];
  logic [NN-1:0] row_out_req, row_out_ack, col_out_req, col_out_ack;

  hm_network #(.N(N), .DIAGONAL(DIAGONAL)) dut (.*);

  initial begin
    for (int k = 0; k < N; k++) begin
      row_io_data[k] = '0; col_io_data[k] = '0; row_io_req[k] = '0; col_io_req[k] = '0;
    end
    row_out_ack = '1; col_out_ack = '1;
    cmd_valid = '0;
    for (int i = 0; i < NN; i++) begin cmd_op[i] = NC_NOP; cmd_data[i] = '0; end
  end

  int fwd_cnt [NN];
  always @(posedge clk) for (int i = 0; i < NN; i++) if (fwd_event[i]) fwd_cnt[i]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (N=%0d diag=%0d): %s", N, DIAGONAL, what); end
  endtask

  task automatic issue(input int i, input nc_op_t op, input word_t d);
    cmd_valid[i] = 1; cmd_op[i] = op; cmd_data[i] = d;
    #1;
    while (!cmd_ready[i]) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    cmd_valid[i] = 0;
  endtask

  task automatic nsn(input int i, output word_t w);
    cmd_valid[i] = 1; cmd_op[i] = NC_NSN; cmd_data[i] = '0;
    #1;
    while (!cmd_ready[i]) begin @(posedge clk); #1; end
    w = rsp_data[i];
    @(posedge clk); #1;
    cmd_valid[i] = 0;
  endtask

  function automatic int perm(input int kind, input int x);
    logic [B-1:0] v, o;
    v = B'(x);
    case (kind)
      0: for (int b = 0; b < B; b++) o[b] = v[B-1-b];        // bit reversal
      1: o = {v[B-2:0], v[B-1]};                             // perfect shuffle
      2: o = v ^ B'(1);                                      // exchange
      3: begin o = v; o[0] = v[B-1]; o[B-1] = v[0]; end      // butterfly
      default: o = v + 1'b1;                                 // shift
    endcase
    return int'(o);
  endfunction

  function automatic int grp(input int r, input int c);
    return DIAGONAL ? (r + c) % N : c;
  endfunction

  string names [5] = '{"bit reversal", "perfect shuffle", "exchange", "butterfly", "shift"};

  task automatic run_perm(input int kind);
    int load [NN];
    int src_of [NN];
    int maxload, t0, t1, errs;
    for (int i = 0; i < NN; i++) begin load[i] = 0; fwd_cnt[i] = 0; end
    for (int x = 0; x < NN; x++) src_of[perm(kind, x)] = x;
    // expected pivot loads
    for (int x = 0; x < NN; x++) begin
      int d, i, j, r, s, p;
      d = perm(kind, x); i = x / N; j = x % N; r = d / N; s = d % N;
      if (d != x && i != r && grp(i, j) != grp(r, s)) begin
        p = DIAGONAL ? (r + s + N - i) % N : s;     // pivot column in row i
        load[i * N + p]++;
      end
    end
    maxload = 0;
    for (int i = 0; i < NN; i++) if (load[i] > maxload) maxload = load[i];
    errs = 0;
    t0 = $time;
    for (int x = 0; x < NN; x++) begin
      fork
        automatic int xx = x;
        begin
          automatic int d = perm(kind, xx);
          automatic int sx = src_of[xx];
          automatic word_t w;
          if (d != xx) begin
            issue(xx, NC_NPTP, {8'(d / N), 8'(d % N)});
            issue(xx, NC_NDN, word_t'(kind * 256 + xx));
          end
          if (sx != xx) begin
            if (sx / N == xx / N) issue(xx, NC_NRRW, {8'd1, 1'b0, 7'(sx % N)});
            else                  issue(xx, NC_NRCW, {8'd1, 1'b0, 7'(sx / N)});
            nsn(xx, w);
            if (w != word_t'(kind * 256 + sx)) begin
              errs++;
              $display("  node %0d got %h expected %h", xx, w, kind * 256 + sx);
            end
          end
        end
      join_none
    end
    wait fork;
    t1 = $time;
    repeat (2) @(posedge clk); #1;
    check(errs == 0, $sformatf("%s: every word reached its image", names[kind]));
    begin
      bit same = 1;
      for (int i = 0; i < NN; i++) begin
        if (fwd_cnt[i] != load[i]) same = 0;
        n_fwd += fwd_cnt[i];
      end
      check(same, $sformatf("%s: pivot loads match the routing rule", names[kind]));
    end
    if (kind < 4) check(maxload <= MAXLOAD_LIMIT,
                        $sformatf("%s: largest pivot load %0d within %0d", names[kind], maxload, MAXLOAD_LIMIT));
    $display("  %0dx%0d %s %s: largest pivot load %0d (%0d routing steps), %0d cycles",
             N, N, DIAGONAL ? "D-hypermesh" : "hypermesh", names[kind], maxload,
             maxload + 1, (t1 - t0) / 10);
  endtask

  task automatic run_flood();
    int errs = 0;
    for (int x = 0; x < NN; x++) begin
      fork
        automatic int xx = x;
        begin
          automatic word_t w;
          automatic word_t row_words [N];
          automatic bit seen [NN];
          issue(xx, NC_NRBC, '0);
          issue(xx, NC_NDN, word_t'(16'h4000 + xx));
          issue(xx, NC_NRRW, {8'd1, 1'b0, 7'd0});
          for (int k = 0; k < N; k++) begin nsn(xx, w); row_words[k] = w; end
          issue(xx, NC_NCBC, '0);
          for (int k = 0; k < N; k++) issue(xx, NC_NDN, row_words[k]);
          issue(xx, NC_NRCW, {8'(N), 1'b0, 7'd0});
          for (int k = 0; k < NN; k++) begin
            nsn(xx, w);
            if (w >= 16'h4000 && w < 16'h4000 + NN) seen[w - 16'h4000] = 1;
          end
          for (int k = 0; k < NN; k++) if (!seen[k]) errs++;
        end
      join_none
    end
    wait fork;
    n_bcast += NN * (1 + N);
    check(errs == 0, $sformatf("flooding: every node holds all %0d words (%0d missing)", NN, errs));
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_fwd = 0; n_bcast = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk); #1;
    for (int k = 0; k < 5; k++) run_perm(k);
    run_flood();
    done = 1;
  end
endmodule
