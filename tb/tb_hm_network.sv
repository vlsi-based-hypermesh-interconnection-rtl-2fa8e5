// tb_hm_network: runs the permutation and flooding workloads on three
// networks: the default 4 x 4 hypermesh, an 8 x 8 hypermesh and an 8 x 8
// diagonal hypermesh. On the diagonal hypermesh the bit reversal, perfect
// shuffle, exchange and butterfly permutations must need at most two routing
// steps, i.e. no pivot may forward more than one packet.
module tb_hm_network;
  logic clk = 0, rst_n = 0;
  logic [2:0] done;
  int c [3], f [3], fw [3], bc [3];
  int checks, failures;

  always #5 clk = ~clk;
  int cycles = 0;
  always @(posedge clk) cycles++;

  hm_perm_runner #(.N(4))                                 u4  (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]), .n_fwd(fw[0]), .n_bcast(bc[0]));
  hm_perm_runner #(.N(8))                                 u8  (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]), .n_fwd(fw[1]), .n_bcast(bc[1]));
  hm_perm_runner #(.N(8), .DIAGONAL(1), .MAXLOAD_LIMIT(1)) ud8 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]), .n_fwd(fw[2]), .n_bcast(bc[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done == 3'b111);
    checks = c[0] + c[1] + c[2] + 2;
    failures = f[0] + f[1] + f[2];
    // every mechanism happened
    if (fw[0] == 0 || fw[1] == 0 || fw[2] == 0) begin failures++; $display("FAIL: no pivot forwarding"); end
    if (bc[0] == 0) begin failures++; $display("FAIL: no broadcasts"); end
    $display("pivot forwards: %0d %0d %0d, broadcast words: %0d %0d %0d", fw[0], fw[1], fw[2], bc[0], bc[1], bc[2]);
    $display("all workloads done after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule
