// tb_arith_coproc: self-checking test of the multiply-accumulate coprocessor.
// Feeds random 64-bit operand pairs as 16-bit words (least significant word
// first), issues a multiply-accumulate per pair, unloads the accumulator and
// compares the four result words with a dot product computed here. Also
// checks that CLEAR empties the accumulator, that MAC waits for operands, and
// that the first MAC is counted one cycle after its exec.
module tb_arith_coproc;
  import hm_pkg::*;
  localparam int OPW = 64, WPO = OPW / 16;
  logic clk = 0, rst_n = 0;
  logic fpl_wr, fpr_wr, fpl_ready, fpr_ready, exec, exec_ready, res_rd, res_valid, mac_event;
  word_t wr_data, res_data;
  fp_ctrl_t ctrl;
  int checks = 0, failures = 0, macs = 0;

  arith_coproc #(.OPW(OPW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (mac_event) macs++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(input bit right, input logic [OPW-1:0] v);
    for (int i = 0; i < WPO; i++) begin
      fpl_wr = !right; fpr_wr = right; wr_data = v[i*16 +: 16];
      #1;
      while (!(right ? fpr_ready : fpl_ready)) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    fpl_wr = 0; fpr_wr = 0;
  endtask

  task automatic do_exec(input fp_ctrl_t c);
    exec = 1; ctrl = c;
    #1;
    while (!exec_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    exec = 0;
  endtask

  task automatic get(output logic [OPW-1:0] v);
    for (int i = 0; i < WPO; i++) begin
      res_rd = 1;
      #1;
      while (!res_valid) begin @(posedge clk); #1; end
      v[i*16 +: 16] = res_data;
      @(posedge clk); #1;
    end
    res_rd = 0;
  endtask

  initial begin
    logic [OPW-1:0] a, b, exp, got;
    fpl_wr = 0; fpr_wr = 0; wr_data = 0; exec = 0; ctrl = FP_CLEAR; res_rd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // a MAC issued before its operands waits for them; UNLOAD waits for it
    do_exec(FP_CLEAR);
    do_exec(FP_MAC);
    ctrl = FP_UNLOAD; #1;
    check(!exec_ready, "UNLOAD waits while a MAC lacks operands");
    put(0, 64'd9); put(1, 64'd11);
    do_exec(FP_UNLOAD);
    get(got);
    check(got == 64'd99, "MAC issued ahead of its operands");
    macs = 0;
    for (int round = 0; round < 3; round++) begin
      exp = '0;
      for (int k = 0; k < 5; k++) begin
        a = {$urandom, $urandom}; b = {$urandom, $urandom};
        if (round == 0 && k == 0) begin a = 64'hFFFF_FFFF_FFFF_FFFF; b = 64'd3; end
        exp = exp + a * b;
        put(0, a);
        put(1, b);
        do_exec(FP_MAC);
      end
      do_exec(FP_UNLOAD);
      get(got);
      check(got == exp, $sformatf("round %0d dot product %h, expected %h", round, got, exp));
    end
    check(macs == 15, $sformatf("15 multiply-accumulates counted (%0d)", macs));
    // CLEAR discards the accumulator
    put(0, 64'd7); put(1, 64'd6); do_exec(FP_MAC);
    do_exec(FP_CLEAR);
    put(0, 64'd5); put(1, 64'd4); do_exec(FP_MAC);
    do_exec(FP_UNLOAD);
    get(got);
    check(got == 64'd20, "CLEAR empties the accumulator");
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
