// tb_pe_node: self-checking test of the node processor's system bus.
// A microprogram, issued the way a control processor would issue it, writes
// two 64-bit operands into data memory as literals, streams them from memory
// into the network coprocessor (NDN SSN), reads them back from the network
// into the left and right operand buffers (FPL/FPR <- NSN) with a multiply-
// accumulate, unloads the result and moves it to the control processor. The
// network coprocessor is modelled here as a loop-back queue that holds back
// its data for a while, so the node must stall. Checks the result words, the
// set-up instruction seen on the local bus, and that stalls happened.
module tb_pe_node;
  import hm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic uop_valid, uop_ready, nc_cmd_valid, nc_cmd_ready, mac_event, stall_event;
  uop_t uop;
  word_t cp_data, nc_cmd_data, nc_rsp_data;
  nc_op_t nc_cmd_op;
  int checks = 0, failures = 0, stalls = 0, macs = 0;

  pe_node #(.OPW(64), .MEM_WORDS(256)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // network coprocessor model: NDN words loop back to NSN, after a delay
  word_t q [$];
  int hold = 0;
  nc_op_t setup_seen = NC_NOP;
  word_t setup_data;
  int qn = 0;
  word_t qhead = '0;
  assign nc_rsp_data  = qhead;
  assign nc_cmd_ready = (nc_cmd_op == NC_NSN) ? (qn > 0 && hold == 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (hold > 0) hold <= hold - 1;
    if (stall_event) stalls++;
    if (mac_event) macs++;
    if (nc_cmd_valid && nc_cmd_ready) begin
      if (nc_cmd_op == NC_NDN) q.push_back(nc_cmd_data);
      else if (nc_cmd_op == NC_NSN) void'(q.pop_front());
      else begin setup_seen <= nc_cmd_op; setup_data <= nc_cmd_data; hold <= 6; end
      qn = q.size();
      qhead = (qn > 0) ? q[0] : '0;
    end
  end

  function automatic uop_t u(input src_t s, input dst_t d, input word_t imm = '0);
    uop_t x;
    x = '0;
    x.src = s; x.dst = d; x.imm = imm;
    x.nc_op = NC_NOP; x.mem_op = MEM_NONE; x.fp_ctrl = FP_CLEAR;
    return x;
  endfunction

  uop_t prog [$];
  word_t cp_out [$];

  initial begin
    logic [63:0] a, b, p;
    uop_t x;
    a = 64'h0123_4567_89AB_CDEF; b = 64'h0000_0000_0001_0003;
    p = a * b;
    // SWW stream 0 at 16, eight literal words
    x = u(SRC_NONE, DST_NONE, 16'd16); x.mem_op = MEM_SWW; x.dst_stream = 0; prog.push_back(x);
    for (int i = 0; i < 4; i++) begin x = u(SRC_IMM, DST_SDN, a[i*16 +: 16]); x.dst_stream = 0; prog.push_back(x); end
    for (int i = 0; i < 4; i++) begin x = u(SRC_IMM, DST_SDN, b[i*16 +: 16]); x.dst_stream = 0; prog.push_back(x); end
    x = u(SRC_NONE, DST_NONE, 16'd16); x.mem_op = MEM_SRW; x.dst_stream = 1; prog.push_back(x);
    x = u(SRC_NONE, DST_NONE); x.fp_exec = 1; x.fp_ctrl = FP_CLEAR; prog.push_back(x);
    for (int i = 0; i < 8; i++) begin x = u(SRC_SSN, DST_NDN); x.src_stream = 1; prog.push_back(x); end
    x = u(SRC_NONE, DST_NONE, 16'd4); x.nc_op = NC_NRWA; prog.push_back(x);
    for (int i = 0; i < 4; i++) prog.push_back(u(SRC_NSN, DST_FPL));
    for (int i = 0; i < 4; i++) begin x = u(SRC_NSN, DST_FPR); if (i == 3) begin x.fp_exec = 1; x.fp_ctrl = FP_MAC; end prog.push_back(x); end
    x = u(SRC_NONE, DST_NONE); x.fp_exec = 1; x.fp_ctrl = FP_UNLOAD; prog.push_back(x);
    for (int i = 0; i < 4; i++) prog.push_back(u(SRC_FPSN, DST_CP));

    uop_valid = 0; uop = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    foreach (prog[i]) begin
      uop_valid = 1; uop = prog[i];
      #1;
      while (!uop_ready) begin @(posedge clk); #1; end
      if (uop.dst == DST_CP) cp_out.push_back(cp_data);
      @(posedge clk); #1;
    end
    uop_valid = 0;
    check(cp_out.size() == 4, "four result words");
    if (cp_out.size() == 4)
      check({cp_out[3], cp_out[2], cp_out[1], cp_out[0]} == p,
            $sformatf("product %h, expected %h", {cp_out[3], cp_out[2], cp_out[1], cp_out[0]}, p));
    check(setup_seen == NC_NRWA && setup_data == 16'd4, "NRWA with its parameter on the local bus");
    check(stalls > 0, $sformatf("node stalled while the network held its data (%0d)", stalls));
    check(macs == 1, "one multiply-accumulate");
    check(q.size() == 0, "all network words consumed");
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
