// tb_mem_coproc: self-checking test of the streaming memory coprocessor.
// Writes three arrays through three write streams (interleaved word by word),
// reads them back through read streams started at other offsets, copies one
// array to another area with a read and a write stream in the same cycle, and
// compares everything with the values written.
module tb_mem_coproc;
  import hm_pkg::*;
  localparam int MW = 256, NS = 8;
  logic clk = 0, rst_n = 0;
  logic start, ssn, sdn;
  logic [2:0] start_stream, ssn_stream, sdn_stream;
  logic [7:0] start_addr;
  word_t ssn_data, sdn_data;
  int checks = 0, failures = 0;
  word_t ref_mem [MW];

  mem_coproc #(.MEM_WORDS(MW), .NSTREAM(NS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic st(input int s, input int a);
    start = 1; start_stream = 3'(s); start_addr = 8'(a);
    @(posedge clk); #1;
    start = 0;
  endtask

  initial begin
    bit ok;
    start = 0; ssn = 0; sdn = 0; start_stream = 0; ssn_stream = 0; sdn_stream = 0;
    start_addr = 0; sdn_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    st(0, 0); st(1, 32); st(2, 64);
    for (int i = 0; i < 16; i++)
      for (int s = 0; s < 3; s++) begin
        sdn = 1; sdn_stream = 3'(s); sdn_data = word_t'($urandom);
        ref_mem[s * 32 + i] = sdn_data;
        @(posedge clk); #1;
      end
    sdn = 0;
    // read back, stream 5 from 32, stream 6 from 4
    st(5, 32); st(6, 4);
    ok = 1;
    for (int i = 0; i < 16; i++) begin
      ssn = 1; ssn_stream = 3'd5; #1;
      if (ssn_data != ref_mem[32 + i]) ok = 0;
      @(posedge clk); #1;
      ssn_stream = 3'd6; #1;
      if (i < 12 && ssn_data != ref_mem[4 + i]) ok = 0;
      @(posedge clk); #1;
    end
    ssn = 0;
    check(ok, "streams read back what was written");
    // copy 16 words from 64 to 128 with simultaneous read and write streams
    st(3, 64); st(4, 128);
    for (int i = 0; i < 16; i++) begin
      ssn = 1; ssn_stream = 3'd3; sdn = 1; sdn_stream = 3'd4; #1;
      sdn_data = ssn_data;
      ref_mem[128 + i] = ref_mem[64 + i];
      @(posedge clk); #1;
    end
    ssn = 0; sdn = 0;
    st(7, 128);
    ok = 1;
    for (int i = 0; i < 16; i++) begin
      ssn = 1; ssn_stream = 3'd7; #1;
      if (ssn_data != ref_mem[128 + i]) ok = 0;
      @(posedge clk); #1;
    end
    ssn = 0;
    check(ok, "memory-to-memory copy through two streams");
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
