// mem_coproc: memory coprocessor and data memory of a node processor.
//
// Array data move between the data memory and the system bus as streams:
// a stream is started at a word address (start with the stream number and the
// address) and then advanced one word per "source next" (ssn: read the word
// at the stream's address) or "destination next" (sdn: write the word) with
// the address incremented automatically. Up to NSTREAM streams are active at
// once, as in the document's streaming memory interface (eight streams). A
// read and a write on two different streams may happen in the same cycle.
// Reads are combinational from the current address, so a word is on ssn_data
// in the cycle it is taken; writes and address updates happen at the clock
// edge. Starting a stream in the same cycle as using it is not allowed.
//
// The document gives the stream interface and its purpose; the unit stride,
// the single-cycle memory and the memory size are this design's choices (the
// document allows memory cycles slower than the processor's, not modelled).
module mem_coproc
  import hm_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 4096,
  parameter int unsigned NSTREAM   = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [$clog2(NSTREAM)-1:0]   start_stream,
  input  logic [$clog2(MEM_WORDS)-1:0] start_addr,
  input  logic                         ssn,
  input  logic [$clog2(NSTREAM)-1:0]   ssn_stream,
  output word_t                        ssn_data,
  input  logic                         sdn,
  input  logic [$clog2(NSTREAM)-1:0]   sdn_stream,
  input  word_t                        sdn_data
);
  localparam int unsigned AW = $clog2(MEM_WORDS);

  word_t         mem  [MEM_WORDS];
  logic [AW-1:0] addr [NSTREAM];

  assign ssn_data = mem[addr[ssn_stream]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(NSTREAM); s++) addr[s] <= '0;
    end else begin
      if (ssn) addr[ssn_stream] <= addr[ssn_stream] + 1'b1;
      if (sdn) addr[sdn_stream] <= addr[sdn_stream] + 1'b1;
      if (start) addr[start_stream] <= start_addr;
    end
  end

  always_ff @(posedge clk) begin
    if (sdn) mem[addr[sdn_stream]] <= sdn_data;
  end

  a_start_alone: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !((ssn && ssn_stream == start_stream) || (sdn && sdn_stream == start_stream)));
  a_streams_differ: assert property (@(posedge clk) disable iff (!rst_n)
    (ssn && sdn) |-> ssn_stream != sdn_stream);
endmodule
