// pe_node: node processor of one hypermesh node, minus its control processor.
//
// The node's functional units share one 16-bit system bus: the memory
// coprocessor (streams into and out of the data memory), the arithmetic
// coprocessor (left/right operand buffers, multiply-accumulate, result
// buffer) and the network coprocessor, which sits outside this module on its
// local bus. Each cycle the control processor issues one microinstruction
// (uop_t): the bus moves one word from a source (literal, network NSN, memory
// stream SSN, arithmetic result FPSN) to a destination (network NDN, memory
// stream SDN, operand buffer FPL or FPR, or back to the control processor),
// and in the same cycle it may start a memory stream, set up the network
// coprocessor (NRBC, NCBC, NPTP, NRWA, NRRW, NRCW with the literal as
// parameter) and trigger the arithmetic unit. This is how the document's
// microcode for the hypermesh matrix multiply is written, e.g. "NDN SSN AMAT"
// (next memory word into the network) or "FPLN <- NSN" (next network word
// into the left operand buffer).
//
// uop_ready is high when every unit the microinstruction uses can act; if
// not, nothing happens and the control processor holds the microinstruction.
// A microinstruction may use the network local bus for one thing only: a
// set-up instruction, an NSN or an NDN. The control processor itself is not
// part of this design (its instruction set is defined elsewhere); its
// microinstruction stream is this module's input.
module pe_node
  import hm_pkg::*;
#(
  parameter int unsigned OPW       = 64,
  parameter int unsigned MEM_WORDS = 4096
) (
  input  logic   clk,
  input  logic   rst_n,
  // from the control processor
  input  logic   uop_valid,
  input  uop_t   uop,
  output logic   uop_ready,
  output word_t  cp_data,      // word moved to DST_CP
  // network coprocessor local bus
  output logic   nc_cmd_valid,
  output nc_op_t nc_cmd_op,
  output word_t  nc_cmd_data,
  input  logic   nc_cmd_ready,
  input  word_t  nc_rsp_data,
  // activity
  output logic   mac_event,
  output logic   stall_event
);
  localparam int unsigned AW = $clog2(MEM_WORDS);

  word_t bus;
  word_t mem_rdata, fp_res;
  logic  fpl_ready, fpr_ready, exec_ready, res_valid;
  logic  uses_nc, others_ok, nc_ok, go;

  // network local bus: set-up, NSN or NDN
  always_comb begin
    uses_nc     = 1'b1;
    nc_cmd_data = uop.imm;
    if (uop.nc_op != NC_NOP)       nc_cmd_op = uop.nc_op;
    else if (uop.src == SRC_NSN)   nc_cmd_op = NC_NSN;
    else if (uop.dst == DST_NDN) begin
      nc_cmd_op   = NC_NDN;
      nc_cmd_data = bus;
    end else begin
      nc_cmd_op = NC_NOP;
      uses_nc   = 1'b0;
    end
  end

  // bus source
  always_comb begin
    unique case (uop.src)
      SRC_IMM:  bus = uop.imm;
      SRC_NSN:  bus = nc_rsp_data;
      SRC_SSN:  bus = mem_rdata;
      SRC_FPSN: bus = fp_res;
      default:  bus = '0;
    endcase
  end

  // readiness of everything except the network coprocessor
  always_comb begin
    others_ok = 1'b1;
    if (uop.src == SRC_FPSN && !res_valid)                   others_ok = 1'b0;
    if (uop.dst == DST_FPL && !fpl_ready)                    others_ok = 1'b0;
    if (uop.dst == DST_FPR && !fpr_ready)                    others_ok = 1'b0;
    if (uop.fp_exec && !exec_ready)                          others_ok = 1'b0;
  end

  assign nc_cmd_valid = uop_valid && uses_nc && others_ok;
  assign nc_ok        = !uses_nc || nc_cmd_ready;
  assign go           = uop_valid && others_ok && nc_ok;
  assign uop_ready    = go;
  assign stall_event  = uop_valid && !go;
  assign cp_data      = bus;

  mem_coproc #(.MEM_WORDS(MEM_WORDS)) u_mem (
    .clk, .rst_n,
    .start(go && uop.mem_op != MEM_NONE), .start_stream(uop.dst_stream),
    .start_addr(uop.imm[AW-1:0]),
    .ssn(go && uop.src == SRC_SSN), .ssn_stream(uop.src_stream), .ssn_data(mem_rdata),
    .sdn(go && uop.dst == DST_SDN), .sdn_stream(uop.dst_stream), .sdn_data(bus)
  );

  arith_coproc #(.OPW(OPW)) u_fp (
    .clk, .rst_n,
    .fpl_wr(go && uop.dst == DST_FPL), .fpr_wr(go && uop.dst == DST_FPR), .wr_data(bus),
    .fpl_ready, .fpr_ready,
    .exec(go && uop.fp_exec), .ctrl(uop.fp_ctrl), .exec_ready,
    .res_rd(go && uop.src == SRC_FPSN), .res_data(fp_res), .res_valid,
    .mac_event
  );

  // a microinstruction uses the network local bus for one purpose only
  a_one_nc_use: assert property (@(posedge clk) disable iff (!rst_n)
    uop_valid |-> (int'(uop.nc_op != NC_NOP) + int'(uop.src == SRC_NSN) + int'(uop.dst == DST_NDN)) <= 1);
endmodule
