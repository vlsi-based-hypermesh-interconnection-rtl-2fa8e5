// arith_coproc: arithmetic coprocessor of a node processor, a pipelined
// multiply-accumulate unit fed word by word from the 16-bit system bus.
//
// Operands are OPW-bit numbers carried as OPW/16 bus words, least significant
// word first. Words written to the left (FPL) or right (FPR) operand buffer are
// gathered into whole operands and queued. An execute (exec) with the control
// code in ctrl then does one of:
//   FP_CLEAR  - clear the accumulator;
//   FP_MAC    - take one left and one right operand and add their product to
//               the accumulator (two pipeline stages: multiply, accumulate);
//               up to three MACs may wait for their operands;
//   FP_UNLOAD - once the pipeline is empty, copy the accumulator into the
//               result buffer (FPSN) and clear it.
// exec_ready is low while the operation cannot be taken (three MACs already
// waiting; for CLEAR/UNLOAD, MACs still waiting or in the pipeline, or the
// result buffer full); the caller waits.
// Results are read as words through res_rd/res_data/res_valid.
//
// The document's node uses a commercial floating-point chip set with 64-bit
// data; this design keeps its buffer-and-execute interface and the pipelined
// multiply-accumulate but does two's-complement integer arithmetic modulo
// 2^OPW in place of floating point. Buffer depths are this design's.
module arith_coproc
  import hm_pkg::*;
#(
  parameter int unsigned OPW = 64,   // operand width, a multiple of 16
  parameter int unsigned OPQ = 2,    // operands buffered per side
  parameter int unsigned RESQ = 2    // results buffered
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     fpl_wr,
  input  logic     fpr_wr,
  input  word_t    wr_data,
  output logic     fpl_ready,
  output logic     fpr_ready,
  input  logic     exec,
  input  fp_ctrl_t ctrl,
  output logic     exec_ready,
  input  logic     res_rd,
  output word_t    res_data,
  output logic     res_valid,
  output logic     mac_event     // one multiply-accumulate issued
);
  localparam int unsigned WPO = OPW / WORD_W;
  localparam int unsigned WCW = (WPO > 1) ? $clog2(WPO) : 1;

  typedef logic [OPW-1:0] op_t;

  // operand gathering, one per side
  op_t            l_gather, r_gather, l_head, r_head, res_head;
  logic [WCW-1:0] l_wc, r_wc, res_wc;
  logic           l_push, r_push, l_empty, r_empty, l_full, r_full;
  logic           l_pop, r_pop, res_push, res_pop, res_empty, res_full;
  logic [$clog2(OPQ+1)-1:0]  l_cnt, r_cnt;
  logic [$clog2(RESQ+1)-1:0] res_cnt;

  assign l_push = fpl_wr && l_wc == WCW'(WPO - 1);
  assign r_push = fpr_wr && r_wc == WCW'(WPO - 1);
  // the word that completes an operand needs room in the operand queue
  assign fpl_ready = !(l_full && l_wc == WCW'(WPO - 1));
  assign fpr_ready = !(r_full && r_wc == WCW'(WPO - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_wc <= '0; r_wc <= '0; l_gather <= '0; r_gather <= '0;
    end else begin
      if (fpl_wr && fpl_ready) begin
        l_gather <= {wr_data, l_gather[OPW-1:WORD_W]};
        l_wc     <= l_push ? '0 : l_wc + 1'b1;
      end
      if (fpr_wr && fpr_ready) begin
        r_gather <= {wr_data, r_gather[OPW-1:WORD_W]};
        r_wc     <= r_push ? '0 : r_wc + 1'b1;
      end
    end
  end

  hm_fifo #(.WIDTH(OPW), .DEPTH(OPQ)) u_l (
    .clk, .rst_n, .wr_en(l_push && fpl_ready), .wr_data({wr_data, l_gather[OPW-1:WORD_W]}),
    .rd_en(l_pop), .rd_data(l_head), .empty(l_empty), .full(l_full), .count(l_cnt));
  hm_fifo #(.WIDTH(OPW), .DEPTH(OPQ)) u_r (
    .clk, .rst_n, .wr_en(r_push && fpr_ready), .wr_data({wr_data, r_gather[OPW-1:WORD_W]}),
    .rd_en(r_pop), .rd_data(r_head), .empty(r_empty), .full(r_full), .count(r_cnt));

  // An FP_MAC exec is queued as a pending operation and issued when both
  // operands are there, so the exec may come in the same cycle as the last
  // word of its operands, as the document's microcode does.
  op_t  prod_q, acc;
  logic prod_v, mac_issue;
  logic [1:0] pending;
  logic pipe_busy;

  assign pipe_busy = prod_v || (pending != '0);
  assign mac_issue = (pending != '0) && !l_empty && !r_empty;

  always_comb begin
    unique case (ctrl)
      FP_MAC:    exec_ready = (pending != 2'd3);
      FP_UNLOAD: exec_ready = !pipe_busy && !res_full;
      default:   exec_ready = !pipe_busy;
    endcase
  end

  assign l_pop     = mac_issue;
  assign r_pop     = mac_issue;
  assign res_push  = exec && exec_ready && ctrl == FP_UNLOAD;
  assign mac_event = mac_issue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q  <= '0;
      prod_v  <= 1'b0;
      acc     <= '0;
      pending <= '0;
    end else begin
      pending <= pending + 2'(exec && exec_ready && ctrl == FP_MAC) - 2'(mac_issue);
      prod_v  <= mac_issue;
      prod_q  <= l_head * r_head;
      if (exec && exec_ready && (ctrl == FP_CLEAR || ctrl == FP_UNLOAD)) acc <= '0;
      else if (prod_v)                                                  acc <= acc + prod_q;
    end
  end

  // result buffer, read word by word
  hm_fifo #(.WIDTH(OPW), .DEPTH(RESQ)) u_res (
    .clk, .rst_n, .wr_en(res_push), .wr_data(acc),
    .rd_en(res_pop), .rd_data(res_head), .empty(res_empty), .full(res_full), .count(res_cnt));

  assign res_valid = !res_empty;
  assign res_data  = res_head[res_wc*WORD_W +: WORD_W];
  assign res_pop   = res_rd && res_valid && res_wc == WCW'(WPO - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   res_wc <= '0;
    else if (res_rd && res_valid) res_wc <= res_pop ? '0 : res_wc + 1'b1;
  end
endmodule
