// maf_top: pipelined binary64 multiply-add unit, R = X*Y + W, with a radix-8
// Booth multiplier, a dual (far/close) data path and combined rounding; in
// single-precision mode it computes two binary32 multiply-adds side by side.
//
// Pipeline (one operation accepted per cycle at most), in each lane
// (maf_lane):
//   stage 1  maf_stage1  operand unpacking, exponent handling (Eq. 2, 3) and
//                        the radix-8 Booth multiplication to carry-save form
//   stage 2  maf_stage2  path selection; far path (alignment shifter, then
//                        carry-save words normalized before their addition)
//                        or close path (leading-zero count and normalization
//                        shifter)
//   stage 3  round_unit  final addition, rounding by compound adder, zero
//                        detection, packing
// Each stage ends in a register, so a multiply-add or a multiplication has a
// latency of 3 cycles: presented with in_valid & in_ready in cycle 0, the
// result is on out_res with out_valid in cycle 3. An addition (X + W) has no
// use for the multiplier and bypasses stage 1: its operands are prepared by a
// second copy of the unpacking and exponent logic and enter stage 2 directly,
// for a latency of 2 cycles. A stage 2 slot taken by the operation in
// stage 1 makes an addition wait one cycle (in_ready low). Because the
// addition only overtakes an empty stage 1, results leave in the order the
// operations were accepted. There is no output back-pressure.
//
// Precision: with in_single low, in_x/in_y/in_w are binary64 and lane 0 does
// the work. With in_single high each operand word holds two binary32 values,
// lane 0 in bits 31:0 and lane 1 in bits 63:32; both get the same in_op. Each
// is widened exactly at the input, computed on a binary64-wide lane and
// rounded to binary32 in stage 3; out_res = {lane 1, lane 0}, out_flags are
// lane 0's flags and out_flags_hi lane 1's (zero in binary64 mode). Lane 0 is
// shared by both precisions; lane 1 only works in single-precision mode (its
// registers load only then). The document gets its second binary32 lane by
// combining and redesigning parts of the binary64 datapath without saying
// which; here lane 1 is a plain second copy of the datapath, which costs the
// area the document's sharing saves.
//
// Reset (rst_n, asynchronous, active low) clears the valid bits only.
// Rounding is round-to-nearest-even; subnormal operands are read as zero and
// results below the normal range are flushed to zero (flagged as underflow).
// The three-stage split, the addition bypass and the two precision modes
// follow the document; the handshake, the latencies in cycles, the flags, the
// lane layout and the subnormal handling are this design's own choices.
module maf_top
  import maf_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic            in_single,   // 1: two binary32 operations, bits 31:0 and 63:32

  input  maf_op_e         in_op,
  input  logic [FP_W-1:0] in_x,
  input  logic [FP_W-1:0] in_y,
  input  logic [FP_W-1:0] in_w,
  output logic            out_valid,
  output logic [FP_W-1:0] out_res,
  output maf_flags_t      out_flags,
  output maf_flags_t      out_flags_hi  // lane 1 (single-precision mode)
);
  logic s1_v, s2_v;
  logic acc, acc_add, ld1, ld2;
  logic s1_single, s2_single;
  logic [FP_W-1:0] res0, res1;
  maf_flags_t      flags0, flags1;
  logic [FP_W-1:0] x0, y0, w0, x32, y32, w32, x1, y1, w1;

  assign in_ready = !(in_op == OP_ADD && s1_v);
  assign acc      = in_valid && in_ready;
  assign acc_add  = acc && (in_op == OP_ADD);
  assign ld1      = acc && !acc_add;
  assign ld2      = s1_v || acc_add;

  // Precision multiplexers: binary32 operands are widened exactly and then
  // use the binary64 datapath; round_unit rounds them at 24 bits.
  fp32_widen u_wx0 (.a(in_x[31:0]), .y(x32));
  fp32_widen u_wy0 (.a(in_y[31:0]), .y(y32));
  fp32_widen u_ww0 (.a(in_w[31:0]), .y(w32));
  assign x0 = in_single ? x32 : in_x;
  assign y0 = in_single ? y32 : in_y;
  assign w0 = in_single ? w32 : in_w;

  fp32_widen u_wx1 (.a(in_x[63:32]), .y(x1));
  fp32_widen u_wy1 (.a(in_y[63:32]), .y(y1));
  fp32_widen u_ww1 (.a(in_w[63:32]), .y(w1));

  maf_lane u_l0 (
    .clk(clk), .single(in_single), .op(in_op), .x(x0), .y(y0), .w(w0),
    .ld1(ld1), .s1_v(s1_v), .ld2(ld2), .res(res0), .flags(flags0)
  );
  maf_lane u_l1 (
    .clk(clk), .single(1'b1), .op(in_op), .x(x1), .y(y1), .w(w1),
    .ld1(ld1 && in_single), .s1_v(s1_v),
    .ld2(s1_v ? s1_single : (acc_add && in_single)),
    .res(res1), .flags(flags1)
  );

  // Valid bits and the precision of the operation in each stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v      <= 1'b0;
      s2_v      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_v      <= ld1;
      s2_v      <= ld2;
      out_valid <= s2_v;
    end
  end
  always_ff @(posedge clk) begin
    if (ld1) s1_single <= in_single;
    if (ld2) s2_single <= s1_v ? s1_single : in_single;
    if (s2_v) begin
      out_res      <= s2_single ? {res1[31:0], res0[31:0]} : res0;
      out_flags    <= flags0;
      out_flags_hi <= s2_single ? flags1 : '0;
    end
  end

  // Stage 2 takes one operation per cycle: an addition never enters it while
  // stage 1 holds an operation.
  a_one_into_stage2: assert property (@(posedge clk) !(acc_add && s1_v))
    else $error("maf_top: addition bypass collided with stage 1");
endmodule
