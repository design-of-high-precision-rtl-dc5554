// maf_lane: the datapath of one multiply-add lane, R = X*Y + W, without its
// control. maf_top owns the valid bits and the handshake and drives the
// register enables of its lanes from them.
//
// The lane holds the three stages and their data registers:
//   stage 1  maf_stage1  unpacking, exponent handling, radix-8 Booth product
//   stage 2  maf_stage2  far or close data path, normalized before the final
//                        addition
//   stage 3  round_unit  final addition, rounding by compound adder, zero
//                        detection, packing
// plus the addition bypass: a second copy of the unpacking and exponent logic
// (maf_prep) that hands an addition X + W to stage 2 as the product X * 1.0,
// skipping the multiplier.
//
// Interface and timing: the operands x, y, w are binary64 (binary32 operands
// arrive already widened, with single high). ld1 loads the stage-1 register
// from the operands; ld2 loads the stage-2 register, from stage 1 when s1_v is
// high and otherwise from the bypass (an addition presented this cycle).
// res/flags are the combinational output of stage 3 for the operation in the
// stage-2 register; maf_top registers them. The split into these three stages
// and the bypass follow the document; the register enables are this design's.
module maf_lane
  import maf_pkg::*;
(
  input  logic            clk,
  input  logic            single,   // operands are widened binary32
  input  maf_op_e         op,
  input  logic [FP_W-1:0] x,
  input  logic [FP_W-1:0] y,
  input  logic [FP_W-1:0] w,
  input  logic            ld1,      // load stage 1 (multiply-add, multiply)
  input  logic            s1_v,     // stage 1 holds an operation
  input  logic            ld2,      // load stage 2
  output logic [FP_W-1:0] res,
  output maf_flags_t      flags
);
  s12_t s12_d, s12_q, s12_byp, s2_in;
  s23_t s23_d, s23_q;
  logic [MAN_W-1:0] bx, unused_by;
  logic s1_single, s2_single;

  // Stage 1.
  maf_stage1 u_s1 (.op(op), .x(x), .y(y), .w(w), .s12(s12_d));

  // Addition bypass: the duplicated exponent logic; the product is X * 1.0.
  maf_prep u_byp (
    .op(OP_ADD), .x(x), .y(y), .w(w),
    .mx(bx), .my(unused_by), .mw(s12_byp.mw), .sp(s12_byp.sp), .eff_sub(s12_byp.eff_sub),
    .ep(s12_byp.ep), .df(s12_byp.df), .sh(s12_byp.sh),
    .spec(s12_byp.spec), .spec_res(s12_byp.spec_res), .spec_inv(s12_byp.spec_inv)
  );
  assign s12_byp.psum   = {1'b0, bx, {FRAC_W{1'b0}}};
  assign s12_byp.pcarry = '0;

  always_ff @(posedge clk) begin
    if (ld1) begin
      s12_q     <= s12_d;
      s1_single <= single;
    end
  end

  // Stage 2.
  assign s2_in = s1_v ? s12_q : s12_byp;
  maf_stage2 u_s2 (.s12(s2_in), .s23(s23_d));

  always_ff @(posedge clk) begin
    if (ld2) begin
      s23_q     <= s23_d;
      s2_single <= s1_v ? s1_single : single;
    end
  end

  // Stage 3.
  round_unit u_s3 (.s23(s23_q), .single(s2_single), .res(res), .flags(flags));
endmodule
