// round_unit: third stage of the multiply-add unit: final addition,
// rounding, zero detection, exceptions and packing.
//
// The result arrives as two 163-bit words already normalized before their
// addition: their sum has its leading one in its top four bits. This stage
// adds them (the final addition), moves the leading one to the top with a
// shift of 0..3 set by the top four bits of the sum, and takes the 53-bit
// significand, the round bit and the sticky bit (the bits below, ORed with
// the sticky bit from stage 2). A compound adder then forms man and man + inc
// side by side and the round-to-nearest-even decision (round bit AND (sticky
// OR lsb)) only selects one. In binary64 mode the rounding point is the LSB of
// the 53-bit significand (inc = 1). In single-precision mode the same
// significand is rounded at its 24th bit (inc = 2^29); the 29 bits below it
// join the round and sticky bits, and the exponent is rebiased from 1023 to
// 127. A carry out of the compound adder (all ones rounding up) gives 1.0 and
// raises the exponent by one. Zero detection finds an exact cancellation (sum
// zero), which gives +0. A normalized exponent below 1 flushes the result to a
// signed zero (underflow); a rounded exponent at the format's all-ones value
// or above gives infinity (overflow). Results fixed earlier for NaN, infinity
// and zero operands are passed through (narrowed to binary32 in
// single-precision mode). A binary32 result occupies bits 31:0, with bits
// 63:32 zero. Purely combinational.
//
// Origin: the final addition and the rounding in the last stage, on a result
// normalized before that addition, with a compound adder for the rounding
// increment, and zero detection in the last stage follow the document. The
// document combines the addition and the rounding in one dual adder; here the
// adder, the short shift and the rounding increment follow each other. The
// flush to zero, the overflow handling, the flags and the binary32 rounding
// point are this design's choices.
module round_unit
  import maf_pkg::*;
(
  input  s23_t            s23,
  input  logic            single,    // round and pack as binary32
  output logic [FP_W-1:0] res,
  output maf_flags_t      flags
);
  localparam int unsigned SP_SHIFT = MAN_W - 24;           // 29 dropped bits
  localparam int unsigned SP_REBIAS = BIAS - 127;          // 896

  logic [MAN_W:0]         m0, m1, mr;
  logic                   up, zero, lsb, r, st;
  logic signed [SE_W-1:0] e, er, emax;
  logic [31:0]            spec32;
  logic [NRM_W-1:0]       t, norm;
  logic [1:0]             fine;
  logic [MAN_W-1:0]       man;
  logic                   rnd, sticky;
  logic signed [SE_W-1:0] ex;

  fp64_narrow u_narrow (.a(s23.spec_res), .y(spec32));

  // Final addition and the last 0..3-bit normalization shift.
  always_comb begin
    t = s23.ws + s23.wc;
    casez (t[NRM_W-1 -: 4])
      4'b1???: fine = 2'd0;
      4'b01??: fine = 2'd1;
      4'b001?: fine = 2'd2;
      default: fine = 2'd3;
    endcase
    norm   = t << fine;
    man    = norm[NRM_W-1 -: MAN_W];
    rnd    = norm[NRM_W-1-MAN_W];
    sticky = (|norm[NRM_W-2-MAN_W:0]) || s23.sticky;
    ex     = s23.exp - $signed(SE_W'(fine));
  end

  always_comb begin
    if (single) begin
      lsb  = man[SP_SHIFT];
      r    = man[SP_SHIFT-1];
      st   = (|man[SP_SHIFT-2:0]) || rnd || sticky;
      e    = ex - $signed(SE_W'(SP_REBIAS));
      emax = $signed(SE_W'(255));
      m1   = {1'b0, man} + (MAN_W+1)'(1 << SP_SHIFT);
    end else begin
      lsb  = man[0];
      r    = rnd;
      st   = sticky;
      e    = ex;
      emax = $signed(SE_W'((1 << EXP_W) - 1));
      m1   = {1'b0, man} + 1'b1;
    end
    m0   = {1'b0, man};
    up   = r && (st || lsb);
    mr   = up ? m1 : m0;
    er   = e + $signed(SE_W'(mr[MAN_W]));
    zero = !man[MAN_W-1];

    flags = '0;
    if (s23.spec) begin
      res           = single ? FP_W'(spec32) : s23.spec_res;
      flags.invalid = s23.spec_inv;
    end else if (zero) begin
      res = '0;
    end else if (e < 1) begin
      res             = single ? FP_W'({s23.sign, 31'd0}) : {s23.sign, {(FP_W-1){1'b0}}};
      flags.underflow = 1'b1;
      flags.inexact   = 1'b1;
    end else if (er >= emax) begin
      res            = single ? FP_W'({s23.sign, 8'hFF, 23'd0})
                              : {s23.sign, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
    end else begin
      // After a carry out mr is 10...0 and its fraction field is zero.
      res           = single ? FP_W'({s23.sign, er[7:0], mr[FRAC_W-1:SP_SHIFT]})
                             : {s23.sign, er[EXP_W-1:0], mr[FRAC_W-1:0]};
      flags.inexact = r || st;
    end
  end
endmodule
