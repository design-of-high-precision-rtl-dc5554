// maf_pkg: types and constants shared by the radix-8 multiply-add (MAF) unit.
//
// The unit computes R = X*Y + W on IEEE 754 binary64 operands. An addition is
// X*1 + W and a multiplication is X*Y + 0. The operation code also picks the
// path through the pipeline: an addition needs no multiplier and bypasses
// stage 1. The format constants default to binary64 (11-bit exponent, 52-bit
// fraction). Every width in the datapath is derived from them.
//
// Origin: the binary64 widths and the bias come from the document; the 161-bit
// frame, the structs, the operation codes and the flag set are this design's.
package maf_pkg;

  localparam int unsigned EXP_W  = 11;            // exponent field
  localparam int unsigned FRAC_W = 52;            // stored fraction field
  localparam int unsigned MAN_W  = FRAC_W + 1;    // significand with hidden bit (53)
  localparam int unsigned PROD_W = 2 * MAN_W;     // full product (106)
  localparam int unsigned BIAS   = (1 << (EXP_W - 1)) - 1;  // 1023
  localparam int unsigned FP_W   = 1 + EXP_W + FRAC_W;      // 64

  // Operation requested at the input.
  typedef enum logic [1:0] {
    OP_MAF = 2'd0,   // X*Y + W
    OP_MUL = 2'd1,   // X*Y + 0
    OP_ADD = 2'd2    // X*1 + W, bypasses stage 1
  } maf_op_e;

  // Exception flags returned with every result.
  typedef struct packed {
    logic invalid;    // NaN operand, 0*Inf or Inf-Inf
    logic overflow;   // rounded result too large, Inf returned
    logic underflow;  // nonzero result below the normal range, flushed to 0
    logic inexact;    // result differs from the exact value
  } maf_flags_t;

  // Class of an operand after unpacking (subnormals are read as zero).
  typedef struct packed {
    logic zero;
    logic inf;
    logic nan;
  } fp_class_t;

  localparam int unsigned SE_W   = EXP_W + 3;     // signed exponent arithmetic (14)
  localparam int unsigned ALN_W  = 3 * MAN_W + 2; // addend alignment frame (161)
  localparam int unsigned SH_OFS = MAN_W + 3;     // alignment offset, sh = 56 - df
  localparam int unsigned SH_W   = 8;             // saturated shift amount

  // Stage 1 -> stage 2: product in carry-save form, addend and exponent data.
  typedef struct packed {
    logic [PROD_W-1:0]       psum;      // product = psum + pcarry (mod 2^106)
    logic [PROD_W-1:0]       pcarry;
    logic [MAN_W-1:0]        mw;        // addend significand, 0 if W is zero
    logic signed [SE_W-1:0]  ep;        // biased product exponent EX+EY-1023
    logic signed [SE_W-1:0]  df;        // EW - ep                  (Eq. 2)
    logic [SH_W-1:0]         sh;        // 56 - df saturated to 0..162 (Eq. 3)
    logic                    sp;        // product sign
    logic                    eff_sub;   // signs differ and W is nonzero
    logic                    spec;      // result fixed by the special-case logic
    logic [FP_W-1:0]         spec_res;
    logic                    spec_inv;
  } s12_t;

  // Stage 2 -> stage 3: the result as two words, normalized before their
  // final addition. The sum ws + wc has its leading one in its top four bits
  // (top bit for the close path), is zero only for an exact cancellation, and
  // the bits of the true result below the words are summarized by sticky.
  localparam int unsigned NRM_W = ALN_W + 2;      // 163: frame, carry and sign
  typedef struct packed {
    logic                    sign;
    logic signed [SE_W-1:0]  exp;       // biased exponent if the leading one is the top bit
    logic [NRM_W-1:0]        ws;        // sum word
    logic [NRM_W-1:0]        wc;        // carry word
    logic                    sticky;    // bits lost below the words
    logic                    close;     // close data path was used
    logic                    spec;
    logic [FP_W-1:0]         spec_res;
    logic                    spec_inv;
  } s23_t;

  // The quiet NaN returned for every invalid operation.
  localparam logic [FP_W-1:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(FRAC_W-1){1'b0}}};

endpackage
