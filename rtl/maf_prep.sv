// maf_prep: operand unpacking, special cases and exponent handling.
//
// Splits X, Y and W into sign, exponent and significand (hidden bit made
// explicit) and applies the operation code: an addition uses Y = 1.0, a
// multiplication uses W = -0, so that both run as X*Y + W and give exactly the
// IEEE sum or product. Subnormal operands are read as zeros of the same sign
// (this unit handles normal numbers only). NaN, infinity and zero operands are
// resolved here into a fixed result that the later stages only carry
// along; whenever spec is low, the product is a nonzero normal product and W is
// zero or normal. Exponent handling (Eq. 2 and 3) is done by exp_handler.
// Purely combinational; used by stage 1 and again, with the operation fixed to
// addition, by the addition bypass.
//
// Origin: addition as X*1 + W and multiplication as X*Y + 0 follow the document
// (here Y is set to 1.0 and W to -0); special-case handling, denormals read as
// zero and the flag conditions are this design's choices.
module maf_prep
  import maf_pkg::*;
(
  input  maf_op_e                op,
  input  logic [FP_W-1:0]        x, y, w,
  output logic [MAN_W-1:0]       mx, my, mw,
  output logic                   sp,
  output logic                   eff_sub,
  output logic signed [SE_W-1:0] ep, df,
  output logic [SH_W-1:0]        sh,
  output logic                   spec,
  output logic [FP_W-1:0]        spec_res,
  output logic                   spec_inv
);
  localparam logic [FP_W-1:0] ONE    = {1'b0, 1'b0, {(EXP_W-1){1'b1}}, {FRAC_W{1'b0}}};
  localparam logic [FP_W-1:0] NEG_ZERO = {1'b1, {(FP_W-1){1'b0}}};

  logic [FP_W-1:0]  yo, wo;
  logic [EXP_W-1:0] ex, ey, ew;
  logic             sx, sy, sw;
  fp_class_t        cx, cy, cw;
  logic             snan;

  function automatic fp_class_t classify(input logic [FP_W-1:0] v);
    fp_class_t c;
    c.zero = (v[FP_W-2 -: EXP_W] == '0);
    c.inf  = (v[FP_W-2 -: EXP_W] == '1) && (v[FRAC_W-1:0] == '0);
    c.nan  = (v[FP_W-2 -: EXP_W] == '1) && (v[FRAC_W-1:0] != '0);
    return c;
  endfunction

  assign yo = (op == OP_ADD) ? ONE : y;
  assign wo = (op == OP_MUL) ? NEG_ZERO : w;

  assign {sx, ex} = x[FP_W-1 -: EXP_W+1];
  assign {sy, ey} = yo[FP_W-1 -: EXP_W+1];
  assign {sw, ew} = wo[FP_W-1 -: EXP_W+1];
  assign cx = classify(x);
  assign cy = classify(yo);
  assign cw = classify(wo);

  assign mx = cx.zero ? '0 : {1'b1, x[FRAC_W-1:0]};
  assign my = cy.zero ? '0 : {1'b1, yo[FRAC_W-1:0]};
  assign mw = cw.zero ? '0 : {1'b1, wo[FRAC_W-1:0]};
  assign sp = sx ^ sy;
  assign eff_sub = (sp ^ sw) && !cw.zero;

  logic signed [SE_W-1:0] df_e;
  logic [SH_W-1:0]        sh_e;

  exp_handler u_exp (.ex(ex), .ey(ey), .ew(ew), .ep(ep), .df(df_e), .sh(sh_e));

  // A zero addend is placed below the product whatever its exponent field, so
  // that the far path finds the leading one of the product.
  assign df = cw.zero ? {1'b1, {(SE_W-1){1'b0}}} : df_e;
  assign sh = cw.zero ? SH_W'(ALN_W + 1) : sh_e;

  assign snan = (cx.nan && !x[FRAC_W-1]) || (cy.nan && !yo[FRAC_W-1]) ||
                (cw.nan && !wo[FRAC_W-1]);

  always_comb begin
    spec     = 1'b1;
    spec_inv = 1'b0;
    spec_res = QNAN;
    if (cx.nan || cy.nan || cw.nan) begin
      spec_inv = snan;
    end else if ((cx.inf && cy.zero) || (cx.zero && cy.inf)) begin
      spec_inv = 1'b1;                                  // 0 * Inf
    end else if ((cx.inf || cy.inf) && cw.inf && (sp != sw)) begin
      spec_inv = 1'b1;                                  // Inf - Inf
    end else if (cx.inf || cy.inf) begin
      spec_res = {sp, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    end else if (cw.inf) begin
      spec_res = wo;
    end else if (cx.zero || cy.zero) begin
      // Exact zero product: the result is W itself, or a zero whose sign
      // follows round-to-nearest (negative only if both zeros are negative).
      spec_res = cw.zero ? {sp & sw, {(FP_W-1){1'b0}}} : wo;
    end else begin
      spec     = 1'b0;
    end
  end
endmodule
