// maf_stage2: second stage of the multiply-add unit, the dual data path.
//
// Chooses between the two data paths from the signs and the exponent
// difference alone, before any addition: the close path for an effective
// subtraction with df in -1..2, the far path for everything else. Both paths
// are built and the choice selects their result; only one is in use for any
// operation. The stage also forms pcout, the carry out of psum + pcarry that
// both paths must cancel, and the result sign and biased exponent. The far
// path hands over two carry-save words, normalized but not yet added; the
// close path an added and normalized significand (as a sum word with a zero
// carry word). Stage 3 adds the words and rounds. Special-case results pass through
// unchanged. Purely combinational; the pipeline registers around it are in
// maf_lane.
//
// Origin: the far/close split chosen before any addition follows the document;
// the close window -1..2 (the document gives -1..1) is this design's choice.
module maf_stage2
  import maf_pkg::*;
(
  input  s12_t s12,
  output s23_t s23
);
  logic                   pcout, close_sel;
  logic [NRM_W-1:0]       f_ws, f_wc;
  logic [MAN_W-1:0]       c_man;
  logic                   c_rnd, f_st, c_st, f_neg, c_neg;
  logic signed [SE_W-1:0] f_adj, c_adj;
  logic [PROD_W:0]        psum_full;

  assign psum_full = {1'b0, s12.psum} + {1'b0, s12.pcarry};
  assign pcout     = psum_full[PROD_W];
  assign close_sel = s12.eff_sub && (s12.df >= -1) && (s12.df <= 2);

  far_path u_far (
    .psum(s12.psum), .pcarry(s12.pcarry), .pcout(pcout), .mw(s12.mw), .sh(s12.sh),
    .df(s12.df), .eff_sub(s12.eff_sub),
    .ws(f_ws), .wc(f_wc), .sticky(f_st), .exp_adj(f_adj), .neg(f_neg)
  );

  close_path u_close (
    .psum(s12.psum), .pcarry(s12.pcarry), .pcout(pcout), .mw(s12.mw), .df_lo(s12.df[1:0]),
    .man(c_man), .rnd(c_rnd), .sticky(c_st), .exp_adj(c_adj), .neg(c_neg)
  );

  always_comb begin
    s23.close    = close_sel;
    // The close path delivers an added, fully normalized result; it enters
    // stage 3 as a sum word with a zero carry word.
    s23.ws       = close_sel ? {c_man, c_rnd, (NRM_W-MAN_W-1)'(0)} : f_ws;
    s23.wc       = close_sel ? '0 : f_wc;
    s23.sticky   = close_sel ? c_st  : f_st;
    s23.exp      = s12.ep + (close_sel ? c_adj : f_adj);
    s23.sign     = s12.sp ^ (close_sel ? c_neg : f_neg);
    s23.spec     = s12.spec;
    s23.spec_res = s12.spec_res;
    s23.spec_inv = s12.spec_inv;
  end
endmodule
