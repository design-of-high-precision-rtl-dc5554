// lzc: leading-zero counter.
//
// Returns the number of zeros above the most significant one of v, and W for
// v == 0. Used to find the normalization shift of the close data path after
// massive cancellation. Written as a priority scan; synthesis builds the usual
// logarithmic tree from it. Purely combinational.
//
// Origin: the document's close path needs a normalization shift amount; it is
// counted exactly here, a choice of this design, instead of anticipated.
module lzc #(
  parameter int unsigned W  = 108,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  v,
  output logic [CW-1:0] cnt
);
  always_comb begin
    cnt = CW'(W);
    for (int i = 0; i < W; i++)
      if (v[i]) cnt = CW'(W - 1 - i);
  end
endmodule
