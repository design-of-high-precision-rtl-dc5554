// booth8_multiplier: unsigned N x N radix-8 Booth multiplier, carry-save output.
//
// The multiplier y is extended with a zero below bit 0 and zeros above bit
// N-1 and cut into G = ceil((N+1)/3) overlapping 4-bit groups, one every three
// bits (18 groups for N = 53, against 27 for radix 4). Each group is recoded
// by booth8_encoder into a digit in -4..+4, and booth8_ppgen turns the digit
// into a row of digit * x. The hard multiple 3x = 2x + x is formed once by one
// adder and shared by all rows. The rows, sign-extended to 2N bits and shifted
// by 3 bits per digit, and one extra row that gathers the +1 of every negative
// digit, are reduced by a tree of 4:2 compressors to two 2N-bit words:
// sum + carry == x * y (mod 2^(2N), and the product is below 2^(2N)).
// The final addition is left to the next stage, as in the multiply-add unit
// that uses this block. Purely combinational.
//
// Origin: radix-8 recoding, the precomputed 3x and the 4:2 carry-save tree follow
// the document; the row of +1s, the full sign extension and the 3:2 row for
// leftover rows are this design's choices.
module booth8_multiplier #(
  parameter int unsigned N = 53
) (
  input  logic [N-1:0]   x,       // multiplicand
  input  logic [N-1:0]   y,       // multiplier (recoded)
  output logic [2*N-1:0] sum,
  output logic [2*N-1:0] carry
);
  localparam int unsigned G  = (N + 3) / 3;   // Booth digits
  localparam int unsigned PW = 2 * N;
  localparam int unsigned YW = 3 * G + 1;     // extended multiplier width

  logic [N+1:0] x3;
  logic [YW-1:0] yext;
  logic [PW-1:0] rows [G+1];
  logic [PW-1:0] negrow;

  assign x3   = {2'b00, x} + {1'b0, x, 1'b0};
  assign yext = {{(YW-N-1){1'b0}}, y, 1'b0};

  for (genvar i = 0; i < G; i++) begin : g_digit
    logic neg, one, two, three, four;
    logic [N+2:0] row;
    logic         nb;

    booth8_encoder u_enc (
      .grp(yext[3*i +: 4]), .neg(neg), .one(one), .two(two), .three(three), .four(four)
    );
    booth8_ppgen #(.N(N)) u_pp (
      .x(x), .x3(x3), .neg(neg), .one(one), .two(two), .three(three), .four(four),
      .row(row), .neg_out(nb)
    );

    // Sign-extend the row to the product width and move it to digit weight 8^i.
    logic [PW-1:0] wide;
    assign wide    = PW'({{(PW-N-3){row[N+2]}}, row});
    assign rows[i] = wide << (3 * i);
    assign negrow[3*i] = nb;
    if (i < G - 1) begin : g_gap
      assign negrow[3*i+2 -: 2] = 2'b00;
    end
  end
  if (3 * G - 2 < PW) begin : g_top
    assign negrow[PW-1:3*G-2] = '0;
  end
  assign rows[G] = negrow;

  csa_tree #(.N(G + 1), .W(PW)) u_tree (.rows(rows), .sum(sum), .carry(carry));
endmodule
