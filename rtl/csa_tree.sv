// csa_tree: carry-save reduction tree built from 4:2 compressors.
//
// Reduces N rows of W bits to two rows (sum, carry) whose sum equals the sum
// of all rows modulo 2^W. Each level groups its rows by four into csa42
// compressors; three rows left over go through one 3:2 carry-save adder, one
// or two left over pass to the next level unchanged. 19 rows (the radix-8
// multiplier's 18 partial products and its row of +1 corrections) take four
// levels: 19 -> 10 -> 6 -> 4 -> 2. Purely combinational.
//
// Origin: a 4:2 compressor tree follows the document; the handling of leftover
// rows is this design's choice.
module csa_tree #(
  parameter int unsigned N = 19,   // rows in
  parameter int unsigned W = 106   // row width
) (
  input  logic [W-1:0] rows [N],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  // Rows present at the input of level l.
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned n = N;
    for (int unsigned i = 0; i < l; i++)
      n = 2 * (n / 4) + ((n % 4 == 3) ? 2 : n % 4);
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned L = num_levels();

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned NI = rows_at(l);
    localparam int unsigned NO = rows_at(l + 1);
    localparam int unsigned Q  = NI / 4;
    localparam int unsigned R  = NI % 4;

    logic [W-1:0] ri [NI];   // rows into this level
    logic [W-1:0] ro [NO];   // rows out of this level

    for (genvar r = 0; r < NI; r++) begin : g_in
      if (l == 0) begin : g_first
        assign ri[r] = rows[r];
      end else begin : g_next
        assign ri[r] = g_lvl[l-1].ro[r];
      end
    end

    for (genvar q = 0; q < Q; q++) begin : g_c42
      csa42 #(.W(W)) u_c42 (
        .a (ri[4*q]),  .b (ri[4*q+1]), .c (ri[4*q+2]), .d (ri[4*q+3]),
        .s (ro[2*q]),  .cy(ro[2*q+1])
      );
    end

    if (R == 3) begin : g_r3
      assign ro[2*Q]   = ri[4*Q] ^ ri[4*Q+1] ^ ri[4*Q+2];
      assign ro[2*Q+1] = ((ri[4*Q] & ri[4*Q+1]) | (ri[4*Q] & ri[4*Q+2]) |
                          (ri[4*Q+1] & ri[4*Q+2])) << 1;
    end else begin : g_pass
      for (genvar r = 0; r < R; r++) begin : g_r
        assign ro[2*Q+r] = ri[4*Q+r];
      end
    end
  end

  if (L == 0) begin : g_none
    assign sum   = rows[0];
    if (N > 1) begin : g_two
      assign carry = rows[N-1];
    end else begin : g_one
      assign carry = '0;
    end
  end else begin : g_out
    assign sum   = g_lvl[L-1].ro[0];
    assign carry = g_lvl[L-1].ro[1];
  end
endmodule
