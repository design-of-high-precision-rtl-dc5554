// maf_workload_tb: accuracy run in the style of the design's evaluation.
//
// 20 rounds of 100 random multiply-add operations on "legal" binary64
// operands: exponents limited so that no overflow or underflow occurs and the
// addend's exponent stays near the product's. Operations are issued back to
// back, one per cycle. Every result must equal the single-rounded
// (round-to-nearest-even) exact value of X*Y + W from the reference model;
// the run also reports how many results differ from the twice-rounded value
// that a separate multiplier and adder would give (fl(fl(X*Y) + W)), which is
// the accuracy gain of fusing, and checks that the pipeline accepts one
// operation per cycle. The same 20 x 100 run is then repeated in
// single-precision mode, each operation carrying two binary32 multiply-adds
// (one per lane); their unfused counterpart is the product rounded to
// binary32 and then added and rounded again, both done with the reference.
//
// Timing: 10-time-unit clock, one operation issued per cycle; a watchdog ends
// the run after a fixed number of cycles. The 100 samples, 20 repetitions,
// legal operands and the fused-against-unfused comparison follow the
// document's evaluation; the operand ranges are this design's choices.
module maf_workload_tb;
  import maf_pkg::*;
  import maf_ref_pkg::*;

  localparam int ROUNDS = 20, SAMPLES = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid;
  maf_op_e in_op = OP_MAF;
  logic [63:0] in_x = '0, in_y = '0, in_w = '0, out_res;
  maf_flags_t out_flags, out_flags_hi;
  logic in_single = 1'b0;
  int checks = 0, failures = 0, unfused_diff = 0, unfused_diff32 = 0, got = 0;
  logic [63:0] expq[$];

  maf_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
               .in_single(in_single), .in_op(in_op), .in_x(in_x), .in_y(in_y), .in_w(in_w),
               .out_valid(out_valid), .out_res(out_res), .out_flags(out_flags),
               .out_flags_hi(out_flags_hi));

  always #5 clk = ~clk;

  initial begin
    repeat (2 * ROUNDS * SAMPLES + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random normal binary32 number with biased exponent in [lo, hi].
  function automatic logic [31:0] rand32(input int lo, input int hi);
    if (lo < 1) lo = 1;
    if (hi > 254) hi = 254;
    return {1'($urandom()), 8'($urandom_range(lo, hi)), 23'($urandom())};
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    got++;
    if (out_res !== expq.pop_front()) failures++;
  end

  initial begin
    logic [63:0] x, y, w, r, u;
    logic [3:0] f;
    int ep, cycles;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < ROUNDS; k++) begin
      @(negedge clk);
      cycles = 0;
      for (int i = 0; i < SAMPLES; i++) begin
        x  = rand_fp(923, 1123);
        y  = rand_fp(923, 1123);
        ep = int'(x[62:52]) + int'(y[62:52]) - 1023;
        w  = rand_fp(ep - 60, ep + 60);
        if (i % 4 == 0) w = near_neg(x, y);
        ref_fma(2'(OP_MAF), x, y, w, r, f);
        u = $realtobits($bitstoreal($realtobits($bitstoreal(x) * $bitstoreal(y))) + $bitstoreal(w));
        if (u !== r) unfused_diff++;
        expq.push_back(r);
        in_valid = 1'b1;  in_x = x;  in_y = y;  in_w = w;
        @(posedge clk);
        cycles++;
        checks++;
        if (!in_ready) failures++;      // a multiply-add never waits
        @(negedge clk);
      end
      in_valid = 1'b0;
      checks++;
      if (cycles != SAMPLES) failures++;
    end
    repeat (6) @(posedge clk);
    checks++;
    // Binary32: two operations per issue, lanes in bits 31:0 and 63:32.
    in_single = 1'b1;
    for (int k = 0; k < ROUNDS; k++) begin
      @(negedge clk);
      for (int i = 0; i < SAMPLES; i++) begin
        logic [63:0] rr;
        rr = '0;
        for (int l = 0; l < 2; l++) begin
          logic [31:0] a, b, c;
          a  = rand32(100, 154);
          b  = rand32(100, 154);
          ep = int'(a[30:23]) + int'(b[30:23]) - 127;
          c  = rand32(ep - 30, ep + 30);
          if ((i + l) % 4 == 0) begin
            // Near-cancelling addend: minus the rounded product, last bits changed.
            ref_fma(2'(OP_MUL), {32'd0, a}, {32'd0, b}, '0, r, f, 1'b1);
            c = {~r[31], r[30:0] ^ 31'($urandom_range(0, 7))};
          end
          ref_fma(2'(OP_MAF), {32'd0, a}, {32'd0, b}, {32'd0, c}, r, f, 1'b1);
          ref_fma(2'(OP_MUL), {32'd0, a}, {32'd0, b}, '0, u, f, 1'b1);
          ref_fma(2'(OP_ADD), u, '0, {32'd0, c}, u, f, 1'b1);
          if (u[31:0] !== r[31:0]) unfused_diff32++;
          rr[32*l +: 32] = r[31:0];
          x[32*l +: 32] = a;  y[32*l +: 32] = b;  w[32*l +: 32] = c;
        end
        expq.push_back(rr);
        in_valid = 1'b1;  in_x = x;  in_y = y;  in_w = w;
        @(posedge clk);
        checks++;
        if (!in_ready) failures++;
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
    repeat (6) @(posedge clk);
    checks++;
    if (got != 2 * ROUNDS * SAMPLES) failures++;
    $display("%0d binary64 operations, %0d results differ from separate multiply and add", ROUNDS * SAMPLES, unfused_diff);
    $display("%0d binary32 operations, %0d results differ from separate multiply and add", 2 * ROUNDS * SAMPLES, unfused_diff32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
