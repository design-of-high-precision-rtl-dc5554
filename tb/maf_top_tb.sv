// maf_top_tb: end-to-end test of the multiply-add unit at its default size.
//
// Streams random multiply-add, multiplication and addition operations into
// maf_top with random gaps, and checks every result and flag set against the
// reference model, in order, together with the latency (3 cycles for
// multiply-add and multiplication, 2 for an addition through the bypass). The
// reference is itself cross-checked against the simulator's own binary64
// multiplication and addition where those are exact-rounded and in range.
// Operand classes are chosen so that every mechanism occurs: far and close
// data path, addition bypass and the stall it can cause, exact cancellation
// to zero, rounding up with and without carry out, overflow, underflow flush,
// NaN / infinity / zero operands, and the single-precision mode with its two
// binary32 lanes (both lanes checked, switching mode from one operation to the
// next), and a reset with operations in flight. The count of each is printed,
// and a mechanism that never occurred counts as a failure.
//
// Timing: 10-time-unit clock; latency is checked cycle by cycle against the
// clock counter; a watchdog ends the run after a fixed number of cycles. The
// stage count and the bypass come from the document; the cycle latencies, the
// handshake and the flag conventions tested are this design's choices.
module maf_top_tb;
  import maf_pkg::*;
  import maf_ref_pkg::*;

  localparam int NOPS = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, in_single;
  maf_op_e in_op;
  logic [63:0] in_x, in_y, in_w, out_res;
  maf_flags_t out_flags, out_flags_hi;

  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct {
    logic [63:0] res;
    logic [3:0]  flags;
    logic [3:0]  flags_hi;
    longint      due;
    logic [63:0] x, y, w;
    maf_op_e     op;
    bit          single;
  } exp_t;
  exp_t q[$];

  int n_far = 0, n_close = 0, n_bypass = 0, n_stall = 0, n_zero = 0, n_up = 0,
      n_upcarry = 0, n_ovf = 0, n_unf = 0, n_inv = 0, n_spec = 0, n_real = 0, n_single = 0,
      n_switch = 0, n_reset = 0;

  maf_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_single(in_single), .in_op(in_op),
    .in_x(in_x), .in_y(in_y), .in_w(in_w),
    .out_valid(out_valid), .out_res(out_res), .out_flags(out_flags),
    .out_flags_hi(out_flags_hi)
  );

  always #5 clk = ~clk;

  always @(posedge clk) cyc <= cyc + 1;

  // Watchdog.
  initial begin
    repeat (NOPS * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] special_val();
    case ($urandom_range(0, 8))
      0: return 64'h0000_0000_0000_0000;
      1: return 64'h8000_0000_0000_0000;
      2: return 64'h7FF0_0000_0000_0000;
      3: return 64'hFFF0_0000_0000_0000;
      4: return 64'h7FF8_0000_0000_0001;
      5: return 64'h7FF0_0000_0000_0001;       // signaling NaN
      6: return {1'($urandom()), 11'd0, 52'($urandom())};   // subnormal
      7: return 64'h3FF0_0000_0000_0000;
      default: return rand_fp(1, 2046);
    endcase
  endfunction

  // One operation: binary64 operands, or in single-precision mode binary32
  // operands in bits 31:0 (garbage above). fop >= 0 forces the operation and
  // the mode (used for the second binary32 lane).
  task automatic make_op(input int fop, input bit fsingle, output maf_op_e op,
                         output logic [63:0] x, y, w, output bit single);
    int r = $urandom_range(0, 99);
    int cat = $urandom_range(0, 9);
    int ep;
    op = (r < 55) ? OP_MAF : (r < 70) ? OP_MUL : OP_ADD;
    if (fop >= 0) op = maf_op_e'(fop);
    x = rand_fp(800, 1250);
    y = rand_fp(800, 1250);
    ep = int'(x[62:52]) + ((op == OP_ADD) ? 1023 : int'(y[62:52])) - 1023;
    if (ep < 1) ep = 1;
    if (ep > 2046) ep = 2046;
    w = rand_fp((ep > 60) ? ep - 60 : 1, (ep < 1986) ? ep + 60 : 2046);
    case (cat)
      0, 1, 2: w = near_neg(x, (op == OP_ADD) ? 64'h3FF0_0000_0000_0000 : y);
      3: begin x = rand_fp(1, 2046); y = rand_fp(1, 2046); w = rand_fp(1, 2046); end
      4: begin x = special_val(); y = special_val(); w = special_val(); end
      5: w = rand_fp((ep > 200) ? ep - 200 : 1, (ep < 1846) ? ep + 200 : 2046);
      6: begin x = rand_fp(1500, 2046); y = rand_fp(1500, 2046); end
      7: begin x = rand_fp(1, 500); y = rand_fp(1, 500); w = rand_fp(1, 40); end
      default: ;
    endcase
    // A quarter of the operations in single-precision mode; exponents are
    // pulled towards the binary32 range.
    single = (fop >= 0) ? fsingle : ($urandom_range(0, 3) == 0);
    if (single) begin
      if (cat != 4 && cat != 3) begin
        x[62:52] = 11'(int'(x[62:52]) % 200 + 923);
        y[62:52] = 11'(int'(y[62:52]) % 200 + 923);
        ep = int'(x[62:52]) + ((op == OP_ADD) ? 1023 : int'(y[62:52])) - 1023;
        if (cat <= 2) w = near_neg(x, (op == OP_ADD) ? 64'h3FF0_0000_0000_0000 : y);
        else w[62:52] = 11'(ep + $urandom_range(0, 60) - 30);
      end
      x = to32(x);  y = to32(y);  w = to32(w);
    end
  endtask

  // Binary32 operands: the binary64 operands rounded by the simulator to
  // binary32 (extremes forced into range), garbage in the unused upper half.
  function automatic logic [63:0] to32(input logic [63:0] d);
    logic [31:0] f;
    int e = int'(d[62:52]) - 896;
    if (d[62:52] == 11'h7FF) f = {d[63], 8'hFF, d[51:29]};
    else if (d[62:52] == 0) f = {d[63], 8'd0, d[51:29]};
    else if (e < 1 || e > 254) f = {d[63], 8'($urandom_range(1, 254)), d[51:29]};
    else f = {d[63], 8'(e), d[51:29]};
    return {$urandom(), f};
  endfunction

  // Independent check of the reference: exact-rounded binary64 product or sum
  // from the simulator, used when operands and result are all normal numbers.
  function automatic bit normal(input logic [63:0] v);
    return v[62:52] != 0 && v[62:52] != 11'h7FF;
  endfunction

  task automatic check_ref_real(input maf_op_e op, input logic [63:0] x, y, w, r);
    real rv;
    logic [63:0] rb;
    if (op == OP_MAF || in_single || !normal(x) || !normal(r)) return;
    if (op == OP_MUL && !normal(y)) return;
    if (op == OP_ADD && !normal(w)) return;
    rv = (op == OP_MUL) ? $bitstoreal(x) * $bitstoreal(y) : $bitstoreal(x) + $bitstoreal(w);
    rb = $realtobits(rv);
    if (!normal(rb)) return;
    n_real++;
    checks++;
    if (rb !== r) begin
      failures++;
      $display("REF MISMATCH op=%0d x=%h y=%h w=%h ref=%h real=%h", op, x, y, w, r, rb);
    end
  endtask

  // Driver.
  initial begin
    maf_op_e op;
    logic [63:0] x, y, w, r, x1, y1, w1, r1;
    logic [3:0] f, f1;
    bit sg, sg1, prev_sg = 1'b0;
    int sent = 0;
    in_single = 1'b0;
    in_valid = 1'b0;  in_op = OP_MAF;  in_x = '0;  in_y = '0;  in_w = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (sent < NOPS) begin
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
        continue;
      end
      make_op(-1, 1'b0, op, x, y, w, sg);
      if (sg) begin
        // Second binary32 operation, same kind, in the upper halves.
        make_op(int'(op), 1'b1, op, x1, y1, w1, sg1);
        x = {x1[31:0], x[31:0]};  y = {y1[31:0], y[31:0]};  w = {w1[31:0], w[31:0]};
      end
      if (sent > 0 && sg != prev_sg) n_switch++;
      prev_sg = sg;
      in_valid = 1'b1;  in_op = op;  in_x = x;  in_y = y;  in_w = w;  in_single = sg;
      // Hold the operation until it is accepted.
      forever begin
        @(posedge clk);
        if (in_ready) break;
        n_stall++;
      end
      ref_fma(2'(op), x, y, w, r, f, sg);
      f1 = '0;
      if (sg) begin
        ref_fma(2'(op), x >> 32, y >> 32, w >> 32, r1, f1, 1'b1);
        r = {r1[31:0], r[31:0]};
      end
      check_ref_real(op, x, y, w, r);
      if (sg) n_single++;
      q.push_back('{res: r, flags: f, flags_hi: f1, due: cyc + ((op == OP_ADD) ? 2 : 3),
                    x: x, y: y, w: w, op: op, single: sg});
      sent++;
      @(negedge clk);
      in_valid = 1'b0;
    end
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
    end
    // Reset with operations in flight: the valid bits clear, nothing comes
    // out afterwards (the checker counts any result as unexpected).
    @(negedge clk);
    in_valid = 1'b1;  in_op = OP_MAF;  in_single = 1'b0;
    in_x = 64'h3FF0_0000_0000_0000;  in_y = in_x;  in_w = in_x;
    @(negedge clk);
    in_op = OP_ADD;
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    #1;
    checks++;
    if (dut.s1_v || dut.s2_v || out_valid) begin
      failures++;
      $display("reset did not clear the pipeline");
    end else n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    $display("mechanisms: far=%0d close=%0d bypass=%0d stall=%0d zero=%0d round_up=%0d round_carry=%0d overflow=%0d underflow=%0d invalid=%0d special=%0d ref_vs_real=%0d single=%0d mode_switch=%0d reset=%0d",
             n_far, n_close, n_bypass, n_stall, n_zero, n_up, n_upcarry, n_ovf, n_unf, n_inv, n_spec, n_real, n_single, n_switch, n_reset);
    if (n_far == 0 || n_close == 0 || n_bypass == 0 || n_stall == 0 || n_zero == 0 ||
        n_up == 0 || n_upcarry == 0 || n_ovf == 0 || n_unf == 0 || n_inv == 0 || n_spec == 0 || n_single == 0 ||
        n_switch == 0 || n_reset == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled inside the pipeline.
  always @(posedge clk) if (rst_n) begin
    if (dut.acc_add) n_bypass++;
    if (dut.s2_v && !dut.u_l0.s23_q.spec) begin
      if (dut.u_l0.s23_q.close) n_close++; else n_far++;
      if (!dut.u_l0.u_s3.man[52]) n_zero++;
      if (dut.u_l0.u_s3.up) n_up++;
      if (dut.u_l0.u_s3.up && dut.u_l0.u_s3.mr[53]) n_upcarry++;
    end
    if (dut.s2_v && dut.u_l0.s23_q.spec) n_spec++;
  end

  // Checker.
  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("unexpected result %h", out_res);
    end else begin
      e = q.pop_front();
      if (out_flags.overflow) n_ovf++;
      if (out_flags.underflow) n_unf++;
      if (out_flags.invalid) n_inv++;
      if (out_res !== e.res || out_flags !== e.flags || out_flags_hi !== e.flags_hi || cyc != e.due) begin
        failures++;
        if (failures < 20)
          $display("MISMATCH op=%0d sp=%b x=%h y=%h w=%h got %h/%b/%b exp %h/%b/%b cyc %0d due %0d",
                   e.op, e.single, e.x, e.y, e.w, out_res, out_flags, out_flags_hi, e.res, e.flags, e.flags_hi, cyc, e.due);
      end
    end
  end
endmodule
