// csa_tree_tb: for the multiplier's 19-row tree and a 7-row tree, sum + carry
// must equal the sum of all rows modulo 2^W, for random and all-ones rows.
//
// How: 1000 random vectors per tree, all-ones rows as a corner. Timing:
// combinational, one vector per time unit, watchdog after a fixed time.
module csa_tree_tb;
  localparam int W = 106;
  logic [W-1:0] r19 [19];
  logic [W-1:0] r7 [7];
  logic [W-1:0] s19, c19, s7, c7;
  int checks = 0, failures = 0;

  csa_tree #(.N(19), .W(W)) dut19 (.rows(r19), .sum(s19), .carry(c19));
  csa_tree #(.N(7),  .W(W)) dut7  (.rows(r7),  .sum(s7),  .carry(c7));

  function automatic logic [W-1:0] rnd();
    return W'({$urandom(), $urandom(), $urandom(), $urandom()});
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] t19, t7;
    for (int i = 0; i < 1000; i++) begin
      t19 = '0;  t7 = '0;
      for (int r = 0; r < 19; r++) begin r19[r] = (i == 0) ? '1 : rnd(); t19 += r19[r]; end
      for (int r = 0; r < 7; r++)  begin r7[r]  = (i == 0) ? '1 : rnd(); t7  += r7[r];  end
      #1;
      checks += 2;
      if (W'(s19 + c19) !== t19) begin failures++; $display("19-row tree wrong"); end
      if (W'(s7 + c7) !== t7)    begin failures++; $display("7-row tree wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
