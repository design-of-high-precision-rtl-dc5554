// align_shifter_tb: compares the aligned addend and sticky bit with a
// bit-by-bit model for every shift 0..255 and random significands.
//
// How: every shift with 20 significands (1, the hidden bit alone and 18
// random ones); the model is built one bit at a time. Timing: combinational,
// 1 time unit per vector; watchdog after a fixed time. The block and its frame are the document's; the test is this
// design's.
module align_shifter_tb;
  localparam int IN_W = 53, FW = 161;
  logic [IN_W-1:0] m;
  logic [7:0] sh;
  logic [FW-1:0] a;
  logic st;
  int checks = 0, failures = 0;

  align_shifter #(.IN_W(IN_W), .FW(FW), .SH_W(8)) dut (.m(m), .sh(sh), .a(a), .sticky(st));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [FW-1:0] wa;
    logic ws;
    int pos;
    for (int i = 0; i < 20; i++) begin
      m = IN_W'({$urandom(), $urandom()});
      if (i == 0) m = 53'd1;
      if (i == 1) m = {1'b1, 52'd0};
      for (int s = 0; s < 256; s++) begin
        sh = 8'(s);
        #1;
        wa = '0;  ws = 1'b0;
        for (int b = 0; b < IN_W; b++) begin
          pos = FW - IN_W + b - s;          // frame position of bit b
          if (pos >= 0) wa[pos] = m[b];
          else if (m[b]) ws = 1'b1;
        end
        checks++;
        if (a !== wa || st !== ws) begin
          failures++;
          $display("m=%h sh=%0d", m, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
