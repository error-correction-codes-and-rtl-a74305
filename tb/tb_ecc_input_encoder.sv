// Testbench for ecc_input_encoder: random full-range samples on the four
// channels, including the extremes; the three check sums and the parity
// sum are recomputed here in integer arithmetic.
module tb_ecc_input_encoder;
  localparam int unsigned W = 12;
  logic signed [W-1:0] x_re [4], x_im [4];
  logic signed [W+1:0] c_re [3], c_im [3], p_re, p_im;
  int checks = 0, failures = 0;

  ecc_input_encoder #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int r [4], m [4], e5r, e6r, e7r, epr, e5i, e6i, e7i, epi;
      for (int k = 0; k < 4; k++) begin
        r[k] = (i < 2) ? ((i == 0) ? -2048 : 2047) : int'($urandom_range(4095)) - 2048;
        m[k] = (i < 2) ? ((i == 0) ? 2047 : -2048) : int'($urandom_range(4095)) - 2048;
        x_re[k] = W'(r[k]); x_im[k] = W'(m[k]);
      end
      #1;
      e5r = r[0] + r[1] + r[2]; e6r = r[0] + r[1] + r[3]; e7r = r[0] + r[2] + r[3];
      e5i = m[0] + m[1] + m[2]; e6i = m[0] + m[1] + m[3]; e7i = m[0] + m[2] + m[3];
      epr = r[0] + r[1] + r[2] + r[3]; epi = m[0] + m[1] + m[2] + m[3];
      checks++;
      if (int'(c_re[0]) != e5r || int'(c_re[1]) != e6r || int'(c_re[2]) != e7r ||
          int'(c_im[0]) != e5i || int'(c_im[1]) != e6i || int'(c_im[2]) != e7i ||
          int'(p_re) != epr || int'(p_im) != epi) begin
        failures++;
        $display("FAIL x5/x6/x7/xp: %0d %0d %0d %0d vs %0d %0d %0d %0d", c_re[0], c_re[1], c_re[2], p_re, e5r, e6r, e7r, epr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
