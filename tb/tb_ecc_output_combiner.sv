// Testbench for ecc_output_combiner: random full-range output bins of the
// four FFTs, including the extremes; the three check sums are recomputed
// here in integer arithmetic.
module tb_ecc_output_combiner;
  localparam int unsigned W = 14;
  logic signed [W-1:0] z_re [4], z_im [4];
  logic signed [W+1:0] c_re [3], c_im [3];
  int checks = 0, failures = 0;

  ecc_output_combiner #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int r [4], m [4], e5r, e6r, e7r, e5i, e6i, e7i;
      for (int k = 0; k < 4; k++) begin
        r[k] = (i < 2) ? ((i == 0) ? -8192 : 8191) : int'($urandom_range(16383)) - 8192;
        m[k] = (i < 2) ? ((i == 0) ? 8191 : -8192) : int'($urandom_range(16383)) - 8192;
        z_re[k] = W'(r[k]); z_im[k] = W'(m[k]);
      end
      #1;
      e5r = r[0] + r[1] + r[2]; e6r = r[0] + r[1] + r[3]; e7r = r[0] + r[2] + r[3];
      e5i = m[0] + m[1] + m[2]; e6i = m[0] + m[1] + m[3]; e7i = m[0] + m[2] + m[3];
      checks++;
      if (int'(c_re[0]) != e5r || int'(c_re[1]) != e6r || int'(c_re[2]) != e7r ||
          int'(c_im[0]) != e5i || int'(c_im[1]) != e6i || int'(c_im[2]) != e7i) begin
        failures++;
        $display("FAIL z5/z6/z7: %0d %0d %0d vs %0d %0d %0d", c_re[0], c_re[1], c_re[2], e5r, e6r, e7r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
