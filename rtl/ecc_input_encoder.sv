// ecc_input_encoder -- linear combinations of the four FFT input samples.
//
// For one complex sample of each channel x1..x4 it forms
//   x5 = x1 + x2 + x3,  x6 = x1 + x2 + x4,  x7 = x1 + x3 + x4   (check inputs)
//   xp = x1 + x2 + x3 + x4                                     (parity FFT input)
// in W + 2 bits, so nothing overflows. Combinational; the top uses three
// copies and a majority vote, as the source design protects these adders
// with triple modular redundancy.
module ecc_input_encoder #(
  parameter int unsigned W = 12
) (
  input  logic signed [W-1:0]   x_re [4],
  input  logic signed [W-1:0]   x_im [4],
  output logic signed [W+1:0]   c_re [3],   // x5, x6, x7
  output logic signed [W+1:0]   c_im [3],
  output logic signed [W+1:0]   p_re,       // xp
  output logic signed [W+1:0]   p_im
);
  import psecc_pkg::*;
  always_comb begin
    for (int k = 0; k < NUM_CHECK; k++) begin
      c_re[k] = '0;
      c_im[k] = '0;
      for (int i = 0; i < NUM_FFT; i++) begin
        if (CHECK_COVER[k][i]) begin
          c_re[k] = c_re[k] + (W+2)'(x_re[i]);
          c_im[k] = c_im[k] + (W+2)'(x_im[i]);
        end
      end
    end
    p_re = (W+2)'(x_re[0]) + (W+2)'(x_re[1]) + (W+2)'(x_re[2]) + (W+2)'(x_re[3]);
    p_im = (W+2)'(x_im[0]) + (W+2)'(x_im[1]) + (W+2)'(x_im[2]) + (W+2)'(x_im[3]);
  end
endmodule
