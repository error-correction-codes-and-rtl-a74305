// ecc_output_combiner -- the same linear combinations on the FFT outputs.
//
// For one output bin of the four original FFTs it forms
//   z5 = z1 + z2 + z3,  z6 = z1 + z2 + z4,  z7 = z1 + z3 + z4
// in W + 2 bits. Because the DFT is linear, z5..z7 are the transforms of
// x5..x7, so each Parseval check can compare the energy of x5 with that of
// z5 (and so on) without an FFT of its own. Combinational; triplicated
// and voted in the top.
module ecc_output_combiner #(
  parameter int unsigned W = 14
) (
  input  logic signed [W-1:0]   z_re [4],
  input  logic signed [W-1:0]   z_im [4],
  output logic signed [W+1:0]   c_re [3],
  output logic signed [W+1:0]   c_im [3]
);
  import psecc_pkg::*;
  always_comb begin
    for (int k = 0; k < NUM_CHECK; k++) begin
      c_re[k] = '0;
      c_im[k] = '0;
      for (int i = 0; i < NUM_FFT; i++) begin
        if (CHECK_COVER[k][i]) begin
          c_re[k] = c_re[k] + (W+2)'(z_re[i]);
          c_im[k] = c_im[k] + (W+2)'(z_im[i]);
        end
      end
    end
  end
endmodule
