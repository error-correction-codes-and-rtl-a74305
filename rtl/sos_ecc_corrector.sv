// sos_ecc_corrector -- syndrome decoder and output correction for one bin.
//
// The syndrome {c1,c2,c3} from the three Parseval checks is decoded into
// the FFT in error (see psecc_pkg). That FFT's bin is rebuilt from the
// parity FFT, whose input is the sum of all four inputs:
//     y_i = xp - sum_{j != i} z_j,
// the other three bins pass unchanged. With no error, or a syndrome that
// no single faulty FFT can produce, all four bins pass unchanged.
// The rebuilt value is saturated to the W-bit output range.
// Combinational; the correction unit triplicates it and votes.
module sos_ecc_corrector #(
  parameter int unsigned W = 14
) (
  input  logic [2:0]            syndrome,  // {c1, c2, c3}
  input  logic signed [W-1:0]   z_re [4],
  input  logic signed [W-1:0]   z_im [4],
  input  logic signed [W+1:0]   xp_re,
  input  logic signed [W+1:0]   xp_im,
  output logic signed [W-1:0]   y_re [4],
  output logic signed [W-1:0]   y_im [4],
  output psecc_pkg::loc_t       loc
);
  import psecc_pkg::*;

  localparam logic signed [W+3:0] MAXV = (W+4)'((1 << (W - 1)) - 1);
  localparam logic signed [W+3:0] MINV = -(W+4)'(1 << (W - 1));

  function automatic logic signed [W-1:0] sat(input logic signed [W+3:0] v);
    if (v > MAXV) return MAXV[W-1:0];
    if (v < MINV) return MINV[W-1:0];
    return v[W-1:0];
  endfunction

  always_comb begin
    logic signed [W+3:0] acc_re, acc_im;
    loc    = decode_syndrome(syndrome);
    acc_re = '0;
    acc_im = '0;
    for (int i = 0; i < NUM_FFT; i++) begin
      y_re[i] = z_re[i];
      y_im[i] = z_im[i];
      if (int'(loc) == i + 1) begin
        acc_re = (W+4)'(xp_re);
        acc_im = (W+4)'(xp_im);
        for (int j = 0; j < NUM_FFT; j++) begin
          if (j != i) begin
            acc_re = acc_re - (W+4)'(z_re[j]);
            acc_im = acc_im - (W+4)'(z_im[j]);
          end
        end
        y_re[i] = sat(acc_re);
        y_im[i] = sat(acc_im);
      end
    end
  end
endmodule
