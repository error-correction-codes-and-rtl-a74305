// sos_check -- Parseval (sum-of-squares) check for one streaming FFT.
//
// Parseval's theorem ties the energy of a block of samples to the energy
// of its spectrum. With the FFT core's fixed scaling Y = DFT(x) / (N/2),
//     N * sum |Y|^2 = 4 * sum |x|^2.
// The check squares and accumulates the input samples while a block is
// loaded (e_in) and the output bins while it is read out (e_out). On
// `eval` (the cycle after the last output bin) it compares
//     lhs = 4 * e_in   with   rhs = size * e_out
// and raises err when |lhs - rhs| exceeds the tolerance
//     (lhs >> TOL_SHIFT) + TOL_ABS * size^2,
// with TOL_ABS counted in units of size^2. The tolerance absorbs the FFT's
// rounding noise; errors below it go undetected. The block size
// 4^log4_n (N, the largest size, by default) replaces N above.
// err and done are registered one cycle after eval; err holds until the
// next eval. At eval both accumulators restart (e_in with the sample of
// that same cycle, if any, so a new block may start loading at once).
//
// From the source design: the Parseval relation, sequential accumulation,
// comparison at the end of the block, and a tolerance. This design's own
// choices: the form and size of the tolerance, accumulator widths, timing.
module sos_check #(
  parameter int unsigned N         = 1024,
  parameter int unsigned IN_W      = 12,
  parameter int unsigned OUT_W     = 14,
  parameter int unsigned TOL_SHIFT = 7,
  parameter int unsigned TOL_ABS   = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  input  logic                    out_valid,
  input  logic signed [OUT_W-1:0] out_re,
  input  logic signed [OUT_W-1:0] out_im,
  input  logic                    eval,
  input  logic [$clog2($clog2(N)/2+1)-1:0] log4_n,  // block size 4^log4_n, read at eval
  output logic                    done,
  output logic                    err
);
  localparam int unsigned AW    = $clog2(N);
  localparam int unsigned EIN_W = 2 * IN_W + AW + 1;
  localparam int unsigned EOUT_W = 2 * OUT_W + AW + 1;
  localparam int unsigned CMP_W = ((EIN_W + 2 > EOUT_W + AW) ? EIN_W + 2 : EOUT_W + AW) + 2;

  initial assert (CMP_W <= 64) else $fatal(1, "sos_check comparison wider than 64 bits");

  logic [EIN_W-1:0]  e_in;
  logic [EOUT_W-1:0] e_out;
  logic [2*IN_W:0]   sq_in;
  logic [2*OUT_W:0]  sq_out;
  logic [CMP_W-1:0]  lhs, rhs, diff, tol;

  always_comb begin
    sq_in  = (2*IN_W+1)'(in_re * in_re) + (2*IN_W+1)'(in_im * in_im);
    sq_out = (2*OUT_W+1)'(out_re * out_re) + (2*OUT_W+1)'(out_im * out_im);
    lhs    = CMP_W'(e_in) << 2;
    rhs    = CMP_W'(e_out) << (2 * log4_n);
    diff   = (lhs > rhs) ? lhs - rhs : rhs - lhs;
    tol    = (lhs >> TOL_SHIFT) + (CMP_W'(TOL_ABS) << (4 * log4_n));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_in  <= '0;
      e_out <= '0;
      done  <= 1'b0;
      err   <= 1'b0;
    end else begin
      done <= eval;
      if (eval) begin
        err   <= (diff > tol);
        e_in  <= in_valid ? EIN_W'(sq_in) : '0;
        e_out <= '0;
      end else begin
        if (in_valid)  e_in  <= e_in + EIN_W'(sq_in);
        if (out_valid) e_out <= e_out + EOUT_W'(sq_out);
      end
    end
  end
endmodule
