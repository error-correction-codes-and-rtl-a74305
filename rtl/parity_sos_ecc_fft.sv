// parity_sos_ecc_fft -- four parallel FFTs protected by parity-SOS-ECC.
//
// Four independent channels x1..x4 are transformed by four FFT cores.
// Protection costs one extra FFT and three Parseval checks:
//  * a parity FFT transforms xp = x1+x2+x3+x4 (two bits wider);
//  * three Parseval checks form a Hamming-style code: check k compares the
//    energy of an input sum (x5 = x1+x2+x3, x6 = x1+x2+x4, x7 = x1+x3+x4)
//    with the energy of the same sum of FFT outputs (z1+z2+z3, ...), which
//    by linearity is the spectrum of that input sum;
//  * the pattern of failing checks locates the faulty FFT and the
//    correction unit rebuilds its output as xp's spectrum minus the other
//    three spectra.
// The input and output adders and the decoder/corrector are triplicated
// and voted. An error inside the parity FFT changes no check and, as no
// correction uses it then, never reaches the outputs.
//
// Size: log4_n selects a block of 4^log4_n points (N, 1024 by default, is
// the largest); it is taken with the first sample of each block.
//
// Timing: the five FFT cores run in lockstep. A block is 4^log4_n in_valid
// beats while in_ready is high; log4_n stages of 4^log4_n cycles each
// (5 x 1024 at full size) later the spectra stream into the block buffer
// and the checks, one bin per cycle; two
// cycles after that the checks report, and the corrected spectra leave on
// y_valid, one bin of all four channels per cycle in natural order, with
// syndrome / loc / corrected describing that block. A new block can be
// loaded while the previous one is read out.
//
// fi_en[i] / fi_idx / fi_mask inject a soft error: output bin fi_idx of
// FFT i (i = 0..3 original, 4 parity) has its real part XORed with fi_mask.
module parity_sos_ecc_fft #(
  parameter int unsigned N         = 1024,
  parameter int unsigned IN_W      = 12,
  parameter int unsigned OUT_W     = IN_W + 2,
  parameter int unsigned TOL_SHIFT = 7,
  parameter int unsigned TOL_ABS   = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2($clog2(N)/2+1)-1:0] log4_n,   // block size 4^log4_n
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re [4],
  input  logic signed [IN_W-1:0]  in_im [4],
  output logic                    in_ready,
  output logic                    y_valid,
  output logic [$clog2(N)-1:0]    y_idx,
  output logic                    y_last,
  output logic signed [OUT_W-1:0] y_re [4],
  output logic signed [OUT_W-1:0] y_im [4],
  output logic [2:0]              syndrome,      // {c1, c2, c3}
  output logic [2:0]              loc,           // psecc_pkg::loc_t
  output logic                    corrected,
  output logic                    vote_mismatch,
  input  logic [4:0]              fi_en,
  input  logic [$clog2(N)-1:0]    fi_idx,
  input  logic [OUT_W+1:0]        fi_mask
);
  import psecc_pkg::*;
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned CW = IN_W + 2;     // width of input sums
  localparam int unsigned ZW = OUT_W + 2;    // width of output sums / parity FFT out
  localparam int unsigned SW = $clog2(AW / 2 + 1);

  // ------------------------------------------------- input encoder (TMR)
  localparam int unsigned EVW = 8 * CW;
  logic signed [CW-1:0] e_cre [3][3], e_cim [3][3];
  logic signed [CW-1:0] e_pre [3], e_pim [3];
  logic [EVW-1:0]       e_flat [3], e_vote;
  logic signed [CW-1:0] x_cre [3], x_cim [3];
  logic signed [CW-1:0] xp_re, xp_im;
  logic                 e_mm;

  for (genvar t = 0; t < 3; t++) begin : g_enc
    ecc_input_encoder #(.W(IN_W)) u_enc (
      .x_re(in_re), .x_im(in_im),
      .c_re(e_cre[t]), .c_im(e_cim[t]), .p_re(e_pre[t]), .p_im(e_pim[t])
    );
    assign e_flat[t] = {e_cre[t][0], e_cim[t][0], e_cre[t][1], e_cim[t][1],
                        e_cre[t][2], e_cim[t][2], e_pre[t], e_pim[t]};
  end
  tmr_voter #(.W(EVW)) u_enc_vote (.a(e_flat[0]), .b(e_flat[1]), .c(e_flat[2]), .y(e_vote), .mismatch(e_mm));
  assign {x_cre[0], x_cim[0], x_cre[1], x_cim[1], x_cre[2], x_cim[2], xp_re, xp_im} = e_vote;

  // ------------------------------------------------------------- FFTs
  logic [4:0]            f_ready, f_valid, f_last, f_busy;
  logic [SW-1:0]         f_ns [5];
  logic [AW-1:0]         f_idx [5];
  logic signed [OUT_W-1:0] z_re [4], z_im [4];
  logic signed [ZW-1:0]  xpf_re, xpf_im;
  logic                  load;

  assign in_ready = &f_ready;
  assign load     = in_valid && in_ready;

  for (genvar i = 0; i < 4; i++) begin : g_fft
    fft_r4_iter #(.N(N), .IN_W(IN_W), .OUT_W(OUT_W)) u_fft (
      .clk, .rst_n, .log4_n, .cur_log4_n(f_ns[i]),
      .in_valid(load), .in_re(in_re[i]), .in_im(in_im[i]), .in_ready(f_ready[i]),
      .out_valid(f_valid[i]), .out_re(z_re[i]), .out_im(z_im[i]),
      .out_idx(f_idx[i]), .out_last(f_last[i]), .busy(f_busy[i]),
      .fi_en(fi_en[i]), .fi_idx(fi_idx), .fi_mask(fi_mask[OUT_W-1:0])
    );
  end

  fft_r4_iter #(.N(N), .IN_W(CW), .OUT_W(ZW)) u_parity_fft (
    .clk, .rst_n, .log4_n, .cur_log4_n(f_ns[4]),
    .in_valid(load), .in_re(xp_re), .in_im(xp_im), .in_ready(f_ready[4]),
    .out_valid(f_valid[4]), .out_re(xpf_re), .out_im(xpf_im),
    .out_idx(f_idx[4]), .out_last(f_last[4]), .busy(f_busy[4]),
    .fi_en(fi_en[4]), .fi_idx(fi_idx), .fi_mask(fi_mask)
  );

  // ------------------------------------------------ output combiner (TMR)
  localparam int unsigned OVW = 6 * ZW;
  logic signed [ZW-1:0] o_cre [3][3], o_cim [3][3];
  logic [OVW-1:0]       o_flat [3], o_vote;
  logic signed [ZW-1:0] z_cre [3], z_cim [3];
  logic                 o_mm;

  for (genvar t = 0; t < 3; t++) begin : g_comb
    ecc_output_combiner #(.W(OUT_W)) u_comb (
      .z_re(z_re), .z_im(z_im), .c_re(o_cre[t]), .c_im(o_cim[t])
    );
    assign o_flat[t] = {o_cre[t][0], o_cim[t][0], o_cre[t][1], o_cim[t][1], o_cre[t][2], o_cim[t][2]};
  end
  tmr_voter #(.W(OVW)) u_comb_vote (.a(o_flat[0]), .b(o_flat[1]), .c(o_flat[2]), .y(o_vote), .mismatch(o_mm));
  assign {z_cre[0], z_cim[0], z_cre[1], z_cim[1], z_cre[2], z_cim[2]} = o_vote;

  // ---------------------------------------------------- Parseval checks
  logic          eval;
  logic [SW-1:0] blk_ns;     // size of the block being judged
  logic [2:0]    c_done, c_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eval   <= 1'b0;
      blk_ns <= SW'(AW / 2);
    end else begin
      eval <= f_last[0];
      if (f_last[0]) blk_ns <= f_ns[0];
    end
  end

  for (genvar k = 0; k < 3; k++) begin : g_chk
    sos_check #(.N(N), .IN_W(CW), .OUT_W(ZW), .TOL_SHIFT(TOL_SHIFT), .TOL_ABS(TOL_ABS)) u_chk (
      .clk, .rst_n,
      .in_valid(load), .in_re(x_cre[k]), .in_im(x_cim[k]),
      .out_valid(f_valid[0]), .out_re(z_cre[k]), .out_im(z_cim[k]),
      .eval(eval), .log4_n(blk_ns), .done(c_done[k]), .err(c_err[2 - k])   // c1 is the MSB
    );
  end

  // ------------------------------------------ error detection & correction
  loc_t u_loc;
  logic u_mm;

  ecc_correction_unit #(.N(N), .W(OUT_W)) u_corr (
    .clk, .rst_n,
    .z_valid(f_valid[0]), .z_idx(f_idx[0]), .z_re(z_re), .z_im(z_im),
    .xp_re(xpf_re), .xp_im(xpf_im),
    .chk_done(c_done[0]), .chk_err(c_err), .log4_n(blk_ns),
    .y_valid, .y_idx, .y_last, .y_re, .y_im,
    .syndrome, .loc(u_loc), .corrected, .vote_mismatch(u_mm)
  );

  assign loc = u_loc;

  // a disagreement among the voted copies of the adders is held from the
  // cycle it happens until the checks of that block report
  logic adder_mm;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      adder_mm <= 1'b0;
    else if ((load && e_mm) || (f_valid[0] && o_mm)) adder_mm <= 1'b1;
    else if (c_done[0])                              adder_mm <= 1'b0;
  end
  assign vote_mismatch = u_mm || adder_mm;

  // the five cores run in lockstep
  assert property (@(posedge clk) disable iff (!rst_n) (&f_valid) || !(|f_valid))
    else $error("FFT cores out of step");

  // unused per-core copies of the lockstep signals
  logic unused;
  assign unused = ^{f_busy, f_last[4:1], f_ns[1], f_ns[2], f_ns[3], f_ns[4], f_idx[1], f_idx[2], f_idx[3], f_idx[4], c_done[2:1]};
endmodule
