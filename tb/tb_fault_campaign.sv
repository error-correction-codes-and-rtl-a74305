// Fault-injection campaign on parity_sos_ecc_fft (64-point blocks).
//
// Each block of random full-scale samples gets one single-bit upset in a
// random output bin of a random FFT (original or parity), at a random bit
// of the real part. The outputs are compared with a double-precision DFT.
// A block is "recovered" when every output bin is within rounding of the
// reference. Reported per upset bit: blocks, detections, recoveries.
// Pass criteria: every upset in the parity FFT leaves the outputs intact,
// every upset of bit 12 or 13 (a change of 4096 or more, far outside the
// Parseval tolerance) in an original FFT is located and corrected, and a
// clean block never raises a check. Also reports the largest relative
// Parseval mismatch seen on clean blocks, which the tolerance must exceed.
module tb_fault_campaign;
  localparam int unsigned N = 64, IN_W = 12, OUT_W = 14, AW = 6;
  localparam int unsigned BLOCKS = 300;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 3.0, TOL_CORR = 6.0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] log4_n = 2'd3;
  logic signed [IN_W-1:0] in_re [4], in_im [4];
  logic in_ready, y_valid, y_last, corrected, vote_mismatch;
  logic [AW-1:0] y_idx;
  logic signed [OUT_W-1:0] y_re [4], y_im [4];
  logic [2:0] syndrome, loc;
  logic [4:0] fi_en = '0;
  logic [AW-1:0] fi_idx = '0;
  logic [OUT_W+1:0] fi_mask = '0;

  parity_sos_ecc_fft #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  xr [4][N], xi [4][N];
  real er [4][N], ei [4][N];
  real cs [N], sn [N];
  int  n_blk [16], n_det [16], n_rec [16];
  real worst_clean = 0.0;

  initial for (int k = 0; k < N; k++) begin
    cs[k] = $cos(2.0 * PI * k / N);
    sn[k] = $sin(2.0 * PI * k / N);
  end

  // relative Parseval mismatch of each check in its verdict cycle (sampled
  // mid-cycle, before the accumulators restart)
  always @(negedge clk) if (dut.eval && fi_en == '0) begin
    real l [3], d [3];
    l[0] = real'(dut.g_chk[0].u_chk.lhs);  d[0] = real'(dut.g_chk[0].u_chk.diff);
    l[1] = real'(dut.g_chk[1].u_chk.lhs);  d[1] = real'(dut.g_chk[1].u_chk.diff);
    l[2] = real'(dut.g_chk[2].u_chk.lhs);  d[2] = real'(dut.g_chk[2].u_chk.diff);
    for (int k = 0; k < 3; k++) if (l[k] > 0.0 && d[k] / l[k] > worst_clean) worst_clean = d[k] / l[k];
  end

  initial begin
    for (int c = 0; c < 4; c++) begin in_re[c] = '0; in_im[c] = '0; end
    for (int b = 0; b < 16; b++) begin n_blk[b] = 0; n_det[b] = 0; n_rec[b] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < BLOCKS; blk++) begin
      int fft, bit_i, bin, seen;
      logic ok;
      fft   = (blk % 6 == 5) ? -1 : int'($urandom_range(4));   // every 6th block clean
      bit_i = (fft == 4) ? int'($urandom_range(15)) : int'($urandom_range(13));
      bin   = int'($urandom_range(N - 1));
      for (int c = 0; c < 4; c++) for (int n = 0; n < N; n++) begin
        xr[c][n] = int'($urandom_range(4095)) - 2048;
        xi[c][n] = int'($urandom_range(4095)) - 2048;
      end
      for (int c = 0; c < 4; c++) for (int k = 0; k < N; k++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < N; n++) begin
          int t;
          t = (n * k) % N;
          sr += real'(xr[c][n]) * cs[t] + real'(xi[c][n]) * sn[t];
          si += real'(xi[c][n]) * cs[t] - real'(xr[c][n]) * sn[t];
        end
        er[c][k] = sr * 2.0 / N;
        ei[c][k] = si * 2.0 / N;
      end
      fi_en   = (fft < 0) ? 5'b0 : 5'(1 << fft);
      fi_idx  = AW'(bin);
      fi_mask = (OUT_W+2)'(1 << bit_i);
      wait (in_ready);
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1;
        for (int c = 0; c < 4; c++) begin in_re[c] = IN_W'(xr[c][n]); in_im[c] = IN_W'(xi[c][n]); end
      end
      @(negedge clk) in_valid = 0;
      seen = 0;
      ok = 1;
      while (seen < N) begin
        @(posedge clk);
        if (y_valid) begin
          for (int c = 0; c < 4; c++) begin
            real d1, d2, tol;
            tol = corrected ? TOL_CORR : TOL;
            d1 = real'(y_re[c]) - er[c][seen]; if (d1 < 0) d1 = -d1;
            d2 = real'(y_im[c]) - ei[c][seen]; if (d2 < 0) d2 = -d2;
            if (d1 > tol || d2 > tol) ok = 0;
          end
          seen++;
        end
      end
      fi_en = '0;
      if (fft < 0) begin
        checks++;
        if (syndrome != 3'b000 || !ok) begin failures++; $display("FAIL clean block %0d: syndrome %b", blk, syndrome); end
      end else if (fft == 4) begin
        checks++;
        if (!ok || syndrome != 3'b000) begin failures++; $display("FAIL parity-FFT upset bit %0d changed the outputs", bit_i); end
      end else begin
        n_blk[bit_i]++;
        if (syndrome != 3'b000) n_det[bit_i]++;
        if (ok) n_rec[bit_i]++;
        if (bit_i >= 12) begin
          checks++;
          if (!ok || !corrected || int'(loc) != fft + 1) begin
            failures++; $display("FAIL block %0d: bit %0d upset in FFT%0d not corrected (syndrome %b)", blk, bit_i, fft + 1, syndrome);
          end
        end
      end
    end
    $display("upsets in FFT1..4 by bit: bit blocks detected recovered");
    for (int b = 0; b < 14; b++) $display("  %2d %3d %3d %3d", b, n_blk[b], n_det[b], n_rec[b]);
    $display("largest relative Parseval mismatch on clean blocks: %f (tolerance 1/128 = 0.0078)", worst_clean);
    checks++;
    if (worst_clean >= 0.0078125) begin failures++; $display("FAIL tolerance too tight"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
