// End-to-end testbench for parity_sos_ecc_fft at a reduced block size.
//
// Drives blocks of random samples on all four channels and compares the
// corrected outputs with a double-precision DFT of each channel (scaled by
// 2/N, the cores' fixed scaling). Scenarios, each counted:
//   - no fault: syndrome 000, outputs exact to rounding;
//   - a large soft error in each original FFT: syndrome per the check code
//     (111, 110, 101, 011), that FFT's spectrum rebuilt from the parity FFT;
//   - a large error in the parity FFT: no check fires, outputs unaffected;
//   - a 1-LSB error: below the Parseval tolerance, not flagged;
//   - back-to-back blocks: the next block loads while the last is read out;
//   - run-time size switch to 16 and 4 points (the 4-point block is the
//     1, 2, 3, 4 example, whose scaled spectrum is 5, -1+j, -1, -1-j).
// Also checks the latency from the last input sample to the first output.
module tb_parity_sos_ecc_fft;
  import psecc_pkg::*;
  localparam int unsigned N     = 64;
  localparam int unsigned IN_W  = 12;
  localparam int unsigned OUT_W = 14;
  localparam int unsigned AW    = $clog2(N);
  localparam int unsigned STAGES = AW / 2;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL      = 3.0;   // LSB, lanes passed through
  localparam real TOL_CORR = 6.0;   // LSB, rebuilt lane (sum of five roundings)

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [IN_W-1:0] in_re [4], in_im [4];
  logic in_ready, y_valid, y_last, corrected, vote_mismatch;
  logic [AW-1:0] y_idx;
  logic signed [OUT_W-1:0] y_re [4], y_im [4];
  logic [2:0] syndrome, loc;
  localparam int unsigned SW = $clog2(AW/2+1);
  logic [SW-1:0] log4_n = SW'(AW / 2);
  int M = N;                        // size of the current block
  logic [4:0] fi_en = '0;
  logic [AW-1:0] fi_idx = '0;
  logic [OUT_W+1:0] fi_mask = '0;

  parity_sos_ecc_fft #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int n_clean = 0, n_corr [4] = '{0, 0, 0, 0}, n_parity = 0, n_small = 0, n_overlap = 0, n_resize = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  xr [4][N], xi [4][N];
  real er [4][N], ei [4][N];
  real cs [N], sn [N];

  initial for (int k = 0; k < N; k++) begin
    cs[k] = $cos(2.0 * PI * k / N);
    sn[k] = $sin(2.0 * PI * k / N);
  end

  task automatic make_block();
    for (int c = 0; c < 4; c++) for (int n = 0; n < M; n++) begin
      xr[c][n] = int'($urandom_range(4095)) - 2048;
      xi[c][n] = int'($urandom_range(4095)) - 2048;
    end
    ref_dft();
  endtask

  task automatic ref_dft();
    for (int c = 0; c < 4; c++) for (int k = 0; k < M; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < M; n++) begin
        int t = ((n * k) % M) * (N / M);   // e^{-j 2 pi n k / M}
        sr += real'(xr[c][n]) * cs[t] + real'(xi[c][n]) * sn[t];
        si += real'(xi[c][n]) * cs[t] - real'(xr[c][n]) * sn[t];
      end
      er[c][k] = sr * 2.0 / M;
      ei[c][k] = si * 2.0 / M;
    end
  endtask

  task automatic load_block(output int t_last);
    wait (in_ready);
    for (int n = 0; n < M; n++) begin
      @(negedge clk);
      in_valid = 1;
      for (int c = 0; c < 4; c++) begin
        in_re[c] = IN_W'(xr[c][n]);
        in_im[c] = IN_W'(xi[c][n]);
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    t_last = cyc;
    @(negedge clk) in_valid = 0;
  endtask

  // collect one output block and compare; skip_bin excludes a bin known
  // to carry an uncorrected sub-tolerance error
  task automatic check_block(input string what, input logic [2:0] exp_syn, input int corr_lane,
                             input int skip_lane, input int skip_bin, output int t_first);
    int seen = 0;
    t_first = -1;
    while (seen < M) begin
      @(posedge clk);
      if (y_valid) begin
        if (seen == 0) begin
          t_first = cyc;
          checks++;
          if (syndrome != exp_syn) begin
            failures++; $display("FAIL %s: syndrome %b expected %b", what, syndrome, exp_syn);
          end
          checks++;
          if (corrected != (corr_lane >= 0) ||
              (corr_lane >= 0 && int'(loc) != corr_lane + 1) || (corr_lane < 0 && loc != LOC_NONE)) begin
            failures++; $display("FAIL %s: corrected=%0b loc=%0d", what, corrected, loc);
          end
        end
        checks++;
        if (int'(y_idx) != seen || y_last != (seen == M - 1) || vote_mismatch) begin
          failures++; $display("FAIL %s: idx %0d last %0b mm %0b at %0d", what, y_idx, y_last, vote_mismatch, seen);
        end
        for (int c = 0; c < 4; c++) begin
          real tol = (c == corr_lane) ? TOL_CORR : TOL;
          real d1 = real'(y_re[c]) - er[c][seen];
          real d2 = real'(y_im[c]) - ei[c][seen];
          if (d1 < 0) d1 = -d1;
          if (d2 < 0) d2 = -d2;
          if (!(c == skip_lane && seen == skip_bin)) begin
            checks++;
            if (d1 > tol || d2 > tol) begin
              failures++;
              $display("FAIL %s: lane %0d bin %0d got (%0d,%0d) expected (%f,%f)",
                       what, c, seen, y_re[c], y_im[c], er[c][seen], ei[c][seen]);
            end
          end
        end
        seen++;
      end
    end
  endtask

  localparam logic [2:0] SYN [4] = '{3'b111, 3'b110, 3'b101, 3'b011};

  task automatic run(input string what, input logic [4:0] fen, input int bin, input int mask,
                     input logic [2:0] exp_syn, input int corr_lane, input int skip_lane);
    int tl, tf;
    make_block();
    fi_en = fen; fi_idx = AW'(bin); fi_mask = (OUT_W+2)'(mask);
    load_block(tl);
    check_block(what, exp_syn, corr_lane, skip_lane, bin, tf);
    fi_en = '0;
    // latency: 5 x N compute (plus drain) then N output cycles, checks, buffer read
    checks++;
    if (tf - tl < int'(log4_n) * M + M || tf - tl > int'(log4_n) * (M + 8) + M + 8) begin
      failures++; $display("FAIL %s: latency %0d", what, tf - tl);
    end
    $display("%s: syndrome %b, latency %0d cycles", what, syndrome, tf - tl);
  endtask

  initial begin
    for (int c = 0; c < 4; c++) begin in_re[c] = '0; in_im[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    run("clean", 5'b00000, 0, 0, 3'b000, -1, -1);
    n_clean++;
    for (int f = 0; f < 4; f++) begin
      run($sformatf("fault in FFT%0d", f + 1), 5'(1 << f), int'($urandom_range(N - 1)), 'h1000, SYN[f], f, -1);
      if (syndrome == SYN[f]) n_corr[f]++;
    end
    run("fault in parity FFT", 5'b10000, 9, 'h4000, 3'b000, -1, -1);
    if (syndrome == 3'b000) n_parity++;
    run("1-LSB fault in FFT3", 5'b00100, 11, 'h0001, 3'b000, -1, 2);
    if (syndrome == 3'b000) n_small++;

    // run-time size switch: a 16-point block with an error in FFT3, then
    // the 4-point example (inputs 1, 2, 3, 4 on every channel) with an
    // error in FFT1, then back to the full size
    log4_n = SW'(2); M = 16;
    run("16-point, fault in FFT3", 5'b00100, 6, 'h1000, 3'b101, 2, -1);
    if (syndrome == 3'b101) n_resize++;
    log4_n = SW'(1); M = 4;
    begin
      int tl, tf;
      for (int c = 0; c < 4; c++) for (int n = 0; n < 4; n++) begin xr[c][n] = n + 1; xi[c][n] = 0; end
      ref_dft();
      fi_en = 5'b00001; fi_idx = '0; fi_mask = 16'h0400;
      load_block(tl);
      check_block("4-point example, fault in FFT1", 3'b111, 0, -1, -1, tf);
      fi_en = '0;
      if (syndrome == 3'b111) n_resize++;
    end
    log4_n = SW'(STAGES); M = N;

    // back-to-back: the second block is loaded while the first is read out
    begin
      int tl, tf;
      make_block();
      load_block(tl);
      fork
        check_block("back-to-back A", 3'b000, -1, -1, -1, tf);
        begin
          // wait until read-out starts, then load the next block
          wait (y_valid);
          make_block_b();
        end
      join
    end

    $display("mechanisms: clean=%0d corrected FFT1..4=%0d,%0d,%0d,%0d parity-fault-ignored=%0d below-tolerance=%0d overlap=%0d size-switch=%0d",
             n_clean, n_corr[0], n_corr[1], n_corr[2], n_corr[3], n_parity, n_small, n_overlap, n_resize);
    checks++;
    if (n_clean == 0 || n_corr[0] == 0 || n_corr[1] == 0 || n_corr[2] == 0 || n_corr[3] == 0 ||
        n_parity == 0 || n_small == 0 || n_overlap == 0 || n_resize < 2) begin
      failures++; $display("FAIL some mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // second block of the back-to-back pair: loaded during the read-out of
  // the first; its own result is checked after
  int bx_r [4][N], bx_i [4][N];
  task automatic make_block_b();
    int tl, tf;
    // wait until the first block's result is out before overwriting the reference
    for (int c = 0; c < 4; c++) for (int n = 0; n < M; n++) begin
      bx_r[c][n] = int'($urandom_range(4095)) - 2048;
      bx_i[c][n] = int'($urandom_range(4095)) - 2048;
    end
    wait (in_ready);
    for (int n = 0; n < M; n++) begin
      @(negedge clk);
      in_valid = 1;
      for (int c = 0; c < 4; c++) begin
        in_re[c] = IN_W'(bx_r[c][n]);
        in_im[c] = IN_W'(bx_i[c][n]);
      end
      @(posedge clk);
      if (y_valid) n_overlap++;
    end
    @(negedge clk) in_valid = 0;
    wait (!y_valid);
    xr = bx_r; xi = bx_i;
    ref_dft();
    check_block("back-to-back B", 3'b000, -1, -1, -1, tf);
  endtask
endmodule
