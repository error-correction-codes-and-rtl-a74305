// Full-size testbench for parity_sos_ecc_fft with every parameter at its
// default (1024-point blocks, 12-bit inputs, 14-bit outputs).
// Runs one clean block and one block with a soft error in FFT 2, compares
// the outputs with a double-precision DFT of each channel, and checks
// that the compute phase takes 5 x 1024 cycles plus the stage drains.
module tb_parity_sos_ecc_fft_full;
  localparam int unsigned N     = 1024;
  localparam int unsigned IN_W  = 12;
  localparam int unsigned OUT_W = 14;
  localparam int unsigned AW    = 10;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL      = 3.0;
  localparam real TOL_CORR = 8.0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [IN_W-1:0] in_re [4], in_im [4];
  logic in_ready, y_valid, y_last, corrected, vote_mismatch;
  logic [AW-1:0] y_idx;
  logic signed [OUT_W-1:0] y_re [4], y_im [4];
  logic [2:0] syndrome, loc;
  logic [$clog2(AW/2+1)-1:0] log4_n = ($clog2(AW/2+1))'(AW / 2);
  logic [4:0] fi_en = '0;
  logic [AW-1:0] fi_idx = '0;
  logic [OUT_W+1:0] fi_mask = '0;

  parity_sos_ecc_fft dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
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
    for (int c = 0; c < 4; c++) for (int n = 0; n < N; n++) begin
      xr[c][n] = int'($urandom_range(4095)) - 2048;
      xi[c][n] = int'($urandom_range(4095)) - 2048;
    end
    for (int c = 0; c < 4; c++) for (int k = 0; k < N; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < N; n++) begin
        int t = (n * k) % N;
        sr += real'(xr[c][n]) * cs[t] + real'(xi[c][n]) * sn[t];
        si += real'(xi[c][n]) * cs[t] - real'(xr[c][n]) * sn[t];
      end
      er[c][k] = sr * 2.0 / N;
      ei[c][k] = si * 2.0 / N;
    end
  endtask

  task automatic run(input string what, input logic [4:0] fen, input logic [2:0] exp_syn, input int corr_lane);
    int tl, tcomp, seen;
    real worst;
    make_block();
    fi_en = fen; fi_idx = 10'd333; fi_mask = 16'h1000;
    wait (in_ready);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1;
      for (int c = 0; c < 4; c++) begin in_re[c] = IN_W'(xr[c][n]); in_im[c] = IN_W'(xi[c][n]); end
    end
    @(posedge clk) tl = cyc;
    @(negedge clk) in_valid = 0;
    // compute phase ends when the cores start streaming their spectra
    @(posedge dut.f_valid[0]);
    tcomp = cyc - tl;
    checks++;
    $display("%s: compute phase %0d cycles (5 x N = %0d)", what, tcomp, 5 * N);
    if (tcomp < 5 * N || tcomp > 5 * N + 50) begin failures++; $display("FAIL compute cycles"); end
    seen = 0;
    worst = 0.0;
    while (seen < N) begin
      @(posedge clk);
      if (y_valid) begin
        if (seen == 0) begin
          checks++;
          if (syndrome != exp_syn || corrected != (corr_lane >= 0)) begin
            failures++; $display("FAIL %s: syndrome %b corrected %b", what, syndrome, corrected);
          end
        end
        for (int c = 0; c < 4; c++) begin
          real d1 = real'(y_re[c]) - er[c][seen];
          real d2 = real'(y_im[c]) - ei[c][seen];
          if (d1 < 0) d1 = -d1;
          if (d2 < 0) d2 = -d2;
          if (d1 > worst) worst = d1;
          if (d2 > worst) worst = d2;
          checks++;
          if (d1 > ((c == corr_lane) ? TOL_CORR : TOL) || d2 > ((c == corr_lane) ? TOL_CORR : TOL)) begin
            failures++;
            $display("FAIL %s lane %0d bin %0d: (%0d,%0d) vs (%f,%f)", what, c, seen, y_re[c], y_im[c], er[c][seen], ei[c][seen]);
          end
        end
        seen++;
      end
    end
    fi_en = '0;
    $display("%s: syndrome %b, worst error %f LSB", what, syndrome, worst);
  endtask

  initial begin
    for (int c = 0; c < 4; c++) begin in_re[c] = '0; in_im[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run("clean block", 5'b00000, 3'b000, -1);
    run("soft error in FFT2", 5'b00010, 3'b110, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
