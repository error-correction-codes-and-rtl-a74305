// Self-checking testbench for fft_r4_iter.
// Loads random and single-tone blocks, compares every output bin with a
// double-precision DFT scaled by 2/N (the core's fixed scaling), checks
// the compute-phase cycle count against 5 x N plus the per-stage drain,
// checks that the fault-injection port corrupts exactly one bin, and runs
// 16- and 4-point blocks selected at run time through log4_n.
module tb_fft_r4_iter;
  localparam int unsigned N     = 64;
  localparam int unsigned IN_W  = 12;
  localparam int unsigned OUT_W = 14;
  localparam int unsigned AW    = $clog2(N);
  localparam int unsigned STAGES = AW / 2;
  localparam int unsigned MAX_DRAIN = 8;   // allowed extra cycles per stage
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 3.0;               // LSB of the output

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [IN_W-1:0] in_re = '0, in_im = '0;
  logic in_ready, out_valid, out_last, busy;
  logic signed [OUT_W-1:0] out_re, out_im;
  logic [AW-1:0] out_idx;
  localparam int unsigned SW = $clog2(STAGES + 1);
  logic [SW-1:0] log4_n = SW'(STAGES), cur_log4_n;
  int M = N;                               // size of the current block
  logic fi_en = 0;
  logic [AW-1:0] fi_idx = '0;
  logic [OUT_W-1:0] fi_mask = '0;

  fft_r4_iter #(.N(N), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [N], xi [N];
  int gr [N], gi [N];
  real er [N], ei [N];

  task automatic ref_dft();
    for (int k = 0; k < M; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < M; n++) begin
        real a = -2.0 * PI * real'((n * k) % M) / real'(M);
        sr += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
        si += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
      end
      er[k] = sr * 2.0 / real'(M);
      ei[k] = si * 2.0 / real'(M);
    end
  endtask

  // run one block; returns compute-phase cycles
  task automatic run_block(output int comp_cycles);
    int t_load_end, t_first_out, seen;
    @(negedge clk);
    wait (in_ready);
    for (int n = 0; n < M; n++) begin
      @(negedge clk);
      in_valid = 1; in_re = IN_W'(xr[n]); in_im = IN_W'(xi[n]);
    end
    @(posedge clk); t_load_end = cyc;
    @(negedge clk); in_valid = 0;
    seen = 0;
    t_first_out = 0;
    while (seen < M) begin
      @(posedge clk);
      if (out_valid) begin
        if (seen == 0) t_first_out = cyc;
        gr[out_idx] = int'(out_re);
        gi[out_idx] = int'(out_im);
        checks++;
        if (int'(out_idx) != seen) begin
          failures++; $display("FAIL order: got bin %0d expected %0d", out_idx, seen);
        end
        if ((seen == M - 1) != out_last) begin
          failures++; $display("FAIL out_last at %0d", seen);
        end
        seen++;
      end
    end
    comp_cycles = t_first_out - t_load_end;
  endtask

  task automatic compare(input string what);
    real worst = 0.0;
    for (int k = 0; k < M; k++) begin
      real d1 = real'(gr[k]) - er[k];
      real d2 = real'(gi[k]) - ei[k];
      if (d1 < 0) d1 = -d1;
      if (d2 < 0) d2 = -d2;
      if (d1 > worst) worst = d1;
      if (d2 > worst) worst = d2;
      checks++;
      if (d1 > TOL || d2 > TOL) begin
        failures++;
        $display("FAIL %s bin %0d: got (%0d,%0d) expected (%f,%f)", what, k, gr[k], gi[k], er[k], ei[k]);
      end
    end
    $display("%s: worst error %f LSB", what, worst);
  endtask

  initial begin
    int cc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: random full-scale block
    for (int n = 0; n < N; n++) begin
      xr[n] = int'($urandom_range(4095)) - 2048;
      xi[n] = int'($urandom_range(4095)) - 2048;
    end
    ref_dft();
    run_block(cc);
    compare("random");
    checks++;
    $display("compute cycles %0d (stages*N = %0d)", cc, STAGES * N);
    if (cc < int'(STAGES * N) || cc > int'(STAGES * (N + MAX_DRAIN))) begin
      failures++; $display("FAIL compute cycles %0d", cc);
    end
    // 2: single tone at bin 5, full scale
    for (int n = 0; n < N; n++) begin
      xr[n] = $rtoi(2000.0 * $cos(2.0 * PI * 5 * n / N));
      xi[n] = $rtoi(2000.0 * $sin(2.0 * PI * 5 * n / N));
    end
    ref_dft();
    run_block(cc);
    compare("tone");
    // 3: impulse at n = 3 with fault injection on bin 7
    for (int n = 0; n < N; n++) begin xr[n] = 0; xi[n] = 0; end
    xr[3] = 1500; xi[3] = -700;
    ref_dft();
    fi_en = 1; fi_idx = 7; fi_mask = 14'h1000;
    run_block(cc);
    fi_en = 0;
    checks++;
    if ($rtoi(er[7]) - gr[7] < 1000 && gr[7] - $rtoi(er[7]) < 1000) begin
      failures++; $display("FAIL fault injection had no effect on bin 7");
    end
    gr[7] = gr[7] ^ 32'h1000;
    begin
      logic signed [OUT_W-1:0] t;
      t = OUT_W'(gr[7]); gr[7] = int'(t);
    end
    compare("impulse");
    // smaller sizes selected at run time: 16 and 4 points
    for (int sz = 2; sz >= 1; sz--) begin
      log4_n = SW'(sz);
      M = 1 << (2 * sz);
      for (int n = 0; n < M; n++) begin
        xr[n] = int'($urandom_range(4095)) - 2048;
        xi[n] = int'($urandom_range(4095)) - 2048;
      end
      ref_dft();
      run_block(cc);
      compare($sformatf("%0d-point", M));
      checks++;
      if (cc < sz * M || cc > sz * (M + int'(MAX_DRAIN))) begin
        failures++; $display("FAIL %0d-point compute cycles %0d", M, cc);
      end
    end
    // the 4-point example with inputs 1, 2, 3, 4: DFT 10, -2+2j, -2, -2-2j,
    // delivered scaled by 2/4
    for (int n = 0; n < 4; n++) begin xr[n] = n + 1; xi[n] = 0; end
    ref_dft();
    run_block(cc);
    compare("4-point 1,2,3,4");
    checks++;
    if (gr[0] != 5 || gr[1] != -1 || gi[1] != 1 || gr[2] != -1 || gi[2] != 0 || gr[3] != -1 || gi[3] != -1) begin
      failures++; $display("FAIL 4-point example");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
