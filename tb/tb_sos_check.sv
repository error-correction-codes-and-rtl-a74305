// Testbench for sos_check. The "spectrum" fed to the output side is the
// input scaled by 1/4, which for N = 64 satisfies N*sum|Y|^2 = 4*sum|x|^2
// exactly; random perturbations of single output samples then move the
// energy by known amounts. The expected verdict is recomputed here from
// the tolerance rule, and the done timing (one cycle after eval) and the
// restart of the accumulators at eval are checked.
module tb_sos_check;
  localparam int unsigned N = 64, IN_W = 12, OUT_W = 14, TOL_SHIFT = 7;
  localparam int unsigned TOL_ABS = 4;
  logic [1:0] log4_n = 2'd3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid = 0, eval = 0;
  logic signed [IN_W-1:0]  in_re = '0, in_im = '0;
  logic signed [OUT_W-1:0] out_re = '0, out_im = '0;
  logic done, err;

  sos_check #(.N(N), .IN_W(IN_W), .OUT_W(OUT_W), .TOL_SHIFT(TOL_SHIFT), .TOL_ABS(TOL_ABS)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_err = 0, n_ok = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [N], xi [N];

  task automatic block(input int pert_bin, input int pert);
    longint e_in = 0, e_out = 0, lhs, rhs, diff, tol;
    logic exp_err;
    for (int n = 0; n < N; n++) begin
      xr[n] = (int'($urandom_range(1023)) - 512) * 4;
      xi[n] = (int'($urandom_range(1023)) - 512) * 4;
    end
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1; in_re = IN_W'(xr[n]); in_im = IN_W'(xi[n]);
      e_in += longint'(xr[n]) * xr[n] + longint'(xi[n]) * xi[n];
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
    for (int n = 0; n < N; n++) begin
      int yr = xr[n] / 4 + ((n == pert_bin) ? pert : 0);
      int yi = xi[n] / 4;
      out_valid = 1; out_re = OUT_W'(yr); out_im = OUT_W'(yi);
      e_out += longint'(yr) * yr + longint'(yi) * yi;
      @(negedge clk);
    end
    out_valid = 0;
    eval = 1;
    @(negedge clk) eval = 0;
    lhs  = 4 * e_in;
    rhs  = longint'(N) * e_out;
    diff = (lhs > rhs) ? lhs - rhs : rhs - lhs;
    tol  = (lhs >>> TOL_SHIFT) + longint'(TOL_ABS) * N * N;
    exp_err = diff > tol;
    checks++;
    if (!done) begin failures++; $display("FAIL done not one cycle after eval"); end
    checks++;
    if (err != exp_err) begin
      failures++; $display("FAIL pert %0d: err %0b expected %0b (diff %0d tol %0d)", pert, err, exp_err, diff, tol);
    end
    if (exp_err) n_err++; else n_ok++;
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    block(0, 0);
    block(10, 0);
    block(5, 2000);
    block(7, 1);
    block(7, -4000);
    for (int i = 0; i < 30; i++) block(int'($urandom_range(N - 1)), int'($urandom_range(1200)) - 600);
    checks++;
    if (n_err == 0 || n_ok == 0) begin failures++; $display("FAIL both verdicts must occur"); end
    $display("verdicts: error %0d, pass %0d", n_err, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
