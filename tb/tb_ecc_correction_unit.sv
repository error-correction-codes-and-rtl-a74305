// Testbench for ecc_correction_unit at N = 16. Streams a block of bins
// into the buffer, reports a syndrome, and checks that the block comes
// back in order, registered out two cycles after chk_done is taken, with the located
// lane rebuilt from the parity bin and the status outputs set. Repeats for
// every syndrome.
module tb_ecc_correction_unit;
  import psecc_pkg::*;
  localparam int unsigned N = 16, W = 14, AW = 4;
  logic clk = 0, rst_n = 0;
  logic z_valid = 0, chk_done = 0;
  logic [AW-1:0] z_idx = '0, y_idx;
  logic signed [W-1:0] z_re [4], z_im [4], y_re [4], y_im [4];
  logic signed [W+1:0] xp_re = '0, xp_im = '0;
  logic [2:0] chk_err = '0, syndrome;
  logic [1:0] log4_n = 2'd2;
  logic y_valid, y_last, corrected, vote_mismatch;
  loc_t loc;

  ecc_correction_unit #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tr [N][4], ti [N][4], gr [N][4], gi [N][4], pr [N], pi [N];
  localparam logic [2:0] SYN [8] = '{3'b000, 3'b111, 3'b110, 3'b101, 3'b011, 3'b100, 3'b010, 3'b001};

  initial begin
    for (int k = 0; k < 4; k++) begin z_re[k] = '0; z_im[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      int bl, t_done, seen;
      bl = (s >= 1 && s <= 4) ? s - 1 : -1;
      // one block, bins in natural order
      for (int n = 0; n < N; n++) begin
        pr[n] = 0; pi[n] = 0;
        for (int k = 0; k < 4; k++) begin
          tr[n][k] = int'($urandom_range(8191)) - 4096;
          ti[n][k] = int'($urandom_range(8191)) - 4096;
          pr[n] += tr[n][k]; pi[n] += ti[n][k];
          gr[n][k] = (k == bl) ? tr[n][k] + 1000 : tr[n][k];
          gi[n][k] = (k == bl) ? ti[n][k] - 777 : ti[n][k];
        end
      end
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        z_valid = 1; z_idx = AW'(n);
        for (int k = 0; k < 4; k++) begin z_re[k] = W'(gr[n][k]); z_im[k] = W'(gi[n][k]); end
        xp_re = (W+2)'(pr[n]); xp_im = (W+2)'(pi[n]);
      end
      @(negedge clk) z_valid = 0;
      @(negedge clk);
      chk_done = 1; chk_err = SYN[s];
      @(posedge clk) t_done = cyc;
      @(negedge clk) chk_done = 0;
      seen = 0;
      while (seen < N) begin
        @(posedge clk);
        if (y_valid) begin
          if (seen == 0) begin
            checks++;
            // chk_done is taken at edge t_done; the bin is registered out at
            // t_done + 2 and therefore seen by this process at t_done + 3
            if (cyc - t_done != 3) begin failures++; $display("FAIL latency %0d", cyc - t_done); end
            checks++;
            if (syndrome != SYN[s] || corrected != (bl >= 0) || (bl >= 0 && int'(loc) != bl + 1)) begin
              failures++; $display("FAIL status syndrome %b corrected %b loc %0d", syndrome, corrected, loc);
            end
          end
          checks++;
          if (int'(y_idx) != seen || y_last != (seen == N - 1) || vote_mismatch) begin
            failures++; $display("FAIL sequence at %0d", seen);
          end
          for (int k = 0; k < 4; k++) begin
            int er, ei;
            er = (bl < 0) ? gr[seen][k] : tr[seen][k];
            ei = (bl < 0) ? gi[seen][k] : ti[seen][k];
            checks++;
            if (int'(y_re[k]) != er || int'(y_im[k]) != ei) begin
              failures++; $display("FAIL s=%b bin %0d lane %0d: (%0d,%0d) vs (%0d,%0d)", SYN[s], seen, k, y_re[k], y_im[k], er, ei);
            end
          end
          seen++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
