// Testbench for sos_ecc_corrector: every syndrome with random bins. For
// the four syndromes that name an FFT the parity bin is built as the sum
// of the true bins and that FFT's bin is replaced by garbage; the output
// must give back the true bin. Other syndromes must pass all bins through.
// Also checks saturation of a rebuilt value that does not fit.
module tb_sos_ecc_corrector;
  import psecc_pkg::*;
  localparam int unsigned W = 14;
  logic [2:0] syndrome;
  logic signed [W-1:0] z_re [4], z_im [4], y_re [4], y_im [4];
  logic signed [W+1:0] xp_re, xp_im;
  loc_t loc;
  int checks = 0, failures = 0;

  sos_ecc_corrector #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bad_lane(input logic [2:0] s);
    case (s)
      3'b111: return 0;
      3'b110: return 1;
      3'b101: return 2;
      3'b011: return 3;
      default: return -1;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 800; i++) begin
      int tr [4], ti [4], sr, si, bl;
      sr = 0; si = 0;
      syndrome = 3'(i % 8);
      bl = bad_lane(syndrome);
      for (int k = 0; k < 4; k++) begin
        tr[k] = int'($urandom_range(8191)) - 4096;
        ti[k] = int'($urandom_range(8191)) - 4096;
        sr += tr[k]; si += ti[k];
      end
      xp_re = (W+2)'(sr); xp_im = (W+2)'(si);
      for (int k = 0; k < 4; k++) begin
        z_re[k] = W'(tr[k]); z_im[k] = W'(ti[k]);
        if (k == bl) begin z_re[k] = W'($urandom); z_im[k] = W'($urandom); end
      end
      #1;
      checks++;
      if (int'(loc) != bl + 1 && !(bl < 0 && ((syndrome == 0 && loc == LOC_NONE) || (syndrome != 0 && loc == LOC_CHECK)))) begin
        failures++; $display("FAIL syndrome %b -> loc %0d", syndrome, loc);
      end
      for (int k = 0; k < 4; k++) begin
        int er, ei;
        er = (bl < 0) ? int'(z_re[k]) : tr[k];
        ei = (bl < 0) ? int'(z_im[k]) : ti[k];
        checks++;
        if (int'(y_re[k]) != er || int'(y_im[k]) != ei) begin
          failures++; $display("FAIL syndrome %b lane %0d: (%0d,%0d) expected (%0d,%0d)", syndrome, k, y_re[k], y_im[k], er, ei);
        end
      end
    end
    // saturation: rebuilt lane 1 would be 30000
    syndrome = 3'b111;
    xp_re = 16'sd30000; xp_im = -16'sd30000;
    for (int k = 0; k < 4; k++) begin z_re[k] = '0; z_im[k] = '0; end
    #1;
    checks++;
    if (y_re[0] != 14'sh1fff || y_im[0] != -14'sh2000) begin
      failures++; $display("FAIL saturation: %0d %0d", y_re[0], y_im[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
