// Testbench for tmr_voter: random words, with zero, one or all three
// copies corrupted; the vote must equal the majority computed bit by bit
// here, and mismatch must flag any disagreement.
module tb_tmr_voter;
  localparam int unsigned W = 24;
  logic [W-1:0] a, b, c, y;
  logic mismatch;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] v, e, exp_y;
      v = W'($urandom);
      e = W'($urandom) | W'(1);
      a = v; b = v; c = v;
      case (i % 5)
        1: a = v ^ e;
        2: b = v ^ e;
        3: c = v ^ e;
        4: begin a = W'($urandom); b = W'($urandom); c = W'($urandom); end
        default: ;
      endcase
      #1;
      for (int k = 0; k < W; k++) exp_y[k] = (a[k] + b[k] + c[k]) >= 2;
      checks++;
      if (y !== exp_y) begin failures++; $display("FAIL vote %h %h %h -> %h", a, b, c, y); end
      checks++;
      if (mismatch != !(a == b && b == c)) begin failures++; $display("FAIL mismatch"); end
      if (i % 5 >= 1 && i % 5 <= 3) begin
        checks++;
        if (y != v) begin failures++; $display("FAIL single upset not masked"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
