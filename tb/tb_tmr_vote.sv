// tb_tmr_vote: exhaustive check of the 2-of-3 majority and the disagree flag
// on a 2-bit bundle.
module tb_tmr_vote;
  logic [1:0] a, b, c, y;
  logic dis;
  int checks = 0, failures = 0;

  tmr_vote #(.W(2)) dut (.a, .b, .c, .y, .disagree(dis));

  initial begin
    for (int n = 0; n < 64; n++) begin
      {a, b, c} = 6'(n); #1;
      for (int i = 0; i < 2; i++) begin
        automatic int ones = int'(a[i]) + int'(b[i]) + int'(c[i]);
        checks++;
        if (y[i] != (ones >= 2)) begin failures++; $display("FAIL y %0d", n); end
      end
      checks++;
      if (dis != !(a == b && b == c)) begin failures++; $display("FAIL dis %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
