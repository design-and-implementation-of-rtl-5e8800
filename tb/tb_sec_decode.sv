// tb_sec_decode: encodes random words, flips every single position of the
// code word in turn (data bits and check bits) and checks that the decoder
// returns the original data and raises 'corrected'; an undamaged word must
// pass unchanged with 'corrected' low. Both the 16-bit data and the 10-bit
// address code are tested.
module tb_sec_decode;
  localparam int KD = 16, RD = 5, KA = 10, RA = 4;
  logic [KD-1:0] d, d_bad, d_out;
  logic [RD-1:0] dc, dc_bad;
  logic [KA-1:0] a, a_bad, a_out;
  logic [RA-1:0] ac, ac_bad;
  logic d_corr, a_corr;
  int checks = 0, failures = 0;

  sec_encode #(.K(KD), .R(RD)) e_d (.data(d), .check(dc));
  sec_encode #(.K(KA), .R(RA)) e_a (.data(a), .check(ac));
  sec_decode #(.K(KD), .R(RD)) u_d (.data_in(d_bad), .check_in(dc_bad), .data_out(d_out), .corrected(d_corr));
  sec_decode #(.K(KA), .R(RA)) u_a (.data_in(a_bad), .check_in(ac_bad), .data_out(a_out), .corrected(a_corr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      d = 16'($urandom); a = 10'($urandom); #1;
      d_bad = d; dc_bad = dc; a_bad = a; ac_bad = ac; #1;
      check(d_out == d && !d_corr, "clean data");
      check(a_out == a && !a_corr, "clean addr");
      for (int i = 0; i < KD + RD; i++) begin
        d_bad = d; dc_bad = dc;
        if (i < KD) d_bad[i] = ~d_bad[i]; else dc_bad[i-KD] = ~dc_bad[i-KD];
        #1;
        check(d_out == d && d_corr, $sformatf("data flip %0d", i));
      end
      for (int i = 0; i < KA + RA; i++) begin
        a_bad = a; ac_bad = ac;
        if (i < KA) a_bad[i] = ~a_bad[i]; else ac_bad[i-KA] = ~ac_bad[i-KA];
        #1;
        check(a_out == a && a_corr, $sformatf("addr flip %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
