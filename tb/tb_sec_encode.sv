// tb_sec_encode: checks the check-bit generator for the 16-bit data and the
// 10-bit address code. Each code word is assembled position by position
// (check bits at powers of two, data bits in order in between) and must have
// the Hamming property: the XOR of the positions of all its one bits is zero.
// A few hand-worked vectors are checked as well.
module tb_sec_encode;
  localparam int KD = 16, RD = 5, KA = 10, RA = 4;
  logic [KD-1:0] d;
  logic [RD-1:0] dc;
  logic [KA-1:0] a;
  logic [RA-1:0] ac;
  int checks = 0, failures = 0;

  sec_encode #(.K(KD), .R(RD)) u_d (.data(d), .check(dc));
  sec_encode #(.K(KA), .R(RA)) u_a (.data(a), .check(ac));

  function automatic int syn(input logic [31:0] data, input int k,
                             input logic [7:0] chk, input int r);
    int s = 0, j = 0;
    for (int p = 1; p <= k + r; p++) begin
      bit isp = (p & (p - 1)) == 0;
      bit v;
      if (isp) v = chk[$clog2(p)];
      else begin v = data[j]; j++; end
      if (v) s ^= p;
    end
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    // hand-worked: data bit 0 sits at position 3 -> check bits 1 and 2
    d = 16'h0001; a = 10'h001; #1;
    check(dc == 5'b00011, "d0");
    check(ac == 4'b0011, "a0");
    // data bit 1 at position 5 -> check bits 1 and 4
    d = 16'h0002; a = 10'h002; #1;
    check(dc == 5'b00101, "d1");
    check(ac == 4'b0101, "a1");
    // top data bit of 16 sits at position 21 = 10101b
    d = 16'h8000; #1;
    check(dc == 5'b10101, "d15");
    d = 16'h0000; a = 10'h000; #1;
    check(dc == 0 && ac == 0, "zero");
    for (int n = 0; n < 2000; n++) begin
      d = 16'($urandom); a = 10'($urandom); #1;
      check(syn(32'(d), KD, 8'(dc), RD) == 0, "data code word");
      check(syn(32'(a), KA, 8'(ac), RA) == 0, "address code word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
