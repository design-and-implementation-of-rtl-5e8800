// sec_ref_pkg: reference Hamming check-bit computation for the testbenches,
// written independently of the RTL encoder. The code word is laid out
// position by position (check bits at powers of two, data bits in order in
// between); check bit i is then chosen so that the XOR of the positions of
// all one bits is zero.
package sec_ref_pkg;
  function automatic logic [7:0] sec_chk(input logic [31:0] data, input int k, input int r);
    int s = 0, j = 0;
    for (int p = 1; p <= k + r; p++) begin
      if ((p & (p - 1)) != 0) begin
        if (data[j]) s ^= p;
        j++;
      end
    end
    return 8'(s);
  endfunction
endpackage
