// sec_encode: check-bit generator of a Hamming single-error-correcting code,
// used on both sides of the I/O bus for the address and for the data.
//
// Code words are numbered from position 1; check bits sit at the power-of-two
// positions and the K data bits fill the other positions in ascending order.
// Check bit i is the parity of every data bit whose position has bit i set, so
// each check bit is an independent XOR tree and all are formed in parallel, as
// the document asks of the check-bit logic. The choice of a Hamming code and
// of this bit order is this design's own; the document says only "check bits
// for single bit error correction".
//
// Purely combinational, no clock.
module sec_encode #(
  parameter int unsigned K = 16,
  parameter int unsigned R = mbc_pkg::sec_r(K)
) (
  input  logic [K-1:0] data,
  output logic [R-1:0] check
);
  // Position (1-based) in the code word of each data bit.
  function automatic int unsigned data_pos(input int unsigned j);
    int unsigned p, n;
    p = 0;
    n = 0;
    for (int unsigned q = 1; q < 2 * (K + R + 1); q++) begin
      if ((q & (q - 1)) != 0) begin
        if (n == j) begin
          p = q;
          break;
        end
        n++;
      end
    end
    return p;
  endfunction

  for (genvar i = 0; i < R; i++) begin : g_chk
    logic [K-1:0] mask;
    for (genvar j = 0; j < K; j++) begin : g_m
      assign mask[j] = ((data_pos(j) >> i) & 1) != 0;
    end
    assign check[i] = ^(data & mask);
  end
endmodule
