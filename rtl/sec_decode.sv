// sec_decode: single-error corrector for the Hamming code of sec_encode.
//
// The check bits are recomputed from the received data (sec_encode) and XORed
// with the received check bits. The resulting syndrome is the position of a
// single flipped bit: if it names a data position that bit is inverted, if it
// names a power of two only a check bit was hit and the data pass unchanged.
// This is what lets a board be addressed correctly, and a written value be
// corrected, when one bus line is corrupted on the backplane.
//
// Purely combinational. 'corrected' flags a nonzero syndrome.
module sec_decode #(
  parameter int unsigned K = 16,
  parameter int unsigned R = mbc_pkg::sec_r(K)
) (
  input  logic [K-1:0] data_in,
  input  logic [R-1:0] check_in,
  output logic [K-1:0] data_out,
  output logic         corrected
);
  logic [R-1:0] check_calc, syndrome;

  sec_encode #(.K(K), .R(R)) u_enc (.data(data_in), .check(check_calc));

  assign syndrome  = check_calc ^ check_in;
  assign corrected = (syndrome != '0);

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

  for (genvar j = 0; j < K; j++) begin : g_fix
    localparam int unsigned POS = data_pos(j);
    assign data_out[j] = data_in[j] ^ (syndrome == R'(POS));
  end
endmodule
