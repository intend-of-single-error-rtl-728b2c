// hamming74_decoder - Hamming (7,4) syndrome decoder with single error
// correction.
//
// The parity bits are recomputed from the received data bits and XORed with
// the received parity bits, giving the syndrome s = H * cw^T:
//   s1 = d1^d2^d3^p1,  s2 = d1^d2^d4^p2,  s3 = d1^d3^d4^p3.
// hamming_locator turns the syndrome into the position of the bit in error and
// that bit is inverted. Any single bit error in the 7-bit word is corrected;
// err_onehot also reports errors in the parity bits.
//
// Purely combinational. Codeword layout as in hamming74_encoder
// (cw[3:0] = d1..d4, cw[6:4] = p1..p3).
module hamming74_decoder
  import ecc_pkg::*;
(
  input  logic [N-1:0] cw,         // received codeword
  output logic [K-1:0] data,       // corrected data bits
  output logic [N-1:0] cw_fixed,   // corrected codeword
  output logic [R-1:0] syndrome,   // {s1, s2, s3}
  output logic [N-1:0] err_onehot, // bit in error, if any
  output logic         err         // an error was found
);

  always_comb begin
    for (int j = 0; j < R; j++) begin
      syndrome[R-1-j] = cw[K+j];
      for (int i = 0; i < K; i++)
        if (covers(j, i)) syndrome[R-1-j] ^= cw[i];
    end
  end

  hamming_locator u_loc (
    .syndrome  (syndrome),
    .err_onehot(err_onehot),
    .err       (err)
  );

  assign cw_fixed = cw ^ err_onehot;
  assign data     = cw_fixed[K-1:0];

endmodule
