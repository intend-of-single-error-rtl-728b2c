// hamming74_encoder - Hamming (7,4) single error correcting encoder.
//
// Computes the three parity bits as XORs of the data bits, as given by the
// generator matrix G = [I | P]:
//   p1 = d1 ^ d2 ^ d3,  p2 = d1 ^ d2 ^ d4,  p3 = d1 ^ d3 ^ d4.
// The codeword is systematic: cw[3:0] = data, cw[6:4] = {p3, p2, p1}, so cw[i]
// is column i+1 of G (d1 in bit 0). Purely combinational.
// The equations are the document's; the bit ordering is this design's.
module hamming74_encoder
  import ecc_pkg::*;
(
  input  logic [K-1:0] data,   // data[0] = d1 ... data[3] = d4
  output logic [N-1:0] cw      // cw[0] = d1 ... cw[3] = d4, cw[4] = p1 ... cw[6] = p3
);

  always_comb begin
    cw[K-1:0] = data;
    for (int j = 0; j < R; j++) begin
      cw[K+j] = 1'b0;
      for (int i = 0; i < K; i++)
        if (covers(j, i)) cw[K+j] ^= data[i];
    end
  end

endmodule
