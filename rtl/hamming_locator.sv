// hamming_locator - syndrome to error position decoder of the (7,4) Hamming
// code.
//
// The three syndrome bits {s1,s2,s3} are compared with every column of the
// check matrix (ecc_pkg::HCOL); the element whose column equals the syndrome
// is the one in error. err_onehot has bit i set for element i (0..3 = data /
// original filters 1..4, 4..6 = parity / redundant filters 1..3). A zero
// syndrome sets no bit and clears err. Since every nonzero 3-bit value is a
// column, err is simply the OR of the syndrome bits.
//
// Purely combinational. The table follows the document's error location
// table; the one-hot output format is this design's choice.
module hamming_locator
  import ecc_pkg::*;
(
  input  logic [R-1:0] syndrome,    // {s1, s2, s3}
  output logic [N-1:0] err_onehot,  // one-hot position of the faulty element
  output logic         err          // syndrome is nonzero
);

  always_comb begin
    for (int i = 0; i < N; i++)
      err_onehot[i] = (syndrome == HCOL[i]);
    err = |syndrome;
  end

endmodule
