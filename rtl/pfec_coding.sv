// pfec_coding - input coding of the ECC-protected filter bank.
//
// Builds the inputs of the three redundant filters from the four original
// inputs, following the rows of the Hamming check matrix:
//   x5 = x1 + x2 + x3,  x6 = x1 + x2 + x4,  x7 = x1 + x3 + x4.
// Where the bit-level code uses XOR, the filter bank uses integer addition,
// because a linear filter maps a sum of inputs to the sum of outputs. The
// sums are W bits wide and wrap modulo 2^W, matching the filters.
//
// Purely combinational. x[0..3] = x1..x4, xr[0..2] = x5..x7. The sums are the
// document's; the modulo-2^W width is this design's choice.
module pfec_coding
  import ecc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x  [K],   // original filter inputs x1..x4
  output logic [W-1:0] xr [R]    // redundant filter inputs x5..x7
);

  always_comb begin
    for (int j = 0; j < R; j++) begin
      xr[j] = '0;
      for (int i = 0; i < K; i++)
        if (covers(j, i)) xr[j] = W'(xr[j] + x[i]);
    end
  end

endmodule
