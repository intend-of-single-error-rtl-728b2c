// ecc_pkg - constants shared by the Hamming (7,4) codec and the ECC-protected
// parallel filter bank.
//
// Both designs use the same single error correcting code: k = 4 information
// elements (data bits d1..d4, or original filter outputs y1..y4) and
// n - k = 3 check elements (parity bits p1..p3, or redundant filter outputs
// z1..z3). HCOL[i] is column i+1 of the check matrix
//
//        d1 d2 d3 d4 p1 p2 p3
//   H = [ 1  1  1  0  1  0  0 ]   row 1 -> check 1
//       [ 1  1  0  1  0  1  0 ]   row 2 -> check 2
//       [ 1  0  1  1  0  0  1 ]   row 3 -> check 3
//
// packed so that bit 2 is row 1, bit 1 is row 2 and bit 0 is row 3. Read as a
// number s1 s2 s3, a column is also the syndrome that an error in that element
// produces. Element index 0..3 is d1..d4 (y1..y4), 4..6 is p1..p3 (z1..z3).
// The matrix is the one of the document; the bit packing is this design's.
package ecc_pkg;

  localparam int K = 4;             // information elements
  localparam int R = 3;             // check elements
  localparam int N = K + R;         // code length

  localparam logic [R-1:0] HCOL [N] = '{3'b111, 3'b110, 3'b101, 3'b011,
                                        3'b100, 3'b010, 3'b001};

  // Check j (0 = check 1) covers information element i when this is 1.
  function automatic logic covers(input int unsigned j, input int unsigned i);
    return HCOL[i][R-1-j];
  endfunction

endpackage
