// pfec_syndrome - check computation of the ECC-protected filter bank.
//
// Each redundant filter output z_j is compared with the sum of the original
// outputs it covers:
//   check 1: z1 - (y1 + y2 + y3),  check 2: z2 - (y1 + y2 + y4),
//   check 3: z3 - (y1 + y3 + y4).
// A check whose difference is larger in magnitude than THRESH gives a 1 in the
// syndrome, otherwise a 0, so the syndrome reads like that of the bit-level
// Hamming code. The difference is taken modulo 2^W and read as a signed W-bit
// number before its magnitude is compared.
//
// The threshold exists for filters whose finite precision makes the check
// differ slightly from zero. The filters of this design are exactly linear
// modulo 2^W, so THRESH defaults to 0 (any difference is an error).
// Purely combinational. syndrome = {s1, s2, s3}.
module pfec_syndrome
  import ecc_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned THRESH = 0
) (
  input  logic [W-1:0] y [K],        // original filter outputs y1..y4
  input  logic [W-1:0] z [R],        // redundant filter outputs z1..z3
  output logic [R-1:0] syndrome      // {s1, s2, s3}
);

  logic [W-1:0] sum  [R];
  logic [W-1:0] diff [R];
  logic [W-1:0] mag  [R];

  always_comb begin
    for (int j = 0; j < R; j++) begin
      sum[j] = '0;
      for (int i = 0; i < K; i++)
        if (covers(j, i)) sum[j] = W'(sum[j] + y[i]);
      diff[j] = W'(z[j] - sum[j]);
      mag[j]  = diff[j][W-1] ? W'(-diff[j]) : diff[j];
      // mag is read unsigned, so -2^(W-1) gives 2^(W-1) as it should
      syndrome[R-1-j] = ({1'b0, mag[j]} > (W+1)'(THRESH));
    end
  end

endmodule
