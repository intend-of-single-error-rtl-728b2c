// pfec_corrector - output correction of the ECC-protected filter bank.
//
// When the locator flags original filter i as faulty, its output is rebuilt
// from the first check that covers it and the other original outputs of that
// check, all modulo 2^W:
//   y1c = z1 - y2 - y3,  y2c = z1 - y1 - y3,
//   y3c = z1 - y1 - y2,  y4c = z2 - y1 - y2.
// Outputs of filters not flagged pass unchanged, and so do all outputs when a
// redundant filter (z1..z3) is the one flagged.
//
// Purely combinational. The y1 formula is the document's; the other three
// follow the same rule, and the choice of check for each is this design's.
module pfec_corrector
  import ecc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] y  [K],        // original filter outputs y1..y4
  input  logic [W-1:0] z  [R],        // redundant filter outputs z1..z3
  input  logic [N-1:0] err_onehot,    // faulty element, from hamming_locator
  output logic [W-1:0] yc [K]         // corrected outputs yc1..yc4
);

  logic [W-1:0] rebuilt [K];

  always_comb begin
    for (int i = 0; i < K; i++) begin
      rebuilt[i] = '0;
      // take the first check that covers filter i
      for (int j = R - 1; j >= 0; j--) begin
        if (covers(j, i)) begin
          rebuilt[i] = z[j];
          for (int m = 0; m < K; m++)
            if (m != i && covers(j, m)) rebuilt[i] = W'(rebuilt[i] - y[m]);
        end
      end
      yc[i] = err_onehot[i] ? rebuilt[i] : y[i];
    end
  end

endmodule
