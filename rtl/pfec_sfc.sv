// pfec_sfc - single fault correction unit of the ECC-protected filter bank.
//
// Combines the check computation (pfec_syndrome), the syndrome decoder
// (hamming_locator) and the output correction (pfec_corrector). Given the
// outputs of the four original and three redundant filters of one sample, it
// returns the four corrected outputs; any single faulty filter, original or
// redundant, is tolerated. The syndrome and the located element are brought
// out for monitoring.
//
// Purely combinational: the corrected outputs follow the filter registers in
// the same clock cycle. The split into these three parts follows the
// document; THRESH defaults to 0 (see pfec_syndrome).
module pfec_sfc
  import ecc_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned THRESH = 0
) (
  input  logic [W-1:0] y  [K],
  input  logic [W-1:0] z  [R],
  output logic [W-1:0] yc [K],
  output logic [R-1:0] syndrome,
  output logic [N-1:0] err_onehot,
  output logic         err
);

  pfec_syndrome #(.W(W), .THRESH(THRESH)) u_sc (
    .y       (y),
    .z       (z),
    .syndrome(syndrome)
  );

  hamming_locator u_eab (
    .syndrome  (syndrome),
    .err_onehot(err_onehot),
    .err       (err)
  );

  pfec_corrector #(.W(W)) u_sec (
    .y         (y),
    .z         (z),
    .err_onehot(err_onehot),
    .yc        (yc)
  );

endmodule
