// pfec_fault_inject - fault injection point of the ECC-protected filter bank.
//
// es selects one of the seven filter modules (1..4 = original filters 1..4,
// 5..7 = redundant filters 1..3, numbered like their inputs x5..x7); the
// output of that module is XORed with FAULT_MASK, modelling a soft error in
// it. es = 0 injects nothing. Purely combinational.
//
// The document's simulation drives a 3-bit error select input ES but does not
// say what it does; this reading of it and the XOR fault model are this
// design's choice.
module pfec_fault_inject
  import ecc_pkg::*;
#(
  parameter int unsigned W          = 8,
  parameter logic [W-1:0] FAULT_MASK = '1
) (
  input  logic [2:0]   es,        // 0 = no fault, 1..7 = faulty module
  input  logic [W-1:0] y  [K],
  input  logic [W-1:0] z  [R],
  output logic [W-1:0] yf [K],
  output logic [W-1:0] zf [R]
);

  always_comb begin
    for (int i = 0; i < K; i++)
      yf[i] = (32'(es) == i + 1) ? (y[i] ^ FAULT_MASK) : y[i];
    for (int j = 0; j < R; j++)
      zf[j] = (32'(es) == K + j + 1) ? (z[j] ^ FAULT_MASK) : z[j];
  end

endmodule
