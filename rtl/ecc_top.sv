// ecc_top - error correcting codes applied at two levels: four parallel
// filters protected by three redundant filters, and a bit-level Hamming (7,4)
// codec.
//
// Filter bank. DataA..DataD feed four identical filters (y1..y4). The coding
// stage forms x5 = A+B+C, x6 = A+B+D, x7 = A+C+D, which feed three more copies
// of the same filter (z1..z3). Because the filters are linear, a fault-free
// bank satisfies z1 = y1+y2+y3, z2 = y1+y2+y4, z3 = y1+y3+y4. The single fault
// correction unit checks these three equations, reads the pattern of failed
// checks as a Hamming syndrome, and rebuilds the output of a faulty original
// filter from a redundant one (for example y1 = z1 - y2 - y3). Any one faulty
// filter of the seven is corrected, at the cost of three extra filters for
// four. ES selects a filter whose output is corrupted (XOR with FAULT_MASK),
// so the correction can be exercised; ES = 0 injects nothing.
//
// Timing: one sample per clock on all four channels. The filters register
// their outputs; the checks and the correction are combinational after those
// registers, so YC1..YC4 show the corrected response to a sample one clock
// after the sample is taken, and a fault selected with ES is corrected in the
// same cycle. Reset is synchronous and active high.
//
// Hamming codec. ham_data_in is encoded into ham_cw_out; ham_cw_in is decoded
// with single-bit correction into ham_data_out (corrected word ham_cw_fixed,
// flipped bit ham_err_pos). Both are combinational and
// independent of the filter bank; they share its check matrix (ecc_pkg).
//
// The structure, the coding sums and the correction rule are the document's.
// The 8-bit width and port names of the filter bank follow its simulation.
// The filter response, the fault model, the monitoring outputs (Syndrome,
// ErrorFlag) and the codec ports are this design's choices.
module ecc_top
  import ecc_pkg::*;
#(
  parameter int unsigned  W          = 8,
  parameter int unsigned  NTAPS      = 4,
  parameter int           COEFFS [NTAPS] = '{1, 2, -1, -1},
  parameter int unsigned  THRESH     = 0,
  parameter logic [W-1:0] FAULT_MASK = '1
) (
  input  logic         Clock,
  input  logic         Reset,
  input  logic [W-1:0] DataA,
  input  logic [W-1:0] DataB,
  input  logic [W-1:0] DataC,
  input  logic [W-1:0] DataD,
  input  logic [2:0]   ES,          // fault injection select, 0 = none
  output logic [W-1:0] YC1,
  output logic [W-1:0] YC2,
  output logic [W-1:0] YC3,
  output logic [W-1:0] YC4,
  output logic [R-1:0] Syndrome,    // {s1, s2, s3} of the filter checks
  output logic         ErrorFlag,   // a faulty filter was found this cycle
  output logic [N-1:0] ErrorPos,    // one-hot faulty filter: y1..y4, z1..z3
  // bit-level Hamming (7,4) codec
  input  logic [K-1:0] ham_data_in,
  output logic [N-1:0] ham_cw_out,
  input  logic [N-1:0] ham_cw_in,
  output logic [K-1:0] ham_data_out,
  output logic [R-1:0] ham_syndrome,
  output logic [N-1:0] ham_cw_fixed,
  output logic [N-1:0] ham_err_pos,
  output logic         ham_err
);

  // ---------------- filter bank ----------------
  logic [W-1:0] x   [K];
  logic [W-1:0] xr  [R];
  logic [W-1:0] y   [K];
  logic [W-1:0] z   [R];
  logic [W-1:0] yf  [K];
  logic [W-1:0] zf  [R];
  logic [W-1:0] yc  [K];

  assign x[0] = DataA;
  assign x[1] = DataB;
  assign x[2] = DataC;
  assign x[3] = DataD;

  pfec_coding #(.W(W)) u_coding (
    .x (x),
    .xr(xr)
  );

  for (genvar i = 0; i < K; i++) begin : g_orig
    fir_filter #(.W(W), .NTAPS(NTAPS), .COEFFS(COEFFS)) u_h (
      .clk(Clock),
      .rst(Reset),
      .x  (x[i]),
      .y  (y[i])
    );
  end

  for (genvar j = 0; j < R; j++) begin : g_red
    fir_filter #(.W(W), .NTAPS(NTAPS), .COEFFS(COEFFS)) u_h (
      .clk(Clock),
      .rst(Reset),
      .x  (xr[j]),
      .y  (z[j])
    );
  end

  pfec_fault_inject #(.W(W), .FAULT_MASK(FAULT_MASK)) u_inject (
    .es(ES),
    .y (y),
    .z (z),
    .yf(yf),
    .zf(zf)
  );

  pfec_sfc #(.W(W), .THRESH(THRESH)) u_sfc (
    .y         (yf),
    .z         (zf),
    .yc        (yc),
    .syndrome  (Syndrome),
    .err_onehot(ErrorPos),
    .err       (ErrorFlag)
  );

  assign YC1 = yc[0];
  assign YC2 = yc[1];
  assign YC3 = yc[2];
  assign YC4 = yc[3];

  // ---------------- Hamming (7,4) codec ----------------
  hamming74_encoder u_enc (
    .data(ham_data_in),
    .cw  (ham_cw_out)
  );

  hamming74_decoder u_dec (
    .cw        (ham_cw_in),
    .data      (ham_data_out),
    .cw_fixed  (ham_cw_fixed),
    .syndrome  (ham_syndrome),
    .err_onehot(ham_err_pos),
    .err       (ham_err)
  );

endmodule
