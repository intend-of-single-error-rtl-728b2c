// fir_filter - one filter module "H" of the protected filter bank.
//
// A direct-form FIR filter: y[n] = sum_k COEFFS[k] * x[n-k]. The delay line
// holds the last NTAPS-1 input samples; the sum over the current input and the
// delay line is registered, so y shows the response to the sample presented at
// a clock edge right after that edge (latency 1 clock, one sample per clock).
//
// All arithmetic is modulo 2^W: the products and the sum are cut to W bits.
// This keeps the filter exactly linear over W-bit wrap-around integers, which
// is what the error correction around it relies on: the filter of a sum of
// inputs equals the sum of the filtered inputs, bit for bit, so the checks
// need no tolerance for rounding.
//
// The document gives neither the filter structure nor its coefficients; it
// only requires that all copies have the same response and are linear. The
// default coefficients (sum 1, unity gain at DC) are this design's choice, so
// that a constant input is reproduced at the output after NTAPS clocks.
// Reset is synchronous, active high, and clears the delay line and output.
// NTAPS must be at least 2.
module fir_filter #(
  parameter int unsigned W      = 8,
  parameter int unsigned NTAPS  = 4,
  parameter int          COEFFS [NTAPS] = '{1, 2, -1, -1}
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic [W-1:0] taps [NTAPS];   // taps[0] = x[n], taps[k] = x[n-k]
  logic [W-1:0] dline [NTAPS-1]; // registered past samples, dline[k] = x[n-1-k]
  logic [W-1:0] acc;

  if (NTAPS < 2) begin : g_bad_ntaps
    $error("fir_filter: NTAPS must be at least 2");
  end

  always_comb begin
    taps[0] = x;
    for (int k = 1; k < NTAPS; k++) taps[k] = dline[k-1];
    acc = '0;
    for (int k = 0; k < NTAPS; k++)
      acc = W'(acc + W'(COEFFS[k]) * taps[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS - 1; k++) dline[k] <= '0;
      y <= '0;
    end else begin
      dline[0] <= x;
      for (int k = 1; k < NTAPS - 1; k++) dline[k] <= dline[k-1];
      y <= acc;
    end
  end

endmodule
