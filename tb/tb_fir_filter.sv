// tb_fir_filter - drives the filter with an impulse, a constant and random
// samples and compares every output with a reference convolution computed
// here with plain integers and reduced modulo 2^W. Also checks the latency of
// one clock (the impulse response starts in the cycle after the impulse) and
// that a constant input is reproduced after NTAPS samples (unity DC gain of
// the default coefficients).
module tb_fir_filter;
  localparam int W = 8;
  localparam int NTAPS = 4;
  localparam int C [NTAPS] = '{1, 2, -1, -1};

  logic clk = 0, rst = 1;
  logic [W-1:0] x = '0, y;
  int checks = 0, failures = 0;
  int hist [NTAPS];   // hist[k] = x[n-k] of the reference model

  fir_filter dut (.clk(clk), .rst(rst), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [W-1:0] exp);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d", what, y, exp);
    end
  endtask

  // apply one sample, clock it, and compare with the reference
  task automatic step(input logic [W-1:0] v, input string what);
    int acc;
    x = v;
    for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = int'(v);
    acc = 0;
    for (int k = 0; k < NTAPS; k++) acc += C[k] * hist[k];
    @(posedge clk); #1;
    check(what, W'(acc));
  endtask

  initial begin
    foreach (hist[k]) hist[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check("after reset", '0);
    // impulse: output follows the coefficients, one clock after the input
    step(8'd1, "impulse");
    for (int k = 1; k < NTAPS + 2; k++) step(8'd0, "impulse tail");
    // constant input, as in the document's simulation: reproduced at the output
    for (int k = 0; k < NTAPS; k++) step(8'd76, "step");
    check("unity DC gain", 8'd76);
    // random samples, wrapping modulo 2^W
    for (int n = 0; n < 300; n++) step(W'($urandom), "random");
    // synchronous reset clears the delay line
    rst = 1; @(posedge clk); #1 rst = 0;
    foreach (hist[k]) hist[k] = 0;
    check("reset", '0);
    for (int n = 0; n < 20; n++) step(W'($urandom), "after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
