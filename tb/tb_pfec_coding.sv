// tb_pfec_coding - random inputs; the three redundant inputs must equal
// x1+x2+x3, x1+x2+x4 and x1+x3+x4 modulo 256, computed here directly.
module tb_pfec_coding;
  logic [7:0] x [4];
  logic [7:0] xr [3];
  int checks = 0, failures = 0;

  pfec_coding dut (.x(x), .xr(xr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e5, e6, e7;
    for (int n = 0; n < 500; n++) begin
      foreach (x[i]) x[i] = 8'($urandom);
      if (n == 0) begin x[0] = 76; x[1] = 34; x[2] = 45; x[3] = 54; end
      e5 = (x[0] + x[1] + x[2]) % 256;
      e6 = (x[0] + x[1] + x[3]) % 256;
      e7 = (x[0] + x[2] + x[3]) % 256;
      #1;
      checks++;
      if (xr[0] != e5 || xr[1] != e6 || xr[2] != e7) begin
        failures++;
        $display("FAIL x=%0d %0d %0d %0d -> %0d %0d %0d", x[0], x[1], x[2], x[3], xr[0], xr[1], xr[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
