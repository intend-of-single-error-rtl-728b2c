// tb_pfec_corrector - consistent filter outputs with one value corrupted and
// the matching one-hot position applied: the corrected outputs must equal the
// uncorrupted y1..y4. With no position flagged, or a redundant output
// flagged, the outputs pass unchanged.
module tb_pfec_corrector;
  logic [7:0] y [4], z [3], yc [4], ygood [4];
  logic [6:0] err_onehot;
  int checks = 0, failures = 0;

  pfec_corrector dut (.y(y), .z(z), .err_onehot(err_onehot), .yc(yc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int pos = -1; pos < 7; pos++) begin
        foreach (ygood[i]) ygood[i] = 8'($urandom);
        if (n == 0) begin ygood[0] = 76; ygood[1] = 34; ygood[2] = 45; ygood[3] = 54; end
        y = ygood;
        z[0] = ygood[0] + ygood[1] + ygood[2];
        z[1] = ygood[0] + ygood[1] + ygood[3];
        z[2] = ygood[0] + ygood[2] + ygood[3];
        if (pos >= 0 && pos < 4) y[pos] = y[pos] ^ 8'(1 + $urandom % 255);
        if (pos >= 4) z[pos-4] = z[pos-4] ^ 8'(1 + $urandom % 255);
        err_onehot = (pos < 0) ? 7'b0 : 7'(1 << pos);
        #1;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (yc[i] !== ygood[i]) begin
            failures++;
            $display("FAIL pos=%0d yc%0d=%0d expected %0d", pos, i + 1, yc[i], ygood[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
