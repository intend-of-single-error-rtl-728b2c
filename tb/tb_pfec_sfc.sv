// tb_pfec_sfc - the whole single fault correction unit: consistent filter
// outputs, one (or none) of the seven corrupted by a random nonzero error.
// The corrected outputs must equal the uncorrupted ones, the syndrome must
// follow the error location table, and the located position must be the
// corrupted one.
module tb_pfec_sfc;
  logic [7:0] y [4], z [3], yc [4], ygood [4];
  logic [2:0] syndrome;
  logic [6:0] err_onehot;
  logic       err;
  int checks = 0, failures = 0;

  localparam logic [2:0] TABLE [7] = '{3'b111, 3'b110, 3'b101, 3'b011,
                                       3'b100, 3'b010, 3'b001};

  pfec_sfc dut (.y(y), .z(z), .yc(yc), .syndrome(syndrome),
                .err_onehot(err_onehot), .err(err));

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
        y = ygood;
        z[0] = ygood[0] + ygood[1] + ygood[2];
        z[1] = ygood[0] + ygood[1] + ygood[3];
        z[2] = ygood[0] + ygood[2] + ygood[3];
        if (pos >= 0 && pos < 4) y[pos] = 8'(y[pos] + 1 + $urandom % 255);
        if (pos >= 4) z[pos-4] = 8'(z[pos-4] + 1 + $urandom % 255);
        #1;
        checks++;
        if (syndrome !== ((pos < 0) ? 3'b000 : TABLE[pos]) ||
            err_onehot !== ((pos < 0) ? 7'b0 : 7'(1 << pos)) || err !== (pos >= 0)) begin
          failures++;
          $display("FAIL pos=%0d syndrome=%b position=%b", pos, syndrome, err_onehot);
        end
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
