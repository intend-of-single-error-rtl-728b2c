// tb_pfec_fault_inject - for every select value 0..7, exactly the selected
// module output (1..4 = y1..y4, 5..7 = z1..z3) must be inverted, all others
// unchanged; select 0 changes nothing.
module tb_pfec_fault_inject;
  logic [2:0] es;
  logic [7:0] y [4], z [3], yf [4], zf [3];
  int checks = 0, failures = 0;

  pfec_fault_inject dut (.es(es), .y(y), .z(z), .yf(yf), .zf(zf));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] all_in [7], all_out [7];
    for (int n = 0; n < 20; n++) begin
      for (int s = 0; s < 8; s++) begin
        foreach (y[i]) y[i] = 8'($urandom);
        foreach (z[j]) z[j] = 8'($urandom);
        es = 3'(s);
        #1;
        for (int i = 0; i < 4; i++) begin all_in[i] = y[i]; all_out[i] = yf[i]; end
        for (int j = 0; j < 3; j++) begin all_in[4+j] = z[j]; all_out[4+j] = zf[j]; end
        for (int m = 0; m < 7; m++) begin
          checks++;
          if (all_out[m] !== ((s == m + 1) ? ~all_in[m] : all_in[m])) begin
            failures++;
            $display("FAIL es=%0d module %0d in=%h out=%h", s, m + 1, all_in[m], all_out[m]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
