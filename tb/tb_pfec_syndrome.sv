// tb_pfec_syndrome - builds consistent filter outputs (z1 = y1+y2+y3,
// z2 = y1+y2+y4, z3 = y1+y3+y4 modulo 256), adds an error to none or one of
// the seven values and compares the syndrome with the error location table
// written out here. A second instance with a threshold of 3 must ignore
// errors of magnitude 1..3 and flag larger ones, including -128.
module tb_pfec_syndrome;
  logic [7:0] y [4], z [3];
  logic [2:0] syndrome, syndrome_t;
  int checks = 0, failures = 0;

  // syndrome {s1,s2,s3} caused by an error on y1..y4, z1..z3
  localparam logic [2:0] TABLE [7] = '{3'b111, 3'b110, 3'b101, 3'b011,
                                       3'b100, 3'b010, 3'b001};

  pfec_syndrome dut (.y(y), .z(z), .syndrome(syndrome));
  pfec_syndrome #(.W(8), .THRESH(3)) dut_t (.y(y), .z(z), .syndrome(syndrome_t));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int pos, input int delta);
    foreach (y[i]) y[i] = 8'($urandom);
    z[0] = y[0] + y[1] + y[2];
    z[1] = y[0] + y[1] + y[3];
    z[2] = y[0] + y[2] + y[3];
    if (pos >= 0 && pos < 4) y[pos] = 8'(y[pos] + delta);
    if (pos >= 4) z[pos-4] = 8'(z[pos-4] + delta);
  endtask

  initial begin
    int delta;
    for (int n = 0; n < 200; n++) begin
      for (int pos = -1; pos < 7; pos++) begin
        delta = 1 + ($urandom % 255);            // any nonzero error
        load(pos, delta);
        #1;
        checks++;
        if (syndrome !== ((pos < 0) ? 3'b000 : TABLE[pos])) begin
          failures++;
          $display("FAIL pos=%0d delta=%0d syndrome=%b", pos, delta, syndrome);
        end
        // threshold instance
        delta = 1 + ($urandom % 3);
        if ($urandom % 2) delta = -delta;
        load(pos, delta);
        #1;
        checks++;
        if (syndrome_t !== 3'b000) begin
          failures++;
          $display("FAIL small error flagged pos=%0d delta=%0d", pos, delta);
        end
        delta = (n == 0) ? 128 : 4 + ($urandom % 121);
        if (n != 0 && $urandom % 2) delta = -delta;
        load(pos, delta);
        #1;
        checks++;
        if (syndrome_t !== ((pos < 0) ? 3'b000 : TABLE[pos])) begin
          failures++;
          $display("FAIL large error missed pos=%0d delta=%0d syndrome=%b", pos, delta, syndrome_t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
