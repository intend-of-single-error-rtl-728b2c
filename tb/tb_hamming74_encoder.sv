// tb_hamming74_encoder - checks all 16 data words against the generator
// matrix G = [I | P], evaluated here as a row-vector times matrix product
// over GF(2) with G written out as literal rows.
module tb_hamming74_encoder;
  logic [3:0] data;
  logic [6:0] cw;
  int checks = 0, failures = 0;

  // rows of G, column 1 (d1) in bit 0
  localparam logic [6:0] GROW [4] = '{7'b1110001,   // d1: p1 p2 p3 set
                                     7'b0110010,   // d2: p1 p2
                                     7'b1010100,   // d3: p1 p3
                                     7'b1101000};  // d4: p2 p3

  hamming74_encoder dut (.data(data), .cw(cw));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] exp_cw;
    for (int v = 0; v < 16; v++) begin
      data = 4'(v);
      exp_cw = '0;
      for (int r = 0; r < 4; r++) if (data[r]) exp_cw ^= GROW[r];
      #1;
      checks++;
      if (cw !== exp_cw) begin
        failures++;
        $display("FAIL data=%b cw=%b expected %b", data, cw, exp_cw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
