// tb_hamming_locator - exhaustive check of the syndrome decoder against the
// error location table of the (7,4) Hamming code, written out here as
// literal values (not taken from ecc_pkg).
module tb_hamming_locator;
  import ecc_pkg::*;

  logic [2:0] syndrome;
  logic [6:0] err_onehot;
  logic       err;
  int checks = 0, failures = 0;

  hamming_locator dut (.syndrome(syndrome), .err_onehot(err_onehot), .err(err));

  // expected one-hot position for syndrome value s (s1 s2 s3 read as a number)
  function automatic logic [6:0] expected(input logic [2:0] s);
    case (s)
      3'b000: return 7'b0000000;  // no error
      3'b111: return 7'b0000001;  // d1
      3'b110: return 7'b0000010;  // d2
      3'b101: return 7'b0000100;  // d3
      3'b011: return 7'b0001000;  // d4
      3'b100: return 7'b0010000;  // p1
      3'b010: return 7'b0100000;  // p2
      default: return 7'b1000000; // 001: p3
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      syndrome = 3'(s);
      #1;
      checks++;
      if (err_onehot !== expected(3'(s)) || err !== (s != 0)) begin
        failures++;
        $display("FAIL syndrome=%b got %b/%b", syndrome, err_onehot, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
