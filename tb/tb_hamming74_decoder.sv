// tb_hamming74_decoder - for every data word, encodes it with the literal
// parity equations p1 = d1^d2^d3, p2 = d1^d2^d4, p3 = d1^d3^d4, then passes
// the codeword through a model channel that flips no bit or any one of the
// seven bits. The decoder must return the original data and codeword, and
// flag exactly the flipped bit.
module tb_hamming74_decoder;
  logic [6:0] cw, cw_fixed, err_onehot;
  logic [3:0] data;
  logic [2:0] syndrome;
  logic       err;
  int checks = 0, failures = 0;

  hamming74_decoder dut (.cw(cw), .data(data), .cw_fixed(cw_fixed),
                         .syndrome(syndrome), .err_onehot(err_onehot), .err(err));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] d;
    logic [6:0] good, flip;
    for (int v = 0; v < 16; v++) begin
      d = 4'(v);
      good = {d[0]^d[2]^d[3], d[0]^d[1]^d[3], d[0]^d[1]^d[2], d};
      for (int e = -1; e < 7; e++) begin
        flip = (e < 0) ? 7'b0 : 7'(1 << e);
        cw = good ^ flip;            // channel: at most one bit flipped
        #1;
        checks++;
        if (data !== d || cw_fixed !== good || err_onehot !== flip || err !== (e >= 0)) begin
          failures++;
          $display("FAIL d=%b flip=%b got data=%b fixed=%b pos=%b s=%b", d, flip, data, cw_fixed, err_onehot, syndrome);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
