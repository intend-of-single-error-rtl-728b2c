// tb_ecc_top - end-to-end test of the whole design at its default parameters.
//
// Filter bank:
//  1. Reset, then the four constant inputs 76, 34, 45, 54. Once the filters
//     have filled, the corrected outputs must equal the inputs (unity DC gain)
//     while ES steps through 0, 1, 2, 4, 6, 3, 5, 7, i.e. with no fault and with
//     a fault in each of the seven filter modules in turn.
//  2. Random samples on all four channels with a random ES every clock. Each
//     output is compared with a reference FIR computed here from the sample
//     history; the comparison is made one clock after the sample (the latency
//     of the filters). Syndrome, ErrorFlag and ErrorPos are checked against
//     the error location table written out here.
// Hamming codec: every data word through encoder, a channel flipping none or
// one bit, and decoder.
// Mechanisms counted (each must occur): reset, fault-free cycles, a corrected
// fault in each of the 7 filter modules, codec correction of each of the 7
// codeword bits, codec words without error.
module tb_ecc_top;
  localparam int W = 8;
  localparam int NTAPS = 4;
  localparam int C [NTAPS] = '{1, 2, -1, -1};
  localparam logic [2:0] TABLE [7] = '{3'b111, 3'b110, 3'b101, 3'b011,
                                       3'b100, 3'b010, 3'b001};

  logic Clock = 0, Reset = 1;
  logic [7:0] DataA = 0, DataB = 0, DataC = 0, DataD = 0;
  logic [2:0] ES = 0;
  logic [7:0] YC1, YC2, YC3, YC4;
  logic [2:0] Syndrome;
  logic       ErrorFlag;
  logic [6:0] ErrorPos;
  logic [3:0] ham_data_in = 0, ham_data_out;
  logic [6:0] ham_cw_out, ham_cw_in = 0, ham_cw_fixed, ham_err_pos;
  logic [2:0] ham_syndrome;
  logic       ham_err;

  int checks = 0, failures = 0;
  int n_reset = 0, n_clean = 0, n_ham_clean = 0;
  int n_fixed [8];      // corrected faults per ES value
  int n_ham_fixed [7];  // codec corrections per bit
  int hist [4][NTAPS];  // reference sample history per channel

  ecc_top dut (.*);

  always #5 Clock = ~Clock;

  initial begin
    repeat (20000) @(posedge Clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_out(input int ch);
    int acc = 0;
    for (int k = 0; k < NTAPS; k++) acc += C[k] * hist[ch][k];
    return 8'(acc);
  endfunction

  // Present samples and ES, clock them in, then check the outputs.
  task automatic cycle(input logic [7:0] a, b, c, d, input logic [2:0] es);
    logic [7:0] v [4];
    logic [7:0] got [4];
    v = '{a, b, c, d};
    DataA = a; DataB = b; DataC = c; DataD = d; ES = es;
    for (int ch = 0; ch < 4; ch++) begin
      for (int k = NTAPS - 1; k > 0; k--) hist[ch][k] = hist[ch][k-1];
      hist[ch][0] = int'(v[ch]);
    end
    @(posedge Clock); #1;
    got = '{YC1, YC2, YC3, YC4};
    for (int ch = 0; ch < 4; ch++) begin
      checks++;
      if (got[ch] !== ref_out(ch)) begin
        failures++;
        $display("FAIL t=%0t ES=%0d YC%0d=%0d expected %0d", $time, es, ch + 1, got[ch], ref_out(ch));
      end
    end
    checks++;
    if (Syndrome !== ((es == 0) ? 3'b000 : TABLE[es-1]) || ErrorFlag !== (es != 0) ||
        ErrorPos !== ((es == 0) ? 7'b0 : 7'(1 << (es - 1)))) begin
      failures++;
      $display("FAIL t=%0t ES=%0d Syndrome=%b ErrorPos=%b", $time, es, Syndrome, ErrorPos);
    end else if (es == 0) n_clean++;
    else n_fixed[es]++;
  endtask

  initial begin
    int order [8] = '{0, 1, 2, 4, 6, 3, 5, 7};
    foreach (hist[i, k]) hist[i][k] = 0;
    foreach (n_fixed[i]) n_fixed[i] = 0;
    foreach (n_ham_fixed[i]) n_ham_fixed[i] = 0;

    // reset
    repeat (3) @(posedge Clock);
    #1 Reset = 0;
    checks++;
    if ({YC1, YC2, YC3, YC4} !== '0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end else n_reset++;

    // 1. constant inputs, ES stepping through all values
    for (int k = 0; k < NTAPS; k++) cycle(76, 34, 45, 54, 0);
    foreach (order[s]) begin
      for (int r = 0; r < 10; r++) begin
        cycle(76, 34, 45, 54, 3'(order[s]));
        checks++;
        if (YC1 != 76 || YC2 != 34 || YC3 != 45 || YC4 != 54) begin
          failures++;
          $display("FAIL constant input not reproduced with ES=%0d", order[s]);
        end
      end
    end

    // 2. random samples and faults
    for (int n = 0; n < 4000; n++)
      cycle(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 3'($urandom));

    // reset in the middle of a stream
    Reset = 1; @(posedge Clock); #1 Reset = 0;
    foreach (hist[i, k]) hist[i][k] = 0;
    checks++;
    if ({YC1, YC2, YC3, YC4} !== '0) begin
      failures++;
      $display("FAIL outputs not cleared by second reset");
    end else n_reset++;
    for (int n = 0; n < 100; n++)
      cycle(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 3'($urandom));

    // Hamming codec
    for (int v = 0; v < 16; v++) begin
      for (int e = -1; e < 7; e++) begin
        logic [6:0] flip;
        flip = (e < 0) ? 7'b0 : 7'(1 << e);
        ham_data_in = 4'(v);
        #1 ham_cw_in = ham_cw_out ^ flip;
        #1;
        checks++;
        if (ham_data_out !== 4'(v) || ham_err_pos !== flip || ham_err !== (e >= 0) ||
            ham_cw_fixed !== ham_cw_out) begin
          failures++;
          $display("FAIL codec data=%0d flip=%b out=%0d", v, flip, ham_data_out);
        end else if (e < 0) n_ham_clean++;
        else n_ham_fixed[e]++;
      end
    end

    // every mechanism must have happened
    checks++;
    if (n_reset < 2 || n_clean == 0 || n_ham_clean == 0) begin
      failures++;
      $display("FAIL mechanism missing: reset=%0d clean=%0d ham_clean=%0d", n_reset, n_clean, n_ham_clean);
    end
    for (int s = 1; s < 8; s++) begin
      checks++;
      if (n_fixed[s] == 0) begin
        failures++;
        $display("FAIL no corrected fault in module %0d", s);
      end
    end
    for (int b = 0; b < 7; b++) begin
      checks++;
      if (n_ham_fixed[b] == 0) begin
        failures++;
        $display("FAIL no codec correction of bit %0d", b);
      end
    end
    $display("resets=%0d fault-free cycles=%0d corrected faults per module y1..y4,z1..z3: %0d %0d %0d %0d %0d %0d %0d",
             n_reset, n_clean, n_fixed[1], n_fixed[2], n_fixed[3], n_fixed[4], n_fixed[5], n_fixed[6], n_fixed[7]);
    $display("codec: clean words=%0d corrected bits %0d %0d %0d %0d %0d %0d %0d", n_ham_clean,
             n_ham_fixed[0], n_ham_fixed[1], n_ham_fixed[2], n_ham_fixed[3], n_ham_fixed[4], n_ham_fixed[5], n_ham_fixed[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
