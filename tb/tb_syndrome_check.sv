// tb_syndrome_check: parity test of all 64 words of the 4 x 6 example code.
//
// The reference writes the four parity equations out by hand
// (v1+v2+v4, v2+v3+v5, v1+v5+v6, v3+v4+v6, with bit v-1 for node v) and
// expects valid exactly when all are even. The example codeword 0 0 1 0 1 1
// must be valid.
module tb_syndrome_check;
  logic [5:0] bits;
  logic [3:0] syndrome;
  logic valid;

  syndrome_check dut (.*);

  int checks = 0, failures = 0, n_valid = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 64; w++) begin
      logic [3:0] e;
      bits = 6'(w);
      #1;
      e[0] = bits[0] ^ bits[1] ^ bits[3];
      e[1] = bits[1] ^ bits[2] ^ bits[4];
      e[2] = bits[0] ^ bits[4] ^ bits[5];
      e[3] = bits[2] ^ bits[3] ^ bits[5];
      checks += 2;
      if (syndrome != e) begin
        failures++;
        $display("FAIL: word %b syndrome %b expected %b", bits, syndrome, e);
      end
      if (valid != (e == 0)) begin
        failures++;
        $display("FAIL: word %b valid %b", bits, valid);
      end
      if (valid) n_valid++;
    end
    bits = 6'b110100;   // nodes 1..6 = 0 0 1 0 1 1
    #1;
    checks++;
    if (!valid) begin
      failures++;
      $display("FAIL: example codeword rejected");
    end
    // H has rank 3 over GF(2), so 2^3 = 8 codewords.
    checks++;
    if (n_valid != 8) begin
      failures++;
      $display("FAIL: %0d valid words, expected 8", n_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
