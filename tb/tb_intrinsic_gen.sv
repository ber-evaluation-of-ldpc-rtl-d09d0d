// tb_intrinsic_gen: intrinsic message scaling, exhaustively.
//
// Every 8-bit sample y must give Iv = 4 * 0.75 * y = 3y, saturated to the
// symmetric 10-bit range +-511. The worked example's y = -0.1 (-3/32)
// gives r1 = -0.3 (about -9/32). A second instance with alpha = 1/2 checks
// the general scaling floor(4 * ALPHA_NUM * y / 2^ALPHA_SHIFT) = 2y, and a
// third with 8-bit messages checks saturation to +-127.
module tb_intrinsic_gen;
  logic signed [7:0] y;
  logic signed [9:0] iv, iv_half;
  logic signed [7:0] iv_narrow;

  intrinsic_gen #(.Y_W(8), .W(10), .ALPHA_NUM(3), .ALPHA_SHIFT(2)) dut (.y, .iv);
  intrinsic_gen #(.Y_W(8), .W(10), .ALPHA_NUM(1), .ALPHA_SHIFT(1)) dut_half (.y, .iv(iv_half));
  intrinsic_gen #(.Y_W(8), .W(8), .ALPHA_NUM(3), .ALPHA_SHIFT(2)) dut_narrow (.y, .iv(iv_narrow));

  int checks = 0, failures = 0, n_sat = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -128; k < 128; k++) begin
      int e;
      y = 8'(k);
      #1;
      e = 3 * k;
      checks += 3;
      if (int'(iv_narrow) != (e > 127 ? 127 : (e < -127 ? -127 : e))) begin
        failures++;
        $display("FAIL: 8-bit y=%0d iv=%0d", k, iv_narrow);
      end
      if (e > 127 || e < -127) n_sat++;
      if (int'(iv) != e) begin
        failures++;
        $display("FAIL: y=%0d iv=%0d expected %0d", k, iv, e);
      end
      if (int'(iv_half) != 2 * k) begin
        failures++;
        $display("FAIL: alpha=1/2 y=%0d iv=%0d expected %0d", k, iv_half, 2 * k);
      end
    end
    y = -8'sd3;
    #1;
    checks++;
    if (iv != -10'sd9) begin
      failures++;
      $display("FAIL: example r1 = %0d", iv);
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
