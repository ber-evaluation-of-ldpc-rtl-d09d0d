// tb_cnu: check node unit against a brute-force reference.
//
// For every output n on the check, the reference takes the sign product and
// the minimum magnitude over all other inputs directly, with no min1/min2
// shortcut. Covered: the four rows of the worked example (R values from its
// hand calculation, in 1/32 units), random masks and values including ties,
// zeros and full-scale magnitudes, and 0 outputs off the mask.
module tb_cnu;
  localparam int N = 6;
  localparam int W = 10;
  localparam int MAXV = (1 << (W - 1)) - 1;

  logic [N-1:0] mask;
  logic signed [W-1:0] l_in [N];
  logic signed [W-1:0] r_out [N];

  cnu #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input string tag);
    for (int n = 0; n < N; n++) begin
      int exp_v;
      exp_v = 0;
      if (mask[n]) begin
        bit neg;
        int mn;
        neg = 0;
        mn = MAXV;
        for (int k = 0; k < N; k++)
          if (k != n && mask[k]) begin
            int a;
            a = l_in[k] < 0 ? -int'(l_in[k]) : int'(l_in[k]);
            if (l_in[k] < 0) neg = !neg;
            if (a < mn) mn = a;
          end
        exp_v = neg ? -mn : mn;
      end
      checks++;
      if (int'(r_out[n]) != exp_v) begin
        failures++;
        $display("FAIL %s: mask=%b n=%0d got %0d expected %0d", tag, mask, n, r_out[n], exp_v);
      end
    end
  endtask

  // Worked example, 1/32 units: L = r (intrinsic), R from the hand calculation.
  int ex_l [N];
  int ex_mask [4];
  int ex_r [4][N];

  initial begin
    ex_l = '{-10, 48, -77, 96, -67, -48};   // -0.3 1.5 -2.4 3 -2.1 -1.5
    ex_mask = '{6'b001011, 6'b010110, 6'b110001, 6'b101100};
    ex_r = '{'{48, -10, 0, -10, 0, 0},
             '{0, 67, -48, 0, -48, 0},
             '{48, 0, 0, 0, 10, 10},
             '{0, 0, -48, 48, 0, -77}};
    for (int c = 0; c < 4; c++) begin
      mask = N'(ex_mask[c]);
      for (int n = 0; n < N; n++) l_in[n] = mask[n] ? W'(ex_l[n]) : W'($urandom);
      #1;
      for (int n = 0; n < N; n++) begin
        checks++;
        if (int'(r_out[n]) != ex_r[c][n]) begin
          failures++;
          $display("FAIL example R%0d%0d got %0d expected %0d", c+1, n+1, r_out[n], ex_r[c][n]);
        end
      end
      check_all("example");
    end
    for (int t = 0; t < 20000; t++) begin
      mask = N'($urandom);
      for (int n = 0; n < N; n++) begin
        int v;
        case ($urandom_range(0, 5))
          0: v = 0;
          1: v = MAXV;
          2: v = -MAXV;
          3: v = int'($urandom_range(0, 6)) - 3;    // small values, many ties
          default: v = int'($urandom_range(0, 2 * MAXV)) - MAXV;
        endcase
        l_in[n] = W'(v);
      end
      #1;
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
