// tb_vnu: variable node unit against a reference computed edge by edge.
//
// The reference sums the other checks' messages separately for every
// output (no shared total), scales by 3/4 rounding toward minus infinity and
// saturates to +-511. Covered: the worked example's first vertical step for
// variables 1..6 (1/32 units, e.g. L11 = -0.3 + 0.75 * 1.5 = 0.825), random
// masks and values, saturation at both ends, and the hard decision.
module tb_vnu;
  localparam int M = 4;
  localparam int W = 10;
  localparam int MAXV = (1 << (W - 1)) - 1;

  logic [M-1:0] mask;
  logic signed [W-1:0] iv;
  logic signed [W-1:0] r_in [M];
  logic signed [W-1:0] l_out [M];
  logic signed [W-1:0] lv;
  logic hard;

  vnu #(.M(M), .W(W), .ALPHA_NUM(3), .ALPHA_SHIFT(2)) dut (.*);

  int checks = 0, failures = 0, n_sat = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int x);
    return x > MAXV ? MAXV : (x < -MAXV ? -MAXV : x);
  endfunction
  function automatic int fl34(input int x);   // floor(3x/4)
    int p;
    p = 3 * x;
    return p >= 0 ? p / 4 : -((-p + 3) / 4);
  endfunction

  task automatic check_all(input string tag);
    int all_sum, e_lv;
    all_sum = 0;
    for (int m = 0; m < M; m++) if (mask[m]) all_sum += int'(r_in[m]);
    for (int m = 0; m < M; m++) begin
      int e;
      e = 0;
      if (mask[m]) begin
        int s;
        s = 0;
        for (int k = 0; k < M; k++) if (k != m && mask[k]) s += int'(r_in[k]);
        e = sat(int'(iv) + fl34(s));
        if (e != int'(iv) + fl34(s)) n_sat++;
      end
      checks++;
      if (int'(l_out[m]) != e) begin
        failures++;
        $display("FAIL %s: m=%0d got %0d expected %0d", tag, m, l_out[m], e);
      end
    end
    e_lv = sat(int'(iv) + fl34(all_sum));
    checks += 2;
    if (int'(lv) != e_lv) begin
      failures++;
      $display("FAIL %s: Lv got %0d expected %0d", tag, lv, e_lv);
    end
    if (hard != (e_lv < 0)) begin
      failures++;
      $display("FAIL %s: hard bit", tag);
    end
  endtask

  // Worked example, 1/32 units. Column v: intrinsic, R of its checks
  // (rows 1..4, 0 off H), expected L of those checks.
  int ex_iv [6];
  int ex_r [6][M];
  int ex_l [6][M];

  initial begin
    ex_iv = '{-10, 48, -77, 96, -67, -48};
    ex_r = '{'{48, 0, 48, 0}, '{-10, 67, 0, 0}, '{0, -48, 0, -48},
             '{-10, 0, 0, 48}, '{0, -48, 10, 0}, '{0, 0, 10, -77}};
    // floor arithmetic on these inputs
    ex_l = '{'{26, 0, 26, 0}, '{98, 40, 0, 0}, '{0, -113, 0, -113},
             '{132, 0, 0, 88}, '{0, -60, -103, 0}, '{0, 0, -106, -41}};
    for (int v = 0; v < 6; v++) begin
      iv = W'(ex_iv[v]);
      for (int m = 0; m < M; m++) r_in[m] = W'(ex_r[v][m]);
      mask = '0;
      for (int m = 0; m < M; m++) mask[m] = ex_r[v][m] != 0;
      #1;
      for (int m = 0; m < M; m++) begin
        checks++;
        if (int'(l_out[m]) != ex_l[v][m]) begin
          failures++;
          $display("FAIL example L%0d%0d got %0d expected %0d", m+1, v+1, l_out[m], ex_l[v][m]);
        end
      end
      check_all("example");
    end
    for (int t = 0; t < 20000; t++) begin
      mask = M'($urandom);
      iv = W'(int'($urandom_range(0, 2 * MAXV)) - MAXV);
      for (int m = 0; m < M; m++)
        r_in[m] = ($urandom_range(0, 3) == 0) ? W'(($urandom_range(0, 1) != 0) ? MAXV : -MAXV)
                                               : W'(int'($urandom_range(0, 2 * MAXV)) - MAXV);
      #1;
      check_all("random");
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL: saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
