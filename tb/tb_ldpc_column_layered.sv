// tb_ldpc_column_layered: the decoder with COLUMN_LAYERED = 1, end to end.
//
// In this schedule each iteration walks the columns of H in order: the R
// messages of column v are formed from the L messages as they stand, so
// they already include the columns updated earlier in the same iteration,
// and column v's L messages, Lv and hard bit are updated at once. The
// reference model below does exactly that with plain integer arithmetic per
// edge. Checked on the worked example's samples and on random noisy
// codewords: bits, Lv, every stored R and L message, iteration count,
// converged flag, syndrome and the (N+1)k+1 cycle latency. The same
// mechanisms as in the flooding test are counted and must each occur.
module tb_ldpc_column_layered;
  import ldpc_pkg::*;

  localparam int M  = M_DEF;
  localparam int N  = N_DEF;
  localparam int W  = LLR_W;
  localparam int IW = $clog2(MAX_ITER + 1);
  localparam int MAXV = (1 << (W - 1)) - 1;
  localparam int YMAX = (1 << (Y_W - 1)) - 1;
  // Rows of H as variable lists, written out independently of the package.
  localparam int ROWS [M][3] = '{'{0, 1, 3}, '{1, 2, 4}, '{0, 4, 5}, '{2, 3, 5}};

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [Y_W-1:0] y [N];
  logic busy, done, converged;
  logic [IW-1:0] iterations;
  logic [N-1:0] decoded;
  logic signed [W-1:0] llr [N];
  logic [M-1:0] syndrome;

  ldpc_decoder #(.COLUMN_LAYERED(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  int n_iter1 = 0, n_multi = 0, n_limit = 0, n_sat = 0, n_ignored = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic int sat(input int x);
    return x > MAXV ? MAXV : (x < -MAXV ? -MAXV : x);
  endfunction
  function automatic int ascale(input int x);   // floor(x * 3 / 4)
    return (x * ALPHA_NUM) >>> ALPHA_SHIFT;
  endfunction
  function automatic bit on_check(input int c, input int v);
    for (int k = 0; k < 3; k++) if (ROWS[c][k] == v) return 1;
    return 0;
  endfunction

  int L [M][N];
  int R [M][N];
  int ref_bits [N];
  int ref_lv [N];
  int ref_iters;
  bit ref_conv;
  bit ref_sat;

  task automatic ref_decode(input int ys [N]);
    int iv [N];
    ref_sat = 0;
    for (int v = 0; v < N; v++) begin
      iv[v] = sat(ys[v] * 3);
      if (iv[v] != ys[v] * 3) ref_sat = 1;
      for (int c = 0; c < M; c++) begin
        L[c][v] = on_check(c, v) ? iv[v] : 0;
        R[c][v] = 0;
      end
    end
    ref_conv = 0;
    for (int it = 1; it <= MAX_ITER; it++) begin
      // one column at a time, in order
      for (int v = 0; v < N; v++) begin
        int tot;
        tot = 0;
        for (int c = 0; c < M; c++)
          if (on_check(c, v)) begin
            bit neg;
            int mn;
            neg = 0;
            mn = MAXV;
            for (int n = 0; n < N; n++)
              if (n != v && on_check(c, n)) begin
                if (L[c][n] < 0) neg = !neg;
                if ((L[c][n] < 0 ? -L[c][n] : L[c][n]) < mn)
                  mn = L[c][n] < 0 ? -L[c][n] : L[c][n];
              end
            R[c][v] = neg ? -mn : mn;
            tot += R[c][v];
          end
        for (int c = 0; c < M; c++)
          if (on_check(c, v)) begin
            int raw;
            raw = iv[v] + ascale(tot - R[c][v]);
            L[c][v] = sat(raw);
            if (raw != L[c][v]) ref_sat = 1;
          end
        begin
          int raw;
          raw = iv[v] + ascale(tot);
          ref_lv[v] = sat(raw);
          if (raw != ref_lv[v]) ref_sat = 1;
        end
        ref_bits[v] = ref_lv[v] < 0 ? 1 : 0;
      end
      ref_iters = it;
      begin
        bit ok = 1;
        for (int c = 0; c < M; c++)
          if ((ref_bits[ROWS[c][0]] ^ ref_bits[ROWS[c][1]] ^ ref_bits[ROWS[c][2]]) != 0)
            ok = 0;
        if (ok) begin
          ref_conv = 1;
          break;
        end
      end
    end
  endtask

  // ---------------- DUT driving ----------------
  // Runs one decode; returns the cycles from the start cycle to done.
  task automatic run(input int ys [N], input bit poke_busy, output int lat);
    int t0;
    for (int v = 0; v < N; v++) y[v] = Y_W'(ys[v]);
    @(negedge clk);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    if (poke_busy) begin
      // A second start in mid-decode must be ignored.
      @(negedge clk);
      start = 1;
      for (int v = 0; v < N; v++) y[v] = -y[v];
      @(negedge clk);
      start = 0;
      n_ignored++;
    end
    while (!done) @(negedge clk);
    lat = cyc - t0;
    @(negedge clk);
    check(!busy, "busy after done");
  endtask

  task automatic compare_msgs(input string tag);
    for (int c = 0; c < M; c++)
      for (int v = 0; v < N; v++) begin
        check(int'(dut.r_q[c][v]) == R[c][v], $sformatf("%s R%0d%0d %0d vs %0d", tag, c+1, v+1, dut.r_q[c][v], R[c][v]));
        check(int'(dut.l_q[c][v]) == L[c][v], $sformatf("%s L%0d%0d %0d vs %0d", tag, c+1, v+1, dut.l_q[c][v], L[c][v]));
      end
  endtask

  initial begin
    int ys [N];
    int lat;
    real yr [N];
    yr = '{-0.1, 0.5, -0.8, 1.0, -0.7, -0.5};
    for (int v = 0; v < N; v++) y[v] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- worked example ----
    for (int v = 0; v < N; v++) ys[v] = $rtoi(yr[v] * (1 << LLR_F) + (yr[v] < 0 ? -0.5 : 0.5));
    run(ys, 0, lat);
    ref_decode(ys);
    check(decoded == 6'b110100, $sformatf("example bits %b", decoded));  // bit v = node v+1
    check(converged, "example not converged");
    check(iterations == ref_iters && iterations == 1, $sformatf("example iterations %0d", iterations));
    check(lat == (N + 1) * ref_iters + 1, $sformatf("example latency %0d", lat));
    check(syndrome == 0, "example syndrome");
    compare_msgs("example");
    for (int v = 0; v < N; v++)
      check(llr[v] == ref_lv[v], $sformatf("example Lv%0d", v+1));
    if (iterations == 1) n_iter1++;

    // ---- random decodes ----
    for (int t = 0; t < 3000; t++) begin
      bit [N-1:0] cw;
      int amp, noise;
      // random codeword: draw until the parity checks hold
      do begin
        cw = N'($urandom);
      end while ((cw[0]^cw[1]^cw[3]) | (cw[1]^cw[2]^cw[4]) | (cw[0]^cw[4]^cw[5]) | (cw[2]^cw[3]^cw[5]));
      amp = 8 + int'($urandom_range(0, 56));          // signal level, 1/32 units
      noise = int'($urandom_range(0, 120));           // noise spread
      for (int v = 0; v < N; v++) begin
        int s;
        s = (cw[v] ? -amp : amp) + int'($urandom_range(0, 2 * noise)) - noise;
        ys[v] = s > YMAX ? YMAX : (s < -YMAX ? -YMAX : s);
      end
      run(ys, (t % 50) == 7, lat);
      ref_decode(ys);
      for (int v = 0; v < N; v++) begin
        check(decoded[v] == ref_bits[v][0], $sformatf("t%0d bit %0d", t, v));
        check(llr[v] == ref_lv[v], $sformatf("t%0d Lv%0d %0d vs %0d", t, v, llr[v], ref_lv[v]));
      end
      check(iterations == ref_iters, $sformatf("t%0d iterations %0d vs %0d", t, iterations, ref_iters));
      check(converged == ref_conv, $sformatf("t%0d converged", t));
      compare_msgs($sformatf("t%0d", t));
      check(lat == (N + 1) * ref_iters + 1, $sformatf("t%0d latency %0d", t, lat));
      check((syndrome == 0) == converged, $sformatf("t%0d syndrome", t));
      if (converged && iterations == 1) n_iter1++;
      if (converged && iterations > 1)  n_multi++;
      if (!converged) begin
        n_limit++;
        check(iterations == MAX_ITER, "stopped early without codeword");
      end
      if (ref_sat) n_sat++;
    end

    $display("mechanisms: stop_after_1=%0d stop_after_many=%0d iteration_limit=%0d saturation=%0d start_ignored=%0d",
             n_iter1, n_multi, n_limit, n_sat, n_ignored);
    check(n_iter1 > 0, "no decode stopped after one iteration");
    check(n_multi > 0, "no decode needed several iterations");
    check(n_limit > 0, "no decode reached the iteration limit");
    check(n_sat > 0, "no message saturated");
    check(n_ignored > 0, "no start ignored while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
