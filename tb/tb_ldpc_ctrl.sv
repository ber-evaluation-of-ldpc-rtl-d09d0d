// tb_ldpc_ctrl: cycle-exact test of the decoder sequencer.
//
// For a decode that finds a codeword in iteration k (valid raised only in
// that iteration's check cycle, 3k cycles after start; random values of
// valid in the horizontal and vertical cycles must be ignored) the expected
// strobes are: load in the start cycle, hor_en at 3i-2, ver_en at 3i-1,
// done at 3k+1, then iterations = k and converged = 1. With valid never
// raised in a check cycle the decode must run exactly MAX_ITER iterations
// and end with converged = 0. A start pulse while busy must not load.
// A second instance runs the column-layered schedule (N = 6): each iteration
// is six col_en cycles with col_idx 0..5 followed by the check cycle, so
// done comes 7k+1 cycles after start; hor_en and ver_en stay low there, and
// col_en stays low in the flooding instance.
module tb_ldpc_ctrl;
  localparam int MAX_ITER = 10;
  localparam int IW = $clog2(MAX_ITER + 1);

  logic clk = 0, rst_n = 0, start = 0, valid = 0;
  logic load, hor_en, ver_en, col_en, busy, done, converged;
  logic [2:0] col_idx;
  logic [IW-1:0] iterations;

  ldpc_ctrl #(.MAX_ITER(MAX_ITER), .N(6), .COLUMN_LAYERED(1'b0)) dut (.*);

  logic start2 = 0, valid2 = 0;
  logic load2, hor_en2, ver_en2, col_en2, busy2, done2, converged2;
  logic [2:0] col_idx2;
  logic [IW-1:0] iterations2;

  ldpc_ctrl #(.MAX_ITER(MAX_ITER), .N(6), .COLUMN_LAYERED(1'b1)) dut_col (
    .clk, .rst_n, .start(start2), .valid(valid2), .load(load2), .hor_en(hor_en2),
    .ver_en(ver_en2), .col_en(col_en2), .col_idx(col_idx2), .busy(busy2),
    .done(done2), .converged(converged2), .iterations(iterations2)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // k = 0 means no codeword is ever found.
  task automatic decode(input int k, input bit poke);
    int lim, t;
    bit seen_done;
    lim = (k == 0) ? MAX_ITER : k;
    seen_done = 0;
    @(negedge clk);
    start = 1;
    for (t = 0; t <= 3 * lim + 2; t++) begin
      // drive valid for this cycle
      if (t > 0 && t % 3 == 0) valid = (k != 0 && t == 3 * k);
      else valid = ($urandom_range(0, 1) != 0);
      if (poke && t == 2) start = 1;
      #1;
      check(load   == (t == 0), $sformatf("k=%0d t=%0d load=%b", k, t, load));
      check(hor_en == (t >= 1 && t <= 3 * lim && t % 3 == 1), $sformatf("k=%0d t=%0d hor_en", k, t));
      check(ver_en == (t >= 1 && t <= 3 * lim && t % 3 == 2), $sformatf("k=%0d t=%0d ver_en", k, t));
      check(busy   == (t >= 1 && t <= 3 * lim), $sformatf("k=%0d t=%0d busy", k, t));
      check(done   == (t == 3 * lim + 1), $sformatf("k=%0d t=%0d done", k, t));
      check(!col_en, "col_en in flooding mode");
      if (t >= 1 && t <= 3 * lim)
        check(iterations == IW'((t + 2) / 3), $sformatf("k=%0d t=%0d iterations=%0d", k, t, iterations));
      if (done) begin
        seen_done = 1;
        check(iterations == IW'(lim), $sformatf("k=%0d final iterations %0d", k, iterations));
        check(converged == (k != 0), $sformatf("k=%0d converged %b", k, converged));
      end
      @(negedge clk);
      start = 0;
    end
    check(seen_done, $sformatf("k=%0d no done", k));
    valid = 0;
  endtask

  // Column-layered instance: iteration i occupies cycles 7i-6 .. 7i, the
  // last of them being the check.
  task automatic decode_col(input int k);
    int lim, t;
    bit seen_done;
    lim = (k == 0) ? MAX_ITER : k;
    seen_done = 0;
    @(negedge clk);
    start2 = 1;
    for (t = 0; t <= 7 * lim + 2; t++) begin
      bit in_col;
      in_col = (t >= 1 && t <= 7 * lim && t % 7 != 0);
      if (t > 0 && t % 7 == 0) valid2 = (k != 0 && t == 7 * k);
      else valid2 = ($urandom_range(0, 1) != 0);
      #1;
      check(load2 == (t == 0), $sformatf("col k=%0d t=%0d load", k, t));
      check(col_en2 == in_col, $sformatf("col k=%0d t=%0d col_en", k, t));
      if (in_col) check(int'(col_idx2) == (t - 1) % 7, $sformatf("col k=%0d t=%0d col_idx=%0d", k, t, col_idx2));
      check(!hor_en2 && !ver_en2, "flooding strobes in column mode");
      check(busy2 == (t >= 1 && t <= 7 * lim), $sformatf("col k=%0d t=%0d busy", k, t));
      check(done2 == (t == 7 * lim + 1), $sformatf("col k=%0d t=%0d done", k, t));
      if (done2) begin
        seen_done = 1;
        check(iterations2 == IW'(lim), $sformatf("col k=%0d final iterations %0d", k, iterations2));
        check(converged2 == (k != 0), $sformatf("col k=%0d converged", k));
      end
      @(negedge clk);
      start2 = 0;
    end
    check(seen_done, $sformatf("col k=%0d no done", k));
    valid2 = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !done && iterations == 0, "reset state");
    for (int k = 1; k <= MAX_ITER; k++) decode(k, k == 3);
    decode(0, 1);
    decode(0, 0);
    for (int k = 0; k <= MAX_ITER; k++) decode_col(k);
    // results hold while idle
    repeat (3) @(negedge clk);
    check(!converged && iterations == IW'(MAX_ITER) && !busy, "results held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
