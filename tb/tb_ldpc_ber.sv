// tb_ldpc_ber: bit error rate of the decoder with BPSK over an AWGN channel.
//
// For each SNR point (1, 5, 10, 15 and 20 dB, taken as Eb/N0 with the
// code rate K/N = 3/6) random codewords of the 4 x 6 example code are sent
// as BPSK (bit 0 -> +1, bit 1 -> -1), Gaussian noise from a Box-Muller
// generator is added, each sample is rounded to the decoder's 1/32 grid and
// clipped to 8 bits, and the decoder runs to its stop rule. The test prints
// the decoded BER next to the BER of a plain sign decision on the samples.
// Checks: every decode ends in 3k+1 cycles, a decode reported as converged
// carries a zero syndrome, the decoded BER does not rise with SNR, the
// decoder is never worse than the plain sign decision by more than a small
// margin, and no bit is wrong at 20 dB.
module tb_ldpc_ber;
  import ldpc_pkg::*;

  localparam int M = M_DEF;
  localparam int N = N_DEF;
  localparam int W = LLR_W;
  localparam int IW = $clog2(MAX_ITER + 1);
  localparam int FRAMES = 4000;
  localparam int NSNR = 5;
  localparam int YMAX = (1 << (Y_W - 1)) - 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [Y_W-1:0] y [N];
  logic busy, done, converged;
  logic [IW-1:0] iterations;
  logic [N-1:0] decoded;
  logic signed [W-1:0] llr [N];
  logic [M-1:0] syndrome;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real uniform01();
    return (real'($urandom_range(0, 32'h00FF_FFFF)) + 0.5) / 16777216.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(uniform01())) * $cos(6.283185307179586 * uniform01());
  endfunction

  // The eight codewords of H (rank 3), bit v = node v+1.
  logic [N-1:0] cws [8];

  initial begin
    int snr_db [NSNR];
    real ber [NSNR], ber_raw [NSNR];
    int n = 0;
    snr_db = '{1, 5, 10, 15, 20};
    for (int w = 0; w < 64; w++) begin
      logic [N-1:0] b;
      b = N'(w);
      if (!((b[0]^b[1]^b[3]) | (b[1]^b[2]^b[4]) | (b[0]^b[4]^b[5]) | (b[2]^b[3]^b[5]))) begin
        cws[n] = b;
        n++;
      end
    end
    check(n == 8, "codeword count");
    for (int v = 0; v < N; v++) y[v] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int s = 0; s < NSNR; s++) begin
      real ebn0, sigma;
      int errs, errs_raw;
      ebn0 = 10.0 ** (real'(snr_db[s]) / 10.0);
      sigma = $sqrt(1.0 / (2.0 * 0.5 * ebn0));
      errs = 0;
      errs_raw = 0;
      for (int f = 0; f < FRAMES; f++) begin
        logic [N-1:0] cw;
        int t0;
        cw = cws[$urandom_range(0, 7)];
        for (int v = 0; v < N; v++) begin
          real r;
          int q;
          r = (cw[v] ? -1.0 : 1.0) + sigma * gauss();
          q = $rtoi(r * 32.0 + (r < 0 ? -0.5 : 0.5));
          q = q > YMAX ? YMAX : (q < -YMAX ? -YMAX : q);
          y[v] = Y_W'(q);
          if ((q < 0) != cw[v]) errs_raw++;
        end
        @(negedge clk);
        start = 1;
        t0 = cyc;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        check(cyc - t0 == 3 * int'(iterations) + 1, "latency");
        if (converged) check(syndrome == 0, "converged with nonzero syndrome");
        for (int v = 0; v < N; v++) if (decoded[v] != cw[v]) errs++;
      end
      ber[s] = real'(errs) / real'(FRAMES * N);
      ber_raw[s] = real'(errs_raw) / real'(FRAMES * N);
      $display("SNR %0d dB: decoded BER %f, sign-decision BER %f", snr_db[s], ber[s], ber_raw[s]);
      check(ber[s] <= ber_raw[s] + 0.01, $sformatf("SNR %0d dB: decoder worse than sign decision", snr_db[s]));
      if (s > 0) check(ber[s] <= ber[s-1] + 0.005, $sformatf("BER rose at %0d dB", snr_db[s]));
    end
    check(ber[NSNR-1] == 0.0, "bit errors at 20 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
