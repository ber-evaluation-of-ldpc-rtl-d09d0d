// ldpc_decoder: min-sum LDPC decoder for a code given by its parity-check
// matrix H (M checks, N variables), with one check node unit per row and
// one variable node unit per column of H.
//
// Operation. Present the N received BPSK samples on y (fixed point, 5
// fractional bits, bit 0 sent as +1 and bit 1 as -1) and pulse start. In
// that cycle every sample is scaled to its intrinsic message Iv = 4*alpha*y
// and each variable-to-check message Lcv is set to Iv. Each iteration applies
//   - horizontal step: Rcv = prod sign(Lcn) * min |Lcn| over the other
//     variables n of check c (check node units);
//   - vertical step: Lcv = Iv + alpha * sum of Rmv over the other checks m,
//     the a-posteriori Lv = Iv + alpha * sum over all checks, and the hard
//     bit, 1 when Lv < 0 (variable node units);
//   - check: the hard bits are tested against all rows of H.
// Decoding stops on a valid codeword or after MAX_ITER iterations.
//
// Two schedules, chosen by COLUMN_LAYERED:
//   0 (default) flooding: all R messages in one cycle from the previous L
//     messages, then all L messages in the next cycle, then the check; a
//     decode of k iterations ends with done 3k+1 cycles after start;
//   1 column layered: one column v per cycle; the check node units read the
//     current L messages, so the R messages of column v already see the
//     columns updated earlier in the same iteration, and the variable node
//     unit of column v uses these fresh R messages at once. An iteration is
//     N column cycles plus the check; done comes (N+1)k+1 cycles after start.
// decoded, llr, syndrome, converged and iterations hold until the next start.
//
// The message equations, alpha = 0.75, the intrinsic scaling, the stop rule
// and the default H and sizes (a 4 x 6 example code) follow the decoding
// algorithm this design implements; its worked example uses the flooding
// order, which is therefore the default. The fully parallel structure, the
// fixed-point format, saturation, the cycle schedule and MAX_ITER are this
// design's choices. All messages are held in registers; entries of the
// message arrays where H is 0 stay 0 and are removed by synthesis.
module ldpc_decoder #(
  parameter int M           = ldpc_pkg::M_DEF,
  parameter int N           = ldpc_pkg::N_DEF,
  parameter bit [0:M-1][0:N-1] H = ldpc_pkg::H_EXAMPLE,
  parameter int Y_W         = ldpc_pkg::Y_W,
  parameter int W           = ldpc_pkg::LLR_W,
  parameter int ALPHA_NUM   = ldpc_pkg::ALPHA_NUM,
  parameter int ALPHA_SHIFT = ldpc_pkg::ALPHA_SHIFT,
  parameter int MAX_ITER    = ldpc_pkg::MAX_ITER,
  parameter bit COLUMN_LAYERED = 1'b0,
  parameter int IW          = $clog2(MAX_ITER + 1),
  parameter int CW          = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,        // sample y and begin decoding
  input  logic signed [Y_W-1:0] y [N],        // received samples
  output logic                  busy,
  output logic                  done,         // one-cycle pulse at the end
  output logic                  converged,    // ended on a valid codeword
  output logic [IW-1:0]         iterations,   // iterations used
  output logic [N-1:0]          decoded,      // hard decisions, bit v = node v
  output logic signed [W-1:0]   llr [N],      // a-posteriori values Lv
  output logic [M-1:0]          syndrome      // parity results of decoded
);

  logic load, hor_en, ver_en, col_en, valid;
  logic [CW-1:0] col_idx;

  // Message storage: Lcv and Rcv for every (check, variable) pair.
  logic signed [W-1:0] iv_q  [N];
  logic signed [W-1:0] l_q   [M][N];
  logic signed [W-1:0] r_q   [M][N];

  // Unit outputs.
  logic signed [W-1:0] iv_c  [N];
  logic signed [W-1:0] r_c   [M][N];     // CNU outputs, by row
  logic signed [W-1:0] r_col [N][M];     // R by column: registered (flooding)
                                         // or fresh from the CNUs (layered)
  logic signed [W-1:0] l_c   [N][M];     // VNU outputs, by column
  logic signed [W-1:0] lv_c  [N];
  logic [N-1:0]        hard_c;

  ldpc_ctrl #(.MAX_ITER(MAX_ITER), .N(N), .COLUMN_LAYERED(COLUMN_LAYERED),
              .IW(IW), .CW(CW)) u_ctrl (
    .clk, .rst_n, .start, .valid, .load, .hor_en, .ver_en, .col_en, .col_idx,
    .busy, .done, .converged, .iterations
  );

  for (genvar v = 0; v < N; v++) begin : g_intr
    intrinsic_gen #(.Y_W(Y_W), .W(W), .ALPHA_NUM(ALPHA_NUM),
                    .ALPHA_SHIFT(ALPHA_SHIFT)) u_intr (
      .y(y[v]), .iv(iv_c[v])
    );
  end

  for (genvar c = 0; c < M; c++) begin : g_cnu
    logic [N-1:0] row_mask;
    for (genvar v = 0; v < N; v++) begin : g_m
      assign row_mask[v] = H[c][v];
    end
    cnu #(.N(N), .W(W)) u_cnu (
      .mask(row_mask), .l_in(l_q[c]), .r_out(r_c[c])
    );
  end

  for (genvar v = 0; v < N; v++) begin : g_vnu
    logic [M-1:0] col_mask;
    for (genvar c = 0; c < M; c++) begin : g_m
      assign col_mask[c]  = H[c][v];
      assign r_col[v][c]  = COLUMN_LAYERED ? r_c[c][v] : r_q[c][v];
    end
    vnu #(.M(M), .W(W), .ALPHA_NUM(ALPHA_NUM),
          .ALPHA_SHIFT(ALPHA_SHIFT)) u_vnu (
      .mask(col_mask), .iv(iv_q[v]), .r_in(r_col[v]), .l_out(l_c[v]),
      .lv(lv_c[v]), .hard(hard_c[v])
    );
  end

  syndrome_check #(.M(M), .N(N), .H(H)) u_syn (
    .bits(decoded), .syndrome, .valid
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < N; v++) begin
        iv_q[v] <= '0;
        llr[v]  <= '0;
      end
      for (int c = 0; c < M; c++)
        for (int v = 0; v < N; v++) begin
          l_q[c][v] <= '0;
          r_q[c][v] <= '0;
        end
      decoded <= '0;
    end else begin
      if (load) begin
        for (int v = 0; v < N; v++) iv_q[v] <= iv_c[v];
        for (int c = 0; c < M; c++)
          for (int v = 0; v < N; v++)
            l_q[c][v] <= H[c][v] ? iv_c[v] : '0;
      end
      if (hor_en) begin
        for (int c = 0; c < M; c++)
          for (int v = 0; v < N; v++)
            r_q[c][v] <= r_c[c][v];
      end
      if (ver_en) begin
        for (int c = 0; c < M; c++)
          for (int v = 0; v < N; v++)
            l_q[c][v] <= l_c[v][c];
        for (int v = 0; v < N; v++) llr[v] <= lv_c[v];
        decoded <= hard_c;
      end
      if (col_en) begin
        for (int v = 0; v < N; v++)
          if (col_idx == CW'(v)) begin
            for (int c = 0; c < M; c++) begin
              r_q[c][v] <= r_c[c][v];
              l_q[c][v] <= l_c[v][c];
            end
            llr[v]     <= lv_c[v];
            decoded[v] <= hard_c[v];
          end
      end
    end
  end

endmodule
