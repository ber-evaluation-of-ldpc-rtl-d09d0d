// vnu: variable node unit, the vertical step and the hard decision.
//
// From the intrinsic message Iv and the check-to-variable messages R[m] of
// the checks on this variable (mask[m] = 1) it forms
//   L[c] = Iv + alpha * (sum of R[m] over the other checks m != c)
//   Lv   = Iv + alpha * (sum of R[m] over all checks of v)
//   bit  = 1 when Lv is negative, else 0.
// The full sum S is formed once and each extrinsic sum is S - R[c]. alpha is
// ALPHA_NUM / 2^ALPHA_SHIFT, applied with an arithmetic right shift. Each
// result saturates to the symmetric W-bit range. Positions with mask[m] = 0
// give 0. Purely combinational.
module vnu #(
  parameter int M           = ldpc_pkg::M_DEF,   // check nodes the column spans
  parameter int W           = ldpc_pkg::LLR_W,
  parameter int ALPHA_NUM   = ldpc_pkg::ALPHA_NUM,
  parameter int ALPHA_SHIFT = ldpc_pkg::ALPHA_SHIFT
) (
  input  logic [M-1:0]        mask,       // column of H
  input  logic signed [W-1:0] iv,         // intrinsic message Iv
  input  logic signed [W-1:0] r_in  [M],  // check-to-variable messages Rmv
  output logic signed [W-1:0] l_out [M],  // variable-to-check messages Lcv
  output logic signed [W-1:0] lv,         // a-posteriori value Lv
  output logic                hard        // hard decision: 1 if Lv < 0
);

  // Sum of up to M messages, times ALPHA_NUM (< 256), plus Iv.
  localparam int SW = W + $clog2(M + 1) + 9;
  localparam logic signed [SW-1:0] MAXV = SW'((1 << (W - 1)) - 1);

  function automatic logic signed [W-1:0] sat(input logic signed [SW-1:0] x);
    if (x > MAXV)       return MAXV[W-1:0];
    else if (x < -MAXV) return -MAXV[W-1:0];
    else                return x[W-1:0];
  endfunction

  logic signed [SW-1:0] total;

  always_comb begin
    total = '0;
    for (int m = 0; m < M; m++)
      if (mask[m]) total = total + SW'(r_in[m]);

    for (int m = 0; m < M; m++) begin
      logic signed [SW-1:0] ext;
      ext = ((total - SW'(r_in[m])) * SW'(ALPHA_NUM)) >>> ALPHA_SHIFT;
      l_out[m] = mask[m] ? sat(SW'(iv) + ext) : '0;
    end

    lv   = sat(SW'(iv) + ((total * SW'(ALPHA_NUM)) >>> ALPHA_SHIFT));
    hard = lv[W-1];
  end

endmodule
