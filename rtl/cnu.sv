// cnu: check node unit, the horizontal step of min-sum decoding.
//
// For every variable node n on this check (mask[n] = 1) it returns
//   R[n] = (product of the signs of the other inputs) * (min of their |L|).
// It works the simplified way: one pass finds the smallest magnitude min1,
// its position idx1, the second smallest magnitude min2 and the XOR of all
// sign bits. Input n then receives min2 if it holds min1, else min1, and the
// total sign with its own sign removed. This needs no per-output comparison
// tree. A zero input counts as positive. Positions with mask[n] = 0 give 0.
// Purely combinational; inputs must lie in the symmetric message range.
module cnu #(
  parameter int N = ldpc_pkg::N_DEF,      // variable nodes the row spans
  parameter int W = ldpc_pkg::LLR_W       // message width
) (
  input  logic [N-1:0]        mask,       // row of H: which inputs take part
  input  logic signed [W-1:0] l_in  [N],  // variable-to-check messages Lcn
  output logic signed [W-1:0] r_out [N]   // check-to-variable messages Rcn
);

  localparam logic [W-1:0] MAG_MAX = W'((1 << (W - 1)) - 1);

  logic [W-1:0]         mag [N];
  logic [W-1:0]         min1, min2;
  logic [$clog2(N)-1:0] idx1;
  logic                 sgn_all;

  always_comb begin
    min1    = MAG_MAX;
    min2    = MAG_MAX;
    idx1    = '0;
    sgn_all = 1'b0;
    for (int n = 0; n < N; n++) begin
      mag[n] = l_in[n][W-1] ? W'(-l_in[n]) : W'(l_in[n]);
      if (mask[n]) begin
        sgn_all = sgn_all ^ l_in[n][W-1];
        if (mag[n] < min1) begin
          min2 = min1;
          min1 = mag[n];
          idx1 = n[$clog2(N)-1:0];
        end else if (mag[n] < min2) begin
          min2 = mag[n];
        end
      end
    end
    for (int n = 0; n < N; n++) begin
      logic [W-1:0] m;
      m = (idx1 == n[$clog2(N)-1:0]) ? min2 : min1;
      if (!mask[n])                       r_out[n] = '0;
      else if (sgn_all ^ l_in[n][W-1])    r_out[n] = -$signed(m);
      else                                r_out[n] = $signed(m);
    end
  end

endmodule
