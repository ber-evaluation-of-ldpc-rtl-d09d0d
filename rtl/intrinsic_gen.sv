// intrinsic_gen: turns one received BPSK sample y into the intrinsic message
// Iv = 4 * alpha * y that starts the decoding of variable node v.
//
// y and Iv share one fixed-point scale (the same number of fractional bits),
// so the module only multiplies by 4*ALPHA_NUM, shifts right by ALPHA_SHIFT
// (an arithmetic shift, rounding toward minus infinity) and saturates the
// result to the symmetric range of a W-bit message. With alpha = 3/4 the
// factor is exactly 3 and no rounding occurs. The formula is the one of the
// worked example; the fixed-point format and the saturation are this
// design's choice. Purely combinational.
module intrinsic_gen #(
  parameter int Y_W         = ldpc_pkg::Y_W,
  parameter int W           = ldpc_pkg::LLR_W,
  parameter int ALPHA_NUM   = ldpc_pkg::ALPHA_NUM,
  parameter int ALPHA_SHIFT = ldpc_pkg::ALPHA_SHIFT
) (
  input  logic signed [Y_W-1:0] y,        // received sample
  output logic signed [W-1:0]   iv        // intrinsic message 4*alpha*y
);

  localparam int PW = Y_W + 8;            // product width (4*ALPHA_NUM < 256)
  localparam logic signed [PW-1:0] MAXV = PW'((1 << (W - 1)) - 1);

  logic signed [PW-1:0] prod;

  always_comb begin
    prod = (PW'(y) * PW'(4 * ALPHA_NUM)) >>> ALPHA_SHIFT;
    if (prod > MAXV)       iv = MAXV[W-1:0];
    else if (prod < -MAXV) iv = -MAXV[W-1:0];
    else                   iv = prod[W-1:0];
  end

endmodule
