// round_clamp: quantizes an activated convolution result to the bit-width
// that the next layer expects.
//
// The input is shifted right by SHIFT bits (restoring the fixed-point scale,
// eq. x * 2^-shift), then 1 is added when the first dropped bit is 1 (round
// half up, an adder and a multiplexer), and the result is clamped to the
// signed range [-2^(n-1), 2^(n-1)-1] of the run-time width n. The output is
// sign-extended into OUT_W bits so that all layers share one storage slot.
// Combinational. shift = 0 passes the value unshifted and unrounded.
module round_clamp #(
  parameter int unsigned IN_W  = 32,  // accumulated result width
  parameter int unsigned OUT_W = 8    // widest quantized output
) (
  input  logic signed [IN_W-1:0]          x,
  input  logic [4:0]                      shift,  // right shift amount
  input  logic [$clog2(OUT_W+1)-1:0]      nbits,  // target width n, 1..OUT_W
  output logic signed [OUT_W-1:0]         y
);
  logic signed [IN_W:0]  shifted;
  logic                  round_bit;
  logic signed [IN_W:0]  rounded;
  logic signed [IN_W:0]  qmax, qmin;

  always_comb begin
    shifted   = (IN_W+1)'(x) >>> shift;
    round_bit = (shift != 0) ? x[shift - 5'd1] : 1'b0;
    rounded   = shifted + (IN_W+1)'(round_bit);
    qmax = ((IN_W+1)'(1) <<< (nbits - 1'b1)) - 1'b1;
    qmin = -((IN_W+1)'(1) <<< (nbits - 1'b1));
    if (rounded > qmax)      y = OUT_W'(qmax);
    else if (rounded < qmin) y = OUT_W'(qmin);
    else                     y = OUT_W'(rounded);
  end
endmodule
