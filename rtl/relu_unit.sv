// relu_unit: ReLU activation of one signed value.
//
// A comparator tests whether the input is greater than zero and drives a
// two-way multiplexer that passes either the input or the constant zero,
// which is the comparator-plus-multiplexer structure of the PE's activation
// stage. Purely combinational; the PE registers its output.
module relu_unit #(
  parameter int unsigned W = 32  // width of the accumulated convolution result
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  logic gt_zero;
  always_comb begin
    gt_zero = (x > 0);
    y = gt_zero ? x : '0;
  end
endmodule
