// conv_kernel: one 3x3 (KxK) convolution window.
//
// K*K signed multipliers of M-bit weights by N-bit features, all of the same
// M x N type, feed a binary adder tree that returns the window's dot product.
// Combinational: the PE registers the window sums (its multiplication stage)
// and then reduces them across channels in its adder tree stage.
module conv_kernel #(
  parameter int unsigned K = 3,
  parameter int unsigned M = 8,   // weight bit-width
  parameter int unsigned N = 8,   // feature bit-width
  localparam int unsigned P_W = M + N,
  localparam int unsigned S_W = M + N + $clog2(K*K)
) (
  input  logic [K*K-1:0][M-1:0]  w,      // packed kernel, tap 0 in the low bits
  input  logic [K*K-1:0][N-1:0]  a,      // packed window, same tap order
  output logic signed [S_W-1:0]  sum     // sum of the products
);
  logic signed [K*K-1:0][P_W-1:0] prod;
  always_comb begin
    for (int t = 0; t < K*K; t++)
      prod[t] = P_W'($signed(w[t]) * $signed(a[t]));
  end

  kernel_sum #(.NUM(K*K), .IN_W(P_W), .OUT_W(S_W)) u_sum (.x(prod), .s(sum));
endmodule
