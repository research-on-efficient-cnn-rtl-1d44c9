// kernel_sum: sums NUM signed values with a balanced binary adder tree.
//
// The inputs are padded with zeros to the next power of two and reduced
// pairwise, one tree level per loop step. Combinational.
module kernel_sum #(
  parameter int unsigned NUM   = 9,
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = IN_W + $clog2(NUM)
) (
  input  logic signed [NUM-1:0][IN_W-1:0] x,
  output logic signed [OUT_W-1:0]         s
);
  localparam int unsigned LV = (NUM <= 1) ? 1 : $clog2(NUM);
  localparam int unsigned P2 = 1 << LV;
  logic signed [P2-1:0][OUT_W-1:0] v;
  always_comb begin
    for (int i = 0; i < P2; i++)
      v[i] = (i < NUM) ? OUT_W'($signed(x[i])) : '0;
    for (int l = 0; l < LV; l++)
      for (int i = 0; i < (P2 >> (l + 1)); i++)
        v[i] = v[2*i] + v[2*i+1];
    s = v[0];
  end
endmodule
