// channel_adder_tree: reconfigurable adder tree across the S convolution
// groups of a PE.
//
// Level 0 holds the S window sums; level d holds ceil(S/2^d) partial sums,
// each the sum of 2^d neighbouring groups. A multiplexer driven by the layer's
// group-size code (log2 of the input-channel count it reduces over) picks the
// level whose outputs are the finished output pixels: with S = 64, a 32-input
// -channel layer takes level 5 (two pixels) and a 64-channel layer level 6
// (one pixel). Outputs beyond the selected level's count are zero.
// Combinational.
module channel_adder_tree #(
  parameter int unsigned S    = 128,  // number of conv groups
  parameter int unsigned IN_W = 19,   // width of one window sum
  localparam int unsigned LV  = $clog2(S),
  localparam int unsigned OUT_W = IN_W + LV,
  localparam int unsigned SEL_W = $clog2(LV + 1)
) (
  input  logic signed [S-1:0][IN_W-1:0]  x,
  input  logic [SEL_W-1:0]               level,  // selected tree depth
  output logic signed [S-1:0][OUT_W-1:0] y
);
  logic signed [OUT_W-1:0] lv [LV+1][S];

  always_comb begin
    for (int i = 0; i < S; i++) lv[0][i] = OUT_W'($signed(x[i]));
    for (int d = 1; d <= LV; d++)
      for (int i = 0; i < S; i++)
        if (i < ((S + (1 << d) - 1) >> d))
          lv[d][i] = lv[d-1][2*i] + ((2*i + 1 < S) ? lv[d-1][2*i+1] : '0);
        else
          lv[d][i] = '0;
    for (int i = 0; i < S; i++)
      y[i] = (32'(level) <= LV) ? lv[level][i] : '0;
  end
endmodule
