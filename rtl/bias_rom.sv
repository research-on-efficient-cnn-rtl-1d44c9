// bias_rom: folded-bias ROM of one convolution PE.
//
// Word weight_base(l) + p holds, for every output lane j of the PE, the folded
// bias b' (batch normalisation merged into the convolution) of output channel
// p*outs_per_pass(l) + j of layer l, at the scale of the products. Lanes past
// the pass's output count hold zero. Written at start-up from the package's
// bias function; synchronous read addressed like the weight ROM array.
module bias_rom #(
  parameter int unsigned PE_IDX = 1,
  parameter int unsigned S      = 128,
  parameter int unsigned BIAS_W = 16,
  parameter int unsigned DEPTH  = 64,
  localparam int unsigned AW    = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic                        clk,
  input  logic [AW-1:0]               addr,
  output logic [S-1:0][BIAS_W-1:0]    data
);
  import mp_pkg::*;

  logic [S-1:0][BIAS_W-1:0] mem [DEPTH];

  initial begin
    for (int a = 0; a < int'(DEPTH); a++) mem[a] = '0;
    for (int l = 0; l < int'(NUM_CONV); l++)
      if (32'(layer_cfg(l).pe) == PE_IDX)
        for (int p = 0; p < int'(passes(l)); p++)
          for (int j = 0; j < int'(outs_per_pass(l)) && j < int'(S); j++)
            if (weight_base(l) + p < DEPTH)
              mem[weight_base(l) + p][j] = BIAS_W'(bias_val(l, p * outs_per_pass(l) + j));
  end

  always_ff @(posedge clk) data <= mem[addr];
endmodule
