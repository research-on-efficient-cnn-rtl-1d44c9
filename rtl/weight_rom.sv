// weight_rom: one ROM of a PE's weight ROM array.
//
// A word is a whole K x K kernel of M-bit weights (tap 0 in the low bits), so
// one read delivers everything a conv group needs for a pass; the long word is
// then sliced into taps by the conv group. ROM GROUP of PE PE_IDX holds, at
// word weight_base(l) + p, the kernel that group GROUP uses in pass p of layer
// l: output channel p*outs_per_pass(l) + GROUP/G, input channel GROUP mod G,
// G being the layer's group size. Kernels outside the layer's channels are
// zero. The contents are written at start-up (ROM initialisation) from the
// package's weight function. Synchronous read, one cycle latency.
module weight_rom #(
  parameter int unsigned PE_IDX = 1,
  parameter int unsigned GROUP  = 0,
  parameter int unsigned K      = 3,
  parameter int unsigned M      = 7,
  parameter int unsigned DEPTH  = 64,
  localparam int unsigned AW    = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic [AW-1:0]        addr,
  output logic [K*K*M-1:0]     data
);
  import mp_pkg::*;

  logic [K*K*M-1:0] mem [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) mem[a] = '0;
    for (int l = 0; l < int'(NUM_CONV); l++) begin
      if (32'(layer_cfg(l).pe) == PE_IDX) begin
        for (int p = 0; p < int'(passes(l)); p++) begin
          int unsigned adr, o, i;
          adr = weight_base(l) + p;
          o = p * outs_per_pass(l) + (GROUP >> layer_cfg(l).log2g);
          i = GROUP & ((1 << layer_cfg(l).log2g) - 1);
          for (int t = 0; t < int'(K*K); t++)
            if (adr < DEPTH) mem[adr][t*M +: M] = M'(weight_val(l, o, i, t));
        end
      end
    end
  end

  always_ff @(posedge clk) data <= mem[addr];
endmodule
