// fc_weight_rom: weight ROM of the fully connected PE.
//
// Word i holds the NOUT 8-bit weights that multiply input feature i, one per
// output, so one read per cycle feeds all parallel MAC units. Written at
// start-up from the package's FC weight function; synchronous read.
module fc_weight_rom #(
  parameter int unsigned NIN  = 64,
  parameter int unsigned NOUT = 10,
  parameter int unsigned WB   = 8
) (
  input  logic                         clk,
  input  logic [$clog2(NIN)-1:0]       addr,
  output logic [NOUT-1:0][WB-1:0]      data
);
  logic [NOUT-1:0][WB-1:0] mem [NIN];

  initial begin
    for (int i = 0; i < int'(NIN); i++)
      for (int k = 0; k < int'(NOUT); k++)
        mem[i][k] = WB'(mp_pkg::fc_weight(k, i));
  end

  always_ff @(posedge clk) data <= mem[addr];
endmodule
