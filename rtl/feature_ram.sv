// feature_ram: true dual-port RAM for feature maps (one BRAM bank).
//
// Each word packs two feature values of DW bits, value 0 in the low half, so
// reading two adjacent addresses on the two ports delivers four neighbouring
// values in one cycle. Both ports can read or write; a write carries a
// two-bit half enable so a single value can be stored without disturbing its
// neighbour. Reads are synchronous (data one cycle after the address). If
// both ports write the same word in one cycle, port B wins. The memory starts
// cleared.
module feature_ram #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              a_en,
  input  logic [1:0]        a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [2*DW-1:0]   a_wdata,
  output logic [2*DW-1:0]   a_rdata,
  input  logic              b_en,
  input  logic [1:0]        b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [2*DW-1:0]   b_wdata,
  output logic [2*DW-1:0]   b_rdata
);
  logic [2*DW-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we[0]) mem[a_addr][DW-1:0]    <= a_wdata[DW-1:0];
      if (a_we[1]) mem[a_addr][2*DW-1:DW] <= a_wdata[2*DW-1:DW];
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we[0]) mem[b_addr][DW-1:0]    <= b_wdata[DW-1:0];
      if (b_we[1]) mem[b_addr][2*DW-1:DW] <= b_wdata[2*DW-1:DW];
    end
  end
endmodule
