// axi_mem_model: behavioural model of the off-chip memory holding the input
// image, seen through an AXI4 read-only slave port (16-bit data, INCR bursts).
// Byte a - base of the image is pixel image_pixel(SEED, ch, y, x) with
// a - base = (ch*H + y)*W + x. ARREADY and RVALID are held low on
// pseudo-random cycles to exercise the master's handshakes. Not synthesizable.
module axi_mem_model #(
  parameter int unsigned SEED = 1,
  parameter int unsigned H    = 32,
  parameter int unsigned W    = 32,
  parameter logic [31:0] BASE = 32'h0001_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic [2:0]  arsize,
  input  logic [1:0]  arburst,
  input  logic        arvalid,
  output logic        arready,
  output logic [15:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready,
  output int          bursts,
  output int          stalls
);
  logic        active;
  logic [31:0] addr;
  int          left;

  function automatic logic [7:0] byte_at(input logic [31:0] a);
    int unsigned off, ch, y, x;
    off = a - BASE;
    ch = off / (H * W);
    y  = (off / W) % H;
    x  = off % W;
    return 8'(mp_pkg::image_pixel(SEED, ch, y, x));
  endfunction

  assign rresp = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; arready <= 1'b0; rvalid <= 1'b0; rlast <= 1'b0;
      rdata <= '0; addr <= '0; left <= 0; bursts <= 0; stalls <= 0;
    end else begin
      arready <= 1'b0;
      if (!active) begin
        if (arvalid && !arready && ($urandom % 3 != 0)) begin
          arready <= 1'b1;
        end
        if (arvalid && arready) begin
          assert (arsize == 3'd1 && arburst == 2'b01) else $error("unexpected AR attributes");
          active <= 1'b1;
          addr   <= araddr;
          left   <= int'(arlen) + 1;
          bursts <= bursts + 1;
        end
      end else begin
        if (!rvalid || rready) begin
          if (left > 0 && ($urandom % 4 != 0)) begin
            rvalid <= 1'b1;
            rdata  <= {byte_at(addr + 1), byte_at(addr)};
            rlast  <= (left == 1);
            addr   <= addr + 2;
            left   <= left - 1;
          end else begin
            rvalid <= 1'b0;
            rlast  <= 1'b0;
            if (left > 0) stalls <= stalls + 1;
            if (left == 0) active <= 1'b0;
          end
        end
      end
    end
  end
endmodule
