// axi_image_loader: AXI4 read master that brings the input image on chip.
//
// The image lies in off-chip memory as C planes of H x W signed 8-bit pixels,
// row-major, starting at base. After start the loader reads it once with
// INCR bursts of up to BURST beats (ARSIZE = 2 bytes per beat, two pixels per
// beat, pixel x in the low byte). Every accepted beat comes out as a write
// request (pix_we) for pixels x and x+1 of row y in plane ch, for the top to
// store in the input feature RAM. One burst is outstanding at a time; RREADY
// is always high while a burst runs. done pulses after the last beat.
// Own choices: the 16-bit data bus, one outstanding burst, RRESP ignored.
module axi_image_loader #(
  parameter int unsigned C      = 3,
  parameter int unsigned H      = 32,
  parameter int unsigned W      = 32,
  parameter int unsigned BURST  = 256,
  parameter int unsigned ADDR_W = 32,
  localparam int unsigned BEATS = C * H * W / 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [ADDR_W-1:0]  base,
  // AXI4 read address channel
  output logic [ADDR_W-1:0]  araddr,
  output logic [7:0]         arlen,
  output logic [2:0]         arsize,
  output logic [1:0]         arburst,
  output logic               arvalid,
  input  logic               arready,
  // AXI4 read data channel
  input  logic [15:0]        rdata,
  input  logic [1:0]         rresp,
  input  logic               rlast,
  input  logic               rvalid,
  output logic               rready,
  // pixel write requests
  output logic               pix_we,
  output logic [$clog2(C)-1:0] pix_ch,
  output logic [$clog2(H)-1:0] pix_y,
  output logic [$clog2(W)-1:0] pix_x,
  output logic [1:0][7:0]    pix_data,
  output logic               busy,
  output logic               done
);
  typedef enum logic [1:0] {L_IDLE, L_ADDR, L_DATA} state_t;
  state_t state;
  logic [$clog2(BEATS+1)-1:0] beat;      // beats received so far
  logic [$clog2(C)-1:0] ch;
  logic [$clog2(H)-1:0] y;
  logic [$clog2(W)-1:0] x;
  logic [ADDR_W-1:0]    base_q;
  logic                 unused_ok;

  assign arsize    = 3'd1;  // 2 bytes per beat
  assign arburst   = 2'b01; // INCR
  assign rready    = (state == L_DATA);
  assign busy      = (state != L_IDLE);
  assign unused_ok = ^rresp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= L_IDLE;
      beat    <= '0;
      ch      <= '0;
      y       <= '0;
      x       <= '0;
      base_q  <= '0;
      araddr  <= '0;
      arlen   <= '0;
      arvalid <= 1'b0;
      pix_we  <= 1'b0;
      pix_ch  <= '0;
      pix_y   <= '0;
      pix_x   <= '0;
      pix_data <= '0;
      done    <= 1'b0;
    end else begin
      pix_we <= 1'b0;
      done   <= 1'b0;
      unique case (state)
        L_IDLE: if (start) begin
          base_q <= base;
          beat   <= '0;
          ch <= '0; y <= '0; x <= '0;
          state  <= L_ADDR;
        end
        L_ADDR: begin
          if (!arvalid) begin
            araddr  <= base_q + ADDR_W'(32'(beat) * 2);
            arlen   <= 8'(((BEATS - 32'(beat)) < BURST ? (BEATS - 32'(beat)) : BURST) - 1);
            arvalid <= 1'b1;
          end else if (arready) begin
            arvalid <= 1'b0;
            state   <= L_DATA;
          end
        end
        L_DATA: if (rvalid) begin
          pix_we   <= 1'b1;
          pix_ch   <= ch;
          pix_y    <= y;
          pix_x    <= x;
          pix_data <= rdata;
          beat     <= beat + 1'b1;
          if (32'(x) + 2 >= W) begin
            x <= '0;
            if (32'(y) == H - 1) begin
              y  <= '0;
              ch <= ch + 1'b1;
            end else y <= y + 1'b1;
          end else x <= x + 2'd2;
          if (rlast) begin
            if (32'(beat) + 1 == BEATS) begin
              done  <= 1'b1;
              state <= L_IDLE;
            end else state <= L_ADDR;
          end
        end
        default: state <= L_IDLE;
      endcase
    end
  end

  // AXI4: the address must stay stable while ARVALID waits for ARREADY.
  logic [ADDR_W-1:0] araddr_q;
  logic              ar_wait_q;
  always_ff @(posedge clk) begin
    araddr_q  <= araddr;
    ar_wait_q <= arvalid && !arready;
    if (rst_n && ar_wait_q)
      assert (arvalid && araddr == araddr_q) else $error("axi_image_loader: AR changed before handshake");
  end
endmodule
