// tb_axi_image_loader: the loader reads a 3 x 32 x 32 8-bit image over AXI4
// from a memory model that stalls ARREADY and RVALID at random. Every pixel
// pair written out is compared with the image function, each pixel must be
// written exactly once, and the image must take 6 bursts of 256 beats.
// Without stalls the 1536 beats need at least 1536 cycles; the check allows
// the random stalls plus a small per-burst overhead.
module tb_axi_image_loader;
  import mp_pkg::*;
  localparam int unsigned SEED = 7;
  localparam logic [31:0] BASE = 32'h0001_0000;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [31:0] araddr;
  logic [7:0] arlen;
  logic [2:0] arsize;
  logic [1:0] arburst, rresp;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [15:0] rdata;
  logic pix_we, busy, done;
  logic [1:0] pix_ch;
  logic [4:0] pix_y, pix_x;
  logic [1:0][7:0] pix_data;
  int bursts, stalls;
  int checks = 0, failures = 0;
  int seen [3][32][32];
  int cycles = 0;

  axi_image_loader #(.C(3), .H(32), .W(32), .BURST(256), .ADDR_W(32)) dut (
    .clk, .rst_n, .start, .base(BASE), .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
    .rdata, .rresp, .rlast, .rvalid, .rready, .pix_we, .pix_ch, .pix_y, .pix_x, .pix_data,
    .busy, .done);

  axi_mem_model #(.SEED(SEED), .H(32), .W(32), .BASE(BASE)) u_mem (
    .clk, .rst_n, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready, .rdata, .rresp,
    .rlast, .rvalid, .rready, .bursts, .stalls);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && busy) cycles++;

  always @(negedge clk) if (rst_n && pix_we) begin
    for (int k = 0; k < 2; k++) begin
      automatic int x = int'(pix_x) + k;
      checks++;
      if (pix_data[k] != 8'(image_pixel(SEED, pix_ch, pix_y, x))) begin
        failures++;
        if (failures < 10) $display("FAIL ch %0d y %0d x %0d", pix_ch, pix_y, x);
      end
      if (x < 32) seen[pix_ch][pix_y][x]++;
    end
  end

  initial begin
    for (int c = 0; c < 3; c++) for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) seen[c][y][x] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int c = 0; c < 3; c++) for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) begin
      checks++;
      if (seen[c][y][x] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d/%0d/%0d written %0d times", c, y, x, seen[c][y][x]);
      end
    end
    checks++;
    if (bursts != 6) begin failures++; $display("FAIL %0d bursts", bursts); end
    checks++;
    if (cycles < 1536 || cycles > 1536 + stalls + 6 * 8) begin
      failures++; $display("FAIL %0d cycles, %0d stalls", cycles, stalls);
    end
    $display("loader: %0d cycles, %0d bursts, %0d stalls", cycles, bursts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
