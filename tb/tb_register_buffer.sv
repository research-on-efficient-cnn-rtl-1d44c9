// tb_register_buffer: streams several 6x8 tiles of known values into the
// register set, four values per write, writing only into free rows and with
// random idle cycles, while windows are taken as soon as they are offered.
// Every 3x3 window is compared with the tile it came from (24 per tile, in
// row-major order). With no idle cycles, steady state must give one window
// per cycle: 24 windows of a tile within 24 cycles once the pipeline is full,
// and writes of the next tile must overlap reads of the current one.
module tb_register_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, wr_en = 0, win_valid, win_take;
  logic [3:0][7:0] wr_data;
  logic [5:0] row_free;
  logic [4:0] win_idx;
  logic [8:0][7:0] win;
  int checks = 0, failures = 0;
  int cycle = 0;
  int overlap = 0;
  localparam int TILES = 8;
  int win_cnt = 0;
  int t_first [TILES];
  int t_last [TILES];
  bit gaps = 1;

  register_buffer #(.ROWS(6), .COLS(8), .K(3), .WR(4), .DW(8)) dut (
    .clk, .rst_n, .clr, .wr_en, .wr_data, .row_free, .win_valid, .win_idx, .win, .win_take);

  function automatic logic [7:0] val(input int tile, input int r, input int c);
    return 8'(tile * 53 + r * 8 + c);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;
  assign win_take = win_valid;

  // reader / checker
  always @(negedge clk) if (rst_n && win_valid) begin
    automatic int tile = win_cnt / 24;
    automatic int w = win_cnt % 24;
    automatic int r0 = w / 6, c0 = w % 6;
    if (wr_en) overlap++;
    if (w == 0) t_first[tile % TILES] = cycle;
    if (w == 23) t_last[tile % TILES] = cycle;
    checks++;
    if (int'(win_idx) != w) begin failures++; $display("FAIL window index %0d exp %0d", win_idx, w); end
    for (int t = 0; t < 9; t++) begin
      checks++;
      if (win[t] != val(tile, r0 + t / 3, c0 + t % 3)) begin
        failures++;
        if (failures < 10) $display("FAIL tile %0d win %0d tap %0d got %0d exp %0d", tile, w, t, win[t], val(tile, r0 + t/3, c0 + t%3));
      end
    end
    win_cnt++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int tile = 0; tile < TILES; tile++) begin
      if (tile == TILES / 2) gaps = 0;
      for (int k = 0; k < 12; k++) begin
        automatic int r = k / 2;
        wr_en = 0;
        while (!row_free[r]) @(negedge clk);
        for (int v = 0; v < 4; v++) wr_data[v] = val(tile, r, (k % 2) * 4 + v);
        wr_en = 1;
        @(negedge clk);
        wr_en = 0;
        if (gaps && $urandom % 4 == 0) @(negedge clk);
      end
    end
    wr_en = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (win_cnt != TILES * 24) begin failures++; $display("FAIL %0d windows", win_cnt); end
    // steady state, no gaps: a tile's 24 windows within 24 cycles
    for (int t = TILES / 2 + 1; t < TILES; t++) begin
      checks++;
      if (t_last[t] - t_first[t] + 1 > 24) begin
        failures++; $display("FAIL tile %0d took %0d cycles", t, t_last[t] - t_first[t] + 1);
      end
    end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL writes never overlapped reads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
