// register_buffer: two-dimensional register set between a feature RAM bank
// and the conv groups.
//
// The set holds a ROWS x COLS tile (6 x 8) of one input channel. It is filled
// row by row, WR values per write (four: two packed words read on the two RAM
// ports in one cycle), so 12 writes fill it. It is read as the 24 3x3 windows
// of the tile, one per cycle, in row-major window order; neighbouring windows
// share two columns, so each value fetched once feeds up to nine windows.
//
// Writing and reading overlap. Each row has a valid flag: a row is set valid
// when its last write lands, and cleared once the last window that uses it has
// been read (row r after the windows at row offset r, rows 3..5 after the last
// window). A window is offered when its three rows are valid. The writer may
// write a row only while row_free shows it free, so the next tile's rows 1-3
// are refilled while the windows in rows 4-6 are still being read, and its
// rows 4-6 while the new rows 1-3 are read, giving one window per cycle in
// steady state.
//
// Interface: wr_en/wr_data write the next group of WR values (the caller
// checks row_free for the row being written); win_valid/win/win_idx offer the
// next window, consumed when win_take is high. win holds the nine taps in
// row-major order. The write position can be aligned to a new tile with clr.
module register_buffer #(
  parameter int unsigned ROWS = 6,
  parameter int unsigned COLS = 8,
  parameter int unsigned K    = 3,
  parameter int unsigned WR   = 4,
  parameter int unsigned DW   = 8,
  localparam int unsigned WPR  = COLS / WR,                       // writes per row
  localparam int unsigned NWIN = (ROWS - K + 1) * (COLS - K + 1), // windows per tile
  localparam int unsigned WX   = COLS - K + 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clr,
  input  logic                         wr_en,
  input  logic [WR-1:0][DW-1:0]        wr_data,
  output logic [ROWS-1:0]              row_free,
  output logic                         win_valid,
  output logic [$clog2(NWIN)-1:0]      win_idx,
  output logic [K*K-1:0][DW-1:0]       win,
  input  logic                         win_take
);
  logic [DW-1:0]              regs [ROWS][COLS];
  logic [ROWS-1:0]            valid;
  logic [$clog2(ROWS)-1:0]    wr_row;
  logic [$clog2(WPR+1)-1:0]   wr_part;
  logic [$clog2(ROWS)-1:0]    rd_r;
  logic [$clog2(WX)-1:0]      rd_c;
  logic                       take;

  assign row_free = ~valid;

  always_comb begin
    win_valid = 1'b1;
    for (int k = 0; k < int'(K); k++)
      if (!valid[32'(rd_r) + k]) win_valid = 1'b0;
    for (int y = 0; y < int'(K); y++)
      for (int x = 0; x < int'(K); x++)
        win[y*K + x] = regs[32'(rd_r) + y][32'(rd_c) + x];
    win_idx = $bits(win_idx)'(32'(rd_r) * WX + 32'(rd_c));
    take = win_take && win_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= '0;
      wr_row  <= '0;
      wr_part <= '0;
      rd_r    <= '0;
      rd_c    <= '0;
      for (int r = 0; r < int'(ROWS); r++)
        for (int c = 0; c < int'(COLS); c++) regs[r][c] <= '0;
    end else if (clr) begin
      valid   <= '0;
      wr_row  <= '0;
      wr_part <= '0;
      rd_r    <= '0;
      rd_c    <= '0;
    end else begin
      // read side: retire rows whose last window has been consumed
      if (take) begin
        if (32'(rd_c) == WX - 1) begin
          rd_c <= '0;
          if (32'(rd_r) == ROWS - K) begin
            rd_r <= '0;
            for (int r = 0; r < int'(ROWS); r++)
              if (r >= int'(ROWS - K)) valid[r] <= 1'b0;
          end else begin
            rd_r <= rd_r + 1'b1;
          end
          if (32'(rd_r) < ROWS - K) valid[rd_r] <= 1'b0;
        end else begin
          rd_c <= rd_c + 1'b1;
        end
      end
      // write side
      if (wr_en) begin
        for (int j = 0; j < int'(WR); j++)
          regs[wr_row][32'(wr_part) * WR + j] <= wr_data[j];
        if (32'(wr_part) == WPR - 1) begin
          wr_part <= '0;
          valid[wr_row] <= 1'b1;
          wr_row <= (32'(wr_row) == ROWS - 1) ? '0 : wr_row + 1'b1;
        end else begin
          wr_part <= wr_part + 1'b1;
        end
      end
    end
  end

  // A write must never land on a row that still holds unread windows.
  always_ff @(posedge clk)
    if (rst_n && !clr && wr_en)
      assert (!valid[wr_row]) else $error("register_buffer: write into a valid row");
endmodule
