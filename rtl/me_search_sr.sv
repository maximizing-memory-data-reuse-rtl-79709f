// me_search_sr: search-data shift register (search window store).
//
// Holds the H x W pixel search window that the PE arrays read, with
// H = 2N+U+D rows and W = 2N+R-S columns (S = min(R-N+1, N-L), see me_top):
// the part of the union of the four blocks' search areas that the front
// array needs, which also holds what the behind array uses. Search pixels arrive one per cycle,
// row by row, into a staging row; writing the last pixel of a row (wr_last)
// shifts the whole window up by one row and appends the staging row at the
// bottom. Moving down a column of quads by 2N rows then only needs 2N new
// rows; the U+D rows the two windows share stay in place and are not fetched
// again from external memory.
//
// Interface: write port (wr_en, wr_col, wr_data, wr_last) and one
// combinational read port (rd_row, rd_col -> rd_data); row 0 is the top of
// the window. A write with wr_last also writes wr_data at wr_col, so a row
// takes W cycles. Contents are cleared by reset.
// The 8-bit search-data shift register follows the document; shifting by
// whole rows and the window size are this design's choices.
module me_search_sr
  import me_pkg::*;
#(
  parameter int unsigned H = 15,
  parameter int unsigned W = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [$clog2(W)-1:0] wr_col,
  input  pixel_t               wr_data,
  input  logic                 wr_last,
  input  logic [$clog2(H)-1:0] rd_row,
  input  logic [$clog2(W)-1:0] rd_col,
  output pixel_t               rd_data
);

  pixel_t win   [H][W];
  pixel_t stage [W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          win[r][c] <= '0;
      for (int c = 0; c < W; c++)
        stage[c] <= '0;
    end else if (wr_en) begin
      stage[wr_col] <= wr_data;
      if (wr_last) begin
        for (int r = 0; r < H - 1; r++)
          win[r] <= win[r+1];
        for (int c = 0; c < W; c++)
          win[H-1][c] <= (c == int'(wr_col)) ? wr_data : stage[c];
      end
    end
  end

  assign rd_data = win[rd_row][rd_col];

endmodule
