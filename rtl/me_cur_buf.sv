// me_cur_buf: current data buffer for a quad of four current blocks.
//
// Stores the 2N x 2N current-frame pixels of the quad: blocks A (top left),
// B (top right), C (bottom left) and D (bottom right), each N x N. It is
// written one pixel per cycle in raster order of the 2N x 2N area and read
// four pixels at a time: for block-relative position (rd_row, rd_col) it
// returns the pixel at that position in each of the four blocks, which is
// what the four subtractors of a PE need together.
//
// Interface: write (wr_en, wr_row, wr_col within 0..2N-1, wr_data), read
// (rd_row, rd_col within 0..N-1, combinational rd_data[j] for block j).
// The extra buffer for current data follows the document; its organisation
// is this design's choice.
module me_cur_buf
  import me_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                   clk,
  input  logic                   wr_en,
  input  logic [$clog2(2*N)-1:0] wr_row,
  input  logic [$clog2(2*N)-1:0] wr_col,
  input  pixel_t                 wr_data,
  input  logic [$clog2(N)-1:0]   rd_row,
  input  logic [$clog2(N)-1:0]   rd_col,
  output pix4_t                  rd_data
);

  pixel_t mem [2*N][2*N];

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[wr_row][wr_col] <= wr_data;
  end

  always_comb begin
    for (int j = 0; j < NBLK; j++)
      rd_data[j] = mem[int'(rd_row) + (j / 2) * N][int'(rd_col) + (j % 2) * N];
  end

endmodule
