// me_cmp: comparator unit, minimum-SAD search for one current block.
//
// Candidates arrive one per cycle as SADs at a displacement given relative
// to the quad (cand_dx, cand_dy: the offset of PE and pass). BLK selects
// which block of the quad this unit serves (0=A,1=B,2=C,3=D); the unit turns
// the quad offset into the block's own displacement by subtracting N for a
// right-hand and/or lower block. A candidate counts only if that displacement
// lies in the search range (-L..R horizontally, -U..D vertically) and the
// displaced N x N search block lies inside the FW x FH frame; the unit then
// keeps the smallest SAD and its displacement (u and v of the cost function).
// Among equal SADs the displacement that comes first in raster order (mv_y,
// then mv_x, ascending) wins, whatever order the candidates arrive in; this
// lets a partial solution from the previous column be merged in.
//
// Interface: clear (one cycle) starts a new block at origin blk_x/blk_y from
// clear_val: all zero for a fresh search, or the partial solution (best
// candidate so far) computed for this block by the behind PE array while the
// previous column was processed. result is valid (found=1) once any counted
// candidate has been seen.
// Timing: one candidate per cycle, result registered.
// Minimum search over the SADs follows the document (Eq. 2, 3); candidate
// filtering at the frame edge is this design's choice.
module me_cmp
  import me_pkg::*;
#(
  parameter int unsigned N   = 4,
  parameter int unsigned L   = 4,
  parameter int unsigned R   = 3,
  parameter int unsigned U   = 4,
  parameter int unsigned D   = 3,
  parameter int unsigned FW  = 176,
  parameter int unsigned FH  = 144,
  parameter int unsigned BLK = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  mv_result_t  clear_val,   // starting point: a partial solution or all zero
  input  logic [15:0] blk_x,
  input  logic [15:0] blk_y,
  input  logic        cand_valid,
  input  sad_t        cand_sad,
  input  mv_t         cand_dx,
  input  mv_t         cand_dy,
  output mv_result_t  result
);

  localparam int signed XSH = (BLK % 2) * N;
  localparam int signed YSH = (BLK / 2) * N;

  int  mvx, mvy, px, py;
  logic in_range, in_frame, take;

  always_comb begin
    mvx = int'(cand_dx) - XSH;
    mvy = int'(cand_dy) - YSH;
    px  = int'(blk_x) + mvx;
    py  = int'(blk_y) + mvy;
    in_range = (mvx >= -int'(L)) && (mvx <= int'(R)) &&
               (mvy >= -int'(U)) && (mvy <= int'(D));
    in_frame = (px >= 0) && (px + int'(N) <= int'(FW)) &&
               (py >= 0) && (py + int'(N) <= int'(FH));
    // Smallest SAD; among equal SADs the smallest (mv_y, mv_x) in raster
    // order, so the outcome does not depend on the order candidates arrive.
    take = cand_valid && in_range && in_frame &&
           (!result.found || (cand_sad < result.sad) ||
            ((cand_sad == result.sad) &&
             ((mvy < int'(result.mv_y)) || ((mvy == int'(result.mv_y)) && (mvx < int'(result.mv_x))))));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0;
    end else if (clear) begin
      result <= clear_val;
    end else if (take) begin
      result.found <= 1'b1;
      result.sad   <= cand_sad;
      result.mv_x  <= mv_t'(mvx);
      result.mv_y  <= mv_t'(mvy);
    end
  end

endmodule
