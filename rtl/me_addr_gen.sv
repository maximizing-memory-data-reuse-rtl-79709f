// me_addr_gen: external-memory address generator.
//
// Frames are stored in raster order, one byte per pixel, address = y*FW + x.
// For the current frame it turns a position (cur_row, cur_col) inside the
// 2N x 2N quad at (qx, qy) into an address; with cur_next set the position
// is taken in the quad one column to the right, at (qx+2N, qy), whose
// left-hand blocks the behind PE array works on. For the reference
// (previous) frame it turns a position (win_row, win_col) inside the quad's
// search window into an address. The window's top-left pixel is
// (qx+S, qy-U) with S = min(R-N+1, N-L): candidates further left are covered
// by the partial solutions from the previous column (see me_ctrl).
// Window pixels that fall outside the frame get ref_inframe=0: no memory
// access is made for them and the window stores 0 there (candidates that
// would use them are discarded by the comparators).
//
// Purely combinational. Its function (addresses of current and search data)
// follows the document; the raster memory layout and edge handling are this
// design's choices.
module me_addr_gen
  import me_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter int unsigned L  = 4,
  parameter int unsigned R  = 3,
  parameter int unsigned U  = 4,
  parameter int unsigned D  = 3,
  parameter int unsigned FW = 176,
  parameter int unsigned FH = 144,
  localparam int          S  = ((int'(R) - int'(N) + 1) < (int'(N) - int'(L))) ? (int'(R) - int'(N) + 1) : (int'(N) - int'(L)),
  localparam int unsigned H  = 2*N + U + D,
  localparam int unsigned W  = unsigned'(2*int'(N) + int'(R) - S),
  localparam int unsigned AW = $clog2(FW*FH)
) (
  input  logic [15:0]              qx,
  input  logic [15:0]              qy,
  input  logic                     cur_next,
  input  logic [$clog2(2*N)-1:0]   cur_row,
  input  logic [$clog2(2*N)-1:0]   cur_col,
  input  logic [$clog2(H)-1:0]     win_row,
  input  logic [$clog2(W)-1:0]     win_col,
  output logic [AW-1:0]            cur_addr,
  output logic [AW-1:0]            ref_addr,
  output logic                     ref_inframe
);

  logic [31:0]        cy, cx;
  logic signed [31:0] ry, rx;

  always_comb begin
    cy = 32'(qy) + 32'(cur_row);
    cx = 32'(qx) + 32'(cur_col) + (cur_next ? 32'(2*N) : 32'd0);
    cur_addr = AW'(cy * FW + cx);

    ry = signed'(32'(qy)) + signed'(32'(win_row)) - int'(U);
    rx = signed'(32'(qx)) + signed'(32'(win_col)) + S;
    ref_inframe = (ry >= 0) && (ry < FH) && (rx >= 0) && (rx < FW);
    ref_addr = ref_inframe ? AW'(ry * FW + rx) : '0;
  end

endmodule
