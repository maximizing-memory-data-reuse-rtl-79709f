// me_top: full-search block-matching motion estimator with four-way reuse
// of search data.
//
// For every N x N block of the current frame the estimator finds the
// displacement (mv_x, mv_y), -L..R horizontally and -U..D vertically, whose
// N x N block of the reference (previous) frame gives the smallest sum of
// absolute differences (SAD). Blocks are handled four at a time, a 2x2 quad,
// and every search pixel read from the reference frame is compared in one
// cycle with one pixel of each of the four blocks (four subtractors per PE).
// Quads are visited down each column of the frame, then the next column to
// the right; moving down a column the search window keeps the U+D rows two
// neighbouring windows share, so each reference pixel is fetched once per
// column of quads.
//
// Partial solutions: while a column of quads is processed, the behind PE
// array also matches blocks A and C of the quad one column to the right
// against the search data already in the window, at horizontal offsets
// -L..R-N. Two behind comparators keep the best of those, and
// me_partial_sr carries it (one entry per block row, FH/N) to the next
// column, where it seeds the comparators of those blocks. So the window only
// has to reach offsets S..R+N, S = min(R-N+1, N-L), and is W = 2N+R-S wide
// instead of 2N+L+R. The configuration must have R < N or L >= N, and
// L+R >= N.
//
// Blocks: me_ctrl (sequencer), me_addr_gen (addresses), two me_cur_buf
// (this quad, 2N x 2N, and the next column's quad), me_search_sr (search
// window, H x W = (2N+U+D) x (2N+R-S)), front me_pe_array (R+N-S+1 PEs, quad
// offsets S..R+N) and behind me_pe_array (L+R-N+1 PEs), me_result_sr
// (serialises each pass's PE sums), four front and two behind me_cmp
// comparator units, and me_partial_sr.
//
// Interface: both frames sit in external memories, one byte per pixel at
// address y*FW + x, read with a one-cycle latency (data the cycle after
// *_rd_en). A start pulse processes the whole frame; done pulses at the end.
// res_valid pulses once per quad with res[j] for block j (0=A top left,
// 1=B top right, 2=C bottom left, 3=D bottom right) of the quad at pixel
// (res_qx, res_qy). stat_ref_reads/stat_cur_reads count the external reads
// since start; current pixels of blocks A and C outside the first column
// are read twice (once early for the behind array). Cycle count per quad:
// see me_ctrl.
// Defaults are the document's: 4x4 blocks, search range -4..+3 in both
// directions, a 176 x 144 (QCIF) frame. FW and FH must be multiples of 2N.
module me_top
  import me_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter int unsigned L  = 4,
  parameter int unsigned R  = 3,
  parameter int unsigned U  = 4,
  parameter int unsigned D  = 3,
  parameter int unsigned FW = 176,
  parameter int unsigned FH = 144,
  localparam int unsigned AW = $clog2(FW*FH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             cur_rd_en,
  output logic [AW-1:0]    cur_rd_addr,
  input  pixel_t           cur_rd_data,
  output logic             ref_rd_en,
  output logic [AW-1:0]    ref_rd_addr,
  input  pixel_t           ref_rd_data,
  output logic             res_valid,
  output logic [15:0]      res_qx,
  output logic [15:0]      res_qy,
  output mv_result_t       res [NBLK],
  output logic [31:0]      stat_ref_reads,
  output logic [31:0]      stat_cur_reads
);

  localparam int          S    = ((int'(R) - int'(N) + 1) < (int'(N) - int'(L))) ? (int'(R) - int'(N) + 1) : (int'(N) - int'(L));
  localparam int unsigned H    = 2*N + U + D;
  localparam int unsigned W    = unsigned'(2*int'(N) + int'(R) - S);
  localparam int unsigned NPEF = unsigned'(int'(R) + int'(N) - S + 1);   // front array
  localparam int unsigned NPEB = unsigned'(int'(L) + int'(R) - int'(N) + 1); // behind array
  localparam int unsigned NPE  = NPEF + NPEB;

  logic [15:0]              qx, qy;
  logic                     first_col;
  logic [$clog2(2*N)-1:0]   cur_row, cur_col, cur_wr_row, cur_wr_col;
  logic                     cur_next, cur_wr_en, cur_wr_next;
  logic                     srch_fetch, srch_wr_en, srch_wr_last;
  logic [$clog2(H)-1:0]     win_row, rd_row;
  logic [$clog2(W)-1:0]     win_col, srch_wr_col, rd_col;
  logic [$clog2(N)-1:0]     cb_row, cb_col, cbn_col;
  logic                     x_valid, xn_valid, pe_en, pe_clr, rsr_load, cmp_clear;
  logic                     ps_pop, ps_push;
  mv_t                      rsr_dy;
  logic                     ref_inframe, inframe_d;

  me_ctrl #(.N(N), .L(L), .R(R), .U(U), .D(D), .FW(FW), .FH(FH)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .qx, .qy, .first_col,
    .cur_rd_en, .cur_next, .cur_row, .cur_col, .cur_wr_en, .cur_wr_next, .cur_wr_row, .cur_wr_col,
    .srch_fetch, .win_row, .win_col, .srch_wr_en, .srch_wr_col, .srch_wr_last,
    .rd_row, .rd_col, .cb_row, .cb_col, .cbn_col, .x_valid, .xn_valid,
    .pe_en, .pe_clr, .rsr_load, .rsr_dy, .cmp_clear, .ps_pop, .ps_push, .res_valid
  );

  me_addr_gen #(.N(N), .L(L), .R(R), .U(U), .D(D), .FW(FW), .FH(FH)) u_agen (
    .qx, .qy, .cur_next, .cur_row, .cur_col, .win_row, .win_col,
    .cur_addr(cur_rd_addr), .ref_addr(ref_rd_addr), .ref_inframe
  );

  assign ref_rd_en = srch_fetch && ref_inframe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inframe_d <= 1'b0;
    else        inframe_d <= ref_inframe;
  end

  // Current data buffers: this quad, and the next column's quad (only its
  // left half, blocks A and C, is loaded and used).
  pix4_t x4, xn4;
  me_cur_buf #(.N(N)) u_cur (
    .clk, .wr_en(cur_wr_en && !cur_wr_next), .wr_row(cur_wr_row), .wr_col(cur_wr_col),
    .wr_data(cur_rd_data), .rd_row(cb_row), .rd_col(cb_col), .rd_data(x4)
  );
  me_cur_buf #(.N(N)) u_cur_next (
    .clk, .wr_en(cur_wr_en && cur_wr_next), .wr_row(cur_wr_row), .wr_col(cur_wr_col),
    .wr_data(cur_rd_data), .rd_row(cb_row), .rd_col(cbn_col), .rd_data(xn4)
  );

  // Search window.
  pixel_t y_comb, y_q;
  me_search_sr #(.H(H), .W(W)) u_srch (
    .clk, .rst_n, .wr_en(srch_wr_en), .wr_col(srch_wr_col),
    .wr_data(inframe_d ? ref_rd_data : pixel_t'(0)), .wr_last(srch_wr_last),
    .rd_row, .rd_col, .rd_data(y_comb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_q <= '0;
    else        y_q <= y_comb;
  end

  // Front PE array (this quad, offsets S..R+N) and behind PE array (next
  // quad's blocks A and C, offsets -L..R-N), both on the same search pixel.
  sad4_t sad_f [NPEF];
  sad4_t sad_b [NPEB];
  sad4_t sad_all [NPE];


  me_pe_array #(.NPE(NPEF)) u_front (
    .clk, .rst_n, .en(pe_en), .clr(pe_clr), .y(y_q),
    .x_in(x4), .x_in_valid(x_valid), .x_out(), .x_out_valid(), .sad(sad_f)
  );

  me_pe_array #(.NPE(NPEB), .LANE_MASK(4'b0101)) u_behind (
    .clk, .rst_n, .en(pe_en), .clr(pe_clr), .y(y_q),
    .x_in(xn4), .x_in_valid(xn_valid), .x_out(), .x_out_valid(), .sad(sad_b)
  );

  always_comb begin
    for (int p = 0; p < NPEF; p++) sad_all[p] = sad_f[p];
    for (int p = 0; p < NPEB; p++) sad_all[NPEF + p] = sad_b[p];
  end

  // Pass result register: serialises each pass's PE sums.
  logic                   rs_valid;
  sad4_t                  rs_sad;
  logic [$clog2(NPE)-1:0] rs_idx;
  mv_t                    rs_dy;

  me_result_sr #(.NPE(NPE)) u_rsr (
    .clk, .rst_n, .load(rsr_load), .din(sad_all), .dy(rsr_dy),
    .out_valid(rs_valid), .out_sad(rs_sad), .out_idx(rs_idx), .out_dy(rs_dy),
    .busy()
  );

  logic rs_front, rs_behind;
  mv_t  rs_dx_f, rs_dx_b;
  assign rs_front  = rs_valid && (int'(rs_idx) <  int'(NPEF));
  assign rs_behind = rs_valid && (int'(rs_idx) >= int'(NPEF));
  assign rs_dx_f   = mv_t'(int'(rs_idx) + S);
  assign rs_dx_b   = mv_t'(int'(rs_idx) - int'(NPEF) - int'(L));

  // Partial-solution shift register, one entry per block row.
  mv_result_t ps_head_a, ps_head_c;
  mv_result_t nb_res [2];   // behind comparators: next quad's A and C

  me_partial_sr #(.DEPTH(FH / N)) u_psr (
    .clk, .rst_n, .push2(ps_push), .in_a(nb_res[0]), .in_c(nb_res[1]),
    .pop2(ps_pop), .head_a(ps_head_a), .head_c(ps_head_c), .count()
  );

  // Four front comparator units; A and C start from the partial solutions.
  for (genvar j = 0; j < NBLK; j++) begin : g_cmp
    mv_result_t init;
    assign init = (first_col || (j % 2) == 1) ? mv_result_t'(0)
                : ((j == 0) ? ps_head_a : ps_head_c);
    me_cmp #(.N(N), .L(L), .R(R), .U(U), .D(D), .FW(FW), .FH(FH), .BLK(j)) u_cmp (
      .clk, .rst_n, .clear(cmp_clear), .clear_val(init),
      .blk_x(qx + 16'((j % 2) * N)), .blk_y(qy + 16'((j / 2) * N)),
      .cand_valid(rs_front), .cand_sad(rs_sad[j]), .cand_dx(rs_dx_f), .cand_dy(rs_dy),
      .result(res[j])
    );
  end

  // Two behind comparator units for the next column's blocks A and C.
  for (genvar b = 0; b < 2; b++) begin : g_cmp_next
    me_cmp #(.N(N), .L(L), .R(R), .U(U), .D(D), .FW(FW), .FH(FH), .BLK(2*b)) u_cmp (
      .clk, .rst_n, .clear(cmp_clear), .clear_val(mv_result_t'(0)),
      .blk_x(qx + 16'(2*N)), .blk_y(qy + 16'(b * N)),
      .cand_valid(rs_behind), .cand_sad(rs_sad[2*b]), .cand_dx(rs_dx_b), .cand_dy(rs_dy),
      .result(nb_res[b])
    );
  end

  assign res_qx = qx;
  assign res_qy = qy;

  // Access statistics.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_ref_reads <= '0;
      stat_cur_reads <= '0;
    end else if (start && !busy) begin
      stat_ref_reads <= '0;
      stat_cur_reads <= '0;
    end else begin
      if (ref_rd_en) stat_ref_reads <= stat_ref_reads + 1'b1;
      if (cur_rd_en) stat_cur_reads <= stat_cur_reads + 1'b1;
    end
  end

endmodule
