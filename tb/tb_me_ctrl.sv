// tb_me_ctrl: runs the sequencer over a 16 x 16 frame (2 x 2 quads) and
// checks its schedule: the quad order (down a column, then right), the
// number and order of current-data reads (this quad, then the left half of
// the next column's quad except in the last column), the partial-solution
// pops and pushes, the next-quad stream offset, the search rows fetched (all H for
// the first quad of a column, 2N otherwise), one clear and one result-load
// per pass with the pass offsets -U..D+N in order, the write strobes one
// cycle after the reads, the cycles per quad against the closed form, and a
// single done pulse.
module tb_me_ctrl;
  import me_pkg::*;
  localparam int unsigned N = 4, L = 4, R = 3, U = 4, D = 3, FW = 16, FH = 16;
  localparam int          S = ((int'(R) - int'(N) + 1) < (int'(N) - int'(L))) ? (int'(R) - int'(N) + 1) : (int'(N) - int'(L));
  localparam int unsigned H = 2*N + U + D, W = unsigned'(2*int'(N) + int'(R) - S), PD = U + D + N + 1;
  localparam int unsigned NPE = unsigned'(2*int'(R) + int'(L) - S + 2), OFF = unsigned'(2*int'(N) - int'(L) - S);
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] qx, qy;
  logic cur_rd_en, cur_wr_en, srch_fetch, srch_wr_en, srch_wr_last, x_valid;
  logic pe_en, pe_clr, rsr_load, cmp_clear, res_valid;
  logic first_col, cur_next, cur_wr_next, xn_valid, ps_pop, ps_push;
  logic [$clog2(2*N)-1:0] cur_row, cur_col, cur_wr_row, cur_wr_col;
  logic [$clog2(H)-1:0] win_row, rd_row;
  logic [$clog2(W)-1:0] win_col, srch_wr_col, rd_col;
  logic [$clog2(N)-1:0] cb_row, cb_col, cbn_col;
  mv_t rsr_dy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  me_ctrl #(.N(N), .L(L), .R(R), .U(U), .D(D), .FW(FW), .FH(FH)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-quad counters, sampled on the rising edge
  int n_curn, n_xn, n_pop, n_cur, n_srch, n_clr, n_load, n_xv, n_clear, n_done, quad, cyc_q, n_wr_last;
  int exp_dy;
  logic prev_cur_rd, prev_next; logic [$clog2(2*N)-1:0] prev_row, prev_col;
  logic prev_fetch; logic [$clog2(W)-1:0] prev_wcol;
  int first_win_row;

  initial begin
    n_cur = 0; n_srch = 0; n_clr = 0; n_load = 0; n_xv = 0; n_clear = 0; n_done = 0; quad = 0; cyc_q = 0;
    n_curn = 0; n_xn = 0; n_pop = 0; prev_next = 0;
    n_wr_last = 0; exp_dy = -int'(U); first_win_row = -1; prev_cur_rd = 0; prev_fetch = 0;
    prev_row = '0; prev_col = '0; prev_wcol = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
  end

  always @(posedge clk) if (rst_n) begin
    automatic int expq = (quad % (FH/(2*N)) == 0)
      ? 4*N*N + H*W + 1 + PD*(N*W+1) + NPE + 2
      : 4*N*N + 2*N*W + 1 + PD*(N*W+1) + NPE + 2;
    automatic bit lastc = (quad / (FH/(2*N)) == FW/(2*N) - 1);
    if (busy) cyc_q++;
    if (cur_rd_en && !cur_next) begin
      chk(n_curn == 0 && int'(cur_row) == n_cur / (2*N) && int'(cur_col) == n_cur % (2*N), "current read order");
      n_cur++;
    end
    if (cur_rd_en && cur_next) begin
      chk(n_cur == 4*N*N && int'(cur_row) == n_curn / N && int'(cur_col) == n_curn % N, "next-quad read order");
      n_curn++;
    end
    chk(cur_wr_next == prev_next, "next-quad write flag one cycle after read");
    prev_next = cur_next;
    if (xn_valid) begin
      chk(int'(cbn_col) == int'(rd_col) - int'(OFF), "next-quad column offset");
      n_xn++;
    end
    if (ps_pop) begin
      chk(cmp_clear && !first_col, "pop with the comparator clear");
      n_pop++;
    end
    chk(cur_wr_en == prev_cur_rd && (!cur_wr_en || (cur_wr_row == prev_row && cur_wr_col == prev_col)),
        "current write one cycle after read");
    chk(srch_wr_en == prev_fetch && (!srch_wr_en || srch_wr_col == prev_wcol), "search write one cycle after fetch");
    if (srch_wr_last) n_wr_last++;
    prev_cur_rd = cur_rd_en; prev_row = cur_row; prev_col = cur_col;
    prev_fetch = srch_fetch; prev_wcol = win_col;
    if (srch_fetch) begin
      if (first_win_row < 0) first_win_row = win_row;
      n_srch++;
    end
    if (pe_clr) begin
      n_clr++;
      chk(pe_en, "clear comes with enable");
    end
    if (x_valid) n_xv++;
    if (cmp_clear) n_clear++;
    if (rsr_load) begin
      chk(int'(rsr_dy) == exp_dy, $sformatf("pass offset %0d expected %0d", rsr_dy, exp_dy));
      chk(!pe_en, "sums are stable while loaded");
      exp_dy++;
      n_load++;
    end
    if (done) n_done++;
    if (res_valid) begin
      automatic bit first = (quad % (FH/(2*N)) == 0);
      chk(int'(qx) == (quad / (FH/(2*N))) * 2*N && int'(qy) == (quad % (FH/(2*N))) * 2*N, "quad order");
      chk(n_cur == 4*N*N, "current reads per quad");
      chk(n_curn == (lastc ? 0 : 2*N*N), $sformatf("next-quad reads %0d", n_curn));
      chk(n_xn == PD*N*N, "next-quad pixels streamed");
      chk(n_pop == ((qx == 0) ? 0 : 1), "partial solutions popped");
      chk(ps_push == !lastc, "partial solutions pushed");
      chk(n_srch == (first ? H*W : 2*N*W), $sformatf("search fetches %0d", n_srch));
      chk(n_wr_last == (first ? H : 2*N), "rows shifted in");
      chk(first_win_row == (first ? 0 : H - 2*N), "first window row fetched");
      chk(n_clr == PD && n_load == PD, $sformatf("passes: %0d clears %0d loads", n_clr, n_load));
      chk(n_xv == PD*N*N, "current pixels streamed");
      chk(n_clear == 1, "comparators cleared once");
      chk(cyc_q == expq + (lastc ? 0 : 2*N*N), $sformatf("quad %0d cycles %0d expected %0d", quad, cyc_q, expq + (lastc ? 0 : 2*N*N)));
      quad++;
      n_cur = 0; n_curn = 0; n_xn = 0; n_pop = 0; n_srch = 0; n_clr = 0; n_load = 0; n_xv = 0; n_clear = 0; cyc_q = 0; n_wr_last = 0;
      exp_dy = -int'(U); first_win_row = -1;
    end
    if (quad == (FW/(2*N))*(FH/(2*N)) && !busy) begin
      chk(n_done == 1, "one done pulse");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
