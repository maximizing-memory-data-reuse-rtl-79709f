// Shared body of the end-to-end testbenches of me_top.
// The including module declares N, L, R, U, D, FW, FH, SEED and STANDALONE
// and instantiates me_top as "dut" on the signals declared here. With
// STANDALONE set the body prints the result line and ends the simulation;
// otherwise it raises "finished" and leaves checks/failures to the includer.
// Frames: the reference frame is pseudo-random; each current block is a copy
// of the reference frame at a random displacement inside its search range,
// with some pixels disturbed, and some blocks are pure noise. The expected
// motion vectors come from a plain full search written out below, using the
// same tie rule as the design (first minimum in raster order of (dy, dx)).

  import me_pkg::*;

  localparam int unsigned AW    = $clog2(FW*FH);
  localparam int unsigned H     = 2*N + U + D;
  localparam int          S     = ((int'(R) - int'(N) + 1) < (int'(N) - int'(L))) ? (int'(R) - int'(N) + 1) : (int'(N) - int'(L));
  localparam int unsigned W     = unsigned'(2*int'(N) + int'(R) - S);
  localparam int unsigned PD    = U + D + N + 1;
  localparam int unsigned NPE   = unsigned'(2*int'(R) + int'(L) - S + 2);
  localparam int unsigned NQX   = FW / (2*N);
  localparam int unsigned NQY   = FH / (2*N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic busy, done;
  logic cur_rd_en, ref_rd_en;
  logic [AW-1:0] cur_rd_addr, ref_rd_addr;
  pixel_t cur_rd_data, ref_rd_data;
  logic res_valid;
  logic [15:0] res_qx, res_qy;
  mv_result_t res [NBLK];
  logic [31:0] stat_ref_reads, stat_cur_reads;

  always #5 clk = ~clk;

  pixel_t cur_mem [FW*FH];
  pixel_t ref_mem [FW*FH];

  always_ff @(posedge clk) begin
    if (cur_rd_en) cur_rd_data <= cur_mem[cur_rd_addr];
    if (ref_rd_en) ref_rd_data <= ref_mem[ref_rd_addr];
  end

  int checks = 0;
  int failures = 0;
  logic finished = 1'b0;

  // Mechanism counters.
  int n_quads = 0, n_window_reuse = 0, n_edge_clip = 0, n_partial = 0, n_four_found = 0;

  function automatic int unsigned sad_at(int bx, int by, int dx, int dy);
    int unsigned s = 0;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        int a = cur_mem[(by+i)*FW + bx+k];
        int b = ref_mem[(by+dy+i)*FW + bx+dx+k];
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  function automatic mv_result_t ref_search(int bx, int by);
    mv_result_t best = '0;
    for (int dy = -int'(U); dy <= int'(D); dy++)
      for (int dx = -int'(L); dx <= int'(R); dx++) begin
        if (bx+dx < 0 || bx+dx+int'(N) > int'(FW) || by+dy < 0 || by+dy+int'(N) > int'(FH)) continue;
        begin
          int unsigned s = sad_at(bx, by, dx, dy);
          if (!best.found || s < best.sad) begin
            best.found = 1'b1; best.sad = sad_t'(s); best.mv_x = mv_t'(dx); best.mv_y = mv_t'(dy);
          end
        end
      end
    return best;
  endfunction

  // Reads of the reference frame the design should make: one column of quads
  // fetches every frame row once, over the in-frame part of its window width.
  function automatic longint expected_ref_reads();
    longint t = 0;
    for (int qc = 0; qc < int'(NQX); qc++) begin
      int x0 = qc*2*int'(N) + S;
      int cols = 0;
      for (int c = 0; c < int'(W); c++) if (x0 + c >= 0 && x0 + c < int'(FW)) cols++;
      t += longint'(cols) * FH;
    end
    return t;
  endfunction

  function automatic longint expected_cycles();
    longint first_q = 4*N*N + H*W + 1 + PD*(N*W+1) + NPE + 2;
    longint next_q  = 4*N*N + 2*N*W + 1 + PD*(N*W+1) + NPE + 2;
    // Every column but the last also loads half of the next column's quad.
    longint extra   = longint'(NQX-1) * NQY * 2*N*N;
    // +2: start is sampled one cycle before the first read, done is registered.
    return longint'(NQX) * (first_q + longint'(NQY-1) * next_q) + extra + 2;
  endfunction

  task automatic make_frames();
    void'($urandom(SEED));
    for (int a = 0; a < int'(FW*FH); a++) ref_mem[a] = pixel_t'($urandom);
    for (int by = 0; by < int'(FH); by += N)
      for (int bx = 0; bx < int'(FW); bx += N) begin
        int kind = $urandom_range(0, 9);
        int dx, dy;
        do begin
          dx = $urandom_range(0, L+R) - int'(L);
          dy = $urandom_range(0, U+D) - int'(U);
        end while (bx+dx < 0 || bx+dx+int'(N) > int'(FW) || by+dy < 0 || by+dy+int'(N) > int'(FH));
        for (int i = 0; i < N; i++)
          for (int k = 0; k < N; k++) begin
            pixel_t p = ref_mem[(by+dy+i)*FW + bx+dx+k];
            if (kind == 0) p = pixel_t'($urandom);           // no match anywhere
            else if (kind < 4 && $urandom_range(0, 7) == 0) p = p + pixel_t'($urandom_range(1, 9));
            cur_mem[(by+i)*FW + bx+k] = p;
          end
      end
  endtask

  longint t_start, t_done, cyc = 0;
  longint last_reads = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Check each quad's four results when they come out.
  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      automatic longint d = longint'(stat_ref_reads) - last_reads;
      n_quads++;
      if (res_qy != 0 && d < H*W) n_window_reuse++;
      if (res_qx == 0 || res_qy == 0) n_edge_clip++;
      last_reads = stat_ref_reads;
      if (res[0].found && res[1].found && res[2].found && res[3].found) n_four_found++;
      for (int j = 0; j < NBLK; j++) begin
        automatic int bx = res_qx + (j % 2) * N;
        automatic int by = res_qy + (j / 2) * N;
        automatic mv_result_t e = ref_search(bx, by);
        checks++;
        if (res[j] !== e) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH block (%0d,%0d): got found=%0d sad=%0d mv=(%0d,%0d) exp found=%0d sad=%0d mv=(%0d,%0d)",
                     bx, by, res[j].found, res[j].sad, int'(res[j].mv_x), int'(res[j].mv_y),
                     e.found, e.sad, int'(e.mv_x), int'(e.mv_y));
        end
        // Blocks A and C whose best offset lies left of the front array's
        // reach came from the partial solution of the previous column.
        if ((j % 2) == 0 && res_qx != 0 && res[j].found && int'(res[j].mv_x) < S) n_partial++;
      end
    end
  end

  task automatic check_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("MECHANISM NEVER SEEN: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    make_frames();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start <= 1'b1;
    t_start = cyc;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk iff done);
    t_done = cyc;
    @(posedge clk);
    checks++;
    if (n_quads != int'(NQX*NQY)) begin
      failures++; $display("quads: got %0d expected %0d", n_quads, NQX*NQY);
    end
    checks++;
    if (longint'(stat_ref_reads) != expected_ref_reads()) begin
      failures++; $display("reference reads: got %0d expected %0d", stat_ref_reads, expected_ref_reads());
    end
    checks++;
    if (stat_cur_reads != FW*FH + (NQX-1)*NQY*2*N*N) begin
      failures++; $display("current reads: got %0d expected %0d", stat_cur_reads, FW*FH + (NQX-1)*NQY*2*N*N);
    end
    checks++;
    if (t_done - t_start != expected_cycles()) begin
      failures++; $display("cycles: got %0d expected %0d", t_done - t_start, expected_cycles());
    end
    $display("frame %0dx%0d, N=%0d, range x -%0d..%0d y -%0d..%0d: %0d cycles, %0d reference reads, %0d current reads",
             FW, FH, N, L, R, U, D, t_done - t_start, stat_ref_reads, stat_cur_reads);
    check_count("quads (four-way reuse)", n_four_found);
    check_count("search window row reuse", n_window_reuse);
    check_count("frame-edge clipping", n_edge_clip);
    check_count("partial solution carried", n_partial);
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    finished = 1'b1;
  end
