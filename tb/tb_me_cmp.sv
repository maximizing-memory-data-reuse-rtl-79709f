// tb_me_cmp: feeds random candidate streams (quad offsets in forward or
// reverse raster order, random SADs with many ties) to comparator units for
// block B and block D of quads placed at the frame corners and in the
// middle, and compares the kept minimum and displacement with a model: block
// displacement = quad offset minus N for a right-hand/lower block, candidate
// counted only inside the search range and the frame, ties broken by the
// smaller vertical then horizontal displacement. Some trials start from a
// loaded partial solution instead of an empty result.
module tb_me_cmp;
  import me_pkg::*;
  localparam int unsigned N = 4, L = 4, R = 3, U = 4, D = 3, FW = 32, FH = 24;
  logic clk = 0, rst_n = 0, clear = 0, cand_valid = 0;
  logic [15:0] blk_x = '0, blk_y = '0;
  sad_t cand_sad = '0;
  mv_t cand_dx = '0, cand_dy = '0;
  mv_result_t res_b, res_d, clear_val = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Both units see the same quad; block D sits N below block B.
  logic [15:0] qx = '0, qy = '0;
  me_cmp #(.N(N), .L(L), .R(R), .U(U), .D(D), .FW(FW), .FH(FH), .BLK(1)) u_b (
    .clk, .rst_n, .clear, .clear_val, .blk_x(qx + 16'(N)), .blk_y(qy), .cand_valid, .cand_sad,
    .cand_dx, .cand_dy, .result(res_b));
  me_cmp #(.N(N), .L(L), .R(R), .U(U), .D(D), .FW(FW), .FH(FH), .BLK(3)) u_d (
    .clk, .rst_n, .clear, .clear_val, .blk_x(qx + 16'(N)), .blk_y(qy + 16'(N)), .cand_valid, .cand_sad,
    .cand_dx, .cand_dy, .result(res_d));

  function automatic void model_take(inout mv_result_t m, input int bx, input int by,
                                     input int mx, input int my, input int s);
    if (mx < -int'(L) || mx > int'(R) || my < -int'(U) || my > int'(D)) return;
    if (bx + mx < 0 || bx + mx + int'(N) > int'(FW) || by + my < 0 || by + my + int'(N) > int'(FH)) return;
    if (!m.found || s < int'(m.sad) ||
        (s == int'(m.sad) && (my < int'(m.mv_y) || (my == int'(m.mv_y) && mx < int'(m.mv_x))))) begin
      m.found = 1; m.sad = sad_t'(s); m.mv_x = mv_t'(mx); m.mv_y = mv_t'(my);
    end
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int qxs [5] = '{0, 24, 0, 24, 8};
    int qys [5] = '{0, 0, 16, 16, 8};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 100; trial++) begin
      automatic mv_result_t mb, md;
      automatic bit rev = trial[0];
      @(negedge clk);
      qx = 16'(qxs[trial % 5]); qy = 16'(qys[trial % 5]);
      clear_val = '0;
      if (trial >= 5 && $urandom_range(0, 1) == 1) begin
        clear_val.found = 1'b1;
        clear_val.sad   = sad_t'($urandom_range(0, 40));
        clear_val.mv_x  = mv_t'($urandom_range(0, L + R) - L);
        clear_val.mv_y  = mv_t'($urandom_range(0, U + D) - U);
      end
      mb = clear_val; md = clear_val;
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int dy = -int'(U); dy <= int'(D + N); dy++)
        for (int k = 0; k <= int'(L + R + N); k++) begin
          automatic int dx = rev ? int'(R + N) - k : k - int'(L);
          automatic int s = (trial < 3) ? 100 : $urandom_range(0, 40);
          cand_valid = ($urandom_range(0, 7) != 0);
          cand_dx = mv_t'(dx); cand_dy = mv_t'(dy); cand_sad = sad_t'(s);
          if (cand_valid) begin
            model_take(mb, qxs[trial % 5] + N, qys[trial % 5], dx - N, dy, s);
            model_take(md, qxs[trial % 5] + N, qys[trial % 5] + N, dx - N, dy - N, s);
          end
          @(negedge clk);
        end
      cand_valid = 0;
      @(negedge clk);
      checks += 2;
      if (res_b !== mb) begin
        failures++;
        $display("trial %0d B: got %0d sad=%0d (%0d,%0d) exp %0d sad=%0d (%0d,%0d)", trial,
                 res_b.found, res_b.sad, int'(res_b.mv_x), int'(res_b.mv_y), mb.found, mb.sad, int'(mb.mv_x), int'(mb.mv_y));
      end
      if (res_d !== md) begin
        failures++;
        $display("trial %0d D: got %0d sad=%0d (%0d,%0d) exp %0d sad=%0d (%0d,%0d)", trial,
                 res_d.found, res_d.sad, int'(res_d.mv_x), int'(res_d.mv_y), md.found, md.sad, int'(md.mv_x), int'(md.mv_y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
