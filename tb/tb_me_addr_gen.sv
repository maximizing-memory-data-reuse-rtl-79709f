// tb_me_addr_gen: checks current-frame and reference-frame addresses and the
// in-frame flag of the address generator for random quads (including the
// frame corners) and random positions inside the quad and its search window,
// and the current addresses of the next column's quad (cur_next).
module tb_me_addr_gen;
  import me_pkg::*;
  localparam int unsigned N = 4, L = 4, R = 3, U = 4, D = 3, FW = 176, FH = 144;
  localparam int          S = ((int'(R) - int'(N) + 1) < (int'(N) - int'(L))) ? (int'(R) - int'(N) + 1) : (int'(N) - int'(L));
  localparam int unsigned H = 2*N + U + D, W = unsigned'(2*int'(N) + int'(R) - S), AW = $clog2(FW*FH);
  logic [15:0] qx = '0, qy = '0;
  logic cur_next = 1'b0;
  logic [$clog2(2*N)-1:0] cur_row = '0, cur_col = '0;
  logic [$clog2(H)-1:0] win_row = '0;
  logic [$clog2(W)-1:0] win_col = '0;
  logic [AW-1:0] cur_addr, ref_addr;
  logic ref_inframe;
  int checks = 0, failures = 0;

  me_addr_gen #(.N(N), .L(L), .R(R), .U(U), .D(D), .FW(FW), .FH(FH)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_out = 0;
    for (int t = 0; t < 4000; t++) begin
      automatic int x = (t % 4 == 0) ? 0 : (t % 4 == 1) ? int'(FW - 2*N) : 2*int'(N) * $urandom_range(0, FW/(2*N) - 1);
      automatic int y = (t % 8 < 4) ? ((t % 2) ? int'(FH - 2*N) : 0) : 2*int'(N) * $urandom_range(0, FH/(2*N) - 1);
      automatic int cr = $urandom_range(0, 2*N - 1), cc = $urandom_range(0, 2*N - 1);
      automatic int wr = $urandom_range(0, H - 1), wc = $urandom_range(0, W - 1);
      automatic int ry = y + wr - int'(U), rx = x + wc + S;
      automatic int nx = (x + 2*int'(N) < int'(FW)) ? int'($urandom_range(0, 1)) : 0;
      automatic logic in_f = (ry >= 0 && ry < int'(FH) && rx >= 0 && rx < int'(FW));
      qx = 16'(x); qy = 16'(y); cur_next = nx[0];
      cur_row = cr[$clog2(2*N)-1:0]; cur_col = cc[$clog2(2*N)-1:0];
      win_row = wr[$clog2(H)-1:0];   win_col = wc[$clog2(W)-1:0];
      #1;
      checks += 2;
      if (int'(cur_addr) != (y + cr) * int'(FW) + x + 2*int'(N)*nx + cc) failures++;
      if (ref_inframe !== in_f) failures++;
      if (in_f) begin
        checks++;
        if (int'(ref_addr) != ry * int'(FW) + rx) begin
          failures++;
          if (failures < 10) $display("ref (%0d,%0d): got %0d exp %0d", rx, ry, ref_addr, ry * FW + rx);
        end
      end else n_out++;
    end
    checks++;
    if (n_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
