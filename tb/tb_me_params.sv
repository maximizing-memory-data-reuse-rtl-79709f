// tb_me_params: end-to-end runs of me_top at unusual parameter sets, to show
// the RTL is not tied to the default sizes: asymmetric ranges with L > N and
// R = 0, a 2 x 2 block, an 8 x 8 block with a purely horizontal range, and a
// block size that is not a power of two. Each run checks every block against
// a plain full search and the cycle and read counts (see me_tb_body.svh).
module tb_me_params;
  int c [4], f [4];
  logic fin [4];

  me_tb_env #(.N(4), .L(6), .R(0), .U(1), .D(5), .FW(24), .FH(16), .SEED(3)) u0 (
    .fin(fin[0]), .n_checks(c[0]), .n_failures(f[0]));
  me_tb_env #(.N(2), .L(2), .R(2), .U(2), .D(2), .FW(20), .FH(12), .SEED(4)) u1 (
    .fin(fin[1]), .n_checks(c[1]), .n_failures(f[1]));
  me_tb_env #(.N(8), .L(8), .R(9), .U(0), .D(0), .FW(32), .FH(32), .SEED(5)) u2 (
    .fin(fin[2]), .n_checks(c[2]), .n_failures(f[2]));
  me_tb_env #(.N(3), .L(2), .R(1), .U(1), .D(1), .FW(18), .FH(12), .SEED(6)) u3 (
    .fin(fin[3]), .n_checks(c[3]), .n_failures(f[3]));

  initial begin
    fork
      begin
        #1;
        wait (fin[0] && fin[1] && fin[2] && fin[3]);
        #1;
        $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
        $finish;
      end
      begin
        #1000000;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
        $finish;
      end
    join_any
  end
endmodule
