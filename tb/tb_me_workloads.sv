// tb_me_workloads: runs the estimator on one 176 x 144 (QCIF) frame in the
// other configurations it is evaluated in besides the default:
//   R2: 8 x 8 blocks, search -7..+7 horizontally, -8..+7 vertically;
//   4 x 4 blocks with an 8/-7 search range (-8..+7 both ways);
//   4 x 4 blocks with a 16/-15 search range (-16..+15 both ways).
// (R1, 4 x 4 blocks with -4..+3, is the default and runs in tb_me_full;
// R3, 16 x 16 blocks, needs a frame width that is a multiple of 32.)
// Each configuration checks every block against a plain full search and the
// cycle and read counts; the three run side by side.
module tb_me_workloads;
  int c [3], f [3];
  logic fin [3];

  me_tb_env #(.N(8), .L(7),  .R(7),  .U(8),  .D(7),  .FW(176), .FH(144), .SEED(21)) u_r2 (
    .fin(fin[0]), .n_checks(c[0]), .n_failures(f[0]));
  me_tb_env #(.N(4), .L(8),  .R(7),  .U(8),  .D(7),  .FW(176), .FH(144), .SEED(22)) u_s8 (
    .fin(fin[1]), .n_checks(c[1]), .n_failures(f[1]));
  me_tb_env #(.N(4), .L(16), .R(15), .U(16), .D(15), .FW(176), .FH(144), .SEED(23)) u_s16 (
    .fin(fin[2]), .n_checks(c[2]), .n_failures(f[2]));

  initial begin
    fork
      begin
        #1;
        wait (fin[0] && fin[1] && fin[2]);
        #1;
        $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
        $finish;
      end
      begin
        // watchdog: far beyond the 2.3 million cycles of the largest run (10 time units per cycle)
        #100000000;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
        $finish;
      end
    join_any
  end
endmodule
