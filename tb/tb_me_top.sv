// tb_me_top: end-to-end test of me_top on a small 32 x 24 frame with the
// default block size and search range. Every block's motion vector and SAD
// is compared with a plain full search, and the number of cycles and of
// external reads with their closed-form values (see me_tb_body.svh).
module tb_me_top;
  localparam int unsigned N = 4, L = 4, R = 3, U = 4, D = 3;
  localparam int unsigned FW = 32, FH = 24;
  localparam bit STANDALONE = 1'b1;
  localparam int unsigned SEED = 7;

  `include "tb/me_tb_body.svh"

  me_top #(.N(N), .L(L), .R(R), .U(U), .D(D), .FW(FW), .FH(FH)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
