// tb_me_full: end-to-end test of me_top at its default configuration, one
// whole 176 x 144 (QCIF) frame of 4 x 4 blocks with a -4..+3 search range in
// both directions. Checks every block's motion vector and SAD against a plain
// full search, plus the cycle count and the external read counts
// (see me_tb_body.svh).
module tb_me_full;
  localparam int unsigned N = 4, L = 4, R = 3, U = 4, D = 3;
  localparam int unsigned FW = 176, FH = 144;
  localparam bit STANDALONE = 1'b1;
  localparam int unsigned SEED = 11;

  `include "tb/me_tb_body.svh"

  me_top dut (.*);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
