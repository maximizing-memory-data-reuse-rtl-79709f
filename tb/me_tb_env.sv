// me_tb_env: one end-to-end run of me_top at the configuration given by the
// parameters (block size, search range, frame size), for testbenches that run
// several configurations side by side. It processes one frame, checks every block against a plain full search and the cycle
// and read counts (see me_tb_body.svh), then raises "finished" with its
// counts on the ports.
module me_tb_env #(
  parameter int unsigned N = 4, L = 4, R = 3, U = 4, D = 3,
  parameter int unsigned FW = 176, FH = 144,
  parameter int unsigned SEED = 1
) (
  output logic fin,
  output int   n_checks,
  output int   n_failures
);
  localparam bit STANDALONE = 1'b0;

  `include "tb/me_tb_body.svh"

  me_top #(.N(N), .L(L), .R(R), .U(U), .D(D), .FW(FW), .FH(FH)) dut (.*);

  assign fin        = finished;
  assign n_checks   = checks;
  assign n_failures = failures;
endmodule
