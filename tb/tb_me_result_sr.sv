// tb_me_result_sr: loads random sets of NPE four-SAD entries into the
// partial-solution shift register, at varying spacing (down to a load in the
// cycle right after the last entry), and checks that exactly NPE entries come out,
// one per cycle, in PE order with their index and the pass offset.
module tb_me_result_sr;
  import me_pkg::*;
  localparam int unsigned NPE = 6;
  logic clk = 0, rst_n = 0, load = 0, out_valid, busy;
  sad4_t din [NPE];
  sad4_t out_sad;
  logic [$clog2(NPE)-1:0] out_idx;
  mv_t dy = '0, out_dy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  me_result_sr #(.NPE(NPE)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sad4_t ref_v [NPE];
    mv_t   ref_dy;
    for (int p = 0; p < NPE; p++) din[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (out_valid) failures++;
    for (int trial = 0; trial < 30; trial++) begin
      @(negedge clk);
      for (int p = 0; p < NPE; p++)
        for (int j = 0; j < 4; j++) din[p][j] = sad_t'($urandom);
      dy = mv_t'($urandom_range(0, 20) - 8);
      ref_v = din; ref_dy = dy;
      load = 1;
      @(negedge clk);
      load = 0;
      for (int p = 0; p < NPE; p++) begin
        checks++;
        if (!out_valid || out_sad !== ref_v[p] || int'(out_idx) != p || out_dy !== ref_dy) begin
          failures++;
          if (failures < 10) $display("trial %0d entry %0d: valid=%0d idx=%0d", trial, p, out_valid, out_idx);
        end
        if (p < NPE - 1) @(negedge clk);
      end
      // either load again at once (last entry still showing) or wait
      if (trial % 3 != 0) begin
        @(negedge clk);
        checks++;
        if (out_valid || busy) begin
          failures++;
          $display("trial %0d: still valid after %0d entries", trial, NPE);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
