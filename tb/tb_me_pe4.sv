// tb_me_pe4: random test of the four-subtractor PE. Drives random current
// pixels, valid flags, search pixels and enable/clear patterns, and compares
// the four sums and the forwarded current pixels with a model computed here
// (sums of |x - y| with the current pixel taken one cycle late). A second
// PE with only lanes A and C present (as in the behind array) runs on the
// same inputs: its lanes 0 and 2 must match, lanes 1 and 3 stay zero.
module tb_me_pe4;
  import me_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, clr = 0, x_in_valid = 0, x_out_valid;
  pixel_t y = 0;
  pix4_t x_in = '0, x_out;
  sad4_t sad, sad_m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  me_pe4 dut (.*);
  me_pe4 #(.LANE_MASK(4'b0101)) dut_m (.clk, .rst_n, .en, .clr, .y, .x_in, .x_in_valid,
                                       .x_out(), .x_out_valid(), .sad(sad_m));

  int unsigned exp_sad [4];
  pix4_t  xm;
  logic   xvm;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 4; j++) exp_sad[j] = 0;
    xm = '0; xvm = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 9) != 0);
      clr = ($urandom_range(0, 15) == 0);
      y = pixel_t'($urandom);
      x_in_valid = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < 4; j++) x_in[j] = pixel_t'($urandom);
      @(posedge clk);
      // model
      if (en)
        for (int j = 0; j < 4; j++) begin
          automatic int d = xvm ? ((int'(xm[j]) > int'(y)) ? int'(xm[j]) - int'(y) : int'(y) - int'(xm[j])) : 0;
          exp_sad[j] = (clr ? 0 : exp_sad[j]) + d;
        end
      xm = x_in; xvm = x_in_valid;
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (sad[j] !== sad_t'(exp_sad[j])) begin
          failures++;
          if (failures < 10) $display("t=%0d sad[%0d] got %0d exp %0d", t, j, sad[j], exp_sad[j]);
        end
      end
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (sad_m[j] !== ((j % 2 == 0) ? sad_t'(exp_sad[j]) : sad_t'(0))) begin
          failures++;
          if (failures < 10) $display("t=%0d masked sad[%0d] got %0d", t, j, sad_m[j]);
        end
      end
      checks++;
      if (x_out !== xm || x_out_valid !== xvm) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
