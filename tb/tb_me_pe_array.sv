// tb_me_pe_array: checks that a 1-D array of NPE PEs computes, for every PE
// p, the SAD between an NR x NC block of current pixels (four blocks side by
// side) and the search rows shifted right by p columns. Rows of W = NC+NPE-1
// search pixels are streamed one per cycle, with the current row entering for
// the first NC cycles, in the same register alignment the estimator uses
// (search pixel and strobes one cycle behind the current pixel input).
// The expected sums are computed directly from the formula.
module tb_me_pe_array;
  import me_pkg::*;
  localparam int unsigned NPE = 6, NC = 4, NR = 3;
  localparam int unsigned W = NC + NPE - 1;
  logic clk = 0, rst_n = 0, en = 0, clr = 0, x_in_valid = 0, x_out_valid;
  pixel_t y = 0;
  pix4_t x_in = '0, x_out;
  sad4_t sad [NPE];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  me_pe_array #(.NPE(NPE)) dut (.*);

  pixel_t cur [4][NR][NC];
  pixel_t srch [NR][W];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      for (int j = 0; j < 4; j++)
        for (int r = 0; r < NR; r++)
          for (int c = 0; c < NC; c++) cur[j][r][c] = pixel_t'($urandom);
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < W; c++) srch[r][c] = (trial == 0) ? 8'd255 : pixel_t'($urandom);
      // cycle t issues (r, q); the search pixel and strobes follow one cycle later
      for (int t = 0; t <= NR * W; t++) begin
        @(negedge clk);
        if (t < NR * W) begin
          automatic int r = t / W, q = t % W;
          x_in_valid = (q < NC);
          for (int j = 0; j < 4; j++) x_in[j] = (q < NC) ? cur[j][r][q] : 8'h00;
        end else begin
          x_in_valid = 0;
        end
        if (t > 0) begin
          automatic int r = (t - 1) / W, q = (t - 1) % W;
          y   = srch[r][q];
          en  = 1;
          clr = (t == 1);
        end else begin
          en = 0; clr = 0;
        end
      end
      @(negedge clk);
      en = 0; clr = 0; x_in_valid = 0;
      for (int p = 0; p < NPE; p++)
        for (int j = 0; j < 4; j++) begin
          automatic int unsigned e = 0;
          for (int r = 0; r < NR; r++)
            for (int c = 0; c < NC; c++) begin
              automatic int a = cur[j][r][c], b = srch[r][c + p];
              e += (a > b) ? a - b : b - a;
            end
          checks++;
          if (sad[p][j] !== sad_t'(e)) begin
            failures++;
            if (failures < 10) $display("trial %0d PE %0d blk %0d: got %0d exp %0d", trial, p, j, sad[p][j], e);
          end
        end
      // a gap of idle cycles between passes: sums must hold
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
