// tb_me_cur_buf: writes random 2N x 2N quads into the current data buffer in
// raster order and reads every block position back: output j must be the
// pixel at that position inside block j (A, B, C, D).
module tb_me_cur_buf;
  import me_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 0, wr_en = 0;
  logic [$clog2(2*N)-1:0] wr_row = '0, wr_col = '0;
  logic [$clog2(N)-1:0] rd_row = '0, rd_col = '0;
  pixel_t wr_data = '0;
  pix4_t rd_data;
  int checks = 0, failures = 0;
  pixel_t img [2*N][2*N];

  always #5 clk = ~clk;

  me_cur_buf #(.N(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 4; trial++) begin
      for (int r = 0; r < 2*N; r++)
        for (int c = 0; c < 2*N; c++) begin
          @(negedge clk);
          img[r][c] = pixel_t'($urandom);
          wr_en = 1; wr_row = r[$clog2(2*N)-1:0]; wr_col = c[$clog2(2*N)-1:0]; wr_data = img[r][c];
        end
      @(negedge clk);
      wr_en = 0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          rd_row = r[$clog2(N)-1:0]; rd_col = c[$clog2(N)-1:0];
          #1;
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (rd_data[j] !== img[r + (j/2)*N][c + (j%2)*N]) begin
              failures++;
              if (failures < 10) $display("(%0d,%0d) blk %0d: got %0h exp %0h", r, c, j, rd_data[j], img[r + (j/2)*N][c + (j%2)*N]);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
