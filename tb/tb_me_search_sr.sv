// tb_me_search_sr: loads rows of random pixels into the search-data shift
// register (W cycles per row, the last with wr_last) and, after each row,
// reads the whole window back: it must hold the last H rows written, oldest
// at the top, with a row that is still being written not yet visible.
module tb_me_search_sr;
  import me_pkg::*;
  localparam int unsigned H = 7, W = 5;
  logic clk = 0, rst_n = 0, wr_en = 0, wr_last = 0;
  logic [$clog2(W)-1:0] wr_col = '0, rd_col = '0;
  logic [$clog2(H)-1:0] rd_row = '0;
  pixel_t wr_data = '0, rd_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  me_search_sr #(.H(H), .W(W)) dut (.*);

  pixel_t model [$];   // rows written so far, flattened

  task automatic check_window(int rows_written);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        automatic int src = rows_written - H + r;
        automatic pixel_t e = (src < 0) ? 8'h00 : model[src*W + c];
        rd_row = r[$clog2(H)-1:0];
        rd_col = c[$clog2(W)-1:0];
        #1;
        checks++;
        if (rd_data !== e) begin
          failures++;
          if (failures < 10) $display("after %0d rows (%0d,%0d): got %0h exp %0h", rows_written, r, c, rd_data, e);
        end
      end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_window(0);
    for (int row = 0; row < 2*H + 3; row++) begin
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        wr_en = 1; wr_col = c[$clog2(W)-1:0]; wr_data = pixel_t'($urandom);
        wr_last = (c == W - 1);
        model.push_back(wr_data);
        if (c == W - 2) begin
          // half-written row must not have entered the window yet
          @(posedge clk); #1;
          wr_en = 0; wr_last = 0;
          check_window(row);
        end
      end
      @(negedge clk);
      wr_en = 0; wr_last = 0;
      // idle cycles change nothing
      repeat ($urandom_range(0, 2)) @(negedge clk);
      check_window(row + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
