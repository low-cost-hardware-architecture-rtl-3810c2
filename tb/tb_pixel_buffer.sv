// Self-checking test of pixel_buffer with a reduced line width (12) and the
// default 20-line window: streams 30 lines of random pixels with random gaps
// and, for every pixel on line 19 or later, checks that out_vpix one cycle
// after acceptance holds the 20 pixels of that column from the 19 lines
// above down to the current one, and that out_valid follows in_valid by one
// cycle.
module tb_pixel_buffer;
  localparam int unsigned W = 12, WIN = 20, LINES = 30, AW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [AW-1:0] in_x = '0;
  logic [7:0] in_pixel = '0;
  logic out_valid;
  logic [WIN-1:0][7:0] out_vpix;
  int checks = 0, failures = 0;
  byte unsigned img [LINES][W];
  int cur_x = -1, cur_y = -1;
  bit  prev_valid = 1'b0;

  pixel_buffer #(.PIX_W(8), .WIN(WIN), .IMG_W(W), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  // Check at negedge the result of the pixel presented one cycle earlier.
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== prev_valid) begin
      failures++;
      $display("FAIL out_valid %0b exp %0b", out_valid, prev_valid);
    end
    if (prev_valid && cur_y >= WIN - 1) begin
      for (int r = 0; r < WIN; r++) begin
        checks++;
        if (out_vpix[r] !== img[cur_y - (WIN - 1) + r][cur_x]) begin
          failures++;
          $display("FAIL (%0d,%0d) row %0d got %0d exp %0d", cur_x, cur_y, r,
                   out_vpix[r], img[cur_y - (WIN - 1) + r][cur_x]);
        end
      end
    end
  end

  initial begin
    for (int y = 0; y < LINES; y++)
      for (int x = 0; x < W; x++) img[y][x] = byte'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int y = 0; y < LINES; y++)
      for (int x = 0; x < W; x++) begin
        while ($urandom % 4 == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
          prev_valid = 1'b0;
        end
        in_valid = 1'b1; in_x = AW'(x); in_pixel = img[y][x];
        @(negedge clk);
        prev_valid = 1'b1; cur_x = x; cur_y = y;
      end
    in_valid = 1'b0;
    @(negedge clk);
    prev_valid = 1'b0;
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
