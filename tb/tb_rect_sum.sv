// Self-checking test of rect_sum at the default 20x20x17 size. Each trial
// builds a window the way the generator fills it: a random 20x20 pixel block
// (sometimes all 255) whose rows carry arbitrary large horizontal offsets
// from the pixels left of the window, accumulated down the rows and reduced
// modulo 2^17. Random rectangles (and the largest one) are queried and the
// result compared with the exact pixel sum; counts how often the corner
// arithmetic left [0, 2^17) and had to wrap to give the right answer.
module tb_rect_sum;
  localparam int unsigned WIN = 20, II_W = 17;
  localparam int MOD = 1 << II_W;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  iig_pkg::rect_t in_rect = '0;
  logic [WIN-1:0][WIN-1:0][II_W-1:0] in_win = '0;
  logic out_valid;
  logic [II_W-1:0] out_sum;
  int checks = 0, failures = 0, wraps = 0;
  int pix [WIN][WIN];   // [row][window column]

  rect_sum #(.WIN(WIN), .II_W(II_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int y0, y1, x0, x1, exp_sum, raw;
      bit bright;
      bright = (t % 3 == 0);
      // Window elements: cumulative over rows of (row offset + row prefix).
      for (int c = 0; c < WIN; c++) begin
        int acc;
        acc = 0;
        for (int r = 0; r < WIN; r++) begin
          int rowpre;
          pix[r][c] = bright ? 255 : int'($urandom % 256);
          rowpre = 0;
          for (int k = 0; k <= c; k++) rowpre += pix[r][k];
          acc += rowpre;
          in_win[WIN-1-c][r] = II_W'((acc + 0));
        end
      end
      // Add arbitrary offsets as if the line already held many pixels.
      for (int r = 0; r < WIN; r++) begin
        int off;
        off = int'($urandom % MOD);
        for (int rr = r; rr < WIN; rr++)
          for (int c = 0; c < WIN; c++)
            in_win[c][rr] = II_W'(int'(in_win[c][rr]) + off);
      end
      y0 = $urandom % (WIN + 1);
      y1 = y0 + $urandom % (WIN + 1 - y0);
      x0 = $urandom % WIN;
      x1 = x0 + $urandom % (WIN - x0);
      if (t % 5 == 0) begin y0 = 0; y1 = WIN; x0 = 0; x1 = WIN - 1; end
      exp_sum = 0;
      for (int r = y0; r < y1; r++)
        for (int c = x0 + 1; c <= x1; c++) exp_sum += pix[r][c];
      raw = ((y1 > 0) ? int'(in_win[WIN-1-x1][y1-1]) : 0)
          - ((y0 > 0) ? int'(in_win[WIN-1-x1][y0-1]) : 0)
          - ((y1 > 0) ? int'(in_win[WIN-1-x0][y1-1]) : 0)
          + ((y0 > 0) ? int'(in_win[WIN-1-x0][y0-1]) : 0);
      if (raw < 0 || raw >= MOD) wraps++;
      in_rect = '{y0: 5'(y0), y1: 5'(y1), x0: 5'(x0), x1: 5'(x1)};
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || int'(out_sum) != exp_sum) begin
        failures++;
        $display("FAIL trial %0d rect y%0d..%0d x%0d..%0d: got %0d exp %0d",
                 t, y0, y1, x0, x1, out_sum, exp_sum);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL out_valid stuck");
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL corner arithmetic never wrapped");
    end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
