// Self-checking test of ii_buffer at the default 20x20x17 size: random
// columns shifted in with random shift enables, compared with a reference
// list of the last 20 columns (newest first).
module tb_ii_buffer;
  localparam int unsigned WIN = 20, II_W = 17;
  logic clk = 1'b0;
  logic shift = 1'b0;
  logic [WIN-1:0][II_W-1:0] in_col = '0;
  logic [WIN-1:0][WIN-1:0][II_W-1:0] out_win;
  int checks = 0, failures = 0;
  logic [WIN-1:0][II_W-1:0] hist [$];

  ii_buffer #(.WIN(WIN), .II_W(II_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (hist.size() >= WIN) begin
        for (int c = 0; c < WIN; c++) begin
          checks++;
          if (out_win[c] !== hist[c]) begin
            failures++;
            $display("FAIL step %0d column %0d", i, c);
          end
        end
      end
      shift = (i < WIN) || ($urandom % 3 != 0);
      for (int r = 0; r < WIN; r++) in_col[r] = II_W'($urandom);
      if (shift) begin
        hist.push_front(in_col);
        if (hist.size() > WIN) void'(hist.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
