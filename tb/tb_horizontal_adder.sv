// Self-checking test of horizontal_adder: random and extreme column sums and
// previous elements, with and without clear, compared with an exact sum
// reduced modulo 2^17, plus one worked example of the 2^17 cutoff
// (131,004 + 122 gives 54). Counts how often the dropped carry was exercised.
module tb_horizontal_adder;
  localparam int unsigned WIN = 20, CS_W = 13, II_W = 17;
  logic clear = 1'b0;
  logic [WIN-1:0][CS_W-1:0] in_cs = '0;
  logic [WIN-1:0][II_W-1:0] in_prev = '0;
  logic [WIN-1:0][II_W-1:0] out_ii;
  int checks = 0, failures = 0, wraps = 0;

  horizontal_adder #(.WIN(WIN), .CS_W(CS_W), .II_W(II_W)) dut (.*);

  initial begin
    for (int i = 0; i < 1000; i++) begin
      clear = $urandom % 5 == 0;
      for (int r = 0; r < WIN; r++) begin
        in_cs[r]   = (i < 3) ? CS_W'(5100) : CS_W'($urandom % 5101);
        in_prev[r] = (i < 3) ? II_W'((1 << II_W) - 1 - r) : II_W'($urandom);
      end
      if (i == 3) begin
        // Worked example of the cutoff: 131,004 + 122 = 131,126 becomes 54.
        clear = 1'b0;
        in_prev[0] = II_W'(131004);
        in_cs[0]   = CS_W'(122);
      end
      #1;
      if (i == 3) begin
        checks++;
        if (int'(out_ii[0]) != 54) begin
          failures++;
          $display("FAIL cutoff example: got %0d exp 54", out_ii[0]);
        end
      end
      for (int r = 0; r < WIN; r++) begin
        int s;
        s = (clear ? 0 : int'(in_prev[r])) + int'(in_cs[r]);
        if (s >= (1 << II_W)) wraps++;
        checks++;
        if (int'(out_ii[r]) != s % (1 << II_W)) begin
          failures++;
          $display("FAIL step %0d row %0d: got %0d exp %0d", i, r, out_ii[r], s % (1 << II_W));
        end
      end
      #1;
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL carry never dropped");
    end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
