// Self-checking test of vertical_adder_tree at the default 20-pixel column:
// random, all-maximum and all-zero columns, each output r compared with a
// running sum of inputs 0..r, with the one-cycle register latency checked.
module tb_vertical_adder_tree;
  localparam int unsigned WIN = 20, CS_W = 13;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [WIN-1:0][7:0] in_vpix = '0;
  logic out_valid;
  logic [WIN-1:0][CS_W-1:0] out_cs;
  int checks = 0, failures = 0;
  int exp_cs [WIN];
  bit exp_valid = 1'b0;
  bit seen = 1'b0;   // out_cs holds its last result; none before the first

  vertical_adder_tree #(.PIX_W(8), .WIN(WIN), .CS_W(CS_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      in_valid = $urandom % 4 != 0;
      for (int r = 0; r < WIN; r++)
        in_vpix[r] = (i == 1) ? 8'd255 : (i == 2) ? 8'd0 : 8'($urandom);
      if (in_valid) begin
        int acc;
        acc = 0;
        for (int r = 0; r < WIN; r++) begin
          acc += int'(in_vpix[r]);
          exp_cs[r] = acc;
        end
      end
      exp_valid = in_valid;
      seen |= in_valid;
      @(negedge clk);
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        $display("FAIL out_valid");
      end
      if (seen) for (int r = 0; r < WIN; r++) begin
        checks++;
        if (int'(out_cs[r]) != exp_cs[r]) begin
          failures++;
          $display("FAIL step %0d row %0d: got %0d exp %0d", i, r, out_cs[r], exp_cs[r]);
        end
      end
    end
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
