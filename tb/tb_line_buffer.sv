// Self-checking test of line_buffer (reduced depth 16): random writes and
// reads against a reference array, checking the one-cycle read latency, that
// rd_data holds while rd_en is low, and read-first behaviour when a read and
// a write hit the same address.
module tb_line_buffer;
  localparam int unsigned WIDTH = 8, DEPTH = 16, AW = 4;
  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic [WIDTH-1:0] exp_rd;
  bit exp_ok = 1'b0;

  line_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    // Fill every address first.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = WIDTH'($urandom); ref_mem[a] = wr_data;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (exp_ok) begin
        checks++;
        if (rd_data !== exp_rd) begin
          failures++;
          $display("FAIL step %0d: rd_data %0h exp %0h", i, rd_data, exp_rd);
        end
      end
      wr_en = $urandom % 2 == 0;
      rd_en = $urandom % 3 != 0;
      rd_addr = AW'($urandom);
      wr_addr = ($urandom % 4 == 0) ? rd_addr : AW'($urandom);
      wr_data = WIDTH'($urandom);
      if (rd_en) begin
        exp_rd = ref_mem[rd_addr];   // old word: read-first
        exp_ok = 1'b1;
      end
      if (wr_en) ref_mem[wr_addr] = wr_data;
    end
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
