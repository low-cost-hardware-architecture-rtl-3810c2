// One line buffer: storage for one image line of pixels.
//
// A simple dual-port memory, DEPTH words of WIDTH bits, with one write port
// and one read port sharing a clock. A read issued in cycle t (rd_en high)
// returns the word in cycle t+1 on rd_data; rd_data holds its value while
// rd_en is low. This is the block-RAM shape of a line buffer; the published architecture
// gives only that each line buffer stores input pixel values, so the port
// arrangement and the one-cycle read latency are this design's choice.
// A write and a read of the same address in the same cycle return the old
// word (read-first); the pixel buffer never does this for DEPTH > 1.
module line_buffer #(
  parameter int unsigned WIDTH = iig_pkg::PIX_W,
  parameter int unsigned DEPTH = iig_pkg::IMG_W,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
