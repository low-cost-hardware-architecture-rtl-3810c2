// Horizontal adders: add one column of column sums to the previous vertical
// integral image, element by element, in II_W-bit arithmetic.
//
// out_ii[r] = (clear ? 0 : in_prev[r]) + in_cs[r], truncated to II_W bits.
// The carry out of the top bit is dropped, which is the word length reduction:
// instead of comparing the element against the cutoff 2^II_W and subtracting
// it, the element simply wraps. With II_W = 17 the cutoff is 131,072, larger
// than any 20x20 rectangle sum of 8-bit pixels (102,000), so rectangle sums
// taken from wrapped elements are still exact modulo 2^17 and therefore
// exact. There are WIN adders and no subtractors. Purely combinational.
//
// The adders, the 17-bit width and the dropped carry follow the published architecture.
// The clear input, used at the first column of every image line so that each
// line starts its horizontal accumulation from zero, is this design's choice.
module horizontal_adder #(
  parameter int unsigned WIN  = iig_pkg::WIN,
  parameter int unsigned CS_W = 13,
  parameter int unsigned II_W = iig_pkg::II_W
) (
  input  logic                     clear,
  input  logic [WIN-1:0][CS_W-1:0] in_cs,
  input  logic [WIN-1:0][II_W-1:0] in_prev,
  output logic [WIN-1:0][II_W-1:0] out_ii
);

  always_comb begin
    for (int r = 0; r < WIN; r++)
      out_ii[r] = (clear ? II_W'(0) : in_prev[r]) + II_W'(in_cs[r]);
  end

endmodule
