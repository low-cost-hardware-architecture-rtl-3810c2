// Rectangle sum unit: the sum of the pixels of one rectangle inside the
// sub-window, read from four integral image elements in II_W-bit arithmetic.
//
// With P(k, c) = 0 for k = 0 and otherwise the window element of row k-1 and
// window column c (column 0 oldest, WIN-1 newest), the unit returns
//   sum = P(y1, x1) - P(y0, x1) - P(y1, x0) + P(y0, x0)   (mod 2^II_W),
// the sum of window rows y0 .. y1-1 and window columns x0+1 .. x1. The
// elements may have wrapped any number of times and intermediate results may
// go negative or past 2^II_W; because the true sum is below 2^II_W, the
// wrapped result is exact without any compare-and-correct step. Because the
// column to the left of a rectangle must be in the window, a rectangle can
// cover window columns 1 .. WIN-1.
//
// The published architecture states that rectangle sums use the same 17-bit width and
// ignore overflow; the query encoding, the bound convention and the
// registered output (out_valid/out_sum one cycle after in_valid) are this
// design's choice. Requires y0 <= y1 <= WIN and x0 <= x1 < WIN.
module rect_sum #(
  parameter int unsigned WIN  = iig_pkg::WIN,
  parameter int unsigned II_W = iig_pkg::II_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  iig_pkg::rect_t                             in_rect,
  input  logic [WIN-1:0][WIN-1:0][II_W-1:0] in_win,   // [column age][row]
  output logic                              out_valid,
  output logic [II_W-1:0]                   out_sum
);

  // Corner element: row bound k (0..WIN), window column c (0..WIN-1).
  function automatic logic [II_W-1:0] corner(
    input logic [WIN-1:0][WIN-1:0][II_W-1:0] w,
    input logic [iig_pkg::BND_W-1:0] k,
    input logic [iig_pkg::BND_W-1:0] c
  );
    int unsigned age;
    int unsigned row;
    age = (WIN - 1) - int'(c);
    row = int'(k) - 1;
    if (k == '0 || int'(c) >= WIN || int'(k) > WIN) return '0;
    return w[age][row];
  endfunction

  logic [II_W-1:0] a, b, c, d, s;

  always_comb begin
    d = corner(in_win, in_rect.y1, in_rect.x1);
    b = corner(in_win, in_rect.y0, in_rect.x1);
    c = corner(in_win, in_rect.y1, in_rect.x0);
    a = corner(in_win, in_rect.y0, in_rect.x0);
    s = d - b - c + a;
  end

  // A query must describe a rectangle inside the window.
  a_rect_bounds: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (in_rect.y0 <= in_rect.y1 && int'(in_rect.y1) <= WIN &&
                  in_rect.x0 <= in_rect.x1 && int'(in_rect.x1) < WIN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) out_sum <= s;
  end

endmodule
