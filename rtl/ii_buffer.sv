// Integral image buffer: WIN registers of one vertical integral image each
// (II[0] .. II[WIN-1]), together the WIN x WIN integral image of the current
// sub-window.
//
// When shift is high, the new vertical integral image in_col enters II[0],
// every II[c] moves to II[c+1], and the oldest, II[WIN-1], is dropped. So
// out_win[c] is the column shifted in c shifts ago: out_win[0] is the newest
// (rightmost) column of the window and out_win[WIN-1] the oldest (leftmost).
// out_win[c][r] is the element of window row r (row 0 at the top). The
// buffer has no reset: the top-level tracks which contents are valid.
//
// Structure and shift order follow the published block diagram; the index
// convention is this design's.
module ii_buffer #(
  parameter int unsigned WIN  = iig_pkg::WIN,
  parameter int unsigned II_W = iig_pkg::II_W
) (
  input  logic                              clk,
  input  logic                              shift,
  input  logic [WIN-1:0][II_W-1:0]          in_col,
  output logic [WIN-1:0][WIN-1:0][II_W-1:0] out_win   // [column age][row]
);

  always_ff @(posedge clk) begin
    if (shift) begin
      out_win[0] <= in_col;
      for (int c = 1; c < WIN; c++) out_win[c] <= out_win[c-1];
    end
  end

endmodule
