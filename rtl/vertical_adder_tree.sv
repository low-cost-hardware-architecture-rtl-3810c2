// Vertical adder tree: cumulative (prefix) sum of one column of WIN pixels.
//
// out_cs[r] = in_vpix[0] + ... + in_vpix[r], so out_cs[r] is the sum of the
// column from the top window row down to row r. The sums are formed by a
// Brent-Kung parallel-prefix network (an up-sweep that builds sums of
// aligned power-of-two groups, then a down-sweep that fills the remaining
// positions); for WIN = 20 it uses 33 two-input adders and has a depth of
// 8 adders. The result is registered (the "column sum" register): out_valid
// and out_cs appear one cycle after in_valid.
//
// The published architecture gives the function (cumulative sum of 20 vertical pixels into
// 1x20 column sum data) and the register stage; the prefix network shape is
// this design's choice (the published count for the tree is 35 adders, for a
// structure it does not give). A column sum is at most 255*20 = 5100 and needs
// 13 bits (CS_W). The upper bits of the first few outputs can never be set
// (out_cs[0] is at most 255, out_cs[1] at most 510, ...); they are kept so
// that all outputs share one width, and synthesis removes them.
module vertical_adder_tree #(
  parameter int unsigned PIX_W = iig_pkg::PIX_W,
  parameter int unsigned WIN   = iig_pkg::WIN,
  parameter int unsigned CS_W  = $clog2(((1 << PIX_W) - 1) * WIN + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [WIN-1:0][PIX_W-1:0] in_vpix,   // [0] top row
  output logic                      out_valid,
  output logic [WIN-1:0][CS_W-1:0]  out_cs     // [r] = sum of rows 0..r
);

  logic [WIN-1:0][CS_W-1:0] pre;

  always_comb begin
    for (int i = 0; i < WIN; i++) pre[i] = CS_W'(in_vpix[i]);
    // Up-sweep: position i = m*2d - 1 gathers the 2d inputs ending at i.
    for (int d = 1; d < WIN; d = d * 2)
      for (int i = 2 * d - 1; i < WIN; i = i + 2 * d)
        pre[i] = pre[i] + pre[i-d];
    // Down-sweep: fill the positions in between from the nearest prefix.
    for (int d = 1 << ($clog2(WIN) - 1); d >= 1; d = d / 2)
      for (int i = 3 * d - 1; i < WIN; i = i + 2 * d)
        pre[i] = pre[i] + pre[i-d];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) out_cs <= pre;
  end

endmodule
