// Integral image generator for a sliding 20x20 sub-window, with 17-bit
// word length reduction.
//
// Pixels arrive in raster order, one per cycle when in_valid is high (gaps
// are allowed); in_sof marks the first pixel of a frame. For each pixel at
// column x of line y the design forms, for every window row r, the sum of all
// pixels in that row from column 0 of the line up to x, accumulated over
// window rows 0..r: a vertical integral image of WIN elements whose height is
// fixed to the window and whose width grows to the right end of the line.
// The last WIN such columns form the window's integral image. When the window
// moves right nothing is subtracted: the oldest column is dropped and the new
// one shifted in. The elements keep growing along the line, so they are held
// in II_W = 17 bits and allowed to wrap; rectangle sums, also taken modulo
// 2^17, remain exact.
//
// Pipeline (3 cycles from a pixel to the window containing it):
//   cycle 0  line buffers read at x, pixel written into the newest buffer
//   cycle 1  vertical pixel register (WIN pixels of column x)
//   cycle 2  column sum register (prefix sums down the column)
//   cycle 3  II[0] <= II[0] + column sums (cleared at x = 0), II shifts
// win_valid pulses in the cycle the window registers hold a complete window:
// WIN rows of the frame (y >= WIN-1) and WIN columns of the line
// (x >= WIN-1); win_x and win_y give the image column and line of the newest
// column's bottom element. Rectangle queries (rect_valid, rect) are applied to
// the window registers as they are in that cycle and answered one cycle later
// on rect_out_valid / rect_out_sum.
//
// The block structure, window size, number of line buffers and 17-bit width
// follow the published architecture. The image size (640x480), the stream interface, the
// per-line clear and the rectangle query port are this design's choices.
module integral_image_generator #(
  parameter int unsigned IMG_W = iig_pkg::IMG_W,
  parameter int unsigned IMG_H = iig_pkg::IMG_H,
  parameter int unsigned XW    = $clog2(IMG_W),
  parameter int unsigned YW    = $clog2(IMG_H)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // pixel stream
  input  logic                              in_valid,
  input  logic                              in_sof,
  input  logic [iig_pkg::PIX_W-1:0]         in_pixel,
  // sub-window integral image
  output logic                              win_valid,
  output logic [XW-1:0]                     win_x,
  output logic [YW-1:0]                     win_y,
  output logic [iig_pkg::WIN-1:0][iig_pkg::WIN-1:0][iig_pkg::II_W-1:0] win_ii,   // [column age][row]
  // rectangle sum query on the current window
  input  logic                              rect_valid,
  input  iig_pkg::rect_t                    rect,
  output logic                              rect_out_valid,
  output logic [iig_pkg::II_W-1:0]          rect_out_sum
);

  localparam int unsigned PIX_W = iig_pkg::PIX_W;
  localparam int unsigned WIN   = iig_pkg::WIN;
  localparam int unsigned II_W  = iig_pkg::II_W;
  localparam int unsigned CS_W = $clog2(((1 << PIX_W) - 1) * WIN + 1);

  // ---------------- raster position of the incoming pixel ----------------
  logic [XW-1:0] x_cnt, x_in;
  logic [YW-1:0] y_cnt, y_in;

  assign x_in = in_sof ? '0 : x_cnt;
  assign y_in = in_sof ? '0 : y_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt <= '0;
      y_cnt <= '0;
    end else if (in_valid) begin
      if (int'(x_in) == IMG_W - 1) begin
        x_cnt <= '0;
        y_cnt <= (int'(y_in) == IMG_H - 1) ? '0 : y_in + 1'b1;
      end else begin
        x_cnt <= x_in + 1'b1;
        y_cnt <= y_in;
      end
    end
  end

  logic                      vp_valid;   // vertical pixel register valid
  logic [WIN-1:0][PIX_W-1:0] vpix;

  // in_sof marks a pixel, so it is only meaningful together with in_valid.
  a_sof_with_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                     in_sof |-> in_valid);

  // Position travelling alongside the data through stages 1 and 2.
  logic [XW-1:0] x_s1, x_s2;
  logic [YW-1:0] y_s1, y_s2;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      x_s1 <= x_in;
      y_s1 <= y_in;
    end
    if (vp_valid) begin
      x_s2 <= x_s1;
      y_s2 <= y_s1;
    end
  end

  // ---------------- pixel buffer ----------------

  pixel_buffer #(.PIX_W(PIX_W), .WIN(WIN), .IMG_W(IMG_W), .AW(XW)) u_pixbuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_x      (x_in),
    .in_pixel  (in_pixel),
    .out_valid (vp_valid),
    .out_vpix  (vpix)
  );

  // ---------------- vertical adder tree ----------------
  logic                     cs_valid;
  logic [WIN-1:0][CS_W-1:0] cs;

  vertical_adder_tree #(.PIX_W(PIX_W), .WIN(WIN), .CS_W(CS_W)) u_vtree (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (vp_valid),
    .in_vpix   (vpix),
    .out_valid (cs_valid),
    .out_cs    (cs)
  );

  // ---------------- horizontal adders + integral image buffer ----------------
  logic [WIN-1:0][II_W-1:0] new_col;

  horizontal_adder #(.WIN(WIN), .CS_W(CS_W), .II_W(II_W)) u_hadd (
    .clear   (x_s2 == '0),
    .in_cs   (cs),
    .in_prev (win_ii[0]),
    .out_ii  (new_col)
  );

  ii_buffer #(.WIN(WIN), .II_W(II_W)) u_iibuf (
    .clk     (clk),
    .shift   (cs_valid),
    .in_col  (new_col),
    .out_win (win_ii)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
    end else begin
      win_valid <= cs_valid && int'(x_s2) >= WIN - 1 && int'(y_s2) >= WIN - 1;
    end
  end

  always_ff @(posedge clk) begin
    if (cs_valid) begin
      win_x <= x_s2;
      win_y <= y_s2;
    end
  end

  // ---------------- rectangle sum ----------------
  rect_sum #(.WIN(WIN), .II_W(II_W)) u_rect (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rect_valid),
    .in_rect   (rect),
    .in_win    (win_ii),
    .out_valid (rect_out_valid),
    .out_sum   (rect_out_sum)
  );

endmodule
