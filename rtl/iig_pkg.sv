// Shared constants and types of the integral image generator.
//
// The generator keeps a 20x20 integral image of a sliding sub-window over
// 8-bit grayscale pixels. Every integral image element is held in 17 bits:
// the largest rectangle sum inside a 20x20 window is 255*20*20 = 102,000,
// which fits in 17 bits, so all element and rectangle arithmetic is done
// modulo 2^17 (the carry out of bit 16 is simply dropped). The window size,
// pixel width and element width follow the published architecture; the rectangle query
// encoding (rect_t) is this design's own.
package iig_pkg;

  localparam int unsigned PIX_W = 8;    // grayscale pixel width
  localparam int unsigned WIN   = 20;   // sub-window height and width
  localparam int unsigned II_W  = 17;   // integral image element width
  localparam int unsigned IMG_W = 640;  // image width (line buffer depth)
  localparam int unsigned IMG_H = 480;  // image height

  // Width of a bound index 0..WIN.
  localparam int unsigned BND_W = $clog2(WIN + 1);

  // Rectangle query inside the window. Rows: window rows y0 .. y1-1
  // (bounds 0..WIN). Columns: window columns x0+1 .. x1 (0..WIN-1), where
  // window column 0 is the oldest column held and WIN-1 the newest.
  typedef struct packed {
    logic [BND_W-1:0] y0;
    logic [BND_W-1:0] y1;
    logic [BND_W-1:0] x0;
    logic [BND_W-1:0] x1;
  } rect_t;

endpackage
