// Pixel buffer: 19 cascaded line buffers that turn a raster pixel stream
// into columns of 20 vertically adjacent pixels.
//
// For each accepted pixel p at column x, every line buffer is read at x.
// Line buffer k (k = 0..WIN-2) holds the pixels WIN-1-k lines above the
// current line, so its read word is the pixel of window row k, and the
// current pixel is window row WIN-1 (row 0 is the top, oldest line). The
// buffers form a cascade: the current pixel is written into line buffer
// WIN-2 at x in the same cycle, and one cycle later, when their read words
// arrive, each line buffer k+1's old word is written into line buffer k at x.
// The read words plus the registered current pixel are the "vertical pixel"
// register: out_valid and out_vpix appear one cycle after in_valid.
//
// The published architecture gives the 19 line buffers, the 20 vertical pixels and that
// they go to the adder tree; the direction of the cascade and the one-cycle
// timing are this design's choice. Before WIN-1 lines have been written the
// upper rows hold stale data; the top-level marks such windows invalid.
module pixel_buffer #(
  parameter int unsigned PIX_W = iig_pkg::PIX_W,
  parameter int unsigned WIN   = iig_pkg::WIN,
  parameter int unsigned IMG_W = iig_pkg::IMG_W,
  parameter int unsigned AW    = (IMG_W > 1) ? $clog2(IMG_W) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [AW-1:0]             in_x,      // column of in_pixel
  input  logic [PIX_W-1:0]          in_pixel,
  output logic                      out_valid,
  output logic [WIN-1:0][PIX_W-1:0] out_vpix   // [0] top row .. [WIN-1] current
);

  localparam int unsigned NLB = WIN - 1;

  logic [NLB-1:0][PIX_W-1:0] rd_data;
  logic [AW-1:0]             x_q;
  logic [PIX_W-1:0]          pix_q;
  logic                      valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= 1'b0;
    else        valid_q <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      x_q   <= in_x;
      pix_q <= in_pixel;
    end
  end

  for (genvar k = 0; k < NLB; k++) begin : g_lb
    logic             wr_en;
    logic [AW-1:0]    wr_addr;
    logic [PIX_W-1:0] wr_data;
    if (k == NLB - 1) begin : g_first
      // Newest line: written straight from the input stream.
      assign wr_en   = in_valid;
      assign wr_addr = in_x;
      assign wr_data = in_pixel;
    end else begin : g_next
      // Older lines: take the word just read from the buffer below.
      assign wr_en   = valid_q;
      assign wr_addr = x_q;
      assign wr_data = rd_data[k+1];
    end
    line_buffer #(.WIDTH(PIX_W), .DEPTH(IMG_W), .AW(AW)) u_lb (
      .clk     (clk),
      .wr_en   (wr_en),
      .wr_addr (wr_addr),
      .wr_data (wr_data),
      .rd_en   (in_valid),
      .rd_addr (in_x),
      .rd_data (rd_data[k])
    );
  end

  assign out_valid = valid_q;
  always_comb begin
    for (int k = 0; k < NLB; k++) out_vpix[k] = rd_data[k];
    out_vpix[WIN-1] = pix_q;
  end

endmodule
