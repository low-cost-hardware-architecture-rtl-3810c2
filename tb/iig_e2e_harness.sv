// End-to-end self-checking harness for integral_image_generator.
//
// Streams NFRAMES frames of pseudo-random pixels (alternating bright frames,
// which make the 17-bit elements wrap quickly, and uniform frames) with random
// idle cycles between pixels. If ABORT is set, the first frame is cut off
// after a few lines and the next frame starts with in_sof, re-synchronising
// the raster position. A reference integral image of each frame is computed
// in the harness; every window the design reports is compared element by
// element against it (modulo 2^17), its position and its 3-cycle latency are
// checked, and a random rectangle query is issued on it and compared with
// the exact rectangle sum. Counts how often each mechanism occurred (input
// stall, element wrap, rectangle wrap, line restart, frame restart) and
// counts a failure for any that never happened. With FULL set, the design is
// instantiated with no parameter override (its own defaults).
module iig_e2e_harness #(
  parameter int unsigned IMG_W   = 48,
  parameter int unsigned IMG_H   = 24,
  parameter int unsigned NFRAMES = 2,
  parameter bit          ABORT   = 1'b1,
  parameter bit          FULL    = 1'b0
);
  localparam int unsigned WIN  = iig_pkg::WIN;
  localparam int unsigned II_W = iig_pkg::II_W;
  localparam int unsigned XW   = $clog2(IMG_W);
  localparam int unsigned YW   = $clog2(IMG_H);
  localparam int          MOD  = 1 << II_W;
  localparam int          MAX_CYCLES = NFRAMES * IMG_W * IMG_H * 3 + 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0;
  logic [7:0] in_pixel = '0;
  logic win_valid;
  logic [XW-1:0] win_x;
  logic [YW-1:0] win_y;
  logic [WIN-1:0][WIN-1:0][II_W-1:0] win_ii;
  logic rect_valid = 1'b0;
  iig_pkg::rect_t rect = '0;
  logic rect_out_valid;
  logic [II_W-1:0] rect_out_sum;

  if (FULL) begin : g_full
    integral_image_generator dut (.*);
  end else begin : g_red
    integral_image_generator #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters.
  int n_stall = 0, n_wrap = 0, n_rect_wrap = 0, n_line_restart = 0;
  int n_sof = 0, n_windows = 0, n_rects = 0;

  byte unsigned img [IMG_H][IMG_W];
  int           ii  [IMG_H][IMG_W];   // full-frame integral image, exact

  // Expected windows: position and the cycle in which its last pixel was
  // presented with in_valid (the window must appear 3 cycles later).
  typedef struct { int x; int y; int unsigned t; } exp_t;
  exp_t exp_q[$];

  function automatic int I(int y, int x);
    if (y < 0 || x < 0) return 0;
    return ii[y][x];
  endfunction

  // Exact sum of image lines y0..y1 and columns x0..x1 (inclusive).
  function automatic int box(int y0, int y1, int x0, int x1);
    return I(y1, x1) - I(y0 - 1, x1) - I(y1, x0 - 1) + I(y0 - 1, x0 - 1);
  endfunction

  task automatic fill_frame(input bit bright);
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        img[y][x] = bright ? byte'(255 - ($urandom % 48)) : byte'($urandom % 256);
        ii[y][x] = int'(img[y][x]) + I(y - 1, x) + I(y, x - 1) - I(y - 1, x - 1);
      end
  endtask

  // Stream one frame; npix pixels of it (a full frame if npix = 0).
  task automatic send_frame(input int npix);
    int n;
    n = (npix == 0) ? IMG_W * IMG_H : npix;
    for (int i = 0; i < n; i++) begin
      while ($urandom % 5 == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        in_sof = 1'b0;
        n_stall++;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_sof   = (i == 0);
      in_pixel = img[i / IMG_W][i % IMG_W];
      if (i == 0) n_sof++;
      if ((i / IMG_W) >= WIN - 1 && (i % IMG_W) >= WIN - 1)
        exp_q.push_back('{x: i % IMG_W, y: i / IMG_W, t: cycle});
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_sof = 1'b0;
  endtask

  // Window checker, sampled at negedge.
  int   pend = 0;
  int   pend_exp;
  logic pend_wrap;
  always @(negedge clk) begin
    rect_valid = 1'b0;
    if (rst_n && pend != 0) begin
      checks++;
      if (!rect_out_valid || int'(rect_out_sum) != pend_exp) begin
        failures++;
        $display("FAIL rect: got %0d exp %0d valid %0b", rect_out_sum, pend_exp, rect_out_valid);
      end
      if (pend_wrap) n_rect_wrap++;
      pend = 0;
    end else if (rst_n) begin
      checks++;
      if (rect_out_valid) begin
        failures++;
        $display("FAIL rect_out_valid without query");
      end
    end
    if (rst_n && win_valid) begin
      exp_t e;
      n_windows++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected window at %0d,%0d", win_x, win_y);
      end else begin
        e = exp_q.pop_front();
        if (int'(win_x) != e.x || int'(win_y) != e.y || cycle != e.t + 3) begin
          failures++;
          $display("FAIL window pos/latency: got (%0d,%0d)@%0d exp (%0d,%0d)@%0d",
                   win_x, win_y, cycle, e.x, e.y, e.t + 3);
        end
        if (e.x == WIN - 1) n_line_restart++;
        for (int a = 0; a < WIN; a++)
          for (int r = 0; r < WIN; r++) begin
            int xc, yy, v;
            xc = e.x - a;
            yy = e.y - (WIN - 1) + r;
            v  = I(yy, xc) - I(e.y - WIN, xc);
            if (v >= MOD) n_wrap++;
            checks++;
            if (int'(win_ii[a][r]) != v % MOD) begin
              failures++;
              if (failures < 10)
                $display("FAIL ii (%0d,%0d) age %0d row %0d: got %0d exp %0d",
                         e.x, e.y, a, r, win_ii[a][r], v % MOD);
            end
          end
        // Random rectangle query on this window.
        begin
          int y0, y1, x0, x1, raw;
          y0 = $urandom % (WIN + 1);
          y1 = y0 + $urandom % (WIN + 1 - y0);
          x0 = $urandom % WIN;
          x1 = x0 + $urandom % (WIN - x0);
          if ($urandom % 4 == 0) begin y0 = 0; y1 = WIN; x0 = 0; x1 = WIN - 1; end
          rect = '{y0: y0[4:0], y1: y1[4:0], x0: x0[4:0], x1: x1[4:0]};
          rect_valid = 1'b1;
          n_rects++;
          pend = 1;
          pend_exp = (y1 > y0 && x1 > x0) ?
                     box(e.y - (WIN - 1) + y0, e.y - (WIN - 1) + y1 - 1,
                         e.x - (WIN - 1) + x0 + 1, e.x - (WIN - 1) + x1) : 0;
          // Would a plain difference of the stored 17-bit corners leave [0, 2^17)?
          raw = ((y1 > 0) ? int'(win_ii[WIN-1-x1][y1-1]) : 0)
              - ((y0 > 0) ? int'(win_ii[WIN-1-x1][y0-1]) : 0)
              - ((y1 > 0) ? int'(win_ii[WIN-1-x0][y1-1]) : 0)
              + ((y0 > 0) ? int'(win_ii[WIN-1-x0][y0-1]) : 0);
          pend_wrap = (raw < 0 || raw >= MOD);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      fill_frame(f % 2 == 0);
      send_frame((ABORT && f == 0) ? IMG_W * (WIN + 2) + 5 : 0);
      repeat (8) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d expected windows never reported", exp_q.size());
    end
    $display("mechanisms: windows=%0d stalls=%0d element_wraps=%0d rect_wraps=%0d line_restarts=%0d frame_starts=%0d rect_queries=%0d",
             n_windows, n_stall, n_wrap, n_rect_wrap, n_line_restart, n_sof, n_rects);
    checks += 6;
    if (n_windows == 0)      failures++;
    if (n_stall == 0)        failures++;
    if (n_wrap == 0)         failures++;
    if (n_rect_wrap == 0)    failures++;
    if (n_line_restart == 0) failures++;
    if (n_sof < NFRAMES)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
