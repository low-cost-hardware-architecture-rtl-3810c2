// Full-size test of integral_image_generator: the design at its default
// parameters (640x480 image, 20x20 window, 17-bit elements). A bright frame
// is cut short after 22 lines and a second, complete frame follows with
// in_sof; input gaps are random and every window is checked against a
// reference integral image. See iig_e2e_harness for what is checked.
module tb_iig_full;
  iig_e2e_harness #(.IMG_W(iig_pkg::IMG_W), .IMG_H(iig_pkg::IMG_H), .NFRAMES(2),
                    .ABORT(1'b1), .FULL(1'b1)) h ();
endmodule
