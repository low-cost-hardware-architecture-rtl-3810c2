// End-to-end test of integral_image_generator at a reduced image size
// (48x24): two frames, the first cut short and restarted with in_sof, with
// random input gaps. See iig_e2e_harness for what is checked.
module tb_integral_image_generator;
  iig_e2e_harness #(.IMG_W(48), .IMG_H(24), .NFRAMES(3), .ABORT(1'b1), .FULL(1'b0)) h ();
endmodule
