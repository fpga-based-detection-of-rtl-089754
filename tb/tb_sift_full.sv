// tb_sift_full: end-to-end test of the detector at its default size
// (320x240 image, three octaves, six scales, 7-tap kernel), two frames.
module tb_sift_full;
  sift_tb_body #(.FULL(1'b1), .NF(2)) body ();
endmodule
