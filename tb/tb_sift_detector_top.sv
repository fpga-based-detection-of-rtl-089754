// tb_sift_detector_top: end-to-end test of the detector on twelve 32x24
// frames with three octaves, six scales and a 7-tap kernel.
module tb_sift_detector_top;
  sift_tb_body #(.FULL(1'b0), .W(32), .H(24), .O(3), .S(6), .K(7), .NF(12)) body ();
endmodule
