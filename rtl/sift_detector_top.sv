// sift_detector_top: SIFT scale-space extrema (interest point) detector.
//
// An image streamed in raster order is blurred into a Gaussian scale space
// of O octaves and S scales, turned into S-1 Difference-of-Gaussian images
// per octave, and every DoG pixel of the S-3 inner scales is tested against
// its 26 neighbours in space and scale. The Gaussian filters are shared by
// all octaves through cycle interleaving, so the filter logic does not grow
// with the number of octaves; only line memories do.
//
// Interface:
//   pix_valid / pix / pix_ready - 8-bit pixels in raster order, one pixel at
//     most every two cycles (pix_ready is high every other cycle). Frames of
//     W x H pixels follow each other without gaps.
//   kp_valid[o] / kp[o] / kp_x[o] / kp_y[o] - for each octave o, one output
//     per pixel of that octave's (W>>o) x (H>>o) image, in raster order:
//     kp = 1 marks an interest point at (kp_x, kp_y) in octave coordinates.
//     kp_min / kp_max say at which inner scale it is a minimum / maximum.
//   hsb_overflow[o] - sticky error: a pixel on its way to octave o was lost.
// Throughput: one image pixel per two clock cycles.
module sift_detector_top
  import sift_pkg::*;
#(
  parameter int unsigned O = O_DEF,
  parameter int unsigned S = S_DEF,
  parameter int unsigned K = K_DEF,
  parameter int unsigned W = W_DEF,
  parameter int unsigned H = H_DEF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pix_valid,
  input  pix_t            pix,
  output logic            pix_ready,
  output logic [O-1:0]    kp_valid,
  output logic [O-1:0]    kp,
  output logic [S-4:0]    kp_min [O],
  output logic [S-4:0]    kp_max [O],
  output logic [XY_W-1:0] kp_x   [O],
  output logic [XY_W-1:0] kp_y   [O],
  output logic [O-1:0]    hsb_overflow
);
  logic [O-1:0] dog_valid;
  dog_t         dog [O][S-1];

  dog_scale_space #(.O(O), .S(S), .K(K), .W(W), .H(H)) u_dog (
    .clk, .rst_n, .pix_valid, .pix, .pix_ready,
    .dog_valid, .dog, .hsb_overflow
  );

  extrema_detection #(.O(O), .S(S), .K(K), .W(W), .H(H)) u_ext (
    .clk, .rst_n, .dog_valid, .dog,
    .kp_valid, .kp, .kp_min, .kp_max, .kp_x, .kp_y
  );
endmodule
