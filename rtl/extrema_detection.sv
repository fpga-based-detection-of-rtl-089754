// extrema_detection: local-extremum search over the whole DoG scale space,
// one is_extremum block per octave.
//
// Octave o works on images of (W>>o) x (H>>o) pixels whose stream carries
// an offset of S filter shifts of that octave, S*((K/2)*(W>>o) + K/2)
// samples, from the DoG generator.
//
// Interface: dog_valid[o] / dog[o][s] from dog_scale_space; per octave a
// keypoint stream kp_valid[o], kp[o] (1 = interest point at kp_x/kp_y),
// kp_min/kp_max[o] (per candidate scale).
module extrema_detection
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
  input  logic [O-1:0]    dog_valid,
  input  dog_t            dog    [O][S-1],
  output logic [O-1:0]    kp_valid,
  output logic [O-1:0]    kp,
  output logic [S-4:0]    kp_min [O],
  output logic [S-4:0]    kp_max [O],
  output logic [XY_W-1:0] kp_x   [O],
  output logic [XY_W-1:0] kp_y   [O]
);
  for (genvar o = 0; o < O; o++) begin : g_oct
    localparam int unsigned WO = oct_dim(W, o);
    localparam int unsigned HO = oct_dim(H, o);
    is_extremum #(
      .S(S), .W_O(WO), .H_O(HO), .OFF(S * filt_shift(K, WO))
    ) u_ext (
      .clk, .rst_n,
      .in_valid(dog_valid[o]),
      .dog     (dog[o]),
      .kp_valid(kp_valid[o]),
      .kp      (kp[o]),
      .kp_min  (kp_min[o]),
      .kp_max  (kp_max[o]),
      .kp_x    (kp_x[o]),
      .kp_y    (kp_y[o])
    );
  end
endmodule
