// is_local_ext: the isLocalMin / isLocalMax test of one candidate pixel.
//
// `center` is the second-order minimum (or maximum) of three adjacent DoG
// scales at the candidate position and nb[0..7] the same quantity at its
// eight neighbours. The pixel is an extremum when the centre is strictly
// below (IS_MAX = 0) or strictly above (IS_MAX = 1) all eight neighbours and
// its beta flag is set, i.e. the centre value is the candidate's own DoG
// value and differs from its counterparts in the two adjacent scales.
// Together this is the usual 26-neighbour test of SIFT.
//
// Purely combinational.
module is_local_ext
  import sift_pkg::*;
#(
  parameter bit IS_MAX = 1'b0
) (
  input  dog_t center,
  input  dog_t nb [8],
  input  logic beta,
  output logic hit
);
  always_comb begin
    hit = beta;
    for (int i = 0; i < 8; i++)
      if (IS_MAX ? !(center > nb[i]) : !(center < nb[i])) hit = 1'b0;
  end
endmodule
