// scb: Scale Calculation Block. Applies the separable Gaussian of one scale
// to every octave: horizontal filtering first, then vertical filtering, each
// with one 1D convolution unit shared by all octaves through the
// interleaving schedule.
//
// Interface: one input and one output port per octave (valid + pixel); at
// most one input valid per cycle. The output for input sample n of octave o
// is the blurred pixel at stream position n - ((K/2)*(W>>o) + K/2).
// Latency SCB_LAT = HF_LAT + VF_LAT = 5 cycles, one pixel per cycle.
module scb
  import sift_pkg::*;
#(
  parameter int unsigned O     = O_DEF,
  parameter int unsigned K     = K_DEF,
  parameter int unsigned S     = S_DEF,
  parameter int unsigned SCALE = 0,
  parameter int unsigned W     = W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [O-1:0] in_valid,
  input  pix_t         in_pix  [O],
  output logic [O-1:0] out_valid,
  output pix_t         out_pix [O]
);
  logic [O-1:0] h_valid;
  pix_t         h_pix [O];

  hfilter #(.O(O), .K(K), .S(S), .SCALE(SCALE)) u_h (
    .clk, .rst_n, .in_valid, .in_pix,
    .out_valid(h_valid), .out_pix(h_pix)
  );

  vfilter #(.O(O), .K(K), .S(S), .SCALE(SCALE), .W(W)) u_v (
    .clk, .rst_n, .in_valid(h_valid), .in_pix(h_pix),
    .out_valid, .out_pix
  );
endmodule
