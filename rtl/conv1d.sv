// conv1d: one K-tap 1D Gaussian convolution with integer coefficients.
//
// The K taps are multiplied by the kernel of cascade stage SCALE (K
// multipliers, registered), then summed (K-1 adders), rounded and shifted
// right by COEF_F, which undoes the 2^COEF_F scaling of the coefficients.
// Because the integer kernel sums to exactly 2^COEF_F the result fits in
// the pixel width; it is clamped anyway. A tag (the octave number) travels
// with the data so the shared unit can serve interleaved octaves.
//
// Timing: fully pipelined, one result per cycle, latency CONV_LAT = 2.
module conv1d
  import sift_pkg::*;
#(
  parameter int unsigned K     = K_DEF,
  parameter int unsigned S     = S_DEF,
  parameter int unsigned SCALE = 0,
  parameter int unsigned TAG_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  pix_t             taps [K],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output pix_t             out_pix
);
  localparam int unsigned PW = PIX_W + COEF_F + 2;   // product width
  localparam int unsigned SW = PW + $clog2(K) + 1;   // sum width

  logic [PW-1:0]    prod [K];
  logic             p_valid;
  logic [TAG_W-1:0] p_tag;

  always_ff @(posedge clk) begin
    for (int j = 0; j < K; j++)
      prod[j] <= PW'(taps[j]) * PW'(gauss_coef(K, S, SCALE, j));
    p_tag <= in_tag;
  end

  logic [SW-1:0] sum;
  always_comb begin
    sum = SW'(1 << (COEF_F - 1));     // rounding constant
    for (int j = 0; j < K; j++) sum += SW'(prod[j]);
  end

  logic [SW-1:0] scaled;
  assign scaled = sum >> COEF_F;

  always_ff @(posedge clk) begin
    out_pix <= (scaled > SW'((1 << PIX_W) - 1)) ? '1 : pix_t'(scaled);
    out_tag <= p_tag;
  end

  always_ff @(posedge clk)
    if (!rst_n) begin
      p_valid   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      p_valid   <= in_valid;
      out_valid <= p_valid;
    end
endmodule
