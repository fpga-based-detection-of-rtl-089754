// hfilter: horizontal Gaussian filtering of all octaves of one scale with a
// single shared 1D convolution unit.
//
// Each octave has its own chain of K-1 pixel registers, shifted only when a
// pixel of that octave arrives; together with the arriving pixel it forms
// the K-tap window. The octave that owns the current cycle (the one input
// whose valid is set, as assigned by the interleaving schedule) selects
// which window feeds the conv1d unit. Rows are treated as one continuous
// raster stream: the window is not clipped at row ends.
//
// Interface: in_valid/in_pix, one port per octave, at most one valid per
// cycle. out_valid/out_pix: one port per octave; the output for input sample
// n of an octave is the horizontally filtered pixel at n - K/2.
// Latency HF_LAT = 2 cycles.
module hfilter
  import sift_pkg::*;
#(
  parameter int unsigned O     = O_DEF,
  parameter int unsigned K     = K_DEF,
  parameter int unsigned S     = S_DEF,
  parameter int unsigned SCALE = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [O-1:0] in_valid,
  input  pix_t         in_pix  [O],
  output logic [O-1:0] out_valid,
  output pix_t         out_pix [O]
);
  localparam int unsigned TAG_W = (O > 1) ? $clog2(O) : 1;

  pix_t sr [O][K-1];

  always_ff @(posedge clk)
    for (int o = 0; o < O; o++)
      if (in_valid[o]) begin
        sr[o][0] <= in_pix[o];
        for (int j = 1; j < K - 1; j++) sr[o][j] <= sr[o][j-1];
      end

  // Octave multiplexer
  logic [TAG_W-1:0] sel;
  always_comb begin
    sel = '0;
    for (int o = 0; o < O; o++) if (in_valid[o]) sel = TAG_W'(o);
  end

  pix_t taps [K];
  always_comb begin
    taps[0] = in_pix[sel];
    for (int j = 1; j < K; j++) taps[j] = sr[sel][j-1];
  end

  logic             c_valid;
  logic [TAG_W-1:0] c_tag;
  pix_t             c_pix;

  conv1d #(.K(K), .S(S), .SCALE(SCALE), .TAG_W(TAG_W)) u_conv (
    .clk, .rst_n,
    .in_valid (|in_valid),
    .in_tag   (sel),
    .taps     (taps),
    .out_valid(c_valid),
    .out_tag  (c_tag),
    .out_pix  (c_pix)
  );

  always_comb
    for (int o = 0; o < O; o++) begin
      out_valid[o] = c_valid && (c_tag == TAG_W'(o));
      out_pix[o]   = c_pix;
    end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_valid));
endmodule
