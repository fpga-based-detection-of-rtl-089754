// vfilter: vertical Gaussian filtering of all octaves of one scale with a
// single shared 1D convolution unit.
//
// Each octave o keeps the last K-1 lines of its horizontally filtered image
// in K-1 line memories of width W>>o, addressed by a per-octave column
// pointer. When a pixel of octave o arrives, the K-1 memories are read at
// the pointer (synchronous read); in the next cycle the arriving pixel and
// the K-1 pixels above it form the K-tap column, the octave multiplexer
// feeds that column to conv1d, and the memories are written back shifted by
// one line. Two pixels of the same octave are never less than two cycles
// apart, so the read-then-write of one pixel never meets the next.
//
// Interface: as hfilter. The output for input sample n of octave o is the
// vertically filtered pixel at n - (K/2)*(W>>o). Latency VF_LAT = 3 cycles.
module vfilter
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
  localparam int unsigned TAG_W = (O > 1) ? $clog2(O) : 1;

  logic [O-1:0] s1_valid;
  pix_t         s1_pix;
  pix_t         rd [O][K-1];

  logic [TAG_W-1:0] sel_in;
  always_comb begin
    sel_in = '0;
    for (int o = 0; o < O; o++) if (in_valid[o]) sel_in = TAG_W'(o);
  end

  always_ff @(posedge clk) s1_pix <= in_pix[sel_in];

  always_ff @(posedge clk)
    if (!rst_n) s1_valid <= '0;
    else        s1_valid <= in_valid;

  for (genvar o = 0; o < O; o++) begin : g_oct
    localparam int unsigned WO = oct_dim(W, o);
    localparam int unsigned AW = (WO > 1) ? $clog2(WO) : 1;
    logic [AW-1:0] ptr;

    always_ff @(posedge clk)
      if (!rst_n)           ptr <= '0;
      else if (s1_valid[o]) ptr <= (ptr == AW'(WO - 1)) ? '0 : ptr + 1'b1;

    for (genvar j = 0; j < K - 1; j++) begin : g_line
      pix_t mem [WO];
      always_ff @(posedge clk) begin
        if (in_valid[o]) rd[o][j] <= mem[ptr];
        if (s1_valid[o]) mem[ptr] <= (j == 0) ? s1_pix : rd[o][(j == 0) ? 0 : j-1];
      end
    end
  end

  logic [TAG_W-1:0] sel;
  always_comb begin
    sel = '0;
    for (int o = 0; o < O; o++) if (s1_valid[o]) sel = TAG_W'(o);
  end

  pix_t taps [K];
  always_comb begin
    taps[0] = s1_pix;
    for (int j = 1; j < K; j++) taps[j] = rd[sel][j-1];
  end

  logic             c_valid;
  logic [TAG_W-1:0] c_tag;
  pix_t             c_pix;

  conv1d #(.K(K), .S(S), .SCALE(SCALE), .TAG_W(TAG_W)) u_conv (
    .clk, .rst_n,
    .in_valid (|s1_valid),
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
  // the same octave must not arrive in two consecutive cycles
  assert property (@(posedge clk) disable iff (!rst_n) (s1_valid & in_valid) == '0);
endmodule
