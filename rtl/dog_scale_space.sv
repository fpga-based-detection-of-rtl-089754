// dog_scale_space: generates the Difference-of-Gaussians scale space of O
// octaves and S scales with only S Gaussian filter blocks.
//
// S scale calculation blocks (scb) are cascaded: SCB s blurs the output of
// SCB s-1, so every block uses the same small kernel size instead of one
// large kernel per scale. Each SCB serves all O octaves, which are
// time-interleaved by the octave scheduler: octave 0 takes every second
// cycle and octave o one cycle in 2*4^o. The input of octave 0 is the image;
// the input of octave o > 0 is the second-to-last Gaussian image (scale S-2)
// of octave o-1, halved in both directions by an hsb block.
//
// Adjacent Gaussian images leave the cascade SCB_LAT cycles and one filter
// shift apart; scale_align blocks delay scales 0..S-2 so that all S images
// of an octave meet the last one, and the S-1 DoG images
// D_s = L_{s+1} - L_s are formed side by side in one register stage.
//
// Interface:
//   pix_valid/pix/pix_ready - raster-order image input; a pixel is taken in
//     a cycle with pix_valid and pix_ready (pix_ready is the octave-0 slot,
//     so at most one pixel every two cycles). Frames follow each other with
//     no gap; the stream is processed as one continuous raster.
//   dog_valid[o], dog[o][s] - the S-1 DoG values of one pixel of octave o.
//     Sample n of octave o (counted from reset) is image position
//     n - S*((K/2)*(W>>o) + K/2) of that octave's raster.
//   hsb_overflow[o] - sticky: the subscaler feeding octave o lost a pixel
//     (bit 0 is always 0).
module dog_scale_space
  import sift_pkg::*;
#(
  parameter int unsigned O = O_DEF,
  parameter int unsigned S = S_DEF,
  parameter int unsigned K = K_DEF,
  parameter int unsigned W = W_DEF,
  parameter int unsigned H = H_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pix_valid,
  input  pix_t         pix,
  output logic         pix_ready,
  output logic [O-1:0] dog_valid,
  output dog_t         dog [O][S-1],
  output logic [O-1:0] hsb_overflow
);
  logic [O-1:0] slot;

  octave_scheduler #(.O(O)) u_sched (.clk, .rst_n, .slot);

  assign pix_ready = slot[0];

  // SCB inputs, one port per octave
  logic [O-1:0] in_valid;
  pix_t         in_pix [O];

  // Gaussian images out of each SCB
  logic [O-1:0] g_valid [S];
  pix_t         g_pix   [S][O];

  always_ff @(posedge clk) begin
    in_pix[0] <= pix;
    if (!rst_n) in_valid[0] <= 1'b0;
    else        in_valid[0] <= pix_valid && slot[0];
  end

  assign hsb_overflow[0] = 1'b0;

  for (genvar o = 1; o < O; o++) begin : g_hsb
    localparam int unsigned WP = oct_dim(W, o - 1);
    localparam int unsigned HP = oct_dim(H, o - 1);
    localparam int unsigned HD = WP / 4 + 4;
    logic [$clog2(HD+1)-1:0] level;
    hsb #(
      .W_IN(WP), .H_IN(HP),
      .SKIP((S - 1) * filt_shift(K, WP)),
      .DEPTH(HD)
    ) u_hsb (
      .clk, .rst_n,
      .in_valid (g_valid[S-2][o-1]),
      .in_pix   (g_pix[S-2][o-1]),
      .rd_slot  (slot[o]),
      .out_valid(in_valid[o]),
      .out_pix  (in_pix[o]),
      .overflow (hsb_overflow[o]),
      .level    (level)
    );
    assert property (@(posedge clk) disable iff (!rst_n) 32'(level) <= HD);
  end

  for (genvar s = 0; s < S; s++) begin : g_scb
    logic [O-1:0] sv;
    pix_t         sp [O];
    if (s == 0) begin : g_first
      assign sv = in_valid;
      assign sp = in_pix;
    end else begin : g_next
      assign sv = g_valid[s-1];
      assign sp = g_pix[s-1];
    end
    scb #(.O(O), .K(K), .S(S), .SCALE(s), .W(W)) u_scb (
      .clk, .rst_n,
      .in_valid (sv),
      .in_pix   (sp),
      .out_valid(g_valid[s]),
      .out_pix  (g_pix[s])
    );
  end

  // Align every scale with scale S-1
  logic [O-1:0] a_valid [S];
  pix_t         a_pix   [S][O];

  assign a_valid[S-1] = g_valid[S-1];
  assign a_pix[S-1]   = g_pix[S-1];

  for (genvar s = 0; s < S - 1; s++) begin : g_align
    scale_align #(
      .O(O), .K(K), .W(W),
      .MULT(S - 1 - s),
      .CYC((S - 1 - s) * SCB_LAT - 1)
    ) u_align (
      .clk, .rst_n,
      .in_valid (g_valid[s]),
      .in_pix   (g_pix[s]),
      .out_valid(a_valid[s]),
      .out_pix  (a_pix[s])
    );
  end

  // Differences of adjacent scales
  always_ff @(posedge clk) begin
    for (int o = 0; o < O; o++)
      for (int s = 0; s < S - 1; s++)
        dog[o][s] <= dog_t'({1'b0, a_pix[s+1][o]}) - dog_t'({1'b0, a_pix[s][o]});
    if (!rst_n) dog_valid <= '0;
    else        dog_valid <= a_valid[S-1];
  end

  for (genvar s = 0; s < S - 1; s++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) a_valid[s] == a_valid[S-1]);
  end
endmodule
