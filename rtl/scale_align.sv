// scale_align: delays the Gaussian image of one scale so that it lines up,
// pixel for pixel and cycle for cycle, with the image of a later scale.
//
// Every SCB of the cascade shifts the image stream of octave o by
// (K/2)*(W>>o) + K/2 samples and by SCB_LAT cycles. To subtract scale s from
// scale S-1 (or any later one) the earlier image is first delayed by CYC
// cycles in a register pipeline and then by MULT such sample shifts in a
// per-octave circular buffer that advances only on that octave's samples
// (read old entry, write new, one cycle). Total cycle delay is CYC + 1.
//
// Interface: one valid/pixel port per octave in and out.
module scale_align
  import sift_pkg::*;
#(
  parameter int unsigned O    = O_DEF,
  parameter int unsigned K    = K_DEF,
  parameter int unsigned W    = W_DEF,
  parameter int unsigned MULT = 1,
  parameter int unsigned CYC  = SCB_LAT - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [O-1:0] in_valid,
  input  pix_t         in_pix  [O],
  output logic [O-1:0] out_valid,
  output pix_t         out_pix [O]
);
  // cycle delay of the whole multi-octave bundle
  logic [O-1:0] dv [CYC+1];
  pix_t         dp [CYC+1][O];

  assign dv[0] = in_valid;
  assign dp[0] = in_pix;

  for (genvar c = 0; c < CYC; c++) begin : g_cyc
    always_ff @(posedge clk) begin
      dp[c+1] <= dp[c];
      if (!rst_n) dv[c+1] <= '0;
      else        dv[c+1] <= dv[c];
    end
  end

  for (genvar o = 0; o < O; o++) begin : g_oct
    localparam int unsigned D  = MULT * filt_shift(K, oct_dim(W, o));
    localparam int unsigned AW = (D > 1) ? $clog2(D) : 1;
    pix_t          mem [D];
    logic [AW-1:0] ptr;

    always_ff @(posedge clk) begin
      if (dv[CYC][o]) begin
        out_pix[o] <= mem[ptr];
        mem[ptr]   <= dp[CYC][o];
      end
      if (!rst_n) begin
        ptr          <= '0;
        out_valid[o] <= 1'b0;
      end else begin
        out_valid[o] <= dv[CYC][o];
        if (dv[CYC][o]) ptr <= (ptr == AW'(D - 1)) ? '0 : ptr + 1'b1;
      end
    end
  end
endmodule
