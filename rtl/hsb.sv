// hsb: subscaling block between two octaves. Takes every second pixel of
// every second row of a Gaussian image of octave o and delivers it, at the
// rate of octave o+1, as the input image of octave o+1.
//
// The kept pixels arrive in bursts (every other pixel of every other row),
// while octave o+1 may take one pixel only in its own interleaving slots. An
// addressable shift register with an occupancy counter absorbs the
// difference: a kept pixel is shifted in at position 0, and in a slot of
// octave o+1 the oldest entry, at position count-1, is read out. Over an
// even row W_IN/2 pixels enter while W_IN/4 leave, and the odd row that
// follows drains the rest, so DEPTH = W_IN/4 plus a small margin is enough.
// A pixel that would not fit sets the sticky `overflow` flag and is dropped.
//
// Position: the incoming stream carries junk for its first SKIP samples
// (the fill of the filter pipelines before it); the pixel at image position
// (0,0) is sample SKIP. Pixel (x, y) is kept when x and y are both even.
//
// Interface: in_valid/in_pix from octave o; rd_slot is the slot of octave
// o+1; out_valid/out_pix are registered, one cycle after rd_slot.
module hsb
  import sift_pkg::*;
#(
  parameter int unsigned W_IN  = W_DEF,
  parameter int unsigned H_IN  = H_DEF,
  parameter int unsigned SKIP  = 0,
  parameter int unsigned DEPTH = W_IN / 4 + 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pix_t   in_pix,
  input  logic   rd_slot,
  output logic   out_valid,
  output pix_t   out_pix,
  output logic   overflow,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned SW = $clog2(SKIP + 2);
  localparam int unsigned XW = $clog2(W_IN + 1);
  localparam int unsigned YW = $clog2(H_IN + 1);

  // position tracking
  logic [SW-1:0] skip_cnt;
  logic          primed;
  logic [XW-1:0] x;
  logic [YW-1:0] y;

  always_ff @(posedge clk)
    if (!rst_n) begin
      skip_cnt <= '0;
      primed   <= (SKIP == 0);
      x        <= '0;
      y        <= '0;
    end else if (in_valid) begin
      if (!primed) begin
        skip_cnt <= skip_cnt + 1'b1;
        if (skip_cnt == SW'(SKIP - 1)) primed <= 1'b1;
      end else begin
        if (x == XW'(W_IN - 1)) begin
          x <= '0;
          y <= (y == YW'(H_IN - 1)) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end

  logic push, pop;
  assign push = in_valid && primed && !x[0] && !y[0];
  assign pop  = rd_slot && (level != '0);

  pix_t sr [DEPTH];

  always_ff @(posedge clk) begin
    if (push && (pop || level != CW'(DEPTH))) begin
      sr[0] <= in_pix;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
    out_pix <= sr[(level == '0) ? 0 : 32'(level) - 1];
  end

  always_ff @(posedge clk)
    if (!rst_n) begin
      level     <= '0;
      overflow  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= pop;
      if (push && !pop) begin
        if (level == CW'(DEPTH)) overflow <= 1'b1;
        else                     level <= level + 1'b1;
      end else if (pop && !push) begin
        level <= level - 1'b1;
      end
    end
endmodule
