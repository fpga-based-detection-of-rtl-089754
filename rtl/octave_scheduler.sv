// octave_scheduler: the interleaving controller ("block M") that lets every
// octave of a scale share one filter.
//
// A free-running counter numbers the clock cycles. Counting cycles from 1,
// octave 0 owns every odd cycle and octave o > 0 owns one cycle in every
// 2*4^o, starting at the first cycle left free by the lower octaves
// (sift_pkg::slot_first). Because octave o carries a quarter of the pixels of
// octave o-1, the whole pyramid needs at most 2/3 of the cycles, so no two
// octaves ever claim the same cycle. The schedule repeats every 2*4^(O-1)
// cycles, so the counter needs only 2*O-1 bits.
//
// Interface: slot[o] is high in the cycles owned by octave o; at most one bit
// is set in any cycle. The counter starts at zero after reset, so the first
// cycle after reset is cycle 1 of the schedule (an octave-0 cycle).
module octave_scheduler #(
  parameter int unsigned O = sift_pkg::O_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [O-1:0] slot
);
  localparam int unsigned CW = 2 * O - 1;
  localparam int unsigned PMAX = 1 << CW;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk)
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;

  // 1-based cycle number modulo the schedule period
  logic [CW-1:0] cyc;
  assign cyc = cnt + 1'b1;

  for (genvar o = 0; o < O; o++) begin : g_slot
    localparam int unsigned P = sift_pkg::slot_period(o);
    localparam int unsigned A = sift_pkg::slot_first(o) % P;
    if (P > PMAX) begin : g_bad
      $error("octave period exceeds counter range");
    end
    assign slot[o] = ((32'(cyc) % P) == A);
  end

  // Proposition 1: the octave slots never collide
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(slot));
endmodule
