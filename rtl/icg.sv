// icg -- latch-based integrated clock gate.
//
// A level-sensitive latch is transparent while `clk` is low and holds its
// value while `clk` is high; its output is ANDed with `clk` to form `gclk`.
// Because the enable can only change while the clock is low, a change of `en`
// during the high phase can neither cut a pulse short nor create a glitch: each
// pulse of `gclk` is either a whole pulse of `clk` or absent.
//
// Timing: `en` is sampled when `clk` rises (the value it had at the end of the
// low phase) and governs that one high phase of `gclk`. `en_latched` is the
// latch output, brought out so that the number of passed pulses can be
// observed.
//
// The latch-plus-AND structure is the published clock gate. That the latch is
// open while the clock is low (matching positive-edge flip-flops) and the
// `en_latched` observation output are this design's choices. The latch is
// intentional: it is the storage element of the clock gate, and `gclk` is a
// derived clock by design.
module icg (
  input  logic clk,
  input  logic en,
  output logic en_latched,
  output logic gclk
);

  always_latch begin
    if (!clk) en_latched = en;
  end

  ptl_and2 u_and (.a(clk), .b(en_latched), .y(gclk));

endmodule
