// ddcg_mbff -- K-bit multibit flip-flop with data-driven (adaptive) clock
// gating.
//
// The K flip-flops of an mbff share one clock. A state_change_detector
// compares each flip-flop's data input with its output and ORs the K results;
// an icg latches that request while the clock is low and passes the next clock
// pulse only if at least one bit is about to change. In cycles where every
// d[i] equals q[i] the merged flip-flops receive no clock edge at all, so their
// clock load does not switch; the outputs are the same as those of an
// ungated register, since a suppressed edge would only have reloaded the
// values already held.
//
// The detector, the clock gate and the merged flip-flops are the structure
// of the published design. The asynchronous reset and the `clk_en`
// observation output are this design's additions.
//
// Interface: clk, rst_n, d[K-1:0] in; q[K-1:0] out (updates at the rising
// edge of clk, one cycle like a plain register); clk_en out, high during a
// clock cycle whose rising edge was passed to the flip-flops (it is the latch
// output, so it is stable while clk is high).
//
// An assertion checks, at each rising edge, that the gate passes the pulse
// exactly when d differs from q.
//
// Timing: d must be settled, and the detector must have propagated, before
// clk rises; the gate latch closes at that edge.
module ddcg_mbff #(
  parameter int unsigned K = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] d,
  output logic [K-1:0] q,
  output logic         clk_en
);

  logic change;
  logic gclk;

  state_change_detector #(.K(K)) u_scd (
    .d      (d),
    .q      (q),
    .change (change)
  );

  icg u_icg (
    .clk        (clk),
    .en         (change),
    .en_latched (clk_en),
    .gclk       (gclk)
  );

  mbff #(.K(K)) u_ff (
    .clk   (gclk),
    .rst_n (rst_n),
    .d     (d),
    .q     (q)
  );

  // At every rising edge the gate latch must hold the detector's verdict for
  // the values being clocked in: pass the edge exactly when some bit changes.
  a_gate_matches_change: assert property (@(posedge clk) clk_en == (d != q))
    else $error("clock gate enable disagrees with the state-change detector");

endmodule
