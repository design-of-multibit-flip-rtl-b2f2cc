// state_change_detector -- decides whether a group of K flip-flops needs a
// clock pulse at the next rising edge.
//
// Each flip-flop's data input d[i] is compared with its present output q[i]
// by an XOR gate: a 1 means that bit would change state at the next edge. The
// K comparison results are ORed into one request, `change`. When `change` is 0
// none of the K bits would change, so the shared clock can be suppressed for
// that cycle without altering what the flip-flops hold.
//
// Structure: K ptl_xor2 cells and a chain of K-1 ptl_or2 cells, as in the
// data-driven clock gating scheme (XOR per flip-flop, OR of the K results).
// The chain rather than a balanced tree is this design's choice; for the 2-
// and 4-bit groups of the design the difference is at most one gate level.
//
// Interface: d, q (K bits each) in, change out. Purely combinational; its
// delay must fit within the low phase of the clock, when the clock-gate latch
// is transparent.
module state_change_detector #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] d,
  input  logic [K-1:0] q,
  output logic         change
);

  logic [K-1:0] toggle;    // per-bit "will change" flags
  logic [K-1:0] any_prefix; // any_prefix[i] = |toggle[i:0]

  for (genvar i = 0; i < K; i++) begin : g_bit
    ptl_xor2 u_xor (.a(d[i]), .b(q[i]), .y(toggle[i]));
  end

  assign any_prefix[0] = toggle[0];
  for (genvar i = 1; i < K; i++) begin : g_or
    ptl_or2 u_or (.a(any_prefix[i-1]), .b(toggle[i]), .y(any_prefix[i]));
  end

  assign change = any_prefix[K-1];

endmodule
