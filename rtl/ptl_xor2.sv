// ptl_xor2 -- two-input exclusive-OR, the comparator cell of the state-change
// detector.
//
// In the pass-transistor design this gate is two transistors: with both
// inputs low or both high the output is pulled low, with the inputs different
// it is driven high. At the register-transfer level only that truth table
// survives; the transistor topology (and its 2-transistor count) belongs to
// the cell library and is not expressed here.
//
// Interface: a, b in; y = a ^ b out. Purely combinational, no timing of its own.
module ptl_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);

  always_comb y = a ^ b;

endmodule
