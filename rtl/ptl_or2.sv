// ptl_or2 -- two-input OR, one node of the OR tree that merges the per-bit
// change flags of a multibit flip-flop into a single clock-enable request.
//
// The pass-transistor version is a three-transistor cell (two PMOS pass
// devices and one NMOS); only its logic function is modelled here, the
// transistor count belongs to the cell library.
//
// Interface: a, b in; y = a | b out. Purely combinational.
module ptl_or2 (
  input  logic a,
  input  logic b,
  output logic y
);

  always_comb y = a | b;

endmodule
