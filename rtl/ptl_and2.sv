// ptl_and2 -- two-input AND, the gate of the integrated clock gate that lets
// the clock through while the latched enable is high.
//
// The pass-transistor version is a three-transistor cell (two NMOS pass
// devices and one PMOS to ground); only its logic function is modelled here.
//
// Interface: a, b in; y = a & b out. Purely combinational.
module ptl_and2 (
  input  logic a,
  input  logic b,
  output logic y
);

  always_comb y = a & b;

endmodule
