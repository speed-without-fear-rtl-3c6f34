// st_merge: the Merge element, the OR function for two-phase transitions.
//
// In two-phase (transition) signalling only changes of a wire carry meaning,
// never its level. A transition on either input therefore has to produce one
// transition on the output, which is exactly what an exclusive-OR does: the
// output is the parity of all input transitions seen so far. The gate is the
// whole module, as in the original cell library.
//
// Interface: a, b - input transition wires; z - output transition wire.
// Timing: purely combinational; the environment must not make a and b change
// at the same time (two simultaneous transitions would cancel), which is the
// usual rule for a Merge.
module st_merge (
  input  logic a,
  input  logic b,
  output logic z
);
  assign z = a ^ b;
endmodule
