// st_celement: the Join element, a Muller C-element, the AND function for
// two-phase transitions.
//
// The output copies the inputs when they agree and holds its value while they
// differ, i.e. out = a&b | a&out | b&out. An output transition therefore
// happens only after a transition has arrived on both inputs. The gate-level
// cell realised this majority function with a two-level NOR network and
// feedback; here it is written as a level-sensitive latch that is open when
// the inputs agree, which is the same function without a combinational loop.
//
// Interface: a, b - input transitions; q - output transition.
// rst (active high) forces q low; the reset is this design's own addition so
// that simulation and power-up start from a known state.
// Timing: zero-delay; a latch is inferred on purpose, it is the state of the
// C-element.
module st_celement (
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic q
);
  always_latch begin
    if (rst)         q = 1'b0;
    else if (a == b) q = a;
  end
endmodule
