// st_latch: bundled-data latch under two-phase transition control.
//
// Two control wires steer it: a transition on capture closes the latch and
// holds the data present at its input, a transition on pass opens it again.
// The latch is therefore transparent while capture and pass have seen the
// same number of transitions (capture == pass) and opaque while they differ.
// The data input must be stable before the capture transition arrives (the
// bundling constraint). The capture/pass control style is this design's
// choice for "a latch controlled by transition signals"; the data width is
// also its own.
//
// Interface: capture, pass - control transitions; d - data in; q - data out.
// The completion outputs of a physical cell are plain copies of capture and
// pass in a zero-delay model and are left out. No reset is needed: with both
// controls reset to the same level the latch is transparent.
// Timing: zero-delay, level-sensitive latch.
module st_latch #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             capture,
  input  logic             pass,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_latch begin
    if (capture == pass) q = d;
  end
endmodule
