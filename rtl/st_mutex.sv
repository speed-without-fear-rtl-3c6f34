// st_mutex: mutual exclusion element, the core of the two-phase arbiter.
//
// A four-phase (level) element: raising req1 raises ack1 unless ack2 is
// already high, and likewise for the other side; dropping a request drops
// its acknowledge and lets a waiting request through. At most one ack is
// ever high. The transistor-level original is a cross-coupled pair of gates
// followed by a metastability filter that keeps both outputs low until the
// pair has resolved. In this zero-delay logic model a tie (both requests
// rising at once) is resolved at once in favour of req1; the analog settling
// of the filter is not represented.
//
// Interface: req1/req2 - level requests; ack1/ack2 - level grants. No reset
// is needed: with both requests low both grants are low.
// Timing: zero-delay. The two grant latches read each other, which the lint
// tools report as a latch loop; it is the cross-coupling of the element.
module st_mutex (
  input  logic req1,
  input  logic req2,
  output logic ack1,
  output logic ack2
);
  // Side 1 takes the resource whenever side 2 does not hold it.
  always_latch begin
    if (!req1)      ack1 = 1'b0;
    else if (!ack2) ack1 = 1'b1;
  end

  // Side 2 takes it only when side 1 neither holds nor requests it; once
  // held, it keeps it until req2 falls.
  always_latch begin
    if (!req2)              ack2 = 1'b0;
    else if (!ack1 && !req1) ack2 = 1'b1;
  end

  always_comb assert (!(ack1 && ack2)) else $error("st_mutex: both grants high");
endmodule
