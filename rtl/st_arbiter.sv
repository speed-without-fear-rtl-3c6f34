// st_arbiter: two-phase arbiter built around the mutual exclusion element.
//
// Each client x/y signals with transitions: a transition on req_* asks for
// the shared resource, a transition on grant_* answers it, and a transition
// on done_* gives the resource back. A request is pending from its req
// transition until its done transition, i.e. while req_* ^ done_* is high;
// that level is the four-phase request to the mutex. While the mutex grants
// a side, a latch on that side is open and copies req_* to grant_*, which
// makes grant_* toggle once. When done_* arrives the mutex request falls, the
// latch closes and the other side, if it was waiting, is granted. So a
// request that arrives while the other side holds the resource is delayed
// until that side's done transition.
//
// The signal names and the reset input follow the original arbiter cell. Its
// exact gate network (two latch cells and merge cells per side) is not
// reproduced gate for gate; one merge and one latch per side give the same
// behaviour and are this design's own choice.
//
// Interface: req_x, req_y, done_x, done_y - input transitions; grant_x,
// grant_y - output transitions; reset (active high) clears the grants, and
// all inputs must be low while it is high.
// Timing: zero-delay. A client toggles done_* only after its grant_* and
// toggles req_* again only after its done_*. The cross-coupled mutex inside
// makes the lint tools report a latch loop; it is the mutex's own feedback.
module st_arbiter (
  input  logic reset,
  input  logic req_x,
  input  logic req_y,
  input  logic done_x,
  input  logic done_y,
  output logic grant_x,
  output logic grant_y
);
  logic mreq_x, mreq_y;   // four-phase requests to the mutex
  logic mack_x, mack_y;   // four-phase grants from the mutex

  st_merge u_pend_x (.a(req_x), .b(done_x), .z(mreq_x));
  st_merge u_pend_y (.a(req_y), .b(done_y), .z(mreq_y));

  st_mutex u_mutex (.req1(mreq_x), .req2(mreq_y), .ack1(mack_x), .ack2(mack_y));

  always_latch begin
    if (reset)       grant_x = 1'b0;
    else if (mack_x) grant_x = req_x;
  end

  always_latch begin
    if (reset)       grant_y = 1'b0;
    else if (mack_y) grant_y = req_y;
  end

  // Client protocol: done only for a request that has been granted.
  always @(done_x) begin
    if (!reset) assert (done_x == req_x && grant_x == req_x) else $error("st_arbiter: done_x without grant_x");
  end
  always @(done_y) begin
    if (!reset) assert (done_y == req_y && grant_y == req_y) else $error("st_arbiter: done_y without grant_y");
  end
endmodule
