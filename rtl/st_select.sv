// st_select: the Select element, which steers an input transition to one of
// two outputs according to a Boolean select signal.
//
// sel is bundled with the input transition: it is stable before `in` changes
// and stays stable until the transition has appeared on an output. When in
// toggles and sel is high, out_t toggles; with sel low, out_f toggles. At rest
// in equals out_t ^ out_f, so the output to toggle is given its new value as
// in ^ (the other output); each output is a latch that is only open while sel
// points at it. The internal circuit of the original cell is not described;
// this two-latch form is this design's own and is the simplest that gives the
// function.
//
// Interface: in - input transition; sel - bundled select; out_t / out_f -
// output transitions for sel = 1 / sel = 0. rst (active high, own addition)
// clears both outputs; in must be low while rst is high.
// Timing: zero-delay. The two latches read each other's output, so the lint
// tools report a latch loop; it is not a real loop because only one of the
// two latches is open at any time.
module st_select (
  input  logic rst,
  input  logic in,
  input  logic sel,
  output logic out_t,
  output logic out_f
);
  always_latch begin
    if (rst)      out_t = 1'b0;
    else if (sel) out_t = in ^ out_f;
  end

  always_latch begin
    if (rst)       out_f = 1'b0;
    else if (!sel) out_f = in ^ out_t;
  end
endmodule
