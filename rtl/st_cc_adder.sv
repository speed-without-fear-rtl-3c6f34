// st_cc_adder: carry-completion adder with a two-phase bundled interface.
//
// The adder tells its environment when the sum is ready by watching the carry
// chain. Every carry is carried on two rails, carry-is-1 (c1) and carry-is-0
// (c0), both low while the adder is idle. During an operation a bit position
// resolves its carry-out at once if it generates (a=b=1) or kills (a=b=0) a
// carry, and otherwise waits for its carry-in to resolve and passes it on.
// The operation is complete when every position has one rail high; the time
// this takes follows the longest propagate run of the operands, not the worst
// case of the adder.
//
// Handshake: a transition on req starts an addition of a and b (bundled, so
// stable before req toggles and until ack answers). The level go = req ^ ack
// releases the carry chain. On completion the sum is captured in an output
// latch, and ack toggles only once that latch shows the new sum; ack equal to
// req then drops go and returns both carry rails to low, ready for the next
// operation. The carry-in is 0. Operand width, the output latch and the reset
// are this design's own choices.
//
// Interface: req/ack - two-phase handshake; a, b - operands; sum, cout -
// result, valid when ack toggles and held until the next completion.
// rst (active high) clears ack and the result; req must be low meanwhile.
// Timing: zero-delay; the completion loop (ack -> go -> carries -> ack) is
// the return-to-zero of the dual-rail chain and settles within one instant,
// which the lint tools report as a latch loop.
module st_cc_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             rst,
  input  logic             req,
  output logic             ack,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic             go;
  logic [WIDTH:0]   c1, c0;        // dual-rail carries, index i = carry into bit i
  logic [WIDTH-1:0] gen, kill, prop;
  logic [WIDTH:0]   resolved;
  logic             complete;
  logic [WIDTH:0]   result;        // {cout, sum} from the dual-rail carries
  logic             captured;

  assign go   = req ^ ack;
  assign gen  = a & b;
  assign kill = ~a & ~b;
  assign prop = a ^ b;

  assign c1[0] = 1'b0;
  assign c0[0] = go;
  for (genvar i = 0; i < WIDTH; i++) begin : g_chain
    assign c1[i+1] = go & (gen[i]  | (prop[i] & c1[i]));
    assign c0[i+1] = go & (kill[i] | (prop[i] & c0[i]));
  end

  assign resolved = c1 | c0;
  assign complete = &resolved;
  assign result   = {c1[WIDTH], prop ^ c1[WIDTH-1:0]};

  always_latch begin
    if (rst)           {cout, sum} = '0;
    else if (complete) {cout, sum} = result;
  end

  // ack may only move once the result latch holds the completed sum.
  assign captured = ({cout, sum} == result);

  always_latch begin
    if (rst)                        ack = 1'b0;
    else if (complete && captured)  ack = req;
  end

  // Bundling rule: the operands may change only while no request is pending.
  always @(a or b) begin
    if (!rst) assert (req == ack)
      else $error("st_cc_adder: operands changed during an addition");
  end
endmodule
