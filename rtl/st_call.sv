// st_call: the Call element, a hardware subroutine call that lets two clients
// share one subroutine (any self-timed module with a req/ack pair).
//
// Structure (three Merges and two C-elements, as in the original cell):
//   req_subr = req_x ^ req_y                    Merge of the client requests
//   ack_x    = C(req_x, ack_subr ^ ack_y)       C-element fed by a Merge
//   ack_y    = C(req_y, ack_subr ^ ack_x)       C-element fed by a Merge
// At rest ack_subr equals ack_x ^ ack_y. When client x requests, req_x
// differs from ack_x and the request passes to the subroutine. When the
// subroutine acknowledges, ack_subr ^ ack_y flips to agree with req_x and the
// C-element of client x fires, while that of client y sees no change on
// req_y and holds. The acknowledge thus returns to the caller only.
//
// Interface: two-phase req_x/ack_x and req_y/ack_y towards the clients,
// req_subr/ack_subr towards the subroutine. rst (active high) clears the
// C-elements; all inputs must be low during reset.
// Timing: zero-delay. Requests must be mutually exclusive: a second client
// may request only after the first one has its acknowledge (use st_arbiter
// in front when that cannot be guaranteed). The two C-elements read each
// other's output through the Merges, which the lint tools report as a
// combinational loop; it is the intended feedback of the element.
module st_call (
  input  logic rst,
  input  logic req_x,
  input  logic req_y,
  output logic ack_x,
  output logic ack_y,
  output logic req_subr,
  input  logic ack_subr
);
  logic done_x, done_y;

  st_merge u_req_merge (.a(req_x),    .b(req_y), .z(req_subr));
  st_merge u_done_x    (.a(ack_subr), .b(ack_y), .z(done_x));
  st_merge u_done_y    (.a(ack_subr), .b(ack_x), .z(done_y));

  st_celement u_c_x (.rst(rst), .a(req_x), .b(done_x), .q(ack_x));
  st_celement u_c_y (.rst(rst), .a(req_y), .b(done_y), .q(ack_y));

  // Protocol rule of the Call: never two outstanding client requests.
  always_comb begin
    if (!rst) assert (!((req_x != ack_x) && (req_y != ack_y)))
      else $error("st_call: requests from both clients are outstanding");
  end
endmodule
