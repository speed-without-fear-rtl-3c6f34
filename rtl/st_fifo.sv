// st_fifo: self-timed FIFO for bundled data, DEPTH stages deep (four by
// default, the depth of the FIFO on the original test chip).
//
// The FIFO is a micropipeline made of the library's own elements: a chain of
// C-elements for control and one transition-controlled latch per stage for
// data. Stage i holds a word while its control c[i] differs from c[i+1]. Its
// C-element takes the request of the stage before (c[i-1]) and the inverted
// control of the stage after (c[i+1]), so c[i] toggles only when the previous
// stage offers a word and stage i itself is empty. The latch of stage i
// captures on c[i] and passes on c[i+1]. Words ripple forward through empty
// stages; when all stages are full the input acknowledge stops, which is the
// back-pressure of the FIFO.
// In a physical micropipeline the request wire is slower than the data
// (the bundling constraint), so a latch that opens always has time to take
// over its input before its C-element closes it again. A zero-delay model has
// no such margin, so here each stage's C-element may only capture once the
// stage latch output equals its input word; this check stands in for the
// matched delay and is this design's own addition.
// Only the FIFO's depth comes from the original description; its internal
// organisation, the data width and the reset are this design's own choices.
//
// Interface: in_req/in_ack/in_data - two-phase bundled input channel (the
// FIFO acknowledges by toggling in_ack to equal in_req); out_req/out_ack/
// out_data - two-phase bundled output channel (the consumer toggles out_ack
// to equal out_req after taking out_data). rst (active high) empties the
// FIFO; in_req and out_ack must be low while it is high.
// Timing: zero-delay model; a word entering an empty FIFO appears at the
// output in the same instant. in_data must be stable before in_req toggles
// and until in_ack answers. Neighbouring C-elements read each other's
// outputs, so the lint tools report a combinational loop through the stage
// latches (and may then not recognise them as latches); this feedback is the
// handshake of the micropipeline itself.
module st_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned WIDTH = 8
) (
  input  logic             rst,
  input  logic             in_req,
  output logic             in_ack,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_req,
  input  logic             out_ack,
  output logic [WIDTH-1:0] out_data
);
  logic [DEPTH+1:0]   c;                 // c[0] = in_req, c[DEPTH+1] = out_ack
  logic [WIDTH-1:0]   d [DEPTH+1];       // d[0] = in_data, d[i+1] = stage i
  logic [DEPTH-1:0]   nxt_n;             // inverted control of the next stage
  logic [DEPTH-1:0]   copied;            // stage latch output equals its input
  logic [DEPTH-1:0]   ctl_b;             // second C-element input of each stage

  assign c[0]        = in_req;
  assign c[DEPTH+1]  = out_ack;
  assign d[0]        = in_data;

  for (genvar i = 0; i < DEPTH; i++) begin : g_stage
    assign nxt_n[i]  = ~c[i+2];
    assign copied[i] = (d[i+1] == d[i]);
    // While the stage latch has not yet taken over its input word, the
    // C-element sees its own output on this input and holds.
    assign ctl_b[i]  = copied[i] ? nxt_n[i] : c[i+1];
    st_celement u_ctl (.rst(rst), .a(c[i]), .b(ctl_b[i]), .q(c[i+1]));
    st_latch #(.WIDTH(WIDTH)) u_lat (
      .capture(c[i+1]), .pass(c[i+2]), .d(d[i]), .q(d[i+1])
    );
  end

  assign in_ack   = c[1];
  assign out_req  = c[DEPTH];
  assign out_data = d[DEPTH];

  // Bundling rule of the input channel: the word may change only while the
  // channel is idle.
  always @(in_data) begin
    if (!rst) assert (in_req == in_ack)
      else $error("st_fifo: in_data changed while a request was pending");
  end
endmodule
