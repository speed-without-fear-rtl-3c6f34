// st_testchip: the self-timed module library placed side by side, each
// element with all of its ports brought out, in the manner of a library test
// chip.
//
// The library consists of independent building blocks that a designer (or a
// program-to-circuit translator) composes into larger self-timed systems.
// They are not wired to each other here, because any such wiring would be one
// particular system and none is fixed by the library itself. The chip holds:
//   Merge, Join (C-element), Select and Call - the elements whose delays were
//   measured on the original test chip;
//   a four-deep FIFO - also on the original test chip;
//   the two-phase arbiter (with its mutual exclusion element), the
//   transition-controlled latch and the carry-completion adder - the rest of
//   the library.
// Placing the elements side by side is this design's choice; so are the
// latch, FIFO and adder widths.
//
// Interface: one group of ports per element, prefixed with its name; one
// active-high reset rst shared by all elements that hold state.
// Timing: all elements are zero-delay self-timed logic; there is no clock.
// The loops and latches the lint tools report here belong to the elements
// and are explained in their own files.
module st_testchip #(
  parameter int unsigned FIFO_DEPTH  = 4,
  parameter int unsigned DATA_WIDTH  = 8,
  parameter int unsigned ADDER_WIDTH = 8
) (
  input  logic                   rst,
  // Merge
  input  logic                   merge_a,
  input  logic                   merge_b,
  output logic                   merge_z,
  // Join (C-element)
  input  logic                   join_a,
  input  logic                   join_b,
  output logic                   join_q,
  // Select
  input  logic                   sel_in,
  input  logic                   sel_sel,
  output logic                   sel_out_t,
  output logic                   sel_out_f,
  // Call
  input  logic                   call_req_x,
  input  logic                   call_req_y,
  output logic                   call_ack_x,
  output logic                   call_ack_y,
  output logic                   call_req_subr,
  input  logic                   call_ack_subr,
  // Arbiter
  input  logic                   arb_req_x,
  input  logic                   arb_req_y,
  input  logic                   arb_done_x,
  input  logic                   arb_done_y,
  output logic                   arb_grant_x,
  output logic                   arb_grant_y,
  // Latch
  input  logic                   lat_capture,
  input  logic                   lat_pass,
  input  logic [DATA_WIDTH-1:0]  lat_d,
  output logic [DATA_WIDTH-1:0]  lat_q,
  // FIFO
  input  logic                   fifo_in_req,
  output logic                   fifo_in_ack,
  input  logic [DATA_WIDTH-1:0]  fifo_in_data,
  output logic                   fifo_out_req,
  input  logic                   fifo_out_ack,
  output logic [DATA_WIDTH-1:0]  fifo_out_data,
  // Carry-completion adder
  input  logic                   add_req,
  output logic                   add_ack,
  input  logic [ADDER_WIDTH-1:0] add_a,
  input  logic [ADDER_WIDTH-1:0] add_b,
  output logic [ADDER_WIDTH-1:0] add_sum,
  output logic                   add_cout
);
  st_merge u_merge (.a(merge_a), .b(merge_b), .z(merge_z));

  st_celement u_join (.rst(rst), .a(join_a), .b(join_b), .q(join_q));

  st_select u_select (
    .rst(rst), .in(sel_in), .sel(sel_sel), .out_t(sel_out_t), .out_f(sel_out_f)
  );

  st_call u_call (
    .rst(rst), .req_x(call_req_x), .req_y(call_req_y),
    .ack_x(call_ack_x), .ack_y(call_ack_y),
    .req_subr(call_req_subr), .ack_subr(call_ack_subr)
  );

  st_arbiter u_arbiter (
    .reset(rst), .req_x(arb_req_x), .req_y(arb_req_y),
    .done_x(arb_done_x), .done_y(arb_done_y),
    .grant_x(arb_grant_x), .grant_y(arb_grant_y)
  );

  st_latch #(.WIDTH(DATA_WIDTH)) u_latch (
    .capture(lat_capture), .pass(lat_pass), .d(lat_d), .q(lat_q)
  );

  st_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(DATA_WIDTH)) u_fifo (
    .rst(rst),
    .in_req(fifo_in_req),   .in_ack(fifo_in_ack),   .in_data(fifo_in_data),
    .out_req(fifo_out_req), .out_ack(fifo_out_ack), .out_data(fifo_out_data)
  );

  st_cc_adder #(.WIDTH(ADDER_WIDTH)) u_adder (
    .rst(rst), .req(add_req), .ack(add_ack), .a(add_a), .b(add_b),
    .sum(add_sum), .cout(add_cout)
  );
endmodule
