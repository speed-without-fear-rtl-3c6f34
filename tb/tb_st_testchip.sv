// tb_st_testchip: end-to-end test of the library chip at its default sizes.
// Every element on the chip is exercised at the same time through the chip's
// own ports, each by its own process, and checked against values computed in
// the testbench: Merge and Join transitions, Select steering to both outputs,
// Call routing for both clients, arbitration with contention and a tie,
// latch capture and pass, FIFO traffic with full stalls and pass-through, and
// additions with and without carry out. Each of these mechanisms is counted,
// and one that never happened counts as a failure.
module tb_st_testchip;
  localparam int DEPTH = 4;   // default FIFO depth of the chip
  localparam int DW    = 8;   // default data width
  localparam int AW    = 8;   // default adder width

  logic rst = 1'b1;
  logic merge_a = 0, merge_b = 0, merge_z;
  logic join_a = 0, join_b = 0, join_q;
  logic sel_in = 0, sel_sel = 0, sel_out_t, sel_out_f;
  logic call_req_x = 0, call_req_y = 0, call_ack_x, call_ack_y, call_req_subr, call_ack_subr = 0;
  logic arb_req_x = 0, arb_req_y = 0, arb_done_x = 0, arb_done_y = 0, arb_grant_x, arb_grant_y;
  logic lat_capture = 0, lat_pass = 0;
  logic [DW-1:0] lat_d = '0, lat_q;
  logic fifo_in_req = 0, fifo_in_ack, fifo_out_req, fifo_out_ack = 0;
  logic [DW-1:0] fifo_in_data = '0, fifo_out_data;
  logic add_req = 0, add_ack, add_cout;
  logic [AW-1:0] add_a = '0, add_b = '0, add_sum;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_merge = 0, n_join = 0, n_sel_t = 0, n_sel_f = 0, n_call_x = 0, n_call_y = 0;
  int n_arb_contend = 0, n_arb_tie = 0, n_lat_capture = 0, n_lat_pass = 0;
  int n_fifo_full = 0, n_fifo_pass = 0, n_fifo_words = 0, n_add = 0, n_add_cout = 0;

  st_testchip dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t FAIL %s", $time, what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- Merge, Join, Select
  task automatic run_simple();
    int merge_events = 0;
    for (int n = 0; n < 100; n++) begin
      if ($urandom_range(1)) merge_a = ~merge_a; else merge_b = ~merge_b;
      merge_events++;
      #1 check(merge_z == 1'(merge_events), "merge output parity"); n_merge++;
    end
    for (int n = 0; n < 100; n++) begin
      automatic logic q0 = join_q;
      if ($urandom_range(1)) join_a = ~join_a; else join_b = ~join_b;
      #1 check(join_q == q0, "join fired on one input");
      if (join_a != join_b) begin
        if (join_a == q0) join_a = ~join_a; else join_b = ~join_b;
      end
      #1 check(join_q == ~q0, "join did not fire on both inputs"); n_join++;
    end
    for (int n = 0; n < 100; n++) begin
      automatic logic t0 = sel_out_t, f0 = sel_out_f;
      sel_sel = 1'($urandom_range(1));
      #1 sel_in = ~sel_in;
      #1;
      if (sel_sel) begin check(sel_out_t == ~t0 && sel_out_f == f0, "select true"); n_sel_t++; end
      else         begin check(sel_out_f == ~f0 && sel_out_t == t0, "select false"); n_sel_f++; end
    end
  endtask

  // ---------------------------------------------------------------- Call
  task automatic run_call();
    for (int n = 0; n < 100; n++) begin
      automatic logic px = 1'($urandom_range(1));
      automatic logic ax = call_ack_x, ay = call_ack_y, rs = call_req_subr;
      if (px) call_req_x = ~call_req_x; else call_req_y = ~call_req_y;
      #1 check(call_req_subr == ~rs && call_ack_x == ax && call_ack_y == ay, "call request");
      #($urandom_range(1, 4)) call_ack_subr = ~call_ack_subr;
      #1;
      if (px) begin check(call_ack_x == ~ax && call_ack_y == ay, "call ack to x"); n_call_x++; end
      else    begin check(call_ack_y == ~ay && call_ack_x == ax, "call ack to y"); n_call_y++; end
    end
  endtask

  // ---------------------------------------------------------------- Arbiter
  logic hold_x = 0, hold_y = 0;
  always @(hold_x or hold_y) if (hold_x && hold_y) check(0, "arbiter: resource held twice");

  task automatic run_arbiter();
    // tie: both at once, x first, y after done_x
    arb_req_x = ~arb_req_x; arb_req_y = ~arb_req_y;
    #1 check(arb_grant_x == arb_req_x && arb_grant_y != arb_req_y, "arbiter tie");
    n_arb_tie++;
    #2 arb_done_x = ~arb_done_x;
    #1 check(arb_grant_y == arb_req_y, "arbiter grant after done");
    arb_done_y = ~arb_done_y; #1;
    fork
      for (int n = 0; n < 60; n++) begin
        #($urandom_range(1, 5));
        if (hold_y) n_arb_contend++;
        arb_req_x = ~arb_req_x;
        wait (arb_grant_x == arb_req_x);
        hold_x = 1; #($urandom_range(1, 5)); hold_x = 0;
        #1 arb_done_x = ~arb_done_x;
      end
      for (int n = 0; n < 60; n++) begin
        #($urandom_range(1, 5));
        if (hold_x) n_arb_contend++;
        arb_req_y = ~arb_req_y;
        wait (arb_grant_y == arb_req_y);
        hold_y = 1; #($urandom_range(1, 5)); hold_y = 0;
        #1 arb_done_y = ~arb_done_y;
      end
    join
  endtask

  // ---------------------------------------------------------------- Latch
  task automatic run_latch();
    for (int n = 0; n < 100; n++) begin
      automatic logic [DW-1:0] held;
      lat_d = DW'($urandom); #1 check(lat_q == lat_d, "latch transparent");
      held = lat_d;
      lat_capture = ~lat_capture; n_lat_capture++;
      #1 lat_d = DW'($urandom);
      #1 check(lat_q == held, "latch holds");
      lat_pass = ~lat_pass; n_lat_pass++;
      #1 check(lat_q == lat_d, "latch reopened");
    end
  endtask

  // ---------------------------------------------------------------- FIFO
  logic [DW-1:0] fifo_model [$];
  localparam int FIFO_WORDS = 200;

  task automatic run_fifo();
    fork
      begin : producer
        fifo_in_data = 8'h3C; #1;
        fifo_model.push_back(fifo_in_data);
        fifo_in_req = ~fifo_in_req;
        #1 if (fifo_out_req != fifo_out_ack && fifo_out_data == 8'h3C) n_fifo_pass++;
        for (int n = 1; n < FIFO_WORDS; n++) begin
          #($urandom_range(1, 3));
          fifo_in_data = DW'($urandom); #1;
          fifo_model.push_back(fifo_in_data);
          fifo_in_req = ~fifo_in_req;
          wait (fifo_in_ack == fifo_in_req);
        end
      end
      begin : consumer
        while (n_fifo_words < FIFO_WORDS) begin
          if (n_fifo_words % 40 == 20) begin
            wait (fifo_model.size() == DEPTH + 1);
            #8 check(fifo_in_ack != fifo_in_req, "FIFO took a word while full");
            n_fifo_full++;
          end
          wait (fifo_out_req != fifo_out_ack);
          #($urandom_range(1, 4));
          check(fifo_model.size() != 0 && fifo_out_data == fifo_model[0], "FIFO word order");
          if (fifo_model.size() != 0) void'(fifo_model.pop_front());
          n_fifo_words++;
          fifo_out_ack = ~fifo_out_ack;
          #1;
        end
      end
    join
  endtask

  // ---------------------------------------------------------------- Adder
  task automatic run_adder();
    for (int n = 0; n < 200; n++) begin
      automatic logic [AW:0] expv;
      add_a = (n == 0) ? '1 : AW'($urandom);
      add_b = (n == 0) ? AW'(1) : AW'($urandom);
      expv = {1'b0, add_a} + {1'b0, add_b};
      #1 add_req = ~add_req;
      #1 check(add_ack == add_req && {add_cout, add_sum} == expv, "adder result");
      n_add++;
      if (expv[AW]) n_add_cout++;
    end
  endtask

  initial begin
    #2 check(join_q == 0 && sel_out_t == 0 && sel_out_f == 0 && call_ack_x == 0 &&
             call_ack_y == 0 && arb_grant_x == 0 && arb_grant_y == 0 && add_ack == 0 &&
             fifo_in_ack == 0 && fifo_out_req == 0, "reset state");
    rst = 0; #1;
    fork
      run_simple();
      run_call();
      run_arbiter();
      run_latch();
      run_fifo();
      run_adder();
    join
    #2;
    check(n_merge > 0,       "mechanism: merge");
    check(n_join > 0,        "mechanism: join");
    check(n_sel_t > 0,       "mechanism: select true");
    check(n_sel_f > 0,       "mechanism: select false");
    check(n_call_x > 0,      "mechanism: call from x");
    check(n_call_y > 0,      "mechanism: call from y");
    check(n_arb_tie > 0,     "mechanism: arbiter tie");
    check(n_arb_contend > 0, "mechanism: arbiter contention");
    check(n_lat_capture > 0, "mechanism: latch capture");
    check(n_lat_pass > 0,    "mechanism: latch pass");
    check(n_fifo_full > 0,   "mechanism: FIFO full stall");
    check(n_fifo_pass > 0,   "mechanism: FIFO pass-through");
    check(n_add_cout > 0,    "mechanism: adder carry out");
    $display("merge %0d join %0d select %0d/%0d call %0d/%0d arb tie %0d contention %0d",
             n_merge, n_join, n_sel_t, n_sel_f, n_call_x, n_call_y, n_arb_tie, n_arb_contend);
    $display("latch %0d/%0d fifo words %0d full %0d pass %0d adder %0d carry-out %0d",
             n_lat_capture, n_lat_pass, n_fifo_words, n_fifo_full, n_fifo_pass, n_add, n_add_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
