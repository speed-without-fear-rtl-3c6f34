// tb_st_arbiter: self-checking test of the two-phase arbiter.
// Two client processes each issue a request transition, wait for their grant
// transition, hold the resource for a random time, and give it back with a
// done transition. The testbench checks that the resource is never held by
// both clients, that every request is granted exactly once, and that
// contention (a request arriving while the other client holds the resource)
// happens and is resolved by delaying the later request. A directed tie
// opens the test.
module tb_st_arbiter;
  logic reset = 1'b1;
  logic req_x = 0, req_y = 0, done_x = 0, done_y = 0, grant_x, grant_y;
  int checks = 0, failures = 0;
  int grants_x = 0, grants_y = 0, contentions = 0;
  logic hold_x = 0, hold_y = 0;
  localparam int ROUNDS = 100;

  st_arbiter dut (.reset(reset), .req_x(req_x), .req_y(req_y), .done_x(done_x),
                  .done_y(done_y), .grant_x(grant_x), .grant_y(grant_y));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mutual exclusion of the resource as seen by the clients.
  always @(hold_x or hold_y) begin
    checks++;
    if (hold_x && hold_y) begin failures++; $display("t=%0t both clients hold the resource", $time); end
  end

  task automatic check_no_change(input logic g, input logic exp, input string what);
    checks++;
    if (g !== exp) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    #2 check_no_change(grant_x | grant_y, 1'b0, "grants not cleared by reset");
    reset = 0; #1;
    // directed tie: both request at the same instant; x wins, y waits for done_x
    req_x = ~req_x; req_y = ~req_y;
    #1 check_no_change(grant_x, 1'b1, "tie: grant_x missing");
    check_no_change(grant_y, 1'b0, "tie: grant_y given while x holds the resource");
    #3 check_no_change(grant_y, 1'b0, "tie: grant_y given before done_x");
    done_x = ~done_x;
    #1 check_no_change(grant_y, 1'b1, "tie: grant_y not given after done_x");
    done_y = ~done_y; #1;
    grants_x = 1; grants_y = 1; contentions = 1;

    fork
      for (int n = 0; n < ROUNDS; n++) begin
        #($urandom_range(1, 6));
        if (hold_y) contentions++;
        req_x = ~req_x;
        wait (grant_x == req_x);
        hold_x = 1; grants_x++;
        #($urandom_range(1, 6));
        check_no_change(grant_x, req_x, "grant_x moved while holding");
        hold_x = 0; #1 done_x = ~done_x;
      end
      for (int n = 0; n < ROUNDS; n++) begin
        #($urandom_range(1, 6));
        if (hold_x) contentions++;
        req_y = ~req_y;
        wait (grant_y == req_y);
        hold_y = 1; grants_y++;
        #($urandom_range(1, 6));
        check_no_change(grant_y, req_y, "grant_y moved while holding");
        hold_y = 0; #1 done_y = ~done_y;
      end
    join
    #2;
    checks++;
    if (grants_x != ROUNDS + 1 || grants_y != ROUNDS + 1) begin
      failures++; $display("grant counts %0d/%0d", grants_x, grants_y);
    end
    checks++;
    if (contentions < 2) begin failures++; $display("contention never occurred in random phase"); end
    $display("arbiter: %0d/%0d grants, %0d contended requests", grants_x, grants_y, contentions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
