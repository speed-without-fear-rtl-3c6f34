// tb_st_mutex: self-checking test of the mutual exclusion element.
// Directed cases: each request alone, a tie, a request while the other side
// holds the grant, and release handing the grant over. Then random request
// levels are applied and compared with a reference that tracks who holds the
// resource, while mutual exclusion is checked at every step.
module tb_st_mutex;
  logic req1 = 1'b0, req2 = 1'b0, ack1, ack2;
  logic own1, own2;   // reference: which side holds the resource
  int checks = 0, failures = 0;

  st_mutex dut (.req1(req1), .req2(req2), .ack1(ack1), .ack2(ack2));

  task automatic expect_acks(input logic e1, input logic e2, input string what);
    checks++;
    if (ack1 !== e1 || ack2 !== e2) begin
      failures++; $display("%s: ack1=%b ack2=%b expected %b%b", what, ack1, ack2, e1, e2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 expect_acks(0, 0, "idle");
    req1 = 1; #1 expect_acks(1, 0, "req1 alone");
    req2 = 1; #1 expect_acks(1, 0, "req2 waits for side 1");
    req1 = 0; #1 expect_acks(0, 1, "grant handed to side 2");
    req1 = 1; #1 expect_acks(0, 1, "req1 waits for side 2");
    req2 = 0; #1 expect_acks(1, 0, "grant handed to side 1");
    req1 = 0; #1 expect_acks(0, 0, "idle again");
    req2 = 1; #1 expect_acks(0, 1, "req2 alone");
    req2 = 0; #1 expect_acks(0, 0, "idle again");
    req1 = 1; req2 = 1; #1 expect_acks(1, 0, "tie resolved to side 1");
    req1 = 0; req2 = 0; #1 expect_acks(0, 0, "idle after tie");
    own1 = 0; own2 = 0;
    for (int n = 0; n < 500; n++) begin
      // a side drops its request only while it holds the grant or waits
      if ($urandom_range(1)) req1 = ~req1; else req2 = ~req2;
      if (!req1) own1 = 0;
      if (!req2) own2 = 0;
      if (req1 && !own2) own1 = 1;
      if (req2 && !own1) own2 = 1;
      #1 expect_acks(own1, own2, "random");
      checks++;
      if (ack1 && ack2) begin failures++; $display("both grants high"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
