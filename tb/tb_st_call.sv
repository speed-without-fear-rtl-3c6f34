// tb_st_call: self-checking test of the Call element.
// The testbench plays both clients and the subroutine. In each round a
// random client issues a request; the testbench checks that the request
// reaches the subroutine and that no acknowledge reaches a client yet. The
// subroutine then acknowledges after a random delay, and the testbench checks
// that only the calling client sees an acknowledge.
module tb_st_call;
  logic rst = 1'b1, req_x = 1'b0, req_y = 1'b0, ack_subr = 1'b0;
  logic ack_x, ack_y, req_subr;
  int checks = 0, failures = 0;
  int calls_x = 0, calls_y = 0, subr_calls = 0;

  st_call dut (.rst(rst), .req_x(req_x), .req_y(req_y), .ack_x(ack_x), .ack_y(ack_y),
               .req_subr(req_subr), .ack_subr(ack_subr));

  task automatic expect_state(input string what);
    checks++;
    if (ack_x !== 1'(calls_x) || ack_y !== 1'(calls_y) || req_subr !== 1'(subr_calls)) begin
      failures++;
      $display("%s: ack_x=%b ack_y=%b req_subr=%b, expected %0d/%0d/%0d transitions",
               what, ack_x, ack_y, req_subr, calls_x, calls_y, subr_calls);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 expect_state("reset");
    rst = 1'b0; #1;
    for (int n = 0; n < 200; n++) begin
      automatic logic pick_x = 1'($urandom_range(1));
      if (pick_x) req_x = ~req_x; else req_y = ~req_y;
      subr_calls++;
      #1 expect_state("request passed to subroutine");
      #($urandom_range(1, 5));
      expect_state("waiting for subroutine");
      ack_subr = ~ack_subr;
      if (pick_x) calls_x++; else calls_y++;
      #1 expect_state("acknowledge routed");
      #($urandom_range(1, 3));
    end
    checks++;
    if (calls_x == 0 || calls_y == 0) begin failures++; $display("a client was never served"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
