// tb_st_latch: self-checking test of the transition-controlled latch.
// Random data is applied while the latch is open (it must follow), then a
// capture transition closes it (it must hold while the input keeps
// changing), then a pass transition opens it again. Both polarities of the
// control wires are exercised because they toggle throughout.
module tb_st_latch;
  localparam int W = 8;
  logic capture = 0, pass = 0;
  logic [W-1:0] d = '0, q, held;
  int checks = 0, failures = 0;

  st_latch #(.WIDTH(W)) dut (.capture(capture), .pass(pass), .d(d), .q(q));

  task automatic expect_q(input logic [W-1:0] e, input string what);
    checks++;
    if (q !== e) begin failures++; $display("%s: q=%h expected %h", what, q, e); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int n = 0; n < 100; n++) begin
      d = W'($urandom); #1 expect_q(d, "open latch follows");
      d = W'($urandom); #1 expect_q(d, "open latch follows");
      held = d;
      capture = ~capture;
      #1 expect_q(held, "captured");
      repeat (3) begin d = W'($urandom); #1 expect_q(held, "closed latch holds"); end
      pass = ~pass;
      #1 expect_q(d, "pass reopens");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
