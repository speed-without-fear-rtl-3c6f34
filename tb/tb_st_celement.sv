// tb_st_celement: self-checking test of the Join (C-element).
// Part 1 uses two-phase traffic: each input gets one transition, in random
// order, and the output must toggle only after the second of the two. Part 2
// applies random levels and compares against the majority function
// a&b | a&q | b&q evaluated in the testbench.
module tb_st_celement;
  logic rst = 1'b1, a = 1'b0, b = 1'b0, q;
  logic qref;
  int checks = 0, failures = 0;

  st_celement dut (.rst(rst), .a(a), .b(b), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin failures++; $display("%s: q=%b expected %b", what, q, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 check(1'b0, "reset");
    rst = 1'b0; #1;
    for (int n = 0; n < 100; n++) begin
      automatic logic q_before = q;
      if ($urandom_range(1)) begin a = ~a; #1 check(q_before, "first input"); b = ~b; end
      else                   begin b = ~b; #1 check(q_before, "first input"); a = ~a; end
      #1 check(~q_before, "second input");
    end
    qref = q;
    for (int n = 0; n < 200; n++) begin
      a = 1'($urandom_range(1));
      b = 1'($urandom_range(1));
      qref = (a & b) | (a & qref) | (b & qref);
      #1 check(qref, "random levels");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
