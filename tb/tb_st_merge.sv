// tb_st_merge: self-checking test of the Merge element.
// Drives single transitions on either input in random order and checks that
// the output has toggled once per input transition, by comparing its level
// with the parity of a transition counter kept in the testbench.
module tb_st_merge;
  logic a = 1'b0, b = 1'b0, z;
  int checks = 0, failures = 0;
  int unsigned events = 0;

  st_merge dut (.a(a), .b(b), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    checks++; if (z !== 1'b0) begin failures++; $display("rest level wrong"); end
    for (int n = 0; n < 200; n++) begin
      if ($urandom_range(1)) a = ~a; else b = ~b;
      events++;
      #1;
      checks++;
      if (z !== events[0]) begin
        failures++; $display("step %0d: z=%b after %0d transitions", n, z, events);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
