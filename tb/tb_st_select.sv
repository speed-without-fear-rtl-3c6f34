// tb_st_select: self-checking test of the Select element.
// For random select values it toggles the input once and checks that exactly
// the selected output toggled and the other kept its level. The select is
// changed only while the element is at rest, as the bundling rule requires.
module tb_st_select;
  logic rst = 1'b1, in = 1'b0, sel = 1'b0, out_t, out_f;
  int checks = 0, failures = 0;
  int n_t = 0, n_f = 0;

  st_select dut (.rst(rst), .in(in), .sel(sel), .out_t(out_t), .out_f(out_f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2;
    checks++; if (out_t !== 1'b0 || out_f !== 1'b0) begin failures++; $display("reset"); end
    rst = 1'b0; #1;
    for (int n = 0; n < 300; n++) begin
      sel = 1'($urandom_range(1));
      #1;
      // changing sel alone must not produce a transition
      checks++;
      if (out_t !== 1'(n_t) || out_f !== 1'(n_f)) begin
        failures++; $display("step %0d: output moved on a select change", n);
      end
      in = ~in;
      if (sel) n_t++; else n_f++;
      #1;
      checks++;
      if (out_t !== 1'(n_t) || out_f !== 1'(n_f)) begin
        failures++;
        $display("step %0d sel=%b: out_t=%b out_f=%b, expected %0d/%0d transitions",
                 n, sel, out_t, out_f, n_t, n_f);
      end
    end
    checks++;
    if (n_t == 0 || n_f == 0) begin failures++; $display("one output never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
