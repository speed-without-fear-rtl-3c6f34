// tb_st_cc_adder: self-checking test of the carry-completion adder.
// Random operands, plus directed ones with no carry, a full carry ripple and
// a carry out, are added through the two-phase handshake. Each result is
// compared with the sum computed by the testbench, and the acknowledge must
// answer every request exactly once and hold the sum afterwards.
module tb_st_cc_adder;
  localparam int W = 8;
  logic rst = 1'b1, req = 0, ack, cout;
  logic [W-1:0] a = '0, b = '0, sum;
  logic [W:0]   expected;
  int checks = 0, failures = 0, carries_out = 0;

  st_cc_adder #(.WIDTH(W)) dut (.rst(rst), .req(req), .ack(ack), .a(a), .b(b),
                                .sum(sum), .cout(cout));

  task automatic add(input logic [W-1:0] x, input logic [W-1:0] y);
    a = x; b = y;
    expected = {1'b0, x} + {1'b0, y};
    #1 req = ~req;
    #1;
    checks++;
    if (ack !== req) begin failures++; $display("no acknowledge for %h+%h", x, y); end
    checks++;
    if ({cout, sum} !== expected) begin
      failures++; $display("%h+%h: got %h expected %h", x, y, {cout, sum}, expected);
    end
    if (expected[W]) carries_out++;
    // the result must stay put while the operands move on
    a = W'($urandom); b = W'($urandom);
    #1;
    checks++;
    if ({cout, sum} !== expected || ack !== req) begin failures++; $display("result not held"); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2;
    checks++;
    if (ack !== 1'b0 || sum !== '0) begin failures++; $display("reset"); end
    rst = 0; #1;
    add(8'h00, 8'h00);
    add(8'h55, 8'h22);
    add(8'hFF, 8'h01);   // ripple through every position and out
    add(8'h7F, 8'h01);
    add(8'hFF, 8'hFF);
    for (int n = 0; n < 300; n++) add(W'($urandom), W'($urandom));
    checks++;
    if (carries_out == 0) begin failures++; $display("no carry out exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
