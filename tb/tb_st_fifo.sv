// tb_st_fifo: self-checking test of the self-timed FIFO.
// A producer pushes random words through the two-phase input channel and a
// consumer takes them from the output channel, each with random pauses. A
// queue in the testbench predicts the order of the words. Phases in which
// the consumer stops make the FIFO fill up; the test checks that exactly
// DEPTH words are accepted and the next request is held back (the FIFO
// full stall), and that words pass straight through an empty FIFO.
module tb_st_fifo;
  localparam int DEPTH = 4;
  localparam int W     = 8;
  localparam int WORDS = 400;

  logic rst = 1'b1;
  logic in_req = 0, in_ack, out_req, out_ack = 0;
  logic [W-1:0] in_data = '0, out_data;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0;
  int full_stalls = 0, passthroughs = 0, received = 0;
  logic consumer_stop = 0;

  st_fifo #(.DEPTH(DEPTH), .WIDTH(W)) dut (
    .rst(rst), .in_req(in_req), .in_ack(in_ack), .in_data(in_data),
    .out_req(out_req), .out_ack(out_ack), .out_data(out_data)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Producer
  initial begin
    #2 rst = 0; #1;
    // a word into the empty FIFO must appear at the output at once
    in_data = 8'hA5; #1 in_req = ~in_req; model.push_back(8'hA5);
    #1;
    checks++;
    if (out_req !== 1'b1 || out_data !== 8'hA5) begin failures++; $display("no pass-through"); end
    else passthroughs++;
    for (int n = 1; n < WORDS; n++) begin
      #($urandom_range(1, 4));
      in_data = W'($urandom);
      #1;
      model.push_back(in_data);
      in_req = ~in_req;
      wait (in_ack == in_req);
    end
  end

  // Consumer, with periodic stops to fill the FIFO
  initial begin
    #3;
    while (received < WORDS) begin
      if (received % 50 == 10 && !consumer_stop) begin
        // stop taking words until the FIFO is full and the producer is stuck
        consumer_stop = 1;
        wait (model.size() == DEPTH + 1);  // DEPTH stored + 1 offered
        #10;
        checks++;
        if (in_ack == in_req) begin failures++; $display("t=%0t FIFO accepted more than DEPTH words", $time); end
        else full_stalls++;
      end
      if (received % 50 != 10) consumer_stop = 0;
      wait (out_req != out_ack);
      #($urandom_range(1, 4));
      checks++;
      if (model.size() == 0 || out_data !== model[0]) begin
        failures++; $display("t=%0t word %0d: got %h", $time, received, out_data);
      end
      if (model.size() != 0) void'(model.pop_front());
      received++;
      out_ack = ~out_ack;
      #1;
    end
    checks++;
    if (full_stalls == 0 || passthroughs == 0) begin failures++; $display("mechanism not exercised"); end
    $display("fifo: %0d words, %0d full stalls, %0d pass-throughs", received, full_stalls, passthroughs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
