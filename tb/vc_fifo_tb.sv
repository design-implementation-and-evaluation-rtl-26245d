// vc_fifo_tb: random pushes and pops against a queue model; checks the front flit, the
// empty/full flags and the count, and that simultaneous push and pop work when full.
module vc_fifo_tb;
  localparam int DEPTH = 8, W = 32;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [3:0] count;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0, fulls = 0;

  vc_fifo #(.DEPTH(DEPTH), .W(W)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) || int'(count) != model.size()) begin
        failures++; $display("FAIL flags size=%0d count=%0d empty=%b full=%b", model.size(), count, empty, full);
      end
      if (model.size() > 0) begin
        checks++;
        if (dout !== model[0]) begin failures++; $display("FAIL dout %h exp %h", dout, model[0]); end
      end
      if (full) fulls++;
      pop  = (model.size() > 0) && ($urandom_range(0, 99) < (k % 1000 < 500 ? 30 : 70));
      push = (model.size() < DEPTH || pop) && ($urandom_range(0, 99) < 60);
      din  = $urandom;
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
