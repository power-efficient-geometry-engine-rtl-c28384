// tb_ge_fifo: self-checking test of the FIFO.
// Random pushes and pops (never a push when full without a pop, never a pop when empty)
// against a queue model; checks data order, full/empty flags and the count every cycle.
module tb_ge_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic push, pop, full, empty;
  logic [15:0] din, dout;
  logic [3:0] count;
  ge_fifo #(.WIDTH(16), .DEPTH(8)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty, .count);
  logic [15:0] model[$];

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 8) || count != 4'(model.size())) begin
        failures++; $display("flags: size %0d count %0d full %b empty %b", model.size(), count, full, empty);
      end
      if (model.size() > 0) begin
        checks++;
        if (dout != model[0]) begin failures++; $display("data %h exp %h", dout, model[0]); end
      end
      // bias the traffic so that the FIFO fills and drains
      pop  = (model.size() > 0) && ($urandom % 100 < ((n / 200) % 2 ? 70 : 30));
      push = (model.size() < 8 || pop) && ($urandom % 100 < ((n / 200) % 2 ? 30 : 70));
      din  = 16'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
