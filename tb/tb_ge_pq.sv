// tb_ge_pq: self-checking test of the primitive queue.
// Random pushes and pops (only when allowed) against a queue model; checks head, full and
// empty every cycle, including filling to DEPTH and draining. Inputs change at the falling
// edge, outputs are compared at the falling edge. Watchdog: 20000 cycles.
module tb_ge_pq;
  import ge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push, pop, full, empty;
  ent_t push_tri [3], head [3];
  ge_pq dut (.*);
  int checks = 0, failures = 0;
  int model [$];
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask
  initial begin
    int bias, v;
    push = 0; pop = 0; for (int k = 0; k < 3; k++) push_tri[k] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), $sformatf("empty %b model %0d", empty, model.size()));
      chk(full == (model.size() == 8), $sformatf("full %b model %0d", full, model.size()));
      if (model.size() > 0) begin
        v = model[0];
        chk(head[0] == ent_t'(v) && head[1] == ent_t'(v >> 4) && head[2] == ent_t'(v >> 8),
            $sformatf("head %0d %0d %0d expected %h", head[0], head[1], head[2], v));
      end
      bias = ((n / 500) % 2 == 0) ? 3 : 1;    // phases that fill and that drain
      push = !full && ($urandom_range(3) < bias);
      pop  = !empty && ($urandom_range(3) >= bias);
      v = int'($urandom_range(4095));
      for (int k = 0; k < 3; k++) push_tri[k] = ent_t'(v >> (4 * k));
      if (pop) void'(model.pop_front());
      if (push) model.push_back(v);
    end
    @(negedge clk); push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
