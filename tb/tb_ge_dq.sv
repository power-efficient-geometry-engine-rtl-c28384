// tb_ge_dq: self-checking test of the ping-pong dispatch queue.
// A producer pushes random cache entries (when push_ready) and sometimes raises flush; a
// consumer takes each batch, holds it for a random time and pulses batch_done. Checks: the
// entries come out in push order, batch by batch; a batch is full (6) unless a flush was
// raised while it was filling; no batch is empty; one swap pulse per batch; a batch is never
// presented while the consumer still holds the previous one. Watchdog: 50000 cycles.
module tb_ge_dq;
  import ge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push, push_ready, flush, batch_valid, batch_done, swap;
  ent_t push_entry;
  logic [2:0] batch_count;
  ent_t batch_entries [DQ_SIZE];
  ge_dq dut (.*);
  int checks = 0, failures = 0;
  int model [$];
  int swaps = 0, batches = 0, partial = 0;
  bit flushed_since_swap = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask
  // flush history of the buffer that filled: latched at each swap
  bit batch_may_be_partial = 0;
  always @(posedge clk) if (rst_n) begin
    if (swap) begin
      swaps++;
      batch_may_be_partial <= flushed_since_swap || flush;
      flushed_since_swap <= 1'b0;
    end else if (flush) flushed_since_swap <= 1'b1;
  end
  // consumer
  int hold = 0;
  bit taken = 0;
  initial begin
    batch_done = 0;
    forever begin
      @(negedge clk);
      batch_done = 0;
      if (rst_n && batch_valid) begin
        if (!taken) begin
          taken = 1; hold = int'($urandom_range(12));
          batches++;
          chk(batch_count >= 1 && batch_count <= 6, $sformatf("batch count %0d", batch_count));
          chk(batch_count == 6 || batch_may_be_partial, $sformatf("partial batch %0d without flush", batch_count));
          if (batch_count != 6) partial++;
          for (int i = 0; i < int'(batch_count); i++) begin
            chk(model.size() > 0 && ent_t'(model[0]) == batch_entries[i],
                $sformatf("entry %0d: %0d", i, batch_entries[i]));
            if (model.size() > 0) void'(model.pop_front());
          end
        end else if (hold == 0) begin
          batch_done = 1; taken = 0;
        end else hold--;
      end
    end
  end
  initial begin
    push = 0; flush = 0; push_entry = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      push = ($urandom_range(3) != 0) && n < 5900;
      push_entry = ent_t'($urandom);
      flush = (n >= 5900) || ($urandom_range(40) == 0);
      if (push && push_ready) model.push_back(int'(push_entry));
    end
    @(negedge clk); push = 0; flush = 1;
    repeat (100) @(negedge clk);
    flush = 0;
    chk(model.size() == 0, $sformatf("%0d entries never dispatched", model.size()));
    chk(swaps == batches, $sformatf("swaps %0d batches %0d", swaps, batches));
    chk(partial > 0 && batches > partial, "both full and flushed batches seen");
    $display("batches %0d (partial %0d)", batches, partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
