// ge_dq: dispatch queue, a ping-pong pair of vertex-cache-entry buffers.
//
// One buffer fills (the producer pushes the cache entry addresses of vertices that still
// have to be processed) while the vertex processing unit works on the other. When the
// processing side has finished its batch (batch_done) and the filling buffer is full, the
// buffers swap. Each buffer holds SIZE entries (document: 6, the size fitted to the
// three-level subdivision: a level-1 triangle makes 3 new vertices, a level-2 one 12).
// flush (this design's addition) lets a partly filled buffer swap when its producer has
// nothing more to give for now, so that the last vertices of a stream are not held back.
//
// Interface: push/push_entry are accepted when push_ready; batch_valid, batch_count and
// batch_entries present the buffer under processing until batch_done is pulsed. swap pulses
// in the cycle the buffers exchange roles (visible from the next cycle).
module ge_dq
  import ge_pkg::*;
#(
  parameter int unsigned SIZE = DQ_SIZE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  ent_t       push_entry,
  output logic       push_ready,
  input  logic       flush,
  output logic       batch_valid,
  output logic [2:0] batch_count,
  output ent_t       batch_entries [SIZE],
  input  logic       batch_done,
  output logic       swap
);

  ent_t       buffer [2][SIZE];
  logic [2:0] cnt [2];
  logic       fill_sel;     // buffer being filled
  logic       proc_busy;    // the other buffer holds a batch under processing

  assign push_ready  = 32'(cnt[fill_sel]) < SIZE;
  assign batch_valid = proc_busy;
  assign batch_count = cnt[!fill_sel];
  always_comb for (int i = 0; i < SIZE; i++) batch_entries[i] = buffer[!fill_sel][i];

  logic fill_cnt_next_full, fill_nonempty;
  always_comb begin
    fill_cnt_next_full = (32'(cnt[fill_sel]) + 32'(push && push_ready)) == SIZE;
    fill_nonempty      = cnt[fill_sel] != '0 || push;
    swap = !proc_busy && (fill_cnt_next_full || (flush && fill_nonempty));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt[0] <= '0; cnt[1] <= '0;
      fill_sel <= 1'b0;
      proc_busy <= 1'b0;
      for (int b = 0; b < 2; b++) for (int i = 0; i < SIZE; i++) buffer[b][i] <= '0;
    end else begin
      if (push && push_ready) begin
        buffer[fill_sel][cnt[fill_sel]] <= push_entry;
        cnt[fill_sel] <= cnt[fill_sel] + 3'd1;
      end
      if (batch_done && proc_busy) begin
        proc_busy <= 1'b0;
        cnt[!fill_sel] <= '0;
      end
      if (swap) begin
        fill_sel  <= !fill_sel;
        proc_busy <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) batch_done |-> proc_busy)
    else $error("ge_dq: batch_done without a batch");

endmodule
