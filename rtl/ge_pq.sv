// ge_pq: primitive queue, a FIFO of triangles waiting for their vertices to be lit.
//
// Each entry stores the vertex cache entry addresses of the three vertices of a triangle
// that passed culling. The primitive input control pushes; the output control reads the
// oldest triangle (head, valid while !empty) and pops it once the triangle and all its
// subdivided pieces have been sent on. DEPTH is this design's choice (the document gives no
// size). A push when full or a pop when empty is asserted against.
module ge_pq
  import ge_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  ent_t push_tri [3],
  output logic full,
  input  logic pop,
  output ent_t head [3],
  output logic empty
);

  localparam int unsigned AW = $clog2(DEPTH);
  ent_t         tri_mem [DEPTH][3];
  logic [AW-1:0] rd, wr;
  logic [AW:0]   cnt;

  assign full  = 32'(cnt) == DEPTH;
  assign empty = cnt == '0;
  always_comb for (int k = 0; k < 3; k++) head[k] = tri_mem[rd][k];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; cnt <= '0;
      for (int i = 0; i < DEPTH; i++) for (int k = 0; k < 3; k++) tri_mem[i][k] <= '0;
    end else begin
      if (push) begin
        for (int k = 0; k < 3; k++) tri_mem[wr][k] <= push_tri[k];
        wr <= wr + 1'b1;
      end
      if (pop) rd <= rd + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("ge_pq: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("ge_pq: pop while empty");

endmodule
