// ge_fifo: synchronous first-in first-out buffer.
//
// A circular buffer of DEPTH words with show-ahead output: dout is the oldest word whenever
// empty is low. push and pop may happen in the same cycle (also when full, then the popped
// word's slot is reused). It holds the operands that the reconfigurable datapath needs only
// in a later pipeline stage (the vector to be scaled after the SFU has produced 1/length or
// 1/w, the exponent of a power), so that they are not carried stage by stage in pipeline
// registers. The document names this FIFO; its depth and interface are this design's choice.
// A push when full (without pop) or a pop when empty is an error and is asserted against.
module ge_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign full  = (32'(count) == DEPTH);
  assign empty = (count == '0);
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  // handshake rules
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("ge_fifo: pop while empty");
  assert property (@(posedge clk) disable iff (!rst_n) (push && full) |-> pop)
    else $error("ge_fifo: push while full");

endmodule
