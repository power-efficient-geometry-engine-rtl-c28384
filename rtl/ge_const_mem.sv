// ge_const_mem: constant memory of the vertex processing unit.
//
// Holds the transform matrices and light parameters, one 4-component row per word, written
// by the host before the engine starts (document) and read by the VPU through two
// combinational read ports (the two operands of a datapath operation). The word map is fixed
// by the VPU program (ge_vpu). Size and ports are this design's choice. Words are cleared at
// reset so that an unused word reads as zero.
module ge_const_mem
  import ge_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  vec4_t                wdata,
  input  logic [$clog2(N)-1:0] raddr0,
  input  logic [$clog2(N)-1:0] raddr1,
  output vec4_t                rdata0,
  output vec4_t                rdata1
);

  vec4_t mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < N; i++) mem[i] <= '0;
    else if (we) mem[waddr] <= wdata;
  end

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];

endmodule
