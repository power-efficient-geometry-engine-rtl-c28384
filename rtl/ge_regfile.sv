// ge_regfile: register file of the vertex processing unit.
//
// Keeps the intermediate values of the vertices of a batch: NSLOT vertex slots (one per
// dispatch queue position, document: 6) by NREG 4-component registers. Two combinational read
// ports feed the two operands of the datapath; one write port writes any subset of the four
// components (wmask: x, y, z, w from bit 3 down to bit 0). Size and port count are this
// design's choice. Cleared at reset.
module ge_regfile
  import ge_pkg::*;
#(
  parameter int unsigned NSLOT = DQ_SIZE,
  parameter int unsigned NREG  = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [2:0]               wslot,
  input  logic [$clog2(NREG)-1:0]  wreg,
  input  logic [3:0]               wmask,
  input  vec4_t                    wdata,
  input  logic [2:0]               rslot0,
  input  logic [$clog2(NREG)-1:0]  rreg0,
  output vec4_t                    rdata0,
  input  logic [2:0]               rslot1,
  input  logic [$clog2(NREG)-1:0]  rreg1,
  output vec4_t                    rdata1
);

  vec4_t rf [NSLOT][NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSLOT; s++) for (int r = 0; r < NREG; r++) rf[s][r] <= '0;
    end else if (we) begin
      if (wmask[3]) rf[wslot][wreg].x <= wdata.x;
      if (wmask[2]) rf[wslot][wreg].y <= wdata.y;
      if (wmask[1]) rf[wslot][wreg].z <= wdata.z;
      if (wmask[0]) rf[wslot][wreg].w <= wdata.w;
    end
  end

  assign rdata0 = rf[rslot0][rreg0];
  assign rdata1 = rf[rslot1][rreg1];

endmodule
