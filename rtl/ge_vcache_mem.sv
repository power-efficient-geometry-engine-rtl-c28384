// ge_vcache_mem: data array of the post-TnL vertex cache.
//
// One entry per tag entry of the cache management unit (document: 16). An entry holds the
// vertex data the engine keeps (ge_pkg::vdata_t): object position and normal as fetched, eye
// position, eye normal, window coordinates with 1/w_clip, and the lit intensity. Several
// units work on it at once, so it has NWR write ports, each writing a chosen set of fields
// (vmask_t), and NRD read ports with combinational (same-cycle) read. Port use in the engine:
// write 0 primitive input control (fetched vertex), 1 vertex processing unit (results),
// 2 primitive processing unit (generated vertices); on the same field of the same entry the
// higher port number wins, which the engine never needs. The document names the cache and its
// contents; the port structure is this design's.
module ge_vcache_mem
  import ge_pkg::*;
#(
  parameter int unsigned N   = NENT,
  parameter int unsigned NWR = 3,
  parameter int unsigned NRD = 7
) (
  input  logic   clk,
  input  logic   we    [NWR],
  input  ent_t   waddr [NWR],
  input  vmask_t wmask [NWR],
  input  vdata_t wdata [NWR],
  input  ent_t   raddr [NRD],
  output vdata_t rdata [NRD]
);

  vdata_t mem [N];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++) begin
      if (we[p]) begin
        if (wmask[p].obj)   begin mem[waddr[p]].p_obj <= wdata[p].p_obj; mem[waddr[p]].n_obj <= wdata[p].n_obj; end
        if (wmask[p].eye)   mem[waddr[p]].eye   <= wdata[p].eye;
        if (wmask[p].n_eye) mem[waddr[p]].n_eye <= wdata[p].n_eye;
        if (wmask[p].win)   mem[waddr[p]].win   <= wdata[p].win;
        if (wmask[p].inten) mem[waddr[p]].inten <= wdata[p].inten;
      end
    end
  end

  always_comb for (int r = 0; r < NRD; r++) rdata[r] = mem[raddr[r]];

endmodule
