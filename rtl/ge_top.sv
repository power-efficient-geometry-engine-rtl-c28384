// ge_top: power-efficient geometry engine with low-complexity subdivision.
//
// The engine turns indexed triangles into screen-space triangles with Gouraud-ready vertex
// intensities, and, where a triangle may hold a specular highlight, into 4 (level 1) or 16
// (level 2) smaller triangles whose vertices are lit individually, which approaches Phong
// shading at a selectable cost. Data flow:
//   host indices -> index FIFO -> primitive input control (PIC): cache lookup in the vertex
//   cache management unit (VCMU), fetch of missing vertices from the pre-TnL cache, culling
//   request to the primitive processing unit (PPU) -> primitive queue (PQ) and dispatch
//   queue 1 (DQ1) -> vertex processing unit (VPU, with the reconfigurable datapath) transforms
//   and lights the vertices into the post-TnL vertex cache -> output control: highlight test,
//   subdivision request to the PPU, whose new vertices are lit through dispatch queue 2
//   (DQ2) -> small triangles with recovered edge functions to the setup engine.
// The blocks and this flow are the document's; the second dispatch queue, the port lists and
// all handshakes are this design's.
//
// Host interface: lvl (0, 1, 2: subdivision level, change only when idle), idx_* (vertex
// indices, three per triangle, counter-clockwise front faces), cw_* (constant memory words,
// map in ge_vpu), eye_* (eye position in object space for culling). Pre-TnL cache interface:
// f_req_* asks for a vertex by index, f_rsp_* returns its object position and normal (any
// latency, one outstanding request). Output: o_valid/o_ready/o_tri. ev: one-cycle event
// pulses for monitoring. idle: nothing in flight.
// Lint note: rst_n is both the asynchronous reset of the registers and the disable condition
// of the handshake assertions in the sub-blocks, which a linter reports as a net used both
// synchronously and asynchronously; the assertions are simulation-only checks.
module ge_top
  import ge_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] lvl,
  input  logic       idx_valid,
  input  idx_t       idx_data,
  output logic       idx_ready,
  input  logic       cw_en,
  input  logic [4:0] cw_addr,
  input  vec4_t      cw_data,
  input  logic       eye_we,
  input  vec3_t      eye_obj,
  output logic       f_req_valid,
  output idx_t       f_req_index,
  input  logic       f_req_ready,
  input  logic       f_rsp_valid,
  input  vec3_t      f_rsp_pos,
  input  vec3_t      f_rsp_nrm,
  output logic       o_valid,
  input  logic       o_ready,
  output otri_t      o_tri,
  output ge_ev_t     ev,
  output logic       idle
);

  // ---------------- index FIFO ----------------
  logic ix_full, ix_empty, ix_pop;
  idx_t ix_dout;
  logic [4:0] ix_count;
  ge_fifo #(.WIDTH(IDX_W), .DEPTH(16)) u_idx_fifo (
    .clk, .rst_n, .push(idx_valid && !ix_full), .din(idx_data), .pop(ix_pop),
    .dout(ix_dout), .full(ix_full), .empty(ix_empty), .count(ix_count)
  );
  assign idx_ready = !ix_full;

  // ---------------- tag unit ----------------
  logic       lk_valid, lk_ready, lk_hit, ga_valid, ga_ready, ip_valid, lit_valid, lit_htest;
  idx_t       lk_index;
  logic [4:0] lk_reserve, free_count;
  ent_t       lk_entry, ga_entry, ip_entry, lit_entry;
  logic [1:0] rel_valid;
  ent_t       rel_entry [2];
  logic [NENT-1:0] lit_vec, inpipe_vec, htest_vec;
  ge_vcmu u_vcmu (
    .clk, .rst_n, .lk_valid, .lk_index, .lk_reserve, .lk_ready, .lk_hit, .lk_entry,
    .ga_valid, .ga_ready, .ga_entry, .ip_valid, .ip_entry, .lit_valid, .lit_entry, .lit_htest,
    .rel_valid, .rel_entry, .lit_vec, .inpipe_vec, .htest_vec, .free_count
  );

  // ---------------- vertex cache data ----------------
  logic   c_we [3];
  ent_t   c_waddr [3];
  vmask_t c_wmask [3];
  vdata_t c_wdata [3];
  ent_t   c_raddr [7];
  vdata_t c_rdata [7];
  ge_vcache_mem #(.N(NENT), .NWR(3), .NRD(7)) u_vmem (
    .clk, .we(c_we), .waddr(c_waddr), .wmask(c_wmask), .wdata(c_wdata),
    .raddr(c_raddr), .rdata(c_rdata)
  );

  // ---------------- queues ----------------
  logic pq_push, pq_full, pq_pop, pq_empty;
  ent_t pq_tri [3], pq_head [3];
  ge_pq #(.DEPTH(8)) u_pq (
    .clk, .rst_n, .push(pq_push), .push_tri(pq_tri), .full(pq_full), .pop(pq_pop),
    .head(pq_head), .empty(pq_empty)
  );

  logic       d1_push, d1_ready, d1_flush, d1_valid, d1_done, d1_swap;
  ent_t       d1_entry;
  logic [2:0] d1_count;
  ent_t       d1_entries [DQ_SIZE];
  ge_dq #(.SIZE(DQ_SIZE)) u_dq1 (
    .clk, .rst_n, .push(d1_push), .push_entry(d1_entry), .push_ready(d1_ready),
    .flush(d1_flush), .batch_valid(d1_valid), .batch_count(d1_count),
    .batch_entries(d1_entries), .batch_done(d1_done), .swap(d1_swap)
  );

  logic       d2_push, d2_ready, d2_flush, d2_valid, d2_done, d2_swap;
  ent_t       d2_entry;
  logic [2:0] d2_count;
  ent_t       d2_entries [DQ_SIZE];
  ge_dq #(.SIZE(DQ_SIZE)) u_dq2 (
    .clk, .rst_n, .push(d2_push), .push_entry(d2_entry), .push_ready(d2_ready),
    .flush(d2_flush), .batch_valid(d2_valid), .batch_count(d2_count),
    .batch_entries(d2_entries), .batch_done(d2_done), .swap(d2_swap)
  );

  // ---------------- primitive input control ----------------
  logic cull_req, cull_done, cull_back;
  ent_t cull_ent [3];
  logic ev_hit, ev_miss, ev_cull, ev_stall;
  logic pic_rel;
  ge_pic u_pic (
    .clk, .rst_n, .lvl,
    .idx_valid(!ix_empty), .idx_data(ix_dout), .idx_pop(ix_pop),
    .lk_valid, .lk_index, .lk_reserve, .lk_ready, .lk_hit, .lk_entry,
    .inpipe_vec, .lit_vec, .ip_valid, .ip_entry,
    .rel_valid(pic_rel), .rel_entry(rel_entry[0]),
    .f_req_valid, .f_req_index, .f_req_ready, .f_rsp_valid, .f_rsp_pos, .f_rsp_nrm,
    .c_we(c_we[0]), .c_waddr(c_waddr[0]), .c_wdata(c_wdata[0]),
    .cull_req, .cull_ent, .cull_done, .cull_back,
    .pq_push, .pq_tri, .pq_full,
    .dq_push(d1_push), .dq_entry(d1_entry), .dq_ready(d1_ready), .dq_flush(d1_flush),
    .ev_hit, .ev_miss, .ev_cull, .ev_stall
  );
  assign c_wmask[0] = '{obj: 1'b1, eye: 1'b0, n_eye: 1'b0, win: 1'b0, inten: 1'b0};

  // ---------------- primitive processing unit ----------------
  logic       sub_req, sub_done, grid_we;
  ent_t       sub_ent [3], grid_ent;
  logic [2:0] grid_i, grid_j;
  ent_t       ppu_raddr [3];
  ge_ppu u_ppu (
    .clk, .rst_n, .eye_we, .eye_obj, .lvl,
    .cull_req, .cull_ent, .cull_done, .cull_back,
    .sub_req, .sub_ent, .sub_done, .grid_we, .grid_i, .grid_j, .grid_ent,
    .rd_addr(ppu_raddr), .rd_data(c_rdata[1:3]),
    .wr_en(c_we[2]), .wr_addr(c_waddr[2]), .wr_data(c_wdata[2]),
    .ga_valid, .ga_ready, .ga_entry,
    .dq_push(d2_push), .dq_entry(d2_entry), .dq_ready(d2_ready), .dq_flush(d2_flush)
  );
  assign c_wmask[2] = '{obj: 1'b0, eye: 1'b1, n_eye: 1'b1, win: 1'b1, inten: 1'b0};

  // ---------------- vertex processing unit ----------------
  logic ev_full_batch, ev_light_batch;
  ge_vpu u_vpu (
    .clk, .rst_n, .cw_en, .cw_addr, .cw_data,
    .b1_valid(d1_valid), .b1_count(d1_count), .b1_entries(d1_entries), .b1_done(d1_done),
    .b2_valid(d2_valid), .b2_count(d2_count), .b2_entries(d2_entries), .b2_done(d2_done),
    .c_raddr(c_raddr[0]), .c_rdata(c_rdata[0]),
    .c_we(c_we[1]), .c_waddr(c_waddr[1]), .c_wmask(c_wmask[1]), .c_wdata(c_wdata[1]),
    .lit_valid, .lit_entry, .lit_htest, .ev_full_batch, .ev_light_batch
  );

  // ---------------- output control ----------------
  logic oc_rel, ev_subdiv, ev_bypass;
  ent_t oc_raddr [3];
  ge_outctl u_out (
    .clk, .rst_n, .lvl, .pq_empty, .pq_head, .pq_pop, .lit_vec, .htest_vec,
    .rel_valid(oc_rel), .rel_entry(rel_entry[1]),
    .sub_req, .sub_ent, .sub_done, .grid_we, .grid_i, .grid_j, .grid_ent,
    .rd_addr(oc_raddr), .rd_data(c_rdata[4:6]),
    .o_valid, .o_ready, .o_tri, .ev_subdiv, .ev_bypass
  );

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      c_raddr[1 + k] = ppu_raddr[k];
      c_raddr[4 + k] = oc_raddr[k];
    end
  end
  assign rel_valid = {oc_rel, pic_rel};

  assign ev = '{cache_hit: ev_hit, cache_miss: ev_miss, culled: ev_cull, subdivided: ev_subdiv,
                bypassed: ev_bypass, dq_swap: d1_swap || d2_swap, pic_stall: ev_stall,
                vpu_full_batch: ev_full_batch, vpu_light_batch: ev_light_batch};

  // free_count is only observed by the VCMU's own users; idle looks at the queues.
  assign idle = ix_empty && pq_empty && !d1_valid && !d2_valid && !f_req_valid && !cull_req;

endmodule
