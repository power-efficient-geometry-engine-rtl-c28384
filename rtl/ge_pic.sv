// ge_pic: primitive input control.
//
// Reads vertex indices from the index FIFO, three per triangle, and looks each one up in the
// vertex cache tag unit. On a hit the vertex is already in the post-TnL cache (its reference
// count goes up); on a miss a free entry is allocated and the vertex (object position and
// normal) is fetched from the pre-TnL cache and written into the vertex cache. The assembled
// triangle is sent to the primitive processing unit for the object-space backface test. A back
// face is discarded and its three references released. Otherwise the triangle is pushed into
// the primitive queue, and each of its vertices that is neither in the pipeline nor lit yet
// is pushed into dispatch queue 1 (and marked in_pipe). All of this is the document's.
//
// This design's choices: one index is handled at a time; a miss is refused while fewer than
// reserve+1 entries are free, where reserve is the number of vertices subdivision of the
// oldest triangle may need (3 at level 1, 12 at level 2), so that subdivision can always find
// room; dq_flush asks the dispatch queue to hand over a partly filled buffer whenever this
// unit cannot go on (no index, lookup refused, primitive queue full).
// Handshakes: idx_valid/idx_pop (show-ahead FIFO), f_req_valid/f_req_ready for the fetch
// request and f_rsp_valid for its data (any latency), request/done pulses with the PPU.
module ge_pic
  import ge_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] lvl,
  // index FIFO
  input  logic       idx_valid,
  input  idx_t       idx_data,
  output logic       idx_pop,
  // tag unit
  output logic       lk_valid,
  output idx_t       lk_index,
  output logic [4:0] lk_reserve,
  input  logic       lk_ready,
  input  logic       lk_hit,
  input  ent_t       lk_entry,
  input  logic [NENT-1:0] inpipe_vec,
  input  logic [NENT-1:0] lit_vec,
  output logic       ip_valid,
  output ent_t       ip_entry,
  output logic       rel_valid,
  output ent_t       rel_entry,
  // pre-TnL vertex fetch
  output logic       f_req_valid,
  output idx_t       f_req_index,
  input  logic       f_req_ready,
  input  logic       f_rsp_valid,
  input  vec3_t      f_rsp_pos,
  input  vec3_t      f_rsp_nrm,
  // vertex cache write (object data)
  output logic       c_we,
  output ent_t       c_waddr,
  output vdata_t     c_wdata,
  // culling in the PPU
  output logic       cull_req,
  output ent_t       cull_ent [3],
  input  logic       cull_done,
  input  logic       cull_back,
  // primitive queue and dispatch queue 1
  output logic       pq_push,
  output ent_t       pq_tri [3],
  input  logic       pq_full,
  output logic       dq_push,
  output ent_t       dq_entry,
  input  logic       dq_ready,
  output logic       dq_flush,
  // events
  output logic       ev_hit,
  output logic       ev_miss,
  output logic       ev_cull,
  output logic       ev_stall
);

  typedef enum logic [2:0] {P_IDX, P_FREQ, P_FWAIT, P_CULL, P_REL, P_PQ, P_DQ} pstate_t;
  pstate_t    st;
  ent_t       ents [3];
  logic [1:0] k;
  idx_t       miss_idx;
  logic       need;

  assign lk_index   = idx_data;
  assign lk_reserve = 5'(n_gen(lvl));
  assign lk_valid   = (st == P_IDX) && idx_valid;
  assign idx_pop    = lk_valid && lk_ready;
  assign ev_hit     = idx_pop && lk_hit;
  assign ev_miss    = idx_pop && !lk_hit;
  assign ev_stall   = lk_valid && !lk_ready;

  assign f_req_valid = (st == P_FREQ);
  assign f_req_index = miss_idx;

  assign c_we    = (st == P_FWAIT) && f_rsp_valid;
  assign c_waddr = ents[k];
  always_comb begin
    c_wdata = '0;
    c_wdata.p_obj = f_rsp_pos;
    c_wdata.n_obj = f_rsp_nrm;
  end

  assign cull_req = (st == P_CULL);
  assign cull_ent = ents;
  assign ev_cull  = (st == P_CULL) && cull_done && cull_back;

  assign rel_valid = (st == P_REL);
  assign rel_entry = ents[k];

  assign pq_push = (st == P_PQ) && !pq_full;
  assign pq_tri  = ents;

  assign need     = !inpipe_vec[ents[k]] && !lit_vec[ents[k]];
  assign dq_push  = (st == P_DQ) && need && dq_ready;
  assign dq_entry = ents[k];
  assign ip_valid = dq_push;
  assign ip_entry = ents[k];

  assign dq_flush = ((st == P_IDX) && (!idx_valid || !lk_ready)) || ((st == P_PQ) && pq_full);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDX; k <= '0; miss_idx <= '0;
      for (int i = 0; i < 3; i++) ents[i] <= '0;
    end else begin
      unique case (st)
        P_IDX: if (idx_pop) begin
          ents[k] <= lk_entry;
          if (!lk_hit) begin
            miss_idx <= idx_data;
            st <= P_FREQ;
          end else if (k == 2'd2) begin
            k <= '0; st <= P_CULL;
          end else k <= k + 2'd1;
        end
        P_FREQ: if (f_req_ready) st <= P_FWAIT;
        P_FWAIT: if (f_rsp_valid) begin
          if (k == 2'd2) begin k <= '0; st <= P_CULL; end
          else begin k <= k + 2'd1; st <= P_IDX; end
        end
        P_CULL: if (cull_done) begin
          k  <= '0;
          st <= cull_back ? P_REL : P_PQ;
        end
        P_REL: begin
          if (k == 2'd2) begin k <= '0; st <= P_IDX; end
          else k <= k + 2'd1;
        end
        P_PQ: if (!pq_full) begin k <= '0; st <= P_DQ; end
        P_DQ: if (!need || dq_ready) begin
          if (k == 2'd2) begin k <= '0; st <= P_IDX; end
          else k <= k + 2'd1;
        end
        default: st <= P_IDX;
      endcase
    end
  end

endmodule
