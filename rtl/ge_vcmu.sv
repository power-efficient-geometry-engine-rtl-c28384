// ge_vcmu: vertex cache management unit, the tag store of the post-TnL vertex cache.
//
// NENT tag entries (document: 16). Each entry has seven fields: valid, vertex index,
// reference count, in_pipe, lit, Htest_result and gen. The first six are the document's;
// gen (this design's) marks an entry that holds a vertex made by subdivision, which has no
// index and never hits.
//
// Lookup (lk_valid, lk_index): the index is compared with every valid entry (hit_vector);
// on a hit the entry's reference count goes up by one and its address is returned. On a miss
// a free entry (valid = 0 or reference count = 0: free_vector) is allocated, lowest address
// first, with reference count 1. lk_ready is low when a miss finds fewer than lk_reserve + 1
// free entries; lk_reserve lets the caller keep room for the vertices that subdivision of the
// oldest triangle will need (this design's rule, which keeps the pipeline free of deadlock).
// Generated-vertex allocation (ga_valid) takes a free entry and has priority: a lookup waits
// while it is requested (a refused lookup must not starve the subdivision it waits for).
// Two release ports subtract one reference each; set_inpipe and set_lit update the flags.
// All requests are accepted in the cycle they are presented; outputs are combinational from
// the tag state, which changes at the clock edge.
module ge_vcmu
  import ge_pkg::*;
#(
  parameter int unsigned N = NENT
) (
  input  logic          clk,
  input  logic          rst_n,
  // lookup / allocate (primitive input control)
  input  logic          lk_valid,
  input  idx_t          lk_index,
  input  logic [4:0]    lk_reserve,
  output logic          lk_ready,
  output logic          lk_hit,
  output ent_t          lk_entry,
  // allocation for generated vertices (primitive processing unit)
  input  logic          ga_valid,
  output logic          ga_ready,
  output ent_t          ga_entry,
  // flag updates
  input  logic          ip_valid,     // vertex pushed to a dispatch queue
  input  ent_t          ip_entry,
  input  logic          lit_valid,    // vertex transformed and lit
  input  ent_t          lit_entry,
  input  logic          lit_htest,
  // reference release (two ports)
  input  logic [1:0]    rel_valid,
  input  ent_t          rel_entry [2],
  // status
  output logic [N-1:0]  lit_vec,
  output logic [N-1:0]  inpipe_vec,
  output logic [N-1:0]  htest_vec,
  output logic [4:0]    free_count
);

  typedef struct packed {
    logic       valid;
    idx_t       index;
    logic [3:0] refcnt;
    logic       in_pipe;
    logic       lit;
    logic       htest;
    logic       gen;
  } tag_t;

  tag_t tags [N];
  logic [N-1:0] hit_vector, free_vector;
  ent_t hit_addr, free_addr;
  logic any_hit, any_free;

  always_comb begin
    hit_vector = '0;
    free_vector = '0;
    free_count = '0;
    for (int i = 0; i < N; i++) begin
      hit_vector[i]  = tags[i].valid && !tags[i].gen && tags[i].index == lk_index;
      free_vector[i] = !tags[i].valid || tags[i].refcnt == '0;
      free_count    += 5'(free_vector[i]);
      lit_vec[i]     = tags[i].lit;
      inpipe_vec[i]  = tags[i].in_pipe;
      htest_vec[i]   = tags[i].htest;
    end
    // encoders
    hit_addr = '0;
    free_addr = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (hit_vector[i])  hit_addr  = ent_t'(i);
      if (free_vector[i]) free_addr = ent_t'(i);
    end
    any_hit  = |hit_vector;
    any_free = |free_vector;
    lk_hit   = any_hit;
    lk_ready = !ga_valid && (any_hit || (free_count > lk_reserve));
    lk_entry = any_hit ? hit_addr : free_addr;
    ga_ready = any_free;
    ga_entry = free_addr;
  end

  logic lk_fire, ga_fire;
  assign lk_fire = lk_valid && lk_ready;
  assign ga_fire = ga_valid && ga_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) tags[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        logic [3:0] inc, dec;
        inc = '0;
        dec = '0;
        if (lk_fire && any_hit && hit_addr == ent_t'(i)) inc = 4'd1;
        for (int p = 0; p < 2; p++) if (rel_valid[p] && rel_entry[p] == ent_t'(i)) dec += 4'd1;
        tags[i].refcnt <= tags[i].refcnt + inc - dec;
        if (ip_valid && ip_entry == ent_t'(i)) tags[i].in_pipe <= 1'b1;
        if (lit_valid && lit_entry == ent_t'(i)) begin
          tags[i].lit     <= 1'b1;
          tags[i].in_pipe <= 1'b0;
          tags[i].htest   <= lit_htest;
        end
        if ((lk_fire && !any_hit && free_addr == ent_t'(i)) || (ga_fire && free_addr == ent_t'(i))) begin
          tags[i] <= '{valid: 1'b1, index: lk_index, refcnt: 4'd1, in_pipe: 1'b0, lit: 1'b0,
                       htest: 1'b0, gen: ga_fire};
        end
      end
    end
  end

  // reference counts never wrap
  for (genvar i = 0; i < N; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      (rel_valid[0] && rel_entry[0] == ent_t'(i)) |-> tags[i].refcnt != '0)
      else $error("ge_vcmu: release of an unreferenced entry");
    assert property (@(posedge clk) disable iff (!rst_n)
      (lk_fire && any_hit && hit_addr == ent_t'(i)) |-> tags[i].refcnt != 4'hf)
      else $error("ge_vcmu: reference count overflow");
  end

endmodule
