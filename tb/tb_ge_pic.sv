// tb_ge_pic: self-checking test of the primitive input control.
// The unit runs with the real tag unit (ge_vcmu); everything else around it is modelled:
// an index stream of 120 random triangles over 24 vertex indices, the pre-TnL memory (random
// request acceptance and answer delay; vertex k has position (k, 2k, -k) and normal (0,0,k)),
// the vertex cache data array, the culling unit (answers after a few cycles; a triangle whose
// first index is a multiple of 5 is a back face), the primitive queue (random full, entries
// leave after a while and release their three references) and dispatch queue 1 (random
// ready; a pushed vertex is marked lit some cycles later). Checks: every triangle that is not
// a back face reaches the primitive queue, in order, with entries whose cached position and
// normal belong to its indices; back faces never do and their references are released; each
// vertex enters the dispatch queue only when neither lit nor already in the pipeline; hits and
// misses add up to the number of indices; at level 2 lookups stall. Watchdog: 200000 cycles.
module tb_ge_pic;
  import ge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int NTRI = 120;

  logic [1:0] lvl;
  logic idx_valid, idx_pop, lk_valid, lk_ready, lk_hit, ip_valid, rel_valid;
  idx_t idx_data, lk_index, f_req_index;
  logic [4:0] lk_reserve, free_count;
  ent_t lk_entry, ip_entry, rel_entry, c_waddr, dq_entry, ga_entry, lit_entry;
  logic [NENT-1:0] inpipe_vec, lit_vec, htest_vec;
  logic f_req_valid, f_req_ready, f_rsp_valid, c_we, cull_req, cull_done, cull_back;
  vec3_t f_rsp_pos, f_rsp_nrm;
  vdata_t c_wdata;
  ent_t cull_ent [3], pq_tri [3];
  logic pq_push, pq_full, dq_push, dq_ready, dq_flush, ev_hit, ev_miss, ev_cull, ev_stall;
  logic lit_valid, ga_ready;
  logic [1:0] rel_v2;
  ent_t rel_e2 [2];
  ent_t pq_rel_e;
  logic pq_rel_v;

  ge_pic dut (.*);
  ge_vcmu u_tags (
    .clk, .rst_n, .lk_valid, .lk_index, .lk_reserve, .lk_ready, .lk_hit, .lk_entry,
    .ga_valid(1'b0), .ga_ready, .ga_entry, .ip_valid, .ip_entry, .lit_valid, .lit_entry,
    .lit_htest(1'b0), .rel_valid(rel_v2), .rel_entry(rel_e2), .lit_vec, .inpipe_vec,
    .htest_vec, .free_count
  );
  assign rel_v2 = {pq_rel_v, rel_valid};
  assign rel_e2[0] = rel_entry;
  assign rel_e2[1] = pq_rel_e;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  int tris [NTRI][3];
  // index stream
  int ip = 0;
  assign idx_valid = ip < 3 * NTRI;
  assign idx_data  = idx_valid ? idx_t'(tris[ip / 3][ip % 3]) : '0;
  always @(posedge clk) if (rst_n && idx_pop) ip <= ip + 1;

  // pre-TnL memory
  int f_wait = 0; bit f_busy = 0; idx_t f_idx;
  always @(posedge clk) if (rst_n && f_req_valid && f_req_ready) begin f_busy <= 1; f_idx <= f_req_index; f_wait <= 1 + int'($urandom_range(4)); end
  always @(negedge clk) begin
    f_rsp_valid <= 0;
    f_req_ready <= !f_busy && ($urandom_range(2) != 0);
    if (f_busy) begin
      if (f_wait > 1) f_wait <= f_wait - 1;
      else begin
        f_busy <= 0; f_rsp_valid <= 1;
        f_rsp_pos <= '{fx_t'(int'(f_idx) << 16), fx_t'(int'(f_idx) << 17), fx_t'(-(int'(f_idx) << 16))};
        f_rsp_nrm <= '{fx_t'(0), fx_t'(0), fx_t'(int'(f_idx) << 16)};
      end
    end
  end

  // vertex cache data
  vdata_t mem [16];
  always @(posedge clk) if (c_we) begin mem[c_waddr].p_obj <= c_wdata.p_obj; mem[c_waddr].n_obj <= c_wdata.n_obj; end

  // culling unit
  int cw = 0;
  always @(negedge clk) begin
    cull_done <= 0; cull_back <= 0;
    if (cull_req && !cull_done) begin
      if (cw == 0) cw <= 2 + int'($urandom_range(3));
      else if (cw == 1) begin
        cull_done <= 1;
        cull_back <= (mem[cull_ent[0]].p_obj.x[31:16] % 5) == 0;
        cw <= 0;
      end else cw <= cw - 1;
    end
  end

  // primitive queue model
  int   pq_t = 0;                 // next expected triangle
  ent_t pq_q [$];
  int   pq_hold = 0;
  always @(negedge clk) pq_full <= (pq_q.size() >= 12) || ($urandom_range(5) == 0);
  always @(posedge clk) if (rst_n && pq_push) begin
    while (pq_t < NTRI && (tris[pq_t][0] % 5) == 0) pq_t++;
    chk(pq_t < NTRI, "more triangles than sent");
    for (int k = 0; k < 3; k++) begin
      chk(pq_t < NTRI && mem[pq_tri[k]].p_obj.x == fx_t'(tris[pq_t][k] << 16) &&
          mem[pq_tri[k]].p_obj.y == fx_t'(tris[pq_t][k] << 17) &&
          mem[pq_tri[k]].n_obj.z == fx_t'(tris[pq_t][k] << 16),
          $sformatf("triangle %0d vertex %0d: entry %0d holds %0d, expected %0d", pq_t, k, pq_tri[k], mem[pq_tri[k]].p_obj.x >>> 16, tris[pq_t][k]));
      chk(!(dut.pq_full), "push while full");
      pq_q.push_back(pq_tri[k]);
    end
    pq_t++;
  end
  // entries leave the queue one reference per cycle once the vertex is lit (as in the PPU)
  always @(negedge clk) begin
    pq_rel_v = 0;
    if (pq_q.size() > 0 && lit_vec[pq_q[0]] && $urandom_range(3) == 0) begin pq_rel_v = 1; pq_rel_e = pq_q.pop_front(); end
  end

  // dispatch queue model: each pushed entry becomes lit a few cycles later
  int lit_at [16];
  int n_dq = 0;
  always @(negedge clk) dq_ready <= ($urandom_range(3) != 0);
  always @(posedge clk) if (rst_n && dq_push) begin
    chk(dq_ready, "push while not ready");
    chk(!lit_vec[dq_entry] && !inpipe_vec[dq_entry], $sformatf("entry %0d dispatched while lit or in the pipeline", dq_entry));
    lit_at[dq_entry] <= cyc + 5 + int'($urandom_range(30));
    n_dq++;
  end
  always @(negedge clk) begin
    lit_valid = 0; lit_entry = '0;
    for (int e = 0; e < 16; e++) if (lit_at[e] != 0 && cyc >= lit_at[e] && !lit_valid) begin
      lit_valid = 1; lit_entry = ent_t'(e); lit_at[e] = 0;
    end
  end

  int n_hit = 0, n_miss = 0, n_cull = 0, n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev_hit); n_miss += int'(ev_miss); n_cull += int'(ev_cull); n_stall += int'(ev_stall);
  end

  initial begin
    int nback;
    lvl = 2'd2; pq_rel_e = '0; pq_rel_v = 0; lit_valid = 0; lit_entry = '0;
    for (int e = 0; e < 16; e++) begin lit_at[e] = 0; mem[e] = '0; end
    nback = 0;
    for (int t = 0; t < NTRI; t++) begin
      tris[t][0] = int'($urandom_range(23));
      tris[t][1] = (tris[t][0] + 1 + int'($urandom_range(21))) % 24;
      tris[t][2] = tris[t][1];
      while (tris[t][2] == tris[t][0] || tris[t][2] == tris[t][1]) tris[t][2] = int'($urandom_range(23));
      if (tris[t][0] % 5 == 0) nback++;
    end
    repeat (2) @(negedge clk); rst_n = 1;
    while (pq_t < NTRI - nback || ip < 3 * NTRI) @(negedge clk);
    repeat (200) @(negedge clk);
    while (pq_t < NTRI && (tris[pq_t][0] % 5) == 0) pq_t++;
    chk(pq_t == NTRI, $sformatf("%0d of %0d triangles reached the queue", pq_t, NTRI));
    chk(n_cull == nback, $sformatf("culled %0d, expected %0d", n_cull, nback));
    chk(n_hit + n_miss == 3 * NTRI, "hits and misses add up");
    chk(n_hit > 0 && n_stall > 0, "hits and stalls seen");
    chk(free_count == 5'(NENT), $sformatf("all references released: %0d free", free_count));
    $display("hits %0d misses %0d culled %0d stalls %0d dispatched %0d", n_hit, n_miss, n_cull, n_stall, n_dq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
