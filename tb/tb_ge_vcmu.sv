// tb_ge_vcmu: self-checking test of the vertex cache tag unit.
// A reference model keeps valid, index, reference count and flags of the 16 entries.
// Random traffic: lookups of indices 0..39 with a random reserve, generated-vertex
// allocations, releases of referenced entries on both ports (also both on one entry), and
// in-pipe / lit updates. Every cycle the combinational outputs (hit, ready, returned entry,
// free count, flag vectors) are compared with the model; entries are allocated lowest free
// address first. Watchdog: 50000 cycles.
module tb_ge_vcmu;
  import ge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic lk_valid, lk_ready, lk_hit, ga_valid, ga_ready, ip_valid, lit_valid, lit_htest;
  idx_t lk_index;
  logic [4:0] lk_reserve, free_count;
  ent_t lk_entry, ga_entry, ip_entry, lit_entry;
  logic [1:0] rel_valid;
  ent_t rel_entry [2];
  logic [15:0] lit_vec, inpipe_vec, htest_vec;
  ge_vcmu dut (.*);

  int checks = 0, failures = 0;
  bit   m_valid [16], m_gen [16], m_lit [16], m_ip [16], m_h [16];
  int   m_idx [16], m_ref [16];
  int   n_hit = 0, n_refused = 0, n_ga = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    int hit, fr, nfree, a, b;
    bit ready;
    lk_valid = 0; lk_index = '0; lk_reserve = '0; ga_valid = 0; ip_valid = 0; ip_entry = '0;
    lit_valid = 0; lit_entry = '0; lit_htest = 0; rel_valid = '0; rel_entry[0] = '0; rel_entry[1] = '0;
    for (int i = 0; i < 16; i++) begin
      m_valid[i] = 0; m_gen[i] = 0; m_lit[i] = 0; m_ip[i] = 0; m_h[i] = 0; m_idx[i] = 0; m_ref[i] = 0;
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      // stimulus
      lk_valid = ($urandom_range(1) == 1); lk_index = idx_t'($urandom_range(39));
      lk_reserve = 5'($urandom_range(12));
      ga_valid = ($urandom_range(5) == 0);
      ip_valid = ($urandom_range(2) == 0); ip_entry = ent_t'($urandom);
      lit_valid = ($urandom_range(2) == 0); lit_entry = ent_t'($urandom); lit_htest = 1'($urandom);
      if (ip_valid && lit_valid && ip_entry == lit_entry) ip_valid = 0;
      // releases only of referenced entries (more releases than lookups keep entries free)
      a = int'($urandom_range(15)); b = int'($urandom_range(15));
      rel_valid[0] = (m_ref[a] > 0) && ($urandom_range(1) == 1);
      rel_valid[1] = (m_ref[b] > (rel_valid[0] && a == b ? 1 : 0)) && ($urandom_range(1) == 1);
      rel_entry[0] = ent_t'(a); rel_entry[1] = ent_t'(b);
      #1;
      // model outputs
      hit = -1; fr = -1; nfree = 0;
      for (int i = 15; i >= 0; i--) begin
        if (m_valid[i] && !m_gen[i] && m_idx[i] == int'(lk_index)) hit = i;
        if (!m_valid[i] || m_ref[i] == 0) fr = i;
      end
      for (int i = 0; i < 16; i++) nfree += (!m_valid[i] || m_ref[i] == 0) ? 1 : 0;
      ready = !ga_valid && (hit >= 0 || nfree > int'(lk_reserve));
      chk(free_count == 5'(nfree), $sformatf("free count %0d model %0d", free_count, nfree));
      chk(lk_hit == (hit >= 0), "hit");
      chk(lk_ready == ready, $sformatf("ready %b model %b", lk_ready, ready));
      if (hit >= 0) chk(lk_entry == ent_t'(hit), "hit entry");
      else if (fr >= 0) chk(lk_entry == ent_t'(fr), "allocated entry");
      chk(ga_ready == (fr >= 0), "ga_ready");
      if (fr >= 0) chk(ga_entry == ent_t'(fr), "ga entry");
      for (int i = 0; i < 16; i++)
        chk(lit_vec[i] == m_lit[i] && inpipe_vec[i] == m_ip[i] && htest_vec[i] == m_h[i],
            $sformatf("flags of entry %0d", i));
      // model update at the coming edge
      if (lk_valid && !lk_hit && !ready) n_refused++;
      for (int p = 0; p < 2; p++) if (rel_valid[p]) m_ref[rel_entry[p]]--;
      if (ip_valid) m_ip[ip_entry] = 1;
      if (lit_valid) begin m_lit[lit_entry] = 1; m_ip[lit_entry] = 0; m_h[lit_entry] = lit_htest; end
      if (lk_valid && ready && hit >= 0) begin m_ref[hit]++; n_hit++; end
      else if ((lk_valid && ready) || (ga_valid && fr >= 0)) begin
        m_valid[fr] = 1; m_gen[fr] = ga_valid; m_idx[fr] = int'(lk_index);
        m_ref[fr] = 1 - ((rel_valid[0] && int'(rel_entry[0]) == fr) ? 1 : 0)
                      - ((rel_valid[1] && int'(rel_entry[1]) == fr) ? 1 : 0);
        m_lit[fr] = 0; m_ip[fr] = 0; m_h[fr] = 0;
        if (ga_valid) n_ga++;
      end
    end
    $display("hits %0d refused %0d generated %0d", n_hit, n_refused, n_ga);
    chk(n_hit > 0 && n_refused > 0 && n_ga > 0, "hits, refusals and allocations all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
