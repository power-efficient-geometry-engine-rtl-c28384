// tb_ge_ppu: self-checking test of the primitive processing unit.
// The vertex cache, the tag unit's allocator and the second dispatch queue are modelled here
// (random ga_ready and dq_ready stalls). Culling: 300 random triangles and eye positions; the
// back-face decision is compared with n . (eye - p0) <= 0 computed in real arithmetic
// (near-zero cases skipped). Subdivision: random triangles at levels 1 and 2; every
// generated vertex must be reported once on grid_* at a non-original grid place, written to
// the cache with eye position, eye normal and window values equal to the linear grid
// interpolation (within 2^-12), and pushed to the dispatch queue with the same entry; the
// number of new vertices must be 3 or 12, followed by a flush and sub_done.
// Watchdog: 200000 cycles.
module tb_ge_ppu;
  import ge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic eye_we, cull_req, cull_done, cull_back, sub_req, sub_done, grid_we, wr_en;
  logic ga_valid, ga_ready, dq_push, dq_ready, dq_flush;
  vec3_t eye_obj;
  logic [1:0] lvl;
  ent_t cull_ent [3], sub_ent [3], rd_addr [3], grid_ent, wr_addr, ga_entry, dq_entry;
  logic [2:0] grid_i, grid_j;
  vdata_t rd_data [3], wr_data;
  ge_ppu dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask
  function automatic real rl(fx_t v); return $itor(v) / 65536.0; endfunction
  function automatic fx_t fx(real r); return fx_t'($rtoi(r * 65536.0)); endfunction

  vdata_t mem [16];
  always_comb for (int k = 0; k < 3; k++) rd_data[k] = mem[rd_addr[k]];
  always @(posedge clk) if (wr_en) begin
    mem[wr_addr].eye <= wr_data.eye; mem[wr_addr].n_eye <= wr_data.n_eye; mem[wr_addr].win <= wr_data.win;
  end
  // allocator: entries 3..15 in turn
  int next_ent = 3;
  always @(posedge clk) if (ga_valid && ga_ready) next_ent <= (next_ent == 15) ? 3 : next_ent + 1;
  assign ga_entry = ent_t'(next_ent);
  always @(negedge clk) begin ga_ready <= ($urandom_range(3) != 0); dq_ready <= ($urandom_range(3) != 0); end

  // monitor of the subdivision outputs
  int n_gen = 0, n_push = 0, n_flush = 0;
  int seen [5][5];
  ent_t grid_e [5][5];
  always @(posedge clk) if (rst_n) begin
    if (grid_we) begin
      n_gen++;
      seen[grid_i][grid_j]++;
      grid_e[grid_i][grid_j] = grid_ent;
      chk(wr_en && wr_addr == grid_ent, "cache write with the reported entry");
      chk(dq_push && dq_entry == grid_ent && dq_ready, "dispatch queue push with the reported entry");
      chk(ga_valid && ga_ready && ga_entry == grid_ent, "entry from the allocator");
    end
    if (dq_push) n_push++;
    if (dq_flush) n_flush++;
  end

  function automatic real comp(vdata_t d, int c);
    case (c)
      0: return rl(d.eye.x);   1: return rl(d.eye.y);   2: return rl(d.eye.z);
      3: return rl(d.n_eye.x); 4: return rl(d.n_eye.y); 5: return rl(d.n_eye.z);
      6: return rl(d.win.x);   7: return rl(d.win.y);   8: return rl(d.win.z);
      default: return rl(d.win.w);
    endcase
  endfunction

  initial begin
    real ax, ay, az, bx, by, bz, nx, ny, nz, ex, ey, ez, d, e, g;
    int ns, ng;
    vdata_t v;
    eye_we = 0; eye_obj = '0; cull_req = 0; sub_req = 0; lvl = '0;
    for (int k = 0; k < 3; k++) begin cull_ent[k] = ent_t'(k); sub_ent[k] = ent_t'(k); end
    for (int i = 0; i < 16; i++) mem[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // ---- culling ----
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < 3; k++) mem[k].p_obj = '{fx_t'($urandom_range(32'h7FFFF) - 32'sh40000),
                                                  fx_t'($urandom_range(32'h7FFFF) - 32'sh40000),
                                                  fx_t'($urandom_range(32'h7FFFF) - 32'sh40000)};
      @(negedge clk);
      eye_we = 1; eye_obj = '{fx_t'($urandom_range(32'hFFFFF) - 32'sh80000),
                              fx_t'($urandom_range(32'hFFFFF) - 32'sh80000),
                              fx_t'($urandom_range(32'hFFFFF) - 32'sh80000)};
      @(negedge clk); eye_we = 0;
      ax = rl(mem[1].p_obj.x) - rl(mem[0].p_obj.x); ay = rl(mem[1].p_obj.y) - rl(mem[0].p_obj.y);
      az = rl(mem[1].p_obj.z) - rl(mem[0].p_obj.z);
      bx = rl(mem[2].p_obj.x) - rl(mem[0].p_obj.x); by = rl(mem[2].p_obj.y) - rl(mem[0].p_obj.y);
      bz = rl(mem[2].p_obj.z) - rl(mem[0].p_obj.z);
      nx = ay * bz - az * by; ny = az * bx - ax * bz; nz = ax * by - ay * bx;
      ex = rl(eye_obj.x) - rl(mem[0].p_obj.x); ey = rl(eye_obj.y) - rl(mem[0].p_obj.y);
      ez = rl(eye_obj.z) - rl(mem[0].p_obj.z);
      d = nx * ex + ny * ey + nz * ez;
      cull_req = 1;
      while (!cull_done) @(negedge clk);
      cull_req = 0;
      if (d > 1e-6 || d < -1e-6) chk(cull_back == (d <= 0), $sformatf("cull: back %b, n.(eye-p0) = %g", cull_back, d));
      @(negedge clk);
    end
    // ---- subdivision ----
    for (int t = 0; t < 60; t++) begin
      lvl = 2'(1 + t % 2); ns = 1 << lvl; ng = (lvl == 1) ? 3 : 12;
      for (int k = 0; k < 3; k++) begin
        mem[k].eye   = '{fx_t'($urandom_range(32'h7FFFF) - 32'sh40000), fx_t'($urandom_range(32'h7FFFF) - 32'sh40000), fx_t'($urandom_range(32'h7FFFF) - 32'sh40000)};
        mem[k].n_eye = '{fx_t'($urandom_range(32'h1FFFF) - 32'sh10000), fx_t'($urandom_range(32'h1FFFF) - 32'sh10000), fx_t'($urandom_range(32'h1FFFF) - 32'sh10000)};
        mem[k].win   = '{fx_t'($urandom_range(32'hFFFFFF)), fx_t'($urandom_range(32'hFFFFFF)), fx_t'($urandom_range(32'hFFFF)), fx_t'($urandom_range(32'h7FFF))};
      end
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) seen[i][j] = 0;
      n_gen = 0; n_push = 0; n_flush = 0;
      sub_req = 1;
      @(negedge clk);
      while (!sub_done) @(negedge clk);
      sub_req = 0;
      @(negedge clk);
      chk(n_gen == ng && n_push == ng, $sformatf("level %0d: %0d new vertices, %0d pushes", lvl, n_gen, n_push));
      chk(n_flush == 1, "one dispatch-queue flush per subdivision");
      for (int i = 0; i <= ns; i++)
        for (int j = 0; j <= i; j++) begin
          if ((i == 0 && j == 0) || (i == ns && (j == 0 || j == ns))) begin
            chk(seen[i][j] == 0, "original vertex not regenerated");
            continue;
          end
          chk(seen[i][j] == 1, $sformatf("grid point (%0d,%0d) generated %0d times", i, j, seen[i][j]));
          v = mem[grid_e[i][j]];
          for (int c = 0; c < 10; c++) begin
            e = comp(mem[0], c) + (comp(mem[1], c) - comp(mem[0], c)) * i / ns + (comp(mem[2], c) - comp(mem[1], c)) * j / ns;
            g = comp(v, c);
            chk(g - e < 1.0 / 4096 && e - g < 1.0 / 4096,
                $sformatf("level %0d (%0d,%0d) component %0d: %f expected %f", lvl, i, j, c, g, e));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
