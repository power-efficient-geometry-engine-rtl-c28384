// tb_ge_outctl: self-checking test of the output control.
// Around the unit are models of the primitive queue (one triangle at a time, three random
// distinct cache entries), the vertex cache data (read combinationally), the tag unit's lit and
// highlight-test flags (each vertex becomes lit a random time after it appears), and the
// primitive processing unit (on a subdivision request it places the generated vertices one per
// cycle on the grid, with exact window coordinates, then pulses sub_done). Corner coordinates
// are multiples of 4 pixels, so every grid point is exact. 150 triangles at random levels
// 0, 1, 2 with random highlight results. Checks: the unit waits for all vertices to be lit;
// it subdivides exactly when the level is above 0 and some corner passed the highlight test;
// it emits 1, 4 or 16 triangles in row order (upward then downward triangle) with the right
// vertex data; each edge function is zero at its two end points and equals Ns times the cross
// product at the opposite vertex (the gradient of the original edge is kept); every reference (corners and generated vertices) is released once
// and the triangle is popped once. The output is stalled at random. Watchdog: 300000 cycles.
module tb_ge_outctl;
  import ge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int NT = 150;

  logic [1:0] lvl;
  logic pq_empty, pq_pop, rel_valid, sub_req, sub_done, grid_we, o_valid, o_ready, ev_subdiv, ev_bypass;
  ent_t pq_head [3], sub_ent [3], rd_addr [3];
  vdata_t rd_data [3];
  logic [NENT-1:0] lit_vec, htest_vec;
  ent_t rel_entry, grid_ent;
  logic [2:0] grid_i, grid_j;
  otri_t o_tri;

  ge_outctl dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  vdata_t mem [16];
  always_comb for (int k = 0; k < 3; k++) rd_data[k] = mem[rd_addr[k]];

  // grid of the current triangle: entry and coordinates of V(i,j)
  int gent [5][5];
  real gx [5][5], gy [5][5];
  int refs [16];          // outstanding references per entry
  int lit_at [16];
  int n_sub = 0, n_byp = 0, n_out = 0, n_pop = 0, exp_n = 0;
  int ns_cur = 1;
  bit expect_sub = 0;
  int oi = 0, oj = 0; bit od = 0;   // next expected small triangle

  always @(negedge clk) begin
    for (int e = 0; e < 16; e++) lit_vec[e] <= (lit_at[e] != 0) && (cyc >= lit_at[e]);
    o_ready <= ($urandom_range(3) != 0);
  end

  function automatic real fxr(fx_t v); return $itor(v) / 65536.0; endfunction
  function automatic real ev_edge(edge_t e, real x, real y);
    return fxr(e.a) * x + fxr(e.b) * y + $itor($signed(e.c)) / 4294967296.0;
  endfunction

  // output checker
  always @(posedge clk) if (rst_n && o_valid && o_ready) begin
    int ia [3], ja [3];
    real x [3], y [3], cr, s;
    edge_t eg [3];
    ovtx_t v [3];
    if (!od) begin ia = '{oi, oi + 1, oi + 1}; ja = '{oj, oj, oj + 1}; end
    else begin ia = '{oi, oi + 1, oi}; ja = '{oj, oj + 1, oj + 1}; end
    v = '{o_tri.v0, o_tri.v1, o_tri.v2};
    eg = '{o_tri.e0, o_tri.e1, o_tri.e2};
    for (int k = 0; k < 3; k++) begin
      x[k] = gx[ia[k]][ja[k]]; y[k] = gy[ia[k]][ja[k]];
      chk(v[k].win == mem[gent[ia[k]][ja[k]]].win && v[k].inten == mem[gent[ia[k]][ja[k]]].inten,
          $sformatf("triangle (%0d,%0d,%0d) vertex %0d data", oi, oj, od, k));
    end
    for (int k = 0; k < 3; k++) begin
      int a, b, c;
      a = k; b = (k + 1) % 3; c = (k + 2) % 3;
      // the recovered edges keep the gradient of the original triangle's edges, so at the
      // opposite vertex they give Ns times the small triangle's cross product
      cr = (x[b] - x[a]) * (y[c] - y[a]) - (y[b] - y[a]) * (x[c] - x[a]);
      if (expect_sub) cr = cr * ns_cur;
      s = (x[b] - x[a]) * (x[b] - x[a]) + (y[b] - y[a]) * (y[b] - y[a]);
      chk(ev_edge(eg[k], x[a], y[a]) < 0.01 && ev_edge(eg[k], x[a], y[a]) > -0.01 &&
          ev_edge(eg[k], x[b], y[b]) < 0.01 && ev_edge(eg[k], x[b], y[b]) > -0.01,
          $sformatf("edge %0d not zero at its end points", k));
      chk(ev_edge(eg[k], x[c], y[c]) - cr < 0.01 && ev_edge(eg[k], x[c], y[c]) - cr > -0.01,
          $sformatf("edge %0d at opposite vertex %f, expected %f", k, ev_edge(eg[k], x[c], y[c]), cr));
    end
    n_out++;
    if (!od && oj < oi) od = 1;
    else begin od = 0; if (oj < oi) oj++; else begin oj = 0; oi++; end end
  end

  // release and pop
  always @(posedge clk) if (rst_n) begin
    if (rel_valid) begin
      chk(refs[rel_entry] > 0, $sformatf("release of entry %0d that holds no reference", rel_entry));
      refs[rel_entry] <= refs[rel_entry] - 1;
    end
    if (pq_pop) begin
      n_pop++;
      chk(n_out == exp_n, $sformatf("popped after %0d of %0d triangles", n_out, exp_n));
    end
    if (ev_subdiv) begin n_sub++; chk(expect_sub, "subdivided without a highlight or at level 0"); end
    if (ev_bypass) begin n_byp++; chk(!expect_sub, "bypassed a triangle that needed subdivision"); end
    if (ev_subdiv || ev_bypass)
      chk(lit_vec[pq_head[0]] && lit_vec[pq_head[1]] && lit_vec[pq_head[2]], "decided before all lit");
  end

  // subdivision model
  initial begin
    sub_done = 0; grid_we = 0; grid_i = '0; grid_j = '0; grid_ent = '0;
    forever begin
      @(negedge clk);
      if (sub_req) begin
        chk(expect_sub, "subdivision requested unexpectedly");
        repeat (int'($urandom_range(3))) @(negedge clk);
        for (int i = 0; i <= ns_cur; i++) for (int j = 0; j <= i; j++)
          if (!((i == 0 && j == 0) || (i == ns_cur && j == 0) || (i == ns_cur && j == ns_cur))) begin
            grid_we = 1; grid_i = 3'(i); grid_j = 3'(j); grid_ent = ent_t'(gent[i][j]);
            @(negedge clk);
          end
        grid_we = 0; sub_done = 1;
        @(negedge clk); sub_done = 0;
        while (sub_req) @(negedge clk);
      end
    end
  end

  initial begin
    int used [16], e, ng;
    real ax, ay, bx, by, cx, cy;
    lvl = 0; pq_empty = 1; htest_vec = '0;
    for (int k = 0; k < 3; k++) pq_head[k] = '0;
    for (int k = 0; k < 16; k++) begin refs[k] = 0; lit_at[k] = 0; mem[k] = '0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      for (int k = 0; k < 16; k++) begin used[k] = 0; lit_at[k] = 0; end
      lvl = 2'($urandom_range(2));
      ns_cur = 1 << lvl;
      do begin
        ax = 4.0 * $urandom_range(50); ay = 4.0 * $urandom_range(50);
        bx = 4.0 * $urandom_range(50); by = 4.0 * $urandom_range(50);
        cx = 4.0 * $urandom_range(50); cy = 4.0 * $urandom_range(50);
      end while ((bx - ax) * (cy - ay) - (by - ay) * (cx - ax) == 0.0);
      // assign entries to the grid points; only the corners at level 0 or when bypassed
      for (int i = 0; i <= ns_cur; i++) for (int j = 0; j <= i; j++) begin
        do e = int'($urandom_range(15)); while (used[e]);
        used[e] = 1; gent[i][j] = e;
        gx[i][j] = ax + i * (bx - ax) / ns_cur + j * (cx - bx) / ns_cur;
        gy[i][j] = ay + i * (by - ay) / ns_cur + j * (cy - by) / ns_cur;
        mem[e].win.x = fx_t'(int'(gx[i][j] * 65536.0));
        mem[e].win.y = fx_t'(int'(gy[i][j] * 65536.0));
        mem[e].win.z = fx_t'($urandom);
        mem[e].win.w = fx_t'($urandom);
        mem[e].inten = fx_t'($urandom_range(65536));
      end
      htest_vec = '0;
      for (int k = 0; k < 3; k++) htest_vec[gent[k == 0 ? 0 : ns_cur][k == 2 ? ns_cur : 0]] = ($urandom_range(2) == 0);
      expect_sub = (lvl != 0) && (htest_vec != '0);
      if (!expect_sub) begin
        // bypassed: a single triangle on the corner grid of size 1
        gent[1][0] = gent[ns_cur][0]; gent[1][1] = gent[ns_cur][ns_cur];
        gx[1][0] = bx; gy[1][0] = by; gx[1][1] = cx; gy[1][1] = cy;
      end
      ng = expect_sub ? (ns_cur + 1) * (ns_cur + 2) / 2 - 3 : 0;
      exp_n = n_out + (expect_sub ? ns_cur * ns_cur : 1);
      oi = 0; oj = 0; od = 0;
      for (int i = 0; i <= ns_cur; i++) for (int j = 0; j <= i; j++) begin
        bit corner;
        corner = (i == 0 && j == 0) || (i == ns_cur && j == 0) || (i == ns_cur && j == ns_cur);
        if (corner || expect_sub) refs[gent[i][j]] = 1;
        lit_at[gent[i][j]] = cyc + 1 + int'($urandom_range(corner ? 40 : 200));
      end
      pq_head[0] = ent_t'(gent[0][0]); pq_head[1] = ent_t'(gent[ns_cur][0]); pq_head[2] = ent_t'(gent[ns_cur][ns_cur]);
      if (!expect_sub) begin pq_head[1] = ent_t'(gent[1][0]); pq_head[2] = ent_t'(gent[1][1]); end
      pq_empty = 0;
      while (!(pq_pop)) @(negedge clk);
      @(negedge clk);
      pq_empty = 1;
      chk(n_out == exp_n, $sformatf("triangle %0d: %0d triangles out, expected %0d", t, n_out, exp_n));
      for (int k = 0; k < 16; k++) chk(refs[k] == 0, $sformatf("triangle %0d: entry %0d keeps %0d references", t, k, refs[k]));
      repeat (int'($urandom_range(3))) @(negedge clk);
    end
    chk(n_pop == NT, "every triangle popped once");
    chk(n_sub > 0 && n_byp > 0, "both subdivision and bypass seen");
    $display("subdivided %0d bypassed %0d output %0d", n_sub, n_byp, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (300000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
