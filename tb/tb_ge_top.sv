// tb_ge_top: end-to-end test of the geometry engine at its default parameters.
//
// A small curved mesh (a 4 x 4 grid of vertices, 18 front-facing triangles sharing vertices,
// plus one back-facing triangle) is sent three times, at subdivision levels 0, 1 and 2. The
// testbench plays the host (constants, eye position, index stream), the pre-TnL vertex memory
// (fetch requests answered after a random delay) and the setup engine (random o_ready).
// Constants: identity modelview and normal matrix, a perspective projection (w = -z), a
// 256 x 256 viewport, a point light close to the surface, exponent 8, and a highlight threshold
// placed by the testbench in a gap of the reference N.H values so that, at levels 1 and 2,
// some triangles are subdivided and some bypass.
// Checks, against a real-number model written here: which triangles are culled and which
// are subdivided (count of small triangles per input triangle), every output vertex's
// window position against the grid point it should be (linear interpolation in window space),
// its 1/w, its intensity (Blinn-Phong of the interpolated eye position and normal), each
// small triangle's three edge functions (zero at both ends, same sign at the opposite vertex)
// and that the small triangles tile the original. Every mechanism of the engine (cache hit
// and miss, cull, subdivision, bypass, dispatch-queue swap, lookup stall, full and
// lighting-only batches) must occur at least once. A watchdog ends a hung run.
module tb_ge_top;
  import ge_pkg::*;

  localparam int NV = 16;
  localparam int NT = 19;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       [1:0] lvl;
  logic       idx_valid, idx_ready;
  idx_t       idx_data;
  logic       cw_en;
  logic [4:0] cw_addr;
  vec4_t      cw_data;
  logic       eye_we;
  vec3_t      eye_obj;
  logic       f_req_valid, f_req_ready, f_rsp_valid;
  idx_t       f_req_index;
  vec3_t      f_rsp_pos, f_rsp_nrm;
  logic       o_valid, o_ready;
  otri_t      o_tri;
  ge_ev_t     ev;
  logic       idle;

  ge_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic fx_t fx(real r);
    return fx_t'($rtoi(r * 65536.0 + (r >= 0 ? 0.5 : -0.5)));
  endfunction
  function automatic real rl(fx_t v);
    return $itor(v) / 65536.0;
  endfunction

  // ---------------- scene ----------------
  real px [NV], py [NV], pz [NV], nx [NV], ny [NV], nz [NV];
  int  tl [NT][3];
  real lx = -1.2, ly = -1.0, lz = -4.2;          // light (eye space)
  real Is = 0.5, Id = 0.4, Ia = 0.1;
  int  nexp = 8;
  real thr;
  // projection and viewport
  real xs = 200.0, xo = 128.0, ys = 200.0, yo = 128.0, zs = 0.5, zo = 0.5;

  // reference per original vertex (eye space = object space here)
  real wx [NV], wy [NV], wz [NV], ww [NV], nh [NV], iref [NV];

  function automatic void light(input real ex, ey, ez, input real mx, my, mz,
                                output real o_nh, output real o_i);
    real l, ax, ay, az, vx, vy, vz, hx, hy, hz, nl, h;
    l = $sqrt(mx*mx + my*my + mz*mz); mx /= l; my /= l; mz /= l;
    ax = lx - ex; ay = ly - ey; az = lz - ez;
    l = $sqrt(ax*ax + ay*ay + az*az); ax /= l; ay /= l; az /= l;
    l = $sqrt(ex*ex + ey*ey + ez*ez); vx = ex / l; vy = ey / l; vz = ez / l;
    hx = ax - vx; hy = ay - vy; hz = az - vz;
    l = $sqrt(hx*hx + hy*hy + hz*hz); hx /= l; hy /= l; hz /= l;
    nl = mx*ax + my*ay + mz*az; if (nl < 0) nl = 0;
    h  = mx*hx + my*hy + mz*hz; if (h < 0) h = 0;
    o_nh = h;
    o_i  = Ia + Id * nl + Is * (h ** nexp);
  endfunction

  function automatic void project(input real ex, ey, ez,
                                  output real ox, oy, oz, ow);
    real cw, iw;
    cw = -ez; iw = 1.0 / cw;
    ox = xs * ex * iw + xo;
    oy = ys * ey * iw + yo;
    oz = zs * ((-ez - 2.0) * iw) + zo;
    ow = iw;
  endfunction

  task automatic build_scene();
    int k, r, c, t;
    real s;
    for (r = 0; r < 4; r++)
      for (c = 0; c < 4; c++) begin
        k = r * 4 + c;
        px[k] = -1.5 + c; py[k] = -1.5 + r;
        pz[k] = -5.0 + 0.15 * (c % 2) - 0.1 * (r % 2);
        nx[k] = 0.25 * (c - 1.5); ny[k] = 0.2 * (r - 1.5); nz[k] = 1.0;
        s = $sqrt(nx[k]*nx[k] + ny[k]*ny[k] + nz[k]*nz[k]);
        nx[k] /= s; ny[k] /= s; nz[k] /= s;
      end
    t = 0;
    for (r = 0; r < 3; r++)
      for (c = 0; c < 3; c++) begin
        k = r * 4 + c;
        tl[t] = '{k, k + 1, k + 5}; t++;
        tl[t] = '{k, k + 5, k + 4}; t++;
      end
    tl[t] = '{0, 4, 5};    // clockwise seen from the eye: a back face
    for (k = 0; k < NV; k++) begin
      project(px[k], py[k], pz[k], wx[k], wy[k], wz[k], ww[k]);
      light(px[k], py[k], pz[k], nx[k], ny[k], nz[k], nh[k], iref[k]);
    end
  endtask

  // threshold in the widest gap of the upper half of the sorted N.H values
  task automatic pick_threshold();
    real v [NV];
    real tmp, best;
    int i, j;
    for (i = 0; i < NV; i++) v[i] = nh[i];
    for (i = 0; i < NV; i++)
      for (j = i + 1; j < NV; j++)
        if (v[j] < v[i]) begin tmp = v[i]; v[i] = v[j]; v[j] = tmp; end
    best = -1.0;
    for (i = 9; i < NV - 2; i++)
      if (v[i + 1] - v[i] > best) begin best = v[i + 1] - v[i]; thr = (v[i] + v[i + 1]) / 2; end
    $display("threshold %f (gap %f)", thr, best);
  endtask

  function automatic bit is_back(int t);
    real ax, ay, az, bx, by, bz, cx, cy, cz;
    int a, b, c;
    a = tl[t][0]; b = tl[t][1]; c = tl[t][2];
    ax = px[b] - px[a]; ay = py[b] - py[a]; az = pz[b] - pz[a];
    bx = px[c] - px[a]; by = py[c] - py[a]; bz = pz[c] - pz[a];
    cx = ay * bz - az * by; cy = az * bx - ax * bz; cz = ax * by - ay * bx;
    return (cx * (0 - px[a]) + cy * (0 - py[a]) + cz * (0 - pz[a])) <= 0;
  endfunction

  // ---------------- host: constants ----------------
  task automatic wconst(int a, real x, real y, real z, real w);
    @(negedge clk);
    cw_en = 1'b1; cw_addr = 5'(a); cw_data = '{fx(x), fx(y), fx(z), fx(w)};
    @(negedge clk);
    cw_en = 1'b0;
  endtask

  task automatic load_constants();
    wconst(0, 1, 0, 0, 0); wconst(1, 0, 1, 0, 0); wconst(2, 0, 0, 1, 0);
    wconst(3, 1, 0, 0, 0); wconst(4, 0, 1, 0, 0); wconst(5, 0, 0, -1, -2); wconst(6, 0, 0, -1, 0);
    wconst(7, 1, 0, 0, 0); wconst(8, 0, 1, 0, 0); wconst(9, 0, 0, 1, 0);
    wconst(10, xs, 0, 0, xo); wconst(11, 0, ys, 0, yo); wconst(12, 0, 0, zs, zo);
    wconst(13, lx, ly, lz, 0);
    wconst(14, 0, Is, Id, Ia);
    wconst(15, nexp, 0, 0, 0);
    wconst(16, thr, 0, 0, 0);
    @(negedge clk);
    eye_we = 1'b1; eye_obj = '{fx(0), fx(0), fx(0)};
    @(negedge clk);
    eye_we = 1'b0;
  endtask

  // ---------------- pre-TnL vertex memory ----------------
  int   f_wait = 0;
  bit   f_busy = 0;
  bit   f_acc = 0;
  idx_t f_idx;
  // the request handshake is taken at the clock edge, as the engine sees it
  always @(posedge clk) begin
    f_acc <= f_req_valid && f_req_ready;
    if (f_req_valid && f_req_ready) f_idx <= f_req_index;
  end
  always @(negedge clk) begin
    f_rsp_valid <= 1'b0;
    f_req_ready <= 1'b0;
    if (rst_n) begin
      if (f_acc) begin
        f_busy <= 1'b1; f_wait <= 1 + int'($urandom_range(3));
      end else if (!f_busy) begin
        f_req_ready <= ($urandom_range(3) != 0);
      end else if (f_wait > 1) begin
        f_wait <= f_wait - 1;
      end else begin
        f_busy <= 1'b0;
        f_rsp_valid <= 1'b1;
        f_rsp_pos <= '{fx(px[f_idx]), fx(py[f_idx]), fx(pz[f_idx])};
        f_rsp_nrm <= '{fx(nx[f_idx]), fx(ny[f_idx]), fx(nz[f_idx])};
      end
    end
  end

  // ---------------- expected output stream ----------------
  int exp_t [$];       // parent triangle of each expected output group
  int exp_n [$];       // number of small triangles in it
  int exp_lvl [$];
  int got = 0;         // small triangles received of the current group
  real area_sum = 0.0;
  int outs = 0;

  function automatic real edge_at(edge_t e, real x, real y);
    return rl(e.a) * x + rl(e.b) * y + $itor(e.c) / 4294967296.0;
  endfunction

  // locate (x,y) on the parent grid; returns the grid point's (i,j), -1 if none close
  function automatic void find_grid(int t, int ns, real x, real y, output int gi, output int gj);
    real ex, ey, d;
    int a, b, c;
    a = tl[t][0]; b = tl[t][1]; c = tl[t][2];
    gi = -1; gj = -1;
    for (int i = 0; i <= ns; i++)
      for (int j = 0; j <= i; j++) begin
        ex = wx[a] + (wx[b] - wx[a]) * i / ns + (wx[c] - wx[b]) * j / ns;
        ey = wy[a] + (wy[b] - wy[a]) * i / ns + (wy[c] - wy[b]) * j / ns;
        d = (ex - x) * (ex - x) + (ey - y) * (ey - y);
        if (d < 1.0) begin gi = i; gj = j; end
      end
  endfunction

  task automatic check_vertex(int t, int ns, ovtx_t v, output real x, output real y);
    int gi, gj, a, b, c;
    real fi, fj, ex, ey, ez, mx, my, mz, h, iv, ew, l;
    a = tl[t][0]; b = tl[t][1]; c = tl[t][2];
    x = rl(v.win.x); y = rl(v.win.y);
    find_grid(t, ns, x, y, gi, gj);
    check(gi >= 0, $sformatf("triangle %0d: vertex (%f,%f) is not on its grid", t, x, y));
    if (gi < 0) return;
    fi = $itor(gi) / ns; fj = $itor(gj) / ns;
    ew = ww[a] + (ww[b] - ww[a]) * fi + (ww[c] - ww[b]) * fj;
    check((rl(v.win.w) - ew) < 0.015 * ew && (ew - rl(v.win.w)) < 0.015 * ew,
          $sformatf("triangle %0d (%0d,%0d): 1/w %f expected %f", t, gi, gj, rl(v.win.w), ew));
    ex = px[a] + (px[b] - px[a]) * fi + (px[c] - px[b]) * fj;
    ey = py[a] + (py[b] - py[a]) * fi + (py[c] - py[b]) * fj;
    ez = pz[a] + (pz[b] - pz[a]) * fi + (pz[c] - pz[b]) * fj;
    mx = nx[a] + (nx[b] - nx[a]) * fi + (nx[c] - nx[b]) * fj;
    my = ny[a] + (ny[b] - ny[a]) * fi + (ny[c] - ny[b]) * fj;
    mz = nz[a] + (nz[b] - nz[a]) * fi + (nz[c] - nz[b]) * fj;
    light(ex, ey, ez, mx, my, mz, h, iv);
    l = rl(v.inten) - iv;
    check(l < 0.03 && l > -0.03,
          $sformatf("triangle %0d (%0d,%0d): intensity %f expected %f", t, gi, gj, rl(v.inten), iv));
  endtask

  always @(negedge clk) begin
    real x0, y0, x1, y1, x2, y2, e, s, tol, ar, par;
    int t, ns, a, b, c;
    // setup engine back-pressure: o_ready is chosen here, before the transfer is judged,
    // so that the value checked is the one the engine sees at the next clock edge
    o_ready = ($urandom_range(4) != 0);
    if (rst_n && o_valid && o_ready) begin
      outs++;
      if (exp_t.size() == 0) begin
        check(0, "unexpected output triangle");
      end else begin
        t = exp_t[0]; ns = 1 << exp_lvl[0];
        if (exp_n[0] == 1) ns = 1;
        check_vertex(t, ns, o_tri.v0, x0, y0);
        check_vertex(t, ns, o_tri.v1, x1, y1);
        check_vertex(t, ns, o_tri.v2, x2, y2);
        // edges: zero at both ends, one sign at the opposite vertex
        tol = 0.02 * (($itor(o_tri.e0.a) < 0 ? -rl(o_tri.e0.a) : rl(o_tri.e0.a)) +
                      ($itor(o_tri.e0.b) < 0 ? -rl(o_tri.e0.b) : rl(o_tri.e0.b))) + 0.01;
        e = edge_at(o_tri.e0, x0, y0); check(e < tol && e > -tol, $sformatf("e0(v0)=%f", e));
        e = edge_at(o_tri.e0, x1, y1); check(e < tol && e > -tol, $sformatf("e0(v1)=%f", e));
        s = edge_at(o_tri.e0, x2, y2);
        tol = 0.02 * (($itor(o_tri.e1.a) < 0 ? -rl(o_tri.e1.a) : rl(o_tri.e1.a)) +
                      ($itor(o_tri.e1.b) < 0 ? -rl(o_tri.e1.b) : rl(o_tri.e1.b))) + 0.01;
        e = edge_at(o_tri.e1, x1, y1); check(e < tol && e > -tol, $sformatf("e1(v1)=%f", e));
        e = edge_at(o_tri.e1, x2, y2); check(e < tol && e > -tol, $sformatf("e1(v2)=%f", e));
        e = edge_at(o_tri.e1, x0, y0); check(e * s > 0, $sformatf("e1(v0)=%f vs e0(v2)=%f", e, s));
        tol = 0.02 * (($itor(o_tri.e2.a) < 0 ? -rl(o_tri.e2.a) : rl(o_tri.e2.a)) +
                      ($itor(o_tri.e2.b) < 0 ? -rl(o_tri.e2.b) : rl(o_tri.e2.b))) + 0.01;
        e = edge_at(o_tri.e2, x2, y2); check(e < tol && e > -tol, $sformatf("e2(v2)=%f", e));
        e = edge_at(o_tri.e2, x0, y0); check(e < tol && e > -tol, $sformatf("e2(v0)=%f", e));
        e = edge_at(o_tri.e2, x1, y1); check(e * s > 0, $sformatf("e2(v1)=%f vs e0(v2)=%f", e, s));
        check(s != 0.0, "degenerate small triangle");
        ar = (x1 - x0) * (y2 - y0) - (x2 - x0) * (y1 - y0);
        area_sum += ar;
        got++;
        if (got == exp_n[0]) begin
          a = tl[t][0]; b = tl[t][1]; c = tl[t][2];
          par = (wx[b] - wx[a]) * (wy[c] - wy[a]) - (wx[c] - wx[a]) * (wy[b] - wy[a]);
          check((area_sum - par) < 0.05 * (par < 0 ? -par : par) &&
                (par - area_sum) < 0.05 * (par < 0 ? -par : par),
                $sformatf("triangle %0d: small triangles cover %f, original %f", t, area_sum, par));
          got = 0; area_sum = 0.0;
          void'(exp_t.pop_front()); void'(exp_n.pop_front()); void'(exp_lvl.pop_front());
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_hit = 0, n_miss = 0, n_cull = 0, n_sub = 0, n_byp = 0, n_swap = 0, n_stall = 0,
      n_full = 0, n_lightb = 0;
  always @(negedge clk) if (rst_n) begin
    n_hit += int'(ev.cache_hit);   n_miss += int'(ev.cache_miss); n_cull += int'(ev.culled);
    n_sub += int'(ev.subdivided);  n_byp += int'(ev.bypassed);    n_swap += int'(ev.dq_swap);
    n_stall += int'(ev.pic_stall); n_full += int'(ev.vpu_full_batch);
    n_lightb += int'(ev.vpu_light_batch);
  end


  // ---------------- host: index stream ----------------
  task automatic run_pass(int l);
    int t, k, n_exp, sub_before, byp_before, cull_before, t0;
    bit hl;
    @(negedge clk);
    lvl = 2'(l);
    sub_before = n_sub; byp_before = n_byp; cull_before = n_cull;
    n_exp = 0;
    for (t = 0; t < NT; t++) begin
      if (is_back(t)) continue;
      hl = (nh[tl[t][0]] > thr) || (nh[tl[t][1]] > thr) || (nh[tl[t][2]] > thr);
      exp_t.push_back(t);
      exp_lvl.push_back(l);
      exp_n.push_back((l > 0 && hl) ? (1 << (2 * l)) : 1);
      n_exp += (l > 0 && hl) ? 1 : 0;
    end
    t0 = cyc;
    for (t = 0; t < NT; t++)
      for (k = 0; k < 3; k++) begin
        idx_valid = 1'b1; idx_data = idx_t'(tl[t][k]);
        @(negedge clk);
        while (!idx_ready) @(negedge clk);
      end
    idx_valid = 1'b0;
    while (exp_t.size() != 0 || !idle) @(negedge clk);
    repeat (20) @(negedge clk);
    $display("level %0d: %0d cycles, subdivided %0d, bypassed %0d, culled %0d", l, cyc - t0,
             n_sub - sub_before, n_byp - byp_before, n_cull - cull_before);
    check(n_sub - sub_before == n_exp, $sformatf("level %0d: %0d subdivided, expected %0d", l,
                                                  n_sub - sub_before, n_exp));
    check(n_cull - cull_before == 1, "one back face culled per pass");
  endtask

  initial begin
    lvl = 2'd0; idx_valid = 1'b0; idx_data = '0; cw_en = 1'b0; cw_addr = '0; cw_data = '0;
    eye_we = 1'b0; eye_obj = '0; f_req_ready = 1'b0; f_rsp_valid = 1'b0;
    f_rsp_pos = '0; f_rsp_nrm = '0; o_ready = 1'b0;
    build_scene();
    pick_threshold();
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    load_constants();
    run_pass(0);
    run_pass(1);
    run_pass(2);
    check(outs > 0, "outputs seen");
    $display("mechanisms: hit %0d miss %0d cull %0d subdivide %0d bypass %0d dq_swap %0d stall %0d full_batch %0d light_batch %0d",
             n_hit, n_miss, n_cull, n_sub, n_byp, n_swap, n_stall, n_full, n_lightb);
    check(n_hit > 0, "cache hit happened");
    check(n_miss > 0, "cache miss happened");
    check(n_cull > 0, "cull happened");
    check(n_sub > 0, "subdivision happened");
    check(n_byp > 0, "bypass happened");
    check(n_swap > 0, "dispatch queue swap happened");
    check(n_stall > 0, "lookup stall happened");
    check(n_full > 0, "full transform batch happened");
    check(n_lightb > 0, "lighting-only batch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d outputs, %0d groups outstanding", outs, exp_t.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
