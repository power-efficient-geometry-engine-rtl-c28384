// tb_ge_vpu: self-checking test of the vertex processing unit.
// The vertex cache is modelled here. Constants: a modelview with rotation and translation,
// its normal matrix, a perspective projection (w = -z), a 256 x 256 viewport, a point light,
// exponent 16 and a highlight threshold. Random batches of 1 to 6 vertices go through the
// first batch port (full transform and lighting); the eye position, eye normal, window
// coordinates and intensity written back are compared with a real-number model (tolerances
// set by the approximate reciprocal, square root and power of the special function unit:
// 1.5 % on 1/w-scaled values, 0.03 on unit vectors, 0.03 plus 20 % of the specular term on
// intensity), each vertex must be
// reported lit once with the right highlight-test result (vertices within 0.02 of the
// threshold are not judged), and batch_done must pulse once. Then batches on the second
// port (lighting only, eye values given) are checked the same way for intensity, and the
// second port must be served first when both are waiting. Watchdog: 200000 cycles.
module tb_ge_vpu;
  import ge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cw_en, b1_valid, b1_done, b2_valid, b2_done, c_we, lit_valid, lit_htest;
  logic ev_full_batch, ev_light_batch;
  logic [4:0] cw_addr;
  vec4_t cw_data;
  logic [2:0] b1_count, b2_count;
  ent_t b1_entries [DQ_SIZE], b2_entries [DQ_SIZE], c_raddr, c_waddr, lit_entry;
  vdata_t c_rdata, c_wdata;
  vmask_t c_wmask;
  ge_vpu dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask
  function automatic real rl(fx_t v); return $itor(v) / 65536.0; endfunction
  function automatic fx_t fx(real r); return fx_t'($rtoi(r * 65536.0 + (r >= 0 ? 0.5 : -0.5))); endfunction
  // uniform in [-1, 1] in steps of 0.001
  function automatic real rnd1();
    int r;
    r = int'($urandom_range(2000));
    return $itor(r - 1000) / 1000.0;
  endfunction
  function automatic bit near(real a, real b, real t); return (a - b) < t && (b - a) < t; endfunction

  vdata_t mem [16];
  assign c_rdata = mem[c_raddr];
  always @(posedge clk) if (c_we) begin
    if (c_wmask.eye)   mem[c_waddr].eye   <= c_wdata.eye;
    if (c_wmask.n_eye) mem[c_waddr].n_eye <= c_wdata.n_eye;
    if (c_wmask.win)   mem[c_waddr].win   <= c_wdata.win;
    if (c_wmask.inten) mem[c_waddr].inten <= c_wdata.inten;
  end
  int lit_cnt [16];
  bit lit_h [16];
  always @(posedge clk) if (lit_valid) begin lit_cnt[lit_entry]++; lit_h[lit_entry] = lit_htest; end
  int done1 = 0, done2 = 0;
  always @(posedge clk) begin done1 += int'(b1_done); done2 += int'(b2_done); end

  // scene constants
  real c = 0.8, s = 0.6;               // rotation about y
  real tx = 0.2, ty = -0.1, tz = -6.0;
  real lx = 1.0, ly = 2.0, lz = -3.0, Is = 0.5, Id = 0.4, Ia = 0.1, thr = 0.9;
  int  nexp = 16;

  task automatic wconst(int a, real x, real y, real z, real w);
    @(negedge clk); cw_en = 1; cw_addr = 5'(a); cw_data = '{fx(x), fx(y), fx(z), fx(w)};
    @(negedge clk); cw_en = 0;
  endtask

  function automatic void light(input real ex, ey, ez, mx, my, mz, output real nh, output real iv);
    real l, ax, ay, az, vx, vy, vz, hx, hy, hz, nl;
    l = $sqrt(mx*mx + my*my + mz*mz); mx /= l; my /= l; mz /= l;
    ax = lx - ex; ay = ly - ey; az = lz - ez; l = $sqrt(ax*ax + ay*ay + az*az); ax /= l; ay /= l; az /= l;
    l = $sqrt(ex*ex + ey*ey + ez*ez); vx = ex / l; vy = ey / l; vz = ez / l;
    hx = ax - vx; hy = ay - vy; hz = az - vz; l = $sqrt(hx*hx + hy*hy + hz*hz); hx /= l; hy /= l; hz /= l;
    nl = mx*ax + my*ay + mz*az; if (nl < 0) nl = 0;
    nh = mx*hx + my*hy + mz*hz; if (nh < 0) nh = 0;
    iv = Ia + Id * nl + Is * (nh ** nexp);
  endfunction

  real ex [16], ey [16], ez [16], mx [16], my [16], mz [16];

  initial begin
    int n, n_h;
    real px, py, pz, qx, qy, qz, w, nh, iv, l;
    cw_en = 0; cw_addr = '0; cw_data = '0; b1_valid = 0; b2_valid = 0; b1_count = '0; b2_count = '0;
    for (int i = 0; i < DQ_SIZE; i++) begin b1_entries[i] = '0; b2_entries[i] = '0; end
    for (int i = 0; i < 16; i++) begin mem[i] = '0; lit_cnt[i] = 0; lit_h[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    wconst(0, c, 0, s, tx); wconst(1, 0, 1, 0, ty); wconst(2, -s, 0, c, tz);
    wconst(3, 1, 0, 0, 0); wconst(4, 0, 1, 0, 0); wconst(5, 0, 0, -1, -2); wconst(6, 0, 0, -1, 0);
    wconst(7, c, 0, s, 0); wconst(8, 0, 1, 0, 0); wconst(9, -s, 0, c, 0);
    wconst(10, 200, 0, 0, 128); wconst(11, 0, 200, 0, 128); wconst(12, 0, 0, 0.5, 0.5);
    wconst(13, lx, ly, lz, 0); wconst(14, 0, Is, Id, Ia); wconst(15, nexp, 0, 0, 0); wconst(16, thr, 0, 0, 0);
    n_h = 0;
    // ---- full transform and lighting ----
    for (int b = 0; b < 12; b++) begin
      n = 1 + int'($urandom_range(5));
      for (int k = 0; k < n; k++) begin
        px = rnd1(); py = rnd1();
        pz = rnd1();
        qx = rnd1(); qy = rnd1();
        qz = 1.0;
        mem[k].p_obj = '{fx(px), fx(py), fx(pz)};
        mem[k].n_obj = '{fx(qx), fx(qy), fx(qz)};
        ex[k] = c * px + s * pz + tx; ey[k] = py + ty; ez[k] = -s * px + c * pz + tz;
        mx[k] = c * qx + s * qz; my[k] = qy; mz[k] = -s * qx + c * qz;
        b1_entries[k] = ent_t'(k);
        lit_cnt[k] = 0;
      end
      b1_count = 3'(n); b1_valid = 1;
      done1 = 0;
      while (done1 == 0) @(negedge clk);
      b1_valid = 0;
      @(negedge clk);
      chk(done1 == 1, "one batch_done");
      for (int k = 0; k < n; k++) begin
        chk(near(rl(mem[k].eye.x), ex[k], 0.002) && near(rl(mem[k].eye.y), ey[k], 0.002) &&
            near(rl(mem[k].eye.z), ez[k], 0.002), $sformatf("eye position of vertex %0d", k));
        l = $sqrt(mx[k]*mx[k] + my[k]*my[k] + mz[k]*mz[k]);
        chk(near(rl(mem[k].n_eye.x), mx[k] / l, 0.03) && near(rl(mem[k].n_eye.y), my[k] / l, 0.03) &&
            near(rl(mem[k].n_eye.z), mz[k] / l, 0.03), $sformatf("eye normal of vertex %0d", k));
        w = -ez[k];
        chk(near(rl(mem[k].win.x), 200 * ex[k] / w + 128, 0.015 * 200 * (ex[k] < 0 ? -ex[k] : ex[k]) / w + 0.01) &&
            near(rl(mem[k].win.y), 200 * ey[k] / w + 128, 0.015 * 200 * (ey[k] < 0 ? -ey[k] : ey[k]) / w + 0.01),
            $sformatf("window x,y of vertex %0d: %f %f", k, rl(mem[k].win.x), rl(mem[k].win.y)));
        chk(near(rl(mem[k].win.w), 1.0 / w, 0.015 / w), "1/w");
        chk(near(rl(mem[k].win.z), 0.5 * ((w - 2.0) / w) + 0.5, 0.01), "window z");
        light(ex[k], ey[k], ez[k], mx[k], my[k], mz[k], nh, iv);
        chk(near(rl(mem[k].inten), iv, 0.03 + 0.2 * Is * (nh ** nexp)), $sformatf("intensity of vertex %0d: %f expected %f", k, rl(mem[k].inten), iv));
        chk(lit_cnt[k] == 1, "reported lit once");
        if (nh > thr + 0.02 || nh < thr - 0.02) chk(lit_h[k] == (nh > thr), $sformatf("highlight test, N.H = %f", nh));
        n_h += int'(lit_h[k]);
      end
    end
    // ---- lighting only, second port first ----
    for (int b = 0; b < 8; b++) begin
      n = 1 + int'($urandom_range(5));
      for (int k = 0; k < n; k++) begin
        ex[8 + k] = rnd1(); ey[8 + k] = rnd1();
        ez[8 + k] = -5.0 + rnd1();
        mx[8 + k] = (rnd1() / 2); my[8 + k] = (rnd1() / 2);
        mz[8 + k] = 0.8;
        mem[8 + k].eye = '{fx(ex[8 + k]), fx(ey[8 + k]), fx(ez[8 + k])};
        mem[8 + k].n_eye = '{fx(mx[8 + k]), fx(my[8 + k]), fx(mz[8 + k])};
        mem[8 + k].win = '{fx(1), fx(2), fx(3), fx(4)};
        b2_entries[k] = ent_t'(8 + k);
        lit_cnt[8 + k] = 0;
      end
      b2_count = 3'(n); b2_valid = 1;
      if (b % 2 == 1) begin b1_valid = 1; b1_count = 3'd1; end    // both waiting
      done1 = 0; done2 = 0;
      while (done2 == 0) @(negedge clk);
      chk(done1 == 0, "second port served first");
      b2_valid = 0;
      while (b1_valid && done1 == 0) @(negedge clk);
      b1_valid = 0;
      @(negedge clk);
      for (int k = 8; k < 8 + n; k++) begin
        light(ex[k], ey[k], ez[k], mx[k], my[k], mz[k], nh, iv);
        chk(near(rl(mem[k].inten), iv, 0.03 + 0.2 * Is * (nh ** nexp)), $sformatf("lighting-only intensity %0d: %f expected %f", k, rl(mem[k].inten), iv));
        chk(mem[k].win == '{fx(1), fx(2), fx(3), fx(4)}, "window values of a generated vertex kept");
        chk(lit_cnt[k] == 1, "generated vertex reported lit once");
      end
    end
    chk(n_h > 0, "some vertices pass the highlight test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
