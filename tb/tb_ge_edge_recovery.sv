// tb_ge_edge_recovery: self-checking test of edge function recovery.
// For random triangles (window coordinates 0..256 with 16 fraction bits, both windings) and
// each level 0, 1, 2, every small triangle of the grid is queried. The grid vertices are
// computed here in real arithmetic; each returned edge must vanish at its two vertices
// (to within 2^-20 of its gradient), and all three edges must have the sign of the original
// triangle's edge function at its opposite vertex there. Level 0 must return the original
// edges exactly (A = ya - yb, B = xb - xa, C = xa*yb - xb*ya). The one-cycle query latency
// is checked. Watchdog: 200000 cycles.
module tb_ge_edge_recovery;
  import ge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic setup_valid, q_valid, q_down, out_valid;
  fx_t xa, ya, xb, yb, xc, yc;
  logic [1:0] q_lvl;
  logic [2:0] q_i, q_j;
  edge_t e0, e1, e2;
  ge_edge_recovery dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask
  function automatic real rl(fx_t v); return $itor(v) / 65536.0; endfunction
  function automatic real ev(edge_t e, real x, real y);
    return rl(e.a) * x + rl(e.b) * y + $itor(e.c) / 4294967296.0;
  endfunction
  function automatic real mag(edge_t e);
    return (rl(e.a) < 0 ? -rl(e.a) : rl(e.a)) + (rl(e.b) < 0 ? -rl(e.b) : rl(e.b));
  endfunction

  real gx [5][5], gy [5][5];
  real vx [3], vy [3];
  real orient;

  task automatic check_edges(int lvl, int i, int j, bit down);
    real tol, s0, s1, s2;
    edge_t e [3];
    e[0] = e0; e[1] = e1; e[2] = e2;
    for (int k = 0; k < 3; k++) begin
      tol = mag(e[k]) / 1048576.0 + 1e-6;
      s0 = ev(e[k], vx[k], vy[k]);
      s1 = ev(e[k], vx[(k + 1) % 3], vy[(k + 1) % 3]);
      s2 = ev(e[k], vx[(k + 2) % 3], vy[(k + 2) % 3]);
      chk(s0 < tol && s0 > -tol && s1 < tol && s1 > -tol,
          $sformatf("L%0d (%0d,%0d,%b) edge %0d not zero at its ends: %g %g", lvl, i, j, down, k, s0, s1));
      chk(s2 * orient > 0, $sformatf("L%0d (%0d,%0d,%b) edge %0d sign at opposite vertex %g (%g %g) orient %g", lvl, i, j, down, k, s2, s0, s1, orient));
    end
  endtask

  initial begin
    int ns;
    setup_valid = 0; q_valid = 0; q_down = 0; q_lvl = '0; q_i = '0; q_j = '0;
    xa = '0; ya = '0; xb = '0; yb = '0; xc = '0; yc = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      xa = fx_t'($urandom_range(32'h00FF_FFFF)); ya = fx_t'($urandom_range(32'h00FF_FFFF));
      xb = fx_t'($urandom_range(32'h00FF_FFFF)); yb = fx_t'($urandom_range(32'h00FF_FFFF));
      xc = fx_t'($urandom_range(32'h00FF_FFFF)); yc = fx_t'($urandom_range(32'h00FF_FFFF));
      setup_valid = 1;
      orient = (rl(xb) - rl(xa)) * (rl(yc) - rl(ya)) - (rl(xc) - rl(xa)) * (rl(yb) - rl(ya));
      // the edge function A*x+B*y+C of edge ab (A = ya-yb, B = xb-xa) at c equals orient
      if (orient < 1.0 && orient > -1.0) begin setup_valid = 0; continue; end
      @(negedge clk);
      setup_valid = 0;
      for (int l = 0; l < 3; l++) begin
        ns = 1 << l;
        for (int i = 0; i <= ns; i++)
          for (int j = 0; j <= i; j++) begin
            gx[i][j] = rl(xa) + (rl(xb) - rl(xa)) * i / ns + (rl(xc) - rl(xb)) * j / ns;
            gy[i][j] = rl(ya) + (rl(yb) - rl(ya)) * i / ns + (rl(yc) - rl(yb)) * j / ns;
          end
        for (int i = 0; i < ns; i++)
          for (int j = 0; j <= i; j++)
            for (int d = 0; d < 2; d++) begin
              if (d == 1 && j == i) continue;
              q_valid = 1; q_lvl = 2'(l); q_i = 3'(i); q_j = 3'(j); q_down = d[0];
              if (d == 0) begin
                vx = '{gx[i][j], gx[i + 1][j], gx[i + 1][j + 1]};
                vy = '{gy[i][j], gy[i + 1][j], gy[i + 1][j + 1]};
              end else begin
                vx = '{gx[i][j], gx[i + 1][j + 1], gx[i][j + 1]};
                vy = '{gy[i][j], gy[i + 1][j + 1], gy[i][j + 1]};
              end
              @(negedge clk);
              q_valid = 0;
              chk(out_valid, "out_valid one cycle after the query");
              check_edges(l, i, j, d[0]);
              if (l == 0) begin
                chk(e0.a == ya - yb && e0.b == xb - xa &&
                    e0.c == fx64_t'(xa) * fx64_t'(yb) - fx64_t'(xb) * fx64_t'(ya), "level 0 edge ab exact");
                chk(e1.a == yb - yc && e1.b == xc - xb, "level 0 edge bc");
                chk(e2.a == yc - ya && e2.b == xa - xc, "level 0 edge ca");
              end
            end
      end
    end
    @(negedge clk);
    chk(!out_valid, "no output without a query");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
