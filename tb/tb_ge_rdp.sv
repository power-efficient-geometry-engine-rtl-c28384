// tb_ge_rdp: self-checking test of the reconfigurable datapath.
// For each of the six configuration modes, 60 random operations enter back to back (one
// per cycle) and every result is compared with a real-number reference computed here:
// dot products within 4 LSB, subtraction exactly, normalisation, perspective division and
// power within the SFU's approximation error. The tag must come back with its operation and
// the latency of each mode (3, 3, 7, 5, 5, 2 cycles) is checked for every result.
module tb_ge_rdp;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  rdp_mode_t mode;
  logic in_valid, out_valid, busy;
  vec4_t va, vb, res;
  logic [7:0] tag_in, tag_out;
  ge_rdp dut (.clk, .rst_n, .mode, .in_valid, .va, .vb, .tag_in, .out_valid, .res, .tag_out, .busy);

  typedef struct { real e[4]; int n; int t; logic [7:0] tag; } exp_t;
  exp_t q[$];

  function automatic real r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic fx_t f(real v); return fx_t'(longint'(v * 65536.0)); endfunction
  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction
  function automatic int lat(rdp_mode_t md);
    case (md)
      RDP_TRANS_DP, RDP_LIGHT_DP: return 3;
      RDP_VEC_SUB: return 2;
      RDP_VEC_NORM: return 7;
      default: return 5;
    endcase
  endfunction

  function automatic bit close(real got, real e, rdp_mode_t md);
    real ae, mag;
    ae = (got > e) ? got - e : e - got;
    mag = (e < 0) ? -e : e;
    case (md)
      RDP_TRANS_DP, RDP_LIGHT_DP: return ae <= 4.0 / 65536.0;
      RDP_VEC_SUB: return ae == 0.0;
      RDP_VEC_NORM: return ae <= 0.03;
      RDP_PD: return ae <= 0.025 * mag + 0.001;
      default: return ae <= 0.35 * mag + 0.01;
    endcase
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t it;
    if (q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      it = q.pop_front();
      checks++;
      if (cyc - it.t != lat(mode) || tag_out != it.tag) begin
        failures++; $display("%s: latency %0d tag %0d/%0d", mode.name(), cyc - it.t, tag_out, it.tag);
      end
      for (int k = 0; k < it.n; k++) begin
        real g;
        g = (k == 0) ? r(res.x) : (k == 1) ? r(res.y) : (k == 2) ? r(res.z) : r(res.w);
        checks++;
        if (!close(g, it.e[k], mode)) begin
          failures++;
          if (failures < 20) $display("%s comp %0d: got %f exp %f", mode.name(), k, g, it.e[k]);
        end
      end
    end
  end

  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; va = '0; vb = '0; tag_in = 0; mode = RDP_TRANS_DP;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int md = 0; md < 6; md++) begin
      mode = rdp_mode_t'(md);
      @(negedge clk);
      for (int n = 0; n < 60; n++) begin
        exp_t it;
        real a[4], b[4];
        for (int k = 0; k < 4; k++) begin a[k] = rnd(-8.0, 8.0); b[k] = rnd(-8.0, 8.0); end
        if (mode == RDP_PD) a[3] = rnd(0.5, 20.0) * (n % 5 == 0 ? -1.0 : 1.0);
        if (mode == RDP_POW) begin a[0] = rnd(0.05, 1.0); b[0] = real'(($urandom % 24) + 1); end
        if (mode == RDP_VEC_NORM && a[0] * a[0] + a[1] * a[1] + a[2] * a[2] < 0.5) a[0] = 2.0;
        va = '{x: f(a[0]), y: f(a[1]), z: f(a[2]), w: f(a[3])};
        vb = '{x: f(b[0]), y: f(b[1]), z: f(b[2]), w: f(b[3])};
        for (int k = 0; k < 4; k++) begin a[k] = real'(f(a[k])) / 65536.0; b[k] = real'(f(b[k])) / 65536.0; end
        it.t = cyc; it.tag = 8'(n + 16 * md);
        case (mode)
          RDP_TRANS_DP: begin it.n = 1; it.e[0] = a[0]*b[0] + a[1]*b[1] + a[2]*b[2] + a[3]; end
          RDP_LIGHT_DP: begin it.n = 1; it.e[0] = a[0]*b[0] + a[1]*b[1] + a[2]*b[2]; end
          RDP_VEC_SUB:  begin it.n = 3; for (int k = 0; k < 3; k++) it.e[k] = a[k] - b[k]; end
          RDP_VEC_NORM: begin
            real l;
            l = $sqrt(a[0]*a[0] + a[1]*a[1] + a[2]*a[2]);
            it.n = 3; for (int k = 0; k < 3; k++) it.e[k] = a[k] / l;
          end
          RDP_PD: begin it.n = 4; for (int k = 0; k < 3; k++) it.e[k] = a[k] / a[3]; it.e[3] = 1.0 / a[3]; end
          default: begin it.n = 1; it.e[0] = a[0] ** b[0]; end
        endcase
        q.push_back(it);
        tag_in = it.tag;
        in_valid = 1;
        @(negedge clk);
      end
      in_valid = 0;
      while (busy) @(negedge clk);
      @(negedge clk);   // the last result leaves in this cycle
      checks++;
      if (q.size() != 0) begin failures++; $display("%s: %0d results missing", mode.name(), q.size()); q.delete(); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
