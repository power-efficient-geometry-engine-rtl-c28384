// tb_ge_sfu: self-checking test of the special function unit.
// INV and InvSqrt are compared bit-exactly with a model of Mitchell's converters written
// here with integer arithmetic, and also against the true 1/m, 1/sqrt(m) (within 3%).
// POW is driven the way the datapath drives it: log_out is multiplied by n in the testbench
// and fed back on exp_in; the result must be within 2^(0.012n+0.03) of m^n (or near 0). Latencies are
// checked: 2 cycles for INV/InvSqrt, 1 cycle from log and from exp_valid for POW.
module tb_ge_sfu;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sfu_op_t op;
  logic in_valid, log_valid, exp_valid, out_valid;
  fx_t m, log_out, exp_in, y;
  ge_sfu dut (.clk, .rst_n, .op, .in_valid, .m, .log_valid, .log_out, .exp_valid, .exp_in,
              .out_valid, .y);

  function automatic longint cr(longint f);      // 0.3457 * f * (1 - f), f in Q0.16
    longint q = (f * (65536 - f)) >> 16;
    return (q >> 2) + (q >> 4) + (q >> 5) + (q >> 9);
  endfunction
  function automatic longint mlog(longint v);   // corrected Mitchell log2 in Q16.16, v > 0
    int kk = 0;
    longint frac;
    for (int i = 0; i < 32; i++) if (v >= (64'sd1 << i)) kk = i;
    frac = ((v - (64'sd1 << kk)) << 16) >> kk;
    return (longint'(kk - 16) << 16) + frac + cr(frac);
  endfunction
  function automatic longint malog(longint x);  // Mitchell 2^x, x in Q16.16
    longint i = x >>> 16, f = x & 64'hffff;
    longint mant = 65536 + f - cr(f);
    if (i >= 15) return 64'sh7fff_ffff;
    if (i >= 0) return mant << i;
    if (i <= -17) return 0;
    return mant >> (-i);
  endfunction

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    fx_t vals [$];
    in_valid = 0; exp_valid = 0; m = 0; exp_in = 0; op = SFU_INV;
    repeat (3) @(negedge clk);
    rst_n = 1;
    vals = '{32'sh0001_0000, 32'sh0000_4000, 32'sh0002_8000, 32'sh0010_0000, 32'sh0000_0100,
             32'sh0123_4567, -32'sh0004_0000};
    for (int n = 0; n < 60; n++) vals.push_back(fx_t'(($urandom % 32'h00ff_ffff) + 1));
    // INV and InvSqrt
    for (int o = 0; o < 2; o++) begin
      op = sfu_op_t'(o);
      foreach (vals[n]) begin
        longint mag, expv;
        real rv, tv;
        m = vals[n];
        if (o == 1 && m < 0) m = -m;
        mag = (m < 0) ? -longint'(m) : longint'(m);
        in_valid = 1;
        @(negedge clk); in_valid = 0;
        chk(!out_valid, "early output");
        @(negedge clk);
        chk(out_valid, $sformatf("no output after 2 cycles, op %0d", o));
        if (o == 0) expv = malog(~mlog(mag));
        else        expv = malog((~mlog(mag)) >>> 1);
        if (m < 0) expv = -expv;
        chk(y == fx_t'(expv), $sformatf("op %0d m=%h y=%h exp=%h", o, m, y, expv));
        rv = real'(y) / 65536.0;
        tv = (o == 0) ? 65536.0 / real'(m) : 1.0 / $sqrt(real'(m) / 65536.0);
        if (tv < 30000.0 && tv > 0.01 || tv < -0.01)
          chk((rv / tv) > 0.97 && (rv / tv) < 1.03,
              $sformatf("accuracy op %0d m=%h y=%f true=%f", o, m, rv, tv));
      end
    end
    // zero input
    op = SFU_INV; m = 0; in_valid = 1; @(negedge clk); in_valid = 0; @(negedge clk);
    chk(out_valid && y == FX_MAX, "1/0 saturates");
    // POW: m^n for m in (0,1], n integer-ish
    op = SFU_POW;
    for (int n = 0; n < 40; n++) begin
      fx_t nn;
      real tv, rv;
      longint prod;
      m  = fx_t'(($urandom % 65536) + 1);
      nn = fx_t'((($urandom % 32) + 1) << 16);
      if (n == 0) m = 0;
      in_valid = 1; @(negedge clk); in_valid = 0;
      chk(log_valid, "log_valid after 1 cycle");
      chk(log_out == ((m == 0) ? -32'sh0040_0000 : fx_t'(mlog(longint'(m)))), "log value");
      prod = (longint'(log_out) * longint'(nn)) >>> 16;
      exp_in = fx_t'(prod); exp_valid = 1; @(negedge clk); exp_valid = 0;
      chk(out_valid, "pow output one cycle after exp_valid");
      rv = real'(y) / 65536.0;
      tv = (real'(m) / 65536.0) ** (real'(nn) / 65536.0);
      if (tv > 0.01) chk($ln(rv / tv) / $ln(2.0) < 0.012 * real'(nn) / 65536.0 + 0.03 &&
                         $ln(tv / rv) / $ln(2.0) < 0.012 * real'(nn) / 65536.0 + 0.03,
                         $sformatf("pow m=%h n=%h y=%f true=%f", m, nn, rv, tv));
      else chk(rv < 0.02, $sformatf("pow small m=%h n=%h y=%f", m, nn, rv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
