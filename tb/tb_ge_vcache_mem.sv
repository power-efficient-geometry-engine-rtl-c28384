// tb_ge_vcache_mem: self-checking test of the post-TnL vertex cache data memory.
// First writes every field of every entry, then random field-masked writes on the three write
// ports (to distinct entries in one cycle) against a model, with all seven read ports
// reading random entries every cycle. Watchdog: 20000 cycles.
module tb_ge_vcache_mem;
  import ge_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic   we [3];
  ent_t   waddr [3];
  vmask_t wmask [3];
  vdata_t wdata [3];
  ent_t   raddr [7];
  vdata_t rdata [7];
  ge_vcache_mem dut (.*);
  int checks = 0, failures = 0;
  vdata_t model [16];
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask
  function automatic vdata_t rnd();
    vdata_t d;
    for (int i = 0; i < $bits(vdata_t) / 32; i++) d[32 * i +: 32] = $urandom;
    return d;
  endfunction
  task automatic apply(int p);
    if (wmask[p].obj)   begin model[waddr[p]].p_obj = wdata[p].p_obj; model[waddr[p]].n_obj = wdata[p].n_obj; end
    if (wmask[p].eye)   model[waddr[p]].eye = wdata[p].eye;
    if (wmask[p].n_eye) model[waddr[p]].n_eye = wdata[p].n_eye;
    if (wmask[p].win)   model[waddr[p]].win = wdata[p].win;
    if (wmask[p].inten) model[waddr[p]].inten = wdata[p].inten;
  endtask
  initial begin
    int base;
    for (int p = 0; p < 3; p++) begin we[p] = 0; waddr[p] = '0; wmask[p] = '0; wdata[p] = '0; end
    for (int r = 0; r < 7; r++) raddr[r] = '0;
    for (int e = 0; e < 16; e++) begin
      @(negedge clk);
      we[0] = 1; waddr[0] = ent_t'(e); wmask[0] = '1; wdata[0] = rnd();
      model[e] = wdata[0];
    end
    @(negedge clk); we[0] = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int r = 0; r < 7; r++) chk(rdata[r] == model[raddr[r]], $sformatf("port %0d entry %0d", r, raddr[r]));
      base = int'($urandom_range(15));
      for (int p = 0; p < 3; p++) begin
        we[p] = ($urandom_range(1) == 1); waddr[p] = ent_t'(base + 5 * p);
        wmask[p] = vmask_t'($urandom); wdata[p] = rnd();
        if (we[p]) apply(p);
      end
      for (int r = 0; r < 7; r++) raddr[r] = ent_t'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
