// tb_ge_regfile: self-checking test of the VPU register file.
// Random masked writes (any subset of x, y, z, w) to random slot/register pairs against an
// array model; both read ports read random pairs every cycle. Watchdog: 20000 cycles.
module tb_ge_regfile;
  import ge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic we;
  logic [2:0] wslot, rslot0, rslot1;
  logic [3:0] wreg, rreg0, rreg1, wmask;
  vec4_t wdata, rdata0, rdata1;
  ge_regfile dut (.*);
  int checks = 0, failures = 0;
  vec4_t model [6][12];
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask
  initial begin
    we = 0; wslot = '0; wreg = '0; wmask = '0; wdata = '0;
    rslot0 = '0; rslot1 = '0; rreg0 = '0; rreg1 = '0;
    for (int s = 0; s < 6; s++) for (int r = 0; r < 12; r++) model[s][r] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      chk(rdata0 == model[rslot0][rreg0], $sformatf("port 0 slot %0d reg %0d", rslot0, rreg0));
      chk(rdata1 == model[rslot1][rreg1], $sformatf("port 1 slot %0d reg %0d", rslot1, rreg1));
      we = ($urandom_range(2) != 0);
      wslot = 3'($urandom_range(5)); wreg = 4'($urandom_range(11)); wmask = 4'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      rslot0 = 3'($urandom_range(5)); rreg0 = 4'($urandom_range(11));
      rslot1 = 3'($urandom_range(5)); rreg1 = 4'($urandom_range(11));
      if (we) begin
        if (wmask[3]) model[wslot][wreg].x = wdata.x;
        if (wmask[2]) model[wslot][wreg].y = wdata.y;
        if (wmask[1]) model[wslot][wreg].z = wdata.z;
        if (wmask[0]) model[wslot][wreg].w = wdata.w;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
