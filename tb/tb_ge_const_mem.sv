// tb_ge_const_mem: self-checking test of the VPU constant memory.
// Checks that every word reads zero after reset, then random writes against an array model
// with both read ports reading random words every cycle (combinational reads, write visible
// after the clock edge). Watchdog: 20000 cycles.
module tb_ge_const_mem;
  import ge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic we;
  logic [4:0] waddr, raddr0, raddr1;
  vec4_t wdata, rdata0, rdata1;
  ge_const_mem dut (.*);
  int checks = 0, failures = 0;
  vec4_t model [32];
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask
  initial begin
    we = 0; waddr = '0; wdata = '0; raddr0 = '0; raddr1 = '0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      raddr0 = 5'(i); raddr1 = 5'(31 - i); #1;
      chk(rdata0 == '0 && rdata1 == '0, "reset value");
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      chk(rdata0 == model[raddr0], $sformatf("port 0 word %0d", raddr0));
      chk(rdata1 == model[raddr1], $sformatf("port 1 word %0d", raddr1));
      we = ($urandom_range(1) == 1); waddr = 5'($urandom); wdata = {$urandom, $urandom, $urandom, $urandom};
      raddr0 = 5'($urandom); raddr1 = 5'($urandom);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
