// tb_ge_pe: self-checking test of the processing element.
// Streams random operands through each configuration (MUL, SQR, MAC, ADD, SUB) one per cycle
// and compares every result with a 64-bit reference computed here. The fixed-width products
// may be one LSB below the truncated exact product; anything else is a failure. The latency
// (3 cycles, 2 for ADD/SUB) is checked for every result.
module tb_ge_pe;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  pe_cfg_t cfg;
  logic in_valid, out_valid;
  fx_t a, b, c, d, y, cs, cc;
  ge_pe dut (.clk, .rst_n, .cfg, .in_valid, .a, .b, .c, .d, .ext_s('0), .ext_c('0),
             .cmp_s(cs), .cmp_c(cc), .out_valid, .y);

  typedef struct { fx_t exp; logic approx; int t; } item_t;
  item_t q[$];
  pe_op_t op;

  function automatic fx_t ref_mul(fx_t x, fx_t z);
    longint p = longint'(x) * longint'(z);
    return fx_t'(p >>> 16);
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    item_t it;
    int lat;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      it = q.pop_front();
      lat = (op == PE_ADD || op == PE_SUB) ? 2 : 3;
      if (!(y == it.exp || (it.approx && y == it.exp - 1))) begin
        failures++;
        if (failures < 10) $display("op %s: got %h exp %h", op.name(), y, it.exp);
      end
      if (cyc - it.t != lat) begin
        failures++;
        $display("op %s: latency %0d", op.name(), cyc - it.t);
      end
    end
  end

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; a = 0; b = 0; c = 0; d = 0;
    op = PE_MUL; cfg = pe_cfg_of(op);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o < 5; o++) begin
      op = pe_op_t'(o);
      cfg = pe_cfg_of(op);
      @(negedge clk);
      for (int n = 0; n < 200; n++) begin
        item_t it;
        a = $urandom; b = $urandom; c = $urandom; d = $urandom;
        if (n % 4 == 1) begin a = a >>> 12; b = b >>> 12; c = c >>> 12; d = d >>> 12; end
        if (n == 0) begin b = 32'sh0002_0000; c = -32'sh0000_8000; d = -32'sh0003_0000; end
        unique case (op)
          PE_MUL: it = '{ref_mul(b, c), 1'b1, 0};
          PE_SQR: it = '{ref_mul(d, d), 1'b1, 0};
          PE_MAC: it = '{a + ref_mul(b, c), 1'b1, 0};
          PE_ADD: it = '{a + b, 1'b0, 0};
          default: it = '{a - b, 1'b0, 0};
        endcase
        it.t = cyc;
        q.push_back(it);
        in_valid = 1;
        @(negedge clk);
      end
      in_valid = 0;
      repeat (6) @(negedge clk);
      if (q.size() != 0) begin failures++; $display("missing outputs"); q.delete(); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
