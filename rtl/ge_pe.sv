// ge_pe: processing element of the reconfigurable datapath.
//
// A three-stage pipeline, as the document describes it. Stage 1 holds a 32-bit fixed-width
// radix-4 Booth multiplier (REG_B x REG_C) and a dedicated squarer (REG_D squared); each
// leaves two partial products in carry-save form (REG_F/REG_G and REG_H/REG_I), and REG_A is
// carried to REG_E as an addend. Stage 2 is a 4:2 compressor whose result goes to REG_J/REG_K.
// Stage 3 is an adder-subtractor that produces the output. Configured on its own the PE does
// MUL, SQR, MAC, ADD and SUB (ge_pkg::pe_cfg_of); inside the datapath the compressor inputs
// 2/3 can instead take a neighbouring PE's compressor outputs (ext_s/ext_c), so that three
// PEs form one dot-product tree, and the multiplier and squarer can run at the same time.
//
// Fixed-width: each partial product keeps bits 47..16 of the Q32.32 product, so a product
// may come out one LSB below the truncated exact product. The Booth and squarer partial
// products are accumulated with a linear carry-save array (this design's choice; the
// document does not show the reduction tree).
//
// Timing: MUL/SQR/MAC: operands on a/b/c/d with in_valid in cycle t, y valid in t+3.
// ADD/SUB: REG_J/REG_K are loaded straight from a/b, y valid in t+2. cfg is static while
// data is in flight.
module ge_pe
  import ge_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  pe_cfg_t cfg,
  input  logic    in_valid,
  input  fx_t     a,        // REG_A: addend (MAC) / first operand (ADD, SUB)
  input  fx_t     b,        // REG_B: multiplicand / second operand (ADD, SUB)
  input  fx_t     c,        // REG_C: multiplier
  input  fx_t     d,        // REG_D: squarer input
  input  fx_t     ext_s,    // compressor input 2 from a neighbour PE
  input  fx_t     ext_c,    // compressor input 3 from a neighbour PE
  output fx_t     cmp_s,    // compressor outputs (combinational, stage 2)
  output fx_t     cmp_c,
  output logic    out_valid,
  output fx_t     y
);

  fx_t  reg_e, reg_f, reg_g, reg_h, reg_i, reg_j, reg_k;
  logic v1, v2;
  cs64_t mul_cs, sqr_cs, c42;
  fx_t  x0, x1, x2, x3;

  assign mul_cs = booth_pp(b, c);
  assign sqr_cs = sqr_pp(d);

  // stage 1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {reg_e, reg_f, reg_g, reg_h, reg_i} <= '0;
      v1 <= 1'b0;
    end else begin
      // The stage-1 registers load every cycle: inside the datapath the squarer and the
      // multiplier serve different operations in flight, and each consumer samples them
      // at its own time. in_valid tracks the multiplier/adder path.
      v1 <= in_valid;
      reg_e <= a;
      reg_f <= fw(mul_cs.s);
      reg_g <= fw(mul_cs.c);
      reg_h <= fw(sqr_cs.s);
      reg_i <= fw(sqr_cs.c);
    end
  end

  // stage 2: 4:2 compressor
  always_comb begin
    x0 = cfg.cmp_hi ? reg_h : reg_f;
    x1 = cfg.cmp_hi ? reg_i : reg_g;
    x2 = cfg.cmp_ext ? ext_s : reg_e;
    x3 = cfg.cmp_ext ? ext_c : '0;
    c42 = cmp42(ext64(x0), ext64(x1), ext64(x2), ext64(x3));
  end
  assign cmp_s = fx_t'(c42.s[31:0]);
  assign cmp_c = fx_t'(c42.c[31:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {reg_j, reg_k} <= '0;
      v2 <= 1'b0;
    end else begin
      // for SQR the caller raises in_valid together with d
      if (cfg.jk == JK_IN) begin
        v2 <= in_valid;
        if (in_valid) begin reg_j <= a; reg_k <= b; end
      end else begin
        v2 <= v1;
        if (v1) begin
          unique case (cfg.jk)
            JK_CMP: begin reg_j <= cmp_s; reg_k <= cmp_c; end
            JK_FG:  begin reg_j <= reg_f; reg_k <= reg_g; end
            JK_HI:  begin reg_j <= reg_h; reg_k <= reg_i; end
            default: ;
          endcase
        end
      end
    end
  end

  // stage 3: adder-subtractor
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v2;
      if (v2) y <= cfg.sub ? reg_j - reg_k : reg_j + reg_k;
    end
  end

endmodule
