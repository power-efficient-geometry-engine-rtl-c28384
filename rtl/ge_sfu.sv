// ge_sfu: special function unit of the reconfigurable datapath.
//
// Computes 1/m (INV), 1/sqrt(m) (InvSqrt) and m^n (POW) in the logarithmic number system, as
// the document describes: a logarithmic converter turns m into M = log2(m); the Inv block
// forms ~M (the one's complement, -M less one LSB); the shift block halves it for InvSqrt
// (Config[1]) or passes it for Inv; an antilogarithmic converter returns 2^X. For POW the
// converter's M leaves on log_out, a processing element multiplies it by n, and nM comes back
// on exp_in; Config[2] (the op being SFU_POW here) selects that source for the antilog.
//
// The converters use Mitchell's straight-line approximation with a one-term correction:
// log2(1+f) ~ f + c*f*(1-f) and 2^f ~ 1 + f - c*f*(1-f), c = 0.3457 (1/4+1/16+1/32+1/512),
// which needs one 16x16 product per converter. This is this design's choice: the document
// cites low-power converter designs without giving their insides. INV and InvSqrt results are
// within about 2% of the exact value; for POW the error grows with the exponent n. Numbers are Q16.16; M and X are Q16.16 too.
// Special values (this design's choice): INV/InvSqrt of 0 give the largest positive value;
// INV keeps the sign of m; for POW an m <= 0 gives M = -64.0 so that m^n underflows to 0.
//
// Timing: INV/InvSqrt: m with in_valid in cycle t, y valid in t+2. POW: log_out valid in t+1
// (log_valid); y valid one cycle after exp_valid. op is static while data is in flight.
module ge_sfu
  import ge_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sfu_op_t op,
  input  logic    in_valid,
  input  fx_t     m,
  output logic    log_valid,
  output fx_t     log_out,
  input  logic    exp_valid,
  input  fx_t     exp_in,
  output logic    out_valid,
  output fx_t     y
);

  localparam fx_t LOG_ZERO = -32'sh0040_0000;   // -64.0

  // c * f * (1 - f) for a 16-bit fraction f, in units of 2^-16
  function automatic logic [15:0] corr(logic [15:0] f);
    logic [31:0] p;
    logic [15:0] q;
    p = 32'(f) * 32'(17'h10000 - 17'(f));
    q = p[31:16];
    return (q >> 2) + (q >> 4) + (q >> 5) + (q >> 9);
  endfunction

  logic [31:0] mag;
  logic [4:0]  k;
  logic [31:0] norm;
  fx_t         log_c;

  // logarithmic converter: leading-one detector and normaliser
  always_comb begin
    mag = m[31] ? 32'(-m) : 32'(m);
    k = '0;
    for (int i = 0; i < 32; i++) if (mag[i]) k = 5'(i);
    norm  = mag << (5'd31 - k);
    log_c = fx_t'({16'(signed'({1'b0, k}) - 6'sd16), 16'h0000}) + fx_t'(norm[30:15]) +
            fx_t'(corr(norm[30:15]));
    if (mag == '0 || (op == SFU_POW && m[31])) log_c = LOG_ZERO;
  end

  logic v1, neg1, zero1;
  fx_t  reg_m;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; neg1 <= 1'b0; zero1 <= 1'b0; reg_m <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        reg_m <= log_c;
        neg1  <= m[31] && (op == SFU_INV);
        zero1 <= (mag == '0);
      end
    end
  end
  assign log_valid = v1 && (op == SFU_POW);
  assign log_out   = reg_m;

  // Inv block, shift block (Config[1]) and source select (Config[2])
  fx_t x_inv, x_sel, alog;
  logic sel_valid;
  always_comb begin
    x_inv = ~reg_m;
    if (op == SFU_INVSQRT) x_inv = x_inv >>> 1;
    x_sel     = (op == SFU_POW) ? exp_in : x_inv;
    sel_valid = (op == SFU_POW) ? exp_valid : v1;
  end

  // antilogarithmic converter: 2^X = (1 + f) * 2^i
  logic signed [15:0] ei;
  logic [16:0] mant;
  always_comb begin
    ei   = x_sel[31:16];
    mant = {1'b1, x_sel[15:0]} - 17'(corr(x_sel[15:0]));
    if (ei >= 16'sd15)       alog = FX_MAX;
    else if (ei >= 16'sd0)   alog = fx_t'(32'(mant) << ei);
    else if (ei <= -16'sd17) alog = '0;
    else                     alog = fx_t'(32'(mant) >> (-ei));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; y <= '0;
    end else begin
      out_valid <= sel_valid;
      if (sel_valid) begin
        if (op != SFU_POW && zero1) y <= FX_MAX;
        else if (op != SFU_POW && neg1) y <= -alog;
        else y <= alog;
      end
    end
  end

endmodule
