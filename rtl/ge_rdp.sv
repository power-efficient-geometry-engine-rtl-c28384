// ge_rdp: reconfigurable datapath (RDP) of the vertex processing unit.
//
// Three processing elements (left, centre, right: vector components x, y, z), one special
// function unit and one FIFO, reconnected per configuration mode (document Table 3.1):
//   RDP_TRANS_DP  res.x = va.x*vb.x + va.y*vb.y + va.z*vb.z + va.w   (matrix row . (v,1))
//   RDP_LIGHT_DP  res.x = va.x*vb.x + va.y*vb.y + va.z*vb.z
//   RDP_VEC_NORM  res.xyz = va.xyz / |va.xyz|
//   RDP_PD        res = (va.x/va.w, va.y/va.w, va.z/va.w, 1/va.w)      (perspective division)
//   RDP_POW       res.x = va.x ^ vb.x
//   RDP_VEC_SUB   res.xyz = va.xyz - vb.xyz
// Dot products: the three multipliers' partial products and the addend meet in a chain of
// the three 4:2 compressors (right -> left -> centre) and the centre PE's adder sums them.
// Normalisation: the squarers and compressors form the squared length, an extra adder sums
// it, the SFU returns 1/sqrt, and the PEs multiply the vector, taken back from the FIFO, by
// it; squaring and scaling of different vectors overlap. Perspective division: the SFU
// inverts w while x, y, z wait in the FIFO, then the PEs multiply. Power: the SFU's log goes
// to the centre PE, is multiplied by the exponent (from the FIFO), and returns to the SFU's
// antilog converter. Vector subtraction loads the PEs' J/K registers directly.
// The modes and the building blocks are the document's; the exact wiring is this design's.
//
// Interface: one operation per cycle may enter (in_valid, va, vb, tag_in); it leaves after a
// fixed latency with out_valid, res and the same tag. mode must not change while busy.
// Latency: TRANS_DP, LIGHT_DP 3; VEC_SUB 2; PD 5; POW 5; VEC_NORM 7 cycles.
module ge_rdp
  import ge_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  rdp_mode_t        mode,
  input  logic             in_valid,
  input  vec4_t            va,
  input  vec4_t            vb,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output vec4_t            res,
  output logic [TAG_W-1:0] tag_out,
  output logic             busy
);

  localparam int unsigned MAXLAT = 7;

  function automatic fx_t cmp3(vec4_t v, int k);
    return (k == 0) ? v.x : (k == 1) ? v.y : v.z;
  endfunction

  function automatic int unsigned lat_of(rdp_mode_t md);
    unique case (md)
      RDP_TRANS_DP, RDP_LIGHT_DP: return 3;
      RDP_VEC_SUB:                return 2;
      RDP_PD, RDP_POW:            return 5;
      RDP_VEC_NORM:               return 7;
      default:                    return 3;
    endcase
  endfunction

  // ---------------- building blocks ----------------
  pe_cfg_t pe_cfg [3];
  logic    pe_iv  [3];
  fx_t     pe_a [3], pe_b [3], pe_c [3], pe_d [3], pe_y [3];
  logic    pe_ov [3];
  // compressor chain right -> left -> centre (named nets, one per PE)
  fx_t     cs_l, cc_l, cs_c, cc_c, cs_r, cc_r;

  ge_pe u_pe_l (
    .clk, .rst_n, .cfg(pe_cfg[0]), .in_valid(pe_iv[0]),
    .a(pe_a[0]), .b(pe_b[0]), .c(pe_c[0]), .d(pe_d[0]),
    .ext_s(cs_r), .ext_c(cc_r), .cmp_s(cs_l), .cmp_c(cc_l),
    .out_valid(pe_ov[0]), .y(pe_y[0])
  );
  ge_pe u_pe_c (
    .clk, .rst_n, .cfg(pe_cfg[1]), .in_valid(pe_iv[1]),
    .a(pe_a[1]), .b(pe_b[1]), .c(pe_c[1]), .d(pe_d[1]),
    .ext_s(cs_l), .ext_c(cc_l), .cmp_s(cs_c), .cmp_c(cc_c),
    .out_valid(pe_ov[1]), .y(pe_y[1])
  );
  ge_pe u_pe_r (
    .clk, .rst_n, .cfg(pe_cfg[2]), .in_valid(pe_iv[2]),
    .a(pe_a[2]), .b(pe_b[2]), .c(pe_c[2]), .d(pe_d[2]),
    .ext_s('0), .ext_c('0), .cmp_s(cs_r), .cmp_c(cc_r),
    .out_valid(pe_ov[2]), .y(pe_y[2])
  );

  sfu_op_t sfu_op;
  logic    sfu_iv, sfu_lv, sfu_ov;
  fx_t     sfu_m, sfu_log, sfu_y;
  ge_sfu u_sfu (
    .clk, .rst_n, .op(sfu_op), .in_valid(sfu_iv), .m(sfu_m),
    .log_valid(sfu_lv), .log_out(sfu_log),
    .exp_valid(pe_ov[1] && mode == RDP_POW), .exp_in(pe_y[1]),
    .out_valid(sfu_ov), .y(sfu_y)
  );

  logic  ff_push, ff_pop, ff_full, ff_empty;  // full/empty: see the assertions below
  vec4_t ff_dout;
  logic [3:0] ff_count;
  ge_fifo #(.WIDTH($bits(vec4_t)), .DEPTH(8)) u_fifo (
    .clk, .rst_n, .push(ff_push), .din(mode == RDP_POW ? vb : va), .pop(ff_pop),
    .dout(ff_dout), .full(ff_full), .empty(ff_empty), .count(ff_count)
  );

  // extra adder of the normalisation mode: squared length from the centre compressor
  logic sq_v1, sq_v2;
  fx_t  len2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_v1 <= 1'b0; sq_v2 <= 1'b0; len2 <= '0;
    end else begin
      sq_v1 <= in_valid && mode == RDP_VEC_NORM;
      sq_v2 <= sq_v1;
      if (sq_v1) len2 <= cs_c + cc_c;
    end
  end

  // 1/w of the perspective division, kept until the products leave
  fx_t invw_d [3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) invw_d[i] <= '0;
    end else begin
    invw_d[0] <= sfu_y;
    invw_d[1] <= invw_d[0];
    invw_d[2] <= invw_d[1];
    end
  end

  // ---------------- interconnection per mode ----------------
  always_comb begin
    sfu_op  = SFU_INV;
    sfu_iv  = 1'b0;
    sfu_m   = va.w;
    ff_push = 1'b0;
    ff_pop  = 1'b0;
    for (int k = 0; k < 3; k++) begin
      pe_cfg[k] = '{cmp_hi: 1'b0, cmp_ext: 1'b0, jk: JK_FG, sub: 1'b0};
      pe_iv[k]  = 1'b0;
      pe_a[k]   = '0;
      pe_b[k]   = '0;
      pe_c[k]   = '0;
      pe_d[k]   = '0;
    end

    unique case (mode)
      RDP_TRANS_DP, RDP_LIGHT_DP: begin
        for (int k = 0; k < 3; k++) begin
          pe_iv[k] = in_valid;
          pe_b[k]  = cmp3(va, k);
          pe_c[k]  = cmp3(vb, k);
        end
        pe_a[2] = (mode == RDP_TRANS_DP) ? va.w : '0;
        pe_cfg[0].cmp_ext = 1'b1;
        pe_cfg[1].cmp_ext = 1'b1;
        pe_cfg[1].jk      = JK_CMP;
      end
      RDP_VEC_SUB: begin
        for (int k = 0; k < 3; k++) begin
          pe_cfg[k].jk  = JK_IN;
          pe_cfg[k].sub = 1'b1;
          pe_iv[k] = in_valid;
          pe_a[k]  = cmp3(va, k);
          pe_b[k]  = cmp3(vb, k);
        end
      end
      RDP_VEC_NORM: begin
        sfu_op  = SFU_INVSQRT;
        sfu_iv  = sq_v2;
        sfu_m   = len2;
        ff_push = in_valid;
        ff_pop  = sfu_ov;
        for (int k = 0; k < 3; k++) begin
          pe_cfg[k].cmp_hi = 1'b1;
          pe_d[k]  = cmp3(va, k);
          pe_iv[k] = sfu_ov;
          pe_b[k]  = cmp3(ff_dout, k);
          pe_c[k]  = sfu_y;
        end
        pe_cfg[0].cmp_ext = 1'b1;
        pe_cfg[1].cmp_ext = 1'b1;
      end
      RDP_PD: begin
        sfu_op  = SFU_INV;
        sfu_iv  = in_valid;
        sfu_m   = va.w;
        ff_push = in_valid;
        ff_pop  = sfu_ov;
        for (int k = 0; k < 3; k++) begin
          pe_iv[k] = sfu_ov;
          pe_b[k]  = cmp3(ff_dout, k);
          pe_c[k]  = sfu_y;
        end
      end
      RDP_POW: begin
        sfu_op  = SFU_POW;
        sfu_iv  = in_valid;
        sfu_m   = va.x;
        ff_push = in_valid;
        ff_pop  = sfu_lv;
        pe_iv[1] = sfu_lv;
        pe_b[1]  = sfu_log;
        pe_c[1]  = ff_dout.x;
      end
      default: ;
    endcase
  end

  // ---------------- result alignment ----------------
  logic             vline [MAXLAT+1];
  logic [TAG_W-1:0] tline [MAXLAT+1];
  always_comb begin
    vline[0] = in_valid;
    tline[0] = tag_in;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= MAXLAT; i++) begin vline[i] <= 1'b0; tline[i] <= '0; end
    end else begin
      // an operation leaves the line at its mode's output tap, so that no stale entry
      // appears at the output when the next mode has a longer latency
      for (int i = 1; i <= MAXLAT; i++) begin
        vline[i] <= vline[i-1] && (i <= lat_of(mode));
        tline[i] <= tline[i-1];
      end
    end
  end

  always_comb begin
    out_valid = vline[lat_of(mode)];
    tag_out   = tline[lat_of(mode)];
    res       = '0;
    unique case (mode)
      RDP_TRANS_DP, RDP_LIGHT_DP: res.x = pe_y[1];
      RDP_VEC_SUB, RDP_VEC_NORM:  res = '{x: pe_y[0], y: pe_y[1], z: pe_y[2], w: '0};
      RDP_PD:                     res = '{x: pe_y[0], y: pe_y[1], z: pe_y[2], w: invw_d[2]};
      RDP_POW:                    res.x = sfu_y;
      default: ;
    endcase
    // operations in flight that have not yet left (an output leaves at tap lat_of(mode))
    busy = 1'b0;
    for (int i = 1; i <= MAXLAT; i++) if (i < lat_of(mode)) busy |= vline[i];
  end

  // the fixed-latency alignment must agree with the datapath's own valid signals
  assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (mode == RDP_POW ? sfu_ov : pe_ov[1]))
    else $error("ge_rdp: result valid out of step with the datapath");
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> $stable(mode))
    else $error("ge_rdp: mode changed while operations were in flight");
  // at most 4 operations wait in the FIFO at one operation per cycle; depth 8 never fills
  assert property (@(posedge clk) disable iff (!rst_n) !(ff_full && ff_push && !ff_pop))
    else $error("ge_rdp: operand FIFO overflow");
  assert property (@(posedge clk) disable iff (!rst_n) ff_pop |-> !ff_empty)
    else $error("ge_rdp: operand FIFO underflow");

endmodule
