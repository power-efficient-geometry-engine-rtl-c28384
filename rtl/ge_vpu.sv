// ge_vpu: vertex processing unit: transform and lighting of a batch of vertices on the
// reconfigurable datapath.
//
// The VPU takes a whole dispatch-queue buffer (up to six vertices) at a time and runs a
// fixed program of datapath operations over it; every step streams all vertices of the batch
// through the datapath back to back, so the datapath pipeline stays full, and the results go
// to the register file. Operands come from the register file or from the constant memory
// (matrices and light parameters, written by the host). Batch flow:
//   load   copy each vertex from the vertex cache into the register file;
//   run    the program below, one datapath mode per step;
//   write  copy results back to the vertex cache and mark each vertex lit in the tag unit
//          (with its highlight-test result), then release the dispatch-queue buffer.
// Two programs share one sequence: the full program (modelview transform, projection,
// perspective division, viewport transform, normal transform, then lighting) for vertices
// from the first dispatch queue, and the lighting-only tail for vertices made by subdivision
// (second dispatch queue, served first), which arrive with eye position, eye normal and
// window coordinates already interpolated.
//
// Lighting is the Blinn-Phong model I = Ia + (N.L) Id + (N.H)^n Is with a point light:
// L = norm(light - E), V = -norm(E), H = norm(L + V); N.L and N.H are clamped at zero. The
// highlight test of the document's triangle filtering compares the vertex's N.H with a
// threshold (constant word 16) and is stored with the vertex. Matrices: the modelview is
// affine (w_eye = 1) and only its first three rows are stored, as the document's
// 3-component-plus-addend transform assumes; the projection is a full 4x4.
//
// The list of operations and the datapath modes are the document's; the program, the
// register and constant maps and the batch protocol are this design's.
//
// Constant words: 0-2 modelview rows, 3-6 projection rows, 7-9 normal-matrix rows,
// 10-12 viewport rows (xs,0,0,xo) (0,ys,0,yo) (0,0,zs,zo), 13 light position (eye space),
// 14 (0, Is, Id, Ia), 15 (n, 0, 0, 0) specular exponent, 16 (threshold, 0, 0, 0).
// Timing: about 24 steps of (batch size + datapath latency + 1) cycles plus 5 cycles per
// vertex for load and write-back; e.g. 271 cycles for a full batch of six.
module ge_vpu
  import ge_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // host constant writes
  input  logic       cw_en,
  input  logic [4:0] cw_addr,
  input  vec4_t      cw_data,
  // dispatch queue 1 (full transform and lighting)
  input  logic       b1_valid,
  input  logic [2:0] b1_count,
  input  ent_t       b1_entries [DQ_SIZE],
  output logic       b1_done,
  // dispatch queue 2 (lighting of generated vertices)
  input  logic       b2_valid,
  input  logic [2:0] b2_count,
  input  ent_t       b2_entries [DQ_SIZE],
  output logic       b2_done,
  // vertex cache
  output ent_t       c_raddr,
  input  vdata_t     c_rdata,
  output logic       c_we,
  output ent_t       c_waddr,
  output vmask_t     c_wmask,
  output vdata_t     c_wdata,
  // tag unit
  output logic       lit_valid,
  output ent_t       lit_entry,
  output logic       lit_htest,
  // events
  output logic       ev_full_batch,
  output logic       ev_light_batch
);

  // register map
  localparam logic [3:0] R_P = 4'd0, R_N = 4'd1, R_E = 4'd2, R_C = 4'd3, R_D = 4'd4,
                         R_W = 4'd5, R_NE = 4'd6, R_L = 4'd7, R_V = 4'd8, R_H = 4'd9,
                         R_S = 4'd10;
  localparam int unsigned PC_LIGHT = 14;
  localparam int unsigned PC_END   = 24;
  localparam logic [4:0]  C_HTH    = 5'd16;   // highlight threshold, read at write-back

  typedef struct packed {
    rdp_mode_t  mode;
    logic       a_c;      // operand a from constant memory (else register file)
    logic [4:0] a_i;
    logic       b_c;
    logic [4:0] b_i;
    logic [3:0] dst;
    logic [3:0] wmask;    // x y z w
    logic       scalar;   // result in res.x, written to the masked component
    logic       clamp;    // clamp negative results to zero
  } uop_t;

  function automatic uop_t uop(rdp_mode_t md, logic ac, logic [4:0] ai, logic bc, logic [4:0] bi,
                               logic [3:0] d, logic [3:0] wm, logic sc, logic cl);
    uop_t u;
    u = '{mode: md, a_c: ac, a_i: ai, b_c: bc, b_i: bi, dst: d, wmask: wm, scalar: sc,
          clamp: cl};
    return u;
  endfunction

  // the program
  function automatic uop_t prog(logic [4:0] pc);
    unique case (pc)
      // modelview transform: E = MV * (P, 1)
      5'd0:  return uop(RDP_TRANS_DP, 1, 5'd0, 0, 5'(R_P), R_E, 4'b1000, 1, 0);
      5'd1:  return uop(RDP_TRANS_DP, 1, 5'd1, 0, 5'(R_P), R_E, 4'b0100, 1, 0);
      5'd2:  return uop(RDP_TRANS_DP, 1, 5'd2, 0, 5'(R_P), R_E, 4'b0010, 1, 0);
      // projection transform: C = PR * (E, 1)
      5'd3:  return uop(RDP_TRANS_DP, 1, 5'd3, 0, 5'(R_E), R_C, 4'b1000, 1, 0);
      5'd4:  return uop(RDP_TRANS_DP, 1, 5'd4, 0, 5'(R_E), R_C, 4'b0100, 1, 0);
      5'd5:  return uop(RDP_TRANS_DP, 1, 5'd5, 0, 5'(R_E), R_C, 4'b0010, 1, 0);
      5'd6:  return uop(RDP_TRANS_DP, 1, 5'd6, 0, 5'(R_E), R_C, 4'b0001, 1, 0);
      // perspective division: D = (C.xyz / C.w, 1 / C.w)
      5'd7:  return uop(RDP_PD,       0, 5'(R_C), 0, 5'(R_C), R_D, 4'b1111, 0, 0);
      // viewport transform
      5'd8:  return uop(RDP_TRANS_DP, 1, 5'd10, 0, 5'(R_D), R_W, 4'b1000, 1, 0);
      5'd9:  return uop(RDP_TRANS_DP, 1, 5'd11, 0, 5'(R_D), R_W, 4'b0100, 1, 0);
      5'd10: return uop(RDP_TRANS_DP, 1, 5'd12, 0, 5'(R_D), R_W, 4'b0010, 1, 0);
      // normal transform
      5'd11: return uop(RDP_LIGHT_DP, 1, 5'd7, 0, 5'(R_N), R_NE, 4'b1000, 1, 0);
      5'd12: return uop(RDP_LIGHT_DP, 1, 5'd8, 0, 5'(R_N), R_NE, 4'b0100, 1, 0);
      5'd13: return uop(RDP_LIGHT_DP, 1, 5'd9, 0, 5'(R_N), R_NE, 4'b0010, 1, 0);
      // lighting (entry point of the lighting-only program)
      5'd14: return uop(RDP_VEC_NORM, 0, 5'(R_NE), 0, 5'(R_NE), R_NE, 4'b1110, 0, 0);
      5'd15: return uop(RDP_VEC_SUB,  1, 5'd13, 0, 5'(R_E), R_L, 4'b1110, 0, 0);
      5'd16: return uop(RDP_VEC_NORM, 0, 5'(R_L), 0, 5'(R_L), R_L, 4'b1110, 0, 0);
      5'd17: return uop(RDP_VEC_NORM, 0, 5'(R_E), 0, 5'(R_E), R_V, 4'b1110, 0, 0);
      5'd18: return uop(RDP_VEC_SUB,  0, 5'(R_L), 0, 5'(R_V), R_H, 4'b1110, 0, 0);
      5'd19: return uop(RDP_VEC_NORM, 0, 5'(R_H), 0, 5'(R_H), R_H, 4'b1110, 0, 0);
      5'd20: return uop(RDP_LIGHT_DP, 0, 5'(R_NE), 0, 5'(R_L), R_S, 4'b0010, 1, 1);
      5'd21: return uop(RDP_LIGHT_DP, 0, 5'(R_NE), 0, 5'(R_H), R_S, 4'b1000, 1, 1);
      5'd22: return uop(RDP_POW,      0, 5'(R_S), 1, 5'd15, R_S, 4'b0100, 1, 0);
      default: return uop(RDP_TRANS_DP, 1, 5'd14, 0, 5'(R_S), R_S, 4'b0001, 1, 0);
    endcase
  endfunction

  // ---------------- sub-blocks ----------------
  logic       rf_we;
  logic [2:0] rf_wslot, rf_rs0, rf_rs1;
  logic [3:0] rf_wreg, rf_rr0, rf_rr1, rf_wmask;
  vec4_t      rf_wdata, rf_rd0, rf_rd1;
  ge_regfile #(.NSLOT(DQ_SIZE), .NREG(12)) u_rf (
    .clk, .rst_n, .we(rf_we), .wslot(rf_wslot), .wreg(rf_wreg), .wmask(rf_wmask),
    .wdata(rf_wdata), .rslot0(rf_rs0), .rreg0(rf_rr0), .rdata0(rf_rd0),
    .rslot1(rf_rs1), .rreg1(rf_rr1), .rdata1(rf_rd1)
  );

  logic [4:0] cm_ra0, cm_ra1;
  vec4_t      cm_rd0, cm_rd1;
  ge_const_mem #(.N(32)) u_cmem (
    .clk, .rst_n, .we(cw_en), .waddr(cw_addr), .wdata(cw_data),
    .raddr0(cm_ra0), .raddr1(cm_ra1), .rdata0(cm_rd0), .rdata1(cm_rd1)
  );

  rdp_mode_t  rdp_mode;
  logic       rdp_iv, rdp_ov, rdp_busy;
  vec4_t      rdp_va, rdp_vb, rdp_res;
  logic [7:0] rdp_tag_in, rdp_tag_out;
  ge_rdp #(.TAG_W(8)) u_rdp (
    .clk, .rst_n, .mode(rdp_mode), .in_valid(rdp_iv), .va(rdp_va), .vb(rdp_vb),
    .tag_in(rdp_tag_in), .out_valid(rdp_ov), .res(rdp_res), .tag_out(rdp_tag_out),
    .busy(rdp_busy)
  );

  // ---------------- control ----------------
  typedef enum logic [2:0] {V_IDLE, V_LOAD, V_RUN, V_WB, V_DONE} vstate_t;
  vstate_t    st;
  logic       light_only;           // batch from dispatch queue 2
  logic [2:0] n;                    // vertices in the batch
  ent_t       ents [DQ_SIZE];
  logic [4:0] pc;
  logic [2:0] slot, issued, returned;
  logic [1:0] phase;
  uop_t       u;

  assign u = prog(pc);

  fx_t thresh;
  assign thresh = cm_rd1.x;

  // Scalar result of a dot product, clamped at zero for the diffuse and specular terms.
  fx_t res_s;
  assign res_s = (u.clamp && rdp_res.x < 0) ? '0 : rdp_res.x;

  always_comb begin
    // defaults
    rf_we = 1'b0; rf_wslot = slot; rf_wreg = '0; rf_wmask = '0; rf_wdata = '0;
    rf_rs0 = slot; rf_rs1 = slot; rf_rr0 = '0; rf_rr1 = '0;
    cm_ra0 = u.a_i; cm_ra1 = u.b_i;
    rdp_mode = u.mode; rdp_iv = 1'b0; rdp_tag_in = 8'(issued);
    rdp_va = u.a_c ? cm_rd0 : rf_rd0;
    rdp_vb = u.b_c ? cm_rd1 : rf_rd1;
    c_raddr = ents[slot];
    c_we = 1'b0; c_waddr = ents[slot]; c_wmask = '0; c_wdata = '0;
    lit_valid = 1'b0; lit_entry = ents[slot]; lit_htest = rf_rd0.x > thresh;

    unique case (st)
      V_LOAD: begin
        rf_we = 1'b1;
        if (!light_only) begin
          rf_wreg  = phase[0] ? R_N : R_P;
          rf_wmask = 4'b1111;
          rf_wdata = phase[0] ? '{c_rdata.n_obj.x, c_rdata.n_obj.y, c_rdata.n_obj.z, 32'sd0}
                              : '{c_rdata.p_obj.x, c_rdata.p_obj.y, c_rdata.p_obj.z, FX_ONE};
        end else begin
          rf_wreg  = phase[0] ? R_NE : R_E;
          rf_wmask = 4'b1111;
          rf_wdata = phase[0] ? '{c_rdata.n_eye.x, c_rdata.n_eye.y, c_rdata.n_eye.z, 32'sd0}
                              : '{c_rdata.eye.x, c_rdata.eye.y, c_rdata.eye.z, FX_ONE};
        end
      end
      V_RUN: begin
        rf_rs0 = issued; rf_rs1 = issued;
        rf_rr0 = u.a_i[3:0]; rf_rr1 = u.b_i[3:0];
        rdp_iv = (issued < n);
        if (rdp_ov) begin
          rf_we = 1'b1;
          rf_wslot = rdp_tag_out[2:0];
          rf_wreg = u.dst;
          rf_wmask = u.wmask;
          rf_wdata = u.scalar ? '{res_s, res_s, res_s, res_s} : rdp_res;
        end
      end
      V_WB: begin
        rf_rs0 = slot; rf_rs1 = slot;
        c_we = 1'b1;
        unique case (phase)
          2'd0: begin
            rf_rr0 = R_E; rf_rr1 = R_NE;
            c_wmask = '{obj: 1'b0, eye: !light_only, n_eye: !light_only, win: 1'b0, inten: 1'b0};
            c_wdata.eye   = '{rf_rd0.x, rf_rd0.y, rf_rd0.z};
            c_wdata.n_eye = '{rf_rd1.x, rf_rd1.y, rf_rd1.z};
          end
          2'd1: begin
            rf_rr0 = R_W; rf_rr1 = R_D;
            c_wmask = '{obj: 1'b0, eye: 1'b0, n_eye: 1'b0, win: !light_only, inten: 1'b0};
            c_wdata.win = '{rf_rd0.x, rf_rd0.y, rf_rd0.z, rf_rd1.w};
          end
          default: begin
            rf_rr0 = R_S;
            cm_ra1 = C_HTH;
            c_wmask = '{obj: 1'b0, eye: 1'b0, n_eye: 1'b0, win: 1'b0, inten: 1'b1};
            c_wdata.inten = rf_rd0.w;
            lit_valid = 1'b1;
          end
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= V_IDLE; light_only <= 1'b0; n <= '0; pc <= '0; slot <= '0;
      issued <= '0; returned <= '0; phase <= '0;
      for (int i = 0; i < DQ_SIZE; i++) ents[i] <= '0;
      b1_done <= 1'b0; b2_done <= 1'b0; ev_full_batch <= 1'b0; ev_light_batch <= 1'b0;
    end else begin
      b1_done <= 1'b0; b2_done <= 1'b0; ev_full_batch <= 1'b0; ev_light_batch <= 1'b0;
      unique case (st)
        V_IDLE: begin
          slot <= '0; phase <= '0;
          if (b2_valid && !b2_done) begin
            light_only <= 1'b1; n <= b2_count; ents <= b2_entries; pc <= 5'(PC_LIGHT);
            ev_light_batch <= 1'b1;
            st <= V_LOAD;
          end else if (b1_valid && !b1_done) begin
            light_only <= 1'b0; n <= b1_count; ents <= b1_entries; pc <= '0;
            ev_full_batch <= 1'b1;
            st <= V_LOAD;
          end
        end
        V_LOAD: begin
          phase <= phase ^ 2'd1;
          if (phase[0]) begin
            if (slot + 3'd1 == n) begin
              slot <= '0; issued <= '0; returned <= '0; st <= V_RUN;
            end else slot <= slot + 3'd1;
          end
        end
        V_RUN: begin
          if (issued < n) issued <= issued + 3'd1;
          if (rdp_ov) begin
            if (returned + 3'd1 == n) begin
              returned <= '0;
              issued   <= '0;
              if (32'(pc) + 1 == PC_END) begin
                st <= V_WB; slot <= '0; phase <= '0;
              end else pc <= pc + 5'd1;
            end else returned <= returned + 3'd1;
          end
        end
        V_WB: begin
          if (phase == 2'd2) begin
            phase <= '0;
            if (slot + 3'd1 == n) st <= V_DONE;
            else slot <= slot + 3'd1;
          end else phase <= phase + 2'd1;
        end
        V_DONE: begin
          if (light_only) b2_done <= 1'b1; else b1_done <= 1'b1;
          st <= V_IDLE;
        end
        default: st <= V_IDLE;
      endcase
    end
  end

endmodule
