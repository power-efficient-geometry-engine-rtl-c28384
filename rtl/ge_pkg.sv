// ge_pkg: types, constants and arithmetic helpers shared by the geometry engine.
//
// Every datapath number is a 32-bit signed fixed-point value with 16 fraction bits
// (Q16.16). The 32-bit width of the processing elements and the special function unit is the
// document's; the position of the binary point is this design's choice. Edge function
// constant terms are products of two coordinates and are kept exact as Q32.32 in 64 bits.
//
// The helpers below build the partial-product arrays of the processing element: a radix-4
// Booth multiplier and a folded squarer, each reduced to two carry-save vectors, and the
// 3:2 / 4:2 carry-save compressors.
package ge_pkg;

  localparam int unsigned FX_W    = 32;   // datapath word width (document: 32-bit PE and SFU)
  localparam int unsigned FX_FRAC = 16;   // fraction bits (assumed)
  localparam int unsigned IDX_W   = 16;   // vertex index width (assumed)
  localparam int unsigned NENT    = 16;   // post-TnL cache tag entries (document: 16)
  localparam int unsigned ENT_W   = 4;    // entry address width
  localparam int unsigned DQ_SIZE = 6;    // dispatch queue buffer size (document: 6)
  localparam int unsigned MAX_L   = 2;    // highest subdivision level (document: level-2)
  localparam int unsigned NGRID   = 15;   // grid points of a level-2 triangle: (4+1)(4+2)/2

  typedef logic signed [FX_W-1:0] fx_t;
  typedef logic signed [63:0]     fx64_t;
  typedef logic [ENT_W-1:0]       ent_t;
  typedef logic [IDX_W-1:0]       idx_t;

  typedef struct packed { fx_t x; fx_t y; fx_t z; } vec3_t;
  typedef struct packed { fx_t x; fx_t y; fx_t z; fx_t w; } vec4_t;

  localparam fx_t FX_ONE = 32'sh0001_0000;
  localparam fx_t FX_MAX = 32'sh7fff_ffff;

  // ---------------- processing element configuration ----------------
  typedef enum logic [2:0] {PE_MUL, PE_SQR, PE_MAC, PE_ADD, PE_SUB} pe_op_t;
  // source of the pipeline registers J/K that feed the adder-subtractor
  typedef enum logic [1:0] {JK_CMP, JK_FG, JK_HI, JK_IN} jk_sel_t;
  typedef struct packed {
    logic    cmp_hi;   // 4:2 compressor inputs 0/1: 1 = squarer (H,I), 0 = multiplier (F,G)
    logic    cmp_ext;  // 4:2 compressor inputs 2/3: 1 = neighbour PE, 0 = {E, 0}
    jk_sel_t jk;       // what is loaded into J/K
    logic    sub;      // adder-subtractor: 1 = J - K
  } pe_cfg_t;

  function automatic pe_cfg_t pe_cfg_of(pe_op_t op);
    pe_cfg_t c;
    c = '{cmp_hi: 1'b0, cmp_ext: 1'b0, jk: JK_FG, sub: 1'b0};
    unique case (op)
      PE_MUL: c.jk = JK_FG;
      PE_SQR: c.jk = JK_HI;
      PE_MAC: c.jk = JK_CMP;
      PE_ADD: c.jk = JK_IN;
      PE_SUB: begin c.jk = JK_IN; c.sub = 1'b1; end
      default: c.jk = JK_FG;
    endcase
    return c;
  endfunction

  // ---------------- reconfigurable datapath ----------------
  typedef enum logic [2:0] {
    RDP_TRANS_DP, RDP_LIGHT_DP, RDP_VEC_NORM, RDP_PD, RDP_POW, RDP_VEC_SUB
  } rdp_mode_t;

  typedef enum logic [1:0] {SFU_INV, SFU_INVSQRT, SFU_POW} sfu_op_t;

  // ---------------- carry-save arithmetic ----------------
  typedef struct packed { logic [63:0] s; logic [63:0] c; } cs64_t;

  function automatic cs64_t csa3(logic [63:0] a, logic [63:0] b, logic [63:0] c);
    cs64_t r;
    r.s = a ^ b ^ c;
    r.c = ((a & b) | (a & c) | (b & c)) << 1;
    return r;
  endfunction

  // 4:2 compressor built from two 3:2 stages
  function automatic cs64_t cmp42(logic [63:0] a, logic [63:0] b, logic [63:0] c, logic [63:0] d);
    cs64_t t;
    t = csa3(a, b, c);
    return csa3(t.s, t.c, d);
  endfunction

  // Radix-4 Booth multiplier: 16 partial products of a*b (both signed 32-bit),
  // accumulated in carry-save form. sum of the two vectors = a*b (mod 2^64).
  function automatic cs64_t booth_pp(fx_t a, fx_t b);
    cs64_t acc;
    logic [2:0] grp;
    logic signed [63:0] am, pp;
    acc = '0;
    am  = 64'(a);
    for (int i = 0; i < 16; i++) begin
      grp = (i == 0) ? {b[1], b[0], 1'b0} : {b[2*i+1], b[2*i], b[2*i-1]};
      unique case (grp)
        3'b001, 3'b010: pp = am;
        3'b011:         pp = am <<< 1;
        3'b100:         pp = -(am <<< 1);
        3'b101, 3'b110: pp = -am;
        default:        pp = '0;
      endcase
      acc = csa3(acc.s, acc.c, 64'(pp) << (2 * i));
    end
    return acc;
  endfunction

  // Folded squarer: |d|^2 = sum_i d_i 2^(2i) + sum_{i<j} d_i d_j 2^(i+j+1).
  // Row i holds both terms of bit i; the rows are accumulated in carry-save form.
  function automatic cs64_t sqr_pp(fx_t d);
    cs64_t acc;
    logic [31:0] m;
    logic [63:0] row;
    acc = '0;
    m   = d[31] ? 32'(-d) : 32'(d);
    for (int i = 0; i < 32; i++) begin
      row = '0;
      if (m[i]) row = (64'(m >> (i + 1)) << (2 * i + 2)) | (64'd1 << (2 * i));
      acc = csa3(acc.s, acc.c, row);
    end
    return acc;
  endfunction

  // Fixed-width view of a 64-bit (Q32.32) carry-save vector: bits 47..16 (Q16.16)
  function automatic fx_t fw(logic [63:0] v);
    return fx_t'(v[47:16]);
  endfunction

  // Sign-extended / aligned view of a Q16.16 word as a 64-bit vector in the same fixed-width
  // frame (the 4:2 compressor works on the 32-bit fixed-width words)
  function automatic logic [63:0] ext64(fx_t v);
    return 64'(signed'(v));
  endfunction

  // ---------------- vertex cache data ----------------
  typedef struct packed {
    vec3_t p_obj;   // object-space position (from the pre-TnL cache)
    vec3_t n_obj;   // object-space normal
    vec3_t eye;     // eye-space position
    vec3_t n_eye;   // eye-space normal
    vec4_t win;     // window x, y, z and 1/w_clip
    fx_t   inten;   // lit intensity
  } vdata_t;

  typedef struct packed {
    logic obj;
    logic eye;
    logic n_eye;
    logic win;
    logic inten;
  } vmask_t;

  // number of vertices a triangle gains at subdivision level L: (Ns+1)(Ns+2)/2 - 3
  function automatic int unsigned n_gen(logic [1:0] lvl);
    unique case (lvl)
      2'd1: return 3;
      2'd2: return 12;
      default: return 0;
    endcase
  endfunction

  // ---------------- edge functions ----------------
  typedef struct packed { fx_t a; fx_t b; fx64_t c; } edge_t;   // A*x + B*y + C

  // ---------------- output triangle ----------------
  typedef struct packed { vec4_t win; fx_t inten; } ovtx_t;
  typedef struct packed {
    ovtx_t v0; ovtx_t v1; ovtx_t v2;
    edge_t e0; edge_t e1; edge_t e2;   // edges v0->v1, v1->v2, v2->v0
  } otri_t;

  typedef struct packed {
    logic cache_hit;
    logic cache_miss;
    logic culled;
    logic subdivided;
    logic bypassed;
    logic dq_swap;
    logic pic_stall;
    logic vpu_full_batch;
    logic vpu_light_batch;
  } ge_ev_t;

endpackage
