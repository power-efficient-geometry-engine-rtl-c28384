// ge_ppu: primitive processing unit: object-space backface culling and forward-difference
// subdivision.
//
// Culling (request from the primitive input control): the three object-space positions are
// loaded from the vertex cache into the input buffers; the face normal
// n = (p1 - p0) x (p2 - p0) is tested against the eye position in object space, held in the
// eye position buffer that the host sets: the triangle is a back face when
// n . (eye - p0) <= 0 (counter-clockwise front faces, this design's convention). The test is
// computed at full precision, so only its sign matters. Culling in object space before any
// transform, and culling the original triangle only, are the document's.
//
// Subdivision (request from the output control, for a triangle whose three vertices are
// transformed and lit and that passed the highlight test): dual-space, perspective-incorrect
// subdivision as the document proposes. Ten components per vertex are interpolated: eye
// position (3), eye normal (3), window x, y, z and 1/w_clip (4). With Ns = 2^L,
// dx = (Vc - Vb) / Ns and dy = (Vb - Va) / Ns (arithmetic shifts); row starts follow
// V(i,0) = V(i-1,0) + dy, points along a row V(i,j) = V(i,j-1) + dx, the last row starting
// again from the original Vb (document Eqs. 2.1-2.5 for Ns = 2). Each new vertex takes a
// free cache entry (ga_*), is written to the vertex cache (eye, n_eye, win fields), pushed
// into the second dispatch queue for lighting, and reported on grid_* so that the output
// control can assemble the small triangles. One new vertex per cycle unless a handshake
// stalls. When done, the dispatch queue is flushed and sub_done pulses.
// Interfaces and the one-request-at-a-time control are this design's.
module ge_ppu
  import ge_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       eye_we,
  input  vec3_t      eye_obj,
  input  logic [1:0] lvl,
  // culling
  input  logic       cull_req,
  input  ent_t       cull_ent [3],
  output logic       cull_done,
  output logic       cull_back,
  // subdivision
  input  logic       sub_req,
  input  ent_t       sub_ent [3],
  output logic       sub_done,
  output logic       grid_we,
  output logic [2:0] grid_i,
  output logic [2:0] grid_j,
  output ent_t       grid_ent,
  // vertex cache
  output ent_t       rd_addr [3],
  input  vdata_t     rd_data [3],
  output logic       wr_en,
  output ent_t       wr_addr,
  output vdata_t     wr_data,
  // tag unit: allocation of generated vertices
  output logic       ga_valid,
  input  logic       ga_ready,
  input  ent_t       ga_entry,
  // second dispatch queue
  output logic       dq_push,
  output ent_t       dq_entry,
  input  logic       dq_ready,
  output logic       dq_flush
);

  typedef fx_t comp10_t [10];
  typedef enum logic [2:0] {S_IDLE, S_CULL, S_LOAD, S_GEN, S_DONE} state_t;
  state_t st;

  vec3_t   eye_buf;
  vec3_t   pbuf [3];          // culling input buffers
  comp10_t vb_b, dx, dy, row, cur;
  logic [2:0] gi, gj, ns;
  logic       is_orig;

  function automatic comp10_t pack10(vdata_t v);
    comp10_t r;
    r = '{v.eye.x, v.eye.y, v.eye.z, v.n_eye.x, v.n_eye.y, v.n_eye.z,
          v.win.x, v.win.y, v.win.z, v.win.w};
    return r;
  endfunction

  always_comb begin
    for (int k = 0; k < 3; k++) rd_addr[k] = (st == S_IDLE && !(cull_req && !cull_done)) ? sub_ent[k] : cull_ent[k];
  end

  // culling test on the input buffers
  logic signed [127:0] d1 [3], d2 [3], ev [3], nx, ny, nz, dotp;
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      d1[k] = 128'(signed'((k == 0) ? pbuf[1].x - 33'(pbuf[0].x) : (k == 1) ? pbuf[1].y - 33'(pbuf[0].y) : pbuf[1].z - 33'(pbuf[0].z)));
      d2[k] = 128'(signed'((k == 0) ? pbuf[2].x - 33'(pbuf[0].x) : (k == 1) ? pbuf[2].y - 33'(pbuf[0].y) : pbuf[2].z - 33'(pbuf[0].z)));
      ev[k] = 128'(signed'((k == 0) ? eye_buf.x - 33'(pbuf[0].x) : (k == 1) ? eye_buf.y - 33'(pbuf[0].y) : eye_buf.z - 33'(pbuf[0].z)));
    end
    nx = d1[1] * d2[2] - d1[2] * d2[1];
    ny = d1[2] * d2[0] - d1[0] * d2[2];
    nz = d1[0] * d2[1] - d1[1] * d2[0];
    dotp = nx * ev[0] + ny * ev[1] + nz * ev[2];
  end

  assign is_orig = (gi == ns) && (gj == 3'd0 || gj == ns);

  logic emit;
  assign emit     = (st == S_GEN) && !is_orig && ga_ready && dq_ready;
  assign ga_valid = (st == S_GEN) && !is_orig && dq_ready;
  assign dq_push  = emit;
  assign dq_entry = ga_entry;
  assign wr_en    = emit;
  assign wr_addr  = ga_entry;
  assign grid_we  = emit;
  assign grid_i   = gi;
  assign grid_j   = gj;
  assign grid_ent = ga_entry;
  always_comb begin
    wr_data = '0;
    wr_data.eye   = '{cur[0], cur[1], cur[2]};
    wr_data.n_eye = '{cur[3], cur[4], cur[5]};
    wr_data.win   = '{cur[6], cur[7], cur[8], cur[9]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      eye_buf <= '0;
      for (int k = 0; k < 3; k++) pbuf[k] <= '0;
      for (int c = 0; c < 10; c++) begin vb_b[c] <= '0; dx[c] <= '0; dy[c] <= '0; row[c] <= '0; cur[c] <= '0; end
      gi <= '0; gj <= '0; ns <= '0;
      cull_done <= 1'b0; cull_back <= 1'b0; sub_done <= 1'b0; dq_flush <= 1'b0;
    end else begin
      cull_done <= 1'b0;
      sub_done  <= 1'b0;
      dq_flush  <= 1'b0;
      if (eye_we) eye_buf <= eye_obj;
      unique case (st)
        S_IDLE: begin
          // a request is taken again only after its done pulse has been seen
          if (cull_req && !cull_done) begin
            for (int k = 0; k < 3; k++) pbuf[k] <= rd_data[k].p_obj;
            st <= S_CULL;
          end else if (sub_req && !sub_done) begin
            comp10_t va, vbv, vc;
            va  = pack10(rd_data[0]);
            vbv = pack10(rd_data[1]);
            vc  = pack10(rd_data[2]);
            for (int c = 0; c < 10; c++) begin
              dx[c]   <= (vc[c] - vbv[c]) >>> lvl;
              dy[c]   <= (vbv[c] - va[c]) >>> lvl;
              row[c]  <= va[c];
              vb_b[c] <= vbv[c];
            end
            ns <= 3'd1 << lvl;
            st <= S_LOAD;
          end
        end
        S_CULL: begin
          cull_done <= 1'b1;
          cull_back <= (dotp <= 0);
          st <= S_IDLE;
        end
        S_LOAD: begin
          // first generated point: V(1,0) = Va + dy (or Vb when Ns = 1, which never subdivides)
          for (int c = 0; c < 10; c++) begin
            row[c] <= row[c] + dy[c];
            cur[c] <= (ns == 3'd1) ? vb_b[c] : row[c] + dy[c];
          end
          gi <= 3'd1; gj <= 3'd0;
          st <= (ns == 3'd1) ? S_DONE : S_GEN;
        end
        S_GEN: begin
          if (emit || is_orig) begin
            if (gi == ns && gj == ns) st <= S_DONE;
            else if (gj < gi) begin
              gj <= gj + 3'd1;
              for (int c = 0; c < 10; c++) cur[c] <= cur[c] + dx[c];
            end else begin
              gi <= gi + 3'd1;
              gj <= 3'd0;
              for (int c = 0; c < 10; c++) begin
                row[c] <= row[c] + dy[c];
                cur[c] <= (gi + 3'd1 == ns) ? vb_b[c] : row[c] + dy[c];
              end
            end
          end
        end
        S_DONE: begin
          dq_flush <= 1'b1;
          sub_done <= 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
