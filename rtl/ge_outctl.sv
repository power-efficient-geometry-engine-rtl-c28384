// ge_outctl: output control: sends finished triangles to the setup engine.
//
// Works on the oldest triangle in the primitive queue. When its three vertices are
// transformed and lit (tag unit lit flags), the triangle filter decides: if the subdivision
// level is above 0 and the highlight test of at least one vertex passed, the primitive
// processing unit is asked to subdivide it, and the output waits until all the new vertices
// are lit too; otherwise the triangle bypasses subdivision and goes out as it is (Gouraud
// shading). The small triangles are then sent one by one, in grid order, each with the
// window coordinates, 1/w and intensity of its three vertices read from the vertex cache,
// and three edge functions from the edge function recovery unit, which this block contains.
// Finally the references to the original and the generated vertices are released and the
// triangle is popped from the primitive queue. The flow is the document's; the grid
// bookkeeping, the order of the small triangles and the handshakes are this design's.
//
// Output: o_valid/o_ready handshake, one triangle (ge_pkg::otri_t) per accepted transfer.
module ge_outctl
  import ge_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] lvl,
  // primitive queue
  input  logic       pq_empty,
  input  ent_t       pq_head [3],
  output logic       pq_pop,
  // tag unit
  input  logic [NENT-1:0] lit_vec,
  input  logic [NENT-1:0] htest_vec,
  output logic       rel_valid,
  output ent_t       rel_entry,
  // primitive processing unit
  output logic       sub_req,
  output ent_t       sub_ent [3],
  input  logic       sub_done,
  input  logic       grid_we,
  input  logic [2:0] grid_i,
  input  logic [2:0] grid_j,
  input  ent_t       grid_ent,
  // vertex cache
  output ent_t       rd_addr [3],
  input  vdata_t     rd_data [3],
  // setup engine
  output logic       o_valid,
  input  logic       o_ready,
  output otri_t      o_tri,
  // events
  output logic       ev_subdiv,
  output logic       ev_bypass
);

  typedef enum logic [2:0] {O_IDLE, O_WAIT, O_SUB, O_GENLIT, O_EMIT, O_OUT, O_REL} ostate_t;
  ostate_t    st;
  ent_t       grid [5][5];
  logic [NENT-1:0] gen_mask;
  logic [1:0] elvl;               // level used for this triangle (0 when bypassed)
  logic [2:0] ns, ti, tj;
  logic       tdown;
  logic [1:0] rk;
  logic       all_lit, any_h;

  always_comb begin
    all_lit = lit_vec[pq_head[0]] && lit_vec[pq_head[1]] && lit_vec[pq_head[2]];
    any_h   = htest_vec[pq_head[0]] || htest_vec[pq_head[1]] || htest_vec[pq_head[2]];
  end

  // vertex cache reads: the original vertices while waiting, else the current small triangle
  always_comb begin
    if (st == O_WAIT) begin
      rd_addr = pq_head;
    end else if (!tdown) begin
      rd_addr[0] = grid[ti][tj];
      rd_addr[1] = grid[ti + 3'd1][tj];
      rd_addr[2] = grid[ti + 3'd1][tj + 3'd1];
    end else begin
      rd_addr[0] = grid[ti][tj];
      rd_addr[1] = grid[ti + 3'd1][tj + 3'd1];
      rd_addr[2] = grid[ti][tj + 3'd1];
    end
  end

  // edge function recovery
  logic  e_setup, e_q, e_ov;
  edge_t e0, e1, e2;
  ge_edge_recovery u_edge (
    .clk, .rst_n, .setup_valid(e_setup),
    .xa(rd_data[0].win.x), .ya(rd_data[0].win.y), .xb(rd_data[1].win.x), .yb(rd_data[1].win.y),
    .xc(rd_data[2].win.x), .yc(rd_data[2].win.y),
    .q_valid(e_q), .q_lvl(elvl), .q_i(ti), .q_j(tj), .q_down(tdown),
    .out_valid(e_ov), .e0, .e1, .e2
  );

  assign e_setup  = (st == O_WAIT) && all_lit;
  assign e_q      = (st == O_EMIT);
  assign sub_req  = (st == O_SUB);
  assign sub_ent  = pq_head;
  assign o_valid  = (st == O_OUT);
  always_comb begin
    o_tri.v0 = '{win: rd_data[0].win, inten: rd_data[0].inten};
    o_tri.v1 = '{win: rd_data[1].win, inten: rd_data[1].inten};
    o_tri.v2 = '{win: rd_data[2].win, inten: rd_data[2].inten};
    o_tri.e0 = e0;
    o_tri.e1 = e1;
    o_tri.e2 = e2;
  end

  // release: three original references, then each generated vertex once
  ent_t gen_first;
  always_comb begin
    gen_first = '0;
    for (int i = NENT - 1; i >= 0; i--) if (gen_mask[i]) gen_first = ent_t'(i);
  end
  assign rel_valid = (st == O_REL) && (rk != 2'd3 || gen_mask != '0);
  assign rel_entry = (rk != 2'd3) ? pq_head[rk] : gen_first;
  assign pq_pop    = (st == O_REL) && rk == 2'd3 && gen_mask == '0;

  assign ev_subdiv = (st == O_WAIT) && all_lit && lvl != 2'd0 && any_h;
  assign ev_bypass = (st == O_WAIT) && all_lit && !(lvl != 2'd0 && any_h);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= O_IDLE; gen_mask <= '0; elvl <= '0; ns <= 3'd1; ti <= '0; tj <= '0;
      tdown <= 1'b0; rk <= '0;
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) grid[i][j] <= '0;
    end else begin
      if (grid_we) begin
        grid[grid_i][grid_j] <= grid_ent;
        gen_mask[grid_ent] <= 1'b1;
      end
      unique case (st)
        O_IDLE: if (!pq_empty) st <= O_WAIT;
        O_WAIT: if (all_lit) begin
          logic [1:0] l;
          logic [2:0] n;
          l = (lvl != 2'd0 && any_h) ? lvl : 2'd0;
          n = 3'd1 << l;
          elvl <= l;
          ns   <= n;
          grid[0][0] <= pq_head[0];
          grid[n][0] <= pq_head[1];
          grid[n][n] <= pq_head[2];
          gen_mask <= '0;
          ti <= '0; tj <= '0; tdown <= 1'b0;
          st <= (l != 2'd0) ? O_SUB : O_EMIT;
        end
        O_SUB: if (sub_done) st <= O_GENLIT;
        O_GENLIT: if ((lit_vec & gen_mask) == gen_mask) st <= O_EMIT;
        O_EMIT: st <= O_OUT;
        O_OUT: if (o_ready) begin
          // next small triangle: up(i,j) -> down(i,j) -> up(i,j+1) ... row by row
          if (!tdown && tj < ti) tdown <= 1'b1;
          else if (tdown) begin tdown <= 1'b0; tj <= tj + 3'd1; end
          else begin
            tj <= '0;
            ti <= ti + 3'd1;
          end
          if (!tdown && tj == ti && ti + 3'd1 == ns) begin
            rk <= '0;
            st <= O_REL;
          end else st <= O_EMIT;
        end
        O_REL: begin
          if (rk != 2'd3) rk <= rk + 2'd1;
          else if (gen_mask != '0) gen_mask[gen_first] <= 1'b0;
          else st <= O_IDLE;
        end
        default: st <= O_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) e_ov |-> st == O_OUT)
    else $error("ge_outctl: edge functions out of step with the output");

endmodule
