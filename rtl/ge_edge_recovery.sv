// ge_edge_recovery: edge functions of subdivided triangles by edge function recovery.
//
// Subdividing a triangle by forward differences leaves rounding error in the new vertices,
// so edge functions computed from them would not match along an edge shared with a
// neighbouring triangle and pixels would be lost. Instead, the edge functions of every small
// triangle are derived from the original triangle's, because each small edge is parallel to
// an original edge and offset from it by a whole number of steps:
//   setup  (step 1): A_ab = ya - yb, B_ab = xb - xa, C_ab = xa*yb - xb*ya, likewise bc, ca;
//          (step 2): dC_ab = (B_ab*A_bc - A_ab*B_bc) / Ns, and cyclically for bc and ca;
//   query  (step 3): small edge = (A, B, C + k*dC) for an original edge, or its negation for
//          the inverted ("down") small triangles; k follows from the triangle's grid place.
// Setup takes 12 multiplications, a query only small-integer multiples and additions. Both
// steps and the dC formula for N_s = 2 are the document's; the generalisation to N_s = 2^L,
// the grid numbering and the orientation of the inverted triangles are this design's.
//
// Grid: V(i,j) = Va + i*(Vb-Va)/Ns + j*(Vc-Vb)/Ns, 0 <= j <= i <= Ns. For row i (0..Ns-1) the
// "up" triangles are (V(i,j), V(i+1,j), V(i+1,j+1)), j = 0..i, and the "down" ones
// (V(i,j), V(i+1,j+1), V(i,j+1)), j = 0..i-1. Level 0 with i = j = 0 gives the original.
// Edges are returned as v0->v1, v1->v2, v2->v0 of that vertex order.
// Numbers: coordinates Q16.16; A, B Q16.16; C and dC exact Q32.32 (64-bit).
// Timing: setup_valid loads the original triangle (registered, usable the next cycle);
// q_valid with (q_lvl, q_i, q_j, q_down) gives out_valid and the three edges one cycle later.
module ge_edge_recovery
  import ge_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       setup_valid,
  input  fx_t        xa, ya, xb, yb, xc, yc,
  input  logic       q_valid,
  input  logic [1:0] q_lvl,
  input  logic [2:0] q_i,
  input  logic [2:0] q_j,
  input  logic       q_down,
  output logic       out_valid,
  output edge_t      e0, e1, e2
);

  edge_t ab, bc, ca;
  fx64_t dab, dbc, dca;   // (B*A' - A*B') terms, i.e. -2*area, before the division by Ns

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ab <= '0; bc <= '0; ca <= '0; dab <= '0; dbc <= '0; dca <= '0;
    end else if (setup_valid) begin
      ab  <= '{a: ya - yb, b: xb - xa, c: fx64_t'(xa) * fx64_t'(yb) - fx64_t'(xb) * fx64_t'(ya)};
      bc  <= '{a: yb - yc, b: xc - xb, c: fx64_t'(xb) * fx64_t'(yc) - fx64_t'(xc) * fx64_t'(yb)};
      ca  <= '{a: yc - ya, b: xa - xc, c: fx64_t'(xc) * fx64_t'(ya) - fx64_t'(xa) * fx64_t'(yc)};
      dab <= (fx64_t'(xb) - fx64_t'(xa)) * (fx64_t'(yb) - fx64_t'(yc)) - (fx64_t'(ya) - fx64_t'(yb)) * (fx64_t'(xc) - fx64_t'(xb));
      dbc <= (fx64_t'(xc) - fx64_t'(xb)) * (fx64_t'(yc) - fx64_t'(ya)) - (fx64_t'(yb) - fx64_t'(yc)) * (fx64_t'(xa) - fx64_t'(xc));
      dca <= (fx64_t'(xa) - fx64_t'(xc)) * (fx64_t'(ya) - fx64_t'(yb)) - (fx64_t'(yc) - fx64_t'(ya)) * (fx64_t'(xb) - fx64_t'(xa));
    end
  end

  function automatic edge_t shifted(edge_t e, fx64_t dc, logic [3:0] k, logic neg);
    edge_t r;
    fx64_t cc;
    cc = e.c + fx64_t'(k) * dc;
    r = '{a: neg ? -e.a : e.a, b: neg ? -e.b : e.b, c: neg ? -cc : cc};
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; e0 <= '0; e1 <= '0; e2 <= '0;
    end else begin
      out_valid <= q_valid;
      if (q_valid) begin
        fx64_t sab, sbc, sca;
        logic [3:0] ns, i4, j4;
        ns  = 4'd1 << q_lvl;
        i4  = 4'(q_i);
        j4  = 4'(q_j);
        sab = dab >>> q_lvl;
        sbc = dbc >>> q_lvl;
        sca = dca >>> q_lvl;
        if (!q_down) begin
          e0 <= shifted(ab, sab, j4, 1'b0);
          e1 <= shifted(bc, sbc, ns - 4'd1 - i4, 1'b0);
          e2 <= shifted(ca, sca, i4 - j4, 1'b0);
        end else begin
          e0 <= shifted(ca, sca, i4 - j4, 1'b1);
          e1 <= shifted(ab, sab, j4 + 4'd1, 1'b1);
          e2 <= shifted(bc, sbc, ns - i4, 1'b1);
        end
      end
    end
  end

endmodule
