// uv_calc: the U(x)/V(x) datapath of the divider, m uv_cell slices
// (coefficients 0..m-1) plus uv_cell2 for the x^m coefficient of U'. Per
// clock cycle it applies
//   U' = (U - r_m*V) * x            (left unreduced, degree <= m)
//   V' = SEL(swap, U, V)
//   U  = (U' mod G) - r'_m*V'
//   V  = SEL(swap', U', V'/x mod G) / x   i.e. U'/x  or  V'/x mod G
// The reduction of U' (driven by u'_m) and the reduction of V'/x (driven by
// v'_0) happen in parallel, which is what lets two Euclid steps fit into
// one cycle; over the m cycles V is divided by x exactly m times, undoing
// the factor x^m the Euclid steps put on the quotient.
// Combinational. Boundary values (u_{-1} = v_{-1} = 0, v'_m = 0) are this
// design's; the rest follows the published slice structure.
module uv_calc #(
  parameter int M = 128  // field degree m
) (
  input  logic [M-1:0] u,      // Reg-U
  input  logic [M-1:0] v,      // Reg-V
  input  logic [M:0]   g,      // Reg-G
  input  logic         r_m,
  input  logic         rp_m,   // r'_m
  input  logic         swap,
  input  logic         swap_p,
  output logic [M-1:0] u_nx,
  output logic [M-1:0] v_nx
);
  logic [M:0]   up;   // U', coefficients 0..m
  logic [M-1:0] vp;   // V'

  uv_cell2 u_cell2 (.u_mm1(u[M-1]), .v_mm1(v[M-1]), .r_m(r_m), .up_m(up[M]));

  for (genvar j = 0; j < M; j++) begin : g_slice
    logic u_jm1, v_jm1, vp_jp1;
    if (j == 0) begin : g_lsb
      assign u_jm1 = 1'b0;
      assign v_jm1 = 1'b0;
    end else begin : g_low
      assign u_jm1 = u[j-1];
      assign v_jm1 = v[j-1];
    end
    if (j == M-1) begin : g_msb
      assign vp_jp1 = 1'b0;
    end else begin : g_high
      assign vp_jp1 = vp[j+1];
    end
    uv_cell u_cell (
      .u_j   (u[j]),    .v_j   (v[j]),
      .u_jm1 (u_jm1),   .v_jm1 (v_jm1),
      .r_m   (r_m),     .swap  (swap),
      .up_jp1(up[j+1]), .vp_jp1(vp_jp1),
      .rp_m  (rp_m),    .up_m  (up[M]),
      .vp_0  (vp[0]),   .swap_p(swap_p),
      .g_j   (g[j]),    .g_jp1 (g[j+1]),
      .up_j  (up[j]),   .vp_j  (vp[j]),
      .u_j_nx(u_nx[j]), .v_j_nx(v_nx[j])
    );
  end
endmodule
