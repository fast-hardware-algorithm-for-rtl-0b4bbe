// uv_cell: one bit slice j (0 <= j < m) of UV-calc, the U(x)/V(x) half of the
// GF(2^m) divider. It performs the two merged Euclid steps on U and V with
// both modular reductions side by side instead of one after the other:
//
//   u'_j    = u_{j-1} ^ (r_m & v_{j-1})        U' = (U - r_m*V) * x, unreduced
//   v'_j    = swap ? u_j : v_j                 V' = SEL(swap, U, V)
//   new u_j = u'_j ^ (u'_m & g_j) ^ (r'_m & v'_j)
//             (U' mod G, then subtract r'_m * V')
//   new v_j = swap' ? u'_{j+1}                 U'/x: exact, u'_0 is always 0
//                   : v'_{j+1} ^ (v'_0 & g_{j+1})   V'/x mod G
//
// Purely combinational. u'_m comes from uv_cell2, v'_0 from slice 0,
// u'_{j+1} and v'_{j+1} from slice j+1. The equations and port set follow
// the published cell; the reduction of V'/x uses the constant coefficient
// v'_0, as division by x modulo G requires.
module uv_cell (
  input  logic u_j,
  input  logic v_j,
  input  logic u_jm1,   // u_{j-1}
  input  logic v_jm1,   // v_{j-1}
  input  logic r_m,
  input  logic swap,
  input  logic up_jp1,  // u'_{j+1}
  input  logic vp_jp1,  // v'_{j+1}
  input  logic rp_m,    // r'_m
  input  logic up_m,    // u'_m
  input  logic vp_0,    // v'_0
  input  logic swap_p,  // swap'
  input  logic g_j,
  input  logic g_jp1,   // g_{j+1}
  output logic up_j,    // u'_j
  output logic vp_j,    // v'_j
  output logic u_j_nx,
  output logic v_j_nx
);
  always_comb begin
    up_j   = u_jm1 ^ (r_m & v_jm1);
    vp_j   = swap ? u_j : v_j;
    u_j_nx = up_j ^ (up_m & g_j) ^ (rp_m & vp_j);
    v_j_nx = swap_p ? up_jp1 : (vp_jp1 ^ (vp_0 & g_jp1));
  end
endmodule
