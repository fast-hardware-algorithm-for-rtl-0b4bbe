// rs_cell: one bit slice j of RS-calc, the R(x)/S(x) half of the GF(2^m)
// divider. Each clock cycle the divider performs two steps of the extended
// Euclid iteration on R and S; this slice computes coefficient j of both steps.
//
//   first step  : r'_j = r_{j-1} ^ (r_m & s_{j-1})      (R' = (R - r_m*S) * x)
//                 s'_j = swap  ? r_j  : s_j              (S' = SEL(swap, R, S))
//   second step : new r_j = r'_{j-1} ^ (r'_m & s'_{j-1})
//                 new s_j = swap' ? r'_j : s'_j
//
// Purely combinational. The neighbouring slice j-1 supplies r_{j-1}, s_{j-1},
// r'_{j-1} and s'_{j-1}; r_m, r'_m, swap and swap' are broadcast to every
// slice. The equations and port set follow the published bit-slice cell; the
// signal names (suffix _p for a primed value, _jm1 for index j-1, _nx for
// the value written back to the register) are this design's.
module rs_cell (
  input  logic r_j,     // r_j    (Reg-R)
  input  logic s_j,     // s_j    (Reg-S)
  input  logic r_jm1,   // r_{j-1}
  input  logic s_jm1,   // s_{j-1}
  input  logic rp_jm1,  // r'_{j-1} from slice j-1
  input  logic sp_jm1,  // s'_{j-1} from slice j-1
  input  logic r_m,     // leading coefficient of R
  input  logic rp_m,    // leading coefficient of R'
  input  logic swap,
  input  logic swap_p,
  output logic rp_j,    // r'_j
  output logic sp_j,    // s'_j
  output logic r_j_nx,  // r_j after both steps
  output logic s_j_nx   // s_j after both steps
);
  always_comb begin
    rp_j   = r_jm1 ^ (r_m & s_jm1);
    sp_j   = swap ? r_j : s_j;
    r_j_nx = rp_jm1 ^ (rp_m & sp_jm1);
    s_j_nx = swap_p ? rp_j : sp_j;
  end
endmodule
