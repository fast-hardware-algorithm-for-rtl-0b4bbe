// uv_cell2: the leftmost slice of UV-calc. It produces u'_m, the coefficient
// of x^m in the unreduced U'(x) = (U(x) - r_m*V(x)) * x:
//   u'_m = u_{m-1} ^ (r_m & v_{m-1})
// u'_m is broadcast to every uv_cell, where it selects the reduction of U'
// by G(x), and feeds slice m-1 as its u'_{j+1}. Combinational; function and
// ports follow the published cell.
module uv_cell2 (
  input  logic u_mm1,  // u_{m-1}
  input  logic v_mm1,  // v_{m-1}
  input  logic r_m,
  output logic up_m    // u'_m
);
  assign up_m = u_mm1 ^ (r_m & v_mm1);
endmodule
