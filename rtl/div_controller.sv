// div_controller: the control logic of the divider. From the sign of delta
// (sgn = 1 when delta < 0), the 1-hot bit Delta_m (set when delta = 0) and
// the leading coefficients r_m of R and r'_m of R' it derives, for the two
// Euclid steps of one clock cycle:
//   swap   = sgn & r_m                  exchange roles of R/S and U/V
//   shift1 = Delta_m | (sgn & ~r_m)     |delta| grows in step 1; also sgn'
//   swap'  = shift1 & r'_m              (sgn' = shift1)
//   shift2 = Delta'_m | (shift1 & ~r'_m)
//                                        |delta| grows in step 2; also the
//                                        next value of Reg-sgn
// Combinational. delta = 0 or (delta < 0 and no subtraction) makes delta
// more negative; every other case decrements |delta| and leaves delta >= 0.
// The equations follow the published update rules for |delta| and sgn; the
// first step tests Delta_m and the second Delta'_m, the only reading in which
// each step sees its own delta.
module div_controller (
  input  logic sgn,     // Reg-sgn: delta < 0
  input  logic d_m,     // Delta_m  : delta  = 0
  input  logic r_m,     // leading coefficient of R
  input  logic dp_m,    // Delta'_m : delta' = 0
  input  logic rp_m,    // leading coefficient of R'
  output logic swap,
  output logic swap_p,
  output logic shift1,
  output logic shift2
);
  always_comb begin
    swap   = sgn & r_m;
    shift1 = d_m | (sgn & ~r_m);
    swap_p = shift1 & rp_m;
    shift2 = dp_m | (shift1 & ~rp_m);
  end
endmodule
