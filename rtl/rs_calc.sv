// rs_calc: the R(x)/S(x) datapath of the divider, m+1 rs_cell slices
// (coefficients 0..m). Per clock cycle it applies two extended-Euclid steps:
//   R' = (R - r_m*S) * x,      S' = SEL(swap, R, S)
//   R  = (R' - r'_m*S') * x,   S  = SEL(swap', R', S')
// Subtraction in GF(2) is XOR. Multiplication by x is a shift of one slice,
// so slice 0 receives zeros from below. S always has s_m = 1, so when
// r_m = 1 the subtraction clears the x^m term before the shift and nothing
// is lost at the top. r'_m, the leading coefficient of R', is returned to
// the controller, which needs it for swap' and shift2. r_nx[0] is always 0
// (R leaves each cycle multiplied by x); the slice is kept so that all m+1
// slices are identical, as in the published structure. For the same reason
// s'_m, which slice m uses internally, has no reader outside it.
// Combinational; the slice structure follows the published block diagram,
// the boundary zeros are this design's.
module rs_calc #(
  parameter int M = 128  // field degree m
) (
  input  logic [M:0] r,       // Reg-R
  input  logic [M:0] s,       // Reg-S
  input  logic       swap,
  input  logic       swap_p,
  output logic       rp_m,    // r'_m
  output logic [M:0] r_nx,    // new R
  output logic [M:0] s_nx     // new S
);
  logic [M:0] rp, sp;   // R', S'

  assign rp_m = rp[M];

  for (genvar j = 0; j <= M; j++) begin : g_slice
    logic r_jm1, s_jm1, rp_jm1, sp_jm1;
    if (j == 0) begin : g_lsb
      assign r_jm1  = 1'b0;
      assign s_jm1  = 1'b0;
      assign rp_jm1 = 1'b0;
      assign sp_jm1 = 1'b0;
    end else begin : g_mid
      assign r_jm1  = r[j-1];
      assign s_jm1  = s[j-1];
      assign rp_jm1 = rp[j-1];
      assign sp_jm1 = sp[j-1];
    end
    rs_cell u_cell (
      .r_j   (r[j]),   .s_j   (s[j]),
      .r_jm1 (r_jm1),  .s_jm1 (s_jm1),
      .rp_jm1(rp_jm1), .sp_jm1(sp_jm1),
      .r_m   (r[M]),   .rp_m  (rp_m),
      .swap  (swap),   .swap_p(swap_p),
      .rp_j  (rp[j]),  .sp_j  (sp[j]),
      .r_j_nx(r_nx[j]), .s_j_nx(s_nx[j])
    );
  end
endmodule
