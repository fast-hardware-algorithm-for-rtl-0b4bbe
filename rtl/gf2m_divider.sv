// gf2m_divider: sequential divider in GF(2^m), result = A(x) / B(x) mod G(x),
// in M iteration cycles.
//
// It runs the extended Euclid algorithm on the pairs (R, S) = (B, G) and
// (U, V) = (A, 0), with delta tracking the degree difference of R and S.
// Each cycle performs two Euclid steps; the division of V by x that undoes
// the x^m factor of the quotient is folded into the second step, and the two
// modular reductions of a cycle (U' mod G and V'/x mod G) are computed in
// parallel rather than in series. After M cycles Reg-V holds A/B.
//
// Structure (one block per published register/datapath unit):
//   Reg-R, Reg-S (M+1 bits)  -> rs_calc     (M+1 rs_cells)
//   Reg-U, Reg-V (M bits)    -> uv_calc     (M uv_cells + uv_cell2)
//   Reg-G (M+1 bits)         -> read by uv_calc
//   Reg-Delta (M+1 bits)     -> delta_calc  (1-hot |delta|, M+1 delta_cells)
//   Reg-sgn (1 bit)          -> div_controller (swap, swap', shift1, shift2)
// plus div_sequencer, this design's start/busy/done counter.
//
// Interface: present a, b (nonzero) and g (g[M] = g[0] = 1, irreducible)
// with start = 1 while busy = 0. The edge that samples start loads
// R = B, S = G, U = A, V = 0, G, Delta = 2^M (delta = 0), sgn = 0; the next
// M edges iterate; done then rises and result (= Reg-V) stays valid until
// the next start. Latency M cycles after the load edge; a new division can
// be started in the cycle done is high, so back-to-back throughput is one
// result per M+1 cycles (load cycle included).
module gf2m_divider #(
  parameter int M = 128  // field degree m
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M:0]   g,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] result
);
  logic load, iter;

  logic [M:0]   r_q, s_q, g_q, d_q;
  logic [M-1:0] u_q, v_q;
  logic         sgn_q;

  logic [M:0]   r_nx, s_nx, d_nx;
  logic [M-1:0] u_nx, v_nx;
  logic         rp_m, dp_m;
  logic         swap, swap_p, shift1, shift2;

  div_sequencer #(.M(M)) u_seq (
    .clk, .rst_n, .start, .load, .iter, .busy, .done
  );

  // Registers (loaded with the initial values of the algorithm)
  load_reg #(.W(M+1)) u_reg_r   (.clk, .rst_n, .load, .load_val({1'b0, b}),
                                 .en(iter), .d(r_nx), .q(r_q));
  load_reg #(.W(M+1)) u_reg_s   (.clk, .rst_n, .load, .load_val(g),
                                 .en(iter), .d(s_nx), .q(s_q));
  load_reg #(.W(M))   u_reg_u   (.clk, .rst_n, .load, .load_val(a),
                                 .en(iter), .d(u_nx), .q(u_q));
  load_reg #(.W(M))   u_reg_v   (.clk, .rst_n, .load, .load_val('0),
                                 .en(iter), .d(v_nx), .q(v_q));
  load_reg #(.W(M+1)) u_reg_g   (.clk, .rst_n, .load, .load_val(g),
                                 .en(1'b0), .d(g_q), .q(g_q));
  load_reg #(.W(M+1)) u_reg_d   (.clk, .rst_n, .load,
                                 .load_val({1'b1, {M{1'b0}}}),
                                 .en(iter), .d(d_nx), .q(d_q));
  load_reg #(.W(1))   u_reg_sgn (.clk, .rst_n, .load, .load_val(1'b0),
                                 .en(iter), .d(shift2), .q(sgn_q));

  // Datapath and control
  div_controller u_ctrl (
    .sgn(sgn_q), .d_m(d_q[M]), .r_m(r_q[M]), .dp_m, .rp_m,
    .swap, .swap_p, .shift1, .shift2
  );

  rs_calc #(.M(M)) u_rs_calc (
    .r(r_q), .s(s_q), .swap, .swap_p, .rp_m, .r_nx, .s_nx
  );

  uv_calc #(.M(M)) u_uv_calc (
    .u(u_q), .v(v_q), .g(g_q), .r_m(r_q[M]), .rp_m, .swap, .swap_p,
    .u_nx, .v_nx
  );

  delta_calc #(.M(M)) u_delta_calc (
    .d(d_q), .shift1, .shift2, .dp_m, .d_nx
  );

  assign result = v_q;

`ifndef SYNTHESIS
  // The one-hot counter must stay one-hot while a division runs. (The
  // disable clause makes lint note rst_n as used both synchronously and
  // asynchronously; it only affects this check.)
  a_delta_onehot : assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> $onehot(d_q));
`endif
endmodule
