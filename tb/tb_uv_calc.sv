// tb_uv_calc: uv_calc at its default size against a whole-polynomial model
// of one cycle of the U/V update:
//   U' = (U + r_m V) x (unreduced), V' = swap ? U : V
//   U  = (U' mod G) + r'_m V'
//   V  = swap' ? U'/x : V'/x mod G
// with random U, V, control bits and G(x) = x^128 + x^7 + x^2 + x + 1.
module tb_uv_calc;
  localparam int M = 128;
  localparam logic [M:0] G = (129'd1 << 128) | 129'h87;
  logic [M-1:0] u, v, u_nx, v_nx;
  logic r_m, rp_m, swap, swap_p;
  int checks = 0, failures = 0;

  uv_calc dut (.u, .v, .g(G), .r_m, .rp_m, .swap, .swap_p, .u_nx, .v_nx);

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] x;
    for (int i = 0; i < M; i += 32) x = {x[M-33:0], 32'($urandom)};
    return x;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M:0]   e_up, red, vdiv;
    logic [M-1:0] e_vp, e_u, e_v;
    for (int k = 0; k < 4000; k++) begin
      u = rnd();
      v = rnd();
      {r_m, rp_m, swap, swap_p} = 4'($urandom);
      #1;
      e_up = {1'b0, u ^ (r_m ? v : '0)} << 1;
      e_vp = swap ? u : v;
      red  = e_up[M] ? (e_up ^ G) : e_up;
      e_u  = red[M-1:0] ^ (rp_m ? e_vp : '0);
      vdiv = e_vp[0] ? ({1'b0, e_vp} ^ G) : {1'b0, e_vp};
      e_v  = swap_p ? e_up[M:1] : vdiv[M:1];
      checks++;
      if (u_nx !== e_u || v_nx !== e_v) begin
        failures++;
        if (failures < 5)
          $display("FAIL u=%h v=%h ctl=%b%b%b%b: u_nx=%h exp %h, v_nx=%h exp %h",
                   u, v, r_m, rp_m, swap, swap_p, u_nx, e_u, v_nx, e_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
