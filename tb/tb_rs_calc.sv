// tb_rs_calc: rs_calc at its default size against a whole-polynomial model:
//   R' = (R + r_m*S) * x, S' = swap ? R : S,
//   R  = (R' + r'_m*S') * x, S = swap' ? R' : S'   (coefficients 0..M)
// with random R, S, swap and swap'.
module tb_rs_calc;
  localparam int M = 128;
  logic [M:0] r, s, r_nx, s_nx;
  logic swap, swap_p, rp_m;
  int checks = 0, failures = 0;

  rs_calc dut (.r, .s, .swap, .swap_p, .rp_m, .r_nx, .s_nx);

  function automatic logic [M:0] rnd();
    logic [M:0] x;
    for (int i = 0; i <= M; i += 32) x = {x[M-32:0], 32'($urandom)};
    return x;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M:0] e_rp, e_sp, e_r, e_s;
    for (int k = 0; k < 2000; k++) begin
      r = rnd();
      s = rnd();
      if (k % 4 == 0) s[M] = 1'b1;  // the divider keeps s_m = 1
      swap   = 1'($urandom);
      swap_p = 1'($urandom);
      #1;
      e_rp = (r ^ (r[M] ? s : '0)) << 1;
      e_sp = swap ? r : s;
      e_r  = (e_rp ^ (e_rp[M] ? e_sp : '0)) << 1;
      e_s  = swap_p ? e_rp : e_sp;
      checks++;
      if (rp_m !== e_rp[M] || r_nx !== e_r || s_nx !== e_s) begin
        failures++;
        if (failures < 5)
          $display("FAIL r=%h s=%h swap=%b swap'=%b: r_nx=%h exp %h, s_nx=%h exp %h",
                   r, s, swap, swap_p, r_nx, e_r, s_nx, e_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
