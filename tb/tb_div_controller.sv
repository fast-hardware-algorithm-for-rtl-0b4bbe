// tb_div_controller: exhaustive test of div_controller. The expected values
// are derived from a signed delta and the update rule
//   delta := (swap ? -delta : delta) - 1,  swap = (delta < 0) & r_m
// applied twice; shift is 1 exactly when |delta| grows in that step.
module tb_div_controller;
  logic sgn, d_m, r_m, dp_m, rp_m;
  logic swap, swap_p, shift1, shift2;
  int checks = 0, failures = 0;

  div_controller dut (.sgn, .d_m, .r_m, .dp_m, .rp_m, .swap, .swap_p, .shift1, .shift2);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int delta, delta1, delta2;
    logic e_swap, e_swap_p, e_sh1, e_sh2;
    // delta in -3..3 covers every combination of (sgn, Delta_m); the second
    // step sees whatever delta' the first step produced.
    for (int dd = -3; dd <= 3; dd++)
      for (int k = 0; k < 4; k++) begin
        delta  = dd;
        r_m    = k[0];
        rp_m   = k[1];
        e_swap = (delta < 0) && r_m;
        delta1 = (e_swap ? -delta : delta) - 1;
        e_sh1  = ((delta1 < 0 ? -delta1 : delta1) > (delta < 0 ? -delta : delta));
        e_swap_p = (delta1 < 0) && rp_m;
        delta2 = (e_swap_p ? -delta1 : delta1) - 1;
        e_sh2  = ((delta2 < 0 ? -delta2 : delta2) > (delta1 < 0 ? -delta1 : delta1));
        sgn  = (delta < 0);
        d_m  = (delta == 0);
        dp_m = (delta1 == 0);
        #1;
        checks++;
        if ({swap, swap_p, shift1, shift2} !== {e_swap, e_swap_p, e_sh1, e_sh2}) begin
          failures++;
          $display("FAIL delta=%0d r_m=%b r'_m=%b got=%b exp=%b", delta, r_m, rp_m,
                   {swap, swap_p, shift1, shift2}, {e_swap, e_swap_p, e_sh1, e_sh2});
        end
        // shift2 is the sign of delta after both steps
        checks++;
        if (shift2 !== (delta2 < 0)) begin
          failures++;
          $display("FAIL sign: delta=%0d delta2=%0d shift2=%b", delta, delta2, shift2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
