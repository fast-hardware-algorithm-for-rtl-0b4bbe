// tb_rs_cell: exhaustive test of rs_cell over all 1024 input combinations.
// The expected outputs are computed here from the two-step Euclid update
// written with if/else instead of the cell's XOR/AND form.
module tb_rs_cell;
  logic [9:0] in;
  logic rp_j, sp_j, r_j_nx, s_j_nx;
  int checks = 0, failures = 0;

  rs_cell dut (
    .r_j(in[0]), .s_j(in[1]), .r_jm1(in[2]), .s_jm1(in[3]),
    .rp_jm1(in[4]), .sp_jm1(in[5]), .r_m(in[6]), .rp_m(in[7]),
    .swap(in[8]), .swap_p(in[9]),
    .rp_j, .sp_j, .r_j_nx, .s_j_nx
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_rp, e_sp, e_r, e_s;
    for (int k = 0; k < 1024; k++) begin
      in = 10'(k);
      #1;
      e_rp = in[6] ? (in[2] != in[3]) : in[2];
      e_sp = in[8] ? in[0] : in[1];
      e_r  = in[7] ? (in[4] != in[5]) : in[4];
      e_s  = in[9] ? e_rp : e_sp;
      checks++;
      if ({rp_j, sp_j, r_j_nx, s_j_nx} !== {e_rp, e_sp, e_r, e_s}) begin
        failures++;
        $display("FAIL in=%b got=%b exp=%b", in, {rp_j, sp_j, r_j_nx, s_j_nx},
                 {e_rp, e_sp, e_r, e_s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
