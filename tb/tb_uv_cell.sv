// tb_uv_cell: exhaustive test of uv_cell over all 2^14 input combinations.
// Expected values are written as the polynomial operations they implement:
// conditional subtraction, selection, reduction and division by x.
module tb_uv_cell;
  logic [13:0] in;
  logic up_j, vp_j, u_j_nx, v_j_nx;
  int checks = 0, failures = 0;

  // in[0]=u_j in[1]=v_j in[2]=u_{j-1} in[3]=v_{j-1} in[4]=r_m in[5]=swap
  // in[6]=u'_{j+1} in[7]=v'_{j+1} in[8]=r'_m in[9]=u'_m in[10]=v'_0
  // in[11]=swap' in[12]=g_j in[13]=g_{j+1}
  uv_cell dut (
    .u_j(in[0]), .v_j(in[1]), .u_jm1(in[2]), .v_jm1(in[3]), .r_m(in[4]),
    .swap(in[5]), .up_jp1(in[6]), .vp_jp1(in[7]), .rp_m(in[8]),
    .up_m(in[9]), .vp_0(in[10]), .swap_p(in[11]), .g_j(in[12]),
    .g_jp1(in[13]), .up_j, .vp_j, .u_j_nx, .v_j_nx
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_up, e_vp, e_u, e_v, red;
    for (int k = 0; k < (1 << 14); k++) begin
      in = 14'(k);
      #1;
      e_up = in[4] ? (in[2] != in[3]) : in[2];
      e_vp = in[5] ? in[0] : in[1];
      red  = in[9] ? (e_up != in[12]) : e_up;        // U' mod G
      e_u  = in[8] ? (red != e_vp) : red;             // - r'_m V'
      if (in[11]) e_v = in[6];                        // U'/x
      else if (in[10]) e_v = (in[7] != in[13]);       // (V' + G)/x
      else e_v = in[7];                               // V'/x
      checks++;
      if ({up_j, vp_j, u_j_nx, v_j_nx} !== {e_up, e_vp, e_u, e_v}) begin
        failures++;
        if (failures < 10)
          $display("FAIL in=%b got=%b exp=%b", in, {up_j, vp_j, u_j_nx, v_j_nx},
                   {e_up, e_vp, e_u, e_v});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
