// tb_uv_cell2: exhaustive test of uv_cell2 (u'_m = u_{m-1} - r_m*v_{m-1}).
module tb_uv_cell2;
  logic [2:0] in;
  logic up_m;
  int checks = 0, failures = 0;

  uv_cell2 dut (.u_mm1(in[0]), .v_mm1(in[1]), .r_m(in[2]), .up_m);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int k = 0; k < 8; k++) begin
      in = 3'(k);
      #1;
      e = in[2] ? (in[0] != in[1]) : in[0];
      checks++;
      if (up_m !== e) begin
        failures++;
        $display("FAIL in=%b got=%b exp=%b", in, up_m, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
