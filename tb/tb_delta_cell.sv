// tb_delta_cell: exhaustive test of delta_cell: with shift = 1 the bit
// from above (j+1) moves in, with shift = 0 the bit from below (j-1).
module tb_delta_cell;
  logic [5:0] in;
  logic dp_j, d_j_nx;
  int checks = 0, failures = 0;

  delta_cell dut (
    .d_jp1(in[0]), .d_jm1(in[1]), .dp_jp1(in[2]), .dp_jm1(in[3]),
    .shift1(in[4]), .shift2(in[5]), .dp_j, .d_j_nx
  );

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] e;
    for (int k = 0; k < 64; k++) begin
      in = 6'(k);
      #1;
      e = {in[4] ? in[0] : in[1], in[5] ? in[2] : in[3]};
      checks++;
      if ({dp_j, d_j_nx} !== e) begin
        failures++;
        $display("FAIL in=%b got=%b%b exp=%b", in, dp_j, d_j_nx, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
