// tb_delta_calc: delta_calc at its default size. Keeps its own integer
// |delta|, starts from delta = 0 (Delta = 2^M), applies random legal
// shift1/shift2 pairs (|delta| cannot go below 0 or above M) and checks
// that Delta' and the new Delta are the 1-hot codes 2^(M-|delta|).
module tb_delta_calc;
  localparam int M = 128;
  logic [M:0] d, d_nx;
  logic shift1, shift2, dp_m;
  int checks = 0, failures = 0;

  delta_calc dut (.d, .shift1, .shift2, .dp_m, .d_nx);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mag, mag1, mag2;
    logic [M:0] e_d;
    mag = 0;
    d   = (M+1)'(1) << M;
    for (int k = 0; k < 3000; k++) begin
      shift1 = (mag == 0) ? 1'b1 : (mag == M) ? 1'b0 : 1'($urandom);
      mag1   = shift1 ? mag + 1 : mag - 1;
      shift2 = (mag1 == 0) ? 1'b1 : (mag1 == M) ? 1'b0 : 1'($urandom);
      mag2   = shift2 ? mag1 + 1 : mag1 - 1;
      #1;
      e_d = (M+1)'(1) << (M - mag2);
      checks++;
      if (d_nx !== e_d || dp_m !== (mag1 == 0)) begin
        failures++;
        if (failures < 5)
          $display("FAIL |delta| %0d->%0d->%0d: d_nx=%h exp %h dp_m=%b",
                   mag, mag1, mag2, d_nx, e_d, dp_m);
      end
      d   = d_nx;
      mag = mag2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
