// tb_gf2m_divider_full: the divider at its default size (M = 128) with
// G(x) = x^128 + x^7 + x^2 + x + 1 (irreducible). Runs directed cases
// (inverse of 1 and of x, a/a, 0/b) and 30 random divisions, checking each
// quotient by q * b == a mod G and each latency against 128 cycles.
module tb_gf2m_divider_full;
  import gf2m_ref_pkg::*;
  localparam int M = 128;
  localparam logic [M:0] G = (129'd1 << 128) | 129'h87;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [M-1:0] a = '0, b = '0, result;
  int checks = 0, failures = 0, cycles = 0;

  gf2m_divider dut (.clk, .rst_n, .start, .a, .b, .g(G), .busy, .done, .result);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("watchdog: simulation did not finish");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic divide(input logic [M-1:0] a_i, input logic [M-1:0] b_i);
    int lat = 0;
    poly_t prod;
    @(negedge clk);
    a = a_i;
    b = b_i;
    start = 1'b1;
    @(negedge clk);          // load edge has passed
    start = 1'b0;
    while (!done && lat < 4 * M) begin
      @(negedge clk);
      lat++;
    end
    prod = gf_mul(poly_t'(result), poly_t'(b_i), poly_t'(G), M);
    checks++;
    if (prod[M-1:0] !== a_i) begin
      failures++;
      $display("FAIL a=%h b=%h q=%h q*b=%h", a_i, b_i, result, prod[M-1:0]);
    end
    checks++;
    if (lat != M) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, M);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    divide(M'(1), M'(1));
    divide(M'(1), M'(2));
    // x^-1 = (G(x) + 1) / x = x^127 + x^6 + x + 1
    checks++;
    if (result !== ((M'(1) << 127) | M'(32'h43))) begin
      failures++;
      $display("FAIL inverse of x: %h", result);
    end
    divide({M{1'b1}}, {M{1'b1}});
    checks++;
    if (result !== M'(1)) begin failures++; $display("FAIL a/a = %h", result); end
    divide('0, M'(12345));
    checks++;
    if (result !== '0) begin failures++; $display("FAIL 0/b = %h", result); end
    for (int k = 0; k < 30; k++) begin
      logic [M-1:0] bb;
      bb = M'(rand_poly(M));
      if (bb == '0) bb = M'(1);
      divide(M'(rand_poly(M)), bb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
