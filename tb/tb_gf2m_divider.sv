// tb_gf2m_divider: end-to-end test of the divider at reduced sizes.
//   M = 8,  G = x^8 + x^4 + x^3 + x + 1: every a (256) with every nonzero b
//   M = 16, G = x^16 + x^5 + x^3 + x + 1: 2000 random divisions
// Each quotient is checked by multiplication, each latency against M, and
// every mechanism (swap, swap', |delta| up and down in both half-steps,
// negative delta, ignored start, back-to-back start) must occur.
module tb_gf2m_divider;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NMECH = 9;
  logic fin8, fin16;
  int c8, f8, c16, f16;
  int m8[NMECH], m16[NMECH];

  div_check #(.M(8), .G(9'h11b), .EXHAUSTIVE(1'b1)) u_m8 (
    .clk, .finished(fin8), .checks(c8), .failures(f8),
    .n_swap(m8[0]), .n_swap_p(m8[1]), .n_grow1(m8[2]), .n_shrink1(m8[3]),
    .n_grow2(m8[4]), .n_shrink2(m8[5]), .n_neg(m8[6]),
    .n_ignored_start(m8[7]), .n_back_to_back(m8[8]));

  div_check #(.M(16), .G(17'h1002b), .N(2000)) u_m16 (
    .clk, .finished(fin16), .checks(c16), .failures(f16),
    .n_swap(m16[0]), .n_swap_p(m16[1]), .n_grow1(m16[2]), .n_shrink1(m16[3]),
    .n_grow2(m16[4]), .n_shrink2(m16[5]), .n_neg(m16[6]),
    .n_ignored_start(m16[7]), .n_back_to_back(m16[8]));

  localparam string MECH[NMECH] = '{"swap", "swap'", "|delta|+1 step 1", "|delta|-1 step 1",
      "|delta|+1 step 2", "|delta|-1 step 2", "delta<0", "start ignored while busy",
      "back-to-back start"};

  int cycles = 0;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 2_000_000) begin
      $display("watchdog: simulation did not finish");
      $display("TB_RESULT checks=%0d failures=%0d", c8 + c16, f8 + f16 + 1);
      $finish;
    end
  end

  initial begin
    int checks, failures;
    repeat (4) @(posedge clk);  // let the checkers clear their flags
    wait (fin8 && fin16);
    checks = c8 + c16;
    failures = f8 + f16;
    for (int i = 0; i < NMECH; i++) begin
      $display("%-26s M=8: %0d  M=16: %0d", MECH[i], m8[i], m16[i]);
      checks++;
      if (m8[i] + m16[i] == 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", MECH[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
