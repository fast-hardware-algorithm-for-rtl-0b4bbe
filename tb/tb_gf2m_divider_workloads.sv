// tb_gf2m_divider_workloads: the two larger field sizes at which the
// divider's synthesis was evaluated, m = 256 and m = 512 (m = 128 is the
// default size, covered by tb_gf2m_divider_full). Irreducible polynomials:
//   x^256 + x^10 + x^5 + x^2 + 1,  x^512 + x^8 + x^5 + x^2 + 1.
// 12 random divisions plus directed cases per size, each checked by
// multiplication and for an M-cycle latency.
module tb_gf2m_divider_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam logic [256:0] G256 = (257'd1 << 256) | 257'h425;
  localparam logic [512:0] G512 = (513'd1 << 512) | 513'h125;

  logic fin256, fin512;
  int c256, f256, c512, f512;
  int unused_m[2][9];

  div_check #(.M(256), .G(G256), .N(12)) u_m256 (
    .clk, .finished(fin256), .checks(c256), .failures(f256),
    .n_swap(unused_m[0][0]), .n_swap_p(unused_m[0][1]), .n_grow1(unused_m[0][2]),
    .n_shrink1(unused_m[0][3]), .n_grow2(unused_m[0][4]), .n_shrink2(unused_m[0][5]),
    .n_neg(unused_m[0][6]), .n_ignored_start(unused_m[0][7]), .n_back_to_back(unused_m[0][8]));

  div_check #(.M(512), .G(G512), .N(12)) u_m512 (
    .clk, .finished(fin512), .checks(c512), .failures(f512),
    .n_swap(unused_m[1][0]), .n_swap_p(unused_m[1][1]), .n_grow1(unused_m[1][2]),
    .n_shrink1(unused_m[1][3]), .n_grow2(unused_m[1][4]), .n_shrink2(unused_m[1][5]),
    .n_neg(unused_m[1][6]), .n_ignored_start(unused_m[1][7]), .n_back_to_back(unused_m[1][8]));

  int cycles = 0;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      $display("watchdog: simulation did not finish");
      $display("TB_RESULT checks=%0d failures=%0d", c256 + c512, f256 + f512 + 1);
      $finish;
    end
  end

  initial begin
    repeat (4) @(posedge clk);  // let the checkers clear their flags
    wait (fin256 && fin512);
    $display("m=256: %0d checks, %0d failures; m=512: %0d checks, %0d failures",
             c256, f256, c512, f512);
    $display("TB_RESULT checks=%0d failures=%0d", c256 + c512, f256 + f512);
    $finish;
  end
endmodule
