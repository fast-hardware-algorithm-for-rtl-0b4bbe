// div_check: end-to-end driver and checker for one gf2m_divider instance.
// It runs N divisions (or, with EXHAUSTIVE = 1, every a with every nonzero b),
// checks each quotient q by q * b == a mod G (G irreducible, so q is
// unique), checks that done rises exactly M cycles after the load edge, and
// counts how often the divider's mechanisms occurred: swap and swap', |delta|
// growing and shrinking in either step, a negative delta, a start ignored
// while busy, and a start accepted in the cycle the previous result is shown.
module div_check #(
  parameter int          M          = 8,
  parameter logic [M:0]  G          = '0,
  parameter int          N          = 100,
  parameter bit          EXHAUSTIVE = 1'b0
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_swap,
  output int   n_swap_p,
  output int   n_grow1,
  output int   n_shrink1,
  output int   n_grow2,
  output int   n_shrink2,
  output int   n_neg,
  output int   n_ignored_start,
  output int   n_back_to_back
);
  import gf2m_ref_pkg::*;

  logic         rst_n = 1'b0, start = 1'b0, busy, done;
  logic [M-1:0] a = '0, b = '0, result;

  gf2m_divider #(.M(M)) u_dut (.clk, .rst_n, .start, .a, .b, .g(G), .busy, .done, .result);

  // mechanism counters, sampled on iteration cycles
  always @(posedge clk) begin
    if (rst_n && busy) begin
      n_swap    <= n_swap    + int'(u_dut.swap);
      n_swap_p  <= n_swap_p  + int'(u_dut.swap_p);
      n_grow1   <= n_grow1   + int'(u_dut.shift1);
      n_shrink1 <= n_shrink1 + int'(!u_dut.shift1);
      n_grow2   <= n_grow2   + int'(u_dut.shift2);
      n_shrink2 <= n_shrink2 + int'(!u_dut.shift2);
      n_neg     <= n_neg     + int'(u_dut.sgn_q);
    end
  end

  task automatic divide(input logic [M-1:0] a_i, input logic [M-1:0] b_i);
    int lat;
    logic [M-1:0] q;
    poly_t prod;
    logic poke;
    int poke_at;
    // optional idle gap; gap 0 right after a result = back-to-back start
    if (($urandom % 3) != 0) repeat ($urandom % 3 + 1) @(negedge clk);
    else @(negedge clk);
    if (done) n_back_to_back++;
    a = a_i;
    b = b_i;
    start = 1'b1;
    @(posedge clk);          // load edge
    @(negedge clk);
    start = 1'b0;
    poke = (($urandom % 4) == 0);
    poke_at = int'($urandom % M);
    lat = 1;
    while (!done) begin
      if (poke && lat == poke_at + 1) begin
        // a start while busy must be ignored
        a = ~a_i;
        b = b_i + 1'b1;
        start = 1'b1;
        if (busy) n_ignored_start++;
      end
      @(posedge clk);
      @(negedge clk);
      start = 1'b0;
      if (!done) lat++;
      if (lat > 4 * M + 8) break;
    end
    q = result;
    prod = gf_mul(poly_t'(q), poly_t'(b_i), poly_t'(G), M);
    checks++;
    if (prod[M-1:0] !== a_i) begin
      failures++;
      if (failures < 6) $display("FAIL M=%0d a=%h b=%h: q=%h, q*b=%h", M, a_i, b_i, q, prod[M-1:0]);
    end
    checks++;
    if (lat != M) begin
      failures++;
      if (failures < 6) $display("FAIL M=%0d latency %0d cycles, expected %0d", M, lat, M);
    end
  endtask

  initial begin
    finished = 1'b0;
    checks = 0; failures = 0;
    n_swap = 0; n_swap_p = 0; n_grow1 = 0; n_shrink1 = 0; n_grow2 = 0; n_shrink2 = 0;
    n_neg = 0; n_ignored_start = 0; n_back_to_back = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    if (EXHAUSTIVE) begin
      for (int ai = 0; ai < (1 << M); ai++)
        for (int bi = 1; bi < (1 << M); bi++)
          divide(M'(ai), M'(bi));
    end else begin
      divide(M'(1), M'(1));
      divide(M'(1), M'(2));                      // inverse of x
      divide('1, '1);                            // a / a = 1
      divide(M'(1), {1'b1, {(M-1){1'b0}}});      // inverse of x^(m-1)
      divide('0, M'(3));                         // 0 / b = 0
      for (int k = 0; k < N; k++) begin
        logic [M-1:0] bb;
        bb = M'(rand_poly(M));
        if (bb == '0) bb = M'(1);
        divide(M'(rand_poly(M)), bb);
      end
    end
    finished = 1'b1;
  end
endmodule
