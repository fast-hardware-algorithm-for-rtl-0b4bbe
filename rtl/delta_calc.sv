// delta_calc: the 1-hot counter for |delta|, m+1 delta_cell slices holding
// Delta = 2^(m-|delta|): bit m set means delta = 0, bit m-k set means
// |delta| = k. Each cycle the hot bit moves twice, down one place for every
// step whose shift input is 1 (|delta| + 1) and up one place otherwise.
// Delta'_m (delta = 0 after the first step) is returned to the controller.
// A 1-hot counter needs no carry chain, so it adds only two multiplexers to
// the per-cycle critical path. Combinational; bits shifted in at either end
// are 0 (this design's choice; the Euclid recursion keeps |delta| within
// 0..m, so none is ever needed).
module delta_calc #(
  parameter int M = 128  // field degree m
) (
  input  logic [M:0] d,       // Reg-Delta
  input  logic       shift1,
  input  logic       shift2,
  output logic       dp_m,    // Delta'_m
  output logic [M:0] d_nx
);
  logic [M:0] dp;  // Delta'

  assign dp_m = dp[M];

  for (genvar j = 0; j <= M; j++) begin : g_slice
    logic d_jp1, d_jm1, dp_jp1, dp_jm1;
    if (j == M) begin : g_msb
      assign d_jp1  = 1'b0;
      assign dp_jp1 = 1'b0;
    end else begin : g_high
      assign d_jp1  = d[j+1];
      assign dp_jp1 = dp[j+1];
    end
    if (j == 0) begin : g_lsb
      assign d_jm1  = 1'b0;
      assign dp_jm1 = 1'b0;
    end else begin : g_low
      assign d_jm1  = d[j-1];
      assign dp_jm1 = dp[j-1];
    end
    delta_cell u_cell (
      .d_jp1 (d_jp1),  .d_jm1 (d_jm1),
      .dp_jp1(dp_jp1), .dp_jm1(dp_jm1),
      .shift1(shift1), .shift2(shift2),
      .dp_j  (dp[j]),  .d_j_nx(d_nx[j])
    );
  end
endmodule
