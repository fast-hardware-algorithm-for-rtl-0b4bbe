// div_sequencer: start/busy/done sequencing for the divider. A start seen
// while idle produces a one-cycle load pulse; the next M clock cycles are
// iteration cycles (iter = 1), counted by a binary down-counter; after the
// M-th iteration edge done rises and stays high until the next start.
// start is ignored while busy. Timing: load edge, then M iteration edges,
// so done is high M cycles after the edge that sampled start.
// This sequencing is this design's own: the algorithm only fixes that one
// division takes M iterations of one cycle each.
module div_sequencer #(
  parameter int M = 128
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic load,   // combinational: load operands on this edge
  output logic iter,   // an iteration is performed on this edge
  output logic busy,
  output logic done
);
  localparam int CW = $clog2(M + 1);

  logic [CW-1:0] left;  // iterations still to do

  assign busy = (left != '0);
  assign iter = busy;
  assign load = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0;
      done <= 1'b0;
    end else if (load) begin
      left <= CW'(M);
      done <= 1'b0;
    end else if (busy) begin
      left <= left - 1'b1;
      done <= (left == CW'(1));
    end
  end
endmodule
