// load_reg: one storage register of the divider (used for Reg-R, Reg-S,
// Reg-U, Reg-V, Reg-G, Reg-Delta and Reg-sgn). On a clock edge with load = 1
// it takes its initial value for a new division; with load = 0 and en = 1 it
// takes the value computed by the datapath for the next iteration; otherwise
// it holds, so the result stays readable after the last iteration.
// Asynchronous active-low reset clears it. The load/update/hold priority and
// the reset are this design's choices.
module load_reg #(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,      // take load_val (has priority)
  input  logic [W-1:0] load_val,
  input  logic         en,        // take d
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= load_val;
    else if (en)   q <= d;
  end
endmodule
