// delta_cell: one bit j of the 1-hot counter Delta = 2^(m-|delta|) that
// stands for the magnitude of the Euclid degree difference delta. The hot
// bit moves one place down when |delta| grows and one place up when it
// shrinks, twice per clock cycle (once per merged Euclid step):
//   Delta'_j    = shift1 ? Delta_{j+1}  : Delta_{j-1}
//   new Delta_j = shift2 ? Delta'_{j+1} : Delta'_{j-1}
// Combinational. shift1 and shift2 come from div_controller. The two
// multiplexers and the port set follow the published cell; that shift = 1
// selects the upper neighbour follows from Delta = 2^(m-|delta|).
module delta_cell (
  input  logic d_jp1,   // Delta_{j+1}
  input  logic d_jm1,   // Delta_{j-1}
  input  logic dp_jp1,  // Delta'_{j+1}
  input  logic dp_jm1,  // Delta'_{j-1}
  input  logic shift1,  // first step: 1 = |delta| + 1, 0 = |delta| - 1
  input  logic shift2,  // second step, same encoding
  output logic dp_j,    // Delta'_j
  output logic d_j_nx   // Delta_j after both steps
);
  always_comb begin
    dp_j   = shift1 ? d_jp1  : d_jm1;
    d_j_nx = shift2 ? dp_jp1 : dp_jm1;
  end
endmodule
