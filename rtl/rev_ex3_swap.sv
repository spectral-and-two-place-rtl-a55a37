// Four-variable extension of the pattern exchange: swaps patterns 7 (0111)
// and 8 (1000), specification [0,1,2,3,4,5,6,8,7,9,...,15].
//   FEY(a,d) FEY(a,c) FEY(a,b) TOF4(b,c,d,a) FEY(a,d) FEY(a,c) FEY(a,b)
// The leading Feynman gates map both patterns onto b = c = d = 1, the 4*4
// Toffoli gate flips a for them, and the trailing Feynman gates undo the
// change of variables. The TOF4 could equally be replaced by two TOF3 gates
// and a constant-0 line (see rev_toffoli4_from_toffoli3).
//
// Interface: in_vec = {a,b,c,d}, out_vec = {a',b',c',d'}, a in the top bit.
// INVERSE = 1 applies the gates in reverse order (the mapping is
// self-inverse). Combinational, 7 gate levels. The gate sequence is the
// published one; parameter and packing are choices of this design.
module rev_ex3_swap
  import rev_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic [4-1:0] in_vec,
  output logic [4-1:0] out_vec
);

  localparam int unsigned N_GATES = 7;
  localparam gate_t GATES [N_GATES] = '{
    fey(LA, LD), fey(LA, LC), fey(LA, LB), tof4(LB, LC, LD, LA),
    fey(LA, LD), fey(LA, LC), fey(LA, LB)
  };

  rev_spec_circuit #(
    .N      (4),
    .N_GATES(N_GATES),
    .GATES  (GATES),
    .INVERSE(INVERSE)
  ) u_circuit (
    .in_vec (in_vec),
    .out_vec(out_vec)
  );

endmodule
