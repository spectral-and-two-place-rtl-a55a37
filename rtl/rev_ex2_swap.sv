// Three-variable circuit that exchanges patterns 3 (011) and 4 (100) and
// leaves the other six unchanged: specification [0,1,2,4,3,5,6,7].
//   FEY(a,c) FEY(a,b) TOF3(b,c,a) FEY(a,c) FEY(a,b)
// The two leading Feynman gates turn 011 and 100 into 011 and 111, the
// Toffoli gate flips a exactly for those two (b = c = 1), and the trailing
// Feynman gates undo the first pair. It has the same shape as the Fredkin
// realization: a linear change of variables around one Toffoli gate.
//
// Interface: in_vec = {a,b,c}, out_vec = {a',b',c'}, a in the top bit.
// INVERSE = 1 applies the gates in reverse order, which realizes the inverse
// (here equal to the forward mapping). Combinational, 5 gate levels.
// The gate sequence is the published one; parameter and packing are choices
// of this design.
module rev_ex2_swap
  import rev_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic [3-1:0] in_vec,
  output logic [3-1:0] out_vec
);

  localparam int unsigned N_GATES = 5;
  localparam gate_t GATES [N_GATES] = '{
    fey(LA, LC), fey(LA, LB), tof3(LB, LC, LA), fey(LA, LC), fey(LA, LB)
  };

  rev_spec_circuit #(
    .N      (3),
    .N_GATES(N_GATES),
    .GATES  (GATES),
    .INVERSE(INVERSE)
  ) u_circuit (
    .in_vec (in_vec),
    .out_vec(out_vec)
  );

endmodule
