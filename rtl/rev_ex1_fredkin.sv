// Fredkin gate built from two Feynman gates and a Toffoli gate:
//   FEY(b,c) TOF3(a,c,b) FEY(b,c)
// The first Feynman gate makes c = b ^ c, the Toffoli gate then sets
// b = c (original) when a = 1, and the last Feynman gate restores the other
// line, so b and c are exchanged exactly when a = 1. This is the identity
// FRE(x,y,z) = FEY(y,z) TOF3(x,z,y) FEY(y,z) with x, y, z = a, b, c, and
// realizes the specification [0,1,2,3,4,6,5,7] (patterns 5 and 6 exchanged).
//
// Interface: in_vec = {a,b,c}, out_vec = {a',b',c'}, a in the top bit.
// INVERSE = 1 applies the gates in reverse order (the circuit is
// self-inverse, so the mapping is unchanged). Combinational, 3 gate levels.
// The gate sequence is the published one; the parameter and port packing are
// choices of this design.
module rev_ex1_fredkin
  import rev_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic [3-1:0] in_vec,
  output logic [3-1:0] out_vec
);

  localparam int unsigned N_GATES = 3;
  localparam gate_t GATES [N_GATES] = '{
    fey(LB, LC), tof3(LA, LC, LB), fey(LB, LC)
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
