// Three-bit increment modulo 8, specification [1,2,3,4,5,6,7,0].
//   TOF3(b,c,a) NOT(c) NOT(b) FEY(c,b)
// With a the most significant bit: a toggles when b = c = 1 (the carry into
// a), c always toggles, and b toggles when the old c was 1; the NOT on b
// followed by FEY(c,b) with the new c = ~c gives b ^ c.
//
// Interface: in_vec = {a,b,c}, out_vec = in_vec + 1 mod 8.
// INVERSE = 1 applies the gates in reverse order and so decrements modulo 8.
// Combinational, 4 gate levels. The gate sequence is the published one;
// parameter and packing are choices of this design.
module rev_ex4_inc3
  import rev_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic [3-1:0] in_vec,
  output logic [3-1:0] out_vec
);

  localparam int unsigned N_GATES = 4;
  localparam gate_t GATES [N_GATES] = '{
    tof3(LB, LC, LA), g_not(LC), g_not(LB), fey(LC, LB)
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
