// Four-bit increment modulo 16, specification [1,2,...,15,0]; the
// three-bit increment extended by one more Toffoli gate on the new top bit.
//   TOF4(b,c,d,a) TOF3(c,d,b) NOT(d) NOT(c) FEY(d,c)
// Each bit toggles when all lower bits are 1: a via the 4*4 Toffoli gate,
// b via the 3*3 Toffoli gate, c via NOT(c) FEY(d,c), and d always.
//
// Interface: in_vec = {a,b,c,d}, out_vec = in_vec + 1 mod 16.
// INVERSE = 1 applies the gates in reverse order and so decrements modulo 16.
// Combinational, 5 gate levels. The gate sequence is the published one;
// parameter and packing are choices of this design.
module rev_ex5_inc4
  import rev_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic [4-1:0] in_vec,
  output logic [4-1:0] out_vec
);

  localparam int unsigned N_GATES = 5;
  localparam gate_t GATES [N_GATES] = '{
    tof4(LB, LC, LD, LA), tof3(LC, LD, LB), g_not(LD), g_not(LC), fey(LD, LC)
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
