// Reversible full adder obtained by mapping a two-place decomposition onto
// reversible gates.
//
// The decomposition t = a ^ b, sum = t ^ c, carry = ab | ct maps onto
//   TOF3(a,b,d) FEY(a,b) TOF3(b,c,d) FEY(c,b)
// on four lines a, b, c, d with d = 0 on the input side. TOF3(a,b,d) puts ab
// on d, FEY(a,b) turns b into t, TOF3(b,c,d) adds ct (ab and ct are never
// both 1, so XOR acts as OR), and FEY(c,b) turns b into the sum. On the
// output side line b carries the sum and line d the carry; lines a and c are
// garbage outputs that simply equal the inputs a and c.
//
// Interface: a, b, c in; sum, carry, and the garbage lines g_a, g_c out. The
// constant input d is tied to 0 inside. Combinational, 4 gate levels. The
// gate list and line roles are the published ones; the ports are a choice of
// this design.
module rev_full_adder
  import rev_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry,
  output logic g_a,
  output logic g_c
);

  localparam int unsigned N_GATES = 4;
  localparam gate_t GATES [N_GATES] = '{
    tof3(LA, LB, LD), fey(LA, LB), tof3(LB, LC, LD), fey(LC, LB)
  };

  logic [3:0] lines_i, lines_o;

  // lines_i[0] is line a.
  assign lines_i = {1'b0, c, b, a};

  rev_cascade #(
    .N_LINES(4),
    .N_GATES(N_GATES),
    .GATES  (GATES)
  ) u_cascade (
    .lines_i(lines_i),
    .lines_o(lines_o)
  );

  assign g_a   = lines_o[0];
  assign sum   = lines_o[1];
  assign g_c   = lines_o[2];
  assign carry = lines_o[3];

endmodule
