// Four-variable reversible function with specification
//   [4,6,2,0,15,13,7,5,9,11,3,1,14,12,10,8],
// the inverse of the function in rev_ex6_perm, synthesized separately.
//
// Lines a, b, c, d are driven by the specification inputs b, c, d, a;
// outputs are read from lines a, b, c, d in order. The cascade is
//   NOT(c) NOT(b) NOT(a) TOF3(a,b,c) NOT(a) FEY(a,d) FRE(d,b,a)
//                                                       (FREDKIN_SUBST = 1)
// obtained from the greedy result
//   ... NOT(a) FEY(a,d) FEY(a,b) TOF3(b,d,a) FEY(a,b)  (FREDKIN_SUBST = 0)
// by recognising FEY(a,b) TOF3(b,d,a) FEY(a,b) as a Fredkin gate. With 7
// gates it is smaller than rev_ex6_perm run backwards, which is why
// synthesizing both a function and its inverse and keeping the better one
// pays off.
//
// Interface: in_vec = {a,b,c,d}, out_vec = {a',b',c',d'}, a in the top bit.
// INVERSE = 1 applies the gates in reverse order with the input assignment
// moved to the output side, giving the function of rev_ex6_perm.
// Combinational, 7 (or 9) gate levels. Gate lists and input assignment are
// the published ones; parameters and packing are choices of this design.
module rev_ex7_perm
  import rev_pkg::*;
#(
  parameter bit FREDKIN_SUBST = 1'b1,
  parameter bit INVERSE       = 1'b0
) (
  input  logic [3:0] in_vec,
  output logic [3:0] out_vec
);

  localparam int unsigned N_GATES_FRE = 7;
  localparam gate_t GATES_FRE [N_GATES_FRE] = '{
    g_not(LC), g_not(LB), g_not(LA), tof3(LA, LB, LC), g_not(LA),
    fey(LA, LD), fre(LD, LB, LA)
  };

  localparam int unsigned N_GATES_SYN = 9;
  localparam gate_t GATES_SYN [N_GATES_SYN] = '{
    g_not(LC), g_not(LB), g_not(LA), tof3(LA, LB, LC), g_not(LA),
    fey(LA, LD), fey(LA, LB), tof3(LB, LD, LA), fey(LA, LB)
  };

  // Line driven by each specification input a, b, c, d.
  localparam int unsigned LINE_OF_INPUT [4] = '{3, 0, 1, 2};

  if (FREDKIN_SUBST) begin : g_fre
    rev_spec_circuit #(
      .N            (4),
      .N_GATES      (N_GATES_FRE),
      .GATES        (GATES_FRE),
      .LINE_OF_INPUT(LINE_OF_INPUT),
      .USE_ASSIGN   (1'b1),
      .INVERSE      (INVERSE)
    ) u_circuit (
      .in_vec (in_vec),
      .out_vec(out_vec)
    );
  end else begin : g_syn
    rev_spec_circuit #(
      .N            (4),
      .N_GATES      (N_GATES_SYN),
      .GATES        (GATES_SYN),
      .LINE_OF_INPUT(LINE_OF_INPUT),
      .USE_ASSIGN   (1'b1),
      .INVERSE      (INVERSE)
    ) u_circuit (
      .in_vec (in_vec),
      .out_vec(out_vec)
    );
  end

endmodule
