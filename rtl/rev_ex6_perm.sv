// Four-variable reversible function with specification
//   [3,11,2,10,0,7,1,6,15,8,14,9,13,5,12,4]
// realized with NOT, Toffoli, Feynman and Fredkin gates.
//
// The inputs must be wired to the cascade lines in a fixed order: lines
// a, b, c, d are driven by the specification inputs a, d, b, c. Outputs are
// read from lines a, b, c, d in order. The cascade is
//   NOT(d) NOT(b) TOF3(b,c,d) NOT(b) TOF3(a,c,d) NOT(c) TOF3(a,b,d)
//   FRE(b,c,a) FEY(b,c) FEY(a,b)                       (FREDKIN_SUBST = 1)
// which is obtained from the greedy result
//   ... TOF3(a,b,d) FEY(a,c) TOF3(b,c,a) FEY(b,c) FEY(a,c) FEY(a,b)
//                                                       (FREDKIN_SUBST = 0)
// by recognising FEY(a,c) TOF3(b,c,a) FEY(a,c) as a Fredkin gate (the two
// middle Feynman gates commute). Both lists realize the same function; the
// default is the shorter, substituted one.
//
// Interface: in_vec = {a,b,c,d}, out_vec = {a',b',c',d'}, a in the top bit.
// INVERSE = 1 applies the gates in reverse order with the input assignment
// moved to the output side, realizing the inverse function. Combinational,
// 10 (or 12) gate levels. The gate lists and the input assignment are the
// published ones; parameters and packing are choices of this design.
module rev_ex6_perm
  import rev_pkg::*;
#(
  parameter bit FREDKIN_SUBST = 1'b1,
  parameter bit INVERSE       = 1'b0
) (
  input  logic [3:0] in_vec,
  output logic [3:0] out_vec
);

  localparam int unsigned N_GATES_FRE = 10;
  localparam gate_t GATES_FRE [N_GATES_FRE] = '{
    g_not(LD), g_not(LB), tof3(LB, LC, LD), g_not(LB), tof3(LA, LC, LD),
    g_not(LC), tof3(LA, LB, LD), fre(LB, LC, LA), fey(LB, LC), fey(LA, LB)
  };

  localparam int unsigned N_GATES_SYN = 12;
  localparam gate_t GATES_SYN [N_GATES_SYN] = '{
    g_not(LD), g_not(LB), tof3(LB, LC, LD), g_not(LB), tof3(LA, LC, LD),
    g_not(LC), tof3(LA, LB, LD), fey(LA, LC), tof3(LB, LC, LA), fey(LB, LC),
    fey(LA, LC), fey(LA, LB)
  };

  // Line driven by each specification input a, b, c, d.
  localparam int unsigned LINE_OF_INPUT [4] = '{0, 2, 3, 1};

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
