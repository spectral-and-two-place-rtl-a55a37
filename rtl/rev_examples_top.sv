// Collection of reversible circuits synthesized with a spectral method, placed
// side by side.
//
// Each circuit is a cascade of NOT, Feynman, Toffoli and Fredkin gates with
// no fan-out and no feedback. The circuits are independent of one another;
// this top only brings each one's ports out so that all of them can be built
// and exercised together:
//   ex1  Fredkin gate from FEY, TOF3, FEY          [0,1,2,3,4,6,5,7]
//   ex2  exchange of patterns 3 and 4              [0,1,2,4,3,5,6,7]
//   ex3  exchange of patterns 7 and 8 (uses TOF4)
//   ex4  increment mod 8
//   ex5  increment mod 16
//   ex6  a four-variable permutation, Fredkin-substituted form
//   ex7  the inverse of ex6, synthesized on its own
//   fa   full adder mapped from a two-place decomposition (one constant line)
//   t3   TOF3 built from FEY, FRE, FEY
//   t4   TOF4 built from two TOF3 gates and an extra line
// Pattern vectors carry variable a in their top bit. Everything is
// combinational: outputs follow inputs after the gate delays, with no clock
// or reset. The selection and the port names are choices of this design.
module rev_examples_top (
  input  logic [2:0] ex1_in,
  output logic [2:0] ex1_out,
  input  logic [2:0] ex2_in,
  output logic [2:0] ex2_out,
  input  logic [3:0] ex3_in,
  output logic [3:0] ex3_out,
  input  logic [2:0] ex4_in,
  output logic [2:0] ex4_out,
  input  logic [3:0] ex5_in,
  output logic [3:0] ex5_out,
  input  logic [3:0] ex6_in,
  output logic [3:0] ex6_out,
  input  logic [3:0] ex7_in,
  output logic [3:0] ex7_out,
  input  logic       fa_a,
  input  logic       fa_b,
  input  logic       fa_c,
  output logic       fa_sum,
  output logic       fa_carry,
  output logic       fa_g_a,
  output logic       fa_g_c,
  input  logic [2:0] t3_in,   // {x, y, z}
  output logic [2:0] t3_out,  // {x', y', z'}
  input  logic [4:0] t4_in,   // {w, x, y, z, e}
  output logic [4:0] t4_out   // {w', x', y', z', e'}
);

  rev_ex1_fredkin u_ex1 (.in_vec(ex1_in), .out_vec(ex1_out));
  rev_ex2_swap    u_ex2 (.in_vec(ex2_in), .out_vec(ex2_out));
  rev_ex3_swap    u_ex3 (.in_vec(ex3_in), .out_vec(ex3_out));
  rev_ex4_inc3    u_ex4 (.in_vec(ex4_in), .out_vec(ex4_out));
  rev_ex5_inc4    u_ex5 (.in_vec(ex5_in), .out_vec(ex5_out));
  rev_ex6_perm    u_ex6 (.in_vec(ex6_in), .out_vec(ex6_out));
  rev_ex7_perm    u_ex7 (.in_vec(ex7_in), .out_vec(ex7_out));

  rev_full_adder u_fa (
    .a    (fa_a),
    .b    (fa_b),
    .c    (fa_c),
    .sum  (fa_sum),
    .carry(fa_carry),
    .g_a  (fa_g_a),
    .g_c  (fa_g_c)
  );

  rev_toffoli3_from_fredkin u_t3 (
    .x  (t3_in[2]),
    .y  (t3_in[1]),
    .z  (t3_in[0]),
    .x_o(t3_out[2]),
    .y_o(t3_out[1]),
    .z_o(t3_out[0])
  );

  rev_toffoli4_from_toffoli3 u_t4 (
    .w  (t4_in[4]),
    .x  (t4_in[3]),
    .y  (t4_in[2]),
    .z  (t4_in[1]),
    .e  (t4_in[0]),
    .w_o(t4_out[4]),
    .x_o(t4_out[3]),
    .y_o(t4_out[2]),
    .z_o(t4_out[1]),
    .e_o(t4_out[0])
  );

endmodule
