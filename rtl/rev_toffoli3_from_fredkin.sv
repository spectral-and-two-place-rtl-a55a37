// 3*3 Toffoli gate TOF3(x,y,z) built around a Fredkin gate:
//   FEY(z,y) FRE(x,z,y) FEY(z,y)
// The first Feynman gate replaces y by y ^ z. When x = 1 the Fredkin gate
// swaps z and y ^ z, and the second Feynman gate then restores y, leaving
// z ^ y on z; when x = 0 the two Feynman gates cancel. Hence z' = xy ^ z
// with x and y unchanged. This identity and the Fredkin-from-Toffoli one
// (rev_ex1_fredkin) let a cascade trade Fredkin gates for Toffoli gates.
//
// Interface: x, y, z in; x_o, y_o, z_o out. Combinational, 3 gate levels.
module rev_toffoli3_from_fredkin (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic x_o,
  output logic y_o,
  output logic z_o
);

  logic f1_z, f1_y;      // after FEY(z,y)
  logic f2_x, f2_z, f2_y; // after FRE(x,z,y)

  rev_feynman u_fey_in (
    .x  (z),
    .y  (y),
    .x_o(f1_z),
    .y_o(f1_y)
  );

  rev_fredkin u_fre (
    .x  (x),
    .y  (f1_z),
    .z  (f1_y),
    .x_o(f2_x),
    .y_o(f2_z),
    .z_o(f2_y)
  );

  rev_feynman u_fey_out (
    .x  (f2_z),
    .y  (f2_y),
    .x_o(z_o),
    .y_o(y_o)
  );

  assign x_o = f2_x;

endmodule
