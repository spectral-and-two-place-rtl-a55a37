// 4*4 Toffoli gate TOF4(w,x,y,z) built from two 3*3 Toffoli gates and an
// extra line e:
//   TOF3(w,x,e) TOF3(y,e,z)
// With e = 0 on the input side the first gate leaves wx on e, and the second
// inverts z when y and wx are both 1, so z' = wxy ^ z. The extra line is
// not cleared again: e_o = wx is a garbage output. For e = 1 the cascade is
// still reversible but no longer a TOF4.
//
// Interface: w, x, y, z and the extra line e in (tie e to 0); w_o, x_o, y_o,
// z_o and e_o out. Combinational, 2 gate levels. Bringing e out as a port,
// rather than tying it inside, is a choice of this design.
module rev_toffoli4_from_toffoli3 (
  input  logic w,
  input  logic x,
  input  logic y,
  input  logic z,
  input  logic e,
  output logic w_o,
  output logic x_o,
  output logic y_o,
  output logic z_o,
  output logic e_o
);

  logic t1_e;  // e after TOF3(w,x,e)

  rev_toffoli3 u_tof_a (
    .x  (w),
    .y  (x),
    .z  (e),
    .x_o(w_o),
    .y_o(x_o),
    .z_o(t1_e)
  );

  rev_toffoli3 u_tof_b (
    .x  (y),
    .y  (t1_e),
    .z  (z),
    .x_o(y_o),
    .y_o(e_o),
    .z_o(z_o)
  );

endmodule
