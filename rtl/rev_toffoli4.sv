// 4*4 Toffoli gate, TOF4(w,x,y,z): w, x, y pass through, z' = (w & x & y) ^ z.
// The target z is inverted when all three controls are 1. Self-inverse and
// combinational.
module rev_toffoli4 (
  input  logic w,
  input  logic x,
  input  logic y,
  input  logic z,
  output logic w_o,
  output logic x_o,
  output logic y_o,
  output logic z_o
);
  assign w_o = w;
  assign x_o = x;
  assign y_o = y;
  assign z_o = (w & x & y) ^ z;
endmodule
