// 3*3 Toffoli gate, TOF3(x,y,z): x' = x, y' = y, z' = (x & y) ^ z.
// x and y are controls and pass through; the target z is inverted when both
// controls are 1. Self-inverse and combinational.
module rev_toffoli3 (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic x_o,
  output logic y_o,
  output logic z_o
);
  assign x_o = x;
  assign y_o = y;
  assign z_o = (x & y) ^ z;
endmodule
