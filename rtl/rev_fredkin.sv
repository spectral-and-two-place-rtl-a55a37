// 3*3 Fredkin (controlled-swap) gate, FRE(x,y,z):
//   x' = x,  y' = (~x & y) ^ (x & z),  z' = (~x & z) ^ (x & y).
// With x = 0 the lines pass unchanged; with x = 1 y and z are exchanged. It
// changes a pair of lines at once, unlike the NOT, Feynman and Toffoli gates,
// and is its own inverse. Combinational.
module rev_fredkin (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic x_o,
  output logic y_o,
  output logic z_o
);
  assign x_o = x;
  assign y_o = (~x & y) ^ (x & z);
  assign z_o = (~x & z) ^ (x & y);
endmodule
