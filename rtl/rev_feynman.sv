// 2*2 Feynman (controlled-NOT) gate, FEY(x,y): x' = x, y' = x ^ y.
// x is the control and passes through; y is the target. Applying the gate
// twice restores y, so it is its own inverse. Combinational.
module rev_feynman (
  input  logic x,
  input  logic y,
  output logic x_o,
  output logic y_o
);
  assign x_o = x;
  assign y_o = x ^ y;
endmodule
