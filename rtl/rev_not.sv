// 1*1 reversible NOT gate: x' = ~x.
// Combinational; the output follows the input with no clock. The gate is its
// own inverse, like every gate of the set.
module rev_not (
  input  logic x,
  output logic x_o
);
  assign x_o = ~x;
endmodule
