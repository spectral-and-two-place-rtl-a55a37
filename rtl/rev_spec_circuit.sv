// Reversible circuit seen from its specification: maps an N-bit pattern
// in_vec to out_vec through a rev_cascade, handling bit order and input
// assignment.
//
// A specification is a permutation of 0 .. 2^N-1 whose numbers are read with
// variable a as the most significant bit, so variable v (a = 0, b = 1, ...)
// is bit N-1-v of a pattern. A realization may require the inputs to be
// wired to lines in a different order: LINE_OF_INPUT[v] is the cascade line
// that input variable v drives. Outputs are read from lines a, b, c, ... in
// order.
//
// INVERSE = 1 runs the same gates in reverse order and moves the input
// assignment to the output side, so the module then realizes the inverse
// specification: out_vec is the pattern that the forward circuit maps to
// in_vec.
//
// Interface: in_vec / out_vec, N bits each. Purely combinational. This
// wrapper and its parameters are choices of this design.
module rev_spec_circuit
  import rev_pkg::*;
#(
  parameter int unsigned N       = 3,
  parameter int unsigned N_GATES = 1,
  parameter gate_t GATES [N_GATES] = '{default: g_not(LA)},
  parameter int unsigned LINE_OF_INPUT [N] = '{default: 0},
  parameter bit USE_ASSIGN = 1'b0,  // 0: input v drives line v
  parameter bit INVERSE    = 1'b0
) (
  input  logic [N-1:0] in_vec,
  output logic [N-1:0] out_vec
);

  logic [N-1:0] lines_i, lines_o;

  for (genvar v = 0; v < N; v++) begin : g_map
    localparam int unsigned L = USE_ASSIGN ? LINE_OF_INPUT[v] : v;
    if (!INVERSE) begin : g_fwd
      assign lines_i[L]     = in_vec[N-1-v];
      assign out_vec[N-1-v] = lines_o[v];
    end else begin : g_inv
      assign lines_i[v]     = in_vec[N-1-v];
      assign out_vec[N-1-v] = lines_o[L];
    end
  end

  rev_cascade #(
    .N_LINES(N),
    .N_GATES(N_GATES),
    .GATES  (GATES),
    .INVERSE(INVERSE)
  ) u_cascade (
    .lines_i(lines_i),
    .lines_o(lines_o)
  );

endmodule
