// Reversible gate cascade: applies an ordered list of reversible gates to
// N_LINES lines.
//
// A reversible circuit has no fan-out and no loops, so it is fully described
// by a sequence of gates, each acting on a few of the lines and passing the
// rest straight through. This module turns such a sequence, given as the
// GATES parameter (see rev_pkg), into a chain of gate instances: stage k+1 is
// stage k with the gate's target line(s) replaced by the output of a
// rev_not / rev_feynman / rev_toffoli3 / rev_toffoli4 / rev_fredkin instance.
// GATES[0] acts first, at the input side.
//
// Every gate of the set is its own inverse, so applying the same gates in
// reverse order realizes the inverse mapping. INVERSE = 1 does exactly that:
// the same list is walked from the last gate to the first, and lines_o is
// then the preimage of lines_i under the forward circuit.
//
// Interface: lines_i[i] is line i on the input side (line a is index 0),
// lines_o[i] the same line on the output side. Purely combinational: the
// delay is the depth of the gate chain, at most N_GATES gates.
// Operand indices must be distinct and below N_LINES; an assertion checks
// this at elaboration. The encoding of the list is a choice of this design.
module rev_cascade
  import rev_pkg::*;
#(
  parameter int unsigned N_LINES = 4,
  parameter int unsigned N_GATES = 1,
  parameter gate_t GATES [N_GATES] = '{default: g_not(LA)},
  parameter bit INVERSE = 1'b0
) (
  input  logic [N_LINES-1:0] lines_i,
  output logic [N_LINES-1:0] lines_o
);

  // stage[k] holds the lines before gate k of the applied order.
  logic [N_LINES-1:0] stage [N_GATES+1];

  assign stage[0] = lines_i;
  assign lines_o  = stage[N_GATES];

  for (genvar k = 0; k < N_GATES; k++) begin : g_gate
    localparam int unsigned IDX = INVERSE ? (N_GATES - 1 - k) : k;
    localparam gate_t G = GATES[IDX];
    localparam int unsigned A = int'(G.a);
    localparam int unsigned B = int'(G.b);
    localparam int unsigned C = int'(G.c);
    localparam int unsigned D = int'(G.d);
    // Number of operands the gate uses; all of them must be distinct lines.
    localparam int unsigned N_OPS = (G.op == GATE_NOT)  ? 1 :
                                    (G.op == GATE_FEY)  ? 2 :
                                    (G.op == GATE_TOF4) ? 4 :
                                    (G.op == GATE_NONE) ? 0 : 3;
    localparam bit BAD =
        (N_OPS >= 1 && A >= N_LINES) ||
        (N_OPS >= 2 && (B >= N_LINES || A == B)) ||
        (N_OPS >= 3 && (C >= N_LINES || A == C || B == C)) ||
        (N_OPS >= 4 && (D >= N_LINES || A == D || B == D || C == D));
    if (BAD) begin : g_bad
      $error("rev_cascade: gate %0d has an invalid operand list", IDX);
    end

    logic [N_LINES-1:0] nxt;
    assign stage[k+1] = nxt;

    if (G.op == GATE_NOT) begin : g_not
      logic x_o;
      rev_not u_gate (.x(stage[k][A]), .x_o(x_o));
      always_comb begin
        nxt    = stage[k];
        nxt[A] = x_o;
      end
    end else if (G.op == GATE_FEY) begin : g_fey
      logic x_o, y_o;
      rev_feynman u_gate (
        .x  (stage[k][A]),
        .y  (stage[k][B]),
        .x_o(x_o),
        .y_o(y_o)
      );
      always_comb begin
        nxt    = stage[k];
        nxt[A] = x_o;
        nxt[B] = y_o;
      end
    end else if (G.op == GATE_TOF3) begin : g_tof3
      logic x_o, y_o, z_o;
      rev_toffoli3 u_gate (
        .x  (stage[k][A]),
        .y  (stage[k][B]),
        .z  (stage[k][C]),
        .x_o(x_o),
        .y_o(y_o),
        .z_o(z_o)
      );
      always_comb begin
        nxt    = stage[k];
        nxt[A] = x_o;
        nxt[B] = y_o;
        nxt[C] = z_o;
      end
    end else if (G.op == GATE_TOF4) begin : g_tof4
      logic w_o, x_o, y_o, z_o;
      rev_toffoli4 u_gate (
        .w  (stage[k][A]),
        .x  (stage[k][B]),
        .y  (stage[k][C]),
        .z  (stage[k][D]),
        .w_o(w_o),
        .x_o(x_o),
        .y_o(y_o),
        .z_o(z_o)
      );
      always_comb begin
        nxt    = stage[k];
        nxt[A] = w_o;
        nxt[B] = x_o;
        nxt[C] = y_o;
        nxt[D] = z_o;
      end
    end else if (G.op == GATE_FRE) begin : g_fre
      logic x_o, y_o, z_o;
      rev_fredkin u_gate (
        .x  (stage[k][A]),
        .y  (stage[k][B]),
        .z  (stage[k][C]),
        .x_o(x_o),
        .y_o(y_o),
        .z_o(z_o)
      );
      always_comb begin
        nxt    = stage[k];
        nxt[A] = x_o;
        nxt[B] = y_o;
        nxt[C] = z_o;
      end
    end else begin : g_pass
      assign nxt = stage[k];
    end
  end

endmodule
