// Shared types for reversible gate cascades.
//
// A reversible circuit is an ordered list of gates acting on a set of lines
// (wires). Each gate is described by an operation and up to four line
// indices. The gate set is the one of the reversible-logic literature:
//   NOT(x)          x' = ~x
//   FEY(x,y)        y' = x ^ y                 (Feynman / CNOT)
//   TOF3(x,y,z)     z' = (x & y) ^ z           (3*3 Toffoli)
//   TOF4(w,x,y,z)   z' = (w & x & y) ^ z       (4*4 Toffoli)
//   FRE(x,y,z)      swap y and z when x = 1     (3*3 Fredkin)
// The operands of a gate_t are listed in the same order as in this notation,
// so FEY(a,c) is {GATE_FEY, a, c, -, -}. Line indices are 3 bits wide, which
// allows cascades of up to eight lines; line a is index 0, b is 1, and so on.
// The helper functions build gate_t values so that a gate list in a module
// reads like the textual circuit, e.g. {fey(LB,LC), tof3(LA,LC,LB), ...}.
// The 3-bit index width and the struct encoding are choices of this design.
package rev_pkg;

  typedef enum logic [2:0] {
    GATE_NONE = 3'd0,  // identity, used to fill unused list entries
    GATE_NOT  = 3'd1,
    GATE_FEY  = 3'd2,
    GATE_TOF3 = 3'd3,
    GATE_TOF4 = 3'd4,
    GATE_FRE  = 3'd5
  } gate_op_e;

  typedef logic [2:0] line_t;

  typedef struct packed {
    gate_op_e op;
    line_t    a;  // first operand
    line_t    b;  // second operand
    line_t    c;  // third operand
    line_t    d;  // fourth operand (TOF4 target)
  } gate_t;

  // Line names used by the example circuits.
  localparam line_t LA = 3'd0;
  localparam line_t LB = 3'd1;
  localparam line_t LC = 3'd2;
  localparam line_t LD = 3'd3;
  localparam line_t LE = 3'd4;

  function automatic gate_t g_not(line_t x);
    return '{op: GATE_NOT, a: x, b: '0, c: '0, d: '0};
  endfunction

  function automatic gate_t fey(line_t x, line_t y);
    return '{op: GATE_FEY, a: x, b: y, c: '0, d: '0};
  endfunction

  function automatic gate_t tof3(line_t x, line_t y, line_t z);
    return '{op: GATE_TOF3, a: x, b: y, c: z, d: '0};
  endfunction

  function automatic gate_t tof4(line_t w, line_t x, line_t y, line_t z);
    return '{op: GATE_TOF4, a: w, b: x, c: y, d: z};
  endfunction

  function automatic gate_t fre(line_t x, line_t y, line_t z);
    return '{op: GATE_FRE, a: x, b: y, c: z, d: '0};
  endfunction

endpackage
