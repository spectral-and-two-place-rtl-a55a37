// Testbench for rev_cascade. Two gate lists that use every gate type (and
// the GATE_NONE filler) are applied to all input patterns:
//   - the forward cascade is compared with a behavioural interpreter of the
//     same list written in this testbench;
//   - an INVERSE = 1 cascade fed with the forward output must return the
//     original input.
// List A acts on 5 lines, list B on all 8 lines the index width allows.
module tb_rev_cascade;
  import rev_pkg::*;

  localparam int unsigned NA = 5;
  localparam int unsigned GA = 8;
  localparam gate_t LIST_A [GA] = '{
    g_not(LB), fey(LA, LC), tof3(LB, LC, LE), tof4(LA, LB, LC, LD),
    fre(LE, LA, LD), '{op: GATE_NONE, default: '0}, fey(LD, LB), tof3(LE, LD, LA)
  };

  localparam int unsigned NB = 8;
  localparam int unsigned GB = 10;
  localparam gate_t LIST_B [GB] = '{
    tof4(3'd7, 3'd6, 3'd5, 3'd0), fre(3'd0, 3'd6, 3'd7), fey(3'd1, 3'd7),
    g_not(3'd5), tof3(3'd2, 3'd4, 3'd6), fre(3'd3, 3'd1, 3'd2),
    fey(3'd6, 3'd3), g_not(3'd7), tof3(3'd7, 3'd0, 3'd4), tof4(3'd1, 3'd2, 3'd3, 3'd5)
  };

  int checks = 0;
  int failures = 0;

  // Behavioural reference: interprets a gate on a line vector.
  function automatic logic [7:0] apply_gate(gate_t g, logic [7:0] s);
    logic [7:0] r;
    logic t;
    r = s;
    case (g.op)
      GATE_NOT:  r[g.a] = !s[g.a];
      GATE_FEY:  if (s[g.a]) r[g.b] = !s[g.b];
      GATE_TOF3: if (s[g.a] && s[g.b]) r[g.c] = !s[g.c];
      GATE_TOF4: if (s[g.a] && s[g.b] && s[g.c]) r[g.d] = !s[g.d];
      GATE_FRE:  if (s[g.a]) begin t = s[g.b]; r[g.b] = s[g.c]; r[g.c] = t; end
      default:   r = s;
    endcase
    return r;
  endfunction

  logic [NA-1:0] a_in, a_fwd, a_back;
  logic [NB-1:0] b_in, b_fwd, b_back;

  rev_cascade #(.N_LINES(NA), .N_GATES(GA), .GATES(LIST_A)) dut_a (
    .lines_i(a_in), .lines_o(a_fwd));
  rev_cascade #(.N_LINES(NA), .N_GATES(GA), .GATES(LIST_A), .INVERSE(1'b1)) dut_a_inv (
    .lines_i(a_fwd), .lines_o(a_back));
  rev_cascade #(.N_LINES(NB), .N_GATES(GB), .GATES(LIST_B)) dut_b (
    .lines_i(b_in), .lines_o(b_fwd));
  rev_cascade #(.N_LINES(NB), .N_GATES(GB), .GATES(LIST_B), .INVERSE(1'b1)) dut_b_inv (
    .lines_i(b_fwd), .lines_o(b_back));

  task automatic check(input string what, input int v, input int got,
                       input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: input %0d gave %0d, expected %0d", what, v, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s;
    for (int v = 0; v < (1 << NA); v++) begin
      a_in = NA'(v);
      s = 8'(v);
      foreach (LIST_A[k]) s = apply_gate(LIST_A[k], s);
      #1;
      check("list A forward", v, int'(a_fwd), int'(s[NA-1:0]));
      check("list A inverse", v, int'(a_back), v);
    end
    for (int v = 0; v < (1 << NB); v++) begin
      b_in = NB'(v);
      s = 8'(v);
      foreach (LIST_B[k]) s = apply_gate(LIST_B[k], s);
      #1;
      check("list B forward", v, int'(b_fwd), int'(s));
      check("list B inverse", v, int'(b_back), v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
