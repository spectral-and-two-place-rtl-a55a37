// Self-checking testbench for rev_ex4_inc3: increment mod 8.
// Applies every input pattern to the forward circuit and checks the output
// against the specification table; applies every output pattern to a second
// instance with INVERSE = 1 and checks that it returns the original input.
// The tables are the published specifications, typed in here independently
// of the gate lists in the design. Combinational: one pattern per time step.
module tb_rev_ex4_inc3;
  localparam int N = 3;
  localparam int L = 8;
  localparam int unsigned SPEC [L] = '{1, 2, 3, 4, 5, 6, 7, 0};

  logic [N-1:0] in_f, out_f, in_i, out_i;
  int checks = 0;
  int failures = 0;
  int moved = 0;  // patterns the circuit does not leave in place

  rev_ex4_inc3 dut_fwd (.in_vec(in_f), .out_vec(out_f));
  rev_ex4_inc3 #(.INVERSE(1'b1)) dut_inv (.in_vec(in_i), .out_vec(out_i));

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
    for (int v = 0; v < L; v++) begin
      in_f = N'(v);
      in_i = N'(SPEC[v]);
      #1;
      check("forward", v, int'(out_f), int'(SPEC[v]));
      check("inverse", int'(SPEC[v]), int'(out_i), v);
      if (SPEC[v] != v) moved++;
    end
    // The specification must move at least one pattern, or the checks above
    // could not tell the circuit from wires.
    check("some pattern moved", moved, int'(moved > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
