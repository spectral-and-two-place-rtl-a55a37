// Testbench for rev_not: both input values, and two gates in series must
// give back the input (the gate is its own inverse).
module tb_rev_not;
  logic x, x1, x2;
  int checks = 0;
  int failures = 0;

  rev_not dut  (.x(x),  .x_o(x1));
  rev_not dut2 (.x(x1), .x_o(x2));

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
    for (int v = 0; v < 2; v++) begin
      x = 1'(v);
      #1;
      check("not", v, int'(x1), 1 - v);
      check("self-inverse", v, int'(x2), v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
