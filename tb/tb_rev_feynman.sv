// Testbench for rev_feynman: all four inputs; x passes, y flips when x = 1;
// two gates in series give back the input.
module tb_rev_feynman;
  logic x, y, x1, y1, x2, y2;
  int checks = 0;
  int failures = 0;

  rev_feynman dut  (.x(x),  .y(y),  .x_o(x1), .y_o(y1));
  rev_feynman dut2 (.x(x1), .y(y1), .x_o(x2), .y_o(y2));

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
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      check("x passes", v, int'(x1), int'(x));
      check("y' = x xor y", v, int'(y1), (x == y) ? 0 : 1);
      check("self-inverse", v, int'({x2, y2}), v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
