// Testbench for rev_full_adder: all eight operand combinations against
// arithmetic addition; the garbage lines must equal the inputs a and c.
module tb_rev_full_adder;
  logic a, b, c, sum, carry, g_a, g_c;
  int checks = 0;
  int failures = 0;
  int carries = 0;

  rev_full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry),
                      .g_a(g_a), .g_c(g_c));

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
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, c} = 3'(v);
      total = int'(a) + int'(b) + int'(c);
      #1;
      check("sum", v, int'(sum), total % 2);
      check("carry", v, int'(carry), total / 2);
      check("garbage a", v, int'(g_a), int'(a));
      check("garbage c", v, int'(g_c), int'(c));
      if (carry) carries++;
    end
    check("carry produced", 0, int'(carries == 4), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
