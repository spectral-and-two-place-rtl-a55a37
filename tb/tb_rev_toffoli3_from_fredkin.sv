// Testbench for rev_toffoli3_from_fredkin: all eight inputs must give the
// Toffoli mapping z' = xy ^ z with x and y unchanged.
module tb_rev_toffoli3_from_fredkin;
  logic x, y, z, x_o, y_o, z_o;
  int checks = 0;
  int failures = 0;

  rev_toffoli3_from_fredkin dut (.x(x), .y(y), .z(z), .x_o(x_o), .y_o(y_o), .z_o(z_o));

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
      {x, y, z} = 3'(v);
      #1;
      check("x", v, int'(x_o), int'(x));
      check("y", v, int'(y_o), int'(y));
      check("z", v, int'(z_o), ((x & y) ^ z) ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
