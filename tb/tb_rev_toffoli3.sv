// Testbench for rev_toffoli3: all eight inputs; z flips only for x = y = 1;
// two gates in series give back the input.
module tb_rev_toffoli3;
  logic x, y, z;
  logic [2:0] o1, o2;
  int checks = 0;
  int failures = 0;

  rev_toffoli3 dut  (.x(x), .y(y), .z(z), .x_o(o1[2]), .y_o(o1[1]), .z_o(o1[0]));
  rev_toffoli3 dut2 (.x(o1[2]), .y(o1[1]), .z(o1[0]), .x_o(o2[2]), .y_o(o2[1]), .z_o(o2[0]));

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
      // Only 110 and 111 change: they are exchanged.
      check("toffoli3", v, int'(o1), (v == 6) ? 7 : (v == 7) ? 6 : v);
      check("self-inverse", v, int'(o2), v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
