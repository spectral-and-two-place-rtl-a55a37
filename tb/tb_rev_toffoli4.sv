// Testbench for rev_toffoli4: all sixteen inputs; z flips only for
// w = x = y = 1; two gates in series give back the input.
module tb_rev_toffoli4;
  logic w, x, y, z;
  logic [3:0] o1, o2;
  int checks = 0;
  int failures = 0;

  rev_toffoli4 dut (.w(w), .x(x), .y(y), .z(z),
                    .w_o(o1[3]), .x_o(o1[2]), .y_o(o1[1]), .z_o(o1[0]));
  rev_toffoli4 dut2 (.w(o1[3]), .x(o1[2]), .y(o1[1]), .z(o1[0]),
                     .w_o(o2[3]), .x_o(o2[2]), .y_o(o2[1]), .z_o(o2[0]));

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
    for (int v = 0; v < 16; v++) begin
      {w, x, y, z} = 4'(v);
      #1;
      // Only 1110 and 1111 change: they are exchanged.
      check("toffoli4", v, int'(o1), (v == 14) ? 15 : (v == 15) ? 14 : v);
      check("self-inverse", v, int'(o2), v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
