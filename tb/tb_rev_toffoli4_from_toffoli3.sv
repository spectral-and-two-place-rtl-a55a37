// Testbench for rev_toffoli4_from_toffoli3. With e = 0 every input must give
// the 4*4 Toffoli mapping and e_o = w & x. With e = 1 the cascade must still
// be a permutation: all 32 five-bit inputs give distinct outputs.
module tb_rev_toffoli4_from_toffoli3;
  logic w, x, y, z, e;
  logic [4:0] o;
  bit seen [32];
  int checks = 0;
  int failures = 0;

  rev_toffoli4_from_toffoli3 dut (.w(w), .x(x), .y(y), .z(z), .e(e),
    .w_o(o[4]), .x_o(o[3]), .y_o(o[2]), .z_o(o[1]), .e_o(o[0]));

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
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 32; v++) begin
      {w, x, y, z, e} = 5'(v);
      #1;
      check("w x y pass", v, int'(o[4:2]), int'({w, x, y}));
      check("e garbage", v, int'(o[0]), (e ^ (w & x)) ? 1 : 0);
      if (!e) check("z toffoli4", v, int'(o[1]), (z ^ (w & x & y)) ? 1 : 0);
      check("output unique", v, int'(seen[o]), 0);
      seen[o] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
