// End-to-end testbench for rev_examples_top at its default (and only)
// configuration. Every circuit is driven with every input pattern and its
// output compared with the published specification tables or, for the
// adder and the gate identities, with arithmetic and Boolean formulas
// written here. It also checks that each pattern circuit is reversible (no
// two inputs give the same output) and counts how often each mechanism of
// the design is exercised; a mechanism that never happens is a failure:
//   fredkin_swap   ex1 exchanges b and c (a = 1, b != c)
//   tof3_flip      ex2 exchanges patterns 3 and 4 through its TOF3
//   tof4_flip      ex3 exchanges patterns 7 and 8 through its TOF4
//   inc_wrap       ex4 / ex5 wrap from the all-ones pattern to 0
//   assigned_perm  ex6 / ex7 (inputs wired to permuted lines) move a pattern
//   carry          the full adder produces a carry
//   t3_flip        the FEY-FRE-FEY Toffoli inverts its target
//   t4_flip        the two-TOF3 Toffoli inverts its target with e = 0
module tb_rev_examples_top;
  localparam int unsigned SPEC1 [8]  = '{0, 1, 2, 3, 4, 6, 5, 7};
  localparam int unsigned SPEC2 [8]  = '{0, 1, 2, 4, 3, 5, 6, 7};
  localparam int unsigned SPEC3 [16] = '{0, 1, 2, 3, 4, 5, 6, 8, 7, 9, 10, 11, 12, 13, 14, 15};
  localparam int unsigned SPEC6 [16] = '{3, 11, 2, 10, 0, 7, 1, 6, 15, 8, 14, 9, 13, 5, 12, 4};
  localparam int unsigned SPEC7 [16] = '{4, 6, 2, 0, 15, 13, 7, 5, 9, 11, 3, 1, 14, 12, 10, 8};

  logic [2:0] ex1_in, ex1_out, ex2_in, ex2_out, ex4_in, ex4_out;
  logic [3:0] ex3_in, ex3_out, ex5_in, ex5_out, ex6_in, ex6_out, ex7_in, ex7_out;
  logic       fa_a, fa_b, fa_c, fa_sum, fa_carry, fa_g_a, fa_g_c;
  logic [2:0] t3_in, t3_out;
  logic [4:0] t4_in, t4_out;

  int checks = 0;
  int failures = 0;
  int n_fredkin_swap = 0, n_tof3_flip = 0, n_tof4_flip = 0, n_inc_wrap = 0;
  int n_assigned_perm = 0, n_carry = 0, n_t3_flip = 0, n_t4_flip = 0;

  // Outputs seen so far, per circuit, for the reversibility check.
  bit seen [7][16];

  rev_examples_top dut (.*);

  task automatic check(input string what, input int v, input int got,
                       input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: input %0d gave %0d, expected %0d", what, v, got, exp);
    end
  endtask

  task automatic mark_seen(input int circuit, input int v, input int out);
    check("reversible (distinct outputs)", v, int'(seen[circuit][out]), 0);
    seen[circuit][out] = 1'b1;
  endtask

  task automatic mechanism(input string name, input int count);
    $display("mechanism %-14s happened %0d times", name, count);
    check({"mechanism ", name}, 0, int'(count > 0), 1);
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i, j]) seen[i][j] = 1'b0;
    fa_a = 1'b0; fa_b = 1'b0; fa_c = 1'b0;
    t3_in = '0;
    t4_in = '0;

    for (int v = 0; v < 16; v++) begin
      ex1_in = 3'(v);
      ex2_in = 3'(v);
      ex4_in = 3'(v);
      ex3_in = 4'(v);
      ex5_in = 4'(v);
      ex6_in = 4'(v);
      ex7_in = 4'(v);
      #1;
      if (v < 8) begin
        check("ex1", v, int'(ex1_out), int'(SPEC1[v]));
        check("ex2", v, int'(ex2_out), int'(SPEC2[v]));
        check("ex4 increment", v, int'(ex4_out), (v + 1) % 8);
        mark_seen(0, v, int'(ex1_out));
        mark_seen(1, v, int'(ex2_out));
        mark_seen(3, v, int'(ex4_out));
        if (ex1_in[2] && (ex1_in[1] != ex1_in[0]) && ex1_out == {ex1_in[2], ex1_in[0], ex1_in[1]})
          n_fredkin_swap++;
        if (ex2_out != ex2_in) n_tof3_flip++;
        if (ex4_in == 3'd7 && ex4_out == 3'd0) n_inc_wrap++;
      end
      check("ex3", v, int'(ex3_out), int'(SPEC3[v]));
      check("ex5 increment", v, int'(ex5_out), (v + 1) % 16);
      check("ex6", v, int'(ex6_out), int'(SPEC6[v]));
      check("ex7", v, int'(ex7_out), int'(SPEC7[v]));
      mark_seen(2, v, int'(ex3_out));
      mark_seen(4, v, int'(ex5_out));
      mark_seen(5, v, int'(ex6_out));
      mark_seen(6, v, int'(ex7_out));
      if (ex3_out != ex3_in) n_tof4_flip++;
      if (ex5_in == 4'd15 && ex5_out == 4'd0) n_inc_wrap++;
      if (ex6_out != ex6_in) n_assigned_perm++;
      if (ex7_out != ex7_in) n_assigned_perm++;
    end

    // ex6 followed by ex7 must be the identity: the two functions are inverse.
    for (int v = 0; v < 16; v++) begin
      ex6_in = 4'(v);
      #1;
      ex7_in = ex6_out;
      #1;
      check("ex7(ex6(v)) = v", v, int'(ex7_out), v);
    end

    for (int v = 0; v < 8; v++) begin
      int total;
      {fa_a, fa_b, fa_c} = 3'(v);
      total = int'(fa_a) + int'(fa_b) + int'(fa_c);
      #1;
      check("fa sum", v, int'(fa_sum), total % 2);
      check("fa carry", v, int'(fa_carry), total / 2);
      check("fa garbage", v, int'({fa_g_a, fa_g_c}), int'({fa_a, fa_c}));
      if (fa_carry) n_carry++;
    end

    for (int v = 0; v < 8; v++) begin
      t3_in = 3'(v);
      #1;
      check("t3", v, int'(t3_out), (v >= 6) ? (v ^ 1) : v);
      if (t3_out != t3_in) n_t3_flip++;
    end

    for (int v = 0; v < 16; v++) begin
      int exp_z;
      t4_in = {4'(v), 1'b0};
      #1;
      exp_z = (v >= 14) ? ((v & 1) ^ 1) : (v & 1);
      check("t4 w x y", v, int'(t4_out[4:2]), v >> 1);
      check("t4 z", v, int'(t4_out[1]), exp_z);
      check("t4 e", v, int'(t4_out[0]), (v >= 12) ? 1 : 0);
      if (t4_out[1] != t4_in[1]) n_t4_flip++;
    end

    mechanism("fredkin_swap", n_fredkin_swap);
    mechanism("tof3_flip", n_tof3_flip);
    mechanism("tof4_flip", n_tof4_flip);
    mechanism("inc_wrap", n_inc_wrap);
    mechanism("assigned_perm", n_assigned_perm);
    mechanism("carry", n_carry);
    mechanism("t3_flip", n_t3_flip);
    mechanism("t4_flip", n_t4_flip);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
