// tb_rbsd_adder_top: end-to-end test of the top at its default parameters.
// Both adders (NOR cells and NAND cells) get random and directed legal
// operands; every sum is checked digit by digit against the reference of
// rbsd_ref_pkg, by value against the integer sum, and the two architectures
// are checked against each other on the same operands. The test counts how
// often each rule of the carry-free addition was exercised (a +1 and a -1
// transfer between positions, both resolutions of an odd digit sum, a +1 and
// a -1 digit leaving the top position) and fails if any never happened.
module tb_rbsd_adder_top;
  import rbsd_pkg::*;
  import rbsd_ref_pkg::*;

  localparam int D = 8;  // must match the top's default DIGITS
  localparam int RANDOM_VECTORS = 20000;

  rbsd_digit_t [D-1:0] x_nor, y_nor, x_nand, y_nand;
  rbsd_digit_t [D:0]   s_nor, s_nand;

  int checks = 0, failures = 0;
  add_stats_t st = '{default: 0};

  rbsd_adder_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic check_sum(string name, input rbsd_digit_t [D:0] got, input int x[], input int y[]);
    int exp_s[];
    int got_v[];
    add_ref(x, y, exp_s, st);
    got_v = new[D + 1];
    for (int i = 0; i <= D; i++) begin
      check(!(got[i].p && got[i].n), $sformatf("%s digit %0d illegal", name, i));
      got_v[i] = digit_value(got[i]);
      check(got_v[i] == exp_s[i], $sformatf("%s digit %0d: got %0d expected %0d", name, i, got_v[i], exp_s[i]));
    end
    check(value_of(got_v) == value_of(x) + value_of(y),
          $sformatf("%s value: got %0d expected %0d", name, value_of(got_v), value_of(x) + value_of(y)));
  endtask

  // Drive the same operands into both adders and check both.
  task automatic apply(input int x[], input int y[]);
    for (int i = 0; i < D; i++) begin
      x_nor[i]  = digit_of(x[i]);
      y_nor[i]  = digit_of(y[i]);
      x_nand[i] = digit_of(x[i]);
      y_nand[i] = digit_of(y[i]);
    end
    #1;
    check_sum("nor", s_nor, x, y);
    check_sum("nand", s_nand, x, y);
    check(s_nor == s_nand, "NOR and NAND adders disagree");
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x[], y[];
    x_nor = '0; y_nor = '0; x_nand = '0; y_nand = '0;
    x = new[D];
    y = new[D];
    // directed: largest positive and negative sums, zero, mixed signs
    foreach (x[i]) begin x[i] = 1;  y[i] = 1;  end apply(x, y);
    foreach (x[i]) begin x[i] = -1; y[i] = -1; end apply(x, y);
    foreach (x[i]) begin x[i] = 0;  y[i] = 0;  end apply(x, y);
    foreach (x[i]) begin x[i] = 1;  y[i] = -1; end apply(x, y);
    foreach (x[i]) begin x[i] = (i % 2 != 0) ? 1 : 0; y[i] = (i % 2 != 0) ? 0 : -1; end apply(x, y);
    // random
    for (int v = 0; v < RANDOM_VECTORS; v++) begin
      foreach (x[i]) begin
        x[i] = int'($urandom_range(2)) - 1;
        y[i] = int'($urandom_range(2)) - 1;
      end
      apply(x, y);
    end
    $display("rules exercised: +1 transfer %0d, -1 transfer %0d, odd sum w=+1 %0d, odd sum w=-1 %0d, top digit +1 %0d, top digit -1 %0d",
             st.carry_pos, st.carry_neg, st.odd_m1, st.odd_m0, st.top_pos, st.top_neg);
    check(st.carry_pos > 0, "no +1 transfer exercised");
    check(st.carry_neg > 0, "no -1 transfer exercised");
    check(st.odd_m1 > 0, "odd sum with m=1 never exercised");
    check(st.odd_m0 > 0, "odd sum with m=0 never exercised");
    check(st.top_pos > 0, "top digit +1 never produced");
    check(st.top_neg > 0, "top digit -1 never produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
