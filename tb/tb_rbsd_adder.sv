// tb_rbsd_adder: self-checking test of the DIGITS-digit RBSD adder row.
// Four instances: both cell architectures at 3 digits, driven with every
// pair of legal operands (3^6 pairs), and both at the default length, driven
// with random legal operands. Every sum digit is compared with the
// digit-level reference of rbsd_ref_pkg, the sum value with the integer sum
// of the operand values, and every digit is checked for the illegal pattern.
module tb_rbsd_adder;
  import rbsd_pkg::*;
  import rbsd_ref_pkg::*;

  localparam int SMALL = 3;
  localparam int FULL  = 8;  // the adder's default length
  localparam int RANDOM_VECTORS = 4000;

  rbsd_digit_t [SMALL-1:0] xs, ys;
  rbsd_digit_t [SMALL:0]   s_nor_small, s_nand_small;
  rbsd_digit_t [FULL-1:0]  xf, yf;
  rbsd_digit_t [FULL:0]    s_nor_full, s_nand_full;

  int checks = 0, failures = 0;
  add_stats_t st = '{default: 0};

  rbsd_adder #(.DIGITS(SMALL), .ARCH(RAC_PROP_NOR))  u_nor_small  (.x(xs), .y(ys), .s(s_nor_small));
  rbsd_adder #(.DIGITS(SMALL), .ARCH(RAC_PROP_NAND)) u_nand_small (.x(xs), .y(ys), .s(s_nand_small));
  rbsd_adder                                          u_nor_full   (.x(xf), .y(yf), .s(s_nor_full));
  rbsd_adder #(.ARCH(RAC_PROP_NAND))                  u_nand_full  (.x(xf), .y(yf), .s(s_nand_full));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Compare one adder output with the reference digits.
  task automatic check_sum(string name, input rbsd_digit_t got[], input int x[], input int y[]);
    int exp_s[];
    int got_v[];
    add_ref(x, y, exp_s, st);
    got_v = new[got.size()];
    foreach (got[i]) begin
      check(!(got[i].p && got[i].n), $sformatf("%s digit %0d illegal", name, i));
      got_v[i] = digit_value(got[i]);
      check(got_v[i] == exp_s[i], $sformatf("%s digit %0d: got %0d expected %0d", name, i, got_v[i], exp_s[i]));
    end
    check(value_of(got_v) == value_of(x) + value_of(y),
          $sformatf("%s value: got %0d expected %0d", name, value_of(got_v), value_of(x) + value_of(y)));
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
    rbsd_digit_t g[];
    xs = '0; ys = '0; xf = '0; yf = '0;
    // exhaustive, 3 digits
    x = new[SMALL];
    y = new[SMALL];
    for (int code = 0; code < 3 ** (2 * SMALL); code++) begin
      automatic int k = code;
      for (int i = 0; i < SMALL; i++) begin
        x[i] = k % 3 - 1; k /= 3;
        y[i] = k % 3 - 1; k /= 3;
        xs[i] = digit_of(x[i]);
        ys[i] = digit_of(y[i]);
      end
      #1;
      g = new[SMALL + 1];
      foreach (g[i]) g[i] = s_nor_small[i];
      check_sum("nor3", g, x, y);
      foreach (g[i]) g[i] = s_nand_small[i];
      check_sum("nand3", g, x, y);
    end
    // random, default length
    x = new[FULL];
    y = new[FULL];
    g = new[FULL + 1];
    for (int v = 0; v < RANDOM_VECTORS; v++) begin
      for (int i = 0; i < FULL; i++) begin
        x[i] = int'($urandom_range(2)) - 1;
        y[i] = int'($urandom_range(2)) - 1;
        xf[i] = digit_of(x[i]);
        yf[i] = digit_of(y[i]);
      end
      #1;
      foreach (g[i]) g[i] = s_nor_full[i];
      check_sum("nor8", g, x, y);
      foreach (g[i]) g[i] = s_nand_full[i];
      check_sum("nand8", g, x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
