// tb_rac_prop_nand: exhaustive self-checking test of the NAND-NAND RBSD cell.
// Applies all 9 legal digit pairs (x_i, y_i) with all 4 combinations of the
// incoming m_i and b_i, and compares m_{i+1}, b_{i+1} and the sum digit with
// the arithmetic reference model of rbsd_ref_pkg. It also checks that the sum
// digit is never the illegal rail pattern and that value is conserved:
// 2*c_{i+1} + s_i == x_i + y_i + c_i with c = b - m.
module tb_rac_prop_nand;
  import rbsd_ref_pkg::*;

  logic xip, xin, yip, yin, mibar, bi;
  logic mibar_n, bi_n, sip, sin;
  int checks = 0, failures = 0;

  rac_prop_nand dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=(%0b,%0b) y=(%0b,%0b) mibar=%0b bi=%0b -> mibar_n=%0b bi_n=%0b sip=%0b sin=%0b",
               what, xip, xin, yip, yin, mibar, bi, mibar_n, bi_n, sip, sin);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_ref_t r;
    int s_val, c_in, c_next;
    for (int x = -1; x <= 1; x++)
      for (int y = -1; y <= 1; y++)
        for (int mb = 0; mb < 4; mb++) begin
          xip = (x > 0); xin = (x < 0);
          yip = (y > 0); yin = (y < 0);
          mibar = ~mb[1];
          bi    = mb[0];
          #1;
          r = cell_ref(x, y, mb[1], mb[0]);
          s_val  = int'(sip) - int'(sin);
          c_in   = int'(mb[0]) - int'(mb[1]);
          c_next = int'(bi_n) - int'(!mibar_n);
          check(~mibar_n == r.m_next, "m_{i+1}");
          check(bi_n == r.b_next, "b_{i+1}");
          check(!(sip && sin), "legal sum digit");
          check(s_val == r.s, "sum digit value");
          check(2 * c_next + s_val == x + y + c_in, "value conservation");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
