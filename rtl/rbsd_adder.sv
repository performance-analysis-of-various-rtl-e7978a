// rbsd_adder: DIGITS-digit carry-free adder for redundant binary signed-digit
// (RBSD) numbers, made of a row of universal-gate adder cells.
//
// Operands x and y are DIGITS signed digits each (value sum of d_i * 2^i,
// d_i in {-1,0,+1}, two-rail encoding of rbsd_pkg). The sum s has DIGITS+1
// digits: s[DIGITS-1:0] come straight from the cells, s[DIGITS] is the
// transfer digit c_DIGITS = b_DIGITS - m_DIGITS leaving the top cell.
// Every cell talks only to its two neighbours (m and b), so the delay from
// any input to any output is a few gate levels whatever DIGITS is: there is
// no carry chain.
//
// ARCH picks the cell: RAC_PROP_NOR (rac_prop_nor, the default, the faster
// and lower-power of the two proposed cells) or RAC_PROP_NAND (rac_prop_nand).
// The bottom cell receives "no transfer" (m = 0, b = 0); as a consequence the
// lowest sum digit is never +1 (its p rail is constant 0), which is correct:
// with m = 0 the interim digit of an odd position is resolved as -1. The
// chaining, the boundary values, the conversion of the top cell's m and b
// into a sum digit (two gates) and the default DIGITS are this design's own
// choices; the published material describes the single cell.
// Immediate assertions report an operand digit with the illegal pattern
// p = n = 1. Timing: combinational.
module rbsd_adder
  import rbsd_pkg::*;
#(
  parameter int        DIGITS = 8,
  parameter rac_arch_e ARCH   = RAC_PROP_NOR
) (
  input  rbsd_digit_t [DIGITS-1:0] x,
  input  rbsd_digit_t [DIGITS-1:0] y,
  output rbsd_digit_t [DIGITS:0]   s
);

  // m[i], b[i]: true-polarity m_i and b_i entering digit position i. Each
  // cell type passes one of them inverted; the inversions below cancel, so
  // cell outputs drive the next cell's inputs directly after optimisation.
  logic [DIGITS:0] m, b;

  assign m[0] = 1'b0;
  assign b[0] = 1'b0;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    if (ARCH == RAC_PROP_NOR) begin : g_nor
      logic bibar_n;
      rac_prop_nor u_cell (
        .xip    (x[i].p),
        .xin    (x[i].n),
        .yip    (y[i].p),
        .yin    (y[i].n),
        .mi     (m[i]),
        .bibar  (~b[i]),
        .mi_n   (m[i+1]),
        .bibar_n(bibar_n),
        .sip    (s[i].p),
        .sin    (s[i].n)
      );
      assign b[i+1] = ~bibar_n;
    end else begin : g_nand
      logic mibar_n;
      rac_prop_nand u_cell (
        .xip    (x[i].p),
        .xin    (x[i].n),
        .yip    (y[i].p),
        .yin    (y[i].n),
        .mibar  (~m[i]),
        .bi     (b[i]),
        .mibar_n(mibar_n),
        .bi_n   (b[i+1]),
        .sip    (s[i].p),
        .sin    (s[i].n)
      );
      assign m[i+1] = ~mibar_n;
    end
  end

  // Operand digits must be legal: the pattern p = n = 1 has no value. The
  // check is left out of synthesis by tools that ignore assertions.
  always_comb begin
    for (int i = 0; i < DIGITS; i++) begin
      a_legal_x : assert (!(x[i].p && x[i].n))
        else $error("rbsd_adder: operand x digit %0d is the illegal pattern p=n=1", i);
      a_legal_y : assert (!(y[i].p && y[i].n))
        else $error("rbsd_adder: operand y digit %0d is the illegal pattern p=n=1", i);
    end
  end

  // Transfer digit out of the top position: c = b - m.
  assign s[DIGITS].p =  b[DIGITS] & ~m[DIGITS];
  assign s[DIGITS].n = ~b[DIGITS] &  m[DIGITS];

endmodule
