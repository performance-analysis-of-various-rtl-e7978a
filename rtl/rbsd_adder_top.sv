// rbsd_adder_top: the two proposed universal-gate RBSD adder architectures,
// each as a DIGITS-digit carry-free adder, side by side.
//
// u_nor adds x_nor + y_nor with NOR-only cells, u_nand adds x_nand + y_nand
// with NAND-only cells; each has its own operand and sum ports so that the
// two can be exercised and compared independently. Digits use the two-rail
// encoding of rbsd_pkg; each sum has DIGITS+1 digits, the top one being the
// transfer out of the most significant cell. Combinational, no clock.
// Placing both architectures in one top is this design's own arrangement;
// DIGITS = 8 is an assumed default (the cells work for any length).
module rbsd_adder_top
  import rbsd_pkg::*;
#(
  parameter int DIGITS = 8
) (
  input  rbsd_digit_t [DIGITS-1:0] x_nor,
  input  rbsd_digit_t [DIGITS-1:0] y_nor,
  output rbsd_digit_t [DIGITS:0]   s_nor,
  input  rbsd_digit_t [DIGITS-1:0] x_nand,
  input  rbsd_digit_t [DIGITS-1:0] y_nand,
  output rbsd_digit_t [DIGITS:0]   s_nand
);

  rbsd_adder #(.DIGITS(DIGITS), .ARCH(RAC_PROP_NOR)) u_nor (
    .x(x_nor),
    .y(y_nor),
    .s(s_nor)
  );

  rbsd_adder #(.DIGITS(DIGITS), .ARCH(RAC_PROP_NAND)) u_nand (
    .x(x_nand),
    .y(y_nand),
    .s(s_nand)
  );

endmodule
