// rbsd_pkg: shared types for the redundant binary signed-digit (RBSD) adders.
//
// A signed digit d in {-1, 0, +1} travels on two rails, p and n:
//   +1 = (p=1, n=0), 0 = (p=0, n=0), -1 = (p=0, n=1). (p=1, n=1) is not a
//   legal digit and no adder cell produces it.
// The two-rail signal names (xip/xin, sip/sin) follow the cell schematics;
// the assignment of the three values to rail patterns is this design's reading
// of the cell equations (the sum rails are s_p = ~d & b and s_n = d & ~b).
//
// rac_arch_e names the two universal-gate cell architectures that can fill a
// digit position of rbsd_adder.
package rbsd_pkg;

  typedef struct packed {
    logic p;  // digit is +1
    logic n;  // digit is -1
  } rbsd_digit_t;

  typedef enum logic {
    RAC_PROP_NOR  = 1'b0,  // proposed NOR-NOR cell (rac_prop_nor)
    RAC_PROP_NAND = 1'b1   // proposed NAND-NAND cell (rac_prop_nand)
  } rac_arch_e;

  // Integer value of one digit (the illegal pattern reads as 0).
  function automatic int digit_value(rbsd_digit_t d);
    return int'(d.p && !d.n) - int'(d.n && !d.p);
  endfunction

  // Two-rail encoding of a value in {-1, 0, +1}.
  function automatic rbsd_digit_t digit_of(int v);
    rbsd_digit_t d;
    d.p = (v > 0);
    d.n = (v < 0);
    return d;
  endfunction

endpackage
