// rac_prop_nor: redundant binary signed-digit adder cell built from NOR gates
// only (the proposed NOR-NOR architecture).
//
// The cell adds the digits x_i and y_i (two-rail, see rbsd_pkg) without any
// carry chain. It takes two bits from the cell one position down, m_i and
// (inverted) b_i, and hands m_{i+1} and (inverted) b_{i+1} to the cell one
// position up. The logic is the published set of equations:
//   m_{i+1} = ~x_ip & ~y_ip                      (neither digit is +1)
//   d_i     = m_i ^ |x_i| ^ |y_i|                (|x| = x_ip | x_in)
//   b_{i+1} = ~m_i & ~|x_i| | ~m_i & ~|y_i| | x_ip & y_ip | ~|x_i| & ~|y_i|
//   s_ip    = ~d_i & b_i
//   s_in    =  d_i & ~b_i
// Arithmetically, c_i = b_i - m_i is the transfer digit entering position i
// and s_i = w_i + c_i, with x_i + y_i = 2 c_{i+1} + w_i.
//
// Ports follow the cell schematic: inputs xip, xin, yip, yin, mi, bibar;
// outputs mi_n (m_{i+1}), bibar_n (~b_{i+1}), sip, sin. Cascading cells
// wires mi_n to the next mi and bibar_n to the next bibar. The lowest cell
// takes mi = 0, bibar = 1 (no incoming transfer).
//
// Netlist: 22 NOR gates of 1 to 4 used inputs, the gate count of the
// published schematic. The wiring below is this design's own mapping of the
// equations onto NOR gates: three-input NORs form the four minterms of d_i,
// two-input NORs the four product terms of b_{i+1}, and four-input NORs sum
// them in inverted form. Timing: purely combinational, a constant number of
// gate levels independent of the adder length.
module rac_prop_nor (
  input  logic xip,
  input  logic xin,
  input  logic yip,
  input  logic yin,
  input  logic mi,
  input  logic bibar,
  output logic mi_n,
  output logic bibar_n,
  output logic sip,
  output logic sin
);

  logic x_zero, y_zero;       // digit is 0
  logic x_nz, y_nz;           // digit is nonzero
  logic xp_bar, yp_bar;       // inverted positive rails
  logic t_mx, t_my, t_pp, t_zz;  // product terms of b_{i+1}
  logic m_bar;                // inverted m_i
  logic k0, k1, k2, k3;       // minterms of d_i
  logic d_bar, d, b;

  // m_{i+1}
  ul_nor #(.N(2)) g_m    (.a({xip, yip}),             .y(mi_n));
  // digit magnitudes
  ul_nor #(.N(2)) g_xz   (.a({xip, xin}),             .y(x_zero));
  ul_nor #(.N(2)) g_yz   (.a({yip, yin}),             .y(y_zero));
  ul_nor #(.N(2)) g_xnz  (.a({x_zero, x_zero}),       .y(x_nz));
  ul_nor #(.N(2)) g_ynz  (.a({y_zero, y_zero}),       .y(y_nz));
  // b_{i+1}, formed inverted
  ul_nor #(.N(2)) g_tmx  (.a({mi, x_nz}),             .y(t_mx));   // ~m & x==0
  ul_nor #(.N(2)) g_tmy  (.a({mi, y_nz}),             .y(t_my));   // ~m & y==0
  ul_nor #(.N(2)) g_tzz  (.a({x_nz, y_nz}),           .y(t_zz));   // x==0 & y==0
  ul_nor #(.N(2)) g_xpb  (.a({xip, xip}),             .y(xp_bar));
  ul_nor #(.N(2)) g_ypb  (.a({yip, yip}),             .y(yp_bar));
  ul_nor #(.N(2)) g_tpp  (.a({xp_bar, yp_bar}),       .y(t_pp));   // x==+1 & y==+1
  ul_nor #(.N(4)) g_bbar (.a({t_mx, t_my, t_pp, t_zz}), .y(bibar_n));
  // d_i as the sum of its four minterms, formed inverted
  ul_nor #(.N(2)) g_mbar (.a({mi, mi}),               .y(m_bar));
  ul_nor #(.N(3)) g_k0   (.a({m_bar, x_nz, y_nz}),    .y(k0));     //  m & x==0 & y==0
  ul_nor #(.N(3)) g_k1   (.a({m_bar, x_zero, y_zero}), .y(k1));    //  m & x!=0 & y!=0
  ul_nor #(.N(3)) g_k2   (.a({mi, x_zero, y_nz}),     .y(k2));     // ~m & x!=0 & y==0
  ul_nor #(.N(3)) g_k3   (.a({mi, x_nz, y_zero}),     .y(k3));     // ~m & x==0 & y!=0
  ul_nor #(.N(4)) g_dbar (.a({k0, k1, k2, k3}),       .y(d_bar));
  ul_nor #(.N(2)) g_d    (.a({d_bar, d_bar}),         .y(d));
  // sum digit
  ul_nor #(.N(2)) g_b    (.a({bibar, bibar}),         .y(b));
  ul_nor #(.N(2)) g_sin  (.a({d_bar, b}),             .y(sin));    //  d & ~b
  ul_nor #(.N(2)) g_sip  (.a({d, bibar}),             .y(sip));    // ~d &  b

endmodule
