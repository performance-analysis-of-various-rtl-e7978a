// rac_prop_nand: redundant binary signed-digit adder cell built from NAND
// gates only (the proposed NAND-NAND architecture).
//
// Same arithmetic as rac_prop_nor (see that file for the equations and for
// what m and b mean); only the gate type and the polarity of the signals that
// pass between cells differ. This cell takes m_i inverted and b_i true, and
// hands on m_{i+1} inverted and b_{i+1} true:
//   mibar_n = x_ip | y_ip
//   bi_n    = ~m_i & ~|x_i| | ~m_i & ~|y_i| | x_ip & y_ip | ~|x_i| & ~|y_i|
//   sip = ~d_i & b_i,  sin = d_i & ~b_i,  d_i = m_i ^ |x_i| ^ |y_i|
//
// Ports follow the cell schematic: inputs xip, xin, yip, yin, mibar, bi;
// outputs mibar_n, bi_n, sip, sin. Cascading cells wires mibar_n to the next
// mibar and bi_n to the next bi. The lowest cell takes mibar = 1, bi = 0.
//
// Netlist: 26 NAND gates, the gate count of the published schematic. The
// mapping of the equations onto NAND gates (sum of products as NAND-NAND,
// inverters as NANDs with tied inputs) is this design's own. Timing: purely
// combinational, a constant number of gate levels.
module rac_prop_nand (
  input  logic xip,
  input  logic xin,
  input  logic yip,
  input  logic yin,
  input  logic mibar,
  input  logic bi,
  output logic mibar_n,
  output logic bi_n,
  output logic sip,
  output logic sin
);

  logic xp_bar, xn_bar, yp_bar, yn_bar;  // inverted input rails
  logic x_nz, y_nz, x_zero, y_zero;
  logic u_mx, u_my, u_pp, u_zz;          // inverted product terms of b_{i+1}
  logic m;
  logic v0, v1, v2, v3;                  // inverted minterms of d_i
  logic d, d_bar, b_bar;
  logic sp_bar, sn_bar;

  // input inverters
  ul_nand #(.N(2)) g_ynb  (.a({yin, yin}),             .y(yn_bar));
  ul_nand #(.N(2)) g_ypb  (.a({yip, yip}),             .y(yp_bar));
  ul_nand #(.N(2)) g_xnb  (.a({xin, xin}),             .y(xn_bar));
  ul_nand #(.N(2)) g_xpb  (.a({xip, xip}),             .y(xp_bar));
  // ~m_{i+1}
  ul_nand #(.N(2)) g_mb   (.a({xp_bar, yp_bar}),       .y(mibar_n));
  // digit magnitudes
  ul_nand #(.N(2)) g_ynz  (.a({yp_bar, yn_bar}),       .y(y_nz));
  ul_nand #(.N(2)) g_xnz  (.a({xp_bar, xn_bar}),       .y(x_nz));
  ul_nand #(.N(2)) g_yz   (.a({y_nz, y_nz}),           .y(y_zero));
  ul_nand #(.N(2)) g_xz   (.a({x_nz, x_nz}),           .y(x_zero));
  // b_{i+1}
  ul_nand #(.N(2)) g_umx  (.a({mibar, x_zero}),        .y(u_mx));
  ul_nand #(.N(2)) g_umy  (.a({mibar, y_zero}),        .y(u_my));
  ul_nand #(.N(2)) g_upp  (.a({xip, yip}),             .y(u_pp));
  ul_nand #(.N(2)) g_uzz  (.a({x_zero, y_zero}),       .y(u_zz));
  ul_nand #(.N(4)) g_b    (.a({u_mx, u_my, u_pp, u_zz}), .y(bi_n));
  // d_i
  ul_nand #(.N(2)) g_m    (.a({mibar, mibar}),         .y(m));
  ul_nand #(.N(3)) g_v0   (.a({m, x_zero, y_zero}),    .y(v0));
  ul_nand #(.N(3)) g_v1   (.a({m, x_nz, y_nz}),        .y(v1));
  ul_nand #(.N(3)) g_v2   (.a({mibar, x_nz, y_zero}),  .y(v2));
  ul_nand #(.N(3)) g_v3   (.a({mibar, x_zero, y_nz}),  .y(v3));
  ul_nand #(.N(4)) g_d    (.a({v0, v1, v2, v3}),       .y(d));
  // sum digit
  ul_nand #(.N(2)) g_dbar (.a({d, d}),                 .y(d_bar));
  ul_nand #(.N(2)) g_bbar (.a({bi, bi}),               .y(b_bar));
  ul_nand #(.N(2)) g_spb  (.a({d_bar, bi}),            .y(sp_bar));
  ul_nand #(.N(2)) g_snb  (.a({d, b_bar}),             .y(sn_bar));
  ul_nand #(.N(2)) g_sp   (.a({sp_bar, sp_bar}),       .y(sip));
  ul_nand #(.N(2)) g_sn   (.a({sn_bar, sn_bar}),       .y(sin));

endmodule
