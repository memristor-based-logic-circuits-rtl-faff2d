// decoder3to8_tft: one-of-eight enable decoder for the 8x8 crossbar, built
// only from the TFT cells (inverter, 2-input NAND, 2-input NOR): 6 inverters,
// 8 NANDs and 10 NORs.
//
// The address is 4 bits wide; only addresses 0..7 (addr[3] = 0) select an
// output, any address with addr[3] = 1 selects none. y[i] = en & (addr == i).
// Structure: the upper address bits are predecoded into
//   hi_lo = !a2 & !a3 (rows 0..3) and hi_hi = a2 & !a3 (rows 4..7),
// the lower bits into active-low products of a0/a1 and their complements, and
// each output is a NOR of one gated upper term and one lower term. Outputs 3
// and 7 combine the enable with the lower term a0 & a1 instead. This is the
// mapping the synthesis to the three-cell library produced for the 8x8
// control logic. Combinational, no clock.
module decoder3to8_tft (
  input  logic       en,
  input  logic [3:0] addr,
  output logic [7:0] y
);
  timeunit 1ns;
  timeprecision 1ps;

  logic a0_n, a1_n, a2_n, a3_n;
  logic hi_hi, hi_hi_n, hi_lo, hi_lo_n;   // upper-bit predecode
  logic a01_n, a01;                       // !(a0 & a1), a0 & a1
  logic lo0_n, lo1_n, lo2_n;              // !(!a0&!a1), !(a0&!a1), !(!a0&a1)
  logic en_a01_n;                         // !(en & a0 & a1)
  logic en_hh_n, en_hl_n;                 // !(en & hi_hi), !(en & hi_lo)

  tft_inv   u_i0 (.a(addr[0]), .y(a0_n));
  tft_inv   u_i1 (.a(addr[1]), .y(a1_n));
  tft_inv   u_i2 (.a(addr[2]), .y(a2_n));
  tft_inv   u_i3 (.a(addr[3]), .y(a3_n));

  tft_nor2  u_hh  (.a(a2_n),    .b(addr[3]), .y(hi_hi));
  tft_nand2 u_hhn (.a(addr[2]), .b(a3_n),    .y(hi_hi_n));
  tft_nor2  u_hl  (.a(addr[2]), .b(addr[3]), .y(hi_lo));
  tft_inv   u_hln (.a(hi_lo),   .y(hi_lo_n));

  tft_nand2 u_a01n (.a(addr[0]), .b(addr[1]), .y(a01_n));
  tft_inv   u_a01  (.a(a01_n),   .y(a01));
  tft_nand2 u_lo0  (.a(a0_n),    .b(a1_n),    .y(lo0_n));
  tft_nand2 u_lo1  (.a(addr[0]), .b(a1_n),    .y(lo1_n));
  tft_nand2 u_lo2  (.a(a0_n),    .b(addr[1]), .y(lo2_n));

  tft_nand2 u_ea  (.a(en), .b(a01),   .y(en_a01_n));
  tft_nand2 u_ehh (.a(en), .b(hi_hi), .y(en_hh_n));
  tft_nand2 u_ehl (.a(en), .b(hi_lo), .y(en_hl_n));

  tft_nor2  u_y0 (.a(lo0_n),    .b(en_hl_n), .y(y[0]));
  tft_nor2  u_y1 (.a(en_hl_n),  .b(lo1_n),   .y(y[1]));
  tft_nor2  u_y2 (.a(lo2_n),    .b(en_hl_n), .y(y[2]));
  tft_nor2  u_y3 (.a(en_a01_n), .b(hi_lo_n), .y(y[3]));
  tft_nor2  u_y4 (.a(lo0_n),    .b(en_hh_n), .y(y[4]));
  tft_nor2  u_y5 (.a(en_hh_n),  .b(lo1_n),   .y(y[5]));
  tft_nor2  u_y6 (.a(en_hh_n),  .b(lo2_n),   .y(y[6]));
  tft_nor2  u_y7 (.a(hi_hi_n),  .b(en_a01_n), .y(y[7]));

endmodule
