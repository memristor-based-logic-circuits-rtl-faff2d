// decoder2to4_tft: 2-to-4 enable decoder built only from the TFT cells
// (inverter, 2-input NAND, 2-input NOR), 8 cells and 28 transistors.
//
// Structure: the enable is combined with the high address bit and with its
// complement in two NANDs, g1 = !(en & a1) and g0 = !(en & !a1). Each output
// is then a NOR of one NAND output with the low address bit or its complement:
//   y0 = !(a0 | g0)   y1 = !(!a0 | g0)   y2 = !(a0 | g1)   y3 = !(!a0 | g1)
// so y[i] = en & (addr == i). This is the mapping the synthesis to the
// three-cell library produced for the fabricated 4x4 control circuit.
// Combinational, no clock.
module decoder2to4_tft (
  input  logic       en,
  input  logic [1:0] addr,
  output logic [3:0] y
);
  timeunit 1ns;
  timeprecision 1ps;

  logic a0_n, a1_n;   // complemented address bits
  logic g0, g1;       // enable gated with !a1 and with a1, active low

  tft_inv   u_inv0  (.a(addr[0]), .y(a0_n));
  tft_inv   u_inv1  (.a(addr[1]), .y(a1_n));
  tft_nand2 u_nand1 (.a(addr[1]), .b(en), .y(g1));
  tft_nand2 u_nand0 (.a(a1_n),    .b(en), .y(g0));
  tft_nor2  u_nor0  (.a(addr[0]), .b(g0), .y(y[0]));
  tft_nor2  u_nor1  (.a(a0_n),    .b(g0), .y(y[1]));
  tft_nor2  u_nor2  (.a(addr[0]), .b(g1), .y(y[2]));
  tft_nor2  u_nor3  (.a(a0_n),    .b(g1), .y(y[3]));

endmodule
