// xbar_ctrl_tft: the 4x4 crossbar control circuit as a gate-level netlist in
// the thin-film-transistor cell library (inverter, 2-input NAND, 2-input NOR).
//
// Same function and ports as xbar_ctrl with N = 4: four enable+address pairs
// become four one-hot switch-enable vectors (set_out, cond_out, clr_out for the
// column drivers, grnd_out for the row ground switches). It is made of four
// decoder2to4_tft instances, 32 cells in all: 8 inverters (3 transistors each),
// 8 NANDs and 16 NORs (4 each), 120 transistors, which is the transistor
// count of the fabricated control circuit. Combinational, no clock.
module xbar_ctrl_tft (
  input  logic       set,
  input  logic [1:0] set_addr,
  input  logic       cond,
  input  logic [1:0] cond_addr,
  input  logic       clr,
  input  logic [1:0] clr_addr,
  input  logic       grnd,
  input  logic [1:0] grnd_addr,
  output logic [3:0] set_out,
  output logic [3:0] cond_out,
  output logic [3:0] clr_out,
  output logic [3:0] grnd_out
);
  timeunit 1ns;
  timeprecision 1ps;

  decoder2to4_tft u_set  (.en(set),  .addr(set_addr),  .y(set_out));
  decoder2to4_tft u_cond (.en(cond), .addr(cond_addr), .y(cond_out));
  decoder2to4_tft u_clr  (.en(clr),  .addr(clr_addr),  .y(clr_out));
  decoder2to4_tft u_grnd (.en(grnd), .addr(grnd_addr), .y(grnd_out));

endmodule
