// xbar_ctrl8_tft: control circuit of the 8x8 crossbar as a gate-level netlist
// in the thin-film-transistor cell library (inverter, 2-input NAND, 2-input
// NOR).
//
// Same function as xbar_ctrl with N = 8 and ADDR_W = 4: each of the four
// (enable, 4-bit address) pairs drives a one-hot switch-enable vector of 8 bits
// (set_out, cond_out, clr_out for the column drivers, grnd_out for the row
// ground switches). An address of 8 or more selects nothing. Built from four
// decoder3to8_tft instances, 96 cells in all (24 inverters, 32 NANDs, 40 NORs).
// Combinational, no clock.
module xbar_ctrl8_tft (
  input  logic       set,
  input  logic [3:0] set_addr,
  input  logic       cond,
  input  logic [3:0] cond_addr,
  input  logic       clr,
  input  logic [3:0] clr_addr,
  input  logic       grnd,
  input  logic [3:0] grnd_addr,
  output logic [7:0] set_out,
  output logic [7:0] cond_out,
  output logic [7:0] clr_out,
  output logic [7:0] grnd_out
);
  timeunit 1ns;
  timeprecision 1ps;

  decoder3to8_tft u_set  (.en(set),  .addr(set_addr),  .y(set_out));
  decoder3to8_tft u_cond (.en(cond), .addr(cond_addr), .y(cond_out));
  decoder3to8_tft u_clr  (.en(clr),  .addr(clr_addr),  .y(clr_out));
  decoder3to8_tft u_grnd (.en(grnd), .addr(grnd_addr), .y(grnd_out));

endmodule
