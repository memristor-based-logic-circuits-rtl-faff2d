// xbar_ctrl: control circuit of the memristor crossbar.
//
// The crossbar computes by applying one of three voltages to chosen columns
// and grounding a chosen row through a resistor RG. This block turns four
// (enable, address) pairs into the switch-enable vectors for those drivers:
//   set,  set_addr  -> set_out  : column gets VSET   (write 1 / IMPLY target)
//   cond, cond_addr -> cond_out : column gets VCOND  (IMPLY input)
//   clr,  clr_addr  -> clr_out  : column gets VCLEAR (write 0)
//   grnd, grnd_addr -> grnd_out : row is tied to ground through RG
// Each output vector is one-hot when its enable is high and all zero when it
// is low. Only one column per voltage and one row can be selected at a time,
// so logic operations take place between memristors of the same row.
//
// Fully combinational (the fabricated circuit has no clock); outputs follow
// inputs after the gate delay. N = 4 is the fabricated 4x4 crossbar and N = 8
// the larger variant. The address width ceil(log2 N) is this design's choice.
module xbar_ctrl #(
  parameter int unsigned N      = 4,
  parameter int unsigned ADDR_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic              set,
  input  logic [ADDR_W-1:0] set_addr,
  input  logic              cond,
  input  logic [ADDR_W-1:0] cond_addr,
  input  logic              clr,
  input  logic [ADDR_W-1:0] clr_addr,
  input  logic              grnd,
  input  logic [ADDR_W-1:0] grnd_addr,
  output logic [N-1:0]      set_out,
  output logic [N-1:0]      cond_out,
  output logic [N-1:0]      clr_out,
  output logic [N-1:0]      grnd_out
);
  timeunit 1ns;
  timeprecision 1ps;

  line_decoder #(.N(N), .ADDR_W(ADDR_W)) u_set  (.en(set),  .addr(set_addr),  .sel(set_out));
  line_decoder #(.N(N), .ADDR_W(ADDR_W)) u_cond (.en(cond), .addr(cond_addr), .sel(cond_out));
  line_decoder #(.N(N), .ADDR_W(ADDR_W)) u_clr  (.en(clr),  .addr(clr_addr),  .sel(clr_out));
  line_decoder #(.N(N), .ADDR_W(ADDR_W)) u_grnd (.en(grnd), .addr(grnd_addr), .sel(grnd_out));

endmodule
