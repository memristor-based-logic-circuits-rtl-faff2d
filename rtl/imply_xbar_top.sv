// imply_xbar_top: memristor crossbar with its integrated addressing circuit,
// able to work as a memory and to compute in place with IMPLY steps.
//
// The control circuit decodes four (enable, address) pairs into the switch
// enables of the crossbar: one column to VSET, one to VCOND, one to VCLEAR and
// one row to ground through RG. A NAND of cells p and q of a row into a third
// cell s of the same row takes three steps: clear s, IMPLY p -> s, IMPLY
// q -> s; s then holds p NAND q.
//
// N = 4 is the fabricated 4x4 array. With GATE_LEVEL_CTRL = 1 (default) the
// control circuit is a gate-level netlist in the thin-film-transistor cells:
// xbar_ctrl_tft for N = 4, or xbar_ctrl8_tft for N = 8 with 4-bit addresses
// (ADDR_W = 4). Otherwise it is the behavioural decoder description. The
// decoded switch enables are brought out for observation.
//
// Timing: the control circuit is combinational. A cell changes state about
// 0.6 us after its drive starts and finishes after about 1 us; each step
// should be held for at least 1 us (the slow control circuit is run with
// millisecond pulses).
module imply_xbar_top #(
  parameter int unsigned N               = 4,
  parameter int unsigned ADDR_W          = (N > 1) ? $clog2(N) : 1,
  parameter bit          GATE_LEVEL_CTRL = 1'b1,
  parameter int unsigned T_STEP_NS       = xbar_pkg::T_STEP_NS
) (
  input  logic                                set,
  input  logic [ADDR_W-1:0]                   set_addr,
  input  logic                                cond,
  input  logic [ADDR_W-1:0]                   cond_addr,
  input  logic                                clr,
  input  logic [ADDR_W-1:0]                   clr_addr,
  input  logic                                grnd,
  input  logic [ADDR_W-1:0]                   grnd_addr,
  output logic [N-1:0]                        set_out,
  output logic [N-1:0]                        cond_out,
  output logic [N-1:0]                        clr_out,
  output logic [N-1:0]                        grnd_out,
  output logic [N-1:0][N-1:0]                 state,
  output xbar_pkg::level_t [N-1:0][N-1:0]     level,
  output logic [N-1:0]                        row_sense
);
  timeunit 1ns;
  timeprecision 1ps;

  if (GATE_LEVEL_CTRL && N == 4 && ADDR_W == 2) begin : g_ctrl_tft
    xbar_ctrl_tft u_ctrl (
      .set, .set_addr, .cond, .cond_addr, .clr, .clr_addr, .grnd, .grnd_addr,
      .set_out, .cond_out, .clr_out, .grnd_out
    );
  end else if (GATE_LEVEL_CTRL && N == 8 && ADDR_W == 4) begin : g_ctrl8_tft
    xbar_ctrl8_tft u_ctrl (
      .set, .set_addr, .cond, .cond_addr, .clr, .clr_addr, .grnd, .grnd_addr,
      .set_out, .cond_out, .clr_out, .grnd_out
    );
  end else begin : g_ctrl_rtl
    xbar_ctrl #(.N(N), .ADDR_W(ADDR_W)) u_ctrl (
      .set, .set_addr, .cond, .cond_addr, .clr, .clr_addr, .grnd, .grnd_addr,
      .set_out, .cond_out, .clr_out, .grnd_out
    );
  end

  memristor_crossbar #(.ROWS(N), .COLS(N), .T_STEP_NS(T_STEP_NS)) u_xbar (
    .set_out, .cond_out, .clr_out, .grnd_out, .state, .level, .row_sense
  );

endmodule
