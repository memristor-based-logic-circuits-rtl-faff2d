// memristor_crossbar: behavioural model of the memristor crossbar with its
// column drivers and row ground switches (not synthesizable: it uses delays).
//
// A memristor sits at every crossing of a row and a column. Each column can be
// switched to one of three supplies, VSET (set_out), VCOND (cond_out) or
// VCLEAR (clr_out); each row can be tied to ground through a resistor RG
// (grnd_out). Only a grounded row sees current, so all operations act on the
// cells of the grounded row(s):
//   clear (VCLEAR on a column)  : the cell is driven past +1 V and goes to 0.
//   write 1 (VSET alone)        : the cell is driven past -1 V and goes to 1.
//   IMPLY (VCOND on column p, VSET on column q): if p holds a 1 its low
//     resistance lifts the row node, the voltage across q stays inside the
//     threshold and q keeps its value; if p holds a 0, q is driven to 1.
//     So q becomes (!p | q), that is p -> q. With several VCOND columns, q is
//     driven only if all of them hold 0.
//   VCOND alone                 : no cell changes (below threshold).
// Cells in rows that are not grounded, and cells in undriven columns, hold
// their state: sneak-path voltages are taken to stay below threshold.
//
// row_sense[r] is high while row r is grounded and at least one VCOND-driven
// cell of that row holds a 1: the row node is pulled up, which is the same
// condition that inhibits an IMPLY. It gives a way to read one cell. This
// read output is a choice of this design.
//
// Interface: set_out, cond_out, clr_out (COLS bits), grnd_out (ROWS bits);
// state[r][c] (1 = low resistance), level[r][c] (the memristor state L),
// row_sense (ROWS bits). A column must not receive two supplies at once; an
// assertion reports it.
//
// Timing: a cell crosses from one state to the other in about 5 * T_STEP_NS
// and finishes its swing in 9 * T_STEP_NS (about 1 us by default), far faster
// than the millisecond pulses the thin-film control circuit produces.
module memristor_crossbar #(
  parameter int unsigned ROWS      = 4,
  parameter int unsigned COLS      = 4,
  parameter int unsigned T_STEP_NS = xbar_pkg::T_STEP_NS
) (
  input  logic [COLS-1:0]                        set_out,
  input  logic [COLS-1:0]                        cond_out,
  input  logic [COLS-1:0]                        clr_out,
  input  logic [ROWS-1:0]                        grnd_out,
  output logic [ROWS-1:0][COLS-1:0]              state,
  output xbar_pkg::level_t [ROWS-1:0][COLS-1:0]  level,
  output logic [ROWS-1:0]                        row_sense
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [ROWS-1:0]           p_on;   // a VCOND cell of the row holds a 1
  logic [ROWS-1:0][COLS-1:0] v_neg;  // cell driven below -1 V
  logic [ROWS-1:0][COLS-1:0] v_pos;  // cell driven above +1 V

  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      p_on[r]      = |(cond_out & state[r]);
      row_sense[r] = grnd_out[r] & p_on[r];
      for (int unsigned c = 0; c < COLS; c++) begin
        v_neg[r][c] = grnd_out[r] & set_out[c] & ~p_on[r];
        v_pos[r][c] = grnd_out[r] & clr_out[c];
      end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      memristor_cell #(.T_STEP_NS(T_STEP_NS)) u_cell (
        .v_neg (v_neg[r][c]),
        .v_pos (v_pos[r][c]),
        .level (level[r][c]),
        .state (state[r][c])
      );
    end
  end

  // A column switched to two supplies at once would short them.
  always @(set_out or cond_out or clr_out) begin
    #0;
    assert ((set_out & cond_out) == '0 && (set_out & clr_out) == '0 &&
            (cond_out & clr_out) == '0)
      else $error("crossbar column driven by two supplies: set=%b cond=%b clr=%b",
                  set_out, cond_out, clr_out);
  end

endmodule
