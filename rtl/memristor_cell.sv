// memristor_cell: behavioural model of one threshold memristor (not
// synthesizable: it uses delays).
//
// The device is a two-terminal programmable resistor. Its state L (1..10,
// resistance 10 kOhm * L) changes only while the voltage across it is beyond
// a threshold: below -1 V, L falls at a constant rate toward 1 (low
// resistance, logic 1); above +1 V it rises toward 10 (high resistance, logic
// 0). In between, L holds. A pulse shorter than the full switching time moves
// L only part of the way, in proportion to its length.
//
// The analog part has terminals PLUS, MINUS and a state node L. In this
// digital model the terminal voltage is given as the two threshold
// comparisons v_neg (V(PLUS,MINUS) < -1 V) and v_pos (> +1 V), and the state
// node is the output level. state is the logic reading of level (1 when
// level <= 5).
//
// Timing: L moves one unit every T_STEP_NS while a threshold is exceeded, so a
// full swing takes 9 * T_STEP_NS (about 1 us by default). A threshold that is
// exceeded for less than one step leaves L unchanged. The cell starts in the
// high-resistance state unless INIT_STATE is 1.
//
// Being a timed model, it is meant for simulation only: a synthesis tool that
// drops the delays sees level as a latch that feeds itself, which is expected
// here and does not describe hardware.
module memristor_cell #(
  parameter int unsigned T_STEP_NS  = xbar_pkg::T_STEP_NS,
  parameter bit          INIT_STATE = 1'b0
) (
  input  logic             v_neg,
  input  logic             v_pos,
  output xbar_pkg::level_t level,
  output logic             state
);
  timeunit 1ns;
  timeprecision 1ps;

  import xbar_pkg::*;

  initial level = INIT_STATE ? level_t'(L_MIN) : level_t'(L_MAX);

  always begin
    wait (v_neg || v_pos);
    #(T_STEP_NS * 1ns);
    if (v_neg && !v_pos && level > level_t'(L_MIN))
      level = level - 1'b1;
    else if (v_pos && !v_neg && level < level_t'(L_MAX))
      level = level + 1'b1;
  end

  assign state = (level <= level_t'(L_ONE_MAX));

endmodule
