// tb_memristor_cell: checks the threshold memristor model.
//
// Checked: the starting state (L = 10, logic 0); a drive below -1 V held for
// 1 us takes L to 1 and the reading to 1, with the reading still 0 after four
// steps and 1 after five; a pulse shorter than one step changes nothing; a
// pulse of three steps moves L by three (partial switching); with no drive L
// holds; a drive above +1 V takes L back to 10; L never leaves 1..10.
module tb_memristor_cell;
  timeunit 1ns;
  timeprecision 1ps;
  import xbar_pkg::*;

  localparam int unsigned STEP = 100;

  int checks = 0, failures = 0;
  logic v_neg = 1'b0, v_pos = 1'b0;
  level_t level;
  logic state;

  memristor_cell #(.T_STEP_NS(STEP)) dut (.v_neg, .v_pos, .level, .state);

  task automatic check(input string what, input int unsigned exp_level);
    checks++;
    if (level != level_t'(exp_level) || state != (exp_level <= L_ONE_MAX)) begin
      failures++;
      $display("FAIL %s at %0t: level=%0d state=%b expected level %0d", what, $time,
               level, state, exp_level);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    check("initial", 10);
    // Below -1 V: one unit per step.
    v_neg = 1'b1;
    #(4 * STEP + STEP / 2);
    check("after 4 steps down", 6);
    #(STEP);
    check("after 5 steps down", 5);
    #(4 * STEP);
    check("after 9 steps down", 1);
    #(5 * STEP);
    check("held at lower bound", 1);
    v_neg = 1'b0;
    #(10 * STEP);
    check("no drive holds", 1);
    // A glitch shorter than a step does nothing.
    v_pos = 1'b1;
    #(STEP / 2);
    v_pos = 1'b0;
    #(3 * STEP);
    check("short pulse ignored", 1);
    // Three steps above +1 V: partial switching.
    v_pos = 1'b1;
    #(3 * STEP + STEP / 2);
    v_pos = 1'b0;
    #(STEP);
    check("partial pulse", 4);
    v_pos = 1'b1;
    #(2 * STEP + STEP / 2);
    check("crosses to 0", 6);
    #(10 * STEP);
    check("upper bound", 10);
    v_pos = 1'b0;
    #(2 * STEP);
    check("holds 0", 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
