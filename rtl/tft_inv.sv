// tft_inv: inverter cell of the thin-film-transistor target technology.
//
// In silicon it is an NMOS-only gate: a 40u/20u pull-down transistor and a
// 20u/20u load transistor whose gate is bootstrapped through a 10 pF
// capacitor so that the output can rise to VDD (3 transistors). Here only its
// logic function is kept: y = !a. Combinational, no timing modelled.
module tft_inv (
  input  logic a,
  output logic y
);
  timeunit 1ns;
  timeprecision 1ps;

  assign y = ~a;

endmodule
