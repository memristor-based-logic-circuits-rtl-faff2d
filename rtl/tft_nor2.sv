// tft_nor2: two-input NOR cell of the thin-film-transistor target technology.
//
// In silicon two 40u/20u NMOS pull-down transistors in parallel and a
// bootstrapped 20u/20u load with a 10 pF capacitor (4 transistors). Here only
// its logic function is kept: y = !(a | b). Combinational, no timing modelled.
module tft_nor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  timeunit 1ns;
  timeprecision 1ps;

  assign y = ~(a | b);

endmodule
