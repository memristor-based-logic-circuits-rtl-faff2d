// xbar_pkg: constants shared by the memristor models and their testbenches.
//
// The memristor state is the dimensionless variable L, which runs from 1 to
// 10; the device resistance is 10 kOhm * L, so L = 1 is the low-resistance
// state (logic 1, 10 kOhm) and L = 10 the high-resistance state (logic 0,
// 100 kOhm). A freshly made cell starts at L = 10. Beyond the applied voltage
// threshold of +-1 V, L moves at a constant rate and crosses its full range in
// about 1 us. Reading L as a logic value with a threshold at the middle of
// the range (L <= 5 is a 1) is this design's choice.
package xbar_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned L_MIN       = 1;      // low resistance bound
  localparam int unsigned L_MAX       = 10;     // high resistance bound
  localparam int unsigned L_ONE_MAX   = 5;      // L at or below this reads as logic 1
  // Time for L to move one unit: nine units in about 1 us.
  localparam int unsigned T_STEP_NS   = 111;

  typedef logic [3:0] level_t;                  // holds L

endpackage
