// line_decoder: enable-gated one-hot address decoder, the unit the crossbar
// control circuit is made of.
//
// Output bit i is high when en is high and addr equals i; all outputs are low
// when en is low or addr is N or larger. The crossbar has one of these per
// drive voltage (VSET, VCOND, VCLEAR columns) and one for the row ground
// switches. Purely combinational, no clock.
//
// Interface: en (1 bit), addr (ADDR_W bits), sel (N bits, one-hot or zero).
// N = 4 is the fabricated 4x4 crossbar; N = 8 is the larger variant. The
// address width is ceil(log2 N), a choice of this design.
module line_decoder #(
  parameter int unsigned N      = 4,
  parameter int unsigned ADDR_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [N-1:0]      sel
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (en && (addr == ADDR_W'(i))) sel[i] = 1'b1;
    end
  end

endmodule
