// tb_tft_inv: truth table of the inverter cell (both input values, expected
// output written out here).
module tb_tft_inv;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic a, y;
  localparam logic [1:0] TRUTH = 2'b01;  // y for a = 1, 0

  tft_inv dut (.a, .y);

  initial begin
    #10_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      a = i[0];
      #5;
      checks++;
      if (y !== TRUTH[i]) begin
        failures++;
        $display("FAIL a=%b y=%b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
