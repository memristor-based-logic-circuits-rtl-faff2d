// tb_tft_nand2: truth table of the two-input nand cell, all four input
// combinations against the table written out here (b a: 11 -> 0, otherwise 1).
module tb_tft_nand2;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic a, b, y;
  localparam logic [3:0] TRUTH = 4'b0111;  // bit index {b, a}

  tft_nand2 dut (.a, .b, .y);

  initial begin
    #10_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {b, a} = i[1:0];
      #5;
      checks++;
      if (y !== TRUTH[i]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
