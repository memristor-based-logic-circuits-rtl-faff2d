// tb_xbar_ctrl8_tft: check of the gate-level 8x8 control circuit.
//
// Each decoder sees every enable/address value (32) combined with every value
// of one other decoder (1024 vectors per pair, all six pairs), then 20000
// random vectors on all four at once. Each output is compared with
// "enable && addr < 8 ? 1 << addr : 0" computed here.
module tb_xbar_ctrl8_tft;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic       set, cond, clr, grnd;
  logic [3:0] set_addr, cond_addr, clr_addr, grnd_addr;
  logic [7:0] set_out, cond_out, clr_out, grnd_out;
  xbar_ctrl8_tft dut (.*);

  task automatic check(input string what, input logic [7:0] got, input logic en,
                       input logic [3:0] addr);
    logic [7:0] exp;
    exp = (en && addr < 8) ? 8'(1 << addr) : 8'h00;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s en=%b addr=%0d: got %b expected %b", what, en, addr, got, exp);
    end
  endtask

  task automatic apply(input logic [19:0] v);
    {grnd, grnd_addr, clr, clr_addr, cond, cond_addr, set, set_addr} = v;
    #10;
    check("set_out",  set_out,  set,  set_addr);
    check("cond_out", cond_out, cond, cond_addr);
    check("clr_out",  clr_out,  clr,  clr_addr);
    check("grnd_out", grnd_out, grnd, grnd_addr);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = a + 1; b < 4; b++)
        for (int v = 0; v < 1024; v++)
          apply((20'(v[4:0]) << (5 * a)) | (20'(v[9:5]) << (5 * b)));
    for (int i = 0; i < 20000; i++) apply(20'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
