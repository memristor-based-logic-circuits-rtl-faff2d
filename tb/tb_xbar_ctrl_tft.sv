// tb_xbar_ctrl_tft: exhaustive check of the gate-level 4x4 control circuit.
//
// All 4096 combinations of the four enables and addresses are applied; each
// decoder output is compared with "enable ? 1 << addr : 0" computed here, and
// each output vector must be one-hot or zero.
module tb_xbar_ctrl_tft;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic       set, cond, clr, grnd;
  logic [1:0] set_addr, cond_addr, clr_addr, grnd_addr;
  logic [3:0] set_out, cond_out, clr_out, grnd_out;
  xbar_ctrl_tft dut (.*);

  task automatic check(input string what, input logic [3:0] got, input logic en,
                       input logic [1:0] addr);
    logic [3:0] exp;
    exp = en ? 4'(1 << addr) : 4'h0;
    checks++;
    if (got !== exp || !$onehot0(got)) begin
      failures++;
      $display("FAIL %s en=%b addr=%0d: got %b expected %b", what, en, addr, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {set, set_addr}   = v[2:0];
      {cond, cond_addr} = v[5:3];
      {clr, clr_addr}   = v[8:6];
      {grnd, grnd_addr} = v[11:9];
      #10;
      check("set_out",  set_out,  set,  set_addr);
      check("cond_out", cond_out, cond, cond_addr);
      check("clr_out",  clr_out,  clr,  clr_addr);
      check("grnd_out", grnd_out, grnd, grnd_addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
