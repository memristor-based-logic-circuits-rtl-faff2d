// tb_xbar_ctrl: exhaustive check of the behavioural control circuit.
//
// Every combination of the four enables and four addresses is applied to a
// 4x4 instance (4096 vectors) and every enable/address of each decoder to an
// 8x8 instance. The expected output of each decoder is computed here as
// "enable ? 1 << addr : 0". Purely combinational; a 10 ns settle per vector.
module tb_xbar_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  // 4x4
  logic       set, cond, clr, grnd;
  logic [1:0] set_addr, cond_addr, clr_addr, grnd_addr;
  logic [3:0] set_out, cond_out, clr_out, grnd_out;
  xbar_ctrl dut4 (.*);

  // 8x8
  logic       s8, c8, k8, g8;
  logic [2:0] sa8, ca8, ka8, ga8;
  logic [7:0] so8, co8, ko8, go8;
  xbar_ctrl #(.N(8)) dut8 (
    .set(s8), .set_addr(sa8), .cond(c8), .cond_addr(ca8), .clr(k8), .clr_addr(ka8),
    .grnd(g8), .grnd_addr(ga8), .set_out(so8), .cond_out(co8), .clr_out(ko8), .grnd_out(go8)
  );

  function automatic logic [7:0] expect_sel(input logic en, input int unsigned addr);
    return en ? 8'(1 << addr) : 8'h00;
  endfunction

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
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
      check("set_out",  {4'h0, set_out},  expect_sel(set,  set_addr));
      check("cond_out", {4'h0, cond_out}, expect_sel(cond, cond_addr));
      check("clr_out",  {4'h0, clr_out},  expect_sel(clr,  clr_addr));
      check("grnd_out", {4'h0, grnd_out}, expect_sel(grnd, grnd_addr));
    end
    for (int v = 0; v < 16; v++) begin
      {s8, sa8} = 4'(v);
      {c8, ca8} = 4'(15 - v);
      {k8, ka8} = 4'(v ^ 5);
      {g8, ga8} = 4'(v ^ 10);
      #10;
      check("set_out8",  so8, expect_sel(s8, sa8));
      check("cond_out8", co8, expect_sel(c8, ca8));
      check("clr_out8",  ko8, expect_sel(k8, ka8));
      check("grnd_out8", go8, expect_sel(g8, ga8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
