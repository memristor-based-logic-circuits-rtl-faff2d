// tb_imply_xbar_top_n8: the end-to-end test of tb_imply_xbar_top run on the
// 8x8 variant (8 rows, 8 columns, 4-bit addresses, gate-level 8x8 control
// circuit): the reference 0 NAND 0 in row 0, then p NAND q for all input values
// in every row with two column choices, checking decode, results and that the
// other rows keep their contents. Each mechanism (clear, write 1, switching
// and inhibited IMPLY, read of 1 and of 0) must occur.
module tb_imply_xbar_top_n8;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned PULSE = 1_000_000;  // 1 ms step
  localparam int unsigned GAP   = 1_000_000;  // 1 ms between steps

  int checks = 0, failures = 0;
  int n_clear = 0, n_write = 0, n_imply_sw = 0, n_imply_hold = 0;
  int n_read1 = 0, n_read0 = 0, n_nand = 0;

  logic       set = 0, cond = 0, clr = 0, grnd = 0;
  logic [3:0] set_addr = 0, cond_addr = 0, clr_addr = 0, grnd_addr = 0;
  logic [7:0] set_out, cond_out, clr_out, grnd_out;
  logic [7:0][7:0] state;
  xbar_pkg::level_t [7:0][7:0] level;
  logic [7:0] row_sense;

  imply_xbar_top #(.N(8), .ADDR_W(4)) dut (.*);

  logic [7:0][7:0] shadow;   // expected contents

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  task automatic check_decode();
    checks++;
    if (set_out  !== (set  ? 8'(1 << set_addr)  : 8'h0) ||
        cond_out !== (cond ? 8'(1 << cond_addr) : 8'h0) ||
        clr_out  !== (clr  ? 8'(1 << clr_addr)  : 8'h0) ||
        grnd_out !== (grnd ? 8'(1 << grnd_addr) : 8'h0))
      fail($sformatf("decode set=%b cond=%b clr=%b grnd=%b", set_out, cond_out, clr_out, grnd_out));
  endtask

  task automatic check_all(input string what);
    checks++;
    if (state !== shadow) begin
      fail($sformatf("%s: array %h expected %h", what, state, shadow));
    end
  endtask

  task automatic pulse();
    #(PULSE / 2);
    check_decode();
    #(PULSE / 2);
    set = 0; cond = 0; clr = 0; grnd = 0;
    #GAP;
  endtask

  task automatic do_clear(input int r, input int c);
    grnd = 1; grnd_addr = 4'(r); clr = 1; clr_addr = 4'(c);
    pulse();
    shadow[r][c] = 1'b0;
    n_clear++;
    check_all("clear");
  endtask

  task automatic do_write1(input int r, input int c);
    grnd = 1; grnd_addr = 4'(r); set = 1; set_addr = 4'(c);
    pulse();
    shadow[r][c] = 1'b1;
    n_write++;
    check_all("write1");
  endtask

  task automatic do_imply(input int r, input int p, input int q);
    logic prev;
    prev = shadow[r][q];
    grnd = 1; grnd_addr = 4'(r); cond = 1; cond_addr = 4'(p); set = 1; set_addr = 4'(q);
    pulse();
    shadow[r][q] = !shadow[r][p] || shadow[r][q];
    if (shadow[r][q] != prev) n_imply_sw++; else n_imply_hold++;
    check_all("imply");
  endtask

  task automatic do_read(input int r, input int c, output logic val);
    grnd = 1; grnd_addr = 4'(r); cond = 1; cond_addr = 4'(c);
    #(PULSE / 2);
    check_decode();
    val = row_sense[r];
    checks++;
    if (row_sense !== (8'(shadow[r][c]) << r)) fail($sformatf("read (%0d,%0d) sense=%b", r, c, row_sense));
    if (val) n_read1++; else n_read0++;
    #(PULSE / 2);
    cond = 0; grnd = 0;
    #GAP;
  endtask

  initial begin
    #2_000_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v;
    logic [7:0][7:0] prev;
    shadow = '0;
    #PULSE;
    check_all("initial");
    // 1. Reference sequence: 0 NAND 0 in row 0, inputs cells 0 and 1, output cell 2.
    do_clear(0, 2);
    grnd = 1; grnd_addr = 0; cond = 1; cond_addr = 0; set = 1; set_addr = 2;
    #(PULSE / 2);
    checks++;
    if (state[0][2] !== 1'b1) fail("cell 2 did not switch during first IMPLY");
    #(PULSE / 2);
    set = 0; cond = 0; grnd = 0;
    #GAP;
    shadow[0][2] = 1'b1;
    n_imply_sw++;
    do_imply(0, 1, 2);
    do_read(0, 2, v);
    checks++;
    if (v !== 1'b1) fail("0 NAND 0 did not read 1");
    n_nand++;
    // 2. NAND truth tables in every row, varying the columns used.
    for (int r = 0; r < 8; r++) begin
      for (int k = 0; k < 2; k++) begin
        int p, q, s;
        p = (r + k) % 8;
        q = (r + k + 1) % 8;
        s = (r + k + 2 + k) % 8;
        for (int ab = 0; ab < 4; ab++) begin
          prev = shadow;
          if (ab[1]) do_write1(r, p); else do_clear(r, p);
          if (ab[0]) do_write1(r, q); else do_clear(r, q);
          do_clear(r, s);
          do_imply(r, p, s);
          do_imply(r, q, s);
          do_read(r, s, v);
          checks++;
          if (v !== !(ab[1] && ab[0]) || state[r][s] !== !(ab[1] && ab[0]))
            fail($sformatf("row %0d: %b NAND %b gave %b", r, ab[1], ab[0], state[r][s]));
          n_nand++;
          for (int o = 0; o < 8; o++) if (o != r) begin
            checks++;
            if (state[o] !== prev[o]) fail($sformatf("row %0d disturbed", o));
          end
        end
      end
    end
    $display("clear=%0d write=%0d imply_switch=%0d imply_hold=%0d read1=%0d read0=%0d nand=%0d",
             n_clear, n_write, n_imply_sw, n_imply_hold, n_read1, n_read0, n_nand);
    if (n_clear == 0 || n_write == 0 || n_imply_sw == 0 || n_imply_hold == 0 ||
        n_read1 == 0 || n_read0 == 0 || n_nand == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
