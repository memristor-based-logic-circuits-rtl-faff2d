// tb_imply_xbar_top: end-to-end test of the integrated crossbar at its default
// size (4x4, gate-level control circuit), driven only through the control
// inputs with millisecond pulses as the thin-film circuit would be.
//
// 1. The reference NAND: all cells start at 0; clear cell 2 of row 0, IMPLY
//    cell 0 -> cell 2, IMPLY cell 1 -> cell 2, then read cell 2. Cell 2 must
//    read 1 (0 NAND 0) and must change state during the first IMPLY.
// 2. Every row, with several choices of input and output columns, computes
//    p NAND q for all four input values (inputs written first with write-1 or
//    clear). Results are compared with p NAND q computed here, and all other
//    cells must keep their values (a shadow copy is kept here).
// 3. The decoded switch enables are checked to be one-hot and to match the
//    addresses at every step.
// Counted mechanisms, each must occur: clear, write 1, IMPLY that switches,
// IMPLY that is inhibited, read of 1, read of 0, no change in other rows.
module tb_imply_xbar_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned PULSE = 1_000_000;  // 1 ms step
  localparam int unsigned GAP   = 1_000_000;  // 1 ms between steps

  int checks = 0, failures = 0;
  int n_clear = 0, n_write = 0, n_imply_sw = 0, n_imply_hold = 0;
  int n_read1 = 0, n_read0 = 0, n_nand = 0;

  logic       set = 0, cond = 0, clr = 0, grnd = 0;
  logic [1:0] set_addr = 0, cond_addr = 0, clr_addr = 0, grnd_addr = 0;
  logic [3:0] set_out, cond_out, clr_out, grnd_out;
  logic [3:0][3:0] state;
  xbar_pkg::level_t [3:0][3:0] level;
  logic [3:0] row_sense;

  imply_xbar_top dut (.*);

  logic [3:0][3:0] shadow;   // expected contents

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  task automatic check_decode();
    checks++;
    if (set_out  !== (set  ? 4'(1 << set_addr)  : 4'h0) ||
        cond_out !== (cond ? 4'(1 << cond_addr) : 4'h0) ||
        clr_out  !== (clr  ? 4'(1 << clr_addr)  : 4'h0) ||
        grnd_out !== (grnd ? 4'(1 << grnd_addr) : 4'h0))
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
    grnd = 1; grnd_addr = 2'(r); clr = 1; clr_addr = 2'(c);
    pulse();
    shadow[r][c] = 1'b0;
    n_clear++;
    check_all("clear");
  endtask

  task automatic do_write1(input int r, input int c);
    grnd = 1; grnd_addr = 2'(r); set = 1; set_addr = 2'(c);
    pulse();
    shadow[r][c] = 1'b1;
    n_write++;
    check_all("write1");
  endtask

  task automatic do_imply(input int r, input int p, input int q);
    logic prev;
    prev = shadow[r][q];
    grnd = 1; grnd_addr = 2'(r); cond = 1; cond_addr = 2'(p); set = 1; set_addr = 2'(q);
    pulse();
    shadow[r][q] = !shadow[r][p] || shadow[r][q];
    if (shadow[r][q] != prev) n_imply_sw++; else n_imply_hold++;
    check_all("imply");
  endtask

  task automatic do_read(input int r, input int c, output logic val);
    grnd = 1; grnd_addr = 2'(r); cond = 1; cond_addr = 2'(c);
    #(PULSE / 2);
    check_decode();
    val = row_sense[r];
    checks++;
    if (row_sense !== (4'(shadow[r][c]) << r)) fail($sformatf("read (%0d,%0d) sense=%b", r, c, row_sense));
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
    logic [3:0][3:0] prev;
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
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < 2; k++) begin
        int p, q, s;
        p = (r + k) % 4;
        q = (r + k + 1) % 4;
        s = (r + k + 2 + k) % 4;
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
          for (int o = 0; o < 4; o++) if (o != r) begin
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
