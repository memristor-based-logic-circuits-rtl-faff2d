// tb_memristor_crossbar: random operation sequences on the 4x4 crossbar model.
//
// Each operation grounds one row and drives columns as the control circuit
// would: clear (VCLEAR), write 1 (VSET alone), IMPLY (VCOND on p, VSET on q)
// or read (VCOND alone). The expected result is worked out here from the
// circuit: a cell of resistance 10 kOhm (1) or 100 kOhm (0), the row tied to
// ground through RG = 9 kOhm, VCOND = -0.85 V, VSET = -1.3 V, VCLEAR = +2 V.
// The row node voltage follows from the resistive divider, and a cell switches
// when the voltage across it is beyond +-1 V. A read is expected to report a 1
// when the row node is pulled below -0.3 V. All 16 cells are compared after
// every operation; each operation is held for 2 us and released for 1 us.
// A first write checks the switching time: the cell crosses to 1 between
// 500 and 600 ns and is fully switched at 1 us.
module tb_memristor_crossbar;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real VCOND  = -0.85;
  localparam real VSET   = -1.3;
  localparam real VCLEAR = 2.0;
  localparam real RG     = 9.0e3;
  localparam real RON    = 10.0e3;
  localparam real ROFF   = 100.0e3;
  localparam real VTH    = 1.0;

  int checks = 0, failures = 0;
  int n_clear = 0, n_write = 0, n_imply_sw = 0, n_imply_hold = 0, n_read1 = 0, n_read0 = 0;

  logic [3:0] set_out = '0, cond_out = '0, clr_out = '0, grnd_out = '0;
  logic [3:0][3:0] state;
  xbar_pkg::level_t [3:0][3:0] level;
  logic [3:0] row_sense;

  memristor_crossbar dut (.*);

  logic [3:0][3:0] model;   // expected cell values

  function automatic real r_of(input logic b);
    return b ? RON : ROFF;
  endfunction

  // Voltage across a cell at column voltage vc when the row node is at vn.
  // Row node of a grounded row with the given driven columns (p may be absent).
  function automatic real node_v(input bit has_p, input real vp, input real rp,
                                 input real vq, input real rq);
    real num, den;
    num = vq / rq;
    den = 1.0 / rq + 1.0 / RG;
    if (has_p) begin
      num += vp / rp;
      den += 1.0 / rp;
    end
    return num / den;
  endfunction

  task automatic compare(input string what);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (state[r][c] !== model[r][c]) begin
          failures++;
          $display("FAIL %s: cell (%0d,%0d) = %b expected %b at %0t", what, r, c,
                   state[r][c], model[r][c], $time);
        end
      end
  endtask

  task automatic release_all();
    set_out = '0; cond_out = '0; clr_out = '0; grnd_out = '0;
    #1000;
  endtask

  task automatic op_clear(input int r, input int c);
    real vn;
    vn = node_v(0, 0.0, 1.0, VCLEAR, r_of(model[r][c]));
    if (VCLEAR - vn > VTH) model[r][c] = 1'b0;
    grnd_out[r] = 1'b1; clr_out[c] = 1'b1;
    #2000;
    release_all();
    n_clear++;
    compare("clear");
  endtask

  task automatic op_write1(input int r, input int c);
    real vn;
    vn = node_v(0, 0.0, 1.0, VSET, r_of(model[r][c]));
    if (VSET - vn < -VTH) model[r][c] = 1'b1;
    grnd_out[r] = 1'b1; set_out[c] = 1'b1;
    #2000;
    release_all();
    n_write++;
    compare("write1");
  endtask

  task automatic op_imply(input int r, input int p, input int q);
    real vn;
    vn = node_v(1, VCOND, r_of(model[r][p]), VSET, r_of(model[r][q]));
    if (VSET - vn < -VTH) begin
      if (!model[r][q]) n_imply_sw++; else n_imply_hold++;
      model[r][q] = 1'b1;
    end else begin
      n_imply_hold++;
    end
    grnd_out[r] = 1'b1; cond_out[p] = 1'b1; set_out[q] = 1'b1;
    #2000;
    release_all();
    compare("imply");
  endtask

  task automatic op_read(input int r, input int c);
    real vn;
    logic exp;
    vn  = node_v(0, 0.0, 1.0, VCOND, r_of(model[r][c]));
    exp = (vn < -0.3);
    grnd_out[r] = 1'b1; cond_out[c] = 1'b1;
    #1000;
    checks++;
    if (row_sense !== (4'(exp) << r)) begin
      failures++;
      $display("FAIL read (%0d,%0d): row_sense=%b expected bit %b", r, c, row_sense, exp);
    end
    if (exp) n_read1++; else n_read0++;
    release_all();
    compare("read");
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, p, q, kind;
    model = '0;
    #10;
    compare("initial");
    // Switching time at the default step (full swing of about 1 us): a write
    // of 1 to cell (2,1) has not crossed at 500 ns, has crossed at 600 ns and
    // has reached the low-resistance bound at 1 us.
    grnd_out[2] = 1'b1; set_out[1] = 1'b1;
    #500;
    checks++;
    if (state[2][1] !== 1'b0) begin failures++; $display("FAIL crossed before 500 ns"); end
    #100;
    checks++;
    if (state[2][1] !== 1'b1) begin failures++; $display("FAIL not crossed at 600 ns"); end
    #400;
    checks++;
    if (level[2][1] !== xbar_pkg::level_t'(xbar_pkg::L_MIN)) begin
      failures++; $display("FAIL level %0d at 1 us", level[2][1]);
    end
    release_all();
    model[2][1] = 1'b1;
    compare("timed write");
    // Exhaustive IMPLY truth table in row 1, p = column 0, q = column 3.
    for (int v = 0; v < 4; v++) begin
      if (v[1]) op_write1(1, 0); else op_clear(1, 0);
      if (v[0]) op_write1(1, 3); else op_clear(1, 3);
      op_imply(1, 0, 3);
      checks++;
      if (state[1][3] !== (!v[1] || v[0])) begin
        failures++;
        $display("FAIL imply table p=%b q=%b gave %b", v[1], v[0], state[1][3]);
      end
    end
    // Random sequence.
    for (int i = 0; i < 300; i++) begin
      r    = $urandom_range(3);
      p    = $urandom_range(3);
      q    = (p + 1 + $urandom_range(2)) % 4;
      kind = $urandom_range(3);
      case (kind)
        0: op_clear(r, q);
        1: op_write1(r, q);
        2: op_imply(r, p, q);
        default: op_read(r, p);
      endcase
    end
    if (n_clear == 0 || n_write == 0 || n_imply_sw == 0 || n_imply_hold == 0 ||
        n_read1 == 0 || n_read0 == 0) begin
      failures++;
      $display("FAIL coverage: clear=%0d write=%0d imply_switch=%0d imply_hold=%0d read1=%0d read0=%0d",
               n_clear, n_write, n_imply_sw, n_imply_hold, n_read1, n_read0);
    end
    $display("clear=%0d write=%0d imply_switch=%0d imply_hold=%0d read1=%0d read0=%0d",
             n_clear, n_write, n_imply_sw, n_imply_hold, n_read1, n_read0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
