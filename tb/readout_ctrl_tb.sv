// readout_ctrl_tb: self-checking test of the L1A readout controller at its
// default size (20 lines, 16 bits per line).
//
// Random L1As (some back to back, some while a readout is running) and random
// diagnostic data. A reference built from the data seen with each accepted
// L1A predicts every output cycle: BITS cycles of data bits (bit 0 first) with
// DAV high, one cycle of parity with DAV high, one gap cycle with DAV low,
// then idle with DAV low and zero data. Also checked: each line's received
// bits plus its parity bit hold an odd number of ones, busy, and a one-clock
// l1a_lost pulse for every L1A that arrives while busy.
`timescale 1ns/1ps
module readout_ctrl_tb;
  import glink_pkg::*;
  localparam int unsigned LINES = 20;
  localparam int unsigned BITS  = 16;

  typedef struct packed { logic dav; word_t data; } cyc_t;

  logic clk = 1'b0;
  logic rst, l1a;
  logic [LINES-1:0][BITS-1:0] diag;
  word_t gl_data;
  logic  gl_dav, busy, l1a_lost;

  int checks = 0, failures = 0;
  int n_readouts = 0, n_lost = 0, n_parity_ok = 0;
  cyc_t exp_q[$];
  bit   exp_lost;
  bit   shown_busy;   // the cycle on the outputs before this edge is part of a readout
  int   line_ones[LINES];
  int   bitpos;

  readout_ctrl #(.LINES(LINES), .BITS(BITS)) dut (
    .clk(clk), .rst(rst), .l1a(l1a), .diag(diag),
    .gl_data(gl_data), .gl_dav(gl_dav), .busy(busy), .l1a_lost(l1a_lost));

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: dav=%b data=%h busy=%b lost=%b", what, $time, gl_dav, gl_data, busy, l1a_lost);
    end
  endtask

  // reference: sequence of outputs that follows an accepted L1A
  task automatic expect_readout(input logic [LINES-1:0][BITS-1:0] d);
    cyc_t c;
    for (int j = 0; j < int'(BITS); j++) begin
      c.dav = 1'b1; c.data = '0;
      for (int l = 0; l < int'(LINES); l++) c.data[l] = d[l][j];
      exp_q.push_back(c);
    end
    c.dav = 1'b1; c.data = '0;
    for (int l = 0; l < int'(LINES); l++) begin
      int n = 0;
      for (int j = 0; j < int'(BITS); j++) n += int'(d[l][j]);
      c.data[l] = (n % 2 == 0);     // makes the total odd
    end
    exp_q.push_back(c);
    c.dav = 1'b0; c.data = '0;
    exp_q.push_back(c);
  endtask

  initial begin
    rst = 1'b1; l1a = 1'b0; diag = '0; exp_lost = 1'b0; shown_busy = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      // drive inputs for the next edge
      l1a = (k % 97 < 20) ? (($urandom % 6) == 0) : (($urandom % 40) == 0);
      for (int l = 0; l < int'(LINES); l++) diag[l] = BITS'($urandom);
      @(posedge clk);
      // reference update with the values sampled at this edge
      if (l1a && !shown_busy) begin
        expect_readout(diag);
        n_readouts++;
        bitpos = 0;
        foreach (line_ones[l]) line_ones[l] = 0;
        exp_lost = 1'b0;
      end else begin
        exp_lost = l1a;
        if (l1a) n_lost++;
      end
      #1;
      check(l1a_lost == exp_lost, "l1a_lost");
      if (exp_q.size() > 0) begin
        cyc_t c;
        c = exp_q.pop_front();
        shown_busy = 1'b1;
        check(busy, "busy during readout");
        check(gl_dav == c.dav, "DAV");
        check(gl_data == c.data, "data/parity");
        if (gl_dav) begin
          for (int l = 0; l < int'(LINES); l++) line_ones[l] += int'(gl_data[l]);
          bitpos++;
          if (bitpos == int'(BITS) + 1) begin
            bit ok = 1'b1;
            for (int l = 0; l < int'(LINES); l++) if (line_ones[l] % 2 != 1) ok = 1'b0;
            check(ok, "odd parity per line");
            if (ok) n_parity_ok++;
          end
        end
      end else begin
        shown_busy = 1'b0;
        check(!busy && !gl_dav && gl_data == '0, "quiescent");
      end
    end
    check(n_readouts > 10 && n_lost > 5, "readouts and dropped L1As both seen");
    $display("readouts=%0d dropped_l1a=%0d parity_ok=%0d", n_readouts, n_lost, n_parity_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
