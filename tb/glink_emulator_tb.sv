// glink_emulator_tb: end-to-end test of the two-channel G-Link emulator.
//
// Words with DAV are driven into both channels in bursts separated by idle
// periods; the serial outputs go into two receiver models. Checked: both
// links lock on fill frames after the transmitter PLLs lock; every word sent
// with DAV high comes out of the receiver, in order, flagged as data; idle
// periods come out as fill frames; no frame errors and complementary wires;
// one frame per 40 MHz cycle (24 bits per 25 ns, 960 Mbit/s); both true and
// inverted data frames occur. The first burst is the all-zero word followed
// by 55555, the pattern of the design's behavioural simulation.
`timescale 1ns/1ps
module glink_emulator_tb;
  import glink_pkg::*;

  logic  clk40 = 1'b0, clk120 = 1'b0;
  int    h = 5;
  word_t daq_in, roi_in;
  logic  daq_dav, roi_dav, daq_rst, roi_rst;
  logic [1:0] daq_out, roi_out;
  logic  daq_lock, roi_lock;

  logic [1:0] rdy, tgl, rdav;
  word_t      rdata[2];
  int n_fill[2], n_data[2], n_inv[2], n_ferr[2], n_diff[2];

  int checks = 0, failures = 0;
  word_t sent[2][$];
  int    got_data[2], got_fill[2];

  glink_emulator dut (
    .clk40(clk40), .clk120(clk120),
    .daq_in(daq_in), .daq_dav(daq_dav), .daq_rst(daq_rst),
    .roi_in(roi_in), .roi_dav(roi_dav), .roi_rst(roi_rst),
    .daq_out(daq_out), .roi_out(roi_out), .daq_lock(daq_lock), .roi_lock(roi_lock));

  glink_rx_model rx_daq (.clk(clk120), .rx(daq_out), .link_ready(rdy[0]), .frame_tgl(tgl[0]),
    .dav(rdav[0]), .data(rdata[0]), .n_fill(n_fill[0]), .n_data(n_data[0]), .n_inv(n_inv[0]),
    .n_ferr(n_ferr[0]), .n_diff_err(n_diff[0]));
  glink_rx_model rx_roi (.clk(clk120), .rx(roi_out), .link_ready(rdy[1]), .frame_tgl(tgl[1]),
    .dav(rdav[1]), .data(rdata[1]), .n_fill(n_fill[1]), .n_data(n_data[1]), .n_inv(n_inv[1]),
    .n_ferr(n_ferr[1]), .n_diff_err(n_diff[1]));

  // clk40 and clk120 from one generator, rising edges aligned
  initial forever begin
    #4.167;
    h = (h + 1) % 6;
    clk120 = (h % 2 == 0);
    clk40  = (h < 3);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // receiver side: compare each decoded frame
  for (genvar c = 0; c < 2; c++) begin : g_rx
    always @(tgl[c]) begin
      if (rdav[c]) begin
        got_data[c]++;
        if (sent[c].size() == 0) check(1'b0, $sformatf("ch%0d unexpected data %h", c, rdata[c]));
        else check(rdata[c] == sent[c].pop_front(), $sformatf("ch%0d data word", c));
      end else begin
        got_fill[c]++;
      end
    end
  end

  task automatic drive(input word_t d, input word_t r, input bit dv, input bit rv);
    daq_in = d; roi_in = r; daq_dav = dv; roi_dav = rv;
    @(posedge clk40);
    if (dv) sent[0].push_back(d);
    if (rv) sent[1].push_back(r);
    #1;
  endtask

  initial begin
    int f0, f1;
    daq_in = '0; roi_in = '0; daq_dav = 0; roi_dav = 0; daq_rst = 1; roi_rst = 1;
    repeat (4) @(posedge clk40);
    #1 daq_rst = 0; roi_rst = 0;
    wait (daq_lock && roi_lock);
    repeat (20) drive('0, '0, 0, 0);
    check(rdy == 2'b11, "both links ready on fill frames");
    // behavioural-simulation pattern: zeros then 55555 with DAV
    repeat (5) drive(20'h00000, 20'h00000, 1, 1);
    repeat (5) drive(20'h55555, 20'h55555, 1, 1);
    repeat (3) drive('0, '0, 0, 0);
    // random bursts, channels independent
    for (int b = 0; b < 60; b++) begin
      int len;
      len = 1 + $urandom % 12;
      for (int i = 0; i < len; i++)
        drive(20'($urandom), 20'($urandom), ($urandom % 5) != 0, ($urandom % 3) != 0);
      repeat (1 + $urandom % 4) drive(20'($urandom), 20'($urandom), 0, 0);
    end
    // frame rate: frames decoded over 100 clk40 cycles
    f0 = got_data[0] + got_fill[0];
    f1 = got_data[1] + got_fill[1];
    repeat (100) drive('0, '0, 0, 0);
    check(got_data[0] + got_fill[0] - f0 == 100, "DAQ: one frame per 40 MHz cycle");
    check(got_data[1] + got_fill[1] - f1 == 100, "ROI: one frame per 40 MHz cycle");
    for (int c = 0; c < 2; c++) begin
      check(sent[c].size() == 0, $sformatf("ch%0d all words received", c));
      check(n_ferr[c] == 0 && n_diff[c] == 0, $sformatf("ch%0d no frame or wire errors", c));
      check(n_inv[c] > 0 && n_data[c] - n_inv[c] > 0, $sformatf("ch%0d true and inverted frames", c));
      check(got_fill[c] > 0 && got_data[c] > 0, $sformatf("ch%0d fill and data frames", c));
      $display("ch%0d: data=%0d (inverted %0d) fill=%0d", c, got_data[c], n_inv[c], got_fill[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk40);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
