// cmx_glink_top_tb: end-to-end test of the CMX G-Link readout, at the top's
// default size (20 lines x 16 bits per readout, 960 Mbit/s per link).
//
// Random L1As, some of them while a readout is running, with fresh random
// diagnostic data every clock. Two receiver models decode the DAQ and ROI
// serial streams. A reference decides from the L1A timing alone which L1As
// start a readout and which are dropped, and keeps the diagnostic snapshot of
// each accepted one. Checked on the receiver side: links lock on fill frames;
// every readout arrives as exactly BITS+1 consecutive data frames followed by
// at least one fill frame; line l of frame j carries bit j of line l's
// record; the last frame is an odd parity bit per line; no frame errors.
// Checked at the ports: busy and l1a_lost against the reference.
// Each mechanism must occur at least once: link lock on fill frames, readout,
// parity frame, gap after a readout, dropped L1A, true and inverted frames.
`timescale 1ns/1ps
module cmx_glink_top_tb;
  import glink_pkg::*;
  localparam int unsigned LINES = 20;   // top defaults
  localparam int unsigned BITS  = 16;
  localparam int NREADOUT = 40;

  typedef logic [LINES-1:0][BITS-1:0] rec_t;

  logic clk40 = 1'b0, clk120 = 1'b0;
  int   h = 5;
  logic daq_rst, roi_rst, l1a;
  rec_t daq_diag, roi_diag;
  logic daq_busy, roi_busy, daq_l1a_lost, roi_l1a_lost, daq_lock, roi_lock;
  logic [1:0] daq_out, roi_out;

  logic [1:0] rdy, tgl, rdav;
  word_t      rdata[2];
  int n_fill[2], n_data[2], n_inv[2], n_ferr[2], n_diff[2];

  int checks = 0, failures = 0;
  rec_t  exp_rec[2][$];
  word_t run[2][$];
  int    busy_cnt = 0;
  int    n_acc = 0, n_drop = 0, n_lost_pulse[2] = '{0, 0};
  int    n_rx_readout[2] = '{0, 0}, n_parity[2] = '{0, 0}, n_gap[2] = '{0, 0};

  cmx_glink_top dut (
    .clk40(clk40), .clk120(clk120), .daq_rst(daq_rst), .roi_rst(roi_rst), .l1a(l1a),
    .daq_diag(daq_diag), .roi_diag(roi_diag), .daq_busy(daq_busy), .roi_busy(roi_busy),
    .daq_l1a_lost(daq_l1a_lost), .roi_l1a_lost(roi_l1a_lost),
    .daq_lock(daq_lock), .roi_lock(roi_lock), .daq_out(daq_out), .roi_out(roi_out));

  glink_rx_model rx_daq (.clk(clk120), .rx(daq_out), .link_ready(rdy[0]), .frame_tgl(tgl[0]),
    .dav(rdav[0]), .data(rdata[0]), .n_fill(n_fill[0]), .n_data(n_data[0]), .n_inv(n_inv[0]),
    .n_ferr(n_ferr[0]), .n_diff_err(n_diff[0]));
  glink_rx_model rx_roi (.clk(clk120), .rx(roi_out), .link_ready(rdy[1]), .frame_tgl(tgl[1]),
    .dav(rdav[1]), .data(rdata[1]), .n_fill(n_fill[1]), .n_data(n_data[1]), .n_inv(n_inv[1]),
    .n_ferr(n_ferr[1]), .n_diff_err(n_diff[1]));

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

  // a finished run of data frames: compare with the oldest accepted record
  task automatic close_run(input int c);
    rec_t e;
    bit   bits_ok = 1'b1, par_ok = 1'b1;
    check(run[c].size() == int'(BITS) + 1, $sformatf("ch%0d readout length %0d", c, run[c].size()));
    if (exp_rec[c].size() == 0) begin
      check(1'b0, $sformatf("ch%0d readout without L1A", c));
    end else if (run[c].size() == int'(BITS) + 1) begin
      e = exp_rec[c].pop_front();
      for (int l = 0; l < int'(LINES); l++) begin
        int ones = 0;
        for (int j = 0; j < int'(BITS); j++) begin
          if (run[c][j][l] != e[l][j]) bits_ok = 1'b0;
          ones += int'(run[c][j][l]);
        end
        ones += int'(run[c][BITS][l]);
        if (ones % 2 != 1) par_ok = 1'b0;
      end
      check(bits_ok, $sformatf("ch%0d readout data", c));
      check(par_ok, $sformatf("ch%0d odd parity frame", c));
      if (par_ok) n_parity[c]++;
      n_rx_readout[c]++;
    end
    run[c].delete();
  endtask

  for (genvar c = 0; c < 2; c++) begin : g_rx
    always @(tgl[c]) begin
      if (rdav[c]) begin
        run[c].push_back(rdata[c]);
      end else if (run[c].size() > 0) begin
        n_gap[c]++;           // fill frame right after a readout
        close_run(c);
      end
    end
  end

  // reference for L1A acceptance, and port checks, on every clk40 edge
  always @(posedge clk40) begin
    if (!daq_rst) begin
      if (l1a && busy_cnt == 0) begin
        exp_rec[0].push_back(daq_diag);
        exp_rec[1].push_back(roi_diag);
        busy_cnt = int'(BITS) + 2;
        n_acc++;
      end else begin
        if (l1a) n_drop++;
        if (busy_cnt > 0) busy_cnt--;
      end
    end
    #1;
    check(daq_busy == (busy_cnt > 0) && roi_busy == (busy_cnt > 0), "busy");
    if (daq_l1a_lost) n_lost_pulse[0]++;
    if (roi_l1a_lost) n_lost_pulse[1]++;
  end

  initial begin
    l1a = 1'b0; daq_diag = '0; roi_diag = '0; daq_rst = 1'b1; roi_rst = 1'b1;
    repeat (4) @(posedge clk40);
    #2 daq_rst = 1'b0; roi_rst = 1'b0;
    wait (daq_lock && roi_lock);
    // fill frames only: the links must lock
    repeat (30) @(posedge clk40);
    check(rdy == 2'b11, "links ready on fill frames");
    while (n_acc < NREADOUT) begin
      @(negedge clk40);
      for (int l = 0; l < int'(LINES); l++) begin
        daq_diag[l] = BITS'($urandom);
        roi_diag[l] = BITS'($urandom);
      end
      l1a = (($urandom % 10) == 0);
    end
    @(negedge clk40);
    l1a = 1'b0;
    repeat (int'(BITS) + 20) @(posedge clk40);
    #2;
    for (int c = 0; c < 2; c++) begin
      check(exp_rec[c].size() == 0, $sformatf("ch%0d every readout received", c));
      check(n_rx_readout[c] == n_acc, $sformatf("ch%0d readout count", c));
      check(n_lost_pulse[c] == n_drop, $sformatf("ch%0d l1a_lost pulses", c));
      check(n_ferr[c] == 0 && n_diff[c] == 0, $sformatf("ch%0d no frame or wire errors", c));
      // mechanisms
      check(rdy[c], $sformatf("ch%0d link lock", c));
      check(n_rx_readout[c] > 0, $sformatf("ch%0d readout happened", c));
      check(n_parity[c] > 0, $sformatf("ch%0d parity frame happened", c));
      check(n_gap[c] > 0, $sformatf("ch%0d gap happened", c));
      check(n_fill[c] > 0, $sformatf("ch%0d fill frames happened", c));
      check(n_inv[c] > 0 && n_data[c] > n_inv[c], $sformatf("ch%0d true and inverted frames", c));
      $display("ch%0d: readouts=%0d parity_ok=%0d gaps=%0d fill=%0d data=%0d inverted=%0d",
               c, n_rx_readout[c], n_parity[c], n_gap[c], n_fill[c], n_data[c], n_inv[c]);
    end
    check(n_drop > 0, "dropped L1A happened");
    $display("l1a accepted=%0d dropped=%0d", n_acc, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NREADOUT * 200 + 500) @(posedge clk40);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
