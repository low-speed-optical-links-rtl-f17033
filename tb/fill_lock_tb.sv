// fill_lock_tb: link test with fill frames only, at the top's default size.
//
// No L1A is sent, so both links carry nothing but fill frames. Checked: both
// receiver models find the frame boundary and report link ready, decode only
// fill frames (no data, no frame errors), one per 40 MHz cycle. Then the ROI
// channel alone is reset: its transmitter PLL model drops lock, the line goes
// idle, its receiver loses the link (a frame error), and after the reset the
// link locks again on fill frames while the DAQ link is untouched.
`timescale 1ns/1ps
module fill_lock_tb;
  import glink_pkg::*;
  localparam int unsigned LINES = 20;
  localparam int unsigned BITS  = 16;

  logic clk40 = 1'b0, clk120 = 1'b0;
  int   h = 5;
  logic daq_rst, roi_rst, l1a;
  logic [LINES-1:0][BITS-1:0] daq_diag, roi_diag;
  logic daq_busy, roi_busy, daq_l1a_lost, roi_l1a_lost, daq_lock, roi_lock;
  logic [1:0] daq_out, roi_out;

  logic [1:0] rdy, tgl, rdav;
  word_t      rdata[2];
  int n_fill[2], n_data[2], n_inv[2], n_ferr[2], n_diff[2];
  int checks = 0, failures = 0;

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

  initial begin
    int f0, f1, ferr0, lost_ready;
    l1a = 1'b0; daq_diag = '0; roi_diag = '0; daq_rst = 1'b1; roi_rst = 1'b1;
    repeat (4) @(posedge clk40);
    #2 daq_rst = 1'b0; roi_rst = 1'b0;
    check(rdy == 2'b00, "no link before the transmitters lock");
    wait (daq_lock && roi_lock);
    repeat (10) @(posedge clk40);
    check(rdy == 2'b11, "both links ready on fill frames");
    f0 = n_fill[0]; f1 = n_fill[1];
    repeat (200) @(posedge clk40);
    check(n_fill[0] - f0 == 200 && n_fill[1] - f1 == 200, "200 fill frames in 200 clocks");
    check(n_data[0] == 0 && n_data[1] == 0, "no data frames without L1A");
    check(n_ferr[0] == 0 && n_ferr[1] == 0, "no frame errors on fill frames");
    // reset the ROI channel alone
    ferr0 = n_ferr[1];
    lost_ready = 0;
    @(negedge clk40) roi_rst = 1'b1;
    repeat (10) begin
      @(posedge clk40);
      if (!rdy[1]) lost_ready = 1;
    end
    check(!roi_lock && daq_lock, "ROI PLL model unlocked by its reset only");
    check(lost_ready == 1 && n_ferr[1] > ferr0, "ROI receiver loses the link");
    @(negedge clk40) roi_rst = 1'b0;
    wait (roi_lock);
    repeat (10) @(posedge clk40);
    check(rdy == 2'b11, "ROI link locks again; DAQ stays locked");
    check(n_ferr[0] == 0 && n_diff[0] == 0 && n_diff[1] == 0, "DAQ link undisturbed");
    $display("fill frames daq=%0d roi=%0d, roi frame errors during reset=%0d", n_fill[0], n_fill[1], n_ferr[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk40);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
