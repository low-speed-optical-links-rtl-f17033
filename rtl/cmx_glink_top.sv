// cmx_glink_top: CMX readout over emulated G-Link links, DAQ and ROI.
//
// Each of the two readout channels has a readout controller that, on a
// Level-1 accept (L1A), sends a snapshot of diagnostic data through one shift
// register per G-Link user data line, framed by DAV and closed by a per-line
// odd parity bit. Between readouts DAV is low and the link carries fill
// frames, which keep the receiver locked. The controllers drive the two
// channels of the G-Link emulator (encoder, 24b -> 8b mux, 960 Mbit/s
// transmitter). The optical modules that follow, the receiving card and the
// source of the diagnostic data lie outside this module: their signals are
// the ports daq_out/roi_out and daq_diag/roi_diag.
//
// Interface: everything except the serial outputs is in the clk40 domain;
// clk120 is three times clk40 and phase aligned with it. One L1A starts a
// readout on both channels. daq_diag/roi_diag are sampled on the clock that
// sees the L1A. Resets are synchronous and active high.
//
// Timing: a readout is BITS+1 data frames followed by one fill frame of gap;
// daq_busy/roi_busy stay high for BITS+2 clocks; an L1A during that time is
// dropped and reported on daq_l1a_lost/roi_l1a_lost.
//
// From the design: the two channels, the readout steps and the G-Link
// emulator structure. This implementation's choice: BITS, a common L1A for
// both channels, and dropping L1As while busy.
`timescale 1ns/1ps
module cmx_glink_top
  import glink_pkg::*;
#(
  parameter int unsigned LINES = 20,
  parameter int unsigned BITS  = 16,
  parameter int unsigned UI_PS = 1041
) (
  input  logic                       clk40,
  input  logic                       clk120,
  input  logic                       daq_rst,
  input  logic                       roi_rst,
  input  logic                       l1a,
  input  logic [LINES-1:0][BITS-1:0] daq_diag,
  input  logic [LINES-1:0][BITS-1:0] roi_diag,
  output logic                       daq_busy,
  output logic                       roi_busy,
  output logic                       daq_l1a_lost,
  output logic                       roi_l1a_lost,
  output logic                       daq_lock,
  output logic                       roi_lock,
  output logic [1:0]                 daq_out,
  output logic [1:0]                 roi_out
);
  word_t daq_word, roi_word;
  logic  daq_dav, roi_dav;

  readout_ctrl #(.LINES(LINES), .BITS(BITS)) u_daq_ro (
    .clk(clk40), .rst(daq_rst), .l1a(l1a), .diag(daq_diag),
    .gl_data(daq_word), .gl_dav(daq_dav), .busy(daq_busy), .l1a_lost(daq_l1a_lost));

  readout_ctrl #(.LINES(LINES), .BITS(BITS)) u_roi_ro (
    .clk(clk40), .rst(roi_rst), .l1a(l1a), .diag(roi_diag),
    .gl_data(roi_word), .gl_dav(roi_dav), .busy(roi_busy), .l1a_lost(roi_l1a_lost));

  glink_emulator #(.UI_PS(UI_PS)) u_glink (
    .clk40(clk40), .clk120(clk120),
    .daq_in(daq_word), .daq_dav(daq_dav), .daq_rst(daq_rst),
    .roi_in(roi_word), .roi_dav(roi_dav), .roi_rst(roi_rst),
    .daq_out(daq_out), .roi_out(roi_out),
    .daq_lock(daq_lock), .roi_lock(roi_lock));
endmodule
