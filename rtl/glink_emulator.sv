// glink_emulator: two-channel G-Link transmitter built from FPGA logic and a
// multi-gigabit transmitter, replacing the original G-Link serializer chip.
//
// DAQ and ROI are two independent links. Each 40 MHz cycle a channel's
// encoder turns its 20-bit word and DAV into a 24-bit frame (data or fill
// frame). A shared mux cuts both frames into three bytes sent at 120 MHz, and
// each channel's GTX transmitter serializes its bytes at 960 Mbit/s onto a
// differential pair for the optical module.
//
// Interface: daq_in/daq_dav/daq_rst and roi_in/roi_dav/roi_rst are in the
// clk40 domain (resets synchronous, active high; they also reset the
// transmitter's PLL model). clk120 must be phase aligned with clk40 at three
// times its frequency. daq_out/roi_out = {p, n}. daq_lock/roi_lock report the
// transmitters' PLL lock.
//
// Timing: a word sampled at clk40 edge k leaves as frame bits 0..23 starting
// two clk120 cycles after the next clk40 edge (encoder register, mux,
// transmitter input register), one frame per clk40 cycle.
//
// The block structure, names, widths and clock rates follow the design's
// readout scheme; the submodules list their own choices.
`timescale 1ns/1ps
module glink_emulator
  import glink_pkg::*;
#(
  parameter int unsigned UI_PS = 1041
) (
  input  logic       clk40,
  input  logic       clk120,
  input  word_t      daq_in,
  input  logic       daq_dav,
  input  logic       daq_rst,
  input  word_t      roi_in,
  input  logic       roi_dav,
  input  logic       roi_rst,
  output logic [1:0] daq_out,
  output logic [1:0] roi_out,
  output logic       daq_lock,
  output logic       roi_lock
);
  frame_t     daq_enc, roi_enc;
  logic [7:0] daq_byte, roi_byte;

  glink_encoder u_daq_enc (.clk(clk40), .rst(daq_rst), .din(daq_in), .dav(daq_dav), .enc(daq_enc));
  glink_encoder u_roi_enc (.clk(clk40), .rst(roi_rst), .din(roi_in), .dav(roi_dav), .enc(roi_enc));

  glink_mux #(.NCH(2)) u_mux (
    .clk40 (clk40),
    .clk120(clk120),
    .enc   ({roi_enc, daq_enc}),
    .byte_o({roi_byte, daq_byte})
  );

  gtx_tx #(.UI_PS(UI_PS)) u_daq_gtx (.txusrclk(clk120), .rst(daq_rst), .txdata(daq_byte),
                                      .txout(daq_out), .pll_lock(daq_lock));
  gtx_tx #(.UI_PS(UI_PS)) u_roi_gtx (.txusrclk(clk120), .rst(roi_rst), .txdata(roi_byte),
                                      .txout(roi_out), .pll_lock(roi_lock));
endmodule
