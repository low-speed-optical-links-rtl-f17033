// glink_mux: 24-bit frames at 40 MHz -> three bytes at 120 MHz, per channel.
//
// The frame clock clk40 and the byte clock clk120 come from the same clock
// manager: clk120 is exactly three times clk40 and every clk40 rising edge
// coincides with a clk120 rising edge. A toggle flip-flop in the clk40 domain
// changes on each frame; the clk120 side keeps a copy and sees the difference
// one clk120 cycle after the frame changed, when the new frame has been stable
// for a third of the frame period. On that cycle it takes the frame, sends
// bits [7:0] and keeps the rest in a shift register, sending [15:8] and
// [23:16] on the next two cycles. Needs no reset: the phase is found again on
// every frame, from the second frame after start-up on.
//
// Interface: enc[c] is the registered frame of channel c (clk40 domain);
// byte_o[c] changes on clk120. Timing: byte 0 of the frame launched at a clk40
// edge appears one clk120 cycle later, byte 2 three clk120 cycles later,
// i.e. 24 bits per 40 MHz cycle (960 Mbit/s with a 120 MHz byte clock).
//
// From the design: the 24b -> 8b multiplexer running on clk40 and clk120, and
// one Mux serving both the DAQ and the ROI channel. This implementation's
// choice: sending the low byte first and the toggle-based phase detection.
`timescale 1ns/1ps
module glink_mux
  import glink_pkg::*;
#(
  parameter int unsigned NCH = 2
) (
  input  logic                        clk40,
  input  logic                        clk120,
  input  logic [NCH-1:0][FRAME_W-1:0] enc,
  output logic [NCH-1:0][7:0]         byte_o
);
  logic tog40;     // flips every frame (clk40 domain)
  logic tog120;    // its copy in the clk120 domain
  logic first;     // this clk120 cycle starts a frame
  logic [NCH-1:0][FRAME_W-9:0] rest;  // bytes 1 and 2 still to send

  always_ff @(posedge clk40) tog40 <= ~tog40;

  assign first = (tog40 != tog120);

  always_ff @(posedge clk120) begin
    tog120 <= tog40;
    for (int c = 0; c < NCH; c++) begin
      if (first) begin
        byte_o[c] <= enc[c][7:0];
        rest[c]   <= enc[c][FRAME_W-1:8];
      end else begin
        byte_o[c] <= rest[c][7:0];
        rest[c]   <= {8'h00, rest[c][FRAME_W-9:8]};
      end
    end
  end
endmodule
