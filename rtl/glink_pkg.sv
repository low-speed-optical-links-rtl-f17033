// glink_pkg: widths and frame codes shared by the emulated G-Link transmitter.
//
// A G-Link frame is 24 bits: a 20-bit user word W in bits [19:0] and a 4-bit
// control field C in bits [23:20]. The 20-bit word and the 24-bit frame come
// from the design; the control-field codes and the fill-frame pattern are
// this implementation's own choice (the design only says that data frames and
// fill frames are told apart by framing bits):
//   data frame, true word      C = 1011, W = word
//   data frame, inverted word  C = 0100, W = ~word   (frame 4FFFFF for word 00000)
//   fill frame                 C = 1100, W = 20'hFFC00 (12 ones, 12 zeros)
// Every control field has a transition between C[2] and C[1], so a receiver
// finds one guaranteed edge in every frame.
`timescale 1ns/1ps
package glink_pkg;
  localparam int unsigned DATA_W  = 20;  // user data bits per frame
  localparam int unsigned FRAME_W = 24;  // encoded frame bits

  localparam logic [3:0] C_DATA     = 4'b1011;
  localparam logic [3:0] C_DATA_INV = 4'b0100;
  localparam logic [3:0] C_FILL     = 4'b1100;
  localparam logic [DATA_W-1:0]  W_FILL     = 20'hFFC00;
  localparam logic [FRAME_W-1:0] FILL_FRAME = {C_FILL, W_FILL};

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [FRAME_W-1:0] frame_t;
endpackage
