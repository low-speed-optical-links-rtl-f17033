// glink_encoder: 20-bit user word + DAV -> 24-bit G-Link frame, one per clk.
//
// Each cycle of the 40 MHz frame clock the encoder registers one frame. With
// DAV high it sends a data frame carrying the user word; with DAV low it sends
// the fill frame, which is what the link carries between readouts and what a
// receiver locks on. Data frames use conditional inversion: the encoder keeps
// the running disparity (ones minus zeros sent so far) and sends the word
// either true (C = 1011) or inverted (C = 0100), whichever leaves the running
// disparity closer to zero; on a tie it inverts. The fill frame is balanced and
// leaves the disparity unchanged.
//
// Interface: din/dav are sampled on the rising clk edge; enc is the registered
// frame, so latency is one clock. rst (synchronous, active high) clears the
// running disparity and makes the output the fill frame.
//
// From the design: 20-bit word, 24-bit frame, DAV selects data or fill frames,
// 40 MHz frame rate. This implementation's choice: the control-field codes,
// the fill pattern (see glink_pkg) and the inversion rule. The tie rule makes
// an all-zero word encode to 4FFFFF from reset, the value printed in the
// design's behavioural simulation.
`timescale 1ns/1ps
module glink_encoder
  import glink_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  word_t  din,
  input  logic   dav,
  output frame_t enc
);
  // running disparity; a frame changes it by at most +/-22 and the rule keeps
  // it within +/-22, so 7 bits signed are plenty
  logic signed [7:0] rd;

  logic signed [7:0] wdisp;      // disparity of the true word
  logic signed [7:0] rd_true;    // running disparity if sent true
  logic signed [7:0] rd_inv;     // running disparity if sent inverted
  logic [7:0]        mag_true, mag_inv;
  logic              invert;

  always_comb begin
    wdisp    = 8'(2 * $countones(din)) - 8'(DATA_W);
    // C_DATA has 3 ones (+2), C_DATA_INV has 1 one (-2)
    rd_true  = rd + wdisp + 8'sd2;
    rd_inv   = rd - wdisp - 8'sd2;
    mag_true = rd_true[7] ? 8'(-rd_true) : 8'(rd_true);
    mag_inv  = rd_inv[7]  ? 8'(-rd_inv)  : 8'(rd_inv);
    invert   = (mag_inv <= mag_true);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd  <= '0;
      enc <= FILL_FRAME;
    end else if (!dav) begin
      enc <= FILL_FRAME;
    end else if (invert) begin
      rd  <= rd_inv;
      enc <= {C_DATA_INV, ~din};
    end else begin
      rd  <= rd_true;
      enc <= {C_DATA, din};
    end
  end
endmodule
