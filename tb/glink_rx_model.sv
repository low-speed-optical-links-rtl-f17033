// glink_rx_model: behavioural model of a G-Link receiver, for testbenches.
//
// It stands for the receiver on the card at the far end of the link. It
// samples the differential stream in the middle of each bit, using the
// transmitter's 120 MHz byte clock as its recovered clock (8 bits per period,
// the first UI_PS/2 + 1 ps after the edge, like the transmitter model). It
// slides a 24-bit window over the bits (first bit received = frame bit 0)
// until the window holds a fill frame; that fixes the frame boundary. From
// then on it decodes every 24 bits: fill frame -> DAV low, control field
// 1011 -> data as sent, 0100 -> data inverted back. After LOCK_FILLS fill
// frames in a row link_ready rises. Any other control field is a frame error:
// the model drops link_ready and hunts for a fill frame again.
//
// For each decoded frame it updates dav/data and then toggles frame_tgl.
// Counters report fill frames, data frames, inverted data frames, frame errors
// and bits whose two wires were not complementary.
`timescale 1ns/1ps
module glink_rx_model
  import glink_pkg::*;
#(
  parameter int unsigned UI_PS      = 1041,
  parameter int unsigned LOCK_FILLS = 2
) (
  input  logic       clk,
  input  logic [1:0] rx,
  output logic       link_ready,
  output logic       frame_tgl,
  output logic       dav,
  output word_t      data,
  output int         n_fill,
  output int         n_data,
  output int         n_inv,
  output int         n_ferr,
  output int         n_diff_err
);
  frame_t win;
  bit     aligned;
  int     nbits;
  int     good_fills;

  task automatic decode(input frame_t f);
    if (f == FILL_FRAME) begin
      n_fill++;
      good_fills++;
      if (good_fills >= int'(LOCK_FILLS)) link_ready = 1'b1;
      dav = 1'b0;
    end else if (f[23:20] == C_DATA || f[23:20] == C_DATA_INV) begin
      n_data++;
      dav  = 1'b1;
      if (f[23:20] == C_DATA_INV) begin
        n_inv++;
        data = ~f[19:0];
      end else begin
        data = f[19:0];
      end
    end else begin
      n_ferr++;
      aligned    = 1'b0;
      link_ready = 1'b0;
      good_fills = 0;
      dav        = 1'b0;
      return;
    end
    if (link_ready) frame_tgl = ~frame_tgl;
  endtask

  task automatic take_bit(input logic [1:0] w);
    if (w[1] == w[0]) n_diff_err++;
    win = {w[1], win[FRAME_W-1:1]};
    if (!aligned) begin
      if (win == FILL_FRAME) begin
        aligned    = 1'b1;
        nbits      = 0;
        good_fills = 1;
        n_fill++;
      end
    end else begin
      nbits++;
      if (nbits == int'(FRAME_W)) begin
        nbits = 0;
        decode(win);
      end
    end
  endtask

  initial begin
    link_ready = 1'b0;
    frame_tgl  = 1'b0;
    dav        = 1'b0;
    data       = '0;
    n_fill = 0; n_data = 0; n_inv = 0; n_ferr = 0; n_diff_err = 0;
    win = '0; aligned = 1'b0; nbits = 0; good_fills = 0;
    forever begin
      @(posedge clk);
      #((UI_PS / 2 + 1) * 1ps);
      for (int i = 0; i < 8; i++) begin
        take_bit(rx);
        if (i < 7) #(UI_PS * 1ps);
      end
    end
  end
endmodule
