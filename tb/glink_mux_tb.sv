// glink_mux_tb: self-checking test of the 24b -> 8b mux, two channels.
//
// clk40 and clk120 are made from one generator so that every clk40 rising
// edge coincides with a clk120 rising edge. New random frames are launched on
// every clk40 edge. Checked on each clk120 falling edge: byte 0 of the frame
// launched at the last clk40 edge is out one clk120 cycle after that edge,
// byte 1 the cycle after, byte 2 the cycle after that (which is the first
// clk120 cycle of the next frame period): three bytes per 40 MHz cycle.
`timescale 1ns/1ps
module glink_mux_tb;
  import glink_pkg::*;

  logic clk40 = 1'b0, clk120 = 1'b0;
  int   h = 5;          // clk120 half-period index within a clk40 period, 0..5
  logic [1:0][FRAME_W-1:0] enc;
  logic [1:0][7:0]         byte_o;
  logic [1:0][FRAME_W-1:0] cur, prev;
  int checks = 0, failures = 0, frames = 0;

  glink_mux #(.NCH(2)) dut (.clk40(clk40), .clk120(clk120), .enc(enc), .byte_o(byte_o));

  initial forever begin
    #4.167;
    h = (h + 1) % 6;
    clk120 = (h % 2 == 0);
    clk40  = (h < 3);
  end

  always_ff @(posedge clk40) begin
    enc <= {24'($urandom), 24'($urandom)};
  end
  // the launched frame equals 'enc' after the edge; track it and the previous
  always @(posedge clk40) begin
    #0.5;
    prev = cur;
    cur  = enc;
    frames++;
  end

  always @(negedge clk120) begin
    if (frames > 3) begin
      for (int c = 0; c < 2; c++) begin
        logic [7:0] exp;
        case (h)
          3: exp = cur[c][7:0];
          5: exp = cur[c][15:8];
          default: exp = prev[c][23:16];   // h == 1
        endcase
        checks++;
        if (byte_o[c] !== exp) begin
          failures++;
          $display("FAIL ch%0d h=%0d at %0t: byte %h expected %h", c, h, $time, byte_o[c], exp);
        end
      end
    end
  end

  initial begin
    enc = '0;
    wait (frames == 400);
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
