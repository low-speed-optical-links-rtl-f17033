// gtx_tx: behavioural model of the FPGA multi-gigabit transmitter (GTX) used
// as a plain 8-bit serializer. Not synthesizable: it stands for the vendor's
// hard transceiver, whose insides are not part of this design.
//
// On every rising edge of txusrclk (120 MHz) the model registers txdata. Just
// after the next edge it drives that byte onto the differential output,
// bit 0 first, one bit per unit interval UI_PS, so eight bits fill one
// txusrclk period: 8 x 120 MHz = 960 Mbit/s. txout = {p, n}, with n the
// complement of p. While the transmit PLL is not locked the line idles at 0.
// The PLL model locks LOCK_CYCLES txusrclk cycles after rst is released.
//
// Timing: a byte sampled at edge k is on the line between edge k+1 (plus 1 ps)
// and edge k+2. UI_PS must satisfy 8*UI_PS + 1 < txusrclk period in ps.
//
// From the design: 8-bit input at 120 MHz, 960 Mbit/s serial output on a
// 2-bit (differential) port, a TX PLL with a lock status. This model's own
// choice: bit order, one-cycle input register, the lock delay.
`timescale 1ns/1ps
module gtx_tx #(
  parameter int unsigned UI_PS       = 1041,
  parameter int unsigned LOCK_CYCLES = 16
) (
  input  logic       txusrclk,
  input  logic       rst,
  input  logic [7:0] txdata,
  output logic [1:0] txout,
  output logic       pll_lock
);
  logic [7:0]  txdata_q;
  logic [15:0] lock_cnt;

  always_ff @(posedge txusrclk) begin
    txdata_q <= txdata;
    if (rst) begin
      lock_cnt <= '0;
      pll_lock <= 1'b0;
    end else if (lock_cnt == 16'(LOCK_CYCLES)) begin
      pll_lock <= 1'b1;
    end else begin
      lock_cnt <= lock_cnt + 16'd1;
    end
  end

  // serializer: 8 bits per txusrclk period, starting 1 ps after the edge so
  // that the byte registered at that edge is read
  initial txout = 2'b01;

  always @(posedge txusrclk) begin
    #1ps;
    for (int i = 0; i < 8; i++) begin
      txout <= pll_lock ? {txdata_q[i], ~txdata_q[i]} : 2'b01;
      #(UI_PS * 1ps);
    end
  end
endmodule
