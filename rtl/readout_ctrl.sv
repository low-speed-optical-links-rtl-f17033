// readout_ctrl: L1A-driven readout of diagnostic data onto the G-Link.
//
// Between readouts the controller is quiescent: DAV is low, so the G-Link
// encoder sends fill frames. On an L1A it loads one BITS-bit diagnostic record
// per user data line into that line's shift register and raises DAV. For BITS
// clocks each line then carries one bit of its record per frame (bit 0
// first). On the next clock every line carries an odd parity bit over its
// record, so the record plus parity holds an odd number of ones. DAV then
// drops for one clock (the gap every readout must end with) before the
// controller is ready again. An L1A that arrives while a readout or its gap is
// in progress is not queued: it is dropped and flagged on l1a_lost for one
// clock.
//
// Interface: l1a and diag are sampled on the rising clk edge; gl_data/gl_dav
// are driven from registers only and are valid from the clock after the L1A.
// A readout takes BITS+1 frames with DAV high, then 1 frame with DAV low;
// busy is high for all BITS+2 clocks. rst is synchronous and active high.
//
// From the design: L1A starts the readout, data reach the G-Link pins through
// shift registers, DAV marks the data, an odd parity bit per line follows the
// shifted data, DAV is low for at least one clock afterwards, fill frames are
// sent when there is no L1A. This implementation's choice: the record length
// BITS, LSB-first shifting, a gap of exactly one clock, dropping L1As that
// arrive while busy, and zero on the data lines when DAV is low.
`timescale 1ns/1ps
module readout_ctrl
  import glink_pkg::*;
#(
  parameter int unsigned LINES = 20,   // user data lines used, at most DATA_W
  parameter int unsigned BITS  = 16    // diagnostic bits per line per readout
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        l1a,
  input  logic [LINES-1:0][BITS-1:0]  diag,
  output word_t                       gl_data,
  output logic                        gl_dav,
  output logic                        busy,
  output logic                        l1a_lost
);
  typedef enum logic [1:0] {IDLE, SHIFT, PARITY, GAP} state_t;

  state_t                     state;
  logic [LINES-1:0][BITS-1:0] sr;      // one shift register per line
  logic [LINES-1:0]           par;     // odd parity of each line's record
  logic [$clog2(BITS+1)-1:0]  cnt;     // bits shifted so far

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      cnt      <= '0;
      l1a_lost <= 1'b0;
    end else begin
      l1a_lost <= l1a && (state != IDLE);
      unique case (state)
        IDLE: if (l1a) begin
          for (int l = 0; l < LINES; l++) begin
            sr[l]  <= diag[l];
            par[l] <= ~^diag[l];
          end
          cnt   <= '0;
          state <= SHIFT;
        end
        SHIFT: begin
          for (int l = 0; l < LINES; l++) sr[l] <= sr[l] >> 1;
          if (cnt == ($bits(cnt))'(BITS - 1)) state <= PARITY;
          cnt <= cnt + 1'b1;
        end
        PARITY: state <= GAP;
        GAP:    state <= IDLE;
      endcase
    end
  end

  always_comb begin
    gl_data = '0;
    for (int l = 0; l < LINES; l++) begin
      if (state == SHIFT)       gl_data[l] = sr[l][0];
      else if (state == PARITY) gl_data[l] = par[l];
    end
    gl_dav = (state == SHIFT) || (state == PARITY);
    busy   = (state != IDLE);
  end

  initial assert (LINES >= 1 && LINES <= DATA_W && BITS >= 1)
    else $error("readout_ctrl: LINES must be 1..%0d and BITS at least 1", DATA_W);
endmodule
