# CMX G-Link transmitter emulation in FPGA logic

The CMX card sends its readout data (DAQ) and region-of-interest data (ROI) to
a readout driver (ROD) card over two optical links. The ROD expects the
G-Link protocol, originally produced by a dedicated serializer chip. Here
that chip is replaced by FPGA logic plus one of the FPGA's multi-gigabit
transmitters (a Virtex-6 GTX).

Each 40 MHz cycle, a 20-bit user word and a DAV ("data available") flag
become one 24-bit frame. The frame is cut into three bytes at 120 MHz and
serialized at 960 Mbit/s (24 bits x 40 MHz). On L1A (Level-1 accept), a
readout controller sends a record of diagnostic data through these links.
Between readouts the links carry *fill frames*, which the receiver uses to
find the frame boundaries and stay locked.

```
            clk40                     clk40 | clk120            clk120
 L1A ──► readout_ctrl ──20b+DAV──► glink_encoder ──24b──► glink_mux ──8b──► gtx_tx ──► {p,n} 960 Mbit/s
 diag ─►   (DAQ)                     (DAQ)                  (shared)         (DAQ)        to optical module
 L1A ──► readout_ctrl ──20b+DAV──► glink_encoder ──24b──►     ...   ──8b──► gtx_tx ──► {p,n}
 diag ─►   (ROI)                     (ROI)                                   (ROI)
         └──────────── cmx_glink_top ────────────────────────────────────────────────┘
                         └───────────── glink_emulator ─────────────────────────────┘
```

## Where this follows the original scheme, and where it does not

These parts come from the CMX G-Link scheme itself:
- two independent channels, DAQ and ROI;
- a 20-bit user word with DAV, encoded into a 24-bit word at 40 MHz;
- a 24b→8b multiplexer clocked at 40 and 120 MHz, shared by both channels;
- a GTX transmitter at 120 MHz producing 960 Mbit/s on a 2-bit output;
- fill frames whenever there is no data;
- the readout sequence on L1A: load a shift register per user data line, raise DAV, shift the data out, append an odd parity bit per line, then drop DAV for at least one clock.

The source describes neither the G-Link line code nor the readout record, so
these are choices of this design:
- the exact frame codes;
- the rule for inverting data frames;
- the byte and bit order;
- the record length (16 bits per line);
- dropping an L1A that arrives while a readout is running;
- the lock delay of the transmitter model.

The frame codes follow the principle of the original G-Link chips
(conditional inversion with a mid-field master transition), but they are
not bit-compatible with a G-Link receiver chip. They must be matched to the
real receiver before this drives an actual ROD.

## The 24-bit frame (glink_pkg, glink_encoder)

Frame bits `[19:0]` carry the word W and bits `[23:20]` a control field C.
The frame goes on the line bit 0 first.

| frame kind        | C      | W              | sent when                        |
|-------------------|--------|----------------|----------------------------------|
| data, true        | `1011` | word           | DAV high, not inverting          |
| data, inverted    | `0100` | `~word`        | DAV high, inverting              |
| fill              | `1100` | `FFC00`        | DAV low, or in reset             |

- **Frame boundary.** Every control field changes value between C[2] and C[1]. This gives the receiver one guaranteed edge per frame.
- **Fill frame.** It holds 12 ones and 12 zeros. A receiver aligns to it by searching the bit stream for the pattern `CFFC00`.
- **DC balance.** The encoder keeps a running disparity, the number of ones minus zeros it has sent. For each data word it picks the true or the inverted form, whichever leaves the running disparity closer to zero. On a tie it inverts. The disparity therefore stays within ±22 (the testbench checks this).
- **Zero word.** Because of the tie rule, an all-zero word sent right after reset encodes to `4FFFFF`. This matches the encoded value seen in a behavioural simulation of the original firmware.
- **Timing.** The encoder registers its output, so a word sampled at a clk40 edge is on `enc` one clock later.

## Crossing from 40 MHz to 120 MHz (glink_mux)

The mux assumes clk120 is exactly three times clk40 and that every clk40
rising edge lines up with a clk120 rising edge (both from the same clock
manager). It does not use a FIFO:
- a flip-flop on clk40 toggles once per frame;
- the clk120 side keeps a copy of it;
- the two differ during the first clk120 cycle after a new frame was registered.

On that cycle the mux outputs bits `[7:0]` and keeps bits `[23:8]`, then
outputs `[15:8]` and `[23:16]` on the next two cycles. The third byte
overlaps the first clk120 cycle of the next frame period. That is safe
because the next frame's first byte is only taken one cycle later. The mux
has no reset: it finds the phase again on every frame.

Latency from the encoder register to the serial line: byte 0 of a frame
starts on the line two clk120 cycles after the clk40 edge that registered
the frame.
1. One clk120 cycle after that edge, the mux takes the frame and outputs byte 0.
2. On the next clk120 edge the transmitter registers byte 0 and starts serializing it.

## Readout on L1A (readout_ctrl)

```
clk40     : |  L1A  | S0 | S1 | ... | S15 |  P  | gap | idle ...
gl_dav    :   0      1    1          1     1     0     0
line l    :   0     d[0] d[1]       d[15]  par   0     0
busy      :   0      1 ... ........................1     0
```

- **Start.** While idle, DAV is low, so the encoder sends fill frames. An L1A loads each line's `BITS`-bit record from `diag` into that line's shift register.
- **Data.** For `BITS` frames, line `l` of the G-Link word carries bit `j` of its record (bit 0 first), with DAV high.
- **Parity.** In the next frame each line carries odd parity over its own record. Record plus parity then always holds an odd number of ones.
- **Gap.** One frame follows with DAV low; this is the mandatory quiescent clock.
- **Overlapping L1As.** An L1A during these `BITS+2` clocks is not queued. It pulses `l1a_lost` for one clock.

The data lines are zero whenever DAV is low.

The diagnostic data source is not part of this design. `diag` is sampled on
the clock edge that sees the L1A, so the source must hold the record valid at
that edge.

## The transmitter model (gtx_tx)

`gtx_tx` is a behavioural model of the FPGA's hard transceiver. It is not
synthesizable logic. It:
- registers `txdata` on each rising edge of `txusrclk`;
- drives those 8 bits onto `txout = {p, n}` during the next period, 1 ps after the edge, bit 0 first, one bit per `UI_PS`;
- idles the line at 0 (`p=0, n=1`) until its PLL model reports lock, `LOCK_CYCLES` clocks after reset is released.

For a real device, replace it with the vendor transceiver set to a 120 MHz,
8-bit user interface and 960 Mbit/s line rate, with 8b/10b encoding
bypassed.

## Modules

| module           | file                 | role                                                        |
|------------------|----------------------|-------------------------------------------------------------|
| `glink_pkg`      | rtl/glink_pkg.sv     | widths, control codes, fill frame                           |
| `glink_encoder`  | rtl/glink_encoder.sv | 20b+DAV → 24b frame, conditional inversion                  |
| `glink_mux`      | rtl/glink_mux.sv     | 24b @ 40 MHz → 8b @ 120 MHz, `NCH` channels (default 2)     |
| `gtx_tx`         | rtl/gtx_tx.sv        | behavioural serializer, 960 Mbit/s, PLL lock                |
| `readout_ctrl`   | rtl/readout_ctrl.sv  | L1A readout: shift registers, DAV, odd parity, gap          |
| `glink_emulator` | rtl/glink_emulator.sv| two encoders, one mux, two transmitters                     |
| `cmx_glink_top`  | rtl/cmx_glink_top.sv | two readout controllers + emulator (top level)              |

Top-level parameters:
- `LINES = 20`: user data lines used by the readout.
- `BITS = 16`: record length per line. This value is this design's choice.
- `UI_PS = 1041`: the unit interval in ps. The true value for 960 Mbit/s is 1041.7 ps; it is rounded down so that eight bits fit in one simulated 120 MHz period.

The resets `daq_rst` and `roi_rst` are synchronous and active high. They also
reset the transmitter PLL models.

These parts lie outside the top level and connect through its ports:
- the optical modules, through `daq_out` and `roi_out`;
- the source of the diagnostic data, through `daq_diag` and `roi_diag`;
- the clock manager, through `clk40` and `clk120`.

## Testbenches and how to run them

Each testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line. Each has a watchdog that counts a failure if the test hangs. Run one
with Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/glink_pkg.sv \
    tb/cmx_glink_top_tb.sv --top-module cmx_glink_top_tb -o sim
./obj_dir/sim
```

The other modules are found through `-Irtl -Itb`.

| testbench              | what it establishes |
|------------------------|---------------------|
| `glink_encoder_tb`     | fill frames; `4FFFFF` for a zero word after reset; each data frame decodes to its word; the inversion choice matches a reference running-disparity tracker; disparity bounded; mid-field transition in every frame |
| `glink_mux_tb`         | exact byte order and cycle position of all three bytes of every frame, on both channels |
| `gtx_tx_tb`            | lock delay, idle line before lock, bit order and bit timing of the serial output |
| `readout_ctrl_tb`      | every output cycle against a reference, including odd parity, the gap, `busy` and dropped L1As |
| `glink_emulator_tb`    | two receiver models lock on fill frames; every word sent with DAV is recovered in order; one frame per 40 MHz cycle; no frame errors |
| `cmx_glink_top_tb`     | whole chain at default parameters: 40 readouts on both links through the receiver models, checked bit by bit with parity; also counts that each mechanism occurs: lock, readout, parity, gap, fill frames, dropped L1A, true and inverted frames |
| `fill_lock_tb`         | link bring-up with fill frames only at default parameters: both links lock, one fill frame per 40 MHz cycle, no data or frame errors; a reset of one channel drops and restores only that link |

`tb/glink_rx_model.sv` is a behavioural receiver used by the last two:
- it samples mid-bit using the 120 MHz clock;
- it aligns to the fill frame and reports `link_ready` after two fill frames in a row;
- it decodes data frames and counts frame errors.

It stands in for the receiving card and uses the same frame codes as the
encoder.

## Limits

- The line code is self-consistent but not verified against a G-Link receiver chip; see above.
- The 120 MHz and 960 Mbit/s timing exists only in simulation, through the transmitter model; no FPGA timing constraints are included.
- The mux relies on clk40 and clk120 being phase-aligned and related by exactly 3. It cannot take unrelated clocks.
- Only one readout can be in flight per channel.
