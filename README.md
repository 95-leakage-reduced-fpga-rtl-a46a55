# Low-power FPGA fabric with micro-VDD-hopping and zigzag power gating

This is SystemVerilog for a small island-style FPGA fabric. Its logic can slow
down and power down one region at a time instead of all at once. The
architecture comes from the published design "95% Leakage-Reduced FPGA using
Zigzag Power-gating, Dual-VTH/VDD and Micro-VDD-Hopping". It rests on three
ideas:

* **Supply islands.** Four configurable logic blocks (CLBs) share one supply.
  Each island runs either at the high supply VDDH with the full clock f, or at
  the low supply VDDL with f/2. An island that does not need full speed drops
  to VDDL. This is *micro-VDD-hopping*: VDD hopping applied per island rather
  than per chip.
* **Zigzag power gating.** The CLB logic sits behind cut-off switches that can
  be opened in standby. The zigzag arrangement keeps the virtual rails between
  the supplies, so wake-up takes about 620 ps, under one clock at 500 MHz.
  Keepers hold the CLB outputs while the block is cut off. NOR gates on the
  LUT configuration bits drive every LUT data input low, which removes the
  sneak leakage path into the transmission-gate multiplexers.
* **A low-swing interconnect.** The routing channel always runs at VDDL, so
  its switches are single NMOS transistors. A signal entering an island passes
  a *Bypassing Enabled Level Shifter* (BELS). The BELS shifts up when the
  island is at VDDH, and passes the signal straight through when the island is
  at VDDL.

The RTL models the logic of all of this. Supplies, leakage and transistor
circuits cannot be synthesised. The two analog parts, the supply switches and
the BELS, are behavioural models with the real parts' control ports. They
check that the digital control drives them legally.

## Structure

```
fpga_top                 ISLANDS supply islands in a chain (default 2 = 8 CLBs)
 └ vdd_island            one supply domain, 4 tiles
    ├ clk_div2_sel       local f/2 generation and glitch-free f <-> f/2 switch
    ├ vdd_hop_ctrl       hopping sequencer, also sets the level-shifter mode
    ├ pg_ctrl            zigzag standby / wake-up sequencer
    ├ power_switch       behavioural model of the VDDH/VDDL switches
    └ fpga_tile (x4)
       ├ config_chain    the tile's configuration SRAM, loaded serially
       ├ connection_block CLB pins <-> routing tracks
       ├ level_shifter_bels (x5) behavioural model, one per CLB input
       ├ clb             4 BLEs, 5 inputs, 3 outputs, output keepers
       │  └ ble (x4)     LUT + D flip-flop + 2:1 mux
       │     └ lut       K-input LUT with standby forcing
       └ switch_block    track-to-track switches towards the next tile
fpga_pkg                 sizes and the packed configuration records
```

The CLB has four BLEs, five inputs and three outputs. A BLE is a LUT, a D
flip-flop and a 2:1 mux. There are four CLBs per island. All of these sizes
come from the published architecture. The following sizes are not published,
so this design chose them:

| Parameter | Value | Where | Origin |
|---|---|---|---|
| `K` (LUT inputs) | 4 | `fpga_pkg` | this design |
| `W` (tracks per channel) | 20 | `fpga_pkg` | this design: fits the 8-bit adder's 17 operand signals |
| `ISLANDS` | 2 | `fpga_top` | read from the test chip's layout of two rows of four CLB tiles |
| `SETTLE_CYCLES` | 8 | `vdd_hop_ctrl` | this design: supply settling wait |
| `RAMP_CYCLES` | 4 | `power_switch` | model of the supply ramp |
| `WAKE_CYCLES` | 1 | `pg_ctrl` | 620 ps wake-up, less than one 500 MHz clock |

## Clocking: one f, a local f/2, a single phase

Only f is distributed, over an H-tree in silicon. Each island makes its own
f/2, so there is no skew between an f tree and an f/2 tree. If every island
divided f freely, the islands could end up in two opposite f/2 phases and
could not exchange data. A power-up reset therefore starts every divider in
the same state, and the whole chip has one f/2 phase.

`clk_div2_sel` does the division by gating f. A phase bit toggles on every
falling edge of f. The island clock is `f & (!slow_active | phase)`. Both
`phase` and `slow_active` change only while f is low, so the island clock
cannot glitch. Every rising edge of an island clock is a rising edge of f.
Islands at different speeds therefore stay synchronous: a slow island simply
skips every other edge. The f/2 clock made this way is high for a quarter of
its period. The published design only says that f/2 is generated from f at
each block. The gating form is this design's choice.

## Hopping order

`vdd_hop_ctrl` moves an island between its two operating points. The order
protects timing, because logic at VDDL is too slow for f:

* **Going down.** The controller first asks for f/2. Once the clock unit
  reports f/2, it switches the supply to VDDL. After `SETTLE_CYCLES` it puts
  the level shifters into NON-SHIFT mode.
* **Going up.** The controller first puts the level shifters back into SHIFT
  mode and raises the supply to VDDH. After `SETTLE_CYCLES` it asks for f.

The published design gives this clock-then-voltage order. The level-shifter
steps around it are this design's choice, made so the BELS is never in bypass
while the island is above VDDL. The supply model in `power_switch` raises a
sticky `vdd_violation` if an island is ever clocked at f while its supply has
not settled at VDDH. A request that changes in the middle of a sequence is
served after the sequence ends.

## Level shifter modes

The BELS has three control lines: EN, Bypass (0 V, VDDL or VDDH) and the
island supply. `level_shifter_bels` models the two legal modes:

| Mode | Island supply | EN | Bypass | Path |
|---|---|---|---|---|
| SHIFT | VDDH, or ramping | 0 | VDDL (0 V also works, more slowly) | shifter, less contention thanks to the bypass device |
| NON-SHIFT | settled at VDDL | 1 (cut off) | VDDH | pass transistor, no threshold loss |

Any other combination holds the last output and raises `mode_err`, which the
tile and island OR into `bels_err`. The model has no delay. The speed gain of
the real circuit is not represented.

## Standby

`pg_ctrl` puts an island into standby at the first clock edge after
`sleep_req` rises. In one step `keep` closes the output keepers, `ce` stops
the BLE flip-flops and `sleep` opens the zigzag switches. The virtual rails
drift only slowly, so the keepers still capture valid outputs. In this model `sleep` forces the LUT configuration bits low, which
matches what the NOR gates do. On wake-up `sleep` falls first. `WAKE_CYCLES`
(one) clock later the keepers open and the flip-flops run again. The island
is therefore active two clocks of f after `sleep_req` falls. Flip-flops keep
their contents through standby.

Some standby details are this design's choices:

* the state machine;
* the flip-flop enable;
* keepers modelled as transparent latches (`always_latch` in `clb`).

The tile also holds its CLB in the forced-low state while reset is active or
the configuration chain is shifting. The published design does not cover
configuration. Without this, a half-loaded configuration could close a ring
oscillator through the CLB crossbar.

## Routing and configuration

The routing channel is unidirectional and `W` tracks wide. It enters at
`chan_in`, runs through every tile of island 0, then through island 1, and
leaves at `chan_out`. In each tile:

* **Connection block.** Each of the five CLB inputs reads one track. Each
  track either passes through or is driven by one of the three CLB outputs.
* **Switch block.** Each outgoing track takes the same incoming track, the
  next one or the previous one (modulo `W`), or is left undriven and reads 0.

The published design only states that these switches are NMOS pass
transistors on a VDDL channel. The topology, the direction and the width are
this design's.

Inside a CLB a full crossbar feeds every BLE input from the 5 CLB inputs and
the 4 BLE outputs. Each CLB output picks one BLE. Because of the crossbar,
lint and synthesis tools report a possible combinational loop in `clb` (and
in every module above it). A legal configuration never closes such a loop
without a flip-flop in it.

Configuration is one serial chain through all tiles, clocked by f while
`cfg_en` is high. Each tile holds one `fpga_pkg::tile_cfg_t`, which is
`{clb, cb, sb}`. The chain enters at island 0, tile 0. To load it, shift the
last tile's record first and each record MSB first. At the defaults a tile
holds 243 bits and the fabric holds 1944.

## Example mapping: 8-bit ripple-carry adder

The published design was measured running an 8-bit ripple-carry adder. That
adder fits exactly in one island. Each CLB adds two bits: its five inputs are
a, b, a', b' and the carry in, and its three outputs are both sums and the
carry out. Inside the CLB, the four BLEs compute the sum, the carry, the next
sum and the next carry. The middle carry goes through the crossbar feedback.

On the channel, operands a[i] use track i, b[i] use track 8+i, and the carry
uses track 16. Each sum replaces its consumed operand bit, and each carry out
replaces the carry. `tb/tb_cfg_pkg.sv` builds these records (`rca_tile`), and
also a register tile (`reg_tile`) that is used to observe an island's clock
rate.

## Testbenches and simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/fpga_pkg.sv tb/tb_cfg_pkg.sv tb/tb_fpga_top.sv --top-module tb_fpga_top
./obj_dir/Vtb_fpga_top
```

These testbenches cover the whole fabric:

* **`tb_fpga_top`** runs the fabric at its default size. It configures island
  0 as the adder and island 1 as a register for the 9-bit result. It then
  checks every sum while the islands hop, sleep and wake. It counts each
  mechanism:
  * configuration load;
  * register updates at f (100 of 100 clocks) and at f/2 (50 of 100);
  * hops down and up;
  * level shifters in NON-SHIFT mode;
  * outputs kept in standby;
  * wake-up within the required clocks.
* **`tb_rca8_workload`** runs the adder exhaustively, with all 2^17 operand
  combinations, with the adder island at VDDL and f/2.
* **`tb_vdd_island`** checks the adder on one island in all modes, and the
  island's register rate.

Verilator's simulation has two states, so everything that is read is reset or
configured first.

## Departures and limits

* **Not modelled at all:** power, leakage, the supply levels themselves, and
  the speed difference between VDDH and VDDL. Timing at VDDL is assumed to fit
  the f/2 period.
* **BELS and supply switches:** behavioural models only. `power_switch` uses a
  fixed ramp of `RAMP_CYCLES`. The hopping controller waits a fixed
  `SETTLE_CYCLES` rather than sensing the supply.
* **Unpublished sizes:** the LUT size, the channel width and topology, the
  switch-block pattern, the crossbar and the configuration chain are not given
  by the published design. The values here are plausible, not the test chip's.
* **Tile count:** the test chip's layout shows switch blocks only between some
  tiles. Here every tile has one.
* **Physical design only:** the H-tree that distributes f, the ground lines
  that shield the low-swing channel from the wiring inside the blocks, and the
  zigzag cut-off transistors themselves have no RTL. The RTL models only their
  logic effect, and high- and low-threshold transistors are not modelled.
* **Control signals:** who asks for speed or standby is outside the fabric.
  `fast_req` and `sleep_req` are top-level inputs, one per island.
* **f/2 duty cycle:** the f/2 clock has a 25 % duty cycle, not 50 %.
