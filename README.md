# LPDDR4 PHY: clocking, channel datapath and MCU memory in SystemVerilog

An LPDDR4 PHY sits between a memory controller and the DRAM pins. It turns
wide, slow controller words into double-data-rate bit streams on the DQ pins,
sends a strobe (DQS) with them, and on the way back samples the pins with the
strobe the DRAM returns. Almost all of the hard part is timing. One reference
clock has to become a set of fast, phase-related clocks. Each channel needs a
clock whose phase can be trimmed. Every pin needs a delay that can be adjusted
in picoseconds. Received data must cross from the strobe's clock into the
controller's clock.

This RTL builds that structure for a PHY with a 32-bit controller-side port
made of **two 16-bit DRAM channels**, plus the 8 KiB SRAM of the on-PHY
microcontroller. Digital parts are synthesizable. Parts that are analog in
silicon are behavioural models with the real cells' ports: the PLL, the phase
interpolator and the programmable delay line. Those three models hold the
timing behaviour the digital logic depends on.

```
            i_refclk / i_refclk_alt / i_ana_refclk (26 ns)
                   |                        |
     +-------------v------------+   +-------v--------------------------+
     | phy_cmn                  |   | phy_ctrl_plane                   |
     |  3:1 clock mux           |   |  glitch-free mux  -> o_ref_clk   |
     |  PLL x325, 240 ps diff   |   |                                  |
     |  4-phase divider         |   |  glitch-free mux  -> o_mcu_clk --+--> phy_sram
     |  4 x clock gate          |   |  divide by 2      -> o_ahb_clk   |   (2048 x 32)
     +---+--------------+-------+   |  clock gate       -> o_ahb_extclk|
         | 4 x 480 ps   | vco0 2600 ps --------------^                 |
         | 0/90/180/270 |           +----------------------------------+
   +-----v------+ +-----v------+
   | phy_ch 0   | | phy_ch 1   |   16 DQ + DQS each
   +------------+ +------------+
```

## Clock plan

All clocks come from a 26 ns reference (38.46 MHz).

* **PLL (`phy_pll`, model).** The PLL multiplies the reference by 325, which
  gives an internal step of 80 ps. It outputs a differential 240 ps clock, one
  period per three internal periods. A second output, VCO0, runs at ten times
  the reference (2600 ps). Lock is declared after four stable reference
  periods. Dropping the enable parks every output low and clears lock. The
  model also has four 480 ps quadrature outputs built straight from its
  internal edges. The top leaves them unconnected.
* **Common block (`phy_cmn`).** A one-hot 3:1 clock mux chooses the PLL
  reference: analog reference, normal reference or alternate reference. The
  4-phase divider halves the PLL's 240 ps clock into four 480 ps clocks
  (2.083 GHz). Their rising edges are 120 ps apart, a quadrature set at 0, 90,
  180 and 270 degrees. These are the same edges as taking every sixth 80 ps
  step with a three-step offset between phases. The divider is held in reset
  until lock. Each phase then passes a rest-low clock gate, which opens only
  while the output enable is set and the PLL is locked.
* **Control plane (`phy_ctrl_plane`).**
  * A glitch-free mux picks the reference clock (`i_refclk` or
    `i_refclk_alt`).
  * A second glitch-free mux runs the microcontroller either from that
    reference or from the PLL's VCO0 clock.
  * A divide-by-two makes the 52 ns AHB clock.
  * An external AHB clock passes through a clock gate.
* **Channel clock.** Each channel has its own phase interpolator (`phy_pi`,
  model). It mixes the four quadrature clocks with 16-bit thermometer weights,
  one weight per phase. The result goes through a clock gate and becomes that
  channel's `o_phy_clk`. The model's phase is the angle of the weighted sum of
  the four phasors. Its output is clk0 delayed by that fraction of the measured
  period. For 180 degrees and more, the model delays clk180 instead. For
  example, all weight on 0 degrees gives 0 degrees, equal weight on 0 and 90
  gives 45, and equal weight on 90 and 180 gives 135.

### The clock cells

| cell | module | behaviour |
|---|---|---|
| clock gate | `phy_cgc` | `en = i_clk_en \| i_cgc_en` is latched while the clock is in its rest level and combined with the clock. `REST_HIGH=0`: the latch is open while the clock is low and the output is `clk & en`. `REST_HIGH=1`: the latch is open while the clock is high and the output is `clk \| ~en`. A change of enable never cuts a pulse short. |
| glitch-free 2:1 mux | `phy_gfcm` | Each side has two flops on the falling edge of its own clock. A side turns on only after the other side is off, so the output never gets a short pulse. |
| 3:1 clock mux | `phy_clkmux3to1` | AND-OR with a one-hot select; true and complement outputs. |
| 2-phase divider | `phy_clk_div2ph` | Toggle flop; 0 and 180 degree outputs at half rate. |
| 4-phase divider | `phy_clk_div4ph` | A toggle flop on the true clock and a follower flop on the complement clock. Outputs are 0, 90, 180 and 270 degrees at half rate. |

The latches in `phy_cgc` are intended; lint tools list them as latches.

## Channel datapath (`phy_ch`)

One channel has 16 DQ bits and one strobe. The controller side works in
pairs: on each channel clock cycle it presents `i_wrdata_even` and
`i_wrdata_odd` with `i_wrdata_en`, and reads back pairs through a FIFO.

**Transmit.** Each DQ bit has a 2:1 serializer (`phy_ser2to1`). The even and
odd bits are taken on the rising clock edge. The odd bit is taken again on
the falling edge, and a mux sends the even bit while the clock is low and the
odd bit while it is high. So a pair presented before rising edge *n* appears
on the pin half a period after that edge, one bit per 240 ps. After the
serializer comes a programmable delay (`phy_prog_dly`, model).

The delay has four gears and a 6-bit code:

| gear | delay (ps), code c = 0..63 |
|---|---|
| 0 | 200 + 5c |
| 1 | 110 + 3c |
| 2 | 78 + 2c |
| 3 | 62 + c |

**Strobe.** DQS is another serializer, fed with even = `~i_wrdata_en` and
odd = 1. At rest it is high. During a burst it falls at the start of every even
bit and rises at the start of every odd bit. DQS has its own delay setting,
which should be a quarter clock (120 ps) longer than the DQ delay. Each strobe
edge then lands in the middle of a data bit. An example is DQ at gear 3, code
0 (62 ps) and DQS at gear 2, code 52 (182 ps). `o_dq_oe` comes from a third
serializer and marks the bits that carry data.

**Receive.** The receive inputs are either the pins (`i_dq`, `i_dqs`) or,
with `i_lpbk_en`, the channel's own transmit outputs. This is the driver
loopback used for self-test.
* A falling strobe edge captures the even bits.
* The next rising edge writes {odd bits on the pins, captured even bits} into
  the RX FIFO.

**RX FIFO (`phy_async_fifo`).** The FIFO has Gray-coded pointers and
two-flop synchronizers. Its storage and write pointer are clocked through a
rest-low clock gate enabled by "push and not full", so nothing in the write
domain toggles unless a word is accepted. Its write clock is the strobe and its
read clock is `o_phy_clk`. `o_rddata_valid` shows that a pair is waiting, and
`i_rd_en` takes it. It is first-word fall-through: the pair is on
`o_rddata_*` before it is taken.

**Overflow.** If pairs arrive while the FIFO is full, they are dropped and the
sticky `o_rx_overflow` is set. The write side only gets clock edges while a
strobe toggles, so its copy of the read pointer goes stale between bursts.
Once the reader has drained a full FIFO, the write side still sees "full" for
two more strobe edges. **The first two pairs of the next burst are therefore
also dropped.** After an overflow, treat the channel's receive data as
suspect until the path is reset.

Latency from `i_wrdata_en` to `o_rddata_valid` in loopback is a few channel
clocks: the serializer, the delays, the strobe capture, and the two-flop
pointer synchronizer.

## MCU memory (`phy_sram`)

A 2048 x 32-bit single-port SRAM with four byte-write strobes. Reads take one
cycle, or two with `PIPELINE=1`. In the full PHY a RISC-V microcontroller
owns this memory. Here its port is brought out on the top (`i_sram_*`,
`o_sram_rdata`) and clocked by `o_mcu_clk`. It is written as an array, so
synthesis will map it to flops unless the array is replaced by a
foundry-compiled macro with the same ports.

## Top level (`phy_top`)

`phy_top` connects the blocks:
* the common block;
* the control plane, whose PLL clock input is VCO0;
* two channels, whose quadrature clocks come from the common block;
* the SRAM.

Per-channel ports are unpacked arrays indexed by channel (`[NUM_CH]`). The
top has no parameters. Sizes come from `phy_pkg`:

| constant | value | meaning |
|---|---|---|
| `REFCLK_PERIOD_PS` | 26000 | reference period |
| `PLL_MULT` | 325 | PLL multiplication |
| `PLL_POST_EDGES` / `PLL_PHASE_EDGES` | 12 / 3 | internal half-steps per output period / between phases |
| `VCO0_DIV` | 10 | VCO0 frequency / reference frequency |
| `NUM_CH`, `NUM_DQ` | 2, 16 | channels, DQ bits per channel |
| `PI_N` | 16 | interpolator weight bits per phase |
| `SRAM_DWIDTH`, `SRAM_DEPTH` | 32, 2048 | MCU memory |

## What is modelled and what is missing

**Behavioural models.** `phy_pll`, `phy_pi` and `phy_prog_dly` use delays
and real-valued time and do not synthesize. Each has the pin list of the
analog cell it stands for. Replace them with the real cells, or with
black-box stubs for synthesis. Their numbers are the design values: 325x,
480 ps, 2600 ps and the four delay laws. Their inner behaviour is idealized:
* zero jitter and instant lock after four periods;
* an exact phasor-angle law in the interpolator;
* a transport delay that also passes pulses shorter than the delay.

The interpolator ignores its coupling trim (`xcpl`/`xcplb`) and the
complement weight buses.

**Not present:**
* the RISC-V microcontroller;
* the DFI interface to the memory controller and its buffer;
* the AHB interconnect;
* the configuration and status registers;
* the LVSTL pin drivers and receivers;
* the voltage regulator and process monitor;
* the level shifters;
* the delay-matching replicas of the 4-phase divider and of the interpolator.

The parts whose behaviour is known stand in for some of these:
* the channel's loopback mux and strobe-edge flops stand in for the
  drivers' loopback and the 2-phase sense amplifiers;
* top-level ports stand in for the register fields and the DFI data path.

**Controller-side clock.** In the original PHY, each channel also hands the
DFI side slower clocks: a channel clock and two write and two read clocks,
all with a 52 ns period. Here `o_phy_clk` is the fast interpolated clock
itself (480 ps), and pairs are exchanged on it. 52 ns is not a whole number
of 480 ps periods, so those clocks are not built. Neither is the width
conversion down to them.

**Choices made in this RTL:**
* the strobe pattern and capture scheme;
* the 120 ps DQS offset;
* the RX FIFO depth of 8;
* the gating of the PLL outputs until lock;
* building the quadrature phases with the 4-phase divider from a 240 ps PLL
  clock;
* the one-hot mux selects;
* reset values;
* one interpolator per channel.

## Simulation

Every block has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog. Files use
`` `timescale 1ps/1ps ``. Verilator 5 with timing support:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/phy_pkg.sv \
          tb/tb_phy_top.sv --top-module tb_phy_top -Mdir obj_top -o sim
obj_top/sim +verilator+rand+reset+2 +verilator+seed+1
```

Swap in another `tb/tb_<module>.sv` for the other blocks. `-Wno-fatal` is
needed because the behavioural models draw ZERODLY warnings: Verilator cannot
prove that their run-time delays are non-zero. With `-Wall`, it also lists
blocking assignments in their timed processes, and clock-cell outputs
deliberately left open (such as unused complement legs).

`tb_phy_top` runs the whole PHY at its default sizes, and takes well under a
second. It counts each of the following, and counts a failure for any that
never happened:
1. PLL lock.
2. Random bursts on both channels at once:
   * channel 0 through the internal loopback;
   * channel 1 looped back through its pins with 30 ps of board delay.
3. An interpolator phase step on channel 1, from 45 to 135 degrees, then more
   traffic.
4. A forced RX FIFO overflow on channel 0. The test checks that four pairs are
   lost, then two more while the full flag catches up, then that traffic
   resumes.
5. Gating channel 1's clock off.
6. SRAM byte-strobe writes and read-back, first on the reference clock and
   then with the microcontroller clock switched to the PLL.
7. The 52 ns AHB clock.
8. A reference-clock switch.
9. Moving the PLL to the alternate reference, including loss and return of
   lock.

The block testbenches check the details:
* glitch-freedom of the clock muxes (a minimum-pulse-width monitor);
* the delay law at every gear and at random codes;
* interpolator phases;
* the PLL's periods and phase spacing;
* FIFO full, empty and overflow under random traffic on unrelated clocks.
