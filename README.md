# SVAL: on-board pulse-correlation processor in one FPGA

A sounding-rocket electron instrument delivers two streams of short (about 250 ns)
detector pulses, I/P1 and I/P2, while its energy analyser steps through 16 energy
levels. Only a digest of those pulses can go to the ground. The SVAL processor makes two
digests, one per energy level:

* **HF "buncher"**: a histogramme of the time between adjacent pulses. There are 32
  lags per input channel. Pulses that arrive bunched show up as a peak at short lags.
* **LF auto-correlation (ACF)**: the pulses are counted in fixed sampling intervals to
  give a 32-sample series per channel. Its auto-correlation over 16 lags is computed,
  compressed to 10-bit words and sent out.

The original board did this with two 8051-family microcontrollers, four external
FIFOs and discrete state machines. This RTL does the same job in one synchronous
design. Every software loop of the original becomes a state machine of its own. The
small arrays (histogramme, sample buffers, sum arrays, FIFO) are on-chip RAMs. All the
processes run at the same time, so the FIFOs that used to sit between the pulse
front-ends and the processors are no longer needed.

```
            +---------------------------- hf_module ---------------------------+
 I/P1 --+-->| FSM1 (pulse_delay_fsm) --+                                        |
        |   |                          +--> buncher_hist_gen <--> 1Kx8 dp_ram --+--> hf_output <--> 64x8 sp_ram
 I/P2 -+-+->| FSM2 (pulse_delay_fsm) --+        ^ New Energy Step, Last Energy   |        |
       | |  +--------------------------------------------------------------------+  tm_serializer(8) --> HF telemetry
       | |
       | |  +---------------------------- lf_module -----------------------------------------------+
       | +->| lf_channel ACF1: lf_sampler -> M3 -> lf_copy -> M2 -> lf_acf_proc -> M1 --+           |
       +--->| lf_channel ACF2: (same)                                                  +-> lf_scale_out -> circ_fifo 512x10
            |                    lf_ctrl (New Energy Step, synch points 1-3)                -> lf_tm_output -> tm_serializer(10) --> LF telemetry
            +--------------------------------------------------------------------------------+
 powerup_ctrl: clears the histogramme after reset and holds the LF work until it is done
```

`sval_top` puts both modules side by side. It also holds the input synchronisers and
the shared power-up process.

## Clock, inputs and telemetry

The design runs on a single clock. The original description gives no clock frequency.
The defaults here assume 8 MHz, which puts one clock close to the 125 ns resolution of
the 0–8 MHz buncher. Every asynchronous input goes through a two-flop synchroniser
(`sync_edge`), and only its rising edge is used. This applies to the two detector
inputs, New Energy Step, and the request and bit-clock lines of each telemetry port. A
pulse must therefore be at least one clock high and one clock low. The 4 Last Energy
bits and the one-bit-mode telecommand pass through a two-flop register. They must be
stable when the energy step edge arrives.

Each telemetry port has two lines:

* a **request** line: a rising edge asks for the next word. HF words are 8 bits and LF
  words are 10 bits.
* a **bit clock** line: each rising edge moves `tm_*_data_o` on to the next bit, MSB
  first.

The word's MSB appears one clock after the word is loaded. After the last bit the line
rests at 0.

`sval_top` also brings out one-clock event flags: power-up done, histogramme update, HF
step, HF block copy, LF step, LF stall, LF processing done, FIFO overflow and telemetry
underrun. They are only for monitoring.

## HF path: delay histogramme

**Delay measurement (`pulse_delay_fsm`).** There is one state machine per input. A
pulse starts the lag counter. The next pulse reads the counter as the delay, in lags of
`LAG_DIV` clocks (default 1), and restarts it. Delays of 32 lags or more are outside the
buncher and are dropped. The delay waits in a one-entry register with a valid/ready
handshake. If a new delay arrives before the old one was taken, it replaces the old one
and `lost_o` pulses. The histogramme generator takes a waiting delay within a few clocks, so a delay is lost only when pulses on a channel follow each other within about four clocks while the other channel is also busy.

**Histogramme memory map.** The histogramme is a 1Kx8 dual-port RAM with 16 blocks of
64 bytes, one block per energy level.

| address bits | 9..6         | 5                      | 4..0        |
|--------------|--------------|------------------------|-------------|
| meaning      | energy level | channel (0 = I/P1, 1 = I/P2) | delay (lags) |

The 64-byte blocks and the 4-bit energy base come from the original design. The split of
a block into two 32-bin halves, one per channel, is this design's own choice.

**Update (`buncher_hist_gen`).** An update is a read-modify-write on RAM port A and
takes two clocks:

1. Present the bin address and take the delay from its channel.
2. Write back the value read plus one. The 8-bit count wraps.

The two channels are served alternately. A New Energy Step edge loads the block base
`{Last Energy, 000000}` in one clock. If the edge arrives during a write clock, it is
held and served in the next clock. During power-up the same port writes zeros over the
whole RAM, which takes 1024 clocks (`powerup_ctrl`).

**Readout (`hf_output`).** Telemetry reads a 64x8 output array, not the histogramme
itself. A request normally gets the next byte of the array one clock later. When all 64
bytes of the array have been sent, the next request first copies a whole block out of
the histogramme through RAM port B, so that request is answered after 68 clocks. This
matches the 1T to 68T given for this process in the original design. Blocks are copied
in turn, energy 0 up to 15 and then round again. Copying does not clear the histogramme.

## LF path: one ACF per energy step

The LF path is the hardest part of the design to follow. Three processes overlap in
time, and each of the three arrays per channel is single-ported. Each channel has:

* **M3** (32x8): samples being taken.
* **M2** (32x8): samples ready for processing.
* **M1** (16x16): ACF sums.

The two channels run in lock step, and an assertion checks this.

### What happens on a New Energy Step (`lf_ctrl`)

```
step k-1                          step k                                         step k+1
 |-- sample series S(k-1) -> M3 --|                                               |
                                  |wait|out R(k-2)|copy S(k-1) M3->M2|             |
                                                                     |-- process S(k-1): M2 -> M1 (288 clk) --|
                                                                     |-- sample series S(k) -> M3 -----------|
                                                                                  |out R(k-1)| ...
```

1. **Wait (synch point 2).** If the series started at the previous step is not
   complete, the sequence waits for it, and for the processor if it is still busy.
   `stall_o` is high meanwhile. A step that comes early is therefore served late. It is
   never lost, and the running series is never cut short.
2. **Output.** The sums computed during the previous step are scaled and written to the
   FIFO (`lf_scale_out`).
3. **Copy.** The completed series moves from M3 to M2 (`lf_copy`). This takes 33
   clocks.
4. **Start (synch points 3 and 1).** In the same clock, processing of M2 starts and
   sampling of the new step starts into the now free M3.

So a series sampled during step *k* is processed during step *k+1* and leaves in the
telemetry at step *k+2*. The first two steps after power-up have nothing to output, and
the first has nothing to copy; those parts are skipped. Energy steps are ignored until
power-up has finished.

### Sampling (`lf_sampler`)

Each sample is the number of pulses in one sampling interval, capped at 255. The
interval length is fixed at the start of a run from the parity of the energy level:

* even levels: `DIV_EVEN` clocks, default 400 (20 kHz at 8 MHz, for the 0–10 kHz band);
* odd levels: `DIV_ODD` clocks, default 1200 (about 6.7 kHz, for the 0–3.3 kHz band).

A run of 32 samples therefore takes 12,800 or 38,400 clocks. Energy steps must be at
least that far apart, or the step waits as described above.

### ACF processing (`lf_acf_proc`)

For lags L = 1..16 it computes

    R_L = sum_{i=0}^{15} X[i] * X[i+L]

This is the first half of the series against the series shifted by L. It is written as
a nested-loop state machine:

| state      | clocks per lag | what it does              |
|------------|----------------|---------------------------|
| set-up     | 1              | start the lag             |
| MAC        | 16             | one multiply-accumulate per clock |
| write-back | 1              | write R_L to M1[L-1]      |

That gives 16 × 18 = **288 clocks** per series per channel. Both channels run in
parallel.

A one-MAC-per-clock loop needs two operands per clock, but M2 has only one port. The
first-half operands X[0..15] therefore sit in a 16x8 register bank. The processor fills
it by watching the copy process write M2, so the inner loop reads only X[i+L] from M2.
Sums are accumulated in 20 bits and saturated to 16 bits on write-back.

**One-bit mode.** When the `one_bit_mode_i` telecommand is set at the moment processing
starts, each sample is reduced to one bit (count ≠ 0). Products become ANDs and R_L
counts coincidences, from 0 to 16. The mode stays attached to those results until they
are output.

### Output words (`lf_scale_out`, `circ_fifo`, `lf_tm_output`)

Each step writes 32 words to the FIFO: ACF1 lags 1..16, then ACF2 lags 1..16, one word
per clock (33 clocks). The word depends on the mode:

* **One-bit mode:** the sum itself.
* **Multibit mode:** a 10-bit floating-point code `{e[3:0], m[5:0]}`:
  * For v < 64: e = 0 and m = v, which is exact.
  * Otherwise: e = (bit length of v) − 6, and m = the six bits below the leading one.
  * Decoding: `v ≈ (64 + m) << (e − 1)`, rounded down, with an error below 1/64.

`sval_pkg::compress10` and `expand10` implement the code.

The FIFO holds 512 words in a dual-port RAM with wrapping pointers. That is 16 energy
steps of results. A word pushed into a full FIFO is dropped and `overflow_o` pulses.
Each LF telemetry request pops one word, and it reaches the serialiser two clocks after
the request. A request to an empty FIFO sends an all-zero word one clock later and
pulses `underrun_o`.

## Parameters

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `LAG_DIV` | `sval_top`, `hf_module`, `pulse_delay_fsm` | 1 | clocks per buncher lag |
| `DIV_EVEN` / `DIV_ODD` | `sval_top`, `lf_module`, `lf_channel`, `lf_sampler` | 400 / 1200 | LF sampling interval in clocks for even / odd energy levels |
| `FIFO_DEPTH` | `sval_top`, `lf_module` | 512 | LF output FIFO words (power of two) |

The fixed sizes are in `sval_pkg`:

* 16 energy levels;
* 32 lags per HF channel;
* a 1K histogramme;
* LF series of 32 samples, giving 16 lags;
* 16-bit sums and 10-bit output words.

In total the design holds 15,360 bits of RAM: 8K in the histogramme, 512 in the output
array, 1.5K in the LF arrays and 5K in the FIFO.

## How far this follows the original SVAL-VHDL design

Taken from the original design:

* the split into HF and LF modules and their processes and memories, with the sizes
  1Kx8, 64x8, 32x8, 16x16 and 512x10;
* the 16 energy blocks of 64 bytes;
* the 5-bit delay;
* the two-clock histogramme update;
* the one-clock energy step;
* the HF output by 64-byte block copies;
* the order output / copy / process on an energy step, and the three synch points;
* the 32-sample series with its 16-lag ACF equation;
* the nested-loop MAC state machine;
* the 10-bit output words.

The design's own choices where the original says nothing:

* the input synchronisers;
* the telemetry line protocol;
* the delay handshake;
* the split of each histogramme block between the channels;
* what power-up does (clearing the histogramme);
* the block rotation of the HF output;
* the sampling intervals in clocks;
* the meaning of a sample (pulse count, saturating at 255);
* the meaning of "one-bit ACF" and its selection by telecommand;
* the compression law;
* the FIFO full and empty behaviour;
* the word order;
* waiting for, rather than aborting, an unfinished sampling run.

Deliberate differences:

* The original inner loop adds each new sum onto the value already in M1. Here every
  energy step starts from zero, because the sums are output and replaced at every step.
* The original reports 132 to 143 clocks (multibit) and 48 clocks (one-bit) for the
  output stage. This implementation takes 33 clocks in both modes.
* The original timing table lists the histogramme update as one cycle, while its text
  describes two. This design takes two clocks.
* The original describes the LF function as a "32 lag" ACF in one place. The ACF
  equation and the 16x16 sum array give 16 lags, which is what is built.

Not modelled: the configuration PROMs and the FPGA device itself.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one compares the
block against values the testbench works out for itself, checks the cycle counts stated
above, and ends with a line `TB_RESULT checks=N failures=M`. Example with plain
Verilator:

```
verilator --binary --timing --assert --top-module tb_sval_top -y rtl -y tb +libext+.sv \
          -Irtl -Itb rtl/sval_pkg.sv tb/tb_sval_top.sv
./obj_dir/Vtb_sval_top
```

`tb_sval_top` runs the whole design at its default sizes, in a few seconds of
simulation. It goes through power-up and 20 energy steps, with both detector inputs
firing, odd and even energies, one step arriving in the middle of a sampling run, the
one-bit mode on for three steps, and an LF FIFO left unread until it overflows. It
then:

* reads all 1024 histogramme bytes through the HF serial output and all 512 stored LF
  words through the LF serial output, and checks each against the testbench's own
  histogramme and ACF models;
* checks that every mechanism listed above occurred.

The block testbenches use shorter sampling intervals and smaller FIFOs where that
shortens the run:

* `tb_lf_module` covers overflow, a stall and one-bit mode at a 64-word FIFO.
* `tb_lf_acf_proc` checks the 288-clock schedule and the saturation.
* `tb_hf_output` checks the 1- and 68-clock answers.
* `tb_buncher_hist_gen` checks the two-clock update against a reference histogramme.

To try a change, edit the module and rerun its testbench and `tb_sval_top`. The
simulator used is two-state, so every register the design reads is reset; RAM contents
are not reset, and every RAM location is written before it is read.
