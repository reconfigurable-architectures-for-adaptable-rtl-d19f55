# MONTIUM-style reconfigurable tile with W-CDMA and HiperLAN/2 receivers

A mobile terminal that must speak both a CDMA cellular standard and an OFDM wireless-LAN
standard can either carry two fixed receivers or one set of reconfigurable processing tiles
that are reprogrammed when the standard changes. This RTL follows the second idea. It has two
parts:

* **A coarse-grained reconfigurable tile** in the style of the MONTIUM tile processor. It has
  five 16-bit ALUs, ten 512-word local memories, ten global buses and a small sequencer. A
  single 16-bit configuration port programs everything: datapath, interconnect and
  instruction sequence.
* **The two receivers that are mapped onto such tiles**, built as dedicated blocks. Each block
  has the cycle budget given for its tile mapping.
  * A W-CDMA (UMTS FDD downlink) RAKE receiver: pulse-shape FIR, path-delay buffer, scrambling
    code generator, 4/2-finger RAKE with maximal ratio combining.
  * A HiperLAN/2 receiver: prefix removal, frequency offset correction, 64-point FFT,
    equalizer with pilot-based phase correction, and a table-driven de-mapper.

`montium_sdr_top` places the tile and the two receiver chains side by side, each with its own
ports. Everything that would come from a control processor enters through ports: path delays,
MRC weights, correction factors, equalizer coefficients and de-mapping tables.

## The reconfigurable tile

### Datapath (`montium_alu`, `montium_regfile`, `montium_lmem`, `montium_agu`, `montium_pp`)

A *processing part* (PP) is one ALU, four input register files, and two local memories with
their address generators. The tile has five of them.

* **ALU** (purely combinational). It has four 16-bit operands A–D.
  * Level 1 has four function units. FU1 works on (A,B) and FU2 on (C,D). FU3 and FU4 work on
    the results of FU1 and FU2.
  * Each function unit can pass an operand, add, subtract, AND, OR, XOR, take the min or max,
    take the absolute value, negate, or shift by one.
  * Level 2 has a multiplier of FU1 × FU2. It works either in Q1.15 (−1 × −1 saturates) or as
    an integer multiply keeping the low 16 bits.
  * An adder then adds one of: the East input, FU3, FU4, or zero. It can subtract, and it
    saturates optionally.
  * `out_1` is the adder result. `out_2` selects the adder, FU3, FU4 or the product. The West
    output equals `out_1` and feeds the left neighbour's East input without a register. This
    is how sums of products span several ALUs in one clock.
* **Register files**: four entries each, written at the clock edge and read asynchronously.
  There is deliberately no bypass: a value written in one cycle is usable in the next.
* **Local memories**: 512 × 16 bits, single port, synchronous write and asynchronous read.
  The AGU beside each memory holds a base, a stride and a length. Each instruction picks one
  AGU step:
  * hold;
  * step by the stride, wrapping inside `[base, base+length)`, so the memory can be a
    circular buffer;
  * reload the base;
  * index: the next address is base plus a value taken from a bus. This is the lookup-table
    mode.

  Every step takes effect at the clock edge. So a memory's read data can be routed back into
  any address without forming a combinational loop.

### Interconnect and control (`montium_crossbar`, `montium_decoder`, `montium_sequencer`)

The ten global buses are driven by a full crossbar. Each bus takes a 5-bit source number:

| Source | Meaning |
|---|---|
| 0–9 | memory read ports M01–M10 |
| 10–19 | ALU outputs: ALU k's `out_1` is 10+2k, `out_2` is 11+2k |
| 20–29 | the ten words streamed in by the communication unit |
| 31 | idle (zero) |

Register file writes and memory writes pick their bus in the same way.

A tile instruction is not one wide word. The sequencer issues, every clock, four *indices*:
one into each of four decoder tables (memory, crossbar, register, ALU). Each table has 32
entries, and each entry holds the full control word for its part of the tile. A program
therefore reuses a small set of configured datapath states, and the sequencer only chooses
among them. The sequencer instruction can do one of: next, jump, counted loop (one loop
counter), wait for input, or halt.

An instruction can be marked as consuming streamed input. If the input is not there, the tile
**stalls**: the sequencer holds its program counter and no register, memory or AGU in the
tile changes. Instructions can also mark a bus as the tile's streaming output for that clock.

### Communication and configuration unit (`montium_ccu`, `montium_tile`)

All configuration goes through one port that writes 16 bits per clock (`cfg_valid`,
`cfg_addr`, `cfg_data`). The port is open only while the tile is idle.

The address map:

| `cfg_addr` | Target |
|---|---|
| `1 mmmm aaaaaaaaa` | word `a` of local memory `m` (preloading data or lookup tables) |
| `0 rrr eeeeeeee cccc` | 16-bit chunk `c` of entry `e` in region `r` |

The regions are:

| `r` | Region | Contents |
|---|---|---|
| 0 | sequencer program | 3 chunks per instruction |
| 1 | memory decoder | |
| 2 | crossbar decoder | |
| 3 | register decoder | |
| 4 | ALU decoder | |
| 5 | AGU settings | chunk 0 base, 1 stride, 2 length; entry = memory |
| 6 | CCU | chunk 0 mode, 1 output memory, 2 output base, 3 output length; a write to chunk 4 starts the program |

The field layouts are the packed structs in `montium_pkg`. The testbench package
`montium_prog_pkg` shows how to build a program: a two-ALU dot product and a block-mode
doubling.

There are two I/O modes:

* **Streaming**: ten input words (`in_data`, `in_valid`/`in_ready`) are offered on crossbar
  sources 20–29. They are consumed by the instructions that need them; others stall. Output
  is one bus per clock on `out_data`/`out_valid`.
* **Block**: the program works on memories that were preloaded through the configuration
  port. After the program halts, the unit reads `out_len` words from one memory and sends
  them out, one per clock.

## W-CDMA receiver chain

Samples arrive at two per chip and pass four blocks in order.

1. **Pulse-shape FIR** (`pulse_shape_fir`): 16 real taps on I and Q, with loadable
   coefficients.
2. **Delay buffer** (`rake_delay_buffer`): a 512-sample circular buffer.
   * On every second sample it forms one chip for each of four fingers. Finger *f* gets the
     sample written `delay[f]` samples ago.
   * The delays are read offsets only. A new delay profile therefore applies from the next
     chip, with no data moved.
   * The chip is held until the RAKE takes it.
   * `overrun` reports that a new chip was formed while the previous one was still waiting.
3. **Scrambling code generator** (`wcdma_scrambler`): the standard's two 18-bit m-sequences.
   * The start state for code number *n* is computed in 19 clocks by square-and-multiply in
     GF(2)[x], so it does not need *n* shift steps.
   * The Q branch is the same sequences 131072 chips later. This is obtained from constant
     masks, without a second register.
   * The code restarts after 38400 chips.
   * Here a chip is consumed whenever the RAKE takes a chip.
4. **RAKE** (`rake_receiver`): this is the most schedule-dependent block.
   * *Fingers*: the fingers are processed in pairs, two per two clocks. In each clock two
     chips are de-scrambled with the conjugate code and de-spread with the stored spreading
     code. Fingers 1 and 2 go first; fingers 3 and 4 follow in the next two clocks. A chip
     therefore costs 4 clocks with four fingers. In two-finger mode (`four_fingers` = 0) the
     second pair is skipped and a chip costs 2 clocks.
   * *Combining*: after SF chips, 5 clocks combine the finger sums.
     1. Normalize by log2(SF)+1 bits.
     2. Form two MRC products with the channel weights. This takes two clocks, using one pair
        of multipliers per clock.
     3. Saturate.
     4. Decide the bits: the signs of I and Q for QPSK. For 16-QAM (`qam16` = 1) also
        compare |I| and |Q| with `qam_thr`, the midpoint between the two amplitude levels.
        The channel estimator knows this level, since it also sets the weights.

     One symbol thus takes **4·SF + 5** clocks, or **2·SF + 5** with two fingers.
   * *Stalls*: while the chip of the next slot has not arrived, the schedule stalls. It always
     waits in slot 0.
   * *Spreading code load*: one word with SF, then SF code bits, so **SF + 1** clocks. The
     code is kept in an internal memory of up to 512 chips.

## HiperLAN/2 receiver chain

1. **Prefix removal** (`hl2_prefix_removal`). A start pulse from an outside synchronization
   marks the first sample of an 80-sample symbol. The block drops 16 prefix samples and
   forwards the 64 that remain.
2. **Frequency offset correction** (`hl2_freq_offset_corr`). Every sample n of a symbol is
   multiplied by a table entry, normally exp(−jωn), loaded by the control processor. The
   pipeline has three stages, and the last of 64 outputs leaves **67 clocks** after the
   first input. The phase that remains differs from symbol to symbol but is common to all
   carriers of a symbol; the pilots remove it.
3. **FFT** (`fft64`): radix-2 decimation in time over one complex multiplier.
   * Loading writes in bit-reversed order (64 clocks).
   * Six stages of 32 butterflies plus 2 clocks each make **204 clocks**.
   * Read-out is in natural order (64 clocks).
   * Each stage halves its outputs, so the result is DFT/64 and cannot overflow.
   * Twiddles come from `$cos`/`$sin` at elaboration.
   * Two buffer banks: the next symbol loads into one while the other is transformed and
     read out (268 clocks). A third symbol has to wait (`in_ready` low), which the top reports
     as `ofdm_overrun`.
4. **Equalizer and phase correction** (`hl2_eq_phase`): one multiplier for three jobs.
   * *Equalize*: every bin is multiplied by its coefficient (64 clocks). Because the FFT
     scaled by 1/64, bins are first shifted left by `PRESHIFT` = 5, saturating. The
     coefficients are Q2.14 (`COEF_INT` = 1), so the equalizer can amplify and attenuate. The
     coefficient for channel gain H and time-domain scale A is 1/(32·A·H).
   * *Estimate the common phase*: the four equalized pilots (subcarriers −21, −7, 7, 21) are
     multiplied by their known ±1 values (`pilot_ref`) and summed. A 16-step CORDIC in
     vectoring mode turns the sum onto the real axis. The same micro-rotations applied to a
     pre-scaled unit vector yield exp(−jθ) (17 clocks).
   * *Correct*: the 48 data carriers, subcarrier −26 upward, are multiplied by that factor
     (48 clocks).

   In total the block takes 130 clocks per symbol.
5. **De-mapper** (`hl2_demapper`): one 64-entry table, indexed by the top six bits of I and
   of Q.
   * It returns 1–3 bits per axis, chosen by `bits_per_axis`.
   * QPSK, 16-QAM and 64-QAM differ only in the table contents. The test builds Gray-coded
     nearest-level tables.

`cmul` is the shared Q1.15 complex multiplier (round half up, saturating, optional conjugate).

## How far it follows the source architecture

These points follow the source architecture:
* The tile's structure: 5 ALUs; 10 memories of 16×512; 4-entry register files without
  bypass; the two-level ALU with an unregistered East-West chain; 10 buses; four decoders
  selected by a sequencer; a configuration rate of 2 bytes per clock.
* The receiver block order.
* The cycle counts 4·SF+5, SF+1, 67 and 204.
* Equalization and phase correction sharing one complex multiplication.
* The LUT-based de-mapper for three modulations.

Design choices of this RTL, not taken from the source:
* All encodings: ALU operations, decoder word layouts, the configuration map, the sequencer
  instruction set.
* The 32-entry decoder depth.
* The AGU model.
* Q-formats, rounding and saturation.
* The CORDIC phase estimator.
* The FFT's radix and scaling.
* The FIR length.
* The scrambling-code start-state computation.
* The UMTS and HiperLAN/2 details themselves: code polynomials, prefix length, pilot
  positions. These come from the standards.

Departures and gaps:
* The receivers are dedicated blocks timed like the tile mappings. They are not programs for
  `montium_tile`. Programs with the source's own configurations (858 bytes for the RAKE,
  946 for the FFT) cannot be loaded, since the encodings here are different.
* The equalizer/phase/de-mapper path takes 130 clocks plus one register, where the source
  reports 110.
* The FFT keeps two symbol buffers, so that symbols streamed at 20 MHz into a 100 MHz clock
  (one symbol per 4 µs, 400 clocks) keep up. This costs a second 64-word bank that a single
  tile's mapping would place in its local memories.
* Prefix removal needs an outside start pulse; the correlation-based synchronization is not
  built.
* Not built: the path searcher, channel estimator, frequency offset estimator, and equalizer
  coefficient computation. In the source they run as control-processor software, and here
  their results are ports. The network-on-chip, whose protocol is not given, is replaced by
  point-to-point valid streams. Voltage/frequency scaling and the analog front end are also
  absent.
* Only OFDM with 64 carriers fits. DAB and DRM carrier counts exceed the 64-point FFT.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rake_receiver \
    rtl/montium_pkg.sv tb/montium_prog_pkg.sv tb/tb_rake_receiver.sv
./obj_dir/Vtb_rake_receiver
```

Verilator finds the other modules through `-Irtl`. The end-to-end test is `tb_montium_sdr_top`,
which runs the top at its default parameters and needs about 15 s. It does all of the
following:
* Sends 40 symbols at SF 16 over a four-path channel with the real scrambling code, and
  checks every decided bit: QPSK and 16-QAM in four-finger mode, then QPSK in two-finger
  mode.
* Sends 8 OFDM symbols at the real-time rate (one sample per 5 clocks) through a
  frequency-selective channel with a carrier frequency offset, QPSK then 16-QAM, and checks
  every bit.
* Runs a streaming and a block-mode program on the tile.
* Counts RAKE stalls, finger-mode use, both overruns, FFT runs, both modulations, tile stalls
  and the block read-out. A mechanism that never occurred is a failure.

The models in the testbenches (scrambling code from the two m-sequences, DFT, channel, Q15
arithmetic) are computed independently of the RTL.
