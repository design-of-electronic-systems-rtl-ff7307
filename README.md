# Digital IPs for a MEMS gyroscope conditioning platform

A MEMS gyroscope needs a lot of digital processing around a small analog front end. An 8051
microcontroller supervises the DSP chain and talks to the outside world. During prototyping, the
designers want to change the 8051 firmware freely and to record any internal DSP signal for
off-line analysis. This RTL implements the digital IPs that make that possible, plus the
low-power techniques applied to the 8051 core:

| IP | What it solves |
|---|---|
| `sd_8051_cache` | A small on-chip SRAM serves the 8051 as a code cache. Misses are refilled from off-chip memory over only **two pins**: a clock and an open-collector data line. |
| `sd_cache_fpga` | The companion FPGA. It holds 32 KB of code, downloaded at power-up, and answers the cache over the same two pins. It keeps the ASIC in reset until the download is done. |
| `sd_sram_controller` | An APB peripheral. It records one of 16 DSP probe signals into an external SRAM at a fixed rate and lets the CPU read the samples back. |
| `sd_freq_meter` | Measures the full period, high time or low time of one of several square waves. It is driven through a 4-wire JTAG-like chain. |
| `clock_gate`, `gated_reg_clusters`, `pc_operand_isolation` | Low-power structures for the 8051: a latch-based clock gate, registers clock-gated in clusters of the optimal size, and operand isolation on the program-counter adders. |
| `isif_nco` | Sine wave generator of a second, general-purpose sensor platform (ISIF): 16 sine references from 3 frequencies, each with its own phase. |
| `isif_demodulator` | ISIF four-channel demodulator: each input sample times an NCO sine, then a low-pass filter. |
| `gyro_platform_top` | Wires all of the above together, with the FPGA on the shared serial line and the ISIF generator and demodulator beside them. |

The 8051 CPU, the gyroscope's own DSP chain (PLL, AGC, demodulators, compensation filters), the
analog front end and the FPGA's boot CPU are not part of this RTL. The ISIF demodulator above is
a general-purpose block of the other platform, not the gyroscope chain's. Where they would connect, their signals are ports
of the top.

## The 2-wire code cache

### What the CPU sees

The 8051 puts a code address on `cpu_addr` and pulls `cpu_cs_n` low. The cache answers with
`cpu_freeze` and `cpu_data`:

- **Every access takes at least two cycles.** The first reads the cache row; `cpu_freeze` is high
  during it. The second compares the tag.
- **Hit:** `cpu_freeze` drops in the second cycle. The byte is on `cpu_data`, and the gated CPU
  clock `cpu_gclk` gives one pulse. The hit time is 2 cycles.
- **Miss:** `cpu_freeze` stays high. `cpu_data` keeps showing the last valid byte, and `cpu_gclk`
  stays still, so the CPU and its memories are not clocked at all while the block is fetched.

`cpu_gclk` comes from a latch-based clock gate, so the freeze can never cut a clock pulse short.

### Address split and organisation

A code address is split into three fields:

| Field | Bits | Meaning |
|---|---|---|
| OFFSET | log2(N) | byte within a block of N bytes (`NBYTES`, default 8) |
| INDEX | log2(rows) | row of the cache SRAM |
| TAG | the rest of the 16 bits | compared with the tag stored in the row |

Each row is `{valid, tag, block}`. A row hits when its valid bit is set and its tag is equal.
`cache_way` implements one such set: the SRAM, the comparator and the AND.

- `ASSOC = 1` gives a direct-mapped cache with one `cache_way`.
- `ASSOC = 2` (the default) gives a 2-way set-associative cache with two `cache_way` instances.
  They read the same INDEX. The global hit is the OR of the two partial hits, and the data comes
  from the way that hit.
- In 2-way mode, each row has one replacement bit, which names the way used last. A miss
  replaces the other way.
- With the default 1 KB and 8-byte blocks, there are 64 rows per way, 6 INDEX bits and 7 TAG
  bits.

### The serial protocol

The cache is the master. `sclk` is the system clock. The data line is open-collector: each side
can only pull it low, and a pull-up makes it '1'. A refill looks like this, one bit per clock:

```
master:  0  1  a15 ... a3  P          (2 start bits, 16-log2(N) address MSBs, parity)
line released for alpha*N cycles      (slave reads N bytes, alpha cycles each)
slave:   0  1  byte0[7] ... byteN-1[0]  P   (2 start bits, 8N data bits, parity)
```

- The first start bit is always '0'. It marks the start of a stream.
- The second start bit is the **ok bit**. '1' means the previous stream from the other side passed
  its parity check. '0' means it did not.
- When a side receives ok = '0', it releases the line and waits, and the other side sends its last
  stream again. Here is how each end does this:

| Event | What happens |
|---|---|
| The slave sees bad address parity | It answers `0 0` and releases the line. The cache sends the request again. |
| The cache sees bad data parity | It sends `0 0` (a request with ok = '0'). The slave resends the same block without reading memory again. |

Parity is even. Bits are sent MSB first, and byte 0 of the block first.

**Miss time.** With N = 8 and alpha = 1 the stream takes

    2 + 13 + 1 + alpha*N + 2 + 8N + 1 = 22 + (alpha + 8)*N - log2 N = 91 cycles.

The whole miss adds four states around the stream, for 95 cycles in total:

- the cycle that detects the miss;
- the 91-cycle stream;
- one cycle that stores the block;
- one cycle that re-reads the row;
- the cycle that hands the byte to the CPU.

The CPU, counting its request cycle, sees 96 cycles.

### Start-up and memory mode

Start-up runs in this order:

1. The FPGA holds the ASIC in reset (`asic_resetn` low) while its boot CPU downloads the code.
   During reset, and while it flushes its valid bits one row per cycle, the cache pulls the data
   line low.
2. The cache releases the line after the flush.
3. The FPGA's slave has seen the line low and then high, so it sends the identification stream:
   `0 1 0xA5 P`.
4. If the cache receives that stream within 64 cycles, it enters **cache mode** (`active` = 1).
   Otherwise it stays in **memory mode**.

In memory mode the cache SRAM is a plain 1 KB code/data bank:

- It is addressed by the low address bits. Reads and writes (`cpu_we`, `cpu_wdata`) take two
  cycles each.
- Where the bank sits in the 8051 address map is up to the system's address decoder.

`sample_neg` selects falling-edge sampling of the line (the "polarity" option). In the top it is
driven by the FPGA's polarity register, so both ends use the same edge.

## The FPGA companion (`sd_cache_fpga`)

The FPGA contains:

- a 32 KB code memory (`MEM_BYTES`);
- two special function registers (SFRs) for its boot 8051: address 0 is `polarity` and address 1
  is `end_download`, using bit 0 of each;
- an `sram_interface`, the slave end of the protocol above.

The boot CPU writes the memory through the `dl_*` port. Writing 1 to `end_download` then does all
of the following:

- gives the memory's read port to `sram_interface`;
- releases `asic_resetn`;
- switches the UART pin to the ASIC (`uart_from_asic`);
- freezes the boot CPU: `cpu_freeze` goes high and its clock `cpu_gclk` stops.

`end_download` stays set until reset. The FPGA runs on the ASIC's serial clock, so the two ends are
synchronous. Block addresses above 32 KB wrap onto the memory.

## The SRAM probe controller (`sd_sram_controller`)

The controller is an APB slave with 16-bit registers and no wait states. The register offsets are
byte addresses:

| Offset | Register | Use |
|---|---|---|
| 0x0 | STATUS | **Write:** bit 0 starts probing, bit 1 stops probing, bit 2 starts reading. **Read:** bit 0 PM (probing mode), bit 1 DR (data ready), bit 2 AMR (all memory read). |
| 0x2 | DATA | **Write** (idle only): store a test word. **Read:** take the next stored word. |
| 0x4 | N_SAMPLE | A session holds 2^N_SAMPLE words. |
| 0x6 | SET_TIMING | Write cycle of 4 + 2·t clocks, i.e. 4, 6, 8 or 10. |
| 0x8 | SET_ADDR | Start byte address. Words go to SET_ADDR/2 onwards. |
| 0xA | PROBE_SEL | Probe 0..15. |

It has three parts:

- **`probe_interface`** picks one of the 16 probe words without a 256-to-16 multiplexer. The words
  pass along a chain of 16 registers. Stage *i* loads probe *i* when it is selected, and otherwise
  copies the stage before it. The selected word reaches the end after 16 − sel cycles. Changing
  the selection clears the chain's valid flags, so no word of the old probe is ever stored.
- **`apb_sl_interface`** holds the registers. While PM is set, it ignores every write except
  "stop probing".
- **`memory_interface`** is the state machine that drives the asynchronous SRAM (CE, WE, OE, a
  16-bit data bus). It works in three modes:
  - **Probing:** stores one valid probe word per write cycle at consecutive addresses until
    2^N_SAMPLE words are in, then clears PM.
  - **Test words:** stores words written to DATA at the same pointer. Leave one write cycle
    between two DATA writes: there is a one-word buffer.
  - **Reading:** reads the session back oldest first. Each DATA read starts the next 2-clock
    memory read. DR shows that a word is waiting. AMR is set when the 2^N_SAMPLE-th memory read
    is done, not when the CPU takes that word.

Example: SET_ADDR = 0x0C with N_SAMPLE = 3 stores 8 words at byte addresses 0x0C to 0x1A.

The external SRAM is assumed to be 32 K × 16 bits (`SRAM_AW = 15` in `sramc_pkg`).

## The period meter (`sd_freq_meter`)

The meter is driven through a 22-bit chain, `{channel[2:0], cmd[1:0], period[15:0], DV}`. TDI
enters at the channel end, and TDO is the DV bit.

- A rising `tck` with `tms` = 0 shifts the chain by one bit.
- A rising `tck` with `tms` = 1 is the update. The shifted-in channel and command start a new
  measure. The chain is loaded with the previous command and its result, which the next access
  shifts out.

Software therefore reads each result two accesses after issuing the command.

The commands are:

| Code | Command | Measures |
|---|---|---|
| 00 | NOP | nothing; stops any measure |
| 01 | FP | full period, rise to rise |
| 10 | HP | high time, rise to fall |
| 11 | LP | low time, fall to rise |

A measure works like this:

- Both the update and the selected wave cross into `clk` through two-flop synchronizers.
- The first edge after a command is ignored, because it may be the channel switch.
- The result is the count in `clk` cycles, with DV = 1.
- If the count reaches its 16-bit maximum first, DV = 0 (the input is out of range).
- A measure may need up to twice the period before its result is ready. Read it too early and
  DV = 0.

## Low-power structures

- **`clock_gate`:** a latch, transparent while `clk` is low, holds the enable during the high
  phase. Its output is ANDed with `clk`. The enable must settle before the rising edge, and
  glitches while `clk` is high cannot reach `gclk`.
- **`gated_reg_clusters`:** gating every register separately costs a latch and an AND each, but
  gating them all together saves little. For N flip-flops in clusters of K byte registers, the
  saving is largest at K_opt = (1/8)·sqrt(N/c), where c is the measured switching coefficient.
  With N = 328 and c = 0.48, K_opt = 3.27, so K = 3. The bank is 41 byte registers in 14
  clusters. Each cluster's clock runs only in cycles in which one of its registers is written.
  Drive the write inputs away from the rising edge, as with any gated-clock register.
- **`pc_operand_isolation`:** the three program-counter adders (pc+1, pc+2, pc+3) see `pc` ANDed
  with their own "needed" signal. An adder whose result is unused sees a constant operand and
  does not switch.

## ISIF sine wave generator (`isif_nco`)

ISIF is a separate, general-purpose sensor-interface chip. Its DSP section feeds sine references
to a demodulator, a modulator and a DAC controller. Only the generator is built here.

How it works:

- **Phase accumulators.** Three 24-bit accumulators add their frequency words `fcw[f]` every
  clock while `en` is high. The output frequency is fcw / 2^24 × f_clk.
- **Per-output phase.** Each of the 16 outputs takes the top 10 bits of the accumulator chosen by
  `out_fsel[k]`, and adds its phase offset `out_phase[k]`. A full turn is 1024. Setting
  `out_fsel[k]` to 3 switches that output off: it is held at 0.
- **Sine lookup.** A 256-entry quarter-wave table, computed at elaboration with `$sin`, turns the
  phase into a signed 12-bit sample. The two phase MSBs select the quadrant: the index is mirrored
  in the 2nd and 4th quadrants, and the sign is set in the 3rd and 4th.

`wave[k]` is registered, two clocks after the accumulator value it is computed from. The
accumulator, phase and amplitude widths are this design's choices.

## ISIF demodulator (`isif_demodulator`)

The demodulator recovers a signal that the sensor returns on a carrier. Each of the four channels
multiplies its input sample by a sine reference from the generator and low-pass filters the
product. A component in phase with the reference comes out as a level of half the product of
the two amplitudes. A component in quadrature comes out as zero. Two channels fed with the same
input and references 90° apart give the I and Q parts; √(I² + Q²) is left to software.

Each channel has two stages:

- **Mixer.** `mix[c] = din[c] × ref_wave[c]`, a 16 × 12-bit signed product kept at 28 bits.
- **Low-pass.** A first-order IIR filter, written as a leaky integrator:
  `acc ← acc − (acc >>> k) + mix`, with `dout = acc >>> k` and `k = lpf_shift`. The DC gain is 1
  and the time constant is about 2^k samples. The accumulator has 15 extra bits, so no `k`
  from 0 to 15 can overflow it.

A sample is taken on each clock with `in_valid` high, and samples may come every clock.
`out_valid` marks the new `dout` two clocks later. The channel count, the mixing with the NCO
and the filter inside the block come from the platform description. The filter form, the
programmable shift and all widths are this design's choices.

## Top level (`gyro_platform_top`)

The top connects every block:

- It instantiates every IP above. The cache and the FPGA share the data line, which is modelled
  as a wired AND: `sdata_line = ~(cache_drive_low | fpga_drive_low | line_disturb)`.
- `line_disturb` is a test input. It lets a testbench corrupt bits in flight.
- Every ASIC-side block is reset by `rst_n & asic_resetn`.
- The 8051 code bus, the APB slave port, the probe inputs, the SRAM pins, the waves, the chain
  pins, the register bank and the PC adders are all ports.
- `isif_nco` and `isif_demodulator` sit beside the gyro blocks with their own ports. They use
  the top's clock and `rst_n`, not the ASIC reset. Generator outputs 0 to 3 are the references
  of demodulator channels 0 to 3; they stay visible on `nco_wave`.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`. Packages must come first on the command line. For example:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  rtl/cache_pkg.sv rtl/freqm_pkg.sv rtl/sramc_pkg.sv \
  tb/tb_gyro_platform_top.sv --top-module tb_gyro_platform_top
./obj_dir/Vtb_gyro_platform_top
```

| Testbench | What it checks |
|---|---|
| `tb_gyro_platform_top` | The full design at its default sizes, end to end (about 1 s of CPU time). See the scenario below. |
| `tb_sd_8051_cache` | Against a behavioural slave (`tb/cache_slave_model.sv`): exact 2/96-cycle timing, replacement order, direct-mapped conflicts, both parity retransmissions, memory mode when no slave answers, and no `cpu_gclk` pulse while frozen. |
| `tb_sram_interface` | Against a behavioural master: the ID stream, data, the α·N gap, NACK and resend. |
| `tb_sd_cache_fpga` | The download, SFRs, the reset release, the frozen boot clock, and fetches through a real cache. |
| `tb_sd_sram_controller` | Test words; sessions at timing 0 and 3 (rates of 4 and 10 clocks); register locking; early stop; read-back with DR and AMR. |
| `tb_probe_interface` | The 16 − sel latency and no stale words. |
| `tb_sd_freq_meter` | FP/HP/LP on six waves, the pipelined read-back, an early read, NOP, and overflow. |
| `tb_isif_demodulator` | Bit-exact against a 64-bit model with random data, gaps and shift changes; the 2-clock latency; in-phase, quadrature, antiphase and 60° inputs settling to the expected levels. |
| `tb_isif_nco` | Every output, every clock, against a `$sin` model (within 1 LSB); a frequency change; the period; the off setting. |
| `tb_clock_gate`, `tb_cache_way`, `tb_gated_reg_clusters`, `tb_pc_operand_isolation` | The respective block on its own. |

The end-to-end scenario of `tb_gyro_platform_top`:

1. Downloads 32 KB of code.
2. Starts the link and checks that the cache detects the FPGA.
3. Runs random and looping fetches, counting hits and misses.
4. Corrupts one data bit and one address bit on the line, and checks that both streams are resent.
5. Stores test words and runs the 8-word session at 0x0C, with read-back.
6. Runs three period measures and one overflow.
7. Writes the register bank.
8. Exercises the PC adders.
9. Runs the ISIF generator, checking its period and two outputs with equal settings.
10. Feeds generator output 0 into two demodulator channels, one in phase and one in
    quadrature, and checks the filtered levels.

It prints how often each of these mechanisms happened and fails if any count is zero.

The simulator used here is two-state, so every register that is read is reset. The asynchronous
resets need a real falling edge of `rst_n` at the start of simulation. The testbenches provide
one.

## Where this RTL departs from, or adds to, the original IPs

- **Rising-edge cache SRAM.** The original clocks the cache SRAM on the falling edge, so that hit
  or miss is known before the next rising edge. Here everything is rising-edge. The mandatory
  wait cycle of each access gives the same 2-cycle hit and 95-cycle miss.
- **Cache and SRAM sizes.** The cache size (1 KB), its 2-way default and the external SRAM size
  (32 K words) are not given by the original and were chosen here. The block size N = 8 follows
  from the published 95-cycle miss.
- **Details not given by the original, chosen here:**
  - the ID byte, the 64-cycle detection timeout, even parity and the bit order;
  - the APB register offsets and command bits;
  - the four write-cycle lengths and the SRAM cycle shapes;
  - the chain bit order, the tms-based update and the 16-bit counter of the period meter;
  - the FPGA SFR addresses.
- **Stand-in register bank.** `gated_reg_clusters` is a generic 41-register bank standing for the
  8051 registers. The clustering rule is the original's, but the real 8051 register set and its
  enables are not available.
- **Probe chain flush.** Clearing the probe chain on a selection change is an addition.
- **ISIF generator and demodulator internals.** Only their functions are known. The internals
  here are this design's: phase accumulators with a quarter-wave table, and a multiplier with a
  first-order low-pass.
- **Not built:** the 8051 itself, the DSP chain, the analog section with its JTAG-like
  configuration chain, the FPGA boot CPU, the UART and its firmware, and the AMBA bridge. Of ISIF,
  the LEON CPU, the modulator, the DAC controller, the stand-alone FIR and IIR filters and the
  analog channels are not built either. Only their names or functions are known.
