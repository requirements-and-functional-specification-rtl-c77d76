# Station board wideband correlator (WBC) FPGA

This FPGA sits between the delay modules and the filter banks of a radio-telescope
station board. Two wideband sample streams, A and B, pass through it. Each stream is a
64-bit word every 3.9 ns (256 Mword/s). The FPGA retransmits both streams unchanged, so
the board needs only point-to-point links. On the side, it measures their spectra.

It does not compute a spectrum itself. It accumulates a **lag (cross-)correlation**: one
band of one input (the *lagged* side) against one band of the same or the other input
(the *prompt* side), over 64 consecutive lags, for one system tick (10 ms). At each tick
the 64 sums and their valid counts are frozen. The board processor reads them over a
16-bit register bus, moves the lag window by 64 lags for the next tick, and adds up the
results. A Fourier transform in software then turns the lag function into a spectrum of
up to 1024 bins. Any of the four pairings AA, AB, BA and BB can be chosen.

```
 IDATA_A ──►┌────────┐──► ODATA_A (re-timed copy, 3 clocks)
 IDATA_B ──►│ INOUT  │──► ODATA_B
 STICK   ──►│        │
            └───┬────┘ da/va, db/vb (64 bits + {tick,valid} per input, 256 MHz)
            ┌───▼────┐ choose lagged/prompt input, decimate, collect one band
            │ SELECT │──► dd (64-bit word of one band) + dp (one 8-bit prompt sample)
            └───┬────┘
            ┌───▼────┐ prompt delayed by DL_LDLY words in a 16384-word RAM
            │ DELAY  │
            └───┬────┘
            ┌───▼────┐ 8-word lag shift register, 64 MACs, tick latch, read select
            │ XCOR   │
            └───┬────┘
 MCB bus ◄─►┌───▼────┐ registers, status, errors, design ID     TEST[3:0] ◄─ test port
            │ MCBI   │
            └────────┘
```

Every block runs on one internal 256 MHz clock (`clk_256`), which the FPGA's clock manager
makes from the 128 MHz system clock. The register bus has its own clock, up to 33 MHz.

## Sample words and bands

A 64-bit word holds sixteen 4-bit or eight 8-bit sample *slots*. The earliest slot is in
bits 63:60 (or 63:56). A word can carry 1, 2, 4, 8 or 16 bands (at most 8 with 8-bit
samples), interleaved slot by slot, highest band first. With N bands, slot `s` holds band
`N-1-(s mod N)`, time sample `s div N`. The supported organisations are:

| mode | bands | bits | notes |
|------|-------|------|-------|
| 4_16 | 1  | 4 | 16 samples of one 2048 MHz band per word |
| 4_8, 4_4, 4_2 | 2, 4, 8 | 4 | |
| 4_1  | 16 | 4 | one sample per band per word; band rate 128/2^n MHz |
| 8_8  | 1  | 8 | |
| 8_4, 8_2 | 2, 4 | 8 | |
| 8_1  | 8  | 8 | band rate 128/2^n MHz |

4-bit samples are offset binary. Value 0 is the most negative level. Only the low
`XC_NBIT+1` bits are used, so 3-bit data ignores the top bit.

**SELECT** (`wbc_select`) works like this:

- It picks the lagged input (CM_CFG bit 0) and the prompt input (CM_CFG bit 1).
- It keeps one word in `2^SL_IDEC`. Codes 12 to 15 all mean 4096.
- From each kept word it shifts the samples of band `SL_DBND` into a 64-bit collect
  register, earliest first.
- After N kept words, the register holds 16 (or 8) consecutive samples of that band. It
  is emitted as one lagged word with a single valid bit, the AND of the N input valids.
- The output rate is `2^SL_ODEC`. It must equal `SL_IDEC + log2(N)`.
- The rate counters restart on the lagged input's data tick, so every group starts on a
  tick word.

The prompt side keeps only **one sample per lagged word**: the first sample of band
`SL_PBND` in the group's first word. This saves FPGA resources. It costs signal-to-noise
ratio (a factor of 4 for 4-bit, √8 for 8-bit samples), not lags.

Status bits 4 to 7 flag these settings:

- an illegal band count (not a power of two, or over 8 with 8-bit samples);
- a lagged or prompt band number ≥ N;
- an ODEC/IDEC/band combination that breaks the rule above, or needs a divider over 4096.

## The lag window

**XCOR** (`wbc_xcor`) keeps the last eight lagged words in a shift register.

- With 4-bit samples, the newest four words hold 64 consecutive samples.
- With 8-bit samples, all eight words are needed.
- The prompt sample used is the one that arrived with the oldest of those words.

So lag `i` (0…63) multiplies that prompt sample by the lagged sample `i` samples after it:

```
  prompt p(t0)  ×  lagged l(t0 + i),  i = 0..63        accumulated over one tick
```

**DELAY** (`wbc_delay`) delays the 8-bit prompt stream by `DL_LDLY` lagged words. It uses a
16384-entry circular buffer written on every lagged word. Delaying the prompt side (8 bits)
instead of the lagged side (64 bits) keeps this RAM small.

- A delay of d words moves the window by 16·d lags (4-bit) or 8·d lags (8-bit).
- Steps of 4 or 8 words therefore give the next 64 lags. The step is the same for any
  number of bands.
- A new `DL_LDLY` takes effect at the next tick. `DL_PLDLY` returns the delay that belongs
  to the results currently readable.
- Until the buffer has been filled `d` words deep after reset, prompt samples are marked
  invalid.

Lagged words also pass one register here, so both sides keep the same latency.

## Multiply-accumulate

Each of the 64 **MACs** (`wbc_mac`) works on n = `XC_NBIT+1` bits:

- It converts each offset-binary sample `v` to the symmetric odd value `2v-(2^n-1)`. For
  3 bits this is −7, −5 … +5, +7, and for 8 bits −255 … +255.
- It multiplies the two values and adds the product to a 39-bit signed sum, but only when
  both samples are valid.
- It counts those clocks in a 22-bit valid counter.
- At the tick, both totals are copied to output registers and the running sums restart.

Worst-case arithmetic is 8-bit samples, one band, no decimation. That gives 2.56·10^6
products per tick per lag, each at most 65025, so the sum stays below 1.67·10^11 < 2^38.
The count stays below 2^22.

## Reading results

The read select stage runs on the bus clock. There is one read address for accumulations
and one for valid counts.

- Writing 1 to CM_CTL bit 2 (accumulations) or bit 3 (counts) resets that address to lag 0
  on the 0→1 change. Then write 0 again.
- Read the most significant parts first: `XC_PACC2` (bits 38:32, sign extended), then
  `XC_PACC1` (31:16), then `XC_PACC0` (15:0).
- A completed read of `XC_PACC0` advances to the next lag. Counts work the same way with
  `XC_VCNT1` and then `XC_VCNT0`.
- The two sequences may be interleaved.

The totals change only at a tick, so the processor has the whole 10 ms to read them.

## Register bus (MCB)

The bus has an 8-bit address, 16-bit data, an active-low chip select and a read/write line.
All signals are sampled on the rising edge of `MCB_CLK`.

- **Write:** CS* and RD/WR* are low at an edge. The register takes the data in that edge.
- **Read:** at the first edge with CS* low and RD/WR* high, the address is registered.
  From then on the register drives the data bus through logic only (`mcb_data_oe` = 1),
  so the processor can sample it at the next edge. An edge with CS* still low and the same
  address completes the read. Only completed reads advance the XCOR read address.
- The bidirectional data pad is split into `mcb_data_i`, `mcb_data_o` and `mcb_data_oe`.

| addr | name | | addr | name | |
|------|------|-|------|------|-|
| 00 | CM_STS status (bits 2–11) | | 16/18 | IO_TINT1_A/B mode 15:14, count 21:16 | |
| 01 | CM_CFG configuration (bits 0–9) | | 17/19 | IO_TINT0_A/B count 15:0 (R) | |
| 02 | CM_CTL control | | 1A/1B | IO_SEED_A/B PRBS seed (reset 0x1357) | |
| 03 | CM_ERR bus errors | | 1C | IO_SDLY system tick delay | |
| 04 | CM_DEF data of refused write | | 1D/1E | IO_OCRC_A/B output CRC (R) | |
| 05 | CM_DID design ID (R) = 0xC518 | | 1F/20 | IO_DERR_A/B test delay-error word | |
| 06–09 | CM_TST0–3 test port selects | | 30–34 | SL_IDEC, SL_NBND, SL_DBND, SL_PBND, SL_ODEC | |
| 10/11 | IO_ESEL_A/B CRC error inject | | 40/41 | DL_LDLY (13:0), DL_PLDLY (R) | |
| 12/14 | IO_DSEL_A/B CRC wire select | | 60 | XC_NBIT bits per sample − 1 | |
| 13/15 | IO_ICRC_A/B input CRC (R) | | 61–65 | XC_VCNT1/0, XC_PACC2/1/0 (R) | |

CM_CFG bits:

| bit | meaning |
|-----|---------|
| 0 | lagged input is B |
| 1 | prompt input is B |
| 2 | test signals on the outputs |
| 3, 4, 5 | STICK, A and B capture edge (0 rising, 1 falling) |
| 6 | delta test pattern instead of pseudo-random |
| 7 | test data invalid in the tick word |
| 8, 9 | one extra clock on A or B, for alignment |

CM_CTL bits:

| bit | meaning |
|-----|---------|
| 0 | 0→1: software reset |
| 1 | clock disable (output `clk_off`) |
| 2, 3 | 0→1: zero the read addresses |
| 4 | phase-shift direction |
| 5 | 0→1: one phase-shift step |
| 15 | clock manager reset |

**CM_STS** collects the events of each tick interval and shows them after the tick:

| bit | event |
|-----|-------|
| 2 | STICK width error |
| 3 | clock manager not locked |
| 4–7 | SELECT setting errors |
| 8 | phase shift done |
| 9 | phase shift overflow |
| 10 | STICK: both capture edges agree |
| 11 | STICK: the chosen edge leads |

Writing CM_STS XORs the written bits into what is read back, so software can test its own
error handling. This mask clears at the next tick.

**CM_ERR** records bad bus accesses:

- bit 0: write to a read-only register;
- bit 1: write to a missing address;
- bit 2: read of a missing address.

A refused write also leaves its data in CM_DEF. Reads of missing addresses return CM_DEF.

## Input, output and test facilities (INOUT)

**Capture and retransmission** (`wbc_wbchan`, one per input):

- All 64 data lines and the tick, valid, noise, delay-error, delay-frame and clock lines
  are sampled on both edges of the 256 MHz clock. CM_CFG picks which copy is used.
- The falling-edge copy is retimed to the rising edge.
- The result goes to SELECT and out to the next FPGA, three clocks after the pads (four
  with the alignment bit).

**CRC checks:**

- Per tick interval, a CRC-4 (x⁴+x+1) is formed on one wire selected by IO_DSEL. This is
  done for the input (ICRC) and for the output (OCRC).
- With IO_DSEL bit 6 set, wires 0–4 are replaced by valid, noise, delay error, delay frame
  and the sampled input clock.
- IO_ESEL can invert the input CRC for one chosen wire, to fake an error.

**Test generator** (`wbc_testgen`), with CM_CFG bit 2 set:

- It replaces each output with 64 bits per clock from a 16-bit LFSR (x¹⁶+x¹⁴+x¹³+x¹¹+1),
  restarted from IO_SEED at every tick.
- With the delta pattern chosen, the output is all ones in the tick word and zero
  otherwise.
- A delay-error frame of 20 two-clock cells carries IO_DERR bits 0–15 followed by 0,1,0,1,
  with the frame bit high in cell 0.

**Time interval counters** (`wbc_tint`, one per input) count 256 MHz clocks between:

| mode | interval |
|------|----------|
| 00 | data tick → system tick |
| 01 | data tick → data tick |
| 10 | system tick → system tick |
| 11 | system tick → data tick |

The system tick is first delayed by IO_SDLY clocks, so the count can be trimmed to zero.

**System tick (STICK)** (`wbc_inout`):

- STICK is captured on both edges. The rising edge of the chosen copy is the internal tick.
- A high time other than two clocks is a width error.
- Comparing the two copies tells the software whether the chosen edge is safely away from
  STICK's transition. Together with the clock manager's phase shift, this lets software
  find good edge settings.

**Test port** (`wbc_testport`): each of TEST[3:0] shows one internal signal chosen by
CM_TSTn. Codes 1 to 15 are:

| code | signal |
|------|--------|
| 1 | tick |
| 2 | SELECT word strobe |
| 3, 4 | A data tick, A valid |
| 5, 6 | B data tick, B valid |
| 7, 8 | lagged valid, prompt valid |
| 9 | phase-shift enable |
| 10 | reset |
| 11 | STICK width error |
| 12 | XCOR word strobe |
| 13, 14 | OTICK A, OTICK B |
| 15 | STICK edge match |

Code 0 holds the pin at 0.

## What is outside this RTL

- **The clock manager** (a vendor clock primitive). Its signals are ports of `wbc_top`:
  - `clk_256`, `dcm_locked`, `dcm_psdone` and `dcm_psovf` come in;
  - `dcm_rst`, `dcm_psen`, `dcm_psincdec` and `clk_off` go out.
- **Pad buffers.** The top's ports are the logic-level signals behind them.
- **The board processor**, which adds up results over many ticks and steps DL_LDLY.

## Choices made here and departures from the source specification

The specification fixes the block structure, the register map, the widths (39-bit
accumulators, 22-bit counts, 22-bit intervals, 14-bit delay), the 64 lags, the 8-word
shift register, the 16384-word delay, the divider table and the offset-binary conversion.
It leaves the following open. This design chose:

- **CRC-4 polynomial** x⁴+x+1, and when the CRC is reported (at the tick).
- **LFSR polynomial** and 64 steps per clock, the delta pattern, and the bit order of the
  delay-error frame.
- **STICK rules:** the width rule (exactly two clocks) and the edge-comparison method.
- **Edge encoding:** 0 means the rising edge.
- **Prompt sample choice** (first sample of the group) and the exact alignment of lag 0.
- **Valid bits:** one valid bit per lagged word (the AND over its source words).
- **Bus:** the read-completion rule, the status hand-over between clocks, the test-port
  signal list and the design ID value 0xC518.
- **Collect register:** the specification's "16-word shift register" for collecting a band
  is built as a 64-bit register filled a group at a time. The function is the same.
- **Register width conflicts.** The register summary and the detailed tables disagree in
  places. The detailed tables are followed:
  - DL_LDLY is 14 bits, which matches the 16384-word delay.
  - IO_DSEL is 7 bits.
  - IO_ICRC is read-only.
  - XC_PACC1 returns bits 31:16 and XC_PACC2 bits 38:32.
- **Divider and band register codes.** The SELECT register table describes SL_IDEC and
  SL_ODEC as "divider − 1" and the band registers as "band − 1". This design instead
  uses the divider table and the worked examples (one band: ODEC = IDEC; VLBA case:
  IDEC 3, ODEC 7). So the dividers are log2 codes, and bands are numbered from 0.
- **Which side DL_LDLY delays.** The DELAY register table calls DL_LDLY a lagged-data
  delay, but the block description delays the prompt side. This design delays the
  prompt, so a larger DL_LDLY reaches larger lags.
- **Delay-error and frame lines.** These 128 Mbit/s lines are sampled at 256 MHz like
  every other input. They are not re-clocked by the 128 MHz system clock.
- **Clock crossings.** Configuration and monitor values cross between the bus clock and
  the 256 MHz clock without handshakes. They are quasi-static: software changes settings
  between ticks, and monitor values change only at ticks. Single-bit events and
  control edges do go through two-flop synchronisers.
- **Unsupported modes.** Modes 4_1 with band rates below 128/2⁸ MHz and 8_1 below 128/2⁹
  MHz would need output dividers beyond 4096. They are flagged as illegal.

## Files

| file | block |
|------|-------|
| `rtl/wbc_pkg.sv` | register addresses, status/control bit numbers, `cfg_t`, helpers |
| `rtl/wbc_top.sv` | top level, pin names of the FPGA |
| `rtl/wbc_inout.sv` | INOUT: STICK, reset, clock-manager control, two channels |
| `rtl/wbc_wbchan.sv` | capture, alignment, test substitution, retransmit, CRCs of one input |
| `rtl/wbc_crc4.sv` | serial CRC-4 per tick interval |
| `rtl/wbc_testgen.sv` | test pattern generator |
| `rtl/wbc_tint.sv` | time interval counter |
| `rtl/wbc_sync.sv` | two-flop synchroniser |
| `rtl/wbc_select.sv` | SELECT |
| `rtl/wbc_delay.sv` | DELAY |
| `rtl/wbc_mac.sv` | one lag's multiply-accumulate and valid count |
| `rtl/wbc_xcor.sv` | XCOR: 64 MACs, lag shift register, read select |
| `rtl/wbc_mcbi.sv` | register bus interface and register set |
| `rtl/wbc_testport.sv` | test port multiplexer |

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The models inside them are written
independently of the RTL.

- `tb_wbc_top` runs the whole design at its default sizes, including the 16384-word delay.
  The only reduction is a tick interval of 2000 clocks instead of 10 ms. It checks:
  - pad-to-pad retransmission;
  - a correlation peak at the expected lag, with an exact value;
  - that a DL_LDLY step moves the peak by 16 lags at the next tick;
  - an 8-bit, 4-band autocorrelation;
  - the test generator on the outputs;
  - status latching;
  - the test port.

  Each of these mechanisms is counted, and one that never happens is a failure.
- `tb_wbc_modes` also runs the full-size top. It takes every organisation in the table
  above, plus 4_1 with SL_IDEC = 3 and SL_ODEC = 7, through one tick interval. Each band
  of B is the same random two-level stream as in A, delayed by 21 band samples. For each
  organisation it checks:
  - the peak lag;
  - that the peak equals M² times the valid count;
  - that the valid count equals the lagged word rate.

  Three more cases:
  - Two move the lag window with DL_LDLY, to lags 192–255, for 4-bit and for 8-bit
    samples.
  - One runs a real 10 ms tick (2,560,000 clocks) in mode 8_8. Its peak is
    166,464,000,000 (38 bits) and its valid count is 2,560,000 (22 bits). The run takes
    a few seconds.
- The block testbenches cover the rest, including the slot formula for every band count.
  `tb_wbc_delay` uses a 64-word delay line to reach wrap-around quickly.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/wbc_pkg.sv tb/tb_wbc_top.sv \
          --top-module tb_wbc_top -Mdir obj && ./obj/Vtb_wbc_top
```

The top-level run takes a few seconds.

Not verified:

- timing closure at 256 MHz;
- behaviour with a real clock manager and real pads.
