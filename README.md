# 1 GS/s two-channel acquisition card for the PXI bus: FPGA logic

No single affordable converter samples at 1 GS/s. This card gets that rate by
sampling one analog input with **eight 8-bit, 125 MS/s converters in turn**.
Their encode clocks are 45° (1 ns) apart, so together they take one sample
every nanosecond.

The FPGA:

- makes those eight clocks;
- gathers the eight converter outputs into one 64-bit word every 8 ns;
- starts a record on a hardware trigger;
- buffers the 1 GB/s sample stream in on-chip RAM and drains it into 128 MB of SDRAM;
- lets a host computer on the PXI (CompactPCI for instrumentation) backplane
  set up the analog front end, arm records and read the stored samples back.

The card has two inputs, CH1 and CH2. They share the single converter bank
through an analog 2:1 selector in front of it, which the FPGA switches.

This repository holds the SystemVerilog for that FPGA logic, plus
self-checking testbenches with behavioural models of the SDRAM, the PCI host
and the converters. The analog parts are outside the RTL and appear as ports:

- front-end attenuators, amplifiers and offset DACs;
- the selector;
- the converters;
- the trigger comparator;
- the SDRAM chips.

```
 CH1 ─┐                       ┌───────── FPGA (daq_card_top) ─────────────────────────────┐
      ├─ front end ─ 2:1 sel ─┼─► adc_capture ─► acq_ctrl ─► async_fifo ─► sdram_ctrl ◄──► SDRAM 2×x16
 CH2 ─┘        ▲        ▲     │     ▲  64b/8ns     ▲   ▲     (4096×64,      │  (100 MHz)   128 MB
   relays/DACs │  ch_sel│     │ sample_pll       trig  arm    125→100 MHz)  │
               │        │     │ (8 × 125 MHz,    detect                     │ readback FIFO
   8 × AD ◄────┼────────┼─────┼─ 1 ns apart)       ▲                        ▼
   converters  │        │     │                  TrigP      logic_ctrl (registers) ◄─ pxi_bridge ◄─ pxi_target ◄─► PXI bus
               └────────┴─────┼──────────────────────────── (100 MHz)          (33→100 MHz)   (33 MHz)
                              └────────────────────────────────────────────────────────────┘
```

## Interleaved sampling: how eight slow converters make one fast one

This is the part of the design that is easiest to get wrong. A swap of two
clock phases or two bytes still gives plausible-looking data, but the
samples come out in the wrong order in time.

**Clocks (`sample_pll`).** The FPGA PLL doubles a 62.5 MHz board clock to
125 MHz. It produces eight copies, `c[k]`, with phase `c[k]` delayed by
`k × 45°`, which is `k` ns. Converter `k` is encoded by `c[k]`, so within
every 8 ns frame converter 0 samples at 0 ns, converter 1 at 1 ns, and so on
up to converter 7 at 7 ns. A real build uses the FPGA vendor's PLL
primitive. `sample_pll.sv` is a behavioural model with the same ports
(`inclk0`, `areset`, `c`, `locked`), so it simulates and passes lint, but it
is not meant for synthesis.

**Capture (`adc_capture`).** Each converter's byte is stable around its own
clock edge, which can lie anywhere in the 8 ns frame. So capture happens in
two stages:

1. A register per converter latches `adc_d[k]` on `c[k]`, inside that
   converter's own timing window.
2. On the next rising edge of `c[0]`, all eight latched bytes go into the
   output word, with byte `k` in bits `[8k+7:8k]`.

The latches for phases 1–7 were loaded 1–7 ns before that edge. The phase 0
latch is read in the same edge that reloads it. As a result, one word holds
the eight samples of one frame in time order, byte 0 oldest. Samples
follow each other by exactly 1 ns, and the word after holds the next eight.

**Rate.** One 64-bit word per 8 ns means 125 M words/s, which is 1000 MS/s
or 1000 MB/s. `word_valid` rises two `c[0]` edges after reset. No bytes are
reordered or converted later in the chain. The converters are set to the
output format the user wants, two's complement or offset binary, and the
FPGA passes the bytes through.

**Board-level trimming not modelled.** A real interleaved converter also
needs phase and gain matching between channels, which is done on the board.
Nothing here models or corrects mismatch.

## Clock domains and crossings

| Domain | Clock | Contents |
|---|---|---|
| sample | 125 MHz, `c[0]` | `adc_capture`, `trigger_detect`, `acq_ctrl`, FIFO write side |
| system | 100 MHz `sys_clk`, also the SDRAM clock `sd_clk` | FIFO read side, `sdram_ctrl`, `logic_ctrl`, bridge system side |
| PCI | 33 MHz `pci_clk` | `pxi_target`, bridge PCI side |

Crossings:

- **Sample → system:** the sample words go through `async_fifo`, a
  4096 × 64-bit dual-clock FIFO. It uses Gray-coded pointers, two-flop
  synchronizers, and a head word that is visible before the pop.
- **PCI ↔ system:** `pxi_bridge` carries one register access at a time with
  a request/answer toggle handshake.
- **Arm command:** a toggle crosses from the system to the sample domain.
- **Record settings** (length, mode, channel) cross through two-flop
  synchronizers. They are held steady while a record runs.
- **Record status** (busy, done, overflow, channel) crosses the other way
  through two-flop synchronizers.

Each domain has its own reset synchronizer. The sample domain is held in
reset until the PLL reports lock.

## Records: arm, trigger, dual channel, overflow

`acq_ctrl` sequences each record. Its states are IDLE, SETTLE, ARMED and
CAPTURE. After an arm it:

1. drives `ch_sel` to the selected input;
2. waits `SETTLE` = 16 word cycles (128 ns) for the selector and front end
   to settle;
3. waits for a trigger event;
4. stores `REC_LEN` words, counting from the word of the trigger cycle. That
   word is the record's time zero.

`REC_LEN` is rounded down to a multiple of 4 words, which is one SDRAM
burst.

**Trigger.** The trigger comes from an external comparator. It compares the
trigger source with a level set by a DAC whose code the host writes.
`trigger_detect` brings the level-converted comparator output `trig_in` into
the sample domain through two flops, and turns each rising edge into a
one-cycle event. Time zero is therefore known to one word, 8 ns, plus the
fixed synchronizer delay. The end-to-end test checks that the first stored
sample lies 0–16 ns after the trigger edge.

**Dual mode.** A single arm takes a CH1 record, switches the selector, waits
the settle time again, and then takes a CH2 record on the next trigger. The
two records lie back to back in SDRAM.

**Overflow.** The SDRAM cannot keep up with 1 GB/s (next section), so long
records can fill the FIFO. Words are kept or dropped in groups of 4, which
is one SDRAM burst. At the first word of each group, `acq_ctrl` asks whether
the FIFO has room for 4 more words. If it has not, the whole group is
dropped and a sticky overflow flag is set.

Dropping whole groups keeps the FIFO contents a whole number of bursts.
Dropping single words could leave 1–3 words behind that never make up a
burst, and the record would never finish. The word count still advances
over dropped groups, so a record always covers `REC_LEN × 8 ns` of time.
An assertion in the top checks that no word is ever pushed into a full
FIFO.

## Throughput: why there is a FIFO and what it limits

The SDRAM is two x16 chips side by side, giving a 32-bit bus at 100 MHz.
A write burst is 8 beats (32 bytes, 4 sample words) and takes 14 cycles:
ACTIVE, tRCD, WRITE with 8 data beats and auto precharge, tWR and tRP. That
gives

    32 B / 140 ns = 228.6 MB/s sustained, against 1000 MB/s arriving.

The FIFO therefore fills at about 771 MB/s while a record runs. Its 32 KB
lasts about 42 µs, which is roughly 5,300 words or 42,000 samples. Records
up to that length are stored completely. Longer ones are cut by the overflow
rule above.

`tb_record_capacity` measures this on the full-size design:

- A 4800-word record is stored whole. The FIFO peaks at 3713 of 4096 words.
- A 5600-word record overflows.

The FIFO uses 256 Kbit, about half of the 504 Kbit of block RAM in the
EP3C16-class FPGA that this logic is sized for.

## SDRAM controller

`sdram_ctrl` is built from seven modules around one command slot per clock.

| Module | Job |
|---|---|
| `sdram_init` | Power-up sequence: 20,000 cycles (200 µs), PRECHARGE ALL, 8 × AUTO REFRESH, LOAD MODE REGISTER. Raises `init_done`. |
| `sdram_refresh` | Requests one refresh every 780 cycles (7.8 µs, which is 8192 rows per 64 ms). Counts up to 8 owed refreshes so that a long burst sequence never loses one. |
| `sdram_mode_reg` | Mode word: burst length 8, sequential, CAS latency 2 or 3. A host write after init requests a LOAD MODE REGISTER. The latency in force changes only once that command has been issued. |
| `sdram_ctrl_fsm` | Central control. Passes init commands through, then arbitrates in the order **refresh > mode load > write > read**. Writes come before reads so the sample FIFO is drained first. |
| `sdram_addr_gen` | 25-bit beat pointers for writing (cleared on arm) and reading (loaded by the host). Each pointer splits into row[12:0], bank[1:0] and column[9:0], column lowest. |
| `sdram_block_mgr` | Write side: when the FIFO holds 4 words it requests a burst, and feeds each word as low half then high half. Read side: it requests bursts while beats remain and the 32-beat readback FIFO has room for 8 more. |
| `sdram_addr_sel` | Registers command, bank, address and write data onto the pins, and registers the read data coming in. Chooses the address bus contents: row for ACTIVE, column with A10 = 1 (auto precharge) for READ/WRITE, `0x400` for PRECHARGE ALL, the mode word for LOAD MODE REGISTER. |

**Timing.** Every burst opens and closes its row, so all banks are idle
between operations. The timing counts are typical 100 MHz values: tRCD 2,
tRP 2, tWR 2, tRFC 7, tMRD 2.

**Read path.** Because the pins are registered in both directions, read
beat `i` arrives `CL + 2 + i` cycles after the READ slot. The FSM uses the
CAS latency in force to pick the right cycles. The CAS latency resets to 2. The end-to-end test switches it
to 3 between records and reads the data again, so both settings are exercised.

Each burst has a fixed cycle length:

| Operation | Cycles |
|---|---|
| Write | 14 |
| Read | CL + 12 |
| Refresh | 7 |
| Mode load | 2 |

## PXI interface

`pxi_target` is a 32-bit, 33 MHz PCI target:

- **Configuration.** It answers type-0 configuration cycles. Its header has
  vendor 1172h, device 0001h, class 11h/80h (data-acquisition controller)
  and one 4 KB memory BAR0. In the command register only memory enable, parity
  response and SERR enable can be written.
- **Memory access.** Memory reads and writes that hit BAR0 become one
  local-bus access each. DEVSEL# is asserted one clock after the address
  (fast decode), and TRDY# is held off until the register file answers.
- **Bursts.** If the master keeps FRAME# asserted, the target disconnects
  with data, asserting STOP# together with TRDY#. Every transaction moves
  exactly one double word, so a host reading a block simply issues repeated
  single reads of the DATA register.
- **Parity.** PAR is driven one clock after every data phase the target
  drives.
- **Not implemented:** parity checking, interrupts, byte enables on writes,
  and master (DMA) transfers.

Bus pins come as `_i`/`_o`/`_oe` triples. The tri-state pads belong in the
board-level wrapper.

## Register map (BAR0, 32-bit registers)

| Offset | Name | Bits |
|---|---|---|
| 0x00 | CTRL | [0] arm (write 1), [1] dual mode, [2] channel for single records, [3] start readback (write 1) |
| 0x04 | STATUS | [0] record busy, [1] record done, [2] overflow (sticky until next arm), [3] SDRAM initialised, [4] channel selected, [5] record stored in SDRAM, [6] readback busy, [9:8] CAS latency |
| 0x08 | REC_LEN | sample words per record, multiple of 4 (reset 1024) |
| 0x0C | RELAY | attenuator relays, [3:0] CH1, [7:4] CH2 |
| 0x10 | OFFSET | offset DAC codes, [11:0] CH1, [27:16] CH2 |
| 0x14 | TRIG_LVL | trigger level DAC code [11:0] |
| 0x18 | SD_MODE | SDRAM CAS latency [1:0], 2 or 3 |
| 0x1C | RD_ADDR | readback start, 32-bit beat address (multiple of 8) |
| 0x20 | RD_LEN | readback length in beats (multiple of 8) |
| 0x24 | DATA | next readback beat. Waits while the readback is still fetching; reads 0 when no readback runs. |
| 0x28 | WR_COUNT | beats written to SDRAM since the last arm |

**Usage.** A typical record runs like this:

1. Write RELAY, OFFSET, TRIG_LVL and REC_LEN.
2. Write CTRL = 1, or CTRL = 3 for dual mode.
3. Poll STATUS until bit 5 (stored) is set.
4. Write RD_ADDR = 0 and RD_LEN = `2 × REC_LEN` (two beats per word).
5. Write CTRL with bit 3 set.
6. Read DATA `RD_LEN` times.

**Data layout.** Beat `2n` holds samples `8n..8n+3` and beat `2n+1` holds
samples `8n+4..8n+7`, with the lowest byte the oldest sample. In dual mode
the CH2 record starts at beat `2 × REC_LEN`.

The DAC codes and relay bits are brought out as parallel ports
(`offset_ch1`, `offset_ch2`, `trig_level`, `relay`). A serial DAC interface
would go between those ports and the chips.

## Files

| File | Contents |
|---|---|
| `rtl/daq_pkg.sv` | sizes, SDRAM command encoding, address struct, register offsets |
| `rtl/daq_card_top.sv` | top level |
| `rtl/sample_pll.sv` | behavioural model of the 8-phase PLL |
| `rtl/adc_capture.sv`, `rtl/trigger_detect.sv`, `rtl/acq_ctrl.sv` | sample domain |
| `rtl/async_fifo.sv`, `rtl/cdc_sync.sv` | clock-domain crossings |
| `rtl/sdram_*.sv` | SDRAM controller, top `sdram_ctrl` |
| `rtl/pxi_target.sv`, `rtl/pxi_bridge.sv`, `rtl/logic_ctrl.sv` | host side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/sdram_model.sv` | SDRAM chip model: checks command timing, bursts and refresh |
| `tb/pci_master_bfm.sv` | PCI master bus-functional model: checks parity and protocol |
| `tb/tb_check.svh` | check, result and watchdog macros |

## Simulating

The testbenches need Verilator 5 with `--timing`. Run from the repository
root, because testbenches include `tb/tb_check.svh` by that path:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/daq_pkg.sv tb/tb_daq_card_top.sv --top-module tb_daq_card_top
    ./obj_dir/Vtb_daq_card_top

Replace the name for any other testbench. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops itself. A watchdog ends a
testbench that hangs and counts that as a failure. The simulator is
two-state, so all state read by the logic is reset.

**End-to-end test.** `tb_daq_card_top` runs the top with every parameter at
its default: full 200 µs SDRAM power-up, real refresh interval, 4096-word
FIFO. That is about 540 µs of simulated time, under a second of run time. It
models the eight converters as sampling a 1 GS/s ramp and checks:

- every stored sample is exactly one step after the previous one, so
  ordering and 1 ns spacing both hold;
- the record starts 0–16 ns after the trigger;
- dual-mode channel switching;
- overflow on an 8192-word record;
- CAS-latency change;
- DATA-register wait states;
- refresh during traffic;
- PCI disconnect on a burst.

It counts each of these events and fails if any never happened.

**Capacity test.** `tb_record_capacity` runs the full-size top through the
record-length limit described under *Throughput*. It takes about 5 s.

**Unit tests.** The per-module testbenches cover each block more finely, for
example:

- PCI configuration and protocol;
- SDRAM command timing against the model;
- FIFO ordering with random clock ratios.

## Where this design departs from, or goes beyond, the original card

- **Soft CPU.** The original card has a soft CPU in the FPGA and a PCI core
  from the FPGA vendor. Here the host reaches a plain register file directly,
  and the PCI target is written from scratch.
- **SDRAM controller.** The original controller was derived from the
  vendor's SDRAM controller. This one is built from the module split
  described above.
- **Clock DLLs.** The board uses DLLs to generate and de-skew the SDRAM
  clock. Here `sd_clk` is simply the system clock.
- **Record sequencing.** Pre-trigger storage, trigger slope and sub-word
  trigger timing are not implemented. The settle time and the dual-mode
  policy (one record per channel, each on its own trigger) are choices made
  here.
- **Sampling rate.** The only sampling rate is 1 GS/s. There is no
  decimation.
- **Storage speed.** Storage runs at 228.6 MB/s sustained, so records longer
  than about 42 µs overflow (see *Throughput*).
- **SDRAM geometry and timing.** The 32M × 16 organisation and the timing
  values are typical parts. Change `daq_pkg` and the controller parameters
  for other devices.
- **Synthesis.** `sample_pll` must be replaced by the vendor PLL for
  synthesis. Timing closure of the 8-phase capture at 1 ns spacing is a
  board and FPGA-constraint matter, and is not addressed by the RTL.
