# AMC-A10 trigger firmware core (LAr Phase-I LDPB)

SystemVerilog RTL for the processing part of the AMC-A10 FPGA firmware on the
ATLAS LAr Digital Processing Board. It covers the path from the 48 LTDB input
fibres to the 48 FEX output fibres, the TDAQ readout buffering and the IPbus
register access. The vendor hard IP around it (transceivers, PLLs, Ethernet,
GBT, flash loader) is represented only by the parallel-side ports.

## Data path

```
LTDB words 48 x 16 bit @ 320 MHz
  input_stage      LOCic frame alignment, descrambling, CRC/BCID checks,
                   test-pattern replay, fibre-to-fibre alignment
  config_remap     384-entry map: 48 fibres x 8 samples -> 32 towers x 6 word pairs,
                   320 -> 240 MHz
  user_code        32 streams: pedestal, 5-tap FIR, peak BCid, saturation handling,
                   fixed 5-BC latency
  output_summing   12->10 adapter, tower and region sums, eFEX/jFEX/gFEX packagers
                   (240 -> 280 MHz), selective duplication, monitoring select
FEX words 48 x 32 bit @ 280 MHz

user code monitoring streams -> tdaq_readout -> 84-bit FIFO read at 40 MHz (GBT side)
```

The top module is `amc_a10_fw`. Its clocks are:

- `ttc_320_clk`: input stage and the remap capture side.
- `ttc_240_clk`: remap output, user code, output-summing input and TDAQ buffers.
- `xcvr_tx_280_clk`: FEX output.
- `ipctrl_100_clk`: registers.
- `ttc_40_clk`: GBT readout side.

Each domain has its own `reset_sync`. Reset asserts immediately on the push button, the MMC reset or PLL unlock, and releases synchronously four cycles later.

## Blocks

| Module | Role | Notes |
|---|---|---|
| `locic_frame_decoder` | One fibre: finds the frame border, descrambles, checks the CRC and tracks the BCID | See the frame format below. |
| `test_pattern_gen` | Dual-port 32k x 16 pattern RAM | Replays 3564 x 8 words in a loop while test mode is on. |
| `fibre_sync` | Per-fibre alignment FIFOs | Each FIFO starts on the BCID-0 frame; reading is common to all fibres. Any loss or overflow restarts the alignment. |
| `input_stage` | Combines the above for 48 fibres | One pattern RAM per six fibres, plus registers. |
| `config_remap` | Configurable remapping | Double-buffered capture at 320 MHz; the six 240 MHz slots are emitted from the finished bank. |
| `user_code_stream` / `user_code` | Energy reconstruction per trigger tower | 32 instances. |
| `output_summing` / `fex_packager` | FEX streams | 32 eFEX, 4 jFEX and 1 gFEX stream, and duplicates on outputs 37-47. |
| `tdaq_readout` | TDAQ readout | 512-BC circular buffers, L1A FIFO, readout state machine, 84-bit output FIFO. |
| `wb2amm` | IPbus Wishbone slave port to Avalon-MM | Has a read timeout. |
| `reset_sync` | Per-domain reset | |
| `sync_fifo`, `async_fifo` | Generic FIFOs | |

### LOCic frame format used

A frame is eight 16-bit words per bunch crossing. Word k is `{T[k], T[k+8], scrambled ADC[11:0], 2 unused bits}`:

- T0..T7 hold a CRC-8 (polynomial 0x07, initial value 0). It is computed over the 96 descrambled ADC bits, channel 0 first, MSB first.
- T8..T11 hold the border pattern `0101`.
- T12..T15 hold BCID[3:0], with T12 as bit 3.

The ADC values are scrambled per channel with the self-synchronising scrambler x^7+x^6+1.

The decoder locks after 8 good border patterns in a row and unlocks after 4 bad ones. The threshold of 8 is deliberate. A frame assumed two words late reads T10, T11, BCID[3] and BCID[2] as its border. That reads `0101` for BCIDs 4-7 of every 16, so any threshold of 4 or less can lock on the wrong word.

While unlocked, each failed frame moves the assumed frame start by one word. After eight such moves the decoder sends an `rx_bitslip` pulse to the receiver.

### Register maps (word addresses, per IPbus slave port)

- **Port 0, input stage**
  - `0x00000-0x3FFFF`: pattern RAMs. Address bits [17:15] select the group, bits [14:0] the word.
  - `0x40000`: test mode.
  - `0x40001`/`0x40002`: fibre select.
  - `0x40003`/`0x40004`: lock bits.
  - `0x40005`: `{resync count, aligned}`.
  - `0x40100+f`: `{CRC errors, BCID errors}` of fibre f.
  - The spec puts test mode at 0x10000. That does not leave room for 8 x 32k RAM words, so the registers were moved up.
- **Port 1, remap**
  - Entry e at address e holds `{enable, fibre[5:0], sample[2:0]}`.
  - By default entry e takes fibre e/8, sample e%8.
- **Port 2, user code**
  - Address `{stream[4:0], sc[3:0], param[3:0]}`.
  - Parameters: 0 pedestal, 1-5 FIR coefficients (Q12), 8 peak threshold, 9 saturation threshold, 10 saturation energy.
- **Port 3, output summing**
  - `0x000`: adapter enable.
  - `0x001`: eFEX shift.
  - `0x002`: monitoring select.
  - `0x100+t`: super-cell mask of tower t.
  - `0x200+o`: duplication `{enable, source}` of output o.
- **Port 4, TDAQ**
  - `0`: L1 latency in BC (default 100, i.e. 2.5 us).
  - `1`: samples per event (default 1).
  - `2`: samples before the triggered BC (default 0).
  - `3`: L1A count.
  - `4`: L1A FIFO overflow.

### Latency

| Stage | Measured in simulation | Specification |
|---|---|---|
| Remapping | 1.40 BC | < 1.5 BC |
| User code | exactly 5 BC | 5 BC minimum |
| Output summing | at most 1.27 BC after the last input word of a bunch crossing, for all streams | 0.5 BC eFEX, 1.5 BC jFEX/gFEX |

The eFEX stream is not faster than the summed streams here. All packagers start when two words are queued.

### TDAQ readout format

| Word | Layout |
|---|---|
| Header | `{4'hA, L1A count[23:0], triggered buffer position[8:0], n_samples[3:0], 0}` |
| Data | `{4'h1, stream, slot, sample, 0, quality pair, energy pair, raw ADC pair}` |
| Trailer | `{4'hF, word count[15:0], 0}` |

With the default single sample, an event is 194 words, about 4.9 us at 40 MHz. That fits the 10 us spacing of 100 kHz L1As.

Multi-sample readout of all 32 streams (5 samples is 962 words) takes longer to read than the circular buffers hold data. It is only usable with a lower L1A rate or a reduced setting. The rule is that the readout backlog plus the L1 latency must stay below 512 bunch crossings.

## Departures from the specification

- **Output-summing latency.** The eFEX stream takes up to 1.27 BC after the last input word of its bunch crossing, not the 0.5 BC the budget gives.
  - The 12-to-10 adapter needs the last word pair of a tower, so eFEX words wait for it.
  - All packagers share one start rule.
- **Input-stage register map.** The registers sit above the pattern RAMs (see the register maps).
- **Decoder reset on a test-mode change.** A change of test mode resets the frame decoders, so they realign on the new source instead of holding a lock that no longer applies.
- **Input-stage latency.** It is not fixed by construction. It depends on the fibre skew, because every alignment FIFO starts on the BCID-0 frame. The budget gives 2.5-3 BC for this stage.
- **12-to-10 adapter.** It is the simple pair sum that the specification offers as a first approximation.
- **Saturation handling.** It is a simple threshold and window rule, because the specification leaves it open.

## Not implemented

- **Vendor IP and external cores.** Native PHY receivers and transmitters (including the FEX line encoding), ATX/core PLLs, DDR3 interface, 1 GbE and XAUI/10 GbE, GBT-FPGA, LVDS SERDES, temperature sensor, EPCQ-L flash loader, and the CACTUS IPbus controller.
- **Partly specified blocks.** The I2C control of the microPODs, the monitoring path (UDP jumbo packets to 10 GbE), and the TTC block, whose description is still open.
- **FEX packet format.** It is not defined by the specification, so the header/trailer format here is a placeholder.
- **TDAQ buffer organisation.** Circular buffers are kept per tower stream (both super cells of a word side by side), not as one buffer per super cell.
- **Ping-pong FIFOs.** A single output FIFO replaces the two third-stage FIFOs.

## Verification

Each block has a self-checking testbench in `tb/`. Each bench ends with a `TB_RESULT checks=... failures=...` line. The testbenches use behavioural LTDB link models: a LOCic transmitter plus a deserialiser with bit slip.

- **Reduced-size end-to-end bench (`tb_amc_a10_fw`).** It checks:
  - alignment with bit slips
  - register access through all five IPbus ports
  - loss and recovery of alignment across a test-mode switch
  - FEX frame structure and trailer checksums
  - TDAQ raw ADC contents against the injected data
  - buffered L1As
  - TDAQ output FIFO stalls

  It fails if any of these mechanisms never occurs.
- **Full-size bench (`tb_amc_a10_fw_full`).** It runs the default configuration: 48 fibres, 32 towers, 48 FEX outputs and the 3564-BC orbit.

Each block also has a deliberately broken variant, which its testbench detects.

Example (Verilator 5):

```
verilator --binary --timing -y rtl rtl/lar_pkg.sv tb/tb_pkg.sv tb/ltdb_link_model.sv \
    tb/tb_amc_a10_fw.sv --top-module tb_amc_a10_fw
```
