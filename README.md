# Jet/Energy Processor Module: VME control and energy-sum path in SystemVerilog

The Jet/Energy Processor Module (JEM) is a board in the ATLAS Level-1
calorimeter trigger. Every 25 ns bunch crossing it takes in 96 serial-link
channels of calorimeter energies. It forms jet elements from them and sends
the missing-energy components (Ex, Ey) and the total transverse energy (Et)
on to an energy-sum merger. A crate CPU runs the board over VME: it loads the
FPGAs, sets thresholds and coefficients, watches link quality, and uses
playback and spy memories to inject test data or capture live data.

This RTL models the board as the programmer sees it. Every register in the
VME map is here, with its side effects:

- the VME interface and its address decoding;
- the VME CPLD;
- the Sum processor FPGA with its TTC (timing) handling, its I2C link to the
  TTCrx chip and its spy memories;
- four Input FPGAs, each with 24 link channels, error counters, a
  playback/spy memory and the energy sums.

The jet-finding FPGA and the SystemACE configuration chip have programming
models of their own. They are not modelled: their bus signals are ports of
the top.

Everything is synchronous to the 40 MHz bunch-crossing clock. The one
exception is a falling-edge register in each channel, used for the
half-tick phase adjustment.

## Block diagram

```
 VME A24/D16 ──► vme_slave ──(local register bus: reg_req_t + target select)──┐
                    │ configuration writes                                    │
                    ▼                                                         │
               cfg_download ──► cfg_strobe[5:0], cfg_data                     │
                                                                              │
   ┌───────────── cpld_regs  (sub-address 0) ◄────────────────────────────────┤
   │              SystemACE  (2)  ── ports ace_sel / ace_rdata ◄──────────────┤
   │              Jet FPGA   (8)  ── ports jet_sel / jet_rdata ◄──────────────┤
   │  sum_fpga (4) ◄──────────────────────────────────────────────────────────┤
   │   ├ bc_counter, readout_ctrl, ttc_i2c_master, pulse_stretch ×5           │
   │   ├ energy_merge (4 × Ex/Ey/Et ─► quad_lin_enc ×3 ─► merger outputs)     │
   │   └ spy_mem ×2 (Exy, Et)                                                 │
   │  input_fpga R,S,T,U (C..F) ◄─────────────────────────────────────────────┘
   │   ├ in_channel ×24 (alignment, sat_counter ×3)
   │   ├ playspy_mem (24 × 256 × 10 bit)
   │   └ jet_energy (12 jet elements ─► Ex, Ey, Et)
   └ sbc (short broadcast) from sum_fpga to every input_fpga
```

## Address space

A VME address (A23..A1, with A0 always 0 for 16-bit data) splits like this:

| bits    | meaning |
|---------|---------|
| A23     | must be 1 |
| A22–A19 | module base address (`base_addr` input, set by switches) |
| A18–A17 | mode: `00` registers, `10` configuration download |
| A16–A13 | FPGA sub-address: 0 CPLD, 2 SystemACE, 4 Sum, 8 Jet, C/D/E/F Input R/S/T/U |
| A12–A0  | byte address of a register inside the FPGA |

Whenever the module's own space is hit, DTACK* is asserted, even at undefined
sub-addresses or modes, so the CPU never gets a bus error. An undefined
location reads 0 and ignores writes. A read of configuration space returns
0xFFFF.

In configuration mode, a write is routed by A16..A15, the top two bits of the
sub-address: `01` goes to the Sum FPGA, `10` to the Jet FPGA and `11` to the
Input FPGAs. Each FPGA only accepts the data if its enable bit is set. The Sum
FPGA's enable is bit 0 of CFG_MASK in the CPLD. The enables of the Jet FPGA
(bit 0) and of Input FPGAs R..U (bits 4..7) are in the Sum FPGA's CFG_MASK.
Several Input FPGAs can therefore be loaded with the same bitstream at once.

### VME handshake and the local bus (`vme_slave`)

AS*, DS* and WRITE* go through two-flop synchronisers. The first clock that
sees both strobes low with a matching address latches the access. The slave
then issues one `reg_req_t` request (`req`, `we`, `addr`, `wdata`) for one
clock, with a one-hot `tgt_sel`. A target returns read data registered on the
next clock. DTACK* falls 5 clocks after the clock on which DS* is first
driven low, and stays low until DS* is released. Every VME cycle makes
exactly one request. This matters because some reads have side effects: the
spy and playback ports advance their pointers on each read.

## Register maps

"PR" marks a pulse register: writing 1 to a bit triggers an action, and the
register reads back as 0. Bits a register does not define are not stored and
read as 0. A write to a read-only register has no effect. All registers and
memories power up as zero.

**VME CPLD (`cpld_regs`)**

| addr | type | content |
|---|---|---|
| 00 | RO | module type (`MODULE_TYPE` parameter) |
| 02 | RO | `{revision, serial}` from board inputs |
| 04 | RO | firmware version (`VERSION`) |
| 06 | RO | bit 0 TTC clock present, bit 1 Sum FPGA DONE |
| 10 | RW | bit 0 enable Sum FPGA configuration |
| 12 | PR | bit 0 clear Sum FPGA configuration (PROG pulse) |

**Sum processor (`sum_fpga`)**

| addr | type | content |
|---|---|---|
| 00 | RO | version |
| 02 | RO | bit 0 DLL locked |
| 04 | RW | bit 4 spy mode |
| 06 | PR | bit 0 module reset, bit 1 simulate short broadcast, bit 10 simulate L1A |
| 10 | RW | configuration enables: bit 0 Jet, bits 4..7 Input R..U |
| 12 | PR | configuration clear, same bit layout |
| 14 | RO | DONE lines, same bit layout |
| 40 | RW | TTCrx access: [7:0] data, [12:8] TTCrx register, [13] 1 = write, [15] reset the I2C controller |
| 42 | RO | [7:0] data read, [13] busy, [14] error (no acknowledge) |
| 60 | RW | read-request delay, 0..63 ticks |
| 62 | RW | slices read out per L1A (values above 5 act as 5) |
| 64 | RW | bunch-counter preset, 12 bits |
| A0 / A2 | RO / PR | Exy spy port `{Ey code, Ex code}` / reset its read pointer |
| A4 / A6 | RO / PR | Et spy port `{parity, Et code}` / reset its read pointer |

**Input FPGA (`input_fpga`)**

| addr | type | content |
|---|---|---|
| 0000 | RO | version |
| 0002 | RO | status, unused, reads 0 |
| 0004 | RW | bit 0 playback mode, bit 1 spy mode |
| 0006 | PR | clear counters: bit 0 link errors, bit 1 parity errors, bit 2 test-pattern errors; bit 4 resets the playback/spy VME pointer |
| 0008 | RW | low threshold, 10 bits (for Ex/Ey) |
| 000A | RW | high threshold, 10 bits (for Et) |
| 0010 | RW | playback/spy memory port, auto-increment |
| 0012 | PR | bit 0 resets the playback/spy VME pointer |
| 1000 + 40·ch | | channel window, ch = 0..23 |

Each channel window holds:

- +0 (RO): link error status.
- +2 (RW): control. Bit 0 selects the half-tick phase, bits 2:1 set a delay
  of 0..3 ticks, and bit 3 masks the channel (1 = off).
- +4, +6, +8 (RO): 12-bit saturating counters of link-status transitions,
  parity errors and test-pattern errors.
- +A (RW): `Ch_mult`, a 12-bit coefficient. On even (electromagnetic)
  channels it is the X coefficient of the jet element; on odd (hadronic)
  channels it is the Y coefficient.

## The energy path

**Link words.** Each channel carries a 10-bit word: a 9-bit energy in bits
8:0 and an odd-parity bit in bit 9.

**`in_channel`.** The word is registered on the rising edge (phase 0) or on
the falling edge (phase 1). Both paths give the same latency, so the phase
bit only moves the sampling point by half a tick. A 0–3 tick delay line
follows. The channel watches three things:

- Link-status transitions, in both directions. Many transitions mean an
  unstable link rather than a dead one.
- Words whose 10 bits do not have odd parity.
- Words whose energy is not the previous energy + 1. An upstream module
  sends a linear ramp as a test pattern.

Each counter stops at 4095.

**Playback and spy (`playspy_mem`).** The memory holds 24 words at each of
256 depths. While playback or spy mode is on, an operating pointer steps
through the depths once per tick. A short broadcast, from the TTC or from the
Sum pulse register, sets it back to 0, so a stored pattern starts at a known
bunch crossing. In spy mode all 24 aligned link words are written at the
current depth. In playback mode the memory words replace the link words as
input to the sums. The VME port has its own pointer, which walks through
every channel of a depth before moving to the next depth. It advances after
every read or write.

**`jet_energy`.** Element k is the sum of channels 2k (EM) and 2k+1
(hadronic), with masked channels counting as 0. It is 10 bits wide.

- Elements strictly above the low threshold contribute to Ex and Ey. Each is
  multiplied by its signed 12-bit coefficients, read as fixed point with 10
  fraction bits, so 1024 = 1.0. The products are summed and then shifted
  right by 10 (floor).
- Elements strictly above the high threshold are added into Et.

Each Input FPGA outputs Ex and Ey as 16-bit signed values and Et as a 14-bit
unsigned value. The latency is 2 clocks.

**`energy_merge` and `quad_lin_enc`.** The Sum FPGA adds the four Input
FPGAs' results and compresses each total to 8 bits:
`{range[1:0], mantissa[5:0]}`, where value ≈ mantissa · 4^range.

- The encoder picks the smallest range that holds the value and truncates
  towards minus infinity.
- Results past range 3 saturate.
- Ex and Ey use a signed mantissa. Their full scale is −2048..1984.
- Et uses an unsigned mantissa. Its full scale is 4032, and it saturates
  to 0xFF.

An odd-parity bit is added to the Et code. The outputs are registered, one
clock after the Input FPGAs' outputs. While spy mode is on, the two spy
memories record the codes into a circular 256-entry buffer. The crate CPU
reads them back through auto-incrementing ports.

End to end, the merger outputs change on the fourth rising edge after the
one that samples a link word, plus the channel delay.

## Timing and control in the Sum FPGA

- **L1A → read request → slices (`readout_ctrl`).** An L1A, from the TTC
  input or the pulse register, goes through a 64-stage delay line.
  `read_request` comes `delay + 1` clocks after the L1A. From the next clock
  on, `slice_strobe` stays high for min(slices, 5) consecutive clocks, with
  `slice_idx` counting 0, 1, …. A request that arrives while a sequence is
  running is queued, up to 7 deep.
- **Bunch counter (`bc_counter`).** It counts 0..3563, the length of an LHC
  orbit, and loads BC_PRESET on a TTC BC reset. The preset compensates the
  delay between the BC reset and the data.
- **TTCrx access (`ttc_i2c_master`).** Writing TTC_CONTROL while the
  controller is idle starts a transaction; a write during `busy` is ignored.
  The TTCrx is reached through two I2C addresses: a pointer register at
  `{I2C_ID,0}` and a data register at `{I2C_ID,1}`. A transaction is
  therefore two frames: first the register number goes to the pointer, then
  one byte is written to or read from the data register. A missing
  acknowledge ends the transaction with a STOP and sets the error bit.
  Each SCL quarter-period lasts `DIV` clocks (100 kHz at DIV = 100). The pins
  are open-drain enables (`*_oe` = 1 pulls the line low). Clock stretching
  is not supported.
- **Module reset** (pulse bit 0) clears the datapath state: the bunch
  counter, the readout sequencer, the spy pointers and the I2C controller.
  Register contents survive it.
- **PROG pulses.** Writing to a configuration-clear register raises the
  matching `prog` output for `PROG_TICKS` = 16 clocks (400 ns).

## Where this RTL makes its own choices

The register layout, field widths and the effect of every bit come from the
module's programming model. These points are choices of this RTL and may
differ from the real firmware:

- the local bus format and the VME handshake timing; address-modifier codes
  are not decoded;
- the RESET_PLAYSPY_COUNTER register is at 0x0012; the published map lists
  the odd address 0x0011, which 16-bit accesses cannot reach;
- the word format (9 bits of data plus odd parity), the parity sense and the
  ramp check "previous + 1 mod 512";
- the coefficient format (signed, 10 fraction bits), the strict ">"
  threshold comparisons and all internal widths;
- the bit layout of the quad-linear code and its rounding;
- circular spy capture with pointer reset on short broadcast, and the
  operating pointer of the playback/spy memory;
- the I2C access sequence to the TTCrx, its timing and its error handling;
- the orbit length (3564), the PROG pulse length, the read-request latency
  of `delay + 1` and the queueing of slice sequences;
- the scope of module reset; identifier and version values.

Not included:

- the Jet processor FPGA, the SystemACE and the TTCrx chip itself;
- the serial link receivers: the top takes the received words and link
  status directly;
- the DAQ/ROI readout data path, which the read request and slice strobes
  would drive;
- the FPGA-side configuration protocol, which lies beyond `cfg_strobe`,
  `cfg_data` and `prog`.

## Files

`rtl/` holds one module or package per file:

- `jem_pkg.sv` holds the bus struct, target enum and register offsets.
- The blocks are `vme_slave`, `cfg_download`, `cpld_regs`, `sum_fpga`,
  `bc_counter`, `readout_ctrl`, `ttc_i2c_master`, `energy_merge`,
  `quad_lin_enc`, `spy_mem`, `input_fpga`, `in_channel`, `playspy_mem` and
  `jet_energy`.
- `sat_counter` and `pulse_stretch` are small helpers.
- `jem_top` is the top.

`tb/` holds a self-checking testbench `tb_<block>.sv` for each block. It also
holds `ttcrx_i2c_model.sv`, a behavioural model of the TTCrx I2C register
port that the I2C, Sum FPGA and top testbenches use.

`tb_jem_top` runs the whole module at its default parameters. It drives only
the VME bus, the TTC inputs and the links, and it drives each mechanism
listed above at least once. At the end it prints how often each one was
seen.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
    rtl/jem_pkg.sv tb/tb_jem_top.sv --top-module tb_jem_top
./obj_dir/Vtb_jem_top
```

Swap in any other `tb_<block>` to run a single block. Each testbench ends
with a line `TB_RESULT checks=N failures=M` and has a cycle-count watchdog.
The full-module test finishes in a few seconds. Designs on the module's
other FPGAs can be wired to the `ext_bus`, `ace_*`/`jet_*`, `cfg_*` and
`prog` ports of `jem_top`.
