# XFT board VME logic

The XFT board carries three FPGAs — a Control FPGA and two DataIO FPGAs — that
software reaches over a VME bus. Software uses the bus to identify the board,
to set a few control values (a bunch-count shift, per-channel enables, abort
handling, overflow limits) and to read out the DAQ data. The DataIO FPGAs keep
that data in four buffers per channel. This RTL implements what the XFT VME
register map defines: every register, the identification PROM, the readout
buffers with their word counts, and the FILAR overflow detector. All of it sits
behind one VME A32/D32 slave.

The register map fixes the addresses, the register fields, the constant values
and the power-up values. It hardly describes how the blocks work inside. Where
it is silent, this design makes the simplest choice that does the job. Those
choices are listed in [Where this design goes beyond the map](#where-this-design-goes-beyond-the-map).

## Structure

```
            VME pins
               |
          vme_slave          strobe sync, board/AM match, DTACK*
               |  local bus (lb_req_t / lb_rsp_t, one-clock answer)
      board_addr_decoder     A23:0 -> {FPGA, space}
       /        |        \
control_fpga  dataio_fpga  dataio_fpga     (DataIO 1 at xx08xxxx, DataIO 2 at xx0Cxxxx)
 |- fpga_regs    |- fpga_regs
 |- idprom       |- dataio_daq
 |- filar_overflow_detection  |- 6 x daq_channel_buffer (4 x 128 words)
```

`xft_board` is the top. In hardware the three FPGAs are separate chips that
share the VME interface. Here they are three instances on one internal bus
driven by one slave, all on one clock. The map's 12.5 ns tick implies an
80 MHz clock.

## Address map

A31:24 is the board's base address (`board_base`; the map writes it as `XX` or
`YY`). Below that, A23:0 select:

| Range (A23:0)            | Owner        | Contents |
|--------------------------|--------------|----------|
| `000000`–`000028`        | Control FPGA | registers, incl. state registers 1/2 |
| `080000`–`080020`        | DataIO 1     | registers |
| `0C0000`–`0C0020`        | DataIO 2     | registers |
| `100000`–`10007C`        | Control FPGA | IDPROM, one ASCII character per long word in bits 31:24 |
| `0F0800 + 0x100·buf + 4·ch` | DataIO F  | word count of channel `ch` (0–5), buffer `buf` (0–3) |
| `(8+buf)F0000 + 0x800·(mezz−1) + 0x200·(chan−1) + 4·word` | DataIO F | readout RAM |

Here F is `8` for DataIO 1 and `C` for DataIO 2. Channels are numbered 0–5 as
mezzanine 1 channels 1–3, then mezzanine 2 channels 1–3.

So in a RAM address, A21:20 is the buffer, A19:16 the FPGA, A11 the mezzanine,
A10:9 the channel and A8:2 the word (128 words per buffer). The address
decoder is a single function, `xft_pkg::decode_addr`. It checks the unused
bits too, so addresses such as `080C00` (a word count beyond buffer 3) or
`880600` (a fourth channel) belong to nobody.

### Registers of each FPGA

| Offset | Access | DataIO FPGAs | Control FPGA |
|--------|--------|--------------|--------------|
| 0x00 | R   | firmware version `0x0d509190` | `0x0c508110` |
| 0x04 | W   | reset FPGA | reset FPGA |
| 0x08 | R/W | DAQ SW version, power-up 0 | same |
| 0x0C | R/W | bits 5:0 channel enables, power-up 0 | bits 7:0 bunch count shift, power-up 41 |
| 0x10 | R   | `0x00c0ffee` | `0x00c0ffee` |
| 0x14 | W   | pulse 1 (no function) | same |
| 0x18 | R/W | unused, power-up 0 | bit 0 ignore event aborts, power-up 1 |
| 0x1C | R/W | unused, power-up 0 | 19:0 word-count clear delay (power-up 16), 29:20 word count maximum (power-up 1023) |
| 0x20 | R   | `0x00000cdf` | `0xdeadbeef` |
| 0x24 | R   | — | state 1: `{00, wc_reg1, wc_reg0, current count}` |
| 0x28 | R   | — | state 2: `{0000, timer_en[3:0], event count[1:0], total≥max, overflow, wc_reg3, wc_reg2}` |

A single module, `fpga_regs`, serves both columns through its parameters.
The Control FPGA's control register 1 holds its 8 data bits only; the other
control registers store all 32 bits and read back what was written, and the
logic uses only the fields listed. An offset not in the table reads as zero.

## The local bus

Inside the board, each VME cycle becomes one request of type `lb_req_t`:
- a one-clock `req` strobe;
- `we`, the direction;
- `addr`, the 24-bit local address;
- `wdata`, the write data;
- `space`, a tag the decoder adds: register, IDPROM, word count or RAM.

Every target answers exactly one clock later with `lb_rsp_t` (`ack`, `rdata`).
Block RAM reads are synchronous, so all targets can meet this fixed latency.
With a fixed latency the decoder needs no bookkeeping: it ORs the responses.
An assertion in `board_addr_decoder` checks that at most one target
acknowledges at a time.

The decoder itself acknowledges an address that no target owns, with read
data zero, so a VME cycle never hangs. No bus error is generated.

## VME slave

`vme_slave` passes each of AS*, DS0*/DS1* and WRITE* through a two-flip-flop
synchroniser. It starts a local request when all of these hold:
- AS* and both data strobes are low;
- the address modifier is an A32 single-cycle code (`09`, `0A`, `0D`, `0E`);
- A31:24 equal `board_base`.

Address and write data are sampled at that moment; VME keeps them stable while
the strobes are low. When the acknowledge returns, the slave drives DTACK*
low. On a read it also drives the data, with `vme_data_oe` high. It releases
both once the data strobes go high again. DTACK* falls 5 clocks after the data
strobes. A cycle addressed to another board, or with any other address
modifier, gets no answer.

## DAQ readout buffers

Each DataIO FPGA has six channels. Each channel has four buffers of 128 × 32
bits, and each buffer has its own word count (`daq_channel_buffer`). The fill
port works as follows:
- `wr_buf` selects the buffer, shared by all channels of the FPGA;
- `wr_start` empties the selected buffer;
- each `wr_valid` appends `wr_data` at the position given by the word count
  and increments the count.

A full buffer drops further words. A channel whose enable bit in control
register 1 is 0 stores nothing. All channels power up disabled. VME reads the
counts and the stored words at the addresses above; both windows are
read-only. A write to the FPGA's reset register clears all word counts.

## FILAR overflow detection

This block stops the Control FPGA from sending the FILAR receiver more words
than it can buffer. The register map lists only the block's visible state; how
the pieces interact is this design's reading of those fields:

1. `word_sent` increments the **current word count**. The count saturates at 1023.
2. At `event_end` the event's count moves into **word count register
   [event count]**. The 2-bit **event count** then advances, and that register's
   **timer** is enabled. `event_end` may fall on the event's last word, which
   is then counted.
3. Exactly `clear_delay` clocks later (control register 3, bits 19:0, in
   12.5 ns ticks), the timer clears the register and disables itself. By then
   the receiver is assumed to have drained that event.
4. **total ≥ max** compares the sum of the four registers and the current
   count with the maximum in bits 29:20. **overflow** is the same flag one
   clock later, registered.

If an event ends while its register is still timing, its words are added to
that register and the timer restarts, so no words go uncounted. The map
suggests setting the maximum "a little less than 512". Its power-up value of
1023 effectively disables the check until software sets it.

Event aborts pass from `abort_in` to `abort_out` unless bit 0 of control
register 2 is set. It powers up set, so aborts are ignored.

## Where this design goes beyond the map

These are choices of this design, not taken from the map:
- **Soft reset.** A write to offset 0x04 of an FPGA gives a 4-clock soft reset
  of that FPGA's data path: the word counts, or the overflow detector. The
  registers keep their values.
- **Pulse 1.** It has no function; it produces a one-clock strobe, brought out
  as a port.
- **VME handshake.** The handshake, the accepted address modifiers and the
  missing bus error are common VME slave practice.
- **Fill interface.** The readout buffers' fill interface is this design's own.
- **Overflow detector internals.** Load at event end, merge into a busy
  register, saturation, and `overflow` as the registered `total ≥ max`.
- **IDPROM.** The readable text is `00xx 105 PULSAR XFT RX`. The word
  separators are ASCII spaces, and the entries after the text
  (`100058`–`10007C`) read as zero.
- **Bunch count shift.** The power-up value 41 is taken as decimal. The logic
  that uses the shift is not part of the register map, so it is only brought
  out as `bc_shift`.
- **RAM window sizes.** Every channel's window is 0x200 bytes (128 long
  words), mezzanine 2 channel 1 included.

Not built: the data paths that fill the buffers and use the bunch-count shift
and the aborts. The register map does not describe them, so they are ports of
the top.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/xft_pkg.sv tb/tb_xft_board.sv \
          --top-module tb_xft_board -o sim && obj_dir/sim
```

`tb_xft_board` drives the board through its VME pins at the default sizes. It
reads all identification and fixed registers and the IDPROM, and writes
registers. It fills all 2 × 6 × 4 buffers, with some channels disabled and
some buffers overfilled, then reads every count and word back. It also runs
the overflow detector into overflow and out again, and checks the abort gate,
the reset and pulse registers, an unowned address and a cycle for another
board. It counts each of these events and fails if one never happens. It runs
in about 10 s.

The block testbenches compare against models written independently of the
RTL:
- a queue model of the buffers;
- a cycle-by-cycle model of the overflow detector, with random traffic;
- the address list of the register map, for the decoder.

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `xft_board`, `dataio_fpga`, `dataio_daq`, `daq_channel_buffer` | `DEPTH` | 128 | words per buffer (power of two) |
| same | `NBUF` | 4 | buffers per channel (power of two) |
| `filar_overflow_detection` | `WC_W`, `DLY_W`, `NSLOT` | 10, 20, 4 | word count width, delay width, registers |
| `fpga_regs` | `FW_VERSION`, `STATUS2`, `CTRLn_INIT`, `CTRL1_MASK`, `HAS_STATE`, `RESET_CYCLES` | DataIO values | per-FPGA constants |

The VME window holds at most 128 words per buffer and 4 buffers. A larger
`DEPTH` or `NBUF` also needs `decode_addr` changed.
