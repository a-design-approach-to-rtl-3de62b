# Real-time formatter for multispectral image data

A multispectral scanner sends its samples in the order its detectors produce
them. A common order is band-interleaved-by-pixel (BIP): all bands of pixel 1,
then all bands of pixel 2, and so on. The processing stage after the scanner
often wants another order. Radiometric correction works line by line and wants
band-interleaved-by-line (BIL). A film recorder wants one band at a time, band
sequential (BSQ). Classification wants BIP back again. At sensor rates of
tens to hundreds of Mbit/s a processor cannot do this reordering in software.

This design reorders the stream in hardware with no gaps. It rests on two ideas:

* **Two buffers that swap roles (ping-pong).** The incoming bytes of one block
  are written in arrival order into one buffer RAM. At the same time, the
  previous block is read out of the other RAM. When a block is complete, the
  two RAMs swap roles. Input never stops, and output runs at the input rate,
  one block behind.
* **Output order from a lookup table.** Reads do not follow a fixed address
  pattern. A counter steps through a lookup table (LUT), and entry *k* holds
  the buffer address of the *k*-th byte to send out. Any reordering within a
  block is just a different table, which a processor writes before the run.

At the default size a block is 65 536 bytes of 8-bit data. That takes two
64K x 8 buffer RAMs and a 64K x 16 LUT. At one byte per clock, 12.5 Mbyte/s
(100 Mbit/s) needs a 12.5 MHz clock.

## Structure

```
                    +-------------------- formatter_top ---------------------+
 din_stb, din ----->| input_controller --wr--> bus_switch A <--> buffer_ram A |
                    |   | bank_sel,             bus_switch B <--> buffer_ram B |
                    |   | in_status                  ^  |                      |
                    |   v                  buf_raddr |  | output bus (A | B)   |
                    | output_controller -------------+  v                      |
                    |   (counter -> lut_memory -> latch)  output_latch ------->|--> dout, dout_stb, dout_oe
 host bus --------->| prog_io (M, N, status)   output_controller (LUT port)    |
 mode ------------->|                                                          |
                    +----------------------------------------------------------+
```

| Module | Role |
|---|---|
| `formatter_top` | Wires everything together. Holds the processor read register and an assertion that only one RAM drives the output bus. |
| `input_controller` | Write address counter and final-address comparator (A). Input status flip-flop. Toggle flip-flop that drives the bus switches. Block counter and the end-of-run comparator (B). |
| `output_controller` | LUT counter with wrap comparator (C). `lut_memory`. Latch at the LUT output. Wait-state, output-enable and output-status flip-flops, with the zero comparator (D). LUT access for the processor. |
| `bus_switch` | Data and address switch for one RAM. Connects the RAM to the input side or the output side, or to neither during initialisation. |
| `buffer_ram`, `lut_memory` | Static RAMs with one address bus. Reads are asynchronous. Writes happen on the clock edge. |
| `output_latch` | System output register and output data clock. Disabled until the first formatted byte is ready. |
| `prog_io` | Processor-written registers for the final address M and the block count N, plus a read-only status word. |
| `mag_compare` | The A > B / A = B comparator used four times. |
| `fmt_pkg` | Default sizes and the register map. |

## Operating sequence

1. **Initialisation (`mode` = 1).** Every controller flip-flop and counter is
   cleared. Both RAMs are detached. The processor port reaches the LUT and the
   registers. The processor writes:
   * LUT words 0..M: entry *k* is the buffer address of output byte *k*;
   * register 0: the final address M (a block is M+1 bytes, M >= 1);
   * register 1: the number of blocks N.
2. **Processing (`mode` = 0).** The processor drops `mode`. Each `din_stb`
   pulse delivers one byte. The first pulse selects RAM A as the input buffer
   (`bank_sel` = 1) and writes address 0.
3. **First block.** The output side waits until the first block is in. During
   the wait it keeps LUT entry 0 latched, ready as the first read address.
4. **Steady state.** Block *b* is written into one RAM while block *b*-1 is
   read from the other in table order. One byte leaves for every byte that
   arrives.
5. **End.** `irq` rises when the N-th block has been completely sent out. The
   processor then raises `mode` again.

### Processor port

The address is `ADDR_W+1` bits and the data `ADDR_W` bits. `host_wr` writes
on the clock edge. With `host_rd` high, `host_rdata` is loaded on the clock
edge and can be read the cycle after.

| `host_addr` | Access |
|---|---|
| `{0, k}` | LUT word *k*. Read and write work only while `mode` = 1. |
| `{1, ..., 00}` | final address M (read/write; writes only while `mode` = 1) |
| `{1, ..., 01}` | block count N (read/write; writes only while `mode` = 1) |
| `{1, ..., 10}` | status `{irq, out_status, in_status}` (read only) |

The status lines, `block_num` and `bank_sel` are also top-level ports.

### Tables for the usual formats

A block holds L lines x P pixels x B bands. It arrives in BIP order, so
pixel (l, p, b) sits at buffer address `l*P*B + p*B + b`. For output byte
*k*:

* BIL (line, band, pixel): `l = k / (B*P)`, `b = (k / P) % B`, `p = k % P`;
* BSQ (band, line, pixel): `b = k / (L*P)`, `l = (k / P) % L`, `p = k % P`;

LUT[k] is the BIP address of that (l, p, b). To go from BIL back to BIP, swap
the roles: the buffer holds `l*B*P + b*P + p`, and output byte *k* is
(`l = k/(P*B)`, `p = (k/B) % P`, `b = k % B`).

## Timing across a block boundary

This is the subtle part of the design. All timing is in data clock pulses
(`din_stb`, one `clk` cycle wide, at most one per clock). Number the input
bytes of a run 0, 1, 2, …

**Input side.** Byte *i* is captured on its pulse. It is written one clock
later into the input RAM at address *i* mod (M+1). `in_status` goes low
after byte M of a block is captured ("buffer full"). The next pulse raises it
again, and that rising edge toggles `bank_sel`. The RAMs swap on that pulse,
the first one of the next block.

The one-clock write delay makes the swap clean. The last byte of a block is
captured just before the swap, so it is still written into the old input RAM.
The first byte of the new block is captured on the swap pulse and is written
after it, into the new input RAM.

**Output side.** The first falling edge of `in_status` ends the wait state.
From the next pulse on (the swap pulse), the LUT counter runs 0, 1, …, M,
0, … in step with the input address. Each pulse does three things at once,
in a two-stage pipeline:

```
pulse j:   buf_raddr <= LUT[count]         count <= count == M ? 0 : count+1
           dout      <= RAM_out[buf_raddr] (the address latched on pulse j-1)
```

So the output byte for LUT entry *k* appears one pulse after entry *k* is
latched. At a swap pulse, the read still sees the old output RAM (the one that
holds the block being finished). The entry latched on that pulse, LUT[0],
is read from the new output RAM on the next pulse.

**Latency and rate.** With data clock pulses numbered from 1, the first block
fills pulses 1..M+1. Pulse M+2 latches LUT[0], and pulse M+3 puts the first
formatted byte on `dout`. After that, every pulse outputs one byte, with
`dout_stb` high for one clock as each new byte appears.

**Output status and the interrupt.** `out_status` is loaded on every pulse
with "count is not 0". It drops for one pulse when the last byte of a block
goes out, then rises as the first byte of the next block goes out. The input
controller counts these rising edges. The first one marks the start of
output. So block N is complete when the count reaches N+1, and `irq` =
(count > N). That edge comes on the second pulse of input block N+2, so the
sensor must keep sending until the interrupt. Bytes beyond block N are taken
in but not needed.

## How this differs from the circuit it is based on

The original is built from discrete logic and is clocked directly by the
sensor's data clock. It uses both clock edges, one-shot pulse generators and
tri-state buses. This version is a single-clock synchronous design:

* The data clock is a one-cycle enable `din_stb` on `clk`. Gaps in the data
  clock are simply cycles without a pulse.
* The write one-shot becomes a one-clock write command issued one clock after
  the pulse. The one-shot that narrows the comparator pulse, and the
  flip-flop that holds the write counter clear until the first falling edge,
  have no counterpart. Comparators are sampled once per pulse, and the counter
  is 0 after initialisation.
* The output-enable flip-flop is released on the rising edge of the first
  counting pulse, not on the falling edge that follows it. The first valid
  output byte is the same.
* The shared tri-state output bus is the OR of two gated switch outputs.
  `dout_oe` replaces the tri-state output.
* The input status drops after the last byte of a block is captured, not
  partway through that byte's cycle.
* Each buffer is one memory array, so the chip-select decoders of a
  multi-chip memory board are not needed.
* The counter, LUT, comparator and flip-flop arrangement follows the
  original. So do the first-output latency and the block-boundary sequence.
  The processor bus, register map, write lock during processing and
  interrupt-as-level are this design's own choices.
* The processor is outside the design. Its bus, the mode line, the status
  lines and the interrupt are ports.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `ADDR_W` | 16 | Buffer address bits. Blocks up to 2^ADDR_W bytes. LUT is 2^ADDR_W x ADDR_W. |
| `DATA_W` | 8 | Bits per sample |
| `BLK_W` | 16 | Width of the block counter and of N |

The block size actually used is set at run time by M. It can be anything from
2 to 2^ADDR_W bytes.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
values computed independently in the testbench and ends with a line
`TB_RESULT checks=N failures=F`.

| Testbench | What it shows |
|---|---|
| `buffer_ram_tb`, `lut_memory_tb` | Contents of every location. The old value is read before a write's clock edge. |
| `bus_switch_tb` | Routing in all three switch states |
| `prog_io_tb` | Register write and read-back, status word, decode, write lock |
| `input_controller_tb` | Write address, data and bank for each byte, with random gaps. Status, swap count, block counter, interrupt. |
| `output_controller_tb` | LUT load and read-back. Wait state. Latched address, counter, output enable and output status on each pulse. |
| `output_latch_tb` | Latch and output data clock only while enabled |
| `formatter_top_tb` | End to end with 48-byte blocks (4 bands x 4 pixels x 3 lines). A BIL run with random gaps, then back to initialisation for a BSQ run at full rate. Checks every output byte, the first-output latency (pulse M+3), one byte out per pulse, and the interrupt. It counts table loads, wait states, swaps, gaps, interrupts and mode changes, and fails if any never happened. |
| `formatter_chain_tb` | Two formatters in series, BIP to BIL to BIP, the second clocked by the first one's output data clock. The stream comes back unchanged. |
| `formatter_full_tb` | Default parameters. 65 536-byte blocks (4 x 128 x 128) reordered BIP to BSQ at one byte per clock. Checks all 131 072 output bytes, the latency and the rate. Runs in well under a minute. |

To run one with Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/fmt_pkg.sv tb/formatter_top_tb.sv --top-module formatter_top_tb
./obj_dir/Vformatter_top_tb
```

For another testbench, change the testbench file and the `--top-module`.
`-y rtl` lets Verilator find each module in the file of the same name. The
package must be named first on the command line. Verilator has only two logic
states, so the testbenches start every run with `mode` high, which clears the
controllers. The RAM contents start at random values.

## Limits and open points

* M must be at least 1, because a one-byte block would never raise the input
  status.
* The interrupt needs the input stream to continue one pulse into block N+2
  (see above).
* Changing M or N while processing is blocked. Changing the LUT is ignored
  while processing.
* The original's analog timing limit is the time for the write pulse to cover
  the memory access time plus the bus switching time. Here it becomes an
  ordinary clock-rate constraint. No timing analysis has been done.
