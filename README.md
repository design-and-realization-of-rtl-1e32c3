# Multi-pulse real-time coherent integration on an FPGA

A weak echo buried in noise gets clearer when the same range samples of many
successive pulses are added together. Signal adds coherently and noise does not,
so summing N pulses gains up to 10·log10(N) dB: about 16 dB for 40 pulses. This
design does that in real time on the samples of an AD9361 transceiver
(40 Msample/s, 12-bit I and Q). It keeps the most recent pulses in an external
DDR4 memory. For every new frame of samples it reads the same frame of the
previous N−1 pulses back, adds all N in an adder tree, and streams the result
to a host over UDP on Gigabit Ethernet. The pulse count N (1..40) and the number
of frames per pulse M can be changed at run time over an AXI4-Lite register
block. The same logic also plays a stored waveform out through the AD9361
transmit port.

```
 AD9361 RX lanes ─► ad9361_rx ─► storage_integration ──────────────────► eth_tx ─► rgmii_tx ─► PHY
  (DDR, 6 bit)      (I/Q splice)  ├ data_write   (pack, clock crossing)   (FIFO, 1500 B,
                                  ├ coherent_integration ◄─► DDR4 port     UDP/IP/Eth, CRC)
                                  │   (frame manager + 40 rake FIFOs)
                                  └ adder_tree   (40 → 1, 3 cycles)
 processor BRAM port ─► waveform_bram ─► ad9361_tx ─► AD9361 TX lanes
 processor AXI4-Lite ─► ctrl_regs (enable, N, M, TX length, status)
```

`ci_system` is the top. The processor, the DDR4 controller, the LVDS and DDR
I/O primitives and the Ethernet PHY are not part of the RTL. Their signals are
ports of the top.

## Clock domains

| clock  | typical  | logic |
|--------|----------|-------|
| `dclk` | 160 MHz  | AD9361 data clock: `ad9361_rx`, `ad9361_tx`, BRAM read side, write side of the sample FIFO |
| `clk`  | 300 MHz  | memory user clock: frame manager, rakes, adder tree, registers, BRAM write side, write side of the Ethernet FIFO |
| `gclk` | 125 MHz  | Ethernet: FIFO read side, UDP sender, RGMII encoder |

Samples cross from `dclk` to `clk` in the `data_write` FIFO, and results cross
from `clk` to `gclk` in the `eth_tx` FIFO. Both are Gray-pointer dual-clock
FIFOs (`async_fifo`). Enable and transmit length reach `dclk` through
two-flip-flop synchronisers. The register values are held steady for many
cycles after each change, so a multi-bit value is safe to pass that way. Each
domain has its own active-low reset.

## Receive interface (`ad9361_rx`)

In 2R2T mode the AD9361 sends one 12-bit I/Q sample per channel over two clock
periods, six bits on each edge:

| edge | 1st rise | 1st fall | 2nd rise | 2nd fall |
|------|----------|----------|----------|----------|
| lane | I[11:6]  | Q[11:6]  | I[5:0]   | Q[5:0]   |

The frame line is high while channel 1 is sent and low for channel 2. So one
sample pair takes four `dclk` periods: 160 MHz gives 40 Msample/s per channel.
The module captures both edges, pairs each falling lane with the rising lane
before it, and finds the start of a channel from the change of the frame line.
Every fourth cycle it emits `ch1` and `ch2` as `{I, Q}` (24 bits). Only channel 1
goes on to the integrator.

## Frame manager (`data_write`, `coherent_integration`)

A *frame* is 680 consecutive samples (17 µs at 40 Msample/s). `data_write`
packs eight 24-bit samples into each 192-bit memory word, sample 0 in the low
bits, so a frame is 85 words. It stores each frame in a 2 KB slot. The first
word of each frame carries a start-of-frame flag through the FIFO. This keeps
the frame manager aligned even if the FIFO ever overflows (sticky
`overflow`).

The 512 MiB memory is cut into 40 *regions*, one per pulse, of 6553 slots each
(12.8 MiB):

```
byte address = region · 6553 · 2048  +  slot · 2048  +  word · 24
```

A *pulse* is M frames. The frame manager counts `slot` from 0 to M−1 and then
moves to the next region, wrapping after region N−1. There are two phases:

* **Fill phase.** The first N·M frames are written only, with no output. At
  40 Msample/s this takes N·M·17 µs: 68 ms for N=40 and M=100.
* **Circular phase.** Each new frame overwrites the oldest pulse's copy of
  that slot. The manager then reads the same slot from all N regions, in
  region order.

The frame manager never reads and writes memory at the same time. Per frame it
does the following:

1. Wait until a whole frame is in the input FIFO. In the circular phase, also
   wait until every active rake has room for a frame.
2. Write the 85 words.
3. Issue the N × 85 reads.

Reads come back in order. Each returning word is steered to its rake FIFO by
counting. The new frame is written before it is read back, so the sum covers
the current pulse and the N−1 before it.

The memory port is a plain valid/ready command (`mem_cmd_t`: write flag, 29-bit
byte address, 192-bit data) with in-order read data. A controller adapter must
keep read-after-write order. At 300 MHz one frame needs (N+1)·85 memory words
of bandwidth, and the 17 µs frame time leaves room to spare.

A change of N or M, a write of 1 to the restart bit, or a rising enable starts
a new fill phase. The rakes are emptied and old memory contents are ignored.
The sample stream keeps running through a restart. The frame manager drops
input words up to the next start-of-frame flag and begins the fill there.
Clearing enable stops the sample packing, and the frame count starts again
at the next enable.

## Rake buffers and the adder tree

Each active pulse has its own `rake_fifo`: 192 bits wide on the write side and
one 24-bit sample per read. Reading is first-word-fall-through. The frame
manager pops all active rakes together whenever every one of them holds a
sample. Rakes at or above N are left empty, and the adder tree zeroes their
inputs.

`adder_tree` adds I and Q separately, each as signed 24 bits, in three
registered stages:

* stage 1: seven adders of six inputs each (40 inputs; the last group has four);
* stage 2: two adders of four and three partial sums;
* stage 3: one final adder.

The output is `{I_sum, Q_sum}` (48 bits), three clocks after the inputs. The
sums wrap at 24 bits. That matches 12-bit samples and up to 40 pulses with room
to spare (40 · 2047 < 2²³).

Measured from a frame's first sample entering the chip to the first integrated
sample of that frame, the delay is about 23 µs for N=20 and 29 µs for N=40,
with a 300 MHz memory clock and a 20 to 33-cycle memory latency. 17 µs of this
is the frame itself.

## Register map (`ctrl_regs`, AXI4-Lite, 32-bit)

| address | name   | bits | reset |
|---------|--------|------|-------|
| 0x00 | CTRL   | 0: enable; 1: restart (write 1, reads 0) | 0 |
| 0x04 | PULSES | N, 1..40 | 40 |
| 0x08 | DEPTH  | M, 1..18823 (limited to 6553 by the frame manager) | 100 |
| 0x0C | TX_LEN | transmit waveform length in samples | 0 |
| 0x10 | STATUS | 0: circular phase reached; 1: sample FIFO overflow; 2: Ethernet data dropped | – |

Writing PULSES or DEPTH also restarts the fill phase. WSTRB is ignored, and the
responses are always OKAY.

## Transmit path (`waveform_bram`, `ad9361_tx`)

The processor writes a waveform of up to 4096 `{I, Q}` samples into a dual-port
BRAM. On `tx_trigger`, for example from a timer, `ad9361_tx` waits for the next
sample boundary. It then reads TX_LEN samples and sends each one on both
transmit channels, in the same lane format as the receiver, with zeros in
between. The outputs are (rising, falling) pairs meant for output DDR
flip-flops.

## Ethernet uplink (`eth_tx`, `udp_tx`, `rgmii_tx`)

Results go into a 1024-entry dual-clock FIFO, 48 bits each. Results are read
out as bytes: I_sum first, most significant byte first. Once 1500 bytes
(250 results) are waiting, `udp_tx` sends one frame. Its state machine has the
following states:

```
IDLE → CHECK_SUM → PREAMBLE → ETH_HEAD → IP_HEAD → TX_DATA → CRC → IDLE
```

* IDLE: waiting for a start.
* CHECK_SUM: computes the IPv4 header checksum.
* PREAMBLE: 7 × 0x55, then 0xD5.
* ETH_HEAD: the 14-byte header, type 0x0800.
* IP_HEAD: 20 bytes of IPv4 (DF set, TTL 64, the ID counts up) and the 8-byte
  UDP header (checksum 0).
* TX_DATA: the 1500-byte payload.
* CRC: the frame check sequence, the reflected CRC-32 sent low byte first.

A 12-byte inter-frame gap follows. Addresses and ports are parameters:
192.168.1.10:5000 → 192.168.1.100:5000, broadcast MAC by default. `rgmii_tx`
turns the GMII byte stream into RGMII. The low nibble goes on the rising edge
and the high nibble on the falling edge. The control line carries TX_EN, then
TX_EN xor TX_ER.

## Limits and departures

* **Output bandwidth.** Integration runs at the full 40 Msample/s, which makes
  240 MB/s of results. Gigabit Ethernet carries at most 125 MB/s. When the FIFO
  is full, results are dropped and STATUS bit 2 is set, so in steady state
  only about half of the results reach the host. Decimation or a range window
  before `eth_tx` would be needed for a complete stream.
* **Frame depth.** The host may ask for up to 18823 frames per pulse. Forty
  regions of 12.8 MiB hold only 6553 frames of 2 KB, so larger depths are
  clamped. The fixed 40-region layout was kept, so the depth is not traded
  against the pulse count.
* **Frame size.** A 1500-byte UDP payload makes a 1528-byte IP packet, larger
  than a standard 1500-byte MTU. The frame is sent whole, so the receiving
  network card must accept frames of 1546 bytes. Set `PAYLOAD` to 1470 (a
  multiple of 6) for a standard MTU.
* **Frame alignment.** Frames are counted from the first sample after
  enable. There is no pulse-synchronous start, so range bins line up across
  pulses only if the pulse period is a whole number of frames (M · 17 µs).
* The processor, its peripherals (SPI, GPIO, timer, UART, XADC), the DDR4
  controller and the I/O primitives are vendor parts and are not included.

## Files

* `rtl/ci_pkg.sv`: widths, frame and memory constants, types.
* `rtl/ci_system.sv`: the top.
* `rtl/storage_integration.sv`: the chain `data_write` → `coherent_integration` → `adder_tree`.
* `rtl/async_fifo.sv`, `rtl/rake_fifo.sv`: helper FIFOs.
* One file per other block, as named above.
* `tb/tb_<block>.sv`: a self-checking testbench per block. Each prints
  `TB_RESULT checks=… failures=…`.
* `tb/ci_system_harness.sv`: the end-to-end environment shared by the three
  system testbenches. It holds the register writes, the models, the reference
  sums and the RGMII/UDP decoder.
* `tb/tb_ci_system.sv`: end to end at N=3, M=2 and N=20, M=1. It checks every
  integrated sample against a reference model, the UDP frames byte by byte
  (headers, checksum, CRC), the transmit samples, the fill time and the
  output delay. It counts fill phases, circular frames, reconfigurations,
  transmit bursts, UDP frames, Ethernet drops and memory stalls.
* `tb/tb_ci_system_full.sv`: the same harness at the default parameters with
  N=40 and M=100: a 68 ms fill and about 110 s of simulation.
* `tb/tb_ci_system_table1.sv`: the whole system at the default parameters
  with N=20, M=100 (34 ms fill) and then N=40, M=10.
* `tb/tb_integration_gain.sv`: a noisy chirp integrated over 1, 15, 30 and
  40 pulses. It checks that the SNR gain is within 0.5 dB of 10·log10(N)
  (16 dB for 40 pulses).
* `tb/ddr_model.sv`: a behavioural DDR4 stand-in with fixed latency and random
  stalls.
* `tb/ad9361_lvds_src.sv`: a behavioural model of the AD9361 receive lanes.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    rtl/ci_pkg.sv -y rtl -y tb tb/tb_ci_system.sv --top-module tb_ci_system
./obj_dir/Vtb_ci_system
```

Replace `tb_ci_system` with any other testbench name. Simulation sizes are set
by the parameters of `ci_system_harness` in the three system testbenches.
