# QSFP-to-USB3.0 data exchange firmware

Readout electronics under test often deliver their data over an optical
QSFP link, while the test PC only has USB. This board sits between the two.
An Artix-7 FPGA (XC7A35T) terminates the optical link with an Aurora 64B/66B
core on its GTP transceivers. The FPGA hands the data to an FTDI FT601
USB3.0-to-FIFO bridge, and the FT601 streams it to the PC. The target is
data streams of up to 300 MB/s. The FT601 bus is 32 bits at 100 MHz, so
400 MB/s is the ceiling, and about 350 MB/s is reached in practice.

This repository holds the FPGA side of that data path, written in
SystemVerilog. It is set up for the board's self-test. The FPGA makes a
known test pattern itself and sends it out over the optical link. A
loopback in the optical module brings it back. The FPGA then forwards what
it received to the PC, where the stored files can be compared with the
pattern.

```
 gen_clk          |          user_clk            |          ft_clk
                  |                              |
 data_gen --> tx FIFO --> tx_* ==> Aurora TX ==> QSFP loopback
                  |                              |
 Aurora RX ==> rx_* --> data_width_conv --> rx FIFO --> ft601_tx --> FT601 pins
                  |      (64 -> 32 bit)          |
```

`==>` marks parts outside this RTL. These are the Aurora 64B/66B core, the
GTP transceivers, the optical module and the FT601 chip. The top module
`qsfp_usb_top` brings out their interfaces as plain ports.

## The test pattern

`data_gen` produces a 16-bit counter: 0, 1, 2, ... 65535, 0, 1, ... It
packs four consecutive values into each 64-bit Aurora word, with the first
value in bits 15:0. The width convertor sends the low half of each word
first. The FT601 puts DATA[7:0] first on the USB byte stream. So the PC
file, read as little-endian 16-bit integers, is the plain ramp. A
saw-tooth with period 65536 is what the original test showed on the PC.

The counter advances only when a word is actually taken (`m_valid &&
m_ready`). Back-pressure therefore never leaves a gap in the ramp, and any
jump in the stored data points to a real loss. `en` starts and stops the
stream. The top gates `en` with the Aurora `channel_up` status, after
synchronising both into `gen_clk`.

## Writing into the FT601 (`ft601_tx`)

This is the part with the least room for error. The FT601 runs in its
"245 synchronous FIFO" mode:

* the FT601 drives the bus clock CLK, nominally 100 MHz;
* TXE_N, driven by the FT601, is low while its transmit buffer has room;
* the FPGA drives DATA[31:0], BE[3:0] and WR_N;
* a word is written on a rising CLK edge at which **both TXE_N and WR_N
  are low**.

TXE_N can rise at any edge, and the FPGA only sees it one edge late.
`ft601_tx` therefore treats the output pins as a one-word register:

* DATA, BE and WR_N come straight from flip-flops clocked by CLK.
* When a word is loaded, WR_N goes low. The word stays on the bus until an
  edge at which TXE_N is low. That edge is the write.
* At that same edge the next word from the FIFO is loaded (`s_ready =
  WR_N || !TXE_N`). A stream of words therefore moves one per CLK.
* If TXE_N is high, nothing changes. The word is neither lost nor written
  twice.

There is no extra cycle between words. While TXE_N stays low the bus
carries 4 bytes per CLK, which is 400 MB/s at 100 MHz. BE is always 4'hF
because every word is full. The module never reads from the FT601, so RD_N
and OE_N stay high and the FT601 never drives the bus. `ft_data_oe` is the
drive enable for the DATA/BE pads. It goes high one cycle after reset.
`word_count` counts written words.

## Clock domains and the FIFOs

There are three clocks:

* `gen_clk` for the pattern generator;
* `user_clk` for the Aurora user interface and the width convertor;
* `ft_clk`, which comes from the FT601.

The two FIFOs of the data path are one dual-clock module, `async_fifo`.
They carry the data across these clocks:

| instance    | width | depth (parameter)      | write clock | read clock |
|-------------|-------|------------------------|-------------|------------|
| `u_tx_fifo` | 64    | 512 (`TX_FIFO_DEPTH`)  | gen_clk     | user_clk   |
| `u_rx_fifo` | 32    | 1024 (`RX_FIFO_DEPTH`) | user_clk    | ft_clk     |

`async_fifo` uses the usual construction. Each side has a binary pointer
one bit wider than the address, plus its gray-code copy. The gray copy is
passed through two flip-flops into the other domain. The FIFO is full when
the write pointer equals the synchronised read pointer with its two top
bits inverted. It is empty when the pointers are equal. Both flags can only
be late, never early, so the FIFO cannot overflow or underflow. The read
side is first-word fall-through: `r_data` is valid whenever `r_valid` is
high. A word shows up at the read side about three read clocks after it is
written. The memory is a plain array with an asynchronous read. On the
FPGA this maps to distributed RAM. For block RAM, a registered read stage
would have to be added.

Each domain has its own `reset_sync`. It asserts asynchronously with
`rst_n` and releases after two local clock edges.

## Width conversion (`data_width_conv`)

Each 64-bit RX word becomes two 32-bit words, low half first. A 64-bit
holding register and a part counter do the work. A new wide word is taken
in the same cycle that the last part of the old one leaves. The output
therefore stays busy every cycle as long as input keeps coming. It accepts
at most one wide word every two cycles.

## Flow control, and what happens when the PC is slow

Every internal link is a valid/ready stream. On the transmit side, the
Aurora `tx_tready` stalls the tx FIFO, and a full tx FIFO stalls the
generator. On the receive side, the FT601 stalls through TXE_N. The rx FIFO
then fills, and the convertor stops taking RX words (`rx_tready` low).

A plain Aurora RX user interface cannot be stalled. The input
`rx_can_stall` says which situation applies:

* `rx_can_stall = 1`: the RX source honours `rx_tready`, as in a loop with
  flow control or in the simulation models. Back-pressure then reaches all
  the way to the generator, and nothing is lost.
* `rx_can_stall = 0`: a word offered while `rx_tready` is low is lost. The
  sticky `rx_overflow` flag records it. Only a reset clears the flag. In
  this mode the data rate on the link must stay below what the PC drains.
  That is why the board is specified for streams under 300 MB/s, against
  the ~350 MB/s the FT601 sustains.

## Rates

| link                              | capacity                                   |
|-----------------------------------|--------------------------------------------|
| FT601 bus, 32 bit × 100 MHz       | 400 MB/s (one word per CLK, tested)        |
| measured USB throughput           | ~350 MB/s (modelled as 7 of 8 CLK cycles)  |
| Aurora user interface, 64 bit     | 8 bytes × user_clk (300 MB/s needs ≥ 37.5 MHz) |
| width convertor                   | 4 bytes × user_clk                         |

## Where this RTL departs from, or adds to, the original design

The chain of blocks follows the original firmware block diagram: generator,
FIFO, Aurora, optical loopback, width convertor, FIFO, FT601 transmission
module. So do the ramp test pattern and the self-loopback test. The
following are this implementation's own choices. The original leaves them
open or leaves them to vendor documentation:

* the 64-bit Aurora word, with one lane assumed;
* the 16-bit sample, read from the saw-tooth of the original read-out;
* little-endian packing;
* three separate clock domains, dual-clock FIFOs and their depths;
* register-held FT601 write timing, with write-only use;
* the `rx_tready` / `rx_can_stall` / `rx_overflow` mechanism, and reset
  handling.

Not included: the Aurora 64B/66B core and GTP transceivers (vendor IP),
the QSFP module, the FT601 chip, and the board's MUX chip, USB-to-JTAG/UART
bridge and PC software. There is no PC-to-FPGA direction, because the
original moves data only toward the PC.

## Files

| file | contents |
|------|----------|
| `rtl/qsfp_usb_pkg.sv` | bus widths (64, 32, 16) and word types |
| `rtl/data_gen.sv` | ramp generator |
| `rtl/async_fifo.sv` | dual-clock FIFO (both FIFOs) |
| `rtl/data_width_conv.sv` | 64 → 32 bit convertor |
| `rtl/ft601_tx.sv` | FT601 write interface |
| `rtl/reset_sync.sv`, `rtl/sync_2ff.sv` | reset and level synchronisers |
| `rtl/qsfp_usb_top.sv` | top level |
| `tb/aurora_loopback_model.sv` | behavioural Aurora + optical loopback (in-order delay, periodic `tx_tready` gaps, optional RX back-pressure) |
| `tb/ft601_model.sv` | behavioural FT601 FIFO side (CLK, TXE_N from a 1024-word buffer drained by the USB side) |
| `tb/tb_*.sv` | self-checking testbenches |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5, from
the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/qsfp_usb_pkg.sv tb/tb_qsfp_usb_top.sv --top-module tb_qsfp_usb_top
./obj_dir/Vtb_qsfp_usb_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_data_gen` | ramp order across wraps under random stalls and start/stop; one word per cycle |
| `tb_async_fifo` | order and integrity across two unrelated clocks; reaches full and empty (depth 16) |
| `tb_data_width_conv` | low-half-first split, hold under stall, one narrow word per cycle |
| `tb_ft601_tx` | every word written once under random TXE_N; one word per CLK when TXE_N stays low |
| `tb_qsfp_usb_top` | whole loop at default sizes. The ramp arrives intact through two wraps. It exercises TXE_N stalls, rx and tx back-pressure and generator stalls. It measures 400 MB/s with a free USB side and 350 MB/s at 7/8 drain, checks that word counts agree across the 64→32 split, and makes `rx_overflow` fire with a non-stallable RX |
| `tb_file_transfer` | ten 8192 KB "files" (2,097,152 words each) at 350 MB/s drain: 0 value errors, 64 ramps per file; `+files=N` changes the count (about 5 s of simulation per file) |

The design modules also carry assertions: a stalled stream must hold its
data. With `--assert`, a violation stops the simulation.
