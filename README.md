# cPCAP: self-reconfiguration of a Spartan-3 through its own SelectMAP port, with compressed bitstreams in block RAM

A plain Spartan-3 has no internal configuration access port (ICAP), so it cannot
rewrite part of its own configuration from inside. It does have a slave
SelectMAP port: an 8-bit parallel configuration interface on dedicated pins.
This design wires eleven user I/O pins of the device back to its own SelectMAP
pins (D[0:7], CSI_B, RDWR_B, CCLK) and puts a small core, cPCAP, behind them.
The core reads a partial bitstream from on-chip block RAM and writes it into the
port one byte per clock. At a 50 MHz CCLK that is 50 MByte/s. The device is
then master and slave of its own configuration, and needs no processor, no
external PROM and no other agent.

The second idea is to keep the partial bitstreams **compressed** in the block
RAM and to expand them while they are being sent. A partial bitstream consists
mostly of long runs of 0x00 and 0xFF, so a run-length code shrinks it several
times. The decoder is built so that expanding costs no configuration time: the
port still gets one byte per clock. The demonstration system keeps two 5 KByte
bitstreams in a single 2 KByte block RAM. One sets a DCM output to 5 MHz and
the other sets it to 50 MHz. The DCM clocks a 4-bit up-down counter, and the
system switches the counter's clock at run time, in about 0.1 ms per switch.

## System

```
            +-------------------------- FPGA -------------------------------+
            |                                                               |
            |  +-----------+  rd_addr   +-------------------------------+   |
 load_* --->|  | cpcap_bram|<-----------| cpcap_core                    |   |
            |  | 2048 x 8  |----------->|  cpcap_decompressor           |   |   smap_d[7:0]
            |  +-----------+  rd_data   |   address counter, 4-byte     |---+-> smap_csi_b   --+
            |                           |   look-ahead, run decoder     |   |   smap_rdwr_b    |  external
 reconfig_* |-------------------------->|  cpcap_ctrl (SelectMAP FSM)   |   |   smap_cclk      |  loop-back
            |                           +-------------------------------+   |                  |  wires
            |  reconfigurable area: updown_counter4 (app_clk from a DCM)    |                  |
            |                                                               |                  |
            |  SelectMAP configuration port (device silicon, M2..M0=110)  <-+------------------+
            +---------------------------------------------------------------+
```

The top module, `cpcap_system`, holds the block RAM, the core and the counter.
The SelectMAP port and the DCMs are hard blocks of the device and have no RTL
here. The top's SelectMAP outputs are the pins that the external wires take
back to the port. `smap_mode` gives the mode pin levels M2 M1 M0 = 1 1 0 (slave
parallel). `clk` is the 50 MHz configuration clock, which is DCM CLK0 on the
board. The core also forwards it as `smap_cclk`. `app_clk` is the reconfigurable
DCM output that drives the counter.

On the board the RAM contents come with the initial configuration: the
compressed bitstreams are built into the RAM's initial values before the full
bitstream is generated. In the RTL you can fill the RAM in two ways: through
the `load_*` write port, or at time zero from a hex file named by `INIT_FILE`.

## The compressed bitstream format

The RAM holds byte tokens. `ESC` is 0xC3 (parameter `RLE_ESC`). It was picked
because it is not 0x00, not 0xFF and not part of the sync word AA995566.

| stream bytes       | output                          |
|--------------------|---------------------------------|
| `b` (b != ESC)     | `b`                             |
| `ESC 00`           | one byte equal to ESC           |
| `ESC n v`, n=1..255 | `v` repeated n times            |

A run longer than 255 bytes is split into several tokens. A bitstream can be
stored anywhere in the RAM. The core is told its first and last address. Any
number of bitstreams fit, as long as their compressed sizes fit in 2048 bytes.
A bitstream need not line up with a block RAM either. Raising `BRAM_DEPTH`
(and with it the address width) makes one store out of several block RAMs,
for example 6 x 2048 bytes to hold the same two bitstreams uncompressed.

The encoder is a host-side program. Its rule, which the testbench function
`cpcap_tb_pkg::encode` also follows, is:

- three or more equal bytes become `ESC n v`;
- two or more ESC bytes in a row also become `ESC n ESC`;
- a single ESC byte becomes `ESC 00`;
- every other byte is copied.

## Decoding at one byte per clock

This part needs the most care. A token can be up to three bytes long, but the
RAM gives only one byte per clock. A naive decoder would stall for two clocks
at every run. `cpcap_decompressor` avoids the stall with two stages:

* **Fetch.** An address counter runs from `start_addr` to `final_addr`. It
  issues a RAM read in every clock in which the byte will fit into a 4-byte
  look-ahead buffer. The count it uses includes the byte still in flight from
  the RAM (one clock of read latency) and the bytes that leave the buffer in
  the same clock.
* **Decode.** The decoder looks at buffer bytes 0 to 2 together:
  - A literal leaves the buffer one byte per clock, which is also the rate at
    which the fetch stage refills it. The buffer level stays constant.
  - On the first byte of a run, all three token bytes leave at once.
  - For the rest of the run, the byte comes from a run counter. In those
    clocks nothing leaves the buffer, so it refills.

  A run of n bytes takes 3 bytes from the buffer. It also gives the buffer
  n - 1 clocks to refill. With n >= 3 the buffer holds three bytes again by
  the time the next token is examined.

So the output is exactly one byte per clock, provided two things hold:

- the stream starts with a full buffer. The controller waits for `primed`
  before it asserts CSI_B, which guarantees this.
- it contains no "slow" token. A slow token is `ESC 00`, or a run shorter than
  three bytes, which only the `ESC ESC` case produces.

Each slow token uses more stream bytes than it produces. It can cost at most
one gap in the output. For real configuration data the escape byte is rare,
so gaps are rare too. The testbenches check both the exact one-byte-per-clock
case and this bound.

`done` pulses once the last address has been read and every buffered token has
been sent. A stream that ends inside a token (for example a stray ESC as the
final byte) ends the job with `error` set. The incomplete token is dropped.

## SelectMAP write sequence

`cpcap_ctrl` drives the port from flip-flops, in this order:

```
clk          _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_ ... _|‾|_|‾|_ ... _|‾|_|‾|_|‾|_
start        _/‾‾‾\___________________________________________________
RDWR_B       ‾‾‾‾‾‾‾\_____________________________ ... ________/‾‾‾‾‾‾
CSI_B        ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__________ ... _____________/‾‾‾‾‾‾‾‾‾‾‾‾
D                           | b0 | b1 | ... | bN | 20 00 00 00 20 00 00 00 |
             (1 clk)  (>=1 clk, until primed)    (8 null-op bytes)  (1 clk)
```

1. RDWR_B goes low (write), and the decompressor starts.
2. CSI_B goes low at least `RDWR_SETUP` = 1 clock later, once the decompressor
   is primed (a few clocks after start).
3. One byte is sent per clock until the final address has been used up.
4. The port then gets `NULL_CYCLES` = 8 more bytes. These are two Type-1 NOOP
   packets (0x20000000), so the configuration logic can flush its pipeline.
5. CSI_B goes high.
6. RDWR_B goes high exactly one clock after CSI_B.

If the decompressor has a gap, CSI_B is high for that clock while RDWR_B stays
low. The port treats this as a pause, not an abort.

The port samples D at every rising CCLK edge while CSI_B is low. CCLK is the
controller's own clock, so every registered value is sampled at the next edge.
BUSY is ignored by default (`USE_BUSY = 0`). Up to 50 MHz the Spartan-3
SelectMAP port never holds off a byte, and the design is meant for that range.

For faster clocks, setting `USE_BUSY = 1` turns on an optional BUSY path. The
port's BUSY pin then comes in as `smap_busy`. Suppose a rising edge finds BUSY
high while CSI_B is low. The byte on D was not taken, so the controller keeps
D, CSI_B and its own state for that clock, and the decompressor waits too.
This path is only tested against the pin model. It has not been tried at
speeds above 50 MHz. PROG, INIT and DONE are
used only for full configuration and are not driven. The byte's bit 7 drives
pin D0, which is the MSB-first bit order of Spartan-3 SelectMAP.

## Modules

| file | role |
|------|------|
| `rtl/cpcap_pkg.sv` | escape byte, NOOP word, mode pins, controller states, SelectMAP output struct |
| `rtl/cpcap_bram.sv` | 2048 x 8 dual-port RAM with a 1-clock read; port B only loads it |
| `rtl/cpcap_decompressor.sv` | address counter, look-ahead buffer, run-length decoder |
| `rtl/cpcap_ctrl.sv` | SelectMAP write sequence |
| `rtl/cpcap_core.sv` | cPCAP core: decompressor + controller, CCLK forwarding |
| `rtl/updown_counter4.sv` | example user circuit: 4-bit up-down counter |
| `rtl/cpcap_system.sv` | top: RAM, core, counter, loop-back pins |

The core's control interface works as follows:

- Pulse `start` with `start_addr` and `final_addr` set.
- `busy` stays high until RDWR_B has been released.
- `done` pulses once at the end.
- Requests made while busy are ignored.

Every module's parameter defaults are the design's real sizes:

| parameter | default | meaning |
|-----------|---------|---------|
| `BRAM_DEPTH` | 2048 | bytes, one 18 Kbit block RAM |
| `RLE_ESC` | 0xC3 | escape byte |
| `NULL_CYCLES` | 8 | null-op bytes |
| `RDWR_SETUP` | 1 | clocks before CSI_B |
| `USE_BUSY` | 0 | obey the port's BUSY pin |
| `WIDTH` | 4 | counter width |

## What follows the original design and what is this design's own

These parts follow the original design:

- the self-loop through the SelectMAP port;
- the block RAM as bitstream store, read one byte per clock;
- decompression during transfer, at the transfer rate;
- the order of the port control steps, with the one-clock gaps and at least
  8 null-op cycles;
- mode pins 110, BUSY left unused, CCLK at 50 MHz;
- two 5 KByte bitstreams in one block RAM;
- the 4-bit up-down counter clocked at 5 or 50 MHz.

These are this design's own choices:

- **The compression code.** The original design gives no algorithm, only that
  it saves at least about 76 % of the space. The run-length code above was
  chosen as the simplest code that can be decoded at one byte per clock. How
  much it saves depends on the bitstream. Two 5120-byte bitstreams fit in
  2048 bytes only if the saving is 80 % or more. The synthetic test bitstreams
  reach 82 %. Real DCM-reconfiguration bitstreams were not available to
  measure.
- The look-ahead buffer, the `primed` wait, the valid/ready handshake inside
  the core, the CSI_B pause on a gap, and the `error` flag.
- The NOOP byte pattern for the null-op cycles.
- The BUSY hold rule, when `USE_BUSY` is set. It follows the pin behaviour of
  the device.
- The `load_*` port and `INIT_FILE`.
- The counter's enable and direction inputs.
- Asynchronous active-low resets.
- How a reconfiguration is requested: user logic passes the first and last
  RAM address of a bitstream.

Not in the RTL:

- the SelectMAP port and the configuration memory it writes;
- the DCMs;
- the program that compresses `.bit` files and turns them into RAM contents.

A clock-domain note: `app_clk` and `clk` are unrelated. The counter shares no
signal with the core, so no synchronisers are needed.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/cpcap_pkg.sv tb/cpcap_tb_pkg.sv tb/tb_cpcap_system.sv \
    --top-module tb_cpcap_system -o sim && obj_dir/sim
```

Replace the testbench name to run another one.

| testbench | what it shows |
|-----------|---------------|
| `tb_cpcap_bram` | random write/read-back of all 2048 bytes, read latency, hold |
| `tb_cpcap_decompressor` | literals, short and long runs, escape bytes, synthetic bitstreams, back-pressure, truncated stream; exact one-byte-per-clock output without slow tokens, at most one gap per slow token |
| `tb_cpcap_ctrl` | RDWR_B/CSI_B order and gaps, bytes followed by 8 NOOP bytes, pauses, gap-free bursts |
| `tb_cpcap_core` | three bitstreams through RAM + core into a SelectMAP pin model; sync word, byte-exact output, burst length |
| `tb_cpcap_core_busy` | core with `USE_BUSY = 1` against a port that raises BUSY in 30 % of the clocks; byte-exact output, burst length |
| `tb_updown_counter4` | counting both ways, wrap, enable, reset |
| `tb_cpcap_system` | the full-size clock-switching scenario, described below |

`tb_cpcap_system` runs with all top parameters at their defaults:

- It builds two synthetic 5120-byte bitstreams, compresses them and checks
  that both fit in the RAM.
- It loads them and writes 5 MHz, 50 MHz and 5 MHz in turn.
- For each write it checks the exact byte stream and the sync word.
- It checks that the 50 MHz bitstream takes 5128 clocks, about 0.103 ms.
- It checks the counter's step rate after each clock switch.
- It requires each mechanism to occur at least once: literal, run and
  escaped-literal tokens, output pauses, null ops, sessions, clock switches,
  and counting up and down.

It finishes in well under a minute.

Support files in `tb/`:

- `selectmap_model.sv` is a behavioural model of the port's pins. It captures
  the bytes, flags RDWR_B changing while CSI_B is low, spots the sync word and
  counts pauses. It can also raise BUSY at random.
- `cpcap_tb_pkg.sv` holds the reference encoder and decoder and the synthetic
  bitstream generator. The generated bitstreams have the Spartan-3 packet
  framing (dummy word, sync word, CMD/FAR/FDRI packets, DESYNC, NOOPs) around
  sparse frame data. They are not real device bitstreams.
