# Digital Stimulus/Monitor Unit (DSMU)

The DSMU sits between a host PC and a digital device under test. It has eight
channels. The host sets each channel to be either a monitor input or a
stimulus output. All eight channels run from one 5 MHz sampling strobe:

- An input channel copies its pin into a value register once per strobe.
- An output channel replays a stored bit sequence of up to 255 bits, one bit
  every 2**rate strobes. That gives 5 MHz down to about 150 Hz, and the
  sequence repeats.

On every strobe the unit also packs the eight channel values into one byte and
streams it back to the host. Debugging and triggering are left to the host.
The FPGA only samples, replays and moves bytes, so each operation takes a few
clock cycles.

This RTL covers the logic of the original DSMU proposal, which targets a
Spartan-3 board with a USB-to-parallel-port bridge. That logic is the host
register interface, the two USB state machines, the output buffer, the
strobe, and the per-channel state machines, waveform stores and channel
buffers. The proposal describes its blocks and their state diagrams, but not
register numbers, bit layouts or sizes. Those choices are this design's, and
each one is listed below.

## Block diagram

```
 host (USB bridge, parallel port)                         device under test
        |  astb_n dstb_n pwrite pdb pwait                        | 8 plugs
   +----v-----+  in_data/in_valid  +------------+   cfg[8]   +----+---------+
   | usb_ctrl |------------------->| usb_in_fsm |----------->| pin_fsm x8   |
   | 8 regs + |                    |  reprog    |--reprog--->| wave_mem x8  |
   | addr reg |<-- out_reg/status--+------------+  wave wr   | pin_tristate |
   |          |--out_read--+                                 +----+---------+
   +----------+            |       +-------------+  value[8]      |
                           +------>| usb_out_fsm |<---------------+
                                   |   out_fifo  |<-- strobe -- strobe_gen
                                   +-------------+
```

| module | role |
|---|---|
| `dsmu_top` | wires everything; ports are the host parallel port and the eight plugs |
| `dsmu_pkg` | widths, command headers, register numbers, status bits, `pin_cfg_t` |
| `usb_ctrl` | host parallel port: address register, eight data registers, handshake |
| `usb_in_fsm` | receives a configuration, holds the unit in reprogramming mode, commits it |
| `usb_out_fsm` | moves each strobe's byte to the output register or the buffer |
| `out_fifo` | output buffer, 1024 bytes |
| `strobe_gen` | data collection strobe, clock / 10 |
| `pin_fsm` | generic pin state machine, one per channel |
| `wave_mem` | 256-bit waveform store, one per channel |
| `pin_tristate` | In/Out channel buffer: two tri-state buffers per channel |

## Reprogramming: how a configuration reaches the channels

This part needs the most care, because it keeps all the channels consistent.
The host never changes a running channel. Instead:

1. The host writes the first byte of a transmission to input register 0.
   `usb_in_fsm` leaves `WAIT` and raises `reprog`.
2. Every `pin_fsm` sees `reprog` and goes to its reprogramming wait state. Its
   output pin and value register freeze.
3. `usb_in_fsm` parses each byte as it arrives (`COPY`, then `CHECK_END`, and
   back to `COPY` for the next byte):
   - Directions, rates and lengths go into shadow registers. These are preloaded
     with the current configuration, so fields not sent are kept.
   - Waveform bytes go straight into the channel's `wave_mem`. This is safe
     because no channel is running.
4. The start command (header `1100`) ends the transmission. In `INTERPRET` the
   shadow copies are written to `cfg` for all eight channels in one cycle.
   In `SET_RP0` `reprog` drops.
5. Every channel leaves its wait state on the same clock edge and restarts its
   waveform at bit 0. All outputs therefore start together.

### Command bytes

The command header is the upper nibble of a command's first byte. The four
header codes and the field sizes come from the proposal's protocol. The
packing of the fields into bytes is this design's.

| command | bytes |
|---|---|
| prepare | `1001 xxxx` |
| directions and rates | `1010 xxxx`, `D`, `F0`, `F1`, `F2`, `F3`. In `D`, bit *i* = 1 makes channel *i* an input. `Fk = {rate[2k+1], rate[2k]}`, four bits each |
| waveform | `1011 0ppp`, `L`, then ceil(L/8) data bytes. `ppp` = channel, `L` = length in bits (0 = no waveform, the pin drives 0). Sequence bit *n* is bit *n mod 8* of data byte *n/8*, so the first bit sent is the LSB of the first byte |
| start | `1100 xxxx`: commit and run |

Bytes with an unknown header are ignored. A typical transmission is: prepare,
directions and rates, one waveform command per output channel, then start.

### Rate code

An output channel writes one waveform bit every 2**rate strobes. Rate 0 is the
full 5 MHz strobe rate and rate 15 is about 153 Hz. The proposal gives the code
a width of four bits and says the strobe is the maximum rate. The power-of-two
mapping is this design's.

## The stream back to the host

On every strobe outside reprogramming, `usb_out_fsm` captures the eight value
registers as one byte. Bit *i* is channel *i*.

- For an output channel, the bit is the bit currently driven on the pin.
- For an input channel, the bit is the pin as sampled at the previous strobe.

The byte then takes one of two paths:

- The host has read the output register (new-data status bit clear) and the
  buffer is empty: the byte goes straight to output register 1 (`MOVE`) and
  the new-data bit is set.
- Otherwise the byte is pushed onto `out_fifo` (`PUSH`).

While no byte is pending, the buffer is not empty and the host has read the
register, the oldest buffered byte moves to the output register (`POP`).

When the host reads register 1, `usb_ctrl` pulses `out_read`, which clears the
new-data bit.

If a byte finds the buffer full, it is dropped and the sticky overflow status
bit is set. The overflow bit is cleared when the next reprogramming starts.
The buffer is not flushed on reprogramming, so the host may still receive
bytes taken before the new configuration.

At 5 MHz the stream is 5 Mbyte/s. A host that polls status and data through the
parallel port cannot keep up with that for long. The 1024-byte buffer covers
about 200 µs of falling behind, and after that the overflow bit reports the
losses. Loss-free streaming at full rate depends on the host side and cannot
be promised by this logic.

Two details differ from a literal reading of the proposal's output-state
diagram:

- The wait state's self-loop there reads "(data read || buffer empty)", which
  overlaps the arc that drains the buffer. This design follows the prose: the
  buffer drains whenever the register has been read.
- `MOVE` additionally requires an empty buffer, so that bytes never overtake
  older buffered ones.

Each strobe is also captured in a one-entry holding register, so a strobe that
arrives while the machine is busy is never missed.

## Host parallel port (`usb_ctrl`)

The board's USB bridge makes the host appear as an 8-bit parallel port. The
port has an address register and eight data registers, and is controlled by
`pwrite`, `astb_n` (address strobe) and `dstb_n` (data strobe). One access
works like this:

1. The host sets `pwrite`. For a write it also drives `pdb_i`.
2. The host pulls a strobe low.
3. The unit performs the access and raises `pwait`. On a read it drives
   `pdb_o` with `pdb_oe` high.
4. The host releases the strobe, and the unit drops `pwait`.

The strobes pass through two-flop synchronisers, so the host side may be
asynchronous.

| register | use |
|---|---|
| 0 | configuration bytes, host writes; each write pulses `in_valid` |
| 1 | pin-value byte from `usb_out_fsm`; a completed read pulses `out_read` |
| 2 | status: bit 0 new data, bit 1 overflow, bit 2 reprogramming |
| 3-7 | plain read/write scratch registers |

The proposal fixes the eight-register structure, the three control signals
and the use of an input, an output and a status register. The register
numbers, the status layout, the active-low strobes, the `pwait` handshake and
the split data bus are this design's. On the board this machine is the
vendor's code; the version here is a minimal one that does the same job.

## Channels

`pin_fsm` has five states:

| state | what it does |
|---|---|
| `WAIT_RP` | reprogramming wait |
| `COLLECT` | input: sample the pin on each strobe |
| `RESET_CNT` | output: load the rate counter |
| `WAIT_CNT` | output: count strobes down |
| `WRITE_OUT` | output: drive the next bit on the pin and into the value register |

Input pins go through a two-flop synchroniser.

The unit has no "disabled" channel state. A channel the host wants unused is
configured as an input, which leaves its plug undriven. This is also the reset
state of every channel.

`pin_tristate` is the external channel circuit. It has two tri-state buffers
and an In/Out select (`in_nout`, 1 = input), so the FPGA's input pin and
output pin of a channel are never both connected to the plug. In the top,
one instance covers all eight channels. The unit's channels are specified as
5 V signals. Level translation is an electrical property of that circuit and is
not modelled.

## Timing

- Clock 50 MHz (`CLK_HZ`, an assumption). Strobe every 10 clocks
  (`STROBE_HZ` = 5 MHz). `strobe_gen` needs at least 3 clocks per strobe, and
  `usb_out_fsm` needs 4 to take one byte per strobe.
- Output bit: changes 2 clocks after the strobe that ends its period.
- Input: sampled at the first strobe that comes at least 2 clocks after the
  pin changed. It reaches the stream at the following strobe.
- A parallel-port access is performed, and `pwait` raised, 4 clocks after the
  strobe falls. `pwait` drops 3 clocks after the strobe rises.
- `reprog` rises about 3 clocks after the first configuration byte is written.
  Channels restart 2 clocks after the start byte is parsed.

## Parameters

| parameter | default | where |
|---|---|---|
| `CLK_HZ` | 50 000 000 | `dsmu_top`, `strobe_gen` |
| `STROBE_HZ` | 5 000 000 | `dsmu_top`, `strobe_gen` |
| `FIFO_DEPTH` | 1024 | `dsmu_top`, `out_fifo` (power of two) |
| `NPINS`, `FREQ_W`, `LEN_W`, `WAVE_BITS` | 8, 4, 8, 256 | `dsmu_pkg` |

The channel count, 5 MHz, 4-bit rates and 8-bit lengths come from the
proposal. The clock, buffer depth and waveform store size are chosen here. The
waveform store holds every length an 8-bit length field can express.

## Simulating

Each testbench in `tb/` checks its results and ends with a
`TB_RESULT checks=N failures=M` line. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dsmu_pkg.sv rtl/dsmu_top.sv \
    tb/dsmu_tb_env.sv tb/tb_dsmu_full.sv --top-module tb_dsmu_full
./obj_dir/Vtb_dsmu_full
```

`-Irtl` lets Verilator find the remaining modules by file name. For a block
test, swap in the block's module and `tb/tb_<block>.sv`. `tb_usb_out_fsm` also
needs `rtl/out_fifo.sv` on the command line or on the include path.

| testbench | what it covers |
|---|---|
| `tb_dsmu_full` | whole unit with every parameter at its default; described below |
| `tb_dsmu_top` | same sequence with a 1 MHz strobe, described below |
| `tb_usb_in_fsm` | random full configurations, partial updates, ignored bytes; checks `cfg` against a model, waveform writes, and that `reprog` covers the whole transmission |
| `tb_usb_out_fsm` | fast, slow and stalled host models: direct path, buffered path, in-order delivery, overflow |
| `tb_pin_fsm` | rates 0, 1 and 3, several lengths including 0 and 255, checked strobe by strobe; input sampling; freezing during reprogramming |
| `tb_usb_ctrl` | every register type through the handshake; exactly one `in_valid` / `out_read` per access |
| `tb_out_fifo`, `tb_wave_mem`, `tb_strobe_gen`, `tb_pin_tristate` | the leaf blocks against simple models |

Both whole-unit testbenches share `dsmu_tb_env`. They contain a host model of
the parallel port and a device model that drives the input channels with
random data. The device model also wires output channel 0 back to input
channel 1. Each run:

1. fills the buffer until it overflows;
2. loads a configuration, then checks every output channel strobe by strobe
   against a model of its waveform, rate and common start;
3. loads a second configuration that swaps directions, and checks again.

Checks on the received stream:

- `tb_dsmu_full` cannot let the host keep up with 5 MHz, so it checks that the
  received stream is in order.
- `tb_dsmu_top` uses a 1 MHz strobe, which the host model can keep up with. It
  checks the stream byte for byte against a model, including the loop-back
  (bit 1 of each byte equals bit 0 of the byte before).

The environment reads a few internal signals of the unit: the strobe and
`reprog` to line its models up in time, and the output state machine and
buffer controls to count mechanisms. Every value it checks is taken at the
unit's pins and parallel port.

Both count each mechanism (reprogramming, direct move, buffer push and pop,
overflow, direction change, output writes, input samples) and fail if one
never happens.

## Not included

- The USB bridge chip and its firmware, and the host software (GUI, threads,
  data logging, triggers). The top's parallel-port pins are where the bridge
  connects. The testbenches contain a simple host model.
- The fallback arrangement with dedicated input and output pins. The proposal
  keeps it only as a last resort if the board cannot free enough pins.
- Synthesis for size: the Yosys/slang flow used for size estimates does not
  accept an `inout` connection into a submodule (`pin_tristate` inside
  `dsmu_top`). The sub-blocks synthesise on their own, and the RTL is plain
  synthesizable SystemVerilog.
