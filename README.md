# ABC-N digital core

The ABC-N is a binary readout chip for silicon-strip detectors. It has 128 channels. For every 25 ns beam crossing it keeps one bit per channel: did the strip cross the threshold or not. It holds this history for up to 6.4 µs, until the experiment's level-1 trigger (L1) decides whether that crossing is worth keeping. On an L1, the chip copies three crossings around the triggered one into a derandomizing buffer. It then reduces each stored event to the channels whose 3-bit pattern passes a selectable criterion. The result is sent as a compact bit stream. Up to 40 chips on a module share one output line: they are daisy-chained by a token, and one *master* chip frames the whole module's data with a header and trailer.

This repository holds synthesizable SystemVerilog for the digital part of the chip, one module per file in `rtl/`. It also holds self-checking testbenches for every block and for a three-chip module in `tb/`. The analog front end, the DACs, the calibration chopper, the fine delay line, the LVDS pads and the regulators are not modelled. Their digital controls are brought out as ports of `abcn_top`, and the 128 discriminator outputs come in as `hits`.

## Data path at a glance

```
hits[127:0] -> input register -> pipeline (256 x 144) -> readout buffer (128 x 180) -> data compression -> readout logic -> data port / Ldo
              (latch, edge det.,  (+ 8-bit BC count)     (42 events, + L1 and BC tags)  (criterion scan)    (packets, token chain)
               mask / test pulse)
command -> command decoder -> L1, soft reset, BC reset, test / calibration pulses, register load and read-back, chip mode
```

| Module | Role |
|---|---|
| `abcn_top` | the chip's digital core: it wires everything below together and builds the status registers |
| `abcn_pkg` | widths, criteria, chip modes, register addresses, command codes and packet constants |
| `abcn_io_select` | chooses one of the two redundant clock/command/BC/L1 input sets (`sel`) |
| `abcn_clock_rate` | derives the beam-crossing enable `bc_en` from a 40, 80 or 160 MHz readout clock |
| `abcn_input_register` | input latch, edge detection, channel mask and test pattern |
| `abcn_pipeline` | L1 latency memory, two RAM banks of 128 × 144, with a built-in self test (BIST) |
| `abcn_readout_buffer` | derandomizing FIFO of 128 × 180 holding 42 events, with a BIST |
| `abcn_data_compression` | scans one event for channels that pass the criterion |
| `abcn_readout_logic` | packet serializer and forwarder of downstream data |
| `abcn_readout_controller` | L1 and BC counters, master/end roles, master token generation, the Ldo output |
| `abcn_command_decoder` | serial command parser, register access and chip modes |
| `abcn_cached_register` | 16-bit SEU-protected register (triple copy, vote, auto-correction) |
| `abcn_serial_register` | plain shift register (mask, calibration delay, trim write word) |
| `abcn_trim_latches` | per-channel 5-bit trim DAC codes |
| `abcn_calibration_logic` | calibration strobe and calibration line selection |
| `abcn_token_data_ports` | direction control of the bidirectional token and data ports |
| `abcn_sdp_ram`, `abcn_mem_bist` | helper modules: a read-first dual-port RAM and a checkerboard memory test |

## Clocking and reset

The whole core runs in a single clock domain: the selected readout clock. The pins `clkmode80` and `clkmode160` say whether that clock runs at 80 or 160 MHz rather than 40 MHz. Logic that works at the beam-crossing rate advances only when `bc_en` is high:

- the input register, pipeline writes, the BC counter, and command bit sampling.

The readout path runs at the full readout clock, so the output bit rate equals the readout clock frequency:

- the buffer reads, the compression scan, the serializer, and token passing.

`bc_en` is high every clock at 40 MHz. At 80 and 160 MHz, `abcn_clock_rate` samples the BC input on the readout clock. It restarts its divider on each rising BC edge, so `bc_en` stays locked to the crossings.

There are two resets:

- `hardreset_b` is the asynchronous, active-low hard reset.
- The *soft reset* command is synchronous. It clears the counters, the buffers, the overflow flag and the SEU flags. It leaves the configuration alone.

## Pipeline and trigger timing

The pipeline writes one 144-bit word per crossing: 128 hit bits plus the 8-bit BC count (the top 8 bits are unused). The memory is two banks of 128 words, 256 words deep.

The L1 delay register (`DELAY[7:0]`) holds the trigger latency in crossings. An L1 reads three successive words, on three successive crossings: the crossing before the triggered one, the triggered one, and the one after. The readout buffer stores them with the event tags:

- the 4-bit L1 count, taken before the increment, so the first event after a reset carries 0;
- the BC count of the centre word.

Exact alignment, which `tb_abcn_top` checks:

- A hit present on `hits` in crossing *k* is the centre sample of an L1 command whose last bit arrives in crossing *k + DELAY + 1*.
- For the external L1 input it is the crossing *k + DELAY + 2*.
- An L1 that arrives while the previous one is still reading is ignored.

The external L1 inputs (`lone0/1`) are accepted unless `DELAY[9]` (L1 mode: command only) is set.

The input register can modify what enters the pipeline:

- **Edge detection** (`CFG1[7]`): a channel counts as hit only in the first crossing of a signal.
- **Mask**: a 0 in the 128-bit mask register silences a channel.
- **Test mode** (`CFG1[8]`): the mask pattern itself is written every crossing.
- **Test pulse command**: the mask pattern is written for one crossing.

## Derandomizer and overflow

The readout buffer stores 3 words per event, 180 bits wide (128 hits, 4-bit L1 tag, 8-bit BC tag, 40 unused bits). It holds 42 events.

- `data_avail` rises once a complete event is stored.
- If an L1 arrives while 42 events are stored, that 43rd event is dropped and the sticky `overflow` flag is set. Only a reset clears it.
- While `overflow` is set, the chip answers each readout with an overflow error packet instead of its hits.

At a 100 kHz trigger rate and 1% strip occupancy a chip needs about 60 output bits per event. The buffer therefore normally holds at most one or two events.

## Data compression

The compression logic reads the event's three words. For each channel it forms the pattern *previous, centre, next*. A channel is reported if the pattern passes the criterion in `CFG1[1:0]`:

| `CFG1[1:0]` | criterion | channel reported when |
|---|---|---|
| 00 | hit | any sample set (1XX, X1X, XX1) |
| 01 | level | centre sample set (X1X) |
| 10 | edge | centre set, previous clear (01X) |
| 11 | test | always (XXX): every channel is sent |

Channels are found by a priority search over the 128 match bits, one hit per clock. Each reported hit carries two flags:

- `adj`: the next reported channel is the neighbour, so the readout logic can send it as a short cluster continuation;
- `end_o`: this is the last reported channel of the event.

## Output stream and the token chain

This is the most intricate part of the design. Each chip's data is a sequence of packets, sent MSB first at one bit per readout clock:

| packet | bits |
|---|---|
| module header (master only) | `11101 0 LLLL BBBBBBBB 1`: the L1 and BC tags of the event |
| first hit of a cluster | `01 aaaaaaa ccccccc 1 ppp`: chip address, channel, hit pattern |
| each further adjacent hit | `1 ppp` |
| no channel passed | `001` |
| configuration (send-ID mode) | `000 aaaaaaa 111 CCCCCCCC 1 CCCCCCCC 1`: the CFG1 register |
| register read-back | `000 aaaaaaa 010 rrrrr DDDDDDDD 1 DDDDDDDD 1` |
| error | `000 aaaaaaa eee 1`, with `eee` = 001 (no event stored) or 100 (buffer overflow) |
| module trailer (end chip only) | `1` followed by sixteen `0` |

A decoder can tell a cluster continuation from the trailer by the following bits. A continuation is always followed by a new packet, whose 0s never run to sixteen.

**Roles.**

- A chip is the *master* when its `master_b` pin is low, or when `CFG1[11]` is set (`master = ~(master_b | CFG1[11])`).
- A non-master chip with `CFG1[12]` set is the *end* of the chain.
- `CFG1[9]` selects the direction: which neighbour a chip takes the token from and sends its data to.

**One readout cycle.**

1. When the master holds an event and the chain is idle, it gives itself the token. It sends the header, then its own packets.
2. Each chip passes the token on while it still has four bits of its own data to send.
3. The next chip's first bit then arrives exactly after the last bit of the current chip. Both the chip's own start-up delay and the one-clock forwarding stage of every chip in between are accounted for.
4. A chip without the token forwards whatever arrives on its data input, delayed by one clock. The module's data therefore reaches the master's `Ldo` pin as one continuous stream.
5. The end chip keeps the token and appends the trailer.
6. The master watches its own outgoing stream for the 17-bit trailer pattern. When it sees the trailer, it may start the next event.

The trailer search relies on the stream having no gaps. If a chip in the middle of the chain stops answering, the master stalls. No recovery timeout is implemented.

**Module controller mode.** A module can also run without a master. An external controller hands the first chip the token and reads that chip's data port. No chip sends a header, and the end chip still appends the trailer.

**Feed-through clock.** After a hard reset `CFG1[13]` is clear, and the master outputs the readout clock divided by two on `Ldo`. This lets the module controller check the link before configuration. Setting `CFG1[13]` switches `Ldo` to data.

**Packets per chip mode.** What a chip sends on its turn depends on its mode:

| mode | packet | consumes the stored event? |
|---|---|---|
| send-ID | configuration packet | yes, if one is stored |
| read-register | register read-back packet | yes, if one is stored |
| data-taking | physics packets, or an error packet | yes |

## Command protocol

Commands arrive serially on `com0/1`, one bit per crossing, MSB first; the idle line is 0.

| command | bits |
|---|---|
| L1 | `110` |
| soft reset | `101 0100` |
| BC counter reset | `101 0010` |
| slow command | `101 0111 LLLLLLLL aaaaaaa ffffff [data]` |

In a slow command:

- `L` is the number of bits that follow it, minus one: 28 for a 16-bit write, 140 for the 128-bit mask, 12 for commands without data. A read may also be sent with length 28, as in the specification's command table; the 16 bits after the address are then skipped.
- `a` is the chip address, compared with the `id` pins. `1111111` addresses every chip.
- `f[5:1]` is the register address and `f[0]` is set for a read.

Instructions use register address `100xx`:

| instruction | field `f` |
|---|---|
| test pulse | `100000` |
| enable data taking | `101000` |
| calibration pulse | `110000` |

Every chip parses every command, so chips that are not addressed stay in step with the bit stream.

**Chip modes.**

- Any register write puts the chip in send-ID mode, so a chip never takes data with a half-written configuration.
- *Enable data taking* puts it in data-taking mode.
- A read puts it in read-register mode. The chip copies the register into a 16-bit mirror, which goes out with the next L1.

**Registers.**

| register | address | kind |
|---|---|---|
| CFG1 (configuration) | `00000` | cached |
| CFG2 | `00110` | cached |
| threshold | `01100` | cached |
| calibration amplitude | `01110` | cached |
| bias 1 / 2 / 3 | `11100` / `11101` / `11110` | cached |
| L1 delay | `01010` | cached |
| mask (128 bits, write only) | `00100` | serial |
| calibration delay | `01000` | serial |
| trim write (`aaaaaaa ccccc`: channel and 5-bit code) | `00010` | serial |
| STAT1, STAT2 (read only) | `10110`, `11010` | status |

In the delay register:

- bits 7:0 are the latency;
- bit 9 is "L1 from command only";
- bits 14 and 15 start the pipeline and derandomizer self tests.

## SEU protection and status

Each cached register (`abcn_cached_register`) works as follows:

- It keeps three copies of its value.
- Its output is the bit-wise majority vote of the three copies.
- All three copies are rewritten with the vote every clock, so a single upset is corrected at once.
- Any disagreement sets a sticky SEU flag. A soft reset clears it.
- A parity bit of the voted value is checked when the register is read back.

The L1 and BC counters are protected the same way, with three voted copies that are rewritten every clock and their own sticky SEU flags.

The status registers report:

- **STAT1**: the BIST ended and failed flags of both memories, overflow, data available, the L1 mode, the regulator pins, the master and end roles, the clock rate, and flags for unknown fast and slow commands.
- **STAT2**: the SEU flags of the L1 and BC counters and of each cached register, their OR, and a parity error flag. A soft reset clears STAT2.

## Calibration

The calibration pulse command produces a `cal_strobe` one beam crossing long, four crossings after the command is decoded. With the strobe, `cal_line` is a one-hot selection of one of the four calibration line groups, taken from `CFG1[3:2]`. The fine delay of the strobe (64 steps over 50 ns) is an analog delay line. Its 6-bit code and step setting come out of the calibration delay register as `strobe_delay` / `strobe_step`.

## Where this RTL departs from, or fills in, the specification

- **Header length.** The header is sent as the 19 bits its fields add up to. The specification's prose calls it a 13-bit header.
- **Test mode.** It writes the mask pattern as is. The prose says the pattern appears inverted at the pipeline output, but the input register table says the mask is passed.
- **Mode switching.** Every register write enters send-ID mode. Reads and instructions leave the mode unchanged. The prose states the rule as "commands whose field 5 starts with 0", which does not fit all register addresses.
- **Global address.** With the 7-bit address field, the global address is `1111111`. The prose writes it with six 1s.
- **BIST flags.** They mean "finished" in STAT1, as the status register table says. One signal table describes them as "in progress".
- **Left open by the specification**, so chosen here:
  - the calibration latency (4 crossings);
  - the exact L1 latency offset;
  - whether the stored L1 tag is taken before or after the increment;
  - what happens to an L1 during a pipeline read (it is ignored);
  - dropping, rather than overwriting, events on overflow;
  - the parity sense (even);
  - the register reset values: 0, except the threshold and L1 delay registers (`0x00FF`).
- **Mask read-back.** The mask register reads back as 0. It is listed as load-only.
- **Master bit.** One passage says setting `CFG1[11]` makes a chip master. The register table says a chip is master when `CFG1[11]` ORed with `master_b` is 0. The register table was followed.
- **Counter SEU detection.** How the L1 and BC counter SEU flags detect an upset is not specified. Here the counters are triplicated.
- **Not implemented:**
  - the JTAG port, which is only named;
  - all analog circuitry.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -yrtl -ytb rtl/abcn_pkg.sv tb/tb_abcn_top.sv --top-module tb_abcn_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_abcn_top` with any `tb_abcn_<block>` to test one block.

`tb_abcn_top` runs the full-size design: three `abcn_top` instances at their default parameters, wired as a master, a slave and an end chip. It drives them only through the command line, the external L1 input and the hit inputs. It compares the master's `Ldo` stream bit for bit with a reference model that includes the latency alignment, masking, edge detection, the criteria, cluster coding and chain order. Along the way it makes each of these happen at least once:

- feed-through clock, send-ID packets, hits and clusters, no-hit packets;
- test pulse, register and status read-back;
- external and command-only L1, including a no-data error;
- buffer overflow with its error packets;
- soft reset, BC reset, calibration strobe, trim load and both memory self tests;
- upsets forced into a cached register and the BC counter, reported in STAT2 and cleared by a soft reset;
- running the chain at 160 MHz, with a master and then in module controller mode, in both flow directions.

It runs in under a minute.

`tb_abcn_workload` runs the same three-chip chain under the conditions the readout buffer is sized for:

- 1% occupancy on every channel;
- an L1 latency of 240 crossings (6 µs);
- 150 external triggers at a mean rate of 100 kHz, with exponentially distributed spacing.

It decodes the master's stream as a module controller would. It then checks every hit of every event against the reference. The run must end with no error packet, no overflow and every event read out. A typical run shows a peak backlog of a few events, far below the 42 the buffer holds.

The block testbenches compare each module against an independent model in the testbench. Examples:

- a random-event scan for the compression logic;
- a bit-exact packet stream, including token timing, for the readout logic;
- overflow at exactly the 43rd event for the buffer;
- vote and SEU behaviour under a forced upset for the cached register.
