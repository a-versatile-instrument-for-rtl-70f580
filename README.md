# SD card interface analyzer on an FPGA PC Card

This is the FPGA logic of a measurement instrument for SD memory cards. A
laptop runs test scripts. It reaches the FPGA through a PC Card (PCMCIA)
slot, and the SD card under test hangs off the FPGA's pins. The FPGA acts as
the SD host. It sends the commands the script queued, records everything the
card sends back, and time-stamps every edge of the protocol that matters for
performance:

- how long the card takes to answer;
- how long before the first data block of a read appears (t2);
- the gap between blocks (t3);
- the block time;
- how long the card holds the bus busy after each written block (tW).

From those intervals, the script computes the card's sustained read and
write rate for multiple-block transfers.

The central idea is that the laptop is kept out of the timing. It loads a
whole experiment into the output FIFO, for example a multiple-block write
of 256 sectors of 512 bytes plus the stop command. Then it starts the FSM
and collects the results afterwards. Responses and read data go into the
input FIFO, and one record per bus event goes into the timing FIFO. The
FIFOs are deep enough for one 128 KB command, so the card sees an SD host
running at full clock rate, not the slow PC Card link behind it.

```
 PC Card bus                                                    SD card
 ce1_n oe_n we_n reg_n a[7:0] d[15:0]                          clk cmd dat[3:0]
        |                                                          |
  +-----v---------+  reg_*  +-----------+  start/op/sizes  +-------v--------+
  | pcmcia_ctrl   |-------->| ctrl_regs |----------------->| sd_host_fsm    |
  | (strobe sync, |<--------| status,   |<---- busy/errs --|  + sd_clkgen   |
  |  decode, mux) |         | counters  |                  |                |
  |               |--push-->[ output FIFO 65600x16 ]--pop->|                |
  |               |<--pop---[ input  FIFO 65600x16 ]<-push-|                |
  |               |<--pop---[ timing FIFO  2048x32 ]<--+   |                |
  |               |                                    |   +----+-----------+
  |               |<-- cis_rom (attribute memory)  event_timer <-+ events
  +---------------+                                    (counters/timers)
```

## Files

| file | what it is |
|---|---|
| `rtl/sd_pkg.sv` | register map, control bits, event codes, op/flag structs, CRC7/CRC16 step functions |
| `rtl/sd_instrument_top.sv` | top level: wires the blocks below |
| `rtl/pcmcia_ctrl.sv` | PC Card memory-cycle slave and read multiplexer |
| `rtl/ctrl_regs.sv` | control/status register file |
| `rtl/sync_fifo.sv` | FIFO used for the output, input and timing FIFOs |
| `rtl/sd_host_fsm.sv` | SD device-interface state machine |
| `rtl/sd_clkgen.sv` | SD clock divider with stall |
| `rtl/event_timer.sv` | interval counter that writes timing records |
| `rtl/cis_rom.sv` | PC Card Card Information Structure |
| `tb/sd_card_model.sv` | behavioural SD card used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## How an experiment runs

1. **Set-up.** The script writes the following registers:
   - `CLKDIV`: SD clock = clk / (2·(CLKDIV+1)). Use a slow clock for card
     initialisation, then up to clk/2 for transfers.
   - `BLKLEN` (bytes) and `BLKCNT` (blocks per command).
   - `NCR`: response timeout, in SD clocks.
2. **Queue.** It writes words to the `OUTFIFO` register. A command is three
   words:

   | word | contents |
   |---|---|
   | 0 | `{8'h00, 2'b01, index[5:0]}` |
   | 1 | `argument[31:16]` |
   | 2 | `argument[15:0]` |

   For a write, the data follows the command, two bytes per word, first
   byte in the high half. For a multiple-block operation, the stop command
   (CMD12) comes after the last data word. The FSM takes the stop command
   as the next command in the FIFO once `BLKCNT` blocks are done.
3. **Start.** It writes `CTRL` with the start bit, response type, data
   direction, bus width and, optionally, raw mode. Start is refused while
   an operation is running.
4. **Run.** The FSM sends the command with its CRC7 and receives the
   response. If there is a data phase, it moves the blocks. It sends the
   stop command, waits out any busy, and raises `done` (also on `ireq_n`).
5. **Collect.** The script reads the `INFIFO` register until `INLVL` is 0,
   then pairs of `TIMLO`/`TIMHI`. Then it reads `STATUS` for the error
   flags.

### Input FIFO contents

| what | how it is stored |
|---|---|
| response | 16-bit words, first bit received in bit 15. An R1-style response is 3 words. A 136-bit response is 9 words; the last is half-filled with zeros. |
| read data | 16-bit words, first byte in the high half |
| raw mode | instead of decoded words, every rising SD clock edge of the operation samples `{CMD, DAT[3:0]}`. Three samples go in a word as `{0, s0, s1, s2}`, oldest first. A final partial word is padded with the idle pattern `11111`. |

Raw mode shows the waveforms on the lines themselves. It is for commands
and cards that the decoder does not understand.

## The SD interface state machine (`sd_host_fsm`)

This is the largest and least obvious part.

### States

| state | what happens | leaves when |
|---|---|---|
| `S_IDLE` | bus released | `start` |
| `S_CMD_LOAD` | pops the 3 command words | words present (waits on an empty FIFO) |
| `S_CMD_SEND` | shifts 48 bits out on CMD; CRC7 is computed on the fly | 48 bits sent → `CMD_END` event |
| `S_RESP_WAIT` | waits for the start bit on CMD | start bit → `RESP_START`, or `NCR` clocks → timeout flag, `RESP_TIMEOUT` event |
| `S_RESP_RECV` | shifts in 48 or 136 bits, pushes words, checks CRC7 (48-bit only) | all bits → `RESP_END` |
| `S_BUSY` | R1b: waits while DAT0 is low | DAT0 high on the 3rd or later clock → `BUSY_END` |
| `S_RD_WAIT` | waits for the block's start bit on DAT0 (or on all four lines) | start bit → `DATA_START` |
| `S_RD_DATA` | shifts in blklen bytes on 1 or 4 lines | last bit |
| `S_RD_CRC` | 16 CRC bits per line and the end bit, compared with the running CRC16 | `DATA_END`; next block or stop |
| `S_WR_PRE` | waits until DAT0 has been high on 2 rising edges: the card's buffer hold-off | `DATA_START` |
| `S_WR_START` | drives the start bit | — |
| `S_WR_DATA` | shifts the words out of the output FIFO | last bit |
| `S_WR_CRC` | drives the CRC16 of each line and the end bit | `DATA_END` |
| `S_WR_TOKEN` | reads the CRC status token `0 010 1` from DAT0 | token (a mismatch sets a flag) |
| `S_WR_BUSY` | waits while DAT0 is low: the card programming or buffering | `BUSY_START`/`BUSY_END`; next block or stop |
| `S_DONE` | flushes a partial raw word | `OP_DONE` event, back to idle |

After `blkcnt` blocks, the FSM goes round `S_CMD_LOAD` once more for the stop
command. It waits out that command's busy before `S_DONE`. An abort goes to
idle from any state and releases the bus.

### Clock, edges and stall

`sd_clkgen` counts system clocks and makes two one-cycle ticks:
- `fall`: the FSM changes its outputs on this tick;
- `rise`: the FSM samples CMD and DAT directly from the pins on this tick.

The card drives in step with the clock the FPGA itself generates, so no
synchronizer is used. The whole round trip fits in one system clock, so
`CLKDIV = 0` works and gives a 25 MHz SD clock from a 50 MHz system clock.
That is the default-speed SD limit, and 4-bit peak throughput is then
98 Mbit/s per block.

When the input FIFO is full during a response or read block, or the output
FIFO is empty when a write word is due, the clock generator holds SD_CLK low
(`stall`). No data is lost, because the card simply sees a stopped clock.
Stopping the clock does distort the timing: a measurement is trustworthy
only if the run never stalled. Size experiments to fit the FIFOs.

### 4-bit data

In 4-bit mode, byte `b7..b0` goes out as two nibbles, `b7..b4` first, with
bit 3 of the nibble on DAT3. Each DAT line carries its own CRC16
(x^16+x^12+x^5+1) over the bits it carried. The 16 CRC bits of all four
lines are sent in parallel, followed by the end bit.

## Timing records (`event_timer`)

Each record is 32 bits: `{code[3:0], ticks[27:0]}`. `ticks` is the number of
system clocks since the previous event. It saturates at 2^28−1, which is
5.4 s at 50 MHz. Reading `TIMLO` pops a record and returns bits 15:0.
`TIMHI` then returns bits 31:16 of that same record.

| code | event | fired when |
|---|---|---|
| 1 | `CMD_END` | end bit of the command sent |
| 2 | `RESP_START` | response start bit seen |
| 3 | `RESP_END` | last response bit |
| 4 | `DATA_START` | read: block start bit seen; write: start bit about to be driven |
| 5 | `DATA_END` | block end bit |
| 6 | `BUSY_START` | card pulls DAT0 low after a written block |
| 7 | `BUSY_END` | DAT0 released |
| 8 | `RESP_TIMEOUT` | no response within `NCR` clocks |
| 9 | `OP_DONE` | operation finished |

Because each record holds the time since the previous one, the intervals
of the transfer diagrams can be read off directly:

| interval | record |
|---|---|
| response delay | `RESP_START` after `CMD_END` |
| t2 (read access) | `DATA_START` right after `RESP_END` |
| block time | `DATA_END` |
| t3 (read gap) | each `DATA_START` after a `DATA_END` |
| tW (write busy) | `BUSY_END` |

The first record of an operation measures from the previous operation's
last event, so it is not part of the command's time. The sustained rate is
`blocks · blklen · 8 / (Σ ticks after the first record / f_clk)`.

A 256-block write produces 4 records per block plus a few for the
commands, which fits the 2048-record FIFO. If the FIFO is full, the record
is dropped and the sticky `tim_overflow` flag is set.

## Register map (PC Card common memory, word address = A[4:1])

| addr | name | access |
|---|---|---|
| 0 | CTRL / STATUS | W: control / R: status |
| 1 | CLKDIV | R/W, reset 62 (≈400 kHz from 50 MHz, for initialisation) |
| 2 | BLKLEN | R/W bytes, even, up to 4094, reset 512 |
| 3 | BLKCNT | R/W blocks per command, reset 1 |
| 4 | OUTFIFO | W: push word / R: output FIFO level |
| 5 | INFIFO | R: pop word |
| 6 | TIMLO | R: pop record, low half |
| 7 | TIMHI | R: high half of the record popped last |
| 8 | INLVL | R: input FIFO level |
| 9 | TIMLVL | R: timing FIFO level |
| A | NCR | R/W response timeout in SD clocks, reset 64 |
| B | BLKDONE | R: data blocks completed since the last clear |
| C | EVCNT | R: records written since the last clear |

FIFO levels saturate at FFFFh, because the data FIFOs hold 65600 words.

CTRL write bits:

| bit(s) | name | meaning |
|---|---|---|
| 0 | start | start an operation |
| 2:1 | response | 0 none, 1 48-bit, 2 136-bit, 3 48-bit with busy |
| 4:3 | direction | 0 none, 1 read, 2 write |
| 5 | wide | 4-bit bus |
| 6 | raw | raw capture |
| 7 | clk_en | SD clock running |
| 8 | clear | clear flags and counters |
| 9 | abort | abort; also empties all three FIFOs |

STATUS read bits:

| bit(s) | meaning |
|---|---|
| 15:12 | FSM state |
| 11 | done |
| 10 | busy |
| 9 | timing overflow |
| 8 | raw overflow |
| 7 | write CRC-status error |
| 6 | read data CRC error |
| 5 | response CRC error |
| 4 | response timeout |
| 3 | timing FIFO empty |
| 2 | input FIFO empty |
| 1 | output FIFO empty |
| 0 | output FIFO full |

Flags 9:4 are sticky until `clear`.

## PC Card side (`pcmcia_ctrl`, `cis_rom`)

Bus behaviour:
- 16-bit memory-mode cycles.
- CE1#, OE# and WE# are asynchronous and pass two-flop synchronizers.
- Address and data are captured while a strobe is low.
- A write acts on the rising edge of WE#.
- A read selects its source 3 clocks after OE# falls, and pops the FIFO
  once per cycle.
- The data bus is driven while CE1# and OE# are both low.
- With a 50 MHz clock, strobes of 100 ns or more are safe; the testbenches
  use 200 ns.

With REG# low, the cycle goes to attribute memory. There, `cis_rom` returns
a minimal tuple chain, one byte per even address:
- CISTPL_DEVICE;
- CISTPL_VERS_1 with the name "SD ANALYZER";
- CISTPL_FUNCID;
- the END tuple.

The chain is computed by a function rather than stored in a table.

## Sizes and their reasons

| parameter | default | why |
|---|---|---|
| `OUT_DEPTH` | 65600 words | a 256 × 512-byte write is 65536 words, plus the command and stop words |
| `IN_DEPTH` | 65600 words | a 256 × 512-byte read is 65536 words, plus the response words |
| `TIM_DEPTH` | 2048 records | 4 records per written block × 256, plus a few |
| `CIS_AW` | 6 | 64-byte attribute window |
| system clock | 50 MHz (assumed) | sets the register defaults above and the 25 MHz SD clock |

Longer commands, or 2048-byte sectors in large numbers, still work: the
clock stalls while the laptop catches up. Their timings are then not
measurements of the card.

## Where this design is its own

The source describes:
- the block structure: PC Card control unit, status/control register,
  three FIFOs, CIS ROM, counters/timers and interface FSM;
- that the results stay on the board until the experiment ends;
- the SD transfer sequence with t2, t3 and tW;
- the 512-byte sectors and 1 to 256 sectors per command.

Everything below is this design's own choice:
- the register map;
- the FIFO word formats and the event set;
- the 28-bit interval counter;
- the raw-capture packing;
- the clock-stall policy;
- the two-clock write gap;
- the CIS contents;
- the PC Card timing;
- abort flushing the FIFOs.

The SD framing and CRCs follow the SD physical layer specification.

Known limits:
- CRC7 is checked only on 48-bit responses; an R3 response (no CRC)
  raises the flag, and software must ignore it.
- A read block whose start bit arrives while the response is still
  coming in is not captured.
- No high-speed (50 MHz) SD mode.
- No SPI mode.
- Bidirectional pins are split into in/out/enable; the pad buffers are
  outside the RTL.
- The laptop software and its driver are not part of this RTL.
- Supply-current measurement of the card (a separate lab instrument) is
  not part of this RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with a
watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sd_pkg.sv rtl/sync_fifo.sv rtl/cis_rom.sv rtl/sd_clkgen.sv \
  rtl/event_timer.sv rtl/ctrl_regs.sv rtl/pcmcia_ctrl.sv rtl/sd_host_fsm.sv \
  rtl/sd_instrument_top.sv tb/sd_card_model.sv tb/tb_sd_instrument_top.sv \
  --top-module tb_sd_instrument_top -o sim && ./obj_dir/sim
```

| testbench | covers |
|---|---|
| `tb_sync_fifo` | random push/pop against a queue model at depth 6 (wrap at a non-power-of-two depth); full, empty, level, flush |
| `tb_cis_rom` | every tuple byte and the chain links |
| `tb_event_timer` | exact intervals, saturation, overflow, counters |
| `tb_ctrl_regs` | reset values, read-back, start refusal while busy, sticky flags, done |
| `tb_pcmcia_ctrl` | asynchronous cycles, FIFO pops once per cycle, TIMLO/TIMHI pairing, CIS |
| `tb_sd_host_fsm` | FSM and card model, SD clock = clk/6; see below |
| `tb_sd_instrument_top` | the whole design at its default sizes with SD clock = clk/2, end to end over the PC Card bus; see below |

`tb_sd_host_fsm` covers:
- every response type;
- 1-bit and 4-bit reads and writes;
- busy hold-off;
- both stalls;
- CRC errors;
- timeout;
- raw mode;
- abort;
- exact response, t2, t3 and block times.

`tb_sd_instrument_top` runs:
- the CIS;
- CMD0, CMD8 and CMD2;
- a 4-block read with exact block, t2 and t3 times;
- a 256-sector read kept in the input FIFO. It checks that there was no
  stall, that every block time and t3 is exact, and that the data is
  intact. It prints the sustained rate, about 97.6 Mbit/s with the model's
  t2 and t3.
- a 257-block read that fills the input FIFO and stalls the clock;
- a 4-block write with busy hold-off and an output-FIFO stall;
- a 256-sector write from a preloaded FIFO. It checks that there was no
  stall and that the records add up to the elapsed time. It prints the
  sustained rate, about 40.9 Mbit/s with the model's two buffers and
  programming time.
- a CRC error;
- a timeout;
- raw capture;
- abort;
- timing overflow.

It counts every mechanism and fails if any never happened. It runs in a
few seconds.

The card model (`tb/sd_card_model.sv`) has these parameters:
- response delay `NCR`;
- read access `T2` and block gap `T3`;
- number of write buffers `NBUF`;
- programming time `TPROG`.

It answers with R1 (R2 for CMD2), serves a data pattern that depends on
the block address, checks write data and CRCs, and holds DAT0 busy when its
buffers are full. Change those parameters to see the recorded t2, t3 and tW
follow.
