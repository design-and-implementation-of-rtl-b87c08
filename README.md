# FPGA controller for SPI-attached MIL-STD-1553B modules

A packaged MIL-STD-1553B module does the bus protocol work itself: it handles
encoding, the A/B bus pair and the remote-terminal (RT) message handling. It leaves
to its host only two jobs: configuring the module and moving data words through its
SPI slave port. This RTL is that host, built as FPGA logic rather than as
microcontroller firmware. It drives several modules in parallel, one independent
channel per module. Each channel:

1. waits until the module has had enough time to come out of reset,
2. configures the module as an RT by replaying a script from a table (the "table
   lookup" part), and checks the result, retrying until the configuration succeeds,
3. sits idle until the module raises its interrupt, which means the upper computer
   (the bus controller side) has sent an instruction,
4. reads the instruction and carries it out. It can read or write the message-buffer
   head status, exchange up to 32 data words between its send/receive RAMs and the
   module's subaddress buffers, re-initialise, or shut the channel down.

SPI words are streamed back to back. The next word is fetched while the current one
is shifting, so a 33-word frame (one command word and 32 data words) goes out without
gaps under a single chip-select assertion.

## Block structure

```
b1553_top ── u2[i].clust : b1553_spi  (one per channel)

  host ──► ram_stx (send RAM) ─────────────┐
                                           ▼
  rt_prom (init table) ──► b1553_init ──► data_exchange ◄──► spi_master u1 ◄──► module
                              ▲   │            │                                (SPI, INT#)
                   requests   │   │ results    │ instruction
                              │   ▼            ▼
                              b1553_fsm ◄──────┘
                                  │
  host ◄── ram_srx (receive RAM) ◄┘
```

| file | role |
|---|---|
| `rtl/b1553_pkg.sv` | shared types: instruction codes, operations, state encoding, table entry format, module register map, SPI command word |
| `rtl/ram_u.sv` | 32 x 32-bit dual-clock RAM (send and receive RAM) |
| `rtl/init_rom.sv` | 32 x 32-bit initialisation table |
| `rtl/spi_master.sv` | SPI master, mode 0, 16-bit words, holding register for back-to-back words |
| `rtl/data_exchange.sv` | word pump between the control block, the send RAM and the SPI master; closes frames; extracts instructions |
| `rtl/b1553_init.sv` | runs the initialisation script; performs read, write and close operations |
| `rtl/b1553_fsm.sv` | task state machine of a channel |
| `rtl/b1553_spi.sv` | one channel |
| `rtl/b1553_top.sv` | NUM_CH channels side by side |

All logic of a channel runs on `mclk`. The only exception is the host side of the
two RAMs, which runs on `clk_10m`. The SPI master's parallel clock and serial clock
are both tied to `mclk` in the channel.

## The link to the module: frames, words and replies

Everything a channel does is a sequence of SPI frames. A frame is one chip-select
(active-low `spi_cs`) assertion carrying 16-bit words, MSB first, in SPI mode 0.
Every word sent also brings one word back.

* The first word of a frame is a command `{op[3:0], addr[11:0]}`. The module answers
  it with its status word.
* `op = 1` (write): each following word is stored at `addr`, `addr+1`, and so on.
* `op = 0` (read): the channel sends `16'hFFFF` dummies, and the replies are the
  contents of `addr`, `addr+1`, and so on.

The real module's SPI protocol and register map are not public. The protocol above
and the register map in `b1553_pkg` (mode register, RT control, subaddress control,
instruction register, head status, transmit and receive buffers at 32 words per
subaddress) are a stand-in. They are simple and self-consistent, and they are
isolated in the package, the table and `b1553_init`. Adapting to a real module means
changing those three places: the framing mechanics below stay the same.

### How frames stay together and how they end

This is the least obvious part of the design:

* `spi_master` has a one-word holding register. `di_req_o` is high while it is empty.
  The serial engine takes a word out of it when the word's first bit starts, so the
  register is free again almost at once.
* At the end of a word the engine looks at the holding register. If a word is
  waiting, it shifts that word next without releasing chip select. If not, the frame
  ends: chip select rises half an SCK period after the last clock edge and stays high
  for at least `SSEL_GAP` half periods.
* `data_exchange` therefore pushes words as fast as the holding register takes them.
  A word needs `2*16*SCK_DIV` mclk cycles on the wire. Fetching the next one takes a
  few cycles (one more for a send-RAM word), so a frame never breaks by accident.
* To end a frame on purpose, the producer marks its last word (`wr_last`). The data
  exchange then accepts nothing more until the reply to every word it has pushed has
  come back. By then the engine has found the holding register empty and closed the
  frame.
* Replies come back in the order the words were sent (`rx_valid`/`rx_word`). The
  consumers count replies: reply 0 of a frame answers the command, and reply k
  carries data word k.

The two sides of `spi_master` exchange words only through toggle signals with
two-flop synchronisers. The parallel clock and the serial clock may therefore also be
unrelated.

### Instructions from the upper computer

The upper computer writes an instruction into the module over the 1553B bus. The
module then pulls `int_n` low. In idle, the channel reads the instruction register
(a 2-word read frame). `data_exchange` spots that frame by its command word and
passes the reply to the second word to the state machine as the instruction. The
model module releases `int_n` when the register is read.

Instruction word: bits 3:0 hold the code, and bits 9:4 hold a word count `n`, where
0 means 32 as in the 1553B word-count field.

| code | action |
|---|---|
| 0 | read the message-buffer head status into receive-RAM entry 0 |
| 1 | write the low half of send-RAM entry 0 to the head status |
| 2 | write send-RAM entries 0..n-1 into the transmit buffer of subaddress `sa_idx`, then read n words of its receive buffer into receive-RAM entries 0..n-1 |
| 3 | re-initialise the module |
| F | close the channel (clear the RT control register), go to `ST_OFF` until reset |
| other | ignored, back to idle |

Send-RAM entry k supplies data word k in its low 16 bits. Receive-RAM entry k
holds `{4'h0, module address, data word}`.

## Initialisation table

`init_rom` is read with one cycle of latency, like the RAMs. Each entry is
`{kind[1:0], ins_rt, ins_sa, 12'b0, word[15:0]}`:

| kind | meaning |
|---|---|
| `SEND` | send `word` in the current frame |
| `SEND_LAST` | send `word` and close the frame; wait for all replies |
| `EXPECT` | the last word read back must equal `word`, or initialisation fails at once |
| `END` | initialisation succeeded |

`ins_rt` ORs `rt_num` into bits 15:11 of `word`, and `ins_sa` ORs `sa_idx` into bits
9:5. These are the RT-address and subaddress field positions of a 1553B command word.
One table thus serves every RT address. The script follows the RT bring-up order:

1. write the mode register (`MODE`, RT by default)
2. read it back and `EXPECT` the same value. On a mismatch the script stops and
   `rt_succ` stays low.
3. write the RT control register: `rt_num` in bits 15:11 plus the enable bit
4. write the subaddress control register: `sa_idx` in bits 9:5 plus the enable bit

The state machine reruns a failed initialisation until it succeeds and counts the
failures in `init_fails`. The `MODE` parameter can select the BC or BM mode word.
However, steps 3 and 4 are RT steps, and no BC or BM bring-up sequence is provided.

## Channel state machine (`b1553_fsm`)

`ST_RESET_WAIT` (RST_WAIT cycles) → `ST_INIT` → `ST_INIT_WAIT` → back to `ST_INIT`
on failure, or on to `ST_IDLE` on success.

From `ST_IDLE`, a low `int_n` leads to `ST_POLL_WAIT`. From there an instruction
leads to `ST_OP`/`ST_OP_WAIT` (one operation, or two for code 2), to `ST_INIT` (code
3), or back to `ST_IDLE`. After code F the channel ends in `ST_OFF`.

`state_o` exports the state, `chan_on` is high between a successful initialisation
and a shutdown or re-initialisation, and `last_instr` holds the last code read.
`busy` is high while a channel's initialisation/control block works. `xfer_done`
pulses on `mclk` after each read, write or close operation. After the second pulse
of a code-2 instruction, the receive RAM holds the new data.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NUM_CH` | 2 | top | channels |
| `RST_WAIT` | 50 000 | top, channel, fsm | mclk cycles before the module is touched (1 ms at 50 MHz) |
| `SCK_DIV` | 2 | top, channel, spi_master | SCK half period in serial-clock cycles (SCK = mclk/4) |
| `SSEL_GAP` | 2 | top, channel, spi_master | minimum chip-select high time, in SCK half periods |
| `N` | 16 | spi_master | word width |
| `DATA_W`, `ADDR_W` | 32, 5 | ram_u | RAM size |
| `MODE` | `MODE_RT` | init_rom | mode word written at initialisation |

The 16-bit SPI word and the 32 x 32 memories are the sizes of the original design.
The number of channels, the reset wait, the SPI rate and the timing are choices of
this implementation.

## Where this departs from, or goes beyond, the original design

* The SPI protocol, the register map, the instruction word layout and the RAM entry
  layouts are this implementation's own: the original uses a commercial module whose
  protocol is not given.
* The original's initialisation/control module also has an `rd_reqi` request and
  the clocks `clk_50m` and `clk_10m`. Here reads are requested through
  `rt_req`/`rt_opcode`, that module runs on `mclk` alone, and `clk_10m` is used only
  by the host side of the RAMs.
* The original SPI master has extra debug outputs (shift-register and state views,
  clock-enable strobes). They are left out.
* The original's flow chart shows the re-initialisation on error, but not how an
  instruction is detected or what "initiate communication" moves. The interrupt-driven
  poll and the transfer between the RAMs and the subaddress buffers are this design's
  reading.
* The original mentions BC and BM modes for the table. Only the RT bring-up is
  implemented.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/b1553_board_model.sv` is a behavioural model of
the module's SPI side, used by the channel and top testbenches. It is not
synthesizable and is not part of the design. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/b1553_pkg.sv tb/tb_b1553_top.sv --top tb_b1553_top
./obj_dir/Vtb_b1553_top
```

| testbench | what it shows |
|---|---|
| `tb_ram_u` | all entries through two unrelated clocks, read latency, reset of q |
| `tb_init_rom` | every entry against the hand-written table, latency, hold |
| `tb_spi_master` | 1-, 3- and 5-word frames with unrelated clocks: words on both wires, chip select held within a frame and released after, SCK edge count and half period, gap between frames |
| `tb_data_exchange` | word order with direct and send-RAM words, reply pass-through, no word accepted before a frame drains, instruction detection |
| `tb_b1553_init` | failed and successful initialisation (frames, register contents, RT address and subaddress insertion), 5-word read, 32-word write, close |
| `tb_b1553_fsm` | reset wait length, retries, the exact operations of every instruction code, receive-RAM writes, off state |
| `tb_b1553_spi` | one channel against the module model: retry, RT bring-up, 6-word communication, head status, shutdown |
| `tb_b1553_top` | two channels at default parameters running in parallel: two failed initialisations on one channel, 32-word communications on both at once, every instruction code, re-initialisation and shutdown; it counts each of these mechanisms and fails if one never happened |

The top testbench runs at the default parameters, including the full reset wait, in
well under a second.

No timing against a real module has been verified. The tests cover only the
protocol defined here, run against a model written to the same protocol.
