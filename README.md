# FPGA controller for a MIL-STD-1553B board over SPI

This RTL lets an FPGA act as the communication front end of a simulated
spacecraft electric thruster. The thruster model talks on a MIL-STD-1553B
bus as a remote terminal (RT). The FPGA does not implement the 1553B
protocol itself. It drives a commercial 1553B protocol board through the
board's SPI slave port (SCK, SI, SO, CE#) and its interrupt line INT#.
The controller does four things:

* waits out the board's reset time after power-up;
* initialises the board as an RT and retries until that succeeds;
* sits idle and executes instructions that arrive through the board;
* moves 1553B messages between the FPGA's send and receive RAMs and the board.

The block structure, the three task states, the instruction codes, the
initialisation order, the RT address register formula and the RAM/ROM sizes
come from the published design that this RTL implements. The board's SPI
framing and register map are not public. The ones used here are this
design's own, collected in `rtl/b1553_pkg.sv` so that they can be replaced
in one place. A real board will need that file adapted to its data sheet.

## Block structure

```
 host logic ──► send RAM ──► b1553_init ──► spi_exch ◄──► spi_master ◄══ SPI ══► 1553B board ◄══ bus A/B
                               ▲  ▲   │
                  b1553_fsm ───┘  │   └──► receive RAM ──► host logic
                           init_rom
```

| module | role |
|---|---|
| `b1553_spi` | top level: wires the blocks and brings out the SPI pins, the host ports of the RAMs/ROM and status |
| `b1553_fsm` | task scheduler: reset wait, initialisation with retry, idle/poll, instruction dispatch, shutdown |
| `b1553_init` | initialisation and control: walks the ROM, builds the RT address word, performs each board operation, converts 32-bit RAM words to and from 16-bit board words |
| `spi_exch` | turns one read or write request into one framed SPI transaction |
| `spi_master` | shifts 16-bit words, SPI mode 0, one-word look-ahead buffer |
| `dp_ram` | 32 x 32-bit dual-clock RAM, used as send RAM and receive RAM |
| `init_rom` | 64 x 32-bit initialisation table with a write port, preset to an RT-mode sequence |
| `b1553_pkg` | framing, register map, opcodes, ROM entry format, state and instruction enums |

Everything in the FPGA runs on one clock `clk`. The only exceptions are the
host-side ports of the two RAMs and the ROM, which run on `host_clk`.

## The SPI link to the board

Every board access is one chip-select period made of 16-bit words, MSB first,
in SPI mode 0 (data sampled on rising SCK):

```
word 0        word 1          word 2 ... word N+1
{cmd, 0, A[19:16]}  A[15:0]   data words (written, or returned by the board)
cmd = 0x02 write, 0x03 read; A = 20-bit word address, auto-incremented
```

`spi_master` accepts a word when `wren_i` is high and `wr_ack_o` is high
(same cycle). While a word shifts, `di_req_o` asks for the next word. If that
word arrives before the current one ends, chip select stays low. Otherwise
chip select rises half an SCK period after the last bit and stays high for at
least another half period. SCK is `clk / (2*CLK_DIV)`, which is 5 MHz at a
50 MHz clock with the default `CLK_DIV = 5`. An N-word access therefore holds
chip select low for `(N+2)*16*2*CLK_DIV + CLK_DIV` clocks. A full message
takes 5445 clocks (about 109 µs).

## Data widths and the fetch window in `spi_exch` / `b1553_init`

This is the part that needs the most care when changing the code.

* The RAMs are 32 bits wide. The board is 16 bits wide. `b1553_init` sends a
  RAM word upper half first. It packs two received words into one RAM word,
  the first one in the upper half. A 1553B message of 32 data words
  therefore occupies RAM words 0..15.
* For a write, `spi_exch` shows on `d_ptr` the index of the data word it
  needs next. It samples `wr_word` at the end of the third clock in which
  that index is shown. `b1553_init` uses the window as follows:
  * clock 1: the send RAM samples `d_ptr[8:1]`;
  * clock 2: the RAM output is valid;
  * clock 3: `wr_word` holds the selected half, taken from the registered
    `d_ptr[0]`.

  A requester with more latency than this breaks the transfer. The
  `spi_exch` fault test checks exactly this timing. The fetch happens while
  the previous word is still shifting, so the SPI link never stalls.
* For a read, each returned word comes with a one-clock `rd_valid` and its
  index on `d_ptr`. The two header slots are skipped.
* `d_ptr` is 9 bits and `data_length` 11 bits, so at most 512 data words can
  be indexed. The controller only ever uses 1 or 32.

## Initialisation

`b1553_init` reads `init_rom` entry by entry. Each entry is
`{kind[2:0], address[12:0], data[15:0]}`:

| kind | action |
|---|---|
| `RK_WR` | write data to address |
| `RK_VERIFY` | write, read back, stop with failure if different |
| `RK_RTADDR` | write `data | rt_num << 5 | parity << 4` |
| `RK_SA` | write data to address + `sa_idx` |
| `RK_END` | done, success |

The power-up table runs these steps in order:

1. Set the mode register to RT (1) and verify it.
2. Write the RT address register (0x0004).
3. Clear the head status of sub-address `sa_idx`.
4. Enable the sub-address (control word 0x8000).
5. Write 1 to the RT start register, which opens the channel.

A failed check stops the sequence before the RT address is written.
`rt_succ` then stays low, and the state machine starts again from entry 0.
Writing entry 0 with mode 2 or 3 selects BC or BM mode instead. Only the
register write is modelled for those modes.

**RT address word.** The base value 0x0400, the shift of the RT address by 5
and a one-bit term at bit 4 come from the source design. That term is
described there as 0 when the "RT address is odd" and 1 otherwise. This RTL
reads the term as the RT address parity bit that 1553B terminals use: 1 when
`rt_num` has an even number of ones, so the six bits together have odd
parity. For example, RT 5 gives 0x04B0 and RT 7 gives 0x04E0. If your board
wants the address LSB instead, change `rt_parity()` in `b1553_pkg`.

## Task scheduling and instructions

`b1553_fsm` goes through these states:

* `F_RST_WAIT` for `RST_WAIT` clocks after reset;
* then `F_INIT`, which is repeated until `rt_succ` is high; `init_err_cnt`
  counts the failures;
* then `F_IDLE`.

In idle the controller reads the board's mailbox register (0x0008) when
`int_n` is low, and otherwise every `POLL_CYCLES` clocks. A mailbox word with
bit 8 set carries an instruction in bits 3:0. The controller clears the
mailbox and then executes the instruction:

| code | action |
|---|---|
| 0 | read the message-buffer head status of `sa_idx` into `head_status` |
| 1 | write `head_wdata` to that head status |
| 2 | initiate communication: send RAM → board transmit buffer (0x1000+32·sa), then board receive buffer (0x1800+32·sa) → receive RAM |
| 3 | initialise the board again |
| f | write 0 to the RT start register, then stay in `F_OFF` until reset |
| other / no bit 8 | stay idle |

Each step is one request from `b1553_fsm` to `b1553_init`, either a one-clock
`rt_req` with `rt_opcode` or `rt_init`. Each request is answered by one
`rt_over`, and only one request is outstanding at a time. Assertions in the
modules check this handshake.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `SPI_W` | 16 | SPI word size of the SPI master: 16, or 8 |
| `CLK_DIV` | 5 | clocks per SCK half period |
| `RST_WAIT` | 5000 | board reset time in clocks (100 µs at 50 MHz) |
| `POLL_CYCLES` | 50000 | mailbox poll period in clocks (1 ms at 50 MHz) |
| RAM size | 32 x 32 bit | fixed by the top, same as the source design |
| ROM size | 64 x 32 bit | fixed by the top, same as the source design |

The three timing values are this design's choice. The source design gives none.

The source design describes its SPI module as either 8-bit or 16-bit. With
`SPI_W = 8`, `spi_exch` sends every 16-bit word as two bytes, high byte
first, and joins received byte pairs back into words. The bits on the wires
and the transaction length stay the same. Only the master's word boundaries
change, which matters for SPI cores or slaves that work in bytes.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Every testbench also has a watchdog. `tb/cav1553b_model.sv` is a behavioural
model of the board's SPI slave that follows the framing above. It can be
told to fail the RT-mode read-back (`fail_left`), and a test can post
mailbox instructions into it (`post_instr`).

```
verilator --binary --timing --assert -Irtl -Itb rtl/b1553_pkg.sv tb/tb_b1553_spi.sv --top-module tb_b1553_spi
./obj_dir/Vtb_b1553_spi
```

Replace the testbench name to run another one:

* `tb_spi_master`
* `tb_spi_exch` (runs both SPI word sizes)
* `tb_b1553_init`
* `tb_b1553_fsm`
* `tb_dp_ram`
* `tb_init_rom`
* `tb_rt_config_sweep`

`tb_rt_config_sweep` runs the configuration steps on the whole controller at
default parameters for every RT address from 0 to 31. It checks the RT
address register, the RT mode and the RT start register, and that each
initialisation takes six SPI transactions. It then rewrites the
initialisation table to select BC mode, re-initialises the board and checks
the mode register. A second controller built with `SPI_W = 8` runs the same
sequence alongside.

`tb_b1553_spi` runs the whole controller at its default parameters, in about
150,000 clocks. It covers:

* an initialisation that fails and is retried;
* a poll that finds no instruction;
* instructions 0, 1, 2, an undefined code, 3 and f;
* the check that the off state ignores further instructions.

It counts each of these events and fails if one never happens. It also
checks the board registers against values computed in the testbench, checks
the message data in both directions and times the 34-word SPI transaction.

## Departures and limits

* **Clocks.** The source design's modules also take 10 MHz and 50 MHz clocks
  whose use is not described. Here one clock drives all the logic, and the
  SPI master's two clock inputs are merged into one.
* **RAM data path.** In the source design's block diagram the send RAM
  feeds the exchange block directly. Here both RAMs are served by
  `b1553_init`, which also does the 32/16-bit conversion, and `spi_exch`
  only sees 16-bit words. The path from the send RAM to SPI and from SPI to
  the receive RAM is the same; only the module that carries it differs.
* **Unused ports.** Some ports in the source design are shown without an
  explanation (`dev_num`, `iq_num`, `num_clust`, `buf_rd_data`, `start_en`,
  and the SPI master's debug outputs). They are left out.
* **Board details.** The SPI framing and the register map are assumptions, as
  are:
  * the mailbox used to deliver instructions;
  * the head-status value written by instruction 1 (taken from `head_wdata`);
  * the way the RT-mode configuration is checked (read-back of the mode
    register).
* **Outside this design.** The board, the bus analyser on the bus and the host
  PC are not part of this RTL. Nor is the board's 1553B behaviour as an RT on
  the bus, which belongs to the board.
