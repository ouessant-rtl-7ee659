# Ouessant coprocessor wrapper in SystemVerilog

A hardware accelerator is often fast once it has its data, but it is slow overall if the CPU has
to feed it word by word, start it, poll it and copy results back. Connecting an accelerator to a
particular bus is also a lot of work. The Ouessant coprocessor (OCP) puts a very small
microcontroller next to the accelerator. This microcontroller runs a short program of
data-movement and execution instructions from system memory. The CPU only writes a few
configuration registers, sets a start bit and waits for a "done" interrupt. In the meantime the
coprocessor copies the input into the accelerator, runs it and copies the results back. The
accelerator itself only needs FIFO ports plus a start/end handshake. Only one layer, the bus
interface, depends on the system bus.

This repository holds synthesizable RTL for the whole coprocessor shell:

```
     AHB (CPU side)                                             user accelerator
  ┌──────────────┐   ┌───────────────────────┐   ┌────────────┐   ┌──────────────┐
  │ ocp_ahb_slave│──▶│ ocp_if_core           │   │            │──▶│ ocp_fifo_in  │──▶ acc_in_*
  └──────────────┘   │  config registers     │◀─▶│ ocp_control│   │ 32 -> 96 bit │
  ┌──────────────┐   │  bank/offset -> addr  │   │  ler       │   └──────────────┘
  │ocp_ahb_master│◀─▶│  data access control  │   │ fetch/     │   ┌──────────────┐
  └──────────────┘   └───────────────────────┘   │ decode/exec│◀──│ ocp_fifo_out │◀── acc_out_*
     AHB (memory side)        irq ──▶ CPU        └────────────┘   │ 96 -> 32 bit │
                                                 start_op/end_op ─▶└─────────────┘
```

The accelerator is not part of the RTL. Its ports are brought out of `ouessant_top` as
`acc_*` signals.

## The programming model

The coprocessor never sees system addresses in its program. It sees **banks**, which are
numbered 0 to 7. The CPU writes each bank's base byte address into a configuration register. An
instruction then names a bank and a **word offset** (14 bits) inside it. Data placement is
therefore decided at run time by the CPU, and the same microcode works wherever the buffers are.

A run goes like this:

1. The CPU writes the bank bases (registers 0x08..0x24). It places the program, as 32-bit
   instruction words, in bank 0 from offset 0.
2. The CPU writes the number of instructions to register 0x04.
3. The CPU writes the control register 0x00 with S = 1. It also sets IE = 1 if it wants an
   interrupt.
4. The controller fetches and executes instructions until `eop`, or until it has executed the
   number of instructions in 0x04.
5. At that point S is cleared, D is set, and `irq` = IE & D rises. The CPU clears D by writing 1
   to it, or by starting again.

### Configuration registers (byte offsets on the AHB slave)

| offset | register  | contents |
|--------|-----------|----------|
| 0x00   | ctrl      | bit 0 S (start), bit 1 D (done, write 1 to clear), bit 2 IE (interrupt enable) |
| 0x04   | psize     | number of instructions in the program |
| 0x08 + 4·b | bank b (b = 0..7) | base byte address of bank b |

Only address bits [5:2] are decoded. Offsets 0x28..0x3C read as zero and ignore writes.

### Instructions

Each instruction has a 5-bit operation code, so there is room for 32 instructions. Four are
defined:

| mnemonic | code | effect |
|----------|------|--------|
| `mvtc bank,offset,DMAn,FIFOf` | 1 | read n words of memory from (bank, offset) upward and push them into input FIFO f |
| `mvfc bank,offset,DMAn,FIFOf` | 2 | pop n words from output FIFO f and write them to memory at (bank, offset) upward |
| `execs` | 3 | pulse `start_op` to the accelerator and wait for `end_op` |
| `eop`   | 4 | end of program: set D (and interrupt if IE) |

Any other code is skipped, as is a transfer that names a FIFO that does not exist.

Word layout (`ocp_pkg::instr_t`):

```
 31      27 26  24 23            10 9   7 6   4 3   0
 [ opcode ][ bank ][    offset     ][fifo][blen][ 0  ]      n = 2**blen  (DMA1 .. DMA128)
```

`ocp_pkg::make_instr()` builds a word. As an example, this is a DFT-style run that loads 512
input words in 64-word pieces, runs the accelerator and stores 512 results:

```
mvtc  1,0,DMA64,0     mvtc 1,64,DMA64,0   ...  mvtc 1,448,DMA64,0
execs
mvfc  2,0,DMA64,0     mvfc 2,64,DMA64,0   ...  mvfc 2,448,DMA64,0
eop
```

## The controller (`ocp_controller`)

The controller is a plain, unpipelined fetch/decode/execute state machine. Its registers are a
program counter, an instruction register, a running offset and a word counter. Its states are:

`IDLE → FETCH → DECODE → {MVTC | MVFC | EXEC_WAIT} → NEXT → FETCH …`, with `FINISH`
reached from `DECODE` (eop) or from `NEXT` (program size reached).

Each memory access has two steps:
- The controller offers `read` or `write`, with `bank`, `offset` and `data_out`, until `addr_ok`
  reports that the bus has accepted the address.
- The access completes later with `data_ok`, and the read word is then on `data_in`.

During a transfer the next word is offered as soon as the previous address is accepted. One word
therefore waits for its data while the next one is being addressed, and a transfer streams at one
word per cycle.

**Flow control is the subtle part.**
- During `mvtc` a read is only offered when the input FIFO can hold every word in flight plus the
  new one. With nothing in flight the FIFO must not be `full`; with one word in flight it must
  not be `afull` (almost full). A word can therefore always be stored when it arrives.
- During `mvfc` a write is only offered while the output FIFO has a word. That word is popped
  when its address is accepted, and the bus master keeps it for the data phase.
- The controller stalls on a full or empty FIFO, but it does not run the accelerator: `execs` is
  an explicit instruction.

Two consequences follow:
- With the usual load/execs/store pattern, the data of one `execs` must fit in the FIFOs. If the
  input does not fit, the load waits for an accelerator that has not been started. This happens
  unless the accelerator consumes its input as it arrives.
- Likewise, the results of one `execs` must fit in the output FIFO unless the program collects
  them while they are produced. To collect them that way, the accelerator acknowledges `execs`
  early and the following `mvfc` waits for data.

`burst` is high on every access of a transfer except the last. The bus master uses it to keep
the bus.

## Address translation and data access (`ocp_if_core`, `ocp_cfg_regs`)

`ocp_if_core` is the part of the interface that does not depend on the bus:
- The bank number selects a base register, and the word offset is added:
  `address = bank_base[bank] + 4·offset`.
- The data access control passes the request to the bus master in the same cycle, as `m_req`,
  `m_rnw` (read/nWrite), `m_addr`, `m_wdata` and `m_burst`.
- The master's `m_gnt` (address accepted) becomes `addr_ok`, and its `bus_ack` becomes
  `data_ok`, together with the read word.
- This path is combinational, from the bank register multiplexer through the adder to `haddr`.
  Register it if timing requires; doing so costs one cycle per access unless the controller
  computes addresses ahead.

`ocp_cfg_regs` holds the ten registers, the read multiplexer and the interrupt.

## The bus side (`ocp_ahb_slave`, `ocp_ahb_master`)

Both are written for AMBA 2 AHB.

- **Slave:** zero wait states, always OKAY, 32-bit accesses only. Writes take effect in the
  data phase.
- **Master:** requests the bus with `hbusreq`. It owns the bus after an edge where `hgrant` and
  `hready` were both high, and issues single NONSEQ word transfers.
  - The transfers are pipelined: the address phase of one word overlaps the data phase of the
    previous one.
  - The write data is captured when the address is accepted and driven in the data phase.
  - `hbusreq` stays high after any access flagged `burst`, so the bus is not given away in the
    middle of a transfer.
  - An ERROR response completes the access and is flagged internally; the data is still used.

To support another bus, replace these two modules. The generic signals they connect to stay the
same.

## RAC FIFOs (`ocp_fifo_in`, `ocp_fifo_out`)

The bus words are 32 bits wide. The accelerator port is `RATIO`·32 bits wide (96 bits by
default).

- **`ocp_fifo_in`** collects RATIO−1 words in a staging register. The word that completes a
  group is written, together with the staged words, as one wide entry. The first word goes into
  the low bits.
  - `full` only means "the next word cannot be taken": the memory is full *and* a group is about
    to complete.
  - Words of an incomplete group stay staged, and are completed by the next transfer.
- **`ocp_fifo_out`** moves the head entry into an unpacking register. A multiplexer then shows
  its 32-bit slices, low slice first. The next entry is loaded in the same cycle as the last
  slice is read, so words stream out at one per cycle.

Both FIFOs use `ocp_sync_fifo`, a first-word-fall-through FIFO with power-of-two depth, built on
a plain array so that FPGA tools can map it to RAM.

## Timing

With the bus granted and no wait states, the timing is as follows.

- **A transfer of N words** streams one address per cycle, and the last data phase ends one
  cycle after the last address. An instruction therefore spends N + 1 cycles in its execute
  state.
- **A 64-word `mvtc`** takes 65 cycles. This figure is checked by the top-level testbench.
- **Each instruction** adds a fetch (address and data phase, 2 cycles) and 2 cycles of decode and
  sequencing.

The DFT example (16 instructions, 512 + 512 words) thus needs about 1 100 cycles of bus and
control time. That is about 1.1 cycles per word, plus whatever wait states and arbitration the
system adds.

Wait states, a lost grant or a full or empty FIFO stretch these figures. The testbenches exercise
all four.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `ouessant_top` | `NUM_IN`, `NUM_OUT` | 1, 1 | number of input / output FIFOs (a FIFO id selects among them) |
|                | `RATIO` | 3 | accelerator word = RATIO × 32 bits |
|                | `FIFO_DEPTH` | 256 | accelerator words per FIFO (power of two) |

The bus width (32 bits), the 3-bit bank number, the 14-bit offset, the 5-bit operation code and
the ten configuration registers are fixed in `ocp_pkg`.

## What is taken from the published design and what is not

**Taken from the published design:**
- the three layers: bus interface, controller, FIFO-coupled accelerator;
- the split of the interface into a bus-specific part and a bus-independent part;
- the ten configuration registers and their byte offsets, with the S, D and IE bits and an
  interrupt;
- address translation by bank register plus offset;
- the 3-bit bank and the 14-bit offset;
- the `read`, `write`, `burst`, `data_ok` and `read/nWrite`/`bus_ack` signal set;
- 32-bit words deserialized to 96 bits and back;
- the four instructions with a 5-bit operation code;
- an unpipelined fetch/decode/execute controller;
- AHB as the bus of the prototype system.

**This design's own choices:**
- opcode values and the instruction field layout;
- the burst length coded as a power of two;
- the program held in bank 0;
- ending a program on the program size as well as on `eop`;
- the S/D/IE bit positions and their set/clear rules;
- the request/acknowledge handshakes;
- the FIFO depth, the word order, and the rule for a partial group;
- the AHB subset: single transfers, zero-wait slave, separate `hready` inputs for the slave and
  master ports;
- asynchronous active-low reset everywhere.

**Known differences and limits:**
- Sequential words are sent as back-to-back pipelined SINGLE transfers, not as AHB INCR bursts.
  The rate is the same, one word per cycle, but slaves that optimise for bursts cannot see the
  sequence.
- Split/retry responses are not handled, and `hprot` and `hlock` are not driven.
- The accelerators used with the original coprocessor (an 8×8 IDCT and a 256-point FFT core)
  are not included. The testbench accelerator is a behavioural stand-in.
- With the default RATIO of 3, a 512-word transfer leaves two words staged. For such an
  accelerator, choose a RATIO that divides its block size; RATIO = 2 gives 512 words of FIFO
  space.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_ocp_fifo_in`  | packing order, latency of the completing word, the exact `full` point, `afull` every cycle, random traffic against a queue model |
| `tb_ocp_fifo_out` | slice order, two-cycle first-word latency, `full` at DEPTH+1 entries, one word per cycle, random traffic |
| `tb_ocp_cfg_regs` | all registers read back, reserved offsets, S/D/IE rules, interrupt |
| `tb_ocp_if_core`  | address = base + 4·offset for random banks and offsets, direction, data, burst flag, the two-step handshake |
| `tb_ocp_controller` | three programs against a pipelined memory model and FIFO/accelerator models: data order, skips, end on size, full and empty stalls, no FIFO overflow with a word in flight, fetch order |
| `tb_ocp_ahb_slave`  | pipelined AHB writes and reads with stalls and unselected transfers |
| `tb_ocp_ahb_master` | random back-to-back reads and writes with wait states and grant delays, response order, bus ownership, one address per cycle |
| `tb_ouessant_top`   | the whole coprocessor at default parameters (see below) |
| `tb_ouessant_workloads` | a 256-point DFT and an 8×8 IDCT run end to end, with results and cycle counts checked (see below) |

`tb_ouessant_top` surrounds the coprocessor with a CPU model on the slave port, an arbiter, a
wait-stating AHB memory and a behavioural accelerator. It runs four programs:

- **A** is the DFT-shaped flow: 6×64 words in, `execs`, 6×64 words out, `eop`, with the
  interrupt enabled.
- **B** sends 960 words in while the accelerator holds back, so the input FIFO fills. Then 480
  words come back. This run polls D instead of using the interrupt.
- **C** contains an unknown opcode, and a streaming accelerator whose results trickle out, so
  `mvfc` waits on an empty FIFO. The program ends on its size.
- **D** measures the 65-cycle 64-word transfer.

The testbench counts each mechanism: the four instructions, the interrupt, clearing D, full and
empty stalls, wait states, grant delays, the skip, and the end on size. A mechanism that never
occurs is counted as a failure.

`tb_ouessant_workloads` builds the coprocessor with RATIO = 2, so that one accelerator word
holds one complex sample or two coefficients. It uses a memory without wait states and an
arbiter that always grants. The behavioural accelerator computes the real transform in floating
point and rounds it to integers. It waits a fixed processing latency after `start_op`, then
writes one result per cycle into the output FIFO.

| workload | program | accelerator latency | measured, start to done |
|----------|---------|--------------------:|------------------------:|
| 256-point complex DFT | 8 × 64-word `mvtc`, `execs`, 8 × 64-word `mvfc`, `eop` | 2485 cycles | 3857 cycles |
| 8×8 2D IDCT | 64-word `mvtc`, `execs`, 64-word `mvfc`, `eop` | 18 cycles | 200 cycles |

Every output word in memory is compared with a reference transform. Each run time is checked
against an upper bound: the instruction costs, plus 65 cycles per 64-word transfer, plus the
latency, plus one cycle per result. For the DFT, 1024 words cross the bus. Apart from the
accelerator's 2485 + 256 cycles, the run takes about 1100 cycles, close to one cycle per word.

### Running with Verilator

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ocp_pkg.sv tb/tb_ouessant_top.sv \
          --top-module tb_ouessant_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run any other. `-y rtl` lets Verilator find the modules by file
name. Every module, package and testbench is in a file of its own name. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ocp_pkg.sv rtl/ouessant_top.sv`.
