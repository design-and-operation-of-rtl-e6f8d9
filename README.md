# LAMPF-style CAMAC Auxiliary Crate Controller in SystemVerilog

A CAMAC crate normally has one master, its crate controller, which a distant
system computer drives over the CAMAC highway. Each Dataway operation then
costs the full round trip to that computer. The auxiliary crate controller
(ACC) moves the computing into the crate. It is a small LSI-11/2 computer
that sits in the crate beside the crate controller and can drive the Dataway
itself. The system computer keeps control through a DMA window into the
ACC's memory.

For work that is too fast even for the local processor, the ACC has a
microprogrammed bit-slice engine, the Special Processor Unit (SPU). The SPU
runs short "firmware subroutines": it takes the processor bus, moves data
between memory and CAMAC at close to the speed of the bus, tests LAMs, and
hands the bus back.

This repository holds RTL for all the logic of one ACC crate. The processor
itself is not included: its bus cycles enter at ports of the top module.

Two buses tie the design together:

- **The processor bus.** This is a synchronous model of the LSI-11 Q-bus.
  Its slaves are the memories, the processor-board registers, the Control
  Port and the SPU. Its masters are the processor, the Access Port (AP) and
  the SPU; the last two gain the bus by DMA.
- **The CAMAC Dataway** of the crate. The ACC's Control Port (CP) is a
  Dataway master. The Access Port, the Control Port's own LAM source and the
  microcode (PROM) simulator are Dataway modules.

```
   system computer ── highway ── crate controller ──┐
                                                     │ Dataway (N A F, R W, Q X, S1 S2, B I Z C, L)
   ┌────────────── acc_top ──────────────────────────┼───────────────────┐
   │  Access Port ◄──────────────────────────────────┤                   │
   │  PROM simulator ◄───────────────────────────────┤                   │
   │  Control Port ──(N code)── min_controller ──────┘                   │
   │      │                                                              │
   │  ════╪══════ processor bus (18-bit address, DMA arbitration) ═══════│
   │      │        │           │           │          │                 │
   │   page/clock/ 1K RAM,   static RAM,  SPU ◄── microcode from the     │
   │   terminal    boot PROM  fast RAM,        PROM simulator            │
   │   registers              PROM board                                 │
   └────────── processor (outside): cpu_mreq / cpu_rsp, HALT, RESET ─────┘
```

## Clock and bus model

Every block runs from one 20-MHz clock (50 ns). Dataway strobe times are
given in nanoseconds in `acc_pkg` and divided by the clock period.

A processor-bus master works like this:

- It raises `sync` together with `din` (read) or `dout` (write), the 16-bit
  address and the write data.
- It holds them until it sees `rply`.
- The addressed slave pulses `rply` for one clock, with read data.
- The master then drops `sync` for at least one clock.

Slave replies are OR-ed, as on the open-collector bus. The page control
register adds two address bits (17:16) to every master's address. The memory
space is therefore four pages of 32K words.

DMA masters raise a request and wait for the grant. `qbus_arbiter` grants
with fixed priority: the Access Port first, then the SPU. It never grants
while a processor cycle is open. A grant is held until the master drops its
request, so a master may run many bus cycles under one grant. The processor's
bus cycles are held off (`dma_active`) while any grant is out.

## Address map (page 0, octal)

| Address | Device |
|---|---|
| 000000–003776 | 1K-word RAM on the processor board (`lsi_ram`, page 0 only) |
| 004000–007776 | 50-ns 1K RAM board (`fast_ram`, switch-selected base) |
| 040000–057776 | 4K PROM board (`prom_board`, switch-selected base, 4K or 8K) |
| 100000–117776 | 4K static RAM board (`sram_board`, switch-selected base, 4K or 8K) |
| 140000–167776 | Control Port |
| 170000–173776 | 1K-word boot PROM (`lsi_prom`, page 0 only); bootstrap at 173000 |
| 174000, 174040–174076 | SPU unit 0: CSR and parameter RAM |
| 177560–177566 | terminal port RCSR, RBUF, XCSR, XBUF |
| 177570 | page control CSR: PE0 bit 0, PE1 bit 1, CIE bit 6 |
| 177574 | multifrequency clock count (read only) |

The board base addresses are parameters (`SW`). Their bit meanings follow the
boards' DIP-switch tables. The values above are the ones the top module uses.

## Control Port: processor bus cycles become Dataway cycles

The Control Port maps the whole CAMAC command space of one crate into the
processor's address space. A mapped address has the form:

    bits 17-16 page | 15-14 = 1 1 | 13-9 N | 8-5 A | 4-1 F(3..0) | 0 = 0

The fifth function bit comes from the bus direction: F = 16·DOUT + F(3..0).
This gives four groups:

- **DATI, F0–F7.** A Dataway read. R16–R1 are returned, and R24–R17 are
  latched into the holding register at 140002.
- **DATI, F8–F15.** A control function. Q is returned in bit 0 and X in
  bit 1.
- **DATO, F16–F23.** A Dataway write. The data word goes to W16–W1, and the
  latch at 140002 supplies W24–W17.
- **DATO, F24–F31.** A control function. Q and X land in the status register.

The processor's bus cycle is not answered until the Dataway cycle is over.
The processor is therefore simply stretched while CAMAC works.

`cp_cycle_gen` makes the Dataway cycles:

- **Arbitration.** It requests the Dataway from the crate controller on the
  auxiliary controller bus (`acb_req`/`acb_grant`) and raises Busy.
- **Normal cycle.** S1 runs 200–400 ns and S2 600–800 ns. The cycle ends at
  1000 ns.
- **Short cycle** (status SC = 1). S1 runs 200–300 ns, there is no S2, and
  the cycle ends at 350 ns. Modules that act on S2 are not usable in this
  mode.
- **Multi-cycle** (status MC = 1). The port arbitrates once and keeps Busy
  between cycles until MC is cleared. A sequence of operations then pays the
  arbitration only once.
- **Z and C** come from writing bit 2 or bit 3 of the status register. They
  always run with normal timing; Z also raises Inhibit. Inhibit can be held
  with status bit 4.

The station number leaves the port as a 5-bit code. `min_controller`, the
logic in the control station, decodes it into the 24 N lines and returns the
L lines.

### LAMs

`cp_lam` holds two 64 × 1 mask RAMs, both addressed by a 6-bit code. Each is
written through bit 1 of a data word.

- **Interrupt mask (140200–140376).** The lowest-numbered L line that is set
  gives a code, with L1 the highest priority. If the mask bit for that code is
  set and status EI1 is on, the port requests an interrupt. The vector is
  400 octal plus 4·(24 − station).
- **Pattern mask (140400–140576).** Six stations chosen by the user
  (`SL_STATION`) form a 6-bit pattern. With status EI2 on, the six LAMs
  appear on the SPU's special LAM lines when the mask bit for the present
  pattern is set. With switch 4 closed, every pattern passes.

The port also has a LAM source of its own in its station. At A0, F8 tests it,
F10 clears it, and F24 and F26 disable and enable it. Status bit 0 sets it.

## Special Processor Unit

The SPU is the part that takes most care to use. Its microword is 40 bits
wide, and the SPU clock is the 20-MHz clock divided by three (150 ns). Every
SPU clock, the next word from control memory enters the pipeline register
(PLR). All control comes from the PLR. The sequencer is already choosing the
next address while the current word executes.

| Bits | Field |
|---|---|
| 39:36 | sequencer function (2910 set: JZ, CJS, JMP, CJP, PUSH, JSRP, CJV, JRP, RFCT, RPCT, CRTN, CJPP, LDCT, LOOP, CONT, TWB) |
| 35:31 | test condition (octal 0–37) |
| 30:29 | condition control: 0 as tested, 1 forced true, 2–3 forced false |
| 28:24 | control field |
| 23 | PCIN: 0 steps the microprogram counter, 1 holds it |
| 22:14 | ALU source, function, destination (2901 I2–I0, I5–I3, I8–I6) |
| 13 | BC: 1 drives ALU Y onto the SPU bus |
| 12 | ALU carry-in |
| 11 | STDS: 1 freezes the test-condition latch |
| 10:0 | D10–D8, B, A: the branch address, and also the ALU register addresses and the parameter-RAM address |

- **Sequencer (`mcu_2910`).** This is the Am2910 function set: a five-word
  stack, a register/counter and the microprogram counter.
- **ALU (`alu_2901`).** This is four 2901 slices as one 16-bit unit: 16
  registers, a Q register, and the shifter.
- **Test conditions.** These are latched on each SPU clock, so an
  instruction tests what the one before it produced:
  - 0 zero, 1 negative, 2 carry, 3 overflow, 4 odd, 5 A > B, 6 EF.
  - 7 bus ready: DMA hold granted and no bus cycle in progress.
  - 10–17: the complements of 0–7.
  - 22–27 and 32–37: the six special LAMs and their complements.
- **Control field.** The codes are:
  - 1: request DMA hold.
  - 2: release the hold and clear EF.
  - 3: load the bus address register from Y.
  - 4: load the bus data register from Y.
  - 5: read cycle into the bus data register.
  - 6: write cycle from it.
  - 7: parameter RAM word A onto the ALU D inputs.
  - 10: the bus data register onto D.
  - The two low bits of every code choose the shift fill: zero, one, rotate
    or arithmetic.

To the processor, the SPU is a CSR and a 16-word parameter RAM.
Writing the CSR with bit 15 (EF) set and a start address in bits 10:0 starts
a routine. Reading the CSR gives EF in bit 0, which is 1 while the routine
runs.

The idle microprogram sits at address 0 with CJV on EF and PCIN = 1. When EF
rises, it jumps to the start address. A routine ends with control code 2
(clear EF), followed by JZ with PCIN = 1. Two rules follow from the pipeline:

- The first word at a routine's start address executes twice, so it must be
  harmless to repeat.
- The clear-EF word must come one word before the JZ, so that the CJV at
  address 0 already sees EF low.

A bus transfer is written as follows:

1. Request the hold (code 1).
2. Wait on test condition 7.
3. Load the address (code 3).
4. Load data if writing (code 4).
5. Issue the cycle (code 5 or 6).
6. Wait on condition 7 again.

While the SPU holds the bus, the processor is stalled.

### PROM simulator

The control memory is the 512 × 40 RAM in `prom_sim`, a CAMAC module. The
system computer can therefore load microcode over the Dataway:

- A0 F16 writes the memory address register. W12–W10 pick one of five byte
  banks (bank k is PLR bits 8k+7:8k) and W9–W1 pick the word.
- A1 F16 writes a byte.
- A1 F0 reads a byte.
- Each A1 access then steps the word address.

While an A1 command holds Busy, the module raises the SPU's test-inhibit,
which stops the SPU clock.

The RAM serves one side at a time. A0 F16 puts the module into access mode,
and A0 F0 takes it out. In access mode the SPU is fed an all-zero microword
(JZ with no control), which keeps it idle at address 0. The module starts in
access mode at power-up, so the SPU cannot run whatever the RAM happens to
hold before it has been loaded.

## Access Port

The Access Port is the system computer's way in. It holds a memory address
register (MAR) and a memory data register (MDR). Its commands are:

- **F17 at A2** writes MAR and starts a DMA read.
- **F16 at A3** writes MDR and starts a DMA write. MAR steps by 2 after the
  write.
- **F25 at A3** steps MAR by 2 and reads, for block reads.
- **F0 at A3** and **F1 at A2** read MDR and MAR back.
- **A4 F27** answers Q = 1 once the cycle has completed.
- **F24 at A0** halts the processor.
- **F25 at A0** continues a halted processor, or issues bus INIT if it is
  running.
- **F25 at A1** releases HALT and pulses RESET, which boots the processor at
  173000.

A command that finds the previous DMA cycle still running answers Q = 0 and
must be repeated. Dataway C resets the port; Z does not.

## Processor-board logic

- **`page_ctl`**: the page register (two page bits) and the clock-interrupt
  enable.
- **`mf_clock`**: a 16-bit count of 100-Hz or 1000-Hz ticks, with an EVENT
  interrupt when CIE is set. Ticks come from dividing the 20-MHz clock by
  200,000 or 20,000.
- **`term_port`**: the console serial line with the DL11-style registers.
  It has 8 data bits and two stop bits, and the baud rate is set by four
  switches (110–9600). A framing error (for example BREAK) asserts HALT.
- **`lsi_ram` and `lsi_prom`**: the 1K-word RAM and the 1K-word boot PROM.
- **Memory boards** (`fast_ram`, `sram_board`, `prom_board`): each is a
  `qbus_mem` core behind its own address decoder. Each replies after a fixed
  number of clocks: 4 for the 50-ns RAM, 11 for the 200-ns RAM, 9 for the
  PROM board and 6 for the processor board. These delays make the bus-cycle
  times come out close to measured ones: about 225 ns and 575 ns of SYNC for
  the two RAMs.

## How it compares with the original hardware

The top-level testbench runs an SPU routine that moves one word, using each
kind of memory. It counts SPU cycles from EF rising to EF falling:

| Source | SPU cycles (routine) | Extra against 50-ns RAM | Extra in the original measurements |
|---|---|---|---|
| 50-ns RAM | 27 | – | – |
| 200-ns RAM | 29 | 2 | 3 |
| CAMAC, normal cycle | 33 | 6 | 5 |
| CAMAC, short cycle | 29 | 2 | 3 |

The order and the rough size of the differences match. The exact counts
differ for three reasons:

- The SPU clock here is 150 ns, not 142 ns.
- The model has its own arbitration and reply stages.
- The sequencer and ALU follow the published 2910 and 2901 behaviour rather
  than gate-level timing.

Other points where this RTL makes its own choice or departs from the
original:

- **Condition-jump polarity.** JSRP and JRP follow the 2910 function table:
  a true condition jumps to the PLR address, and a false one to the
  register. One prose description of JSRP states the reverse.
- **Special LAM numbering.** The special LAMs are test conditions 22–27 and
  32–37, as in the condition table. The prose names 23–27.
- **Undocumented layouts.** The exact positions of BC, carry-in and STDS in
  the microword, and the numbering of the SPU control codes, are this
  design's choices.
- **Delays.** Memory access times are fixed reply delays, and the Dataway
  normal-cycle strobes use the CAMAC standard's nominal times.
- **Bus model.** Only whole-word transfers are modelled. Interrupt
  acknowledge cycles are not modelled: the interrupt requests and their
  vectors are outputs.
- **Not included.** The LSI-11/2 processor, the DEC dynamic RAM board, the
  cassette unit and control panel, and the proposed serial channel
  controller and multiplier. The channel-controller test conditions read as
  constants.

## Files

- `rtl/acc_pkg.sv`: the shared types (bus structs, Dataway command, SPU
  microword) and constants.
- `rtl/acc_top.sv`: the whole crate-side design.
- One file per block in `rtl/`. Each file opens with a description of its
  interface and timing.
- `tb/tb_<block>.sv`: one self-checking testbench per block, plus
  `tb/tb_acc_top.sv`, which runs the whole design at its real size.
- `tb/tb_util.svh` (check counters) and `tb/tb_qbus.svh` (bus-master
  tasks): shared testbench code.
- Initial contents for the testbenches:
  - `tb/spu_ucode.hex`: the SPU test microprograms, one 40-bit word per line.
  - `tb/lsi_prom_init.hex` and `tb/prom_board_init.hex`: PROM images.

## Simulating

You need Verilator 5 with `--timing` support. Run the commands from the
repository root, because the testbenches read their `.hex` files by paths
relative to it. Verilator finds the modules a testbench uses through `-Irtl`;
only the package has to be named first.

```
verilator --binary --timing -Irtl -Itb --top-module tb_spu rtl/acc_pkg.sv tb/tb_spu.sv -o sim
./obj_dir/sim
```

Replace `tb_spu` with any testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a run that hangs
and counts it as a failure.

`tb_acc_top` runs the complete design with default parameters:

- It boots and halts the processor through the Access Port.
- It loads and reads back memory by DMA.
- It loads the SPU microcode through the PROM simulator.
- It drives CAMAC in normal, short and multi-cycle modes, with Z and C.
- It takes LAM interrupts.
- It runs SPU routines, including one that stalls the processor.
- It exercises the terminal port and the clock interrupt.

It reports how often each of these mechanisms occurred and fails any that
never did. It takes a few seconds of run time.

To change the SPU test microcode, edit `tb/spu_ucode.hex`. Each line is one
40-bit word, in the field layout above.
