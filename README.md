# A simple 8-bit computer in SystemVerilog

This is a small stored-program computer for teaching: an 8-bit CPU with two
accumulators, joined to a memory system of ROM, RAM and memory-mapped I/O.
Everything goes over one 8-bit address space. Program and data, sixteen input
ports and sixteen output ports are all reached with the same load and store
instructions, so a program "talks" to the outside world by storing to an
output port address.

The structure follows a published design: the memory map and its sizes, the
register set, the two-bus data path, the control signal names and widths, and
the active-low reset. That design does not publish its instruction set, opcode
values, ALU operation codes, bus select codes or state sequence. Those are
this design's own, chosen to be the smallest consistent set that uses every
data path feature. They are marked as such below and in the file headers.

## Memory map

| Address   | What                     | Size   | Read                              | Write            |
|-----------|--------------------------|--------|-----------------------------------|------------------|
| 0x00-0x7F | program ROM              | 128 x 8 | registered, data 1 clock later   | ignored          |
| 0x80-0xDF | data RAM                 | 96 x 8  | registered, data 1 clock later   | at the clock edge |
| 0xE0-0xEF | output ports 0-15        | 16 x 8  | returns 0x00                     | at the clock edge |
| 0xF0-0xFF | input ports 0-15         | 16 x 8  | combinational, same cycle        | ignored          |

The ROM, RAM and output port block each decode their own address range. A
write to a ROM address, for example, disturbs nothing. A multiplexer steered by
the current address picks what goes back to the CPU. The ROM contents are a
parameter (`PROGRAM`, 128 bytes, entry *i* at address *i*).

## CPU organisation

Registers, all cleared by reset:

* `PC` is the program counter. `MAR` is the memory address register; it alone
  drives the address bus.
* `IR` is the instruction register.
* `A` and `B` are 8-bit working registers.
* `CCR` holds four condition codes: N Z V C, in bits 3 down to 0.

Two multiplexed buses move data between them:

* **Bus1** selects PC, A or B. It is the ALU's first operand and also the
  write data to memory.
* **Bus2** selects the ALU result, Bus1 or the byte read from memory. Every
  register loads from Bus2.

The ALU's second operand is always register B. Each register has its own load
strobe. The PC also has an increment strobe; if both are set, the load wins.
The control unit drives all these strobes, plus the two bus selects, the 3-bit
ALU select and the memory write strobe. It packs them into one control word,
`computer_pkg::ctrl_t`.

## Instructions and their timing

This is the part to read closely if you write programs or change the control
unit. Instructions are one byte (ALU operations) or two bytes: an opcode
followed by an immediate value, an address or a branch target. All branches
are absolute.

| Opcode | Mnemonic    | Effect                    | Flags   | Clocks |
|--------|-------------|---------------------------|---------|--------|
| 0x86 | LDA #imm | A <- imm | - | 7 |
| 0x88 | LDB #imm | B <- imm | - | 7 |
| 0x87 | LDA addr | A <- M[addr] | - | 9 |
| 0x89 | LDB addr | B <- M[addr] | - | 9 |
| 0x96 | STA addr | M[addr] <- A | - | 8 |
| 0x97 | STB addr | M[addr] <- B | - | 8 |
| 0x42 | ADD | A <- A + B | NZVC | 5 |
| 0x43 | SUB | A <- A - B | NZVC | 5 |
| 0x44 | AND | A <- A & B | NZ, V=C=0 | 5 |
| 0x45 | OR  | A <- A \| B | NZ, V=C=0 | 5 |
| 0x46 | INCA | A <- A + 1 | NZVC | 5 |
| 0x47 | INCB | B <- B + 1 | NZVC | 5 |
| 0x48 | DECA | A <- A - 1 | NZVC | 5 |
| 0x49 | DECB | B <- B - 1 | NZVC | 5 |
| 0x20 | BRA t | PC <- t | - | 7 |
| 0x21-0x28 | BMI BPL BEQ BNE BVS BVC BCS BCC t | PC <- t if N / !N / Z / !Z / V / !V / C / !C | - | 7 taken, 5 not |

Any other byte is skipped as a one-byte no-op (4 clocks). Loads and stores do
not change the flags. C is the carry out for additions. For subtractions C is
the borrow: it is 1 when the unsigned result wraps below zero.

Every instruction starts with the same four states:

1. `FETCH_0`: MAR <- PC
2. `FETCH_1`: PC <- PC + 1, while the ROM reads
3. `FETCH_2`: IR <- memory
4. `DECODE_3`: pick the execute sequence

The synchronous memories cause the uneven lengths. A byte is available one
clock after MAR is loaded, so each memory read costs a wait state. In a load
from memory, that wait state is spent twice: once for the address byte and
once for the data. A store drives `write` for one clock, in its last state,
with MAR holding the address and Bus1 carrying A or B. The RAM or output port
captures the byte at the rising edge that ends that clock.

Reset is active low and asynchronous. When it is released, the CPU fetches
from address 0x00. The control unit carries two assertions: A and B are never
loaded in the same cycle, and a write never coincides with a register load.

## The default program

With the default `PROGRAM`, the computer copies input port 3 to output port
0, then copies input port 2 to output port 0, and then spins in a
branch-to-self loop. If input port *i* holds 0x*ii*, output port 0 reads 0x00
until the edge that ends the 17th clock after reset. It then reads 0x33, and
from clock 34 on it reads 0x22. This gives the same sequence of values on
output port 0 (0x00, 0x33, 0x22) as the simulation of the published design.
That simulation's program is not published, so the clock counts here are this
design's own.

To run your own program, build `computer` with
`#(.PROGRAM(my_image))`, where `my_image` is a `computer_pkg::rom_image_t`
(`logic [127:0][7:0]`). `tb/computer_tb.sv` shows how to lay one out
instruction by instruction.

## Where this departs from the published design

* **Ports are sixteen bytes each way.** The published top-level listing
  declares 16-bit `port_in`/`port_out` vectors and connects `port_out`
  straight to `port_in`. Its block diagrams and its simulation instead show
  sixteen 8-bit ports on each side, all going through the memory system. This
  design follows the diagrams and the simulation.
* **Every memory block decodes the full 8-bit address itself.** The published
  listing feeds the RAM a 7-bit address forced to 0 outside its range, and the
  output ports a 4-bit address forced to 0 outside their page. Taken
  literally, a store to ROM would overwrite RAM location 0x80, and any store
  would land in output port 0. Its text says instead that each block has its
  own address-range circuitry, which this design implements.
* **Input ports are selected by the low address nibble.** The published read
  multiplexer indexes the input ports with the high nibble, which is always
  0xF inside the input page.
* **The instruction set, all encodings and the state sequence** are this
  design's own (see above).

## Files

`rtl/` (one module or package per file):

* `computer_pkg.sv`: memory map, opcodes, ALU and bus select codes,
  `ctrl_t`, the default program
* `computer.sv`: top level, CPU plus memory
* `cpu.sv`: control unit plus data path
* `control_unit.sv`: fetch/decode/execute state machine
* `data_path.sv`: registers, Bus1/Bus2 multiplexers
* `alu.sv`: combinational ALU with N Z V C
* `memory.sv`: address decode, read multiplexer, input ports
* `rom_128x8_sync.sv`, `rw_96x8_sync.sv`, `output_ports.sv`: the three storage
  blocks

`tb/` holds one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `cpu_ref_pkg.sv` is an instruction-level reference model that knows each
  instruction's clock count. `cpu_tb` runs random instruction streams against
  it, cycle by cycle, over a flat memory. `computer_tb` runs a directed
  program against it on the real memory map. The directed program makes every
  opcode run, every conditional branch go both ways, every flag get set, and
  every memory region get read and written. The testbench counts each of these
  events and fails if one never happens.
* `computer_default_tb` simulates the top with no parameters overridden and
  checks the default program's output and timing as described above.

## Simulating

With Verilator 5 (add every file from `rtl/` that the testbench uses, with the
package first):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/computer_pkg.sv tb/cpu_ref_pkg.sv tb/computer_tb.sv \
  --top-module computer_tb -o sim
./obj_dir/sim
```

Replace `computer_tb` with any other testbench name. They all finish in well
under a second. The design is two-state clean: every register that is read is
reset, except the RAM contents and the ROM/RAM read registers. Those behave
like real memories and start with whatever they hold.

## Changing it

* **Adding an instruction** takes three edits: an opcode in `computer_pkg.sv`,
  a decode entry and states in `control_unit.sv`, and the same instruction in
  `tb/cpu_ref_pkg.sv`. The ALU codes 110 (pass A) and 111 (A XOR B) are free
  for new instructions.
* **The memory map** constants are in `computer_pkg.sv`. The ROM and RAM also
  index their arrays with `address[6:0]`, and the port blocks with
  `address[3:0]`, so moving a region means editing that block too. The address
  is 8 bits, so the four regions must still share 256 bytes.
