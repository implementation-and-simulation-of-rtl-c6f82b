# An MC68HC11-compatible microcontroller in SystemVerilog

This is a single-chip 8-bit microcontroller that runs M68HC11 machine code
cycle by cycle. Every instruction takes the number of E-clock bus cycles given
in the M68HC11 instruction table, and every bus cycle does exactly one memory
or register access. It is the microcontroller of a hardware/software
co-design study that was first modelled in SystemC, rewritten as
synthesizable RTL. The chip has:

- the CPU, split into three parts: the controller state machine, the register
  file and the ALU;
- an address bus controller that holds the memory map;
- 12 KB of ROM, 512 bytes of RAM and 512 bytes of EEPROM;
- three peripheral blocks:
  - handshake parallel I/O (ports B and C, STRA/STRB), which also forms the
    multiplexed external bus in expanded mode;
  - the timer system (free-running counter, input capture, output compare,
    real-time interrupt, COP watchdog, pulse accumulator, port A);
  - serial communications (SCI, SPI, port D).

The main idea is the bus cycle. Each E cycle is built from four phases of the
external clock. The controller, ALU and memories each act in a fixed phase, so
one access happens per E cycle, and the result of any operation on the byte
read in a cycle is ready by the end of that same cycle. Most of the rest
follows from this.

## The bus cycle: one clock, four enables

`hc11_clock_divider` divides the external clock by four. A two-bit phase
counter walks through the four internal cycles of one E cycle:

| internal cycle | E    | PH2  | starts at     | enable, high in the clock before |
|----------------|------|------|---------------|----------------------------------|
| 1              | low  | low  | E falling     | `e_fall_en`                      |
| 2              | low  | high | PH2 rising    | `ph2_rise_en`                    |
| 3              | high | high | E rising      | `e_rise_en`                      |
| 4              | high | low  | PH2 falling   | `ph2_fall_en`                    |

PH1 is the inverse of PH2, and E lags PH2 by a quarter period. AS (the address
strobe) is high for one external period and starts half a period after E falls.
E, PH1, PH2 and AS are brought out to pins so they can be observed.

The original model clocks its blocks on these derived clocks. Here nothing is
clocked by them. All flip-flops run on the external clock `clk` and act only
when one of the four one-cycle enables is high, so the whole chip is a single
clock domain. The only flop on the falling edge of `clk` is the one that makes
AS. One bus cycle then runs like this:

1. **E falling edge** (`e_fall_en`):
   - the CPU controller takes the byte read in the cycle that just ended and
     updates the register file;
   - it chooses the address sources, `rw` and the write data for the next cycle;
   - the address bus controller latches the new address;
   - memories and peripheral registers store the data of a write cycle.
2. **AS high:** the ROM, RAM and EEPROM latch the address.
3. **PH2 rising** (`ph2_rise_en`): the handshake block acts on STRA edges.
4. **E rising** (`e_rise_en`): the memories put the addressed byte on their
   outputs.
5. **PH2 falling** (`ph2_fall_en`): the ALU registers its result and flags,
   in time for the next E falling edge.

There is no three-state bus. Each source drives `$00` when it is not selected,
and the read bus is the OR of all of them. In a write cycle the bus carries the
CPU's data instead. Registers in the `$1000` block answer combinationally from
the latched offset.

## The CPU controller

`hc11_cpu` is the largest and hardest part. It is a state machine (`cpu_state_e`
in `hc11_pkg`) that takes one step per E cycle. A step is one bus access plus
whatever register-file and ALU work fits around it. The states are:

- **Fetch:** `ST_START` (reset vector), `ST_FETCH`, and `ST_FETCH2` (the second
  opcode byte after a prefix `$18`, `$1A` or `$CD`).
- **Addressing:** `ST_DIR`, `ST_EXT_HI/LO`, `ST_IND_LO/HI` and `ST_REL_LO/HI`
  collect the operand address or branch offset.
- **Execute:**
  - `ST_EXEC8` for 8-bit operations;
  - `ST_ARITH16_LO/HI` and `ST_LOGIC16_LO/HI` for the 16-bit ones, done as
    two 8-bit ALU passes;
  - `ST_READ_OP` and `ST_READ_EXEC_OP` for memory operands;
  - `ST_WRITE1/2` for stores and read-modify-write.
- **Long instructions:** `ST_MUL`, `ST_IDIV` and `ST_FDIV`.
- **Stack and interrupts:** `ST_STACK`, `ST_STACK_INCSP`, `ST_PUSH`, `ST_PULL`,
  `ST_SET_IMASK` and `ST_LOAD_VECTOR` cover interrupts, SWI, RTI, JSR/BSR and RTS.
- **Halt and test:** `ST_WAIT` (WAI), `ST_STOP`, `ST_TEST` (the test mode that
  counts on the address bus) and `ST_ERROR`.

Three details let the controller meet the instruction-table cycle counts:

- **Next-value address output.** The register file's `addr_out` shows the value
  the chosen register will hold *after* the current edge's update. Examples are
  PC+1 during a fetch, or SP−1 during a push. The address controller latches
  that value on the same edge, so no cycle is lost waiting for a pointer to
  settle.
- **ALU inside the cycle.** Operands are set during the first half of the cycle.
  The ALU registers its result at the PH2 falling edge, and the controller
  writes it back at the E falling edge. So `LDAA`/`ADDA` immediate take 2
  cycles and `INC ind,X` takes 6, as in the table.
- **Address sources.** The address high byte comes from four sources: the
  register file, the ALU result, `$00` for direct addressing, or `$FF` for
  vectors. The low byte also has four: the register file, the byte just read
  from the data bus (for extended and direct addressing), the ALU result
  (indexed offset added by the ALU), or the controller's vector byte. The
  controller chooses a pair each cycle.

**Multiply and divide** are multi-step ALU commands. MUL is `STRMUL`, seven `MUL`
steps and `ENDMUL`: 10 cycles in total, with C set to bit 7 of the product.
IDIV and FDIV load the numerator and divisor (`LDN` / `LDFDIVN`), run 16
restoring shift-subtract steps, then fetch the quotient (`DIVRESQ`) and the
remainder (`DIVRESR`): 41 cycles. Divide by zero sets C and returns `$FFFF`.
16-bit arithmetic passes the low byte's carry and Z into the high-byte pass
(`itype = ITYPE_HIGH`).

**Interrupts.** XIRQ is masked by X. Fifteen maskable requests (`int_src`) are
masked by I, in this fixed priority from highest to lowest:

- IRQ pin (shared with the handshake flag STAF);
- RTI;
- IC1, IC2, IC3;
- OC1 to OC5;
- TOF, PAOV, PAI, SPI, SCI.

A request is checked where the next opcode fetch would start. When one is taken,
the fetched byte is thrown away and the controller stacks nine bytes in this
order: PCL, PCH, IYL, IYH, IXL, IXH, A, B, CCR. It then sets I (and X for XIRQ)
and loads the vector. The vector addresses are:

| source                  | vector             |
|-------------------------|--------------------|
| reset                   | `$FFFE`            |
| COP reset               | `$FFFA`            |
| illegal opcode          | `$FFF8`            |
| SWI                     | `$FFF6`            |
| XIRQ                    | `$FFF4`            |
| IRQ                     | `$FFF2`            |
| maskable source *i*     | `$FFF2 − 2i`       |

For example, OC2 uses `$FFE6` and SCI uses `$FFD6`. WAI stacks first and then
waits. STOP halts until a request arrives, unless S is set, in which case it
acts as a NOP.

All opcodes of pages 0, `$18`, `$1A` and `$CD` are decoded. Page `$18` is
handled by swapping Y for X.

## Memory map and the INIT register

| range (reset)   | contents                                                  |
|-----------------|-----------------------------------------------------------|
| `$0000-$01FF`   | RAM, 512 bytes (`hc11_ram`)                               |
| `$1000-$103F`   | register block: peripherals, INIT, PPROG                  |
| `$B600-$B7FF`   | EEPROM, 512 bytes (`hc11_eeprom`)                         |
| `$D000-$FFFF`   | ROM, 12 KB (`hc11_rom`), vectors at the top               |

`hc11_addr_ctrl` decodes the chip selects from the latched address. It also
holds two registers:

- **INIT** (`$103D`): bits 7:4 move the RAM and bits 3:0 move the register
  block to any 4 KB page. Where the two overlap, the register block wins.
  INIT can only be written during the first 64 E cycles after reset; the CPU
  signals the end of that window.
- **PPROG** (`$103B`): controls EEPROM programming.

**EEPROM writes** depend on PPROG:

- With both EELAT and EEPGM clear, writes are ignored.
- With either set and ERASE clear, a write programs the byte.
- With ERASE set, a write erases: the byte if BYTE is set, else the 2-byte row
  if ROW is set, else the whole array.

Erasing clears one byte per clock while `eeprom_busy` is high.

**Loading the ROM.** The ROM is filled through the `load_we`/`load_addr`/
`load_data` port of `hc11_mcu`, one byte per clock, while `rst_n` is held low.
`load_addr` is the offset from `$D000`.

## Peripherals

All peripheral registers sit at their MC68HC11E9 offsets in the `$1000` block
and are written at the E falling edge. Each peripheral decodes the register
offset itself and drives `$00` on its read port when none of its own registers
is addressed.

**Handshake I/O** (`hc11_handshake_io`) covers ports B and C, STRA/STRB, and
PIOC, PORTCL and DDRC. It has three modes:

- **Simple strobe:** a PORTB write pulses STRB for two E cycles, and a STRA edge
  latches port C into PORTCL.
- **Full-input handshake:** STRB shows "ready" and is re-armed by reading
  PORTCL, as a pulse or a level depending on PLS.
- **Full-output handshake:** STRB shows "data ready". It can three-state the
  port C pins whose DDRC bit is 0 while STRA is inactive (PLS=1).

Common to all modes:
- STRA is sampled every clock and acts at the next PH2 rising edge.
- STAF is cleared by reading PIOC and then accessing PORTCL.
- STAF with STAI set requests IRQ.

**Expanded mode.** With the `expanded` input high, ports B and C become the
external bus:

- Port B carries address bits A15..A8.
- Port C carries A7..A0 while E is low. While E is high it carries the data:
  driven by the chip in a write cycle, an input in a read cycle.
- STRB becomes R/W, and `as_out` is the address strobe that tells external
  logic when to latch the low address byte.
- Any address that no on-chip memory or the register block claims is an
  external access. Its read data is taken from the port C pins.

**Timer** (`hc11_timer`) covers:

- **TCNT:** a free-running counter with prescale 1, 4, 8 or 16. It has a
  buffered low byte, so a 16-bit read is consistent, and sets TOF when it
  wraps.
- **Input capture and output compare:** three input captures on PA2..PA0. Five
  output compares: OC2..OC5 drive PA6..PA3, and OC1 can drive PA7..PA3
  through OC1M/OC1D, winning over the others on a shared pin. CFORC forces the
  pin actions without setting flags.
- **RTI:** every 2^13 E cycles times 1, 2, 4 or 8.
- **COP watchdog:** times out after 2^15 E cycles times 1, 4, 16 or 64. Writing
  `$55` then `$AA` to COPRST restarts it. On timeout it resets the chip for
  one clock and restarts through `$FFFA`.
- **Pulse accumulator** on PA7: event counting, or gated accumulation counting
  every 64th E cycle.

**Serial** (`hc11_serial`) covers:

- **SCI:**
  - The baud divider gives bit rate = E / (16 × SCP × 2^SCR), with SCP one of
    1, 3, 4 or 13.
  - The transmitter is double-buffered: 8 or 9 data bits, idle frames, break.
  - The receiver samples at 16× the bit rate. A start bit must be confirmed by
    two of the samples RT3, RT5 and RT7. Each bit is a majority vote of RT8 to
    RT10, and a disagreement sets NF.
  - Flags: FE, OR, IDLE, and receiver wake-up on an idle line or on an address
    mark.
- **SPI:**
  - master or slave, with CPOL/CPHA;
  - master SCK at E/2, E/4, E/16 or E/32;
  - flags SPIF, WCOL and MODF.
- **Port D:** general I/O on the pins the SCI and SPI do not claim.

## Where this design departs from the original model

- **One clock with enables** instead of PH1/PH2/E/AS clocks. There is no
  three-state data bus: unselected sources drive zero and the bus is an OR.
  Bus timing at the E-cycle level is the same.
- **ROM load port** instead of loading a file at simulation start.
- **Two operating modes, not four.** Normal single-chip and normal expanded
  mode are built. Bootstrap mode needs the bootloader ROM and is not built,
  and neither is the factory test mode. Expanded-mode pin timing is only as
  fine as the internal clock edges. Port C CWOM (wired-OR) is stored but the
  pins stay push-pull.
- **No A/D converter.** It is analog, and the original leaves it out too. Port E
  is a plain input port at `$100A`.
- **No bootloader ROM.** Its contents are not available.
- **No CONFIG register.** The COP enable is the `cop_enable` input.
- **Fixed interrupt priority.** HPRIO is not modelled, so the priority order
  is the M68HC11 default.
- **EEPROM timing.** Programming completes within the bus cycle, and erasing
  takes one clock per byte. The milliseconds of programming time of a real part
  are not modelled.
- **Two module splits differ from the original.** Port D lives in the serial
  block because the SCI and SPI share its pins. Port A lives in the timer block
  because the timer functions share its pins.
- **Conflicting ROM size.** The original gives both 8 KB and 12 KB for the
  ROM. 12 KB at `$D000` is used, because that is what the original model
  builds.
- **Conflicting number of output compares.** The original mentions both four
  and five output compares. Five are built, as on the M68HC11.
- **Where the original is silent.** Widths, encodings and reset values of the
  internal control signals are this design's own choices. Peripheral register
  bit layouts follow the M68HC11. Each module's opening comment says which
  parts follow the original and which are its own.

## Simulating with Verilator

Every testbench is self-checking, has a watchdog, and ends by printing
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5. The
package must come first; `-y rtl` finds the modules:

```sh
verilator --binary --timing --top-module tb_hc11_mcu -y rtl \
    rtl/hc11_pkg.sv tb/tb_hc11_mcu.sv
./obj_dir/Vtb_hc11_mcu
```

To run a different test, replace `tb_hc11_mcu` with any testbench in `tb/`.
Add `+verilator+rand+reset+2` to the run to start the flops from random values;
every testbench is written to pass that way.

| testbench               | what it shows                                                     |
|-------------------------|-------------------------------------------------------------------|
| `tb_hc11_clock_divider` | phase order of E/PH1/PH2/AS and the enables                       |
| `tb_hc11_alu`           | the ALU reference vectors, random operands against a model, MUL/IDIV/FDIV |
| `tb_hc11_regfile`       | register updates, exchanges, CCR masking, next-value address      |
| `tb_hc11_addr_ctrl`     | address source selection, chip-select map, INIT window and remap  |
| `tb_hc11_cpu`           | a program covering every addressing class, checked cycle by cycle against the instruction table; SWI, IRQ |
| `tb_hc11_rom`, `tb_hc11_ram`, `tb_hc11_eeprom` | E-clock read/write timing; EEPROM program, byte/row/bulk erase |
| `tb_hc11_handshake_io`  | the three handshake modes, STAF clearing, STRB timing, expanded-mode pin multiplexing |
| `tb_hc11_timer`         | TCNT and prescale, output compare pin actions, input capture, RTI and COP periods, pulse accumulator |
| `tb_hc11_serial`        | port D, SCI bit time and loopback, OR/FE, SPI master transfers, WCOL, MODF |
| `tb_hc11_mcu`           | whole chip at default sizes: MUL/IDIV/FDIV, STRB, SCI loopback, EEPROM program and erase, OC2 interrupt, IRQ, XIRQ, COP reset |
| `tb_hc11_instr_program` | the self-checking instruction and addressing-mode test program (arithmetic, logic, shifts, MUL, IDIV, stack, bit instructions in every addressing mode): all 31 tests pass, 148 instructions to its success STOP |
| `tb_hc11_expanded`      | whole chip in expanded mode with an external memory on ports B/C: external read, write and read-back |
| `tb_hc11_sci_program`   | the serial-port test program: sends `!` to `Z` repeatedly on TxD, 62 frames decoded and checked |

The whole-chip tests run with every parameter at its default and finish in
well under a second.

The two test programs of the original work both run unchanged on the whole
chip. The instruction test program is 466 bytes and fits easily in the 12 KB
ROM. The program sets no stack pointer; the board it was written for left SP
at `$0041`, so its testbench puts `LDS #$0041` in front.

## Changing the design

- **Memory sizes:** the parameters of `hc11_mcu` (`ROM_SIZE`, `RAM_SIZE`,
  `EE_SIZE`, `EE_ROW_BYTES`).
- **Memory map:** decoded only in `hc11_addr_ctrl`.
- **Register offsets and ALU command codes:** in `hc11_pkg`.
- **Adding a peripheral:**
  1. Decode the offset in the new block.
  2. Drive `$00` when the block is not addressed.
  3. OR its read data into `read_bus` in `hc11_mcu`.
  4. Give its request a position in `int_src`. The position sets both the
     priority and the vector address.
