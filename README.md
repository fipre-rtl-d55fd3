# R82R: a fixed-instruction-set processor with coprocessors loaded on demand

A small embedded processor gets hardware acceleration without changing its
instruction set or its compiler. It keeps its ordinary instruction set and adds five
instructions that talk to *coprocessors*. A coprocessor lives in a partially
reconfigurable area of the FPGA. When the program selects a coprocessor
that is not in the FPGA, a hardware *configuration controller* (CC) fetches
that coprocessor's partial bitstream from an external configuration memory. It then
writes the bitstream into the FPGA through the internal configuration port
(ICAP). The processor keeps running while this happens. This is a
reconfigurable coprocessor system. The processor and the coprocessors are
loosely coupled: they exchange words over a small handshaked signal set, and
they can compute in parallel.

This repository holds synthesizable SystemVerilog for the FPGA-resident part of
such a system, in its two-area form (R82R):

* the extension of the R8 processor that executes the reconfiguration
  instructions (the "R8R" part);
* the configuration controller;
* the local memory, the system bus with its arbiter, and the RS232 serial
  interface to the host;
* a reconfigurable region of N areas with three coprocessors: multiplier,
  divider and square root.

Three parts of the complete system are not in this RTL. The base R8 processor
core is taken from earlier work and its instruction set is not reproduced here.
The external configuration memory and the FPGA's ICAP primitive are also left
out. Each of these parts connects to the top level through ports, and the
testbenches play their roles.

```
 host PC ==RS232==> serial_interface --(master 1)--+
                                                   |  system_bus + bus_arbiter
 R8 core bus port -------------------(master 0)----+----> local_memory (port B)
                                                   +----> config_controller registers
 R8 core memory port ------------------------------------> local_memory (port A)

 R8 core instruction issue --> r8r_reconf_unit --reconf/remove--> config_controller <--> configuration memory
                                    |           <------ack-------        |             (off chip)
                                    |  IOce IOrw IOreset IOaddress       +--> ICAP (FPGA primitive)
                                    |  IOdata_out / IOack IOdata_in      |
                                    v                                    | area_clear / area_load
                           reconfigurable_region  <----------------------+
                           (area 0, area 1, ... each holds one coprocessor)
```

`IOaddress` goes both to the areas and to the CC. The CC reads it to learn
which coprocessor a `reconf` or `remove` refers to.

## The five reconfiguration instructions

The core decodes the instruction and hands the opcode, the address operand and
its register values to `r8r_reconf_unit`. The core then stalls until
`instr_done`.

| Instruction | What the unit does |
|---|---|
| `SELR a` | Records `a` as the selected coprocessor. Raises `reconf` with `IOaddress = a` until the CC sends `ack`. |
| `DISR a` | Raises `remove` with `IOaddress = a` until `ack`. From then on the area holding `a` may be overwritten. |
| `INTR a` | Pulses `IOreset` for one cycle with `IOaddress = a`. This resets that coprocessor. |
| `WRR RS1 RS2` | Sends two write transfers to the selected coprocessor: first the command (RS1), then the data word (RS2). |
| `RDR RS RT` | Sends a write transfer carrying the command (RS), then a read transfer. The word read is returned on `rt_data` for register RT. |

**SELR does not wait for the reconfiguration.** The CC acknowledges a select
request before it starts loading the bitstream. The processor is therefore free
to do other work during the load, which takes about 10 ms for a 46 KB bitstream.
A program does not need to poll. Its first `WRR` or `RDR` to the new
coprocessor stalls on the missing `IOack` until the area is configured. If you
want to wait without touching the coprocessor, poll bit 0 of the CC status
register over the bus.

### Transfers on the IO signal set

The same signal set reaches every area. On an FPGA it crosses the
region boundaries through vendor bus macros, which are plain wires here.

* A transfer is a request held on `IOce`, with `IOrw = 1` for a write
  (`IOdata_out` valid) or `IOrw = 0` for a read.
* The addressed coprocessor answers with a one-cycle `IOack`. For a read, the
  word is on `IOdata_in` in that cycle.
* Areas drive `IOack` and `IOdata_in` to zero when they are not answering. The
  region therefore combines the areas by OR-ing these lines.
* A transfer costs two cycles: request, then acknowledge.

Each coprocessor reads its transfers through `copro_shell`:

* The first write is a *command* word.
* A second write is the *data* for that command (this is `WRR`).
* A read returns the register that the command selected (this is `RDR`).
* A read of a result is not acknowledged while the unit is busy. `RDR`
  therefore also synchronises the processor with the computation.
* Command 3 (status) is always answered at once.

### Coprocessor commands

| Coprocessor (IOaddress) | WRR command, data | RDR command, result |
|---|---|---|
| multiplier (1), 16 x 16 -> 32, 16 cycles | 0: A; 1: B, starts | 0: product[15:0]; 1: product[31:16]; 3: status (bit 0 busy) |
| divider (2), 32 / 16, 32 cycles | 0: dividend[31:16]; 1: dividend[15:0]; 2: divisor, starts | 0: quotient[15:0]; 1: quotient[31:16]; 2: remainder; 3: status (bit 0 busy, bit 1 divide-by-zero) |
| square root (3), 32-bit radicand, 16 cycles | 0: radicand[31:16]; 1: radicand[15:0], starts | 0: root; 1: remainder[15:0]; 2: remainder[16]; 3: status |

Division by zero sets the flag. It returns quotient 0xFFFFFFFF and the low half
of the dividend as the remainder. All three units are bit-serial (one result bit
per clock), which keeps them small.

End to end, one operation through the R8R costs the following, counting every
WRR and RDR the core issues:

| Operation | Instructions | Cycles |
|---|---|---|
| multiplication | WRR, WRR, RDR, RDR | 35 |
| division | 3 WRR, 3 RDR | 63 |
| square root | 2 WRR, 1 RDR | 29 |

## Configuration controller

`config_controller` has four jobs.

1. **It is a register slave for the host.** Before the application runs, the
   host writes bitstreams byte by byte into the configuration memory through
   the CC's `PTR` and `DATA` registers. It then writes a directory that gives
   the start address and length of each coprocessor's bitstream.
2. **It keeps an area table.** For each area the table holds the occupant's
   identifier, whether the area holds a complete configuration, and whether the
   occupant is in use. An occupant is in use after SELR and stops being in use
   after DISR.
3. **It chooses an area on SELR.**
   * If the coprocessor is already in an area, the CC only marks that area as
     in use. No reconfiguration happens.
   * Otherwise it takes an empty area if one exists, or else an area whose
     occupant was dismissed.
   * If every area holds a coprocessor in use, it sets the *no free area*
     status flag and loads nothing. The request is still acknowledged, so the
     processor never hangs.
   * An identifier with no directory entry sets the *unknown coprocessor* flag
     in the same way.
4. **It streams the bitstream.** The CC empties the area (`area_clear`). It then
   reads the bitstream from configuration memory one byte at a time and writes
   each byte to ICAP, holding off while `icap_busy` is high. After the last
   byte it announces the new occupant (`area_load` with `area_id`).

**Timing.** Each byte costs one memory read plus one ICAP write cycle. Let R be
the number of cycles from raising `cm_rd` to seeing `cm_ready`. A bitstream of
L bytes then takes L·(R+2) cycles from the acknowledge of SELR to `area_load`,
provided ICAP is never busy. The full-size testbench uses a memory with R = 3
and a 46 KB (47,104-byte) bitstream. The load takes 235,520 cycles, which is
9.8 ms at a 24 MHz clock. That matches the roughly 10 ms per area measured on
the original FPGA prototype. A faster memory shortens the load in proportion.

### How reconfiguration is modelled

Partial reconfiguration changes the FPGA fabric itself and cannot be written
as RTL. Each `reconfigurable_area` therefore contains one instance of every
coprocessor in the bitstream library, plus a register `loaded_id` that names
the one currently "configured".

* Only that instance can be selected. The others sit idle in reset.
* `area_clear` empties the area when the CC starts writing a bitstream.
* `area_load` installs the new occupant once the last byte has gone to ICAP.
* A newly loaded coprocessor starts from its reset state.

The CC's byte stream to ICAP is real. It is what a real ICAP would consume. In
simulation the ICAP model checksums it.

On an FPGA, a flow with partial reconfiguration would synthesise one
coprocessor per area bitstream. The synthesis numbers for `reconfigurable_area`
in this repository therefore count all three coprocessors, not one.

## Host access

### Serial protocol

The link runs RS232 8N1 with `CLKS_PER_BIT` clocks per bit. The default is 208,
which gives 115200 baud at 24 MHz.

| Host sends | Effect | Reply |
|---|---|---|
| `0x57 'W'`, addr[15:8], addr[7:0], data[15:8], data[7:0] | bus write | `0x4B 'K'` |
| `0x52 'R'`, addr[15:8], addr[7:0] | bus read | data[15:8], data[7:0] |

Any other first byte is ignored.

### System bus address map

All addresses are word addresses.

| Range | Slave |
|---|---|
| 0x0000–0x7FFF | local memory, port B |
| 0x8000–0x803F | CC registers |
| anything else | answered with 0 |

### CC registers

Offsets are from 0x8000.

| Offset | Register |
|---|---|
| 0 / 1 | configuration-memory write pointer, low / high |
| 2 | DATA: a write stores byte [7:0] at the pointer and increments the pointer |
| 3 | STATUS: bit 0 loading; bit 1 no free area; bit 2 unknown coprocessor; bits [7:4] and [11:8] occupants of areas 0 and 1. Writing 1 to bit 1 or bit 2 clears that flag. |
| 4 | number of completed reconfigurations |
| 8 + 4·id + {0,1,2,3} | directory entry: base low, base high, length low, length high (length in bytes, 0 means no bitstream) |

### Bus handshake and arbitration

A master holds `valid`, and keeps its fields stable, until the one-cycle `ready`.
It drops `valid` in the cycle after it sees `ready`. The arbiter is round-robin
and holds a grant for one complete transaction.

## Parameters of `r82r_top`

| Parameter | Default | Meaning |
|---|---|---|
| `N_AREAS` | 2 | reconfigurable areas (1 gives the one-area R81R variant) |
| `MEM_ADDR_W` | 12 | local memory of 2^12 16-bit words |
| `CM_ADDR_W` | 20 | configuration memory byte address (1 MiB) |
| `CLKS_PER_BIT` | 208 | serial bit time in clocks |

The word width (16 bits) and the coprocessor identifiers are set in `fipre_pkg`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Build
and run any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fipre_pkg.sv tb/tb_r82r_top.sv --top-module tb_r82r_top -o sim
./obj_dir/sim
```

Replace `tb_r82r_top` with any other testbench name to run that one.

* `tb_r82r_top` runs the whole system end to end, with a short serial bit time
  and small bitstreams:
  * the host loads memory, bitstreams and the directory over RS232 while the
    core polls the bus;
  * there are loads into both areas;
  * the core works during a load, and its first access stalls until the load
    ends;
  * INTR aborts a computation;
  * SELR with no free area is flagged;
  * a dismissed area is replaced;
  * a coprocessor that is already present is not reloaded;
  * the ICAP stream is checksummed after every load;
  * each mechanism is counted and must occur at least once.
* `tb_r82r_full` runs the top at its default parameters with three 46 KB
  bitstreams. It checks the 235,520-cycle load. It then runs, with every result
  checked, the operation counts at which the hardware units were reported to
  break even against software: 750 multiplications, 260 divisions and 200
  square roots. It runs in about a second.
* `tb_r81r_top` runs the one-area variant (`N_AREAS = 1`). It selects and uses
  the multiplier, checks that selecting the divider is refused while the
  multiplier is in use, then dismisses it and checks that the divider replaces
  it and later the multiplier comes back.
* `tb_r82r_image` runs a point filter over an 800 x 600 image at default
  parameters: 480,000 gain multiplications, one per pixel. Pixels are produced
  by a formula, and every output is checked. The reconfiguration costs 235,520
  cycles; the pixels cost 23 cycles each, 11.04 M cycles in total. It runs in
  about 10 seconds.
* Each block has its own testbench `tb/tb_<module>.sv`.
* `tb/config_memory_model.sv` and `tb/icap_model.sv` are behavioural models
  used only by testbenches. They are not synthesizable.

## Where this design makes its own choices

The system structure is taken from the original system description, together
with:

* the signal names between processor, CC and areas;
* the instruction semantics;
* the two-area configuration;
* the coprocessor functions;
* the 24 MHz / 46 KB / ~10 ms reconfiguration figures.

The following are choices of this implementation and may differ from the
original prototype:

* the 16-bit word and the 4-bit `IOaddress`;
* the two-transfer encoding of WRR and RDR, and the coprocessor command codes;
* the non-blocking SELR;
* the CC's register map, bitstream directory, area-choice rule and error flags;
* the byte-wide configuration memory and ICAP ports;
* the local memory size, the bus handshake, the address map and the round-robin
  arbitration;
* the serial command protocol and baud rate;
* the bit-serial arithmetic units.

Not built:

* the base R8 processor core;
* interrupts from coprocessors to the processor (mentioned only as a possible
  means of communication);
* any check that INTR targets a configured coprocessor.

The original prototype's FPGA area figures (for example about 3,000 gates for
the CC) are not comparable with these blocks. This CC also keeps an 8-entry
directory in flip-flops.
