# Generated hardware interfaces for hardware/software prototypes

When a system is split between a program on a host computer and a piece of
custom hardware, something has to carry the values that cross the split. This
RTL is that piece: a *hardware interface module* between a host's system bus
and a hardware core. It has two parts:

- a **protocol converter**, which speaks the bus protocol and turns each bus
  access into a plain write pulse or read enable;
- a **signal register**, which holds the values passed to and from the core.
  A core port wider than one bus transfer gets several bus-wide registers, so
  the host writes a 32-bit value as two 16-bit transfers and reads a 32-bit
  result back the same way.

The interface structure, the register layout of the worked example and the
sizes come from a published hardware/software cosimulation environment. That
environment generates such interfaces automatically from the partitioned
data-flow graph of a system. Here the generated results are written out as
parameterised SystemVerilog, for three example systems:

| prototype | hardware core | bus | core ports |
|---|---|---|---|
| `de`  | part of a solver of y'' + 3xy' + 3y = 0: `t6 = u - (u*dx)*(3*x)` | E-channel of an SBus DMA controller, 16-bit | 3 in, 1 out, 32-bit each |
| `lz1` | parsing step of an LZ77 compressor, 16-symbol buffer | E-channel, 16-bit | 4 in (the buffer), 1 out (the codeword) |
| `lz2` | the same parser with a 32-symbol buffer | ISA bus I/O, 16-bit | 8 in, 1 out |

The three prototypes stand side by side in `cosim_prototype_top`. They share
only the clock and reset.

## How a value crosses the interface

### Register allocation

Bus transfers are `BUS_W` bits (16). Each core port has its own width,
listed in the `IN_W` and `OUT_W` parameters of the signal register. The core
ports are flat vectors, with port 0 in the lowest bits. The layout is
computed at elaboration time by `if_pkg::alloc()`, which handles the ports in
order:

1. A port wider than the bus takes fresh bus-wide registers, one per
   transfer, until at most `BUS_W` bits remain.
2. A remainder narrower than the bus goes into the first register that still
   has enough free bits. If no register has room, a fresh register is opened
   and its upper bits stay free for later ports.
3. A remainder of exactly `BUS_W` bits always takes a fresh register.

Registers and read-multiplexer inputs are allocated from separate pools.
Narrow ports therefore share registers. For example, inputs of 8, 40, 8 and
16 bits take five registers:

- in0 = r0[7:0];
- in1 = r1, r2 and r0[15:8];
- in2 = r3[7:0];
- in3 = r4.

The host writes a shared register as one word.

For the `de` prototype this gives the layout below. Registers r0 to r5 feed
the core inputs, and multiplexer inputs m0 and m1 read the core output:

```
write addr  register   core input          read addr  mux input  core output
    0         r0       u  first word           0         m0      t6 first word
    1         r1       u  second word          1         m1      t6 second word
    2         r2       dx first word
    3         r3       dx second word
    4         r4       x  first word
    5         r5       x  second word
```

Register i sits at write address i, and multiplexer input j at read address
j. Writes and reads are separate address spaces. A write to an unused address is ignored, and a
read from one returns zero.

**Word order** is set by the `MSW_FIRST` parameter:

- `MSW_FIRST = 1` (the E-channel interfaces): the first word is the upper
  half. This matches a big-endian host that splits an `int` into two
  `short`s through a union.
- `MSW_FIRST = 0` (the ISA interface): the first word is the lower half,
  which suits a little-endian PC.

The registers reset to zero. A register loads on the rising clock edge at
which `wr` is high. Read data is combinational: it follows the address while
`rd` is high. The bus data lines are bidirectional in hardware. They are
split here into `*_in`, `*_out` and an output enable `*_oe`, which stands for
the three-state buffer.

### Cores run freely

The cores have no start or done signal. Their outputs always follow the
register contents, a fixed number of clock edges later:

- two edges for `diffeq_core`;
- one edge for `lz_parser`.

The host reads the result only after several bus cycles, so it always sees a
settled value. If a core took longer, a status register or a ready bit would
have to be added.

## The bus protocols

The bus protocols themselves are not specified by the source. Both converters
below are this design's own choices.

### E-channel (`echan_protocol_converter`)

The inputs are `e_cs` (chip select), `e_das` (data strobe) and `e_read`
(direction). The output is `e_rdy`. All are active high, and all are sampled
on the rising edge of `clk`. The converter is a three-state machine:

```
IDLE   --(e_cs & e_das seen)-->  ACCESS  -->  DONE  --(e_das low seen)-->  IDLE
                                 wr=1 (write)    e_rdy=1
                                 rd=1 (read)     rd=1 (read)
```

- A write loads its register at the edge that leaves ACCESS.
- `e_rdy` rises two edges after the strobe is first sampled.
- `e_rdy` stays high, and for a read `rd` keeps the data on the bus, until
  the master drops `e_das`.
- Address (`spa`) and write data go straight to the signal register. They
  must therefore stay stable until `e_rdy`, and `hw_interface_module` asserts
  this.

### ISA I/O (`isa_protocol_converter`)

The board is selected when `aen` is low and the upper address bits
`sa[9:ADDR_W]` equal those of `BASE` (0x300).

- **Write.** `wr` rises at the second consecutive edge at which `iow_n` is
  sampled low, and lasts one cycle. The register loads at the third edge, so
  `iow_n` must stay low across three rising edges.
- **Read.** `rd` and `sd_oe` follow `ior_n` combinationally.
- `iocs16_n` is driven low while the board is selected, to announce 16-bit
  transfers.
- Cycles with `aen` high (DMA cycles) and cycles to other addresses are
  ignored.

## The cores

### `diffeq_core`

The solver loop for y'' + 3xy' + 3y = 0 is split between software and
hardware. The hardware computes, in 32-bit two's-complement arithmetic with
products truncated to 32 bits:

```
t1 = u * dx;   t2 = 3 * x;   t4 = t1 * t2;   t6 = u - t4
```

It is a two-stage pipeline. Stage 1 holds t1, t2 and u; stage 2 holds t6.
The software finishes each step itself:

```
u_next = t6 - 3*y*dx
y_next = y + u*dx
x_next = x + dx
```

### `lz_parser`

The buffer holds `N` symbols of 8 bits. Symbol 0 is the oldest.

- Symbols 0 to `N-LA-1` are the already coded *search* part.
- The last `LA = N/2` symbols are the *lookahead*.

For every search position i, the parser compares `buf[i+k]` with
`buf[N-LA+k]` for k = 0 .. LA-2, all in parallel. The match length of
position i is the number of leading equal pairs. A priority search then keeps
the longest match, and the lowest position wins a tie. A match may run on
into the lookahead, as in LZ77.

The registered result word holds these fields, from bit 0 up:

| field | width | meaning |
|---|---|---|
| symbol | 8 | the lookahead symbol after the match |
| length | `$clog2(LA)` | match length, at most LA-1 |
| pointer | `$clog2(N-LA)` | start position of the match |

The bits above them are zero. The host emits the codeword (pointer, length,
symbol), shifts its buffer left by length+1 and writes the buffer again.
Coding, buffer updates and file handling stay in software.

In the prototypes the buffer reaches the parser as `N*8/32` core ports of 32
bits. Symbol i is bits `[8*(i%4) +: 8]` of port `i/4`.

## Files

| file | contents |
|---|---|
| `rtl/if_pkg.sv` | bus and port widths; `alloc()` and `n_regs()` (the allocation rule), `port_offset()`, `uniform()`, `addr_bits()` |
| `rtl/echan_protocol_converter.sv` | E-channel converter |
| `rtl/isa_protocol_converter.sv` | ISA I/O converter with base-address decoding |
| `rtl/signal_register.sv` | registers, read multiplexer, decoder and buffer enable |
| `rtl/hw_interface_module.sv` | E-channel converter + signal register |
| `rtl/isa_hw_interface_module.sv` | ISA converter + signal register |
| `rtl/diffeq_core.sv` | differential-equation core |
| `rtl/lz_parser.sv` | LZ77 parsing unit |
| `rtl/cosim_prototype_top.sv` | the three prototypes side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_signal_register_packed.sv` | signal register with mixed port widths and both word orders |

The parameter defaults are the example sizes:

- 16-bit bus and 32-bit core ports;
- three inputs and one output for `de`;
- buffers of 16 (`LZ1_N`) and 32 (`LZ2_N`) symbols.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog that counts a failure if the run hangs.
Run them with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_cosim_prototype_top \
    -y rtl -y tb +libext+.sv rtl/if_pkg.sv tb/tb_cosim_prototype_top.sv
./obj_dir/Vtb_cosim_prototype_top
```

Replace the module name to run any other testbench. `if_pkg.sv` must come
first on the command line, because every module uses it.

`tb_cosim_prototype_top` runs the whole design at its default sizes, and
takes well under a second. The testbench plays the host software:

- **Differential equation.** It runs 20 solver steps, with the hardware part
  of each step done over the E-channel. The trajectory must match an
  all-software loop exactly.
- **Compression.** It compresses 400 symbols of generated text through `lz1`
  and again through `lz2`. Every codeword is checked against a software
  longest-match search. The codewords are then decoded, and the result must
  equal the original text.

It also counts the mechanisms the design has, and fails if any of them never
happens:

- E-channel writes, reads and ready waits;
- ISA writes and reads;
- ignored ISA cycles (another base address, or `aen` high);
- codewords with no match, with the longest possible match, and with a match
  that runs into the lookahead.

The unit testbenches check:

- the cycle timing of each converter;
- the address map and word order of the signal register, and the packing of
  mixed-width ports;
- the arithmetic and two-cycle latency of `diffeq_core`;
- `lz_parser` against a loop model on random buffers, for every match length
  from 0 to LA-1.

## How far this follows the original design

Taken from the source:

- the split of the interface into a protocol converter and a signal register;
- the E-channel signal names;
- the signal register of the example: six 16-bit registers, a two-input
  multiplexer, a decoder and an output buffer;
- the address and data lines wired straight to the signal register;
- the core's data-flow graph;
- the 16-bit bus and 32-bit ports;
- the buffer sizes 16 and 32;
- the use of an E-channel in one compression prototype and an ISA bus in the
  other.

This design's own choices:

- all bus timing and strobe polarities;
- the address map and word order;
- reset values;
- the core pipelining;
- the ISA signal set and base address;
- everything inside the LZ parser except its task and buffer size: the
  lookahead length, the symbol width, the tie rule and the result format. The
  original parser used a separate architecture that is not described.

The register allocation procedure is printed in a partly garbled form in the
source, and it does not say which register to choose when several fit.
First fit, lowest register first, is this design's reading.

Not covered:

- the other signal-register templates of the original environment;
- the SBus DMA controller and the host processors. These are commercial
  parts: the E-channel and ISA ports of the top are where they connect.
- the simulation-only pieces of the environment (socket IPC handlers and
  their container) and the host driver functions. These are software.

The original prototypes were measured on Xilinx XC4010/XC4025 FPGAs at
6.25 MHz and 8.33 MHz. Those figures include a different parser
architecture, so they say nothing about this RTL.
