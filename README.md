# MPA coprocessor: integer multiple-precision arithmetic in hardware

This is synthesizable SystemVerilog for a coprocessor that takes work off a
host CPU when integers are too long for 32/64-bit arithmetic: numbers of up
to 32 768 bits (512 limbs of 64 bits), held in sign-magnitude form in a bank
of 16 registers. The host streams a small program over an 8-bit AXI Stream
bus and operands over two 64-bit AXI Stream buses (A and B). Results come
back over a third 64-bit AXI Stream bus (O). Seven instructions exist: three
loads, one unload, and multiply, add and subtract.

The architecture follows a published coprocessor design (an FPGA IP core
that was benchmarked on factorials of up to 1000). That description gives the
block structure, the register count and length, the number format, the
instruction set and the benchmark. It gives no binary encoding, bus framing
or internal algorithms for the units. Those are this implementation's own
and are marked as such below.

## Number format

Every register holds:

| field     | width     | meaning                                                     |
|-----------|-----------|-------------------------------------------------------------|
| magnitude | 512 x 64  | limbs, least significant at limb address 0                  |
| sign      | 1         | 1 = negative                                                |
| size      | 10        | number of limbs in use, 0..512                              |

Numbers are kept normalised: the limb at `size-1` is non-zero, and zero is
`size = 0, sign = 0`. Every unit produces normalised results. Limbs at or
above `size` are never read, so the limb memories need no reset.

## Instructions

| instruction           | effect                          | bytes on the program bus          |
|-----------------------|---------------------------------|-----------------------------------|
| `loaa X`              | X = next number on bus A        | `1X`                              |
| `loab X`              | X = next number on bus B        | `2X`                              |
| `loaab X, Y`          | X = bus A and Y = bus B, both loaded at once | `3X`, `Y0`           |
| `unl X`               | bus O = X                       | `4X`                              |
| `mult X, Y, Z`        | Z = X * Y                       | `5X`, `YZ`                        |
| `add X, Y, Z`         | Z = X + Y                       | `6X`, `YZ`                        |
| `sub X, Y, Z`         | Z = X - Y                       | `7X`, `YZ`                        |

Each letter in the byte column is one hex nibble holding a register number
(0..15). The opcode values are this implementation's choice. A byte whose
upper nibble is not an opcode is skipped, and `tlast` on the program bus is
ignored. Instructions run strictly one after another: the decoder holds
`tready` low on the program bus until every unit started by the current
instruction has finished. `mult` needs Z to differ from X and from Y (see
below). `add` and `sub` allow any aliasing. For `loaab X, X` the number from
bus B is kept.

Example: the factorial of 4, in the register pattern of the published
program listing, where reg0, reg2 and reg3 are loaded with 1:

```
31 20   loaab reg0, reg2     ; both buses send the number 1
13      loaa  reg3           ; bus A sends 1
62 34   add   reg2, reg3, reg4   ; reg4 = 2
54 01   mult  reg4, reg0, reg1   ; reg1 = 2
64 32   add   reg4, reg3, reg2   ; reg2 = 3
52 10   mult  reg2, reg1, reg0   ; reg0 = 6
62 34   add   reg2, reg3, reg4   ; reg4 = 4
54 01   mult  reg4, reg0, reg1   ; reg1 = 24
41      unl   reg1           ; bus O sends 0x18
```

## Bus framing

On every 64-bit bus a number is a packet of one beat per limb, least
significant limb first. `tlast` marks the final limb and `tuser` carries the
sign. The loader:

- samples the sign on the `tlast` beat;
- drops leading zero limbs from the size;
- forces the sign of a zero positive.

A number longer than 512 beats is still consumed to its `tlast`, but the
extra limbs are discarded and the overflow flag is set. The unloader sends
exactly `size` beats, or a single zero beat for zero. A loader's `tready` is
high only while a load instruction is waiting for that bus. This framing is
this implementation's own.

## Datapath and control lines

```
 bus A -> loader A --DBusA--+                       +--> 16:1 (Ctrl16) --+
 bus B -> loader B --DBusB--+                       +--> 16:1 (Ctrl17) --+--> MULT ----ResM--+
                            |   per register:       |                                        |
        ResM, ResAS, RegM --+-> 5:1 mux (Ctrl0..15) +--> 16:1 (Ctrl18) --+                   |
                                  |                 +--> 16:1 (Ctrl19) --+--> ADD/SUB -ResAS-+
                                  v                 |                                        |
                           Reg0 .. Reg15 ---------->+--> 16:1 (CtrlUL) ----> unloader -> bus O
                                                    +--> 16:1 (Ctrl20) ----> RegM (to the top's ports)
 program bus -> decoder -> Ctrl0..Ctrl20, CtrlL (loader starts), CtrlUL (unloader start)
```

- **Register input multiplexers** (`mpa_wr_mux`). Each register has a 5-to-1
  multiplexer over five write streams: DBusA, DBusB, ResM, ResAS and RegM.
  Its control word is an enable plus a source select. The decoder enables
  only the destination register(s) of the current instruction, so a unit
  writes its stream freely and only the right register listens.
- **Write stream** (`mpa_pkg::wr_t`). Each cycle it can carry one limb write
  (`we`, `addr`, `data`) and/or a sign/size write (`meta_we`). A unit sends
  the sign/size write last, with its `done` pulse.
- **Registers** (`mpa_register`). Each register is a limb memory with one
  write port. It has one synchronous read port per consumer, each with its
  own address, which is what lets `mult X, X, Z` and `add X, X, Z` work.
  Sign and size are flip-flops.
- **Operand multiplexers** (`mpa_rd_mux`). There are six 16-to-1
  multiplexers. Each passes the selected register's limb (one cycle after
  its address), its sign and its size. In port order: multiplier X and Y,
  adder X and Y, unloader, RegM.
- **RegM path.** The architecture includes a register-to-register path. None
  of the seven instructions uses it. Its write stream into the bank is
  therefore idle. Its read port (`rm_sel`, `rm_raddr` -> `rm_rdata`, one cycle
  later) is brought out to the top so that registers can be inspected.

## The multiplier: column-wise basecase multiplication

`mpa_mult` computes the plain O(na·nb) schoolbook product, as the original
design does for operands below 32 kbit. It orders the work by result column
(product scanning), not row by row. This keeps the unit to its two read
ports, with no read-modify-write of the destination:

```
acc = 0
for k = 0 .. na+nb-2:
    for i = max(0, k-nb+1) .. min(k, na-1):
        acc += X[i] * Y[k-i]          # 64x64 -> 128-bit product
    Z[k] = acc mod 2^64 ; acc >>= 64
Z[na+nb-1] = acc mod 2^64
```

The accumulator has 192 bits. A column adds at most 512 products of less
than 2^128 each on top of a carry of less than 2^73, so it cannot overflow.
The hardware pipeline has two stages:

1. An issue stage walks (k, i) and presents addresses `i` and `k-i`. It marks
   the last pair of each column.
2. One cycle later the limbs arrive. The stage multiplies them, adds the
   product and, on a column's last pair, writes the result limb and shifts
   the accumulator.

Then come one cycle of drain, one cycle for the top limb, and one for
sign/size. The sign is the XOR of the operand signs (positive if the result
is zero). The size is the index of the highest non-zero limb written, plus
one.

Because result limb k is written before later columns have read all the
operand limbs below k, the destination must not be an operand.

## The adder/subtractor

`mpa_addsub` handles the sign-magnitude cases:

- **Signs agree.** If Y's effective sign (inverted for `sub`) equals X's
  sign, the magnitudes are added. The result takes X's sign. A final carry
  becomes one extra limb.
- **Signs differ.** The smaller magnitude is subtracted from the larger, and
  the result takes the larger one's sign. Different sizes decide which is
  larger at once. Equal sizes start a scan from the top limb down, which
  stops at the first limb that differs. If no limb differs, the result is
  zero, written without a subtraction pass.

The add/subtract pass reads limb i of both operands at one shared address.
It writes result limb i one cycle later, so the destination may alias an
operand.

## Timing (cycles from the start pulse to `done`)

| unit                 | cycles                                                                        |
|----------------------|-------------------------------------------------------------------------------|
| multiplier           | na·nb + 4 (2 if an operand is zero)                                           |
| adder, same signs    | max(na,nb) + 3, +1 with a carry limb                                          |
| adder, opposite signs| the same, plus the compare scan (1 cycle per equal top limb + 2) when sizes are equal |
| loader               | beats + 2, when the bus has no gaps                                           |
| unloader             | 2 per limb + 2, with `tready` held high                                       |

Decoder overhead per instruction: 1 cycle per instruction byte, 1 to issue,
1 to release the control lines. With gap-free buses the whole 1000!
program (2001 instructions and a 134-limb unload) takes 77 741 cycles. At
400 MHz that is 194 µs. The original design reports 326.4 µs for the same
computation. Its clock rate of up to 400 MHz was reached with a pipelined
FPGA implementation. Here the 64x64 multiply is a single combinational
operator, so this RTL will not reach 400 MHz without pipelining that
multiplier.

## Status and overflow

- `busy` is high from the first byte of an instruction until its units have
  finished.
- `overflow` is sticky until reset. It is set when a loaded number, a
  product or a sum needs more than `LIMBS` limbs. The stored result is then
  the magnitude truncated to `LIMBS` limbs, with its sign.
- Reset (`rst`) is synchronous and active high. It clears every register to
  zero and idles all units.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `LIMB_W`  | 64  | `mpa_pkg` | limb width |
| `MAX_LIMBS` | 512 | `mpa_pkg` | register length in limbs (32 kbit); sets the address width |
| `NREGS`   | 16  | `mpa_pkg` | registers (4-bit register fields in the encoding) |
| `LIMBS`   | 512 | module parameter of the top and the units | limbs actually stored; must not exceed `MAX_LIMBS` |

`LIMBS` can be lowered, for example to exercise overflow in a short
simulation. Changing `NREGS` beyond 16 would need a wider instruction
encoding.

## Departures from the original design

- The original core lets the number of data buses and registers be chosen
  as IP parameters. Here there are always two input buses and one output
  bus. The register count is fixed at 16 by the 4-bit register fields of
  the encoding.
- The instruction encoding, the bus framing (`tlast`, `tuser` as sign), the
  overflow flag and all unit internals are this implementation's own.
- No instruction drives the RegM path, which the architecture includes.
- Instructions do not overlap. Each unit's latency is listed above.
- The original was tuned for a Zynq-7000 FPGA (block RAMs, 28 DSP slices,
  400 MHz). This RTL is generic. Registers are plain memory arrays with six
  read ports each, and the multiplier is not pipelined.

## Files

| file | content |
|------|---------|
| `rtl/mpa_pkg.sv` | constants, write-stream and control types, opcodes |
| `rtl/mpa_coprocessor.sv` | top level |
| `rtl/mpa_decoder.sv` | instruction fetch, decode and sequencing |
| `rtl/mpa_regbank.sv` | 16 registers with input and operand multiplexers |
| `rtl/mpa_register.sv` | one register (limb memory, sign, size) |
| `rtl/mpa_wr_mux.sv`, `rtl/mpa_rd_mux.sv` | 5-to-1 and 16-to-1 multiplexers |
| `rtl/mpa_loader.sv`, `rtl/mpa_unloader.sv` | bus A/B loaders, bus O unloader |
| `rtl/mpa_mult.sv`, `rtl/mpa_addsub.sv` | arithmetic units |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_mpa_coprocessor.sv` | end-to-end test at `LIMBS = 8` |
| `tb/tb_mpa_factorial_full.sv` | factorials from 4! to 1000! at default parameters |

## Simulating

Every testbench ends by printing `TB_RESULT checks=N failures=M`. For
example:

```
verilator --binary --timing --assert -y rtl rtl/mpa_pkg.sv \
    tb/tb_mpa_factorial_full.sv --top-module tb_mpa_factorial_full
./obj_dir/Vtb_mpa_factorial_full
```

Use the same command with another `tb/tb_*.sv` file and its module name for
the unit tests. Each testbench has its own check:

- The unit testbenches compare each module against reference results
  computed independently in the testbench. Most use the simulator's wide
  integer arithmetic; the register bank uses a model of the registers. They
  also check the cycle counts above.
- The end-to-end test checks every output beat of a random mix of all seven
  instructions against a model of the 16 registers. It also requires that
  each mechanism occurs at least once:
  - every opcode;
  - program-bus stall and bus-O back-pressure;
  - input gaps;
  - negative and zero results;
  - the magnitude compare and a carry limb;
  - overflow.
- The full-size test runs 4! and n! for n = 100, 200, ..., 1000. Each result
  is checked limb by limb against multiply-by-integer arithmetic in the
  testbench. The test also checks that 1000! fits within the 130 560 cycles
  of the reported 326.4 µs at 400 MHz. Measured with gap-free buses:

  | n     | 100  | 200  | 400   | 600   | 800   | 1000  |
  |-------|------|------|-------|-------|-------|-------|
  | limbs | 9    | 20   | 46    | 74    | 103   | 134   |
  | cycles| 2023 | 5059 | 14802 | 29931 | 50824 | 77741 |
