# ADAPTO: a full-adder based, 16-context reconfigurable functional unit

ADAPTO (Adder-based Dynamic Architecture for Processing Tailored Operators) is a
small reconfigurable array that sits next to a 32-bit processor's ALU. It
speeds up the operations that a fixed-width datapath does badly: sub-word
additions, modular arithmetic, GF(2^8) constant multiplications, bit
permutations and bit-level logic.

Most reconfigurable units of this kind are small FPGAs made of look-up tables
(LUTs). The idea here is to use a **full adder** as the programmable cell
instead. By tying some of its pins to constants or to a neighbour's carry, one
full adder gives addition, AND, OR, XOR, XNOR, 3-input XOR, majority, NOT and
PASS. A cell is then described by only 4 configuration bits, where a LUT cell
needs a whole truth table. That makes it cheap to store **16 complete
configurations (contexts)** on chip. The processor picks one with a 4-bit
context select in the same cycle as the operation. So the unit is
reconfigured on every instruction and never stalls for a reload.

This repository holds synthesizable SystemVerilog for the whole digital unit,
with self-checking testbenches for every block. The unit itself is `adapto`,
with three direct operand ports. The top, `adapto_nios`, adds the adapter
that lets a processor with two-source custom instructions drive it. The
end-to-end testbench of the array runs modular addition, Montgomery
multiplication, AES MixColumns and InvMixColumns, bit reversal and endian
conversion on the full-size array.

## The array

```
        D1[31:0]   D2[31:0]
           |          |
   +-------v----------v--------+
   |  LB stripe 1: LB0 .. LB31 |   LB i sees D1[i], D2[i]; carry LB i -> LB i+1
   +------------+--------------+
                | y1[31:0]
   +------------v--------------+
   |  interconnect 1           | <-- D3[31:0]    66 wires -> 96 LB pins, 7-bit codes
   +------------+--------------+
   |  LB stripe 2              |
   |  interconnect 2           |      34 wires -> 96 LB pins, 6-bit codes
   |  LB stripe 3              |
   |  interconnect 3           |      34 wires -> 32 result bits, 6-bit codes
   +------------+--------------+
                v
            DOUT[31:0]
```

Data flows strictly downwards. There is no feedback inside the array, so
`d1, d2, d3, ctx -> dout` is one combinational path. A result is available
in the same processor cycle. In the original 0.18 um implementation that path
(context switch plus computation) is just under 10 ns, which gives the
unit's 100 MHz rating. Iterative algorithms close the loop through the
processor's register file. For example, the Montgomery step's result comes
back in on D3 in the next cycle.

Each of the 96 logic blocks (LBs) and each of the 224 interconnect
selectors has its own 16-entry context memory. Changing `ctx` changes the
whole array at once.

## The logic block

`adapto_lb` is a full adder (inputs X, Y, carry-in; outputs R and carry out)
with three multiplexers around it:

* a carry-in multiplexer choosing the previous LB's carry, the configuration
  bit P, data pin D3, or 0;
* a selector driving X with data pin D2, or with P;
* an output multiplexer (S2) passing either R or the carry out.

D1 always drives Y. The carry out always goes on to the next LB, whatever S2
selects, so a stripe can be a ripple-carry adder of any length.

| S0 S1 | carry-in | X  | S2=0 (R)                     | S2=1 (carry out)            |
|-------|----------|----|------------------------------|-----------------------------|
| 0 0   | prev. LB | D2 | SUM bit                      | carry of the sum            |
| 0 1   | P        | D2 | XOR (P=0), XNOR (P=1)        | AND (P=0), OR (P=1)         |
| 1 0   | D3       | D2 | 3-input XOR                  | 3-input majority            |
| 1 1   | 0        | P  | PASS D1 (P=0), NOT D1 (P=1)  | 0 (P=0), D1 (P=1)           |

The operation list and the choice of P/S0/S1/S2 for each operation are the
original design's. The exact wiring of the codes to the multiplexer inputs
is derived from that operation list and is this implementation's reading.
Two cases are worth knowing:

* Code 01 with P=0 is also how the lowest bit of an adder gets a zero
  carry-in. The adder chain is shared by the whole stripe, so an adder that
  does not start at LB0 must begin with an XOR cell (S0S1=01, P=0). That
  cell still sends x AND y on as its carry.
* An LB can output its sum or its carry, never both. When an algorithm needs
  a carry in the next stripe, an extra LB is spent as a routing cell: it
  adds 0 + 0 + carry (or 1 + 0 + carry, for the inverted carry).

`adapto_pkg` names the ten useful settings (`LB_SUM`, `LB_CARRY`, `LB_AND2`,
`LB_OR2`, `LB_XOR2`, `LB_XNOR2`, `LB_XOR3`, `LB_MAJ3`, `LB_NOT`, `LB_PASS`).

## Interconnect and code numbers

Every LB input pin of stripes 2 and 3, and every result bit, has a decoder
that connects it to exactly one wire. The decoder is addressed by a binary
code from its own context memory. This is the pass-transistor network of the
original; here it is written as a multiplexer. Besides the previous stripe's
outputs there are two constant wires. With these the interconnect can do
shifts with 0 or 1 insertion, constant operands and any bit permutation
without using logic.

| stripe         | code 0..31            | 32..63     | next codes          | outputs                    |
|----------------|-----------------------|------------|---------------------|----------------------------|
| interconnect 1 | stripe-1 output i     | D3[i-32]   | 64 = 0, 65 = 1      | 96: pin p of LB i is 3i+p  |
| interconnect 2 | stripe-2 output i     | 32 = 0, 33 = 1 |                 | 96: pin p of LB i is 3i+p  |
| interconnect 3 | stripe-3 output i     | 32 = 0, 33 = 1 |                 | 32: DOUT[j]                |

Pin p = 0, 1, 2 means D1, D2, D3. A code with no wire behind it (66..127,
or 34..63) gives 0. The wire counts and code widths are the original's. The
numbering is this implementation's choice.

Stripe 1 takes D1 and D2 directly. Its D3 pins are tied to 0. D3 enters only
through interconnect 1.

## Context memories and loading a configuration

This is the least obvious part of the design.

**Organisation.** An element with an N-bit configuration (N = 4 for an LB, 7
or 6 for a decoder) has a 16 x N memory stored as N *lines* of 16 bits. Line
b holds configuration bit b for all 16 contexts, and bit c of the line is
context c. A read is a 16:1 multiplexer per line, driven by `ctx`. A write
replaces a whole line, which means one bit for all 16 contexts at once.

**Size.** 96 LBs x 4 bits + (96 x 7 + 96 x 6 + 32 x 6) decoder bits =
384 + 1440 = 1824 lines of 16 bits, or 29184 configuration bits.

**Bus.** The configuration bus is 32 bits wide. Memories are written in
couples: the even element of a couple takes `cfg_data[15:0]` and the odd one
takes `cfg_data[31:16]`. The same line of both is written in the same cycle.

**Write enables.** These come from a chain of 912 flip-flops
(`adapto_cfg_chain`) connected as a shift register. Pulsing `cfg_start`
shifts one 1 into the head. Flip-flop n enables the n-th line couple, so the
load takes exactly 912 cycles, one 32-bit word per cycle (9.12 us at
100 MHz). `cfg_busy` is high during those cycles. A `cfg_start` during a load
is ignored.

**Word order.** Word n is sampled on the (n+1)-th rising edge after the edge
that saw `cfg_start`:

| words     | segment          | per element couple k (left to right, k = 0 first)        |
|-----------|------------------|----------------------------------------------------------|
| 0-63      | LB stripe 1      | 4 words: S0, S1, S2, P of LBs 2k / 2k+1                  |
| 64-399    | interconnect 1   | 7 words: code bits 0..6 of decoders 2k / 2k+1            |
| 400-463   | LB stripe 2      | 4 words                                                  |
| 464-751   | interconnect 2   | 6 words                                                  |
| 752-815   | LB stripe 3      | 4 words                                                  |
| 816-911   | interconnect 3   | 6 words                                                  |

So word = {bit b of element 2k+1 for contexts 15..0, bit b of element 2k for
contexts 15..0}. The class `adapto_image` in `tb/adapto_tb_pkg.sv` holds a per-context
table of LB settings and codes. Its `serialise()` method builds this
sequence, so the class can be reused as a configuration compiler. Its
`cfg_*` methods write the mappings below into one context.

Every load rewrites all 16 contexts. To change one context, reload the
others with their old contents. The array keeps computing during a load. A
context whose bits are not changing gives correct results throughout, and
the end-to-end testbench checks this. A context that is being changed reads
a mix of old and new bits until the load ends. The context memories have no
reset.

## Programming examples

The end-to-end testbench (`tb/tb_adapto.sv`) builds these configurations and
checks them against arithmetic computed independently. The context numbers
below are the ones it uses.

* **Modular addition, four 6-bit moduli at once** (ctx 1). A modulus of n
  bits uses n+2 columns. Stripe 1 computes S1 = X + Y. Stripe 2 adds the
  constant 2^(n+1) - M from the constant wires. Its top column is a routing
  cell that passes the *inverted* carry: the carry is 1 exactly when
  S1 >= M. Stripe 3 adds M AND (not carry), which undoes the subtraction
  when it was not needed. Operands are packed one per byte with the two top
  bits of each byte zero.
* **Montgomery multiplication** (ctx 2). One iteration of
  R <- (R + a_i B + q M) / 2 per cycle, with q = LSB of R + a_i B. Stripe 1
  ANDs B (D1) with a_i broadcast on D2. Stripe 2 adds R from D3. Stripe 3
  adds M gated by the LSB. Interconnect 3 shifts right by one. The result is
  fed back on D3. A modulus of up to 30 bits fits; the test uses 16 bits.
* **AES MixColumns** (ctx 3-6, one context per matrix row). A column is held
  in one register as bytes A..D. Multiplying by 0x02 and 0x03 is a shift plus
  a conditional XOR with 0x1B, and the interconnect does both. A 3-input XOR
  stripe combines the terms, so each output byte takes one cycle.
* **AES InvMixColumns** (ctx 7, 8). This runs in two phases. Phase 1
  forms 0x0C or 0x08 times each of the four bytes in one operation. Phase 2
  gets that word back on D2 and D3 and finishes one row: for example
  0x0E A = 0x02 A ^ 0x0C A and 0x0D C = C ^ 0x0C C. Two phase-1 contexts,
  with the 0x0C bytes at alternate positions, serve all four rows.

The modular-arithmetic workload testbench (`tb/tb_adapto_modarith.sv`) runs
both mappings at the largest size that fits. A 30-bit modulus uses all 32
columns. Montgomery products with 30-bit and 24-bit moduli take one clock
cycle per bit of A, and the testbench measures this. Modular additions with
one 30-bit modulus, or four 6-bit moduli side by side, take one cycle each.

The dist1 testbench (`tb/tb_adapto_dist1.sv`) runs the inner step of an
MPEG-2 encoder's motion search: v = ((p1[t] + p1[t+1] + 1) >> 1) - p2[t],
summed as |v| over a row. The processor passes k = p1[t] + p1[t+1] on d1
and p2[t] << 16 on d2. The shift matters: stripe 1 sees only bit i of each
operand in column i, so it cannot use two values that share bit positions.
Stripe 1 forms k + 1 in the low half and ~p2[t] in the high half. Stripe 2
adds (k + 1) >> 1 to it with a carry-in of 1. The absolute value and the sum
are left to software, because they would need a fourth stage.

The GRP testbench (`tb/tb_adapto_grp.sv`) runs the GRP bit permutation:
bits selected by 1s in a mask go to the right of the result, the others to
the left. Here the mask is fixed when the configuration is built, and each
context holds one mask as a pure interconnect permutation. The array cannot
take the mask as a run-time operand, because its routing comes from the
context memories and not from data. The testbench also runs five such GRP
steps in sequence; their masks are chosen to produce the 32-bit bit
reversal.

The AES workload testbench (`tb/tb_adapto_aes.sv`) transforms whole 4x4
states. Contexts 0-3 hold the four MixColumns rows. Contexts 4 and 5 hold
the two phase-1 variants, and contexts 6-9 the four InvMixColumns rows. One
state takes 16 operations for MixColumns and 8 + 16 = 24 for
InvMixColumns, at one operation per clock cycle. The testbench counts both
and checks them. It also checks the FIPS-197 round-1 column
(d4 bf 5d 30 -> 04 66 81 e5) and InvMixColumns(MixColumns(s)) = s on random
states.
* **Bit reversal** of each byte (ctx 9) and **endian conversion** (ctx 10)
  are pure interconnect permutations.

The testbench also covers AND/OR/NOT (ctx 11) and XNOR, majority and carry
output (ctx 12), so every LB operation runs at least once.

## Attaching to a two-operand processor (`adapto_nios`)

A processor whose custom instructions read only two registers cannot feed
D1, D2 and D3 in one instruction. `adapto_nios` adds a 32-bit state
register for the third operand:

```
  dataa (source 1) ---------------------------> D2
  datab (source 2) --+------------------------> D1      adapto ---> result
                     +--> [state register] ---> D3
```

The 8-bit instruction field `n` selects what an instruction does:

* `n[7] = 1` **loads D3.** The register takes `datab` at the clock edge
  that ends the instruction, if `start` and `clk_en` are high. `result`
  returns the old register value.
* `n[7] = 0` **executes** context `n[3:0]` with D1 = `datab`,
  D2 = `dataa` and D3 = the register. `result` is the array output in the
  same cycle.

`n[6:4]` are unused. A two-operand function costs one instruction. A
three-operand function costs one more load whenever D3 changes, and D3
stays valid for any number of executes. A Montgomery product with a
16-bit modulus therefore takes 32 instructions through this port: load R,
then execute, for each bit of A. Through the bare `adapto` it takes 16.
`tb/tb_adapto_nios.sv` measures both counts. The configuration port of
the array is brought out unchanged. Reset clears the state register but
not the context memories.

## Interface summary (`adapto`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1  | clock for the configuration path (the data path is combinational) |
| `rst_n`     | in  | 1  | asynchronous active-low reset of the load chain |
| `cfg_start` | in  | 1  | start a 912-word configuration load |
| `cfg_data`  | in  | 32 | configuration word |
| `cfg_busy`  | out | 1  | load in progress |
| `ctx`       | in  | 4  | context select |
| `d1, d2, d3`| in  | 32 | operands |
| `dout`      | out | 32 | result |

Parameters: `W` = 32 (width) and `NCTX` = 16 (contexts). The configuration
bus is 2 x NCTX bits wide. The testbenches run only the default size.

## Files

| file | contents |
|------|----------|
| `rtl/adapto_pkg.sv` | sizes, `lb_cfg_t`, LB operation codes |
| `rtl/adapto_fa.sv` | full adder |
| `rtl/adapto_lb.sv` | logic block |
| `rtl/adapto_ctx_mem.sv` | 16 x N line-written context memory |
| `rtl/adapto_lb_row.sv` | stripe of 32 LBs with memories and carry chain |
| `rtl/adapto_interconnect.sv` | decoder-based interconnect stripe |
| `rtl/adapto_cfg_chain.sv` | 912-flip-flop write-enable chain |
| `rtl/adapto.sv` | the complete unit |
| `rtl/adapto_nios.sv` | top: the unit plus the state register for a two-operand instruction port |
| `tb/adapto_tb_pkg.sv` | configuration compiler (`adapto_image`) and GF(2^8) reference, shared by the end-to-end testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_adapto` is the end-to-end test of the array |
| `tb/tb_adapto_nios.sv` | end-to-end test of the top through its instruction port |
| `tb/tb_adapto_aes.sv` | AES MixColumns / InvMixColumns on full states |
| `tb/tb_adapto_modarith.sv` | Montgomery multiplication and modular addition with 30-bit moduli |
| `tb/tb_adapto_grp.sv` | GRP bit permutation with masks fixed per context |
| `tb/tb_adapto_dist1.sv` | MPEG-2 dist1 step (half-pel difference) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
has a watchdog. From the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/adapto_pkg.sv tb/adapto_tb_pkg.sv tb/tb_adapto.sv \
    --top-module tb_adapto -o sim
./obj_dir/sim
```

Replace `tb_adapto` with any other testbench name. Every testbench runs
at the full default size. The end-to-end test of the array (two complete
912-cycle loads and about 1900 checks) simulates in well under a second,
after a build of about half a minute. `tb_adapto_nios` does the same for the
top.

## What is the original design and what is not

Taken from the original design: the three-stripe structure and its sizes;
the full-adder LB with its operation table and its carry chain; the wire
counts, decoder code widths and the use of constant wires; 16 contexts; the
line-organised 16 x N memories; the 32-bit bus split between even and odd
memories; the flip-flop chain; the 912-cycle load and the order of its
segments; and the mapping style of the application examples.

Choices made here where the original is silent: the code-to-input mapping
of the LB multiplexers; the interconnect code numbering and pin order; the
direction of bits within words (bit i in column i); tying stripe 1's D3 pins
and the carry into LB0 to 0; the bus-bit-to-context mapping; the exact load
timing; reset of the load chain; and ignoring `cfg_start` during a load.
Within the examples, the modular adder adds M back when the second-stage
carry is *clear*. The adder computes S1 + (2^(n+1) - M), and that carry is
set exactly when no correction is needed.

Not modelled: transistor-level behaviour, delays, power and layout of the
0.18 um implementation; and the host processor. The adapter for a
two-operand instruction port follows the register arrangement of the
original proposal, but its instruction encoding and handshake are this
design's own. The MPEG-2 `dist1` step is mapped only up
to the signed difference, and the GRP kernel only with its mask fixed per
context, as described above.

How far to trust it: every module is exercised by its own testbench against
independent reference arithmetic. For each module, a deliberately broken copy
is caught by its testbench. The full unit is checked end to end at its
default size, including the FIPS-197 MixColumns test column
(db 13 53 45 -> 8e 4d a1 bc) and its inverse. Workload testbenches run full AES
states, 30-bit modular arithmetic, the dist1 step and GRP permutations,
and measure their cycle counts.
