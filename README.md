# XSMUL: one multiplier for polynomials and big integers

Hybrid key exchange runs a classical primitive (here X25519) next to a
post-quantum one (here the lattice scheme Saber). A small embedded core then
needs two kinds of expensive multiplication:

- big-integer multiplication modulo 2^255 - 19;
- polynomial multiplication in Z_q[X]/(X^256 + 1) with q = 2^13.

The XSMUL ("extended schoolbook multiplier") does both with one datapath of
16 multiply & accumulate units. It is wired directly to CPU registers and
started by two custom RISC-V instructions. This repository holds synthesizable
SystemVerilog for the XSMUL, its control, its register coupling and its
instruction decoder. It follows the architecture of *Uniform instruction set
extensions for multiplications in contemporary and post-quantum cryptography*
(Oberhansl et al., 2023). Many interface details are not given there and were
chosen here; they are listed in the last sections.

## The multiply & accumulate chain

There are N = 16 units, numbered j = 15 (left) down to 0 (right). Unit j holds
one fixed coefficient b_j. Each cycle one coefficient a_k is broadcast to all
units. Each unit:

1. stores the product a_k * b_j in a pipeline register (W = 17 bits times
   17 bits);
2. in the next cycle, adds three terms: that product, an addend chosen by a
   multiplexer, and its own carry;
3. stores the 2W+1-bit sum as a W+1-bit **carry** and a W-bit **low** part.

The low part moves one unit to the right. The carry stays in the unit and is
added again in the next cycle. The multiplexer normally selects the low part of
the left neighbour. For unit 15 it selects zero.

Follow one result coefficient through the chain. In step k, unit j builds a
partial sum of coefficient k + j. Its low part moves to unit j-1 in step k+1,
which again builds coefficient (k+1) + (j-1) = k + j. So the rightmost unit
emits the finished coefficient r_k = sum over j of a_(k-j) * b_j, one per
cycle. After N steps, units 1..15 still hold the partial sums of r_16 .. r_30.
If the next 16 coefficients of a are fed in, the product continues. A long
polynomial can therefore be multiplied by a 16-coefficient block, one block of
a at a time.

The same chain does four more jobs:

- **Integer multiplication.** An integer is a polynomial in 2^17: 16 chunks of
  17 bits, 272 bits in all. The carries are now kept. A carry belongs to the
  next-higher chunk, and chunk k+1 is exactly what the unit builds in the next
  step. No separate carry-propagation stage is needed.
  - The first 16 steps emit the low 272 bits of the product.
  - 16 more carry-only steps, with the product term dropped, emit the high
    272 bits.
- **Negacyclic convolution** (modulo X^16 + 1). The rightmost low part is fed
  back into unit 15 instead of zero. A product whose coefficient index
  k + j reaches 16 wraps to index k + j - 16 with a minus sign, because
  X^16 = -1. Unit j therefore subtracts its product exactly when k + j >= 16.
  After 16 steps, coefficient c of the result sits in unit (c + 1) mod 16.
- **Vector add / multiply-add.** Each unit adds an external operand instead of
  its neighbour. The product is b_j times 1 (vector add) or b_j times a
  scalar (vector multiply-add).
- **Multiplication modulo 2^255 - 19** (described next).

## Folding modulo 2^255 - 19

Write the product as r = r_h * 2^255 + r_l. Since 2^255 = 19 (mod p), r is
congruent to r_l + 19 * r_h. With 17-bit chunks, bit 255 is the first bit of
chunk 15 (255 = 15 * 17), so r_h is simply "chunk 15 and up".

In this mode the multiplier runs the full 32 steps:

- chunks 0..14 are stored as they leave the chain;
- every later chunk c is folded while it leaves. The fold stage
  (`xsmul_pmred`) computes 19 * c + (stored chunk at position c - 15) + its
  own small carry, and writes the result back to that position.

The fold adds no cycles, because each position is folded right after it was
written. One fold leaves a result below 2^263 for operands below 2^256. It is
congruent to a * b mod p but not fully reduced. A second fold, or a final
subtraction, is left to software. The published design does this fold inside
the rightmost multiply & accumulate unit (a DSP slice); here it is a separate
small stage with the same timing.

## Operations and timing

`pq.xsmul` starts an arithmetic mode, chosen by the rs1 field.
`pq.xsmul_cfg` runs a configuration operation. The latency is the number of
cycles the instruction stays in the ID stage, issue cycle included. These
latencies match the published operation table exactly.

| rs1 | `pq.xsmul` mode | result | cycles |
|---|---|---|---|
| 0x0 | polynomial multiplication | r <- next 16 coefficients of a*b; old r -> xr | 19 |
| 0x1 | convolution | r <- a*b mod (X^16 + 1) | 19 |
| 0x2 | lower-half integer multiplication | {xr0, r} <- (A*B) mod 2^272 | 19 |
| 0x3 | higher-half integer multiplication | {xr0, r} <- (A*B) >> 272 (drains the state left by 0x2) | 16 |
| 0x4 | multiplication modulo 2^255 - 19 | {xr0, r} <- r_l + 19*r_h, < 2^263 | 35 |
| 0x5 | vector addition | r_j <- xr_j + b_j | 3 |
| 0x6 | vector multiply & add | r_j <- xr_j + a_0 * b_j | 3 |
| 0x7 | integer addition | {xr0, r} <- A + B (48-bit chunks) | 7 |
| 0x8 | integer subtraction | {xr0, r} <- A - B mod 2^272 | 7 |
| 0x9 | ring reduction | r <- Y*r mod (Y^16 + 1) (negacyclic shift by one) | 3 |

| rs1 | `pq.xsmul_cfg` | effect | cycles |
|---|---|---|---|
| 0x0 | clear | zero all multiply & accumulate registers | 1 |
| 0x1 | barrel shift | xr <- r and b <- xr, in the same cycle | 1 |
| 0x2 | shadow load | a <- sa and b <- sb, in the same cycle | 1 |
| 0x3 | stall | hold ID until the XSMUL is ready | 1 when idle |

The mode schedules, with issue cycle 0, are as follows:

- **Modes 0, 1, 2 and 4:** product k is formed in cycle k+1 and accumulated
  in cycle k+2.
- **Modes 1, 2 and 4** start from cleared units. Mode 0 does not, so
  consecutive mode-0 instructions continue one product.
- **Integer add/sub:** one 48-bit chunk per cycle through a single adder with
  a 1-bit carry. That is 6 chunks plus the issue cycle.

Results are written back at the end of the last cycle. Every operation takes a
fixed number of cycles whatever the data, so software built on it can run in
constant time.

## Register coupling

The XSMUL has no operand ports of its own. It works on CPU register halves of
16 bits, in six banks of eight 32-bit registers. Register i of a bank holds
slot 2i in bits 15:0 and slot 2i+1 in bits 31:16.

| bank | select | role | in the host core |
|---|---|---|---|
| a | 0 | first operand | floating-point registers |
| b | 1 | second operand | floating-point registers |
| r | 2 | result | floating-point registers |
| xr | 3 | second result / accumulator | floating-point registers |
| sa | 4 | shadow of a | general-purpose registers |
| sb | 5 | shadow of b | general-purpose registers |

Operand formats differ by mode:

- **Polynomial modes:** slot j is coefficient j. Results are kept modulo
  2^16, which is enough for any power-of-two modulus up to 2^16 (Saber uses
  2^13).
- **Integer modes:** a bank is one 256-bit little-endian integer. The XSMUL
  splits it into 17-bit chunks, in a 272-bit space. A result's bits 255:0 go
  to r and bits 271:256 go to xr slot 0.

The two one-cycle transfers avoid loop overhead:

- **Shadow load** brings in the next operand pair, prepared in sa/sb, while
  the previous result is still being used.
- **Barrel shift** moves the result to xr and the old xr into b. This is how
  an accumulator is kept across operations.

Polynomial multiplication also moves the old r into xr, so r and xr form one
result chain for long products.

### Example: Saber multiplication by ring splitting

The end-to-end testbench multiplies two 256-coefficient polynomials in
Z_2^13[X]/(X^256 + 1) this way:

1. Split each polynomial into 16 blocks A_0..A_15, B_0..B_15, where block i
   holds coefficients i, i+16, i+32, ... as a polynomial in Y = X^16.
2. Output block j is the sum of A_ia * B_ib over all ia + ib = j (mod 16):
   - each product is a 16-coefficient convolution modulo Y^16 + 1;
   - when ia + ib >= 16 the product is multiplied once more by Y;
   - there are 256 convolutions in total.
3. Each term costs this instruction sequence:
   - write sa and sb (16 register writes);
   - `barrel` (save the accumulator into xr);
   - `shadow`;
   - `conv`;
   - `ring-red`, only when needed;
   - `barrel`;
   - `vec-add`.

The whole multiplication takes 10,792 cycles in simulation, with every
register write counted as one cycle. The publication reports 11,190 cycles for
its software on the real core.

### Other workloads

Four more testbenches run complete workloads at the default size. Each
models the host as one register write or one instruction per cycle.

- `tb/tb_saber_schoolbook.sv` computes the same Saber product by plain
  schoolbook:
  - for each 16-coefficient block of b, all of a is streamed through chained
    `poly-mul`, followed by one zero block that flushes the chain;
  - the 512-coefficient result is reduced modulo X^256 + 1 with vector
    subtractions. A subtraction is `vec-mac` with a_0 = -1, xr = low block and
    b = high block.
  - It takes 7,760 + 328 cycles.
- `tb/tb_saber_karatsuba.sv` runs 1-level and 2-level Karatsuba:
  - the sub-products of 128 or 64 coefficients are schoolbook products;
  - every addition and subtraction of blocks runs on the XSMUL;
  - they take 12,208 and 12,556 cycles.
- `tb/tb_saber_toomcook.sv` runs Toom-Cook-4-way:
  - the operands are cut into four parts of 64 coefficients and evaluated at
    inf, 2, 1, -1, 1/2, -1/2 and 0. The points ±1/2 are scaled by 8, so only
    integers occur;
  - the seven 64 x 64 products are schoolbook products;
  - interpolation multiplies by 360 * E'^-1, where E' is the 7 x 7
    evaluation matrix of the product. That matrix has only integer entries,
    and the testbench derives it by exact rational inversion. The
    interpolation then shifts every coefficient right by 3 and multiplies by
    4005 = 45^-1 mod 2^13. The result is therefore correct modulo q = 2^13
    only;
  - every linear combination is a chain of `vec-mac` operations, with a
    `barrel` shift after each one moving the partial sum from r to xr;
  - it takes 16,316 cycles.
- `tb/tb_x25519_ladder.sv` runs a complete X25519 scalar multiplication:
  - every field multiplication, addition and subtraction of the Montgomery
    ladder and of the inversion runs on the XSMUL: 2,816 multiplications and
    1,020 each of additions and subtractions, in 219,872 cycles;
  - values are kept below 2p. The host does the second fold, the conditional
    swaps and the final reduction;
  - a - b is computed as (2p - b) + a;
  - the inverse z^(p-2) takes 254 squarings and 11 multiplications;
  - the result is checked against the RFC 7748 test vector.

One rule for programming follows from these. The vector operations use the
same multiply & accumulate units that hold a chain's intermediate
coefficients. A chained `poly-mul` sequence must therefore be finished, with
its zero block, before a vector operation is issued. The b operand must also
not be overwritten until then.

## Pipeline integration

`xsmul_ext` is the block that sits in the instruction decode (ID) stage of a
small in-order core. It contains:

- the decoder;
- the register banks;
- the XSMUL core.

An XSMUL instruction asserts *activate stall*, and `stall_o` holds the IF/ID
register until the XSMUL reports ready. An operation of latency L therefore
occupies ID for exactly L cycles. Configuration operations finish in their
issue cycle.

The host core itself is not part of this RTL:

- its register files, pipeline and decoder;
- the Keccak and binomial-sampling units that share the ID stage with the
  XSMUL in the published system.

The core reaches the coupled banks through the `cpu_*` port.

## Modules

| file | what it is |
|---|---|
| `rtl/xsmul_pkg.sv` | constants (N = 16, W = 17, W2 = 48), mode and configuration codes, control structs, latency function |
| `rtl/xsmul_mac.sv` | one multiply & accumulate unit |
| `rtl/xsmul_array.sv` | the chain of N units, wrap-around and negacyclic signs |
| `rtl/xsmul_pmred.sv` | fold stage for 2^255 - 19 |
| `rtl/xsmul_addsub.sv` | 48-bit chunked adder/subtractor |
| `rtl/xsmul_ctrl.sv` | sequencer FSM: schedules, ready |
| `rtl/xsmul_core.sv` | the XSMUL: chunking of operands, result assembly, write-back |
| `rtl/xsmul_regbank.sv` | coupled register halves, shadow load, barrel shift |
| `rtl/xsmul_decoder.sv` | `pq.xsmul` / `pq.xsmul_cfg` decoder |
| `rtl/xsmul_ext.sv` | top: decoder + registers + XSMUL + stall |

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=... failures=...`. `tb/tb_xsmul_ext.sv` runs the top at its
default size. It covers:

- the Saber ring-splitting product above;
- a chained polynomial product;
- Curve25519 field multiplications checked modulo p;
- 512-bit products by lower and higher half;
- additions and subtractions;
- vector multiply-add;
- the stall-only and illegal codes.

It checks every instruction's cycle count. It also counts each mechanism and
fails if one never occurs. The workload testbenches
(`tb_saber_schoolbook`, `tb_saber_karatsuba`, `tb_saber_toomcook` and
`tb_x25519_ladder`) are described above.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl rtl/xsmul_pkg.sv rtl/*.sv \
    tb/tb_xsmul_ext.sv --top-module tb_xsmul_ext -o sim
./obj_dir/sim
```

Use any other `tb/tb_*.sv` the same way. The full-size end-to-end test takes
a few seconds; the X25519 ladder about ten.

The sizes can be changed through the top's parameters N, W, W2 and SLOT. Two
limits apply:

- the strobe fields support N up to 32;
- the 2^255 - 19 fold assumes W divides 255.

## Choices made here

The published description gives the unit structure, the chain, the operation
list with latencies, the register banks with their two transfers, and the
placement in the ID stage. The following are this implementation's own:

- **Encoding:** opcode custom-0 (`0001011`), funct3 0 for `pq.xsmul` and 1 for
  `pq.xsmul_cfg`, with the operation in rs1 as published.
- **Register coupling:**
  - the slot/chunk formats above;
  - integer result bits above 256 go to xr slot 0;
  - vector operations read xr and b;
  - the bank address map and write priorities.
- **Negacyclic signs:** convolution modulo X^16 + 1 uses the per-unit rule
  "subtract when k + j >= N". The source only says that the adder signs are
  configurable.
- **Higher half:** higher-half multiplication continues a preceding
  lower-half one; it does not recompute the product.
- **Carries in polynomial modes:** polynomial modes discard carries (modulo
  2^17 inside the chain, 2^16 in the registers).
- **Integer add/sub:** processes its six 48-bit chunks serially through one
  adder rather than in parallel units. The result and latency are the same.
- **Fold stage:** the 2^255 - 19 fold is a separate stage instead of being
  merged into the rightmost unit.
- **Operand a:** is indexed chunk by chunk rather than physically shifted.
- **Stall operation:** configuration 0x3 ("stall") waits for ready. Every
  operation already stalls, so it only matters if an operation is ever issued
  without stalling.
- **Squaring chains:** the barrel shift loads b only. A chain of squarings
  therefore needs the core to copy r into a (or into sa followed by a shadow
  load).

## What this RTL does not model

- **FPGA mapping:** the DSP48E2/DSP48E1 mapping is not modelled. That mapping
  fits a whole unit into one DSP slice: product register, 17-bit shifted
  carry feedback and carry path. `xsmul_mac` is the generic equivalent.
- **Other units:** the host RISC-V core, its register files, and the Keccak
  and binomial-sampling accelerators are not included.
- **Side channels:** there are no side-channel countermeasures beyond the
  constant cycle counts.
