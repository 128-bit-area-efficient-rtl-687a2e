# 128-bit area-efficient carry select adder

A carry select adder (CSLA) hides carry propagation by computing each block
of sum bits twice, once assuming the incoming carry is 0 and once assuming
it is 1, and then picking the right result with a multiplexer when the real
carry arrives. The textbook CSLA pays for this with two ripple carry adders
(RCAs) per block.

This design removes the second RCA. The carry-in-1 result of a block is the
carry-in-0 result plus one. An incrementer without a carry chain, a
**binary to excess-1 converter (BEC)**, produces it from the carry-in-0
result. A BEC needs one inverter plus one XOR and one AND per extra bit,
which is far fewer gates than a row of full adders. The price is a few gate
delays, because the BEC sits behind the RCA instead of beside it. The
blocks are sized as in a *square-root* CSLA (2, 2, 3, 4, 5 bits for 16
bits). The 128-bit adder is a chain of eight such 16-bit adders.

All logic is combinational. There is no clock, reset or handshake:

    {cout, s} = a + b + cin

## The carry select group with an excess-1 converter

This is the core of the design (`bec_group`). Say a group is N bits wide
and takes the operand slices `a`, `b`. It works in three stages:

1. **Carry-in-0 sum.** An N-bit ripple adder forms `r0 = {carry, sum} = a + b`.
   Its least significant cell is a half adder, because its carry-in is the
   constant 0. The other N−1 cells are full adders.
2. **Carry-in-1 sum.** An (N+1)-bit BEC forms `r1 = r0 + 1`. The largest
   value of `r0` is 2·(2^N − 1) = 2^(N+1) − 2, so `r1` always fits in
   N+1 bits and the BEC never wraps. That is why an N-bit RCA is replaced
   by an N+1-bit BEC: the group's carry bit goes through the converter as
   well.
3. **Select.** A 2(N+1):(N+1) multiplexer passes `r1` when the carry from
   the group below is 1 and `r0` when it is 0. The top bit of the result
   is the group's carry out.

Stages 1 and 2 do not depend on the incoming carry. They run while the
carry travels through the lower groups. Only the multiplexer is on the
carry path.

### The converter

Adding one to a binary number flips bit 0, and flips bit i exactly when
all bits below it are 1 (`bec`):

    x[0] = ~b[0]
    x[i] =  b[i] ^ (b[0] & b[1] & ... & b[i-1])      i >= 1

The AND terms form a chain. Each AND takes the previous term and one more
input bit, so the 4-bit converter is one inverter, three XORs and two ANDs:

| b (in) | x (out) | | b (in) | x (out) |
|---|---|---|---|---|
| 0000 | 0001 | | 1000 | 1001 |
| 0001 | 0010 | | 1001 | 1010 |
| 0010 | 0011 | | 1010 | 1011 |
| 0011 | 0100 | | 1011 | 1100 |
| 0100 | 0101 | | 1100 | 1101 |
| 0101 | 0110 | | 1101 | 1110 |
| 0110 | 0111 | | 1110 | 1111 |
| 0111 | 1000 | | 1111 | 0000 |

The module takes any width N ≥ 2. The 16-bit adder uses 3-, 4-, 5- and
6-bit converters.

## The 16-bit square-root adder

`sqrt_csla16` splits 16 bits into five groups. The sizes grow by one bit
per group. As a result, a group's two candidate results are ready at about
the time the carry reaches its multiplexer:

| group | bits | built as | carry in (select) | BEC | mux |
|---|---|---|---|---|---|
| 1 | 1:0 | 2-bit RCA (2 full adders), takes `cin` | `cin` | – | – |
| 2 | 3:2 | `bec_group`, N = 2 (H + F) | c1 (carry into bit 2) | 3-bit | 6:3 |
| 3 | 6:4 | `bec_group`, N = 3 (H + 2F) | c3 (bit 4) | 4-bit | 8:4 |
| 4 | 10:7 | `bec_group`, N = 4 (H + 3F) | c6 (bit 7) | 5-bit | 10:5 |
| 5 | 15:11 | `bec_group`, N = 5 (H + 4F) | c10 (bit 11) | 6-bit | 12:6 |

H is a half adder and F a full adder. The carry out of group 5 is the
adder's `cout`. The partition lives in `csla_pkg` (`CSLA16_GW`).

## From 16 to 128 bits

`csla128` (the top, parameter `WIDTH`, default 128) chains `WIDTH/16`
copies of `sqrt_csla16`. The carry out of each 16-bit slice is the carry in
of the next one. `WIDTH` must be a non-zero multiple of 16; other values
stop elaboration with an error. Chaining 16-bit slices is this design's own
choice. A single square-root partition over all 128 bits (group sizes
continuing 6, 7, 8, …) would have a shorter carry path. It is not built.

## Gate-level cells and the unit-gate cost model

Every cell is written at gate level from AND, OR and inverter gates. With
every such gate counted as 1 unit of area and 1 unit of delay, the cells
cost:

| cell | module | structure | area | delay |
|---|---|---|---|---|
| XOR | `xor_aoi` | (a·b̄) + (ā·b) | 5 | 3 |
| 2:1 mux | `mux2_aoi` | (s̄·d0) + (s·d1) | 4 | 3 |
| half adder | `half_adder` | XOR + AND | 6 | 3 |
| full adder | `full_adder` | 2 XOR; carry = a·b + ci·(a⊕b) | 13 | 6 |

Only the area and delay of the mux and adder cells are specified. Their
gate structure is this design's choice, picked to meet those figures.

Counted this way, a group with an N-bit RCA costs
6 + 13(N−1) (adder) + 1 + 5N + (N−1) (BEC) + 4(N+1) (mux) gates. That is
43 for group 2, and 66, 89 and 112 for groups 3 to 5. Reference figures for
this adder give 43, 61, 84 and 107. Only group 2 agrees with the structure
as drawn, and the RTL follows the structure. The reference unit-gate delays
of the sum outputs of groups 2–5 are 13, 16, 19 and 22. The RTL is
zero-delay, so simulation does not check these delays.

## Module hierarchy

    csla128                     top, WIDTH/16 slices
    └─ sqrt_csla16              16-bit square-root CSLA (uses csla_pkg)
       ├─ rca #(N=2)            group 1
       │  └─ full_adder
       └─ bec_group #(N=2..5)   groups 2-5
          ├─ half_adder         LSB of the carry-in-0 adder
          ├─ rca #(N-1)         rest of the carry-in-0 adder
          ├─ bec #(N+1)         carry-in-1 result
          └─ mux_sel #(N+1)     2(N+1):(N+1) select
                └─ mux2_aoi
    xor_aoi is used by half_adder, full_adder and bec.

Every file in `rtl/` holds one module or package and starts with a comment
on its function, ports and timing.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one compares the
block with arithmetic the testbench does itself. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog ends a
run that hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/csla_pkg.sv tb/tb_csla128.sv --top-module tb_csla128
    ./obj_dir/Vtb_csla128

To run another testbench, swap in its file and module name. `-Irtl` lets
Verilator find the submodules by file name.

| testbench | what it covers |
|---|---|
| `tb_xor_aoi`, `tb_mux2_aoi`, `tb_half_adder`, `tb_full_adder` | exhaustive truth tables |
| `tb_rca` | exhaustive at 2 and 5 bits |
| `tb_bec` | the 16-row table above; 3 and 6 bits exhaustive |
| `tb_mux_sel` | 8:4 mux, all 512 input combinations |
| `tb_bec_group` | groups of 2, 3, 4 and 5 bits, exhaustive over a, b, cin |
| `tb_sqrt_csla16` | corners + 50,000 random vectors; counts, per group, how often each of the two results was selected |
| `tb_csla128` | full 128-bit default: corners (a carry rippling through all 128 bits, all-ones + all-ones) + 20,000 random vectors; checks that every group of every slice selected both results, that carries crossed slice boundaries and that carry out occurred |
| `tb_csla_widths` | `WIDTH` = 16, 32 and 64, 10,000 random vectors each |

All of them pass. Each one fails if a key piece of logic in its block is
broken, for example swapped mux inputs or a broken AND chain in the BEC.

## Departures and limits

- The reference drawing of the AOI XOR cell prints the equation
  Q = A·B + Ā·B̄, which is XNOR. The cell built here is XOR,
  (A·B̄ + Ā·B), with the same gate count: that is what an adder needs.
- Group 1 of the 16-bit adder is a plain 2-bit RCA driven by `cin`, as in
  the textbook square-root CSLA.
- The 128-bit width is reached by chaining 16-bit adders (see above).
- Gate counts for groups 3–5 differ from the reference figures by 5 gates
  each (see the cost model). Delays are not modelled.
- The regular two-RCA CSLA that this design is measured against is not
  included.
- Synthesis tools flatten and re-optimise the gate-level cells. The
  unit-gate counts describe the structure written, not what comes out of
  a synthesis run.
