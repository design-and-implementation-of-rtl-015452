# 128-bit modified square-root carry select adder

A ripple carry adder is small, but its carry has to travel through every bit.
A carry select adder cuts the operands into groups and computes each group twice
ahead of time: once assuming the carry coming in is 0 and once assuming it is 1.
When the real carry arrives, a multiplexer picks the right result, so the carry
crosses each group in one mux delay instead of N full-adder delays.

The "regular" form does the two precomputations with two ripple carry adders per
group. This design is the **modified** form: each group keeps only the
carry-in-0 ripple adder, and gets the carry-in-1 result by adding one to it with a
**binary to excess-1 converter (BEC)**. That is a much cheaper circuit than a
second adder, because adding 1 needs only an AND chain and XORs.

The RTL is gate-level, purely combinational SystemVerilog. It provides 16-, 32-,
64- and 128-bit adders; the 128-bit one (`mod_sqrt_csla128`) is the top.
Every adder computes `{cout, sum} = a + b + cin`.

## The 16-bit slice

Everything wider is built from `mod_sqrt_csla16`. It splits its 16 bits into five
groups whose sizes grow by one bit per group. This is the "square-root" sizing:
a wider group takes longer to ripple its own operands, and it has that extra
time because the carry reaches it later.

| group | bits    | carry-in-0 adder | excess-1 converter | mux (inputs to outputs) |
|-------|---------|------------------|--------------------|-------------------------|
| 0     | [1:0]   | 2-bit RCA, takes `cin` | none         | none                    |
| 1     | [3:2]   | 2-bit            | 3-bit              | 6 to 3                  |
| 2     | [6:4]   | 3-bit            | 4-bit              | 8 to 4                  |
| 3     | [10:7]  | 4-bit            | 5-bit              | 10 to 5                 |
| 4     | [15:11] | 5-bit            | 6-bit              | 12 to 6                 |

Group 0 is a plain ripple adder. Nothing needs to be selected there because its
carry in, `cin`, is known from the start. Each other group is one
`csla_bec_group`, which works like this:

```
 a[g], b[g] ──► N-bit RCA (carry in 0) ──► {c0, s0}  (N+1 bits) ──────────┐ in0
                                                │                           ├─► mux ─► {cout_g, sum[g]}
                                                └─► (N+1)-bit BEC ─► {c1, s1} ┘ in1
                                                                            ▲
                                              carry out of group g-1 ───────┘ sel
```

Two points in this picture are easy to misread:

* **The converter is one bit wider than the group.** It increments the ripple
  adder's sum *and* its carry out as one (N+1)-bit number. When the group's sum
  bits are all ones, adding 1 makes them wrap to zero, and the carry out changes
  from 0 to 1 at the same moment. A BEC only N bits wide would lose that carry.
* **The mux selects on the carry from the group below.** A carry of 1 selects
  the converter's output. A carry of 0 selects the ripple adder's output.

The group sizes live in `csla_pkg` (`GROUP_LSB`, `GROUP_WIDTH`). If you change
them, keep them contiguous and make them sum to `SLICE_W`.

### Critical path inside a slice

Every group starts adding its own operands at the same time. The carry then
travels through group 0's 2-bit ripple and after that through one mux per group:
four mux stages for a 16-bit slice. The growing group widths are meant to make
each group's own ripple and increment finish about when its select arrives.

## The excess-1 converter

`bec` computes `x = b + 1 (mod 2^N)`:

```
x[0] = ~b[0]
x[i] = b[i] ^ (b[0] & b[1] & ... & b[i-1])      i >= 1
```

The AND terms form one chain: `b0&b1`, then that ANDed with `b2`, and so on. Each
new bit costs one extra AND gate. For 4 bits the converter takes 8 AND, 3 OR and
7 NOT gates, against 28 AND, 16 OR and 16 NOT for a 4-bit ripple carry adder.
This saving is the whole point of the modified adder. A count that builds the
3-input AND separately gives 9 ANDs instead of 8. This RTL follows the chained
form.

## Gate-level building blocks

The design is written in AND, OR and NOT gates so that its area can be counted
in unit gates:

* `xor_aoi`: `y = (a & ~b) | (~a & b)`. Two inverters, two ANDs and one OR,
  three levels deep. Every XOR in the design is one of these.
* `full_adder`: two `xor_aoi` for the sum, plus a majority carry
  `ab | bc | ca` (3 AND, 2 OR). That is 7 AND, 4 OR and 4 NOT per bit.
* `half_adder`: one `xor_aoi` and one AND. It is bit 0 of every carry-in-0
  ripple adder, because a full adder with its carry in tied to 0 wastes gates.
* `rca #(N, HAS_CIN)`: a chain of full adders. `HAS_CIN=0` puts a half adder at
  bit 0 and ignores the `cin` port. The groups use this form. Group 0 uses
  `HAS_CIN=1`.
* `csel_mux #(W)`: a W-bit 2:1 mux, `y = sel ? in1 : in0`.

Synthesis tools will of course re-map these gates. The structure fixes the
function and the gate count, not the final netlist.

## 32, 64 and 128 bits

Each wider adder is two copies of the next narrower one. The lower half's carry
out drives the upper half's carry in:

```
mod_sqrt_csla128 = 2 x mod_sqrt_csla64 = 4 x mod_sqrt_csla32 = 8 x mod_sqrt_csla16
```

So the 128-bit adder is eight 16-bit slices, and the carry passes through them in
series. Within a slice it skips through the group muxes. At the slice
boundaries it behaves like a ripple between blocks. As a result the worst-case
delay grows roughly linearly with width above 16 bits, not with its square root.
Published FPGA results for this adder family show the same trend: about 15, 24,
41 and 75 ns for 16, 32, 64 and 128 bits.

## Where this RTL makes its own choices

The adder's description leaves these points open. This RTL fills them as follows:

* **32-bit structure.** The 32-bit adder's group sizes are not given. It is built
  as two 16-bit slices, in the same way as the 64- and 128-bit adders. Its
  reported size is close to twice the 16-bit one, which fits this reading.
  A single 32-bit square-root adder with longer groups (6, 7, ... bits) would
  be faster, but it is not what is built here.
* **Carry in.** Every adder has a `cin` port, which feeds group 0 of the lowest
  slice.
* **Mux polarity.** Carry 1 selects the excess-1 result. Addition requires this.
* **Half adder at bit 0** of the carry-in-0 ripple adders. This is described for
  the regular adder and applied here to the modified one.
* **No registers.** The adder is combinational. Register it outside if you need
  to pipeline it.

The regular carry select adder, with two ripple adders per group, is the
comparison point for this design. It is not included.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the module
against integer arithmetic computed in the testbench and ends with a
`TB_RESULT checks=N failures=M` line.

* `xor_aoi`, `half_adder`, `full_adder`: exhaustive.
* `rca`: exhaustive at 4 bits with carry in, and at 5 bits with carry in 0. The
  5-bit test ties the unused `cin` to 1 to show that it has no effect.
* `bec`: exhaustive at 3, 4 and 6 bits, including the wrap from all ones to zero.
* `csla_bec_group`: exhaustive at 2, 3, 4 and 5 bits, with both carry values.
* `mod_sqrt_csla16/32/64/128`: directed corner cases, then 100k, 50k, 30k and
  200k random additions. These tests also track the carry-select mechanism
  itself. For every group mux they work out the incoming carry from the
  reference sum (`a[p] ^ b[p] ^ ref[p]` at the group's lowest bit `p`). They
  count a failure if any mux never selected its ripple result, if any mux never
  selected its converter result, if any slice boundary never carried a 1, if
  `cout` was never 1, or if no addition carried from bit 0 all the way out of
  the top bit.

Each testbench was also checked against a deliberately broken copy of its
module, for example a swapped mux polarity, a converter without the carry bit,
or a broken carry between halves. Every broken copy made its testbench fail.

The testbenches check function only. The adder has no clock, so there is no
latency to check. Its gate delays can only be judged after synthesis.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/csla_pkg.sv \
          tb/tb_mod_sqrt_csla128.sv --top-module tb_mod_sqrt_csla128
./obj_dir/Vtb_mod_sqrt_csla128
```

Swap in any other `tb_*.sv` and its module name to run that test instead.
`csla_pkg.sv` must come first on the command line because the slice and its
testbenches import it.

## Files

| file | contents |
|------|----------|
| `rtl/csla_pkg.sv` | slice width and group boundaries |
| `rtl/xor_aoi.sv`, `half_adder.sv`, `full_adder.sv` | gate-level cells |
| `rtl/rca.sv` | N-bit ripple carry adder |
| `rtl/bec.sv` | N-bit binary to excess-1 converter |
| `rtl/csel_mux.sv` | W-bit 2:1 carry-select mux |
| `rtl/csla_bec_group.sv` | one carry-select group (RCA + BEC + mux) |
| `rtl/mod_sqrt_csla16.sv` | 16-bit slice |
| `rtl/mod_sqrt_csla32.sv`, `64.sv`, `128.sv` | wider adders, two halves each |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
