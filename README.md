# Reconfigurable BSS FIR filter with pipelined carry-select / carry look-ahead adders

An FIR filter tap has to multiply every input sample by a coefficient. This
design does that without a multiplier. Each coefficient is rewritten as a few
short **binary signed digits** (BSS). Each digit picks one small multiple of
the sample (1x … 8x) from a shared *precomputer*. A small tree of
add/subtract units then sums those multiples, each shifted to the weight of its
digit. The filter is reconfigured by writing new coefficients into a register
bank. The hardware stays the same, and the next sample already uses the new
values.

Every add/subtract unit in the tree is built on a 33-bit pipelined adder, in
one of two styles:

* a **carry-select adder** (CSLA, the default): each 4-bit stage adds twice,
  once with carry 0 and once with carry 1, and the incoming carry selects the
  result;
* a **carry look-ahead adder** (CLA): each 4-bit stage forms propagate and
  generate signals and a group carry.

Both adders move the carry up by one 4-bit stage per clock. The carry-select
version is the default because it is the smaller of the two in the
original FPGA comparison.

There are two digit sizes. 4-bit digits give four digits per 16-bit
coefficient and 8:1 multiplexers. 3-bit digits give six digits, 4:1
multiplexers and a 2:1 multiplexer for the top digit.

Next to the filter, the top level also holds a separate **multiplier-cum-accumulator**.
It uses radix-4 Booth encoding and a Wallace tree, and it adds the previous
result into the partial-product tree instead of using a separate accumulator
adder.

## Structure

```
               x[n] ──► precomputer ──► {1x,2x,…,8x}  (registered, shared)
                                           │
        ┌──────────────────────┬───────────┴──────────┬─────────── …
        ▼                      ▼                      ▼
     PE_0 (h_0)             PE_1 (h_1)             PE_{T-1} (h_{T-1})
        │ ±prod_0               │ ±prod_1               │ ±prod_{T-1}
        ▼                      ▼                      ▼
 y ◄─[reg]◄─(±)◄──[Z^-1]◄──(±)◄── … ◄──[Z^-1]◄──(±)◄── 0
```

This is the transposed direct form. All processing elements (PEs) get the
same sample at the same time. Each PE's product joins the partial sum that
comes down the chain from the higher taps, and a Z^-1 register sits between
taps. So

    y[n] = Σ_{k=0}^{T-1} h_k · x[n−k].

Inside one PE with 4-bit digits (`pe_bss4`):

```
 h ─► bss_decoder ─► mux selects, zero gates, add/sub controls, sign
 t_i = gate_i( mux8:1_i(1x..8x) )                 i = 0..3
 A = t0 ± (t1 << 4)      B = t2 ± (t3 << 4)       (first adder level)
 T = A ± (B << 8)                                 (root adder)
```

With 3-bit digits (`pe_bss3`), the tree has three levels:

```
 A = t0 ± (t1 << 3)   B = t2 ± (t3 << 3)   C = t4 ± (t5 << 3)
 E = B ± (C << 6)
 T = A ± (E << 6)
```

## Coefficient recoding and signs

This part is the least obvious, and the filter's correctness depends on it.

**Digits.** `bss_decoder` splits the 16-bit two's-complement coefficient
into D-bit groups, starting at the least significant end. It works upward,
adding the carry from the group below. A group value v above 2^(D−1)
becomes the negative digit v − 2^D and sends a carry of 1 to the next group.
The top digit takes the remaining top bits as a signed field, plus the
carry.

* D = 4: four digits, each in [−8, 8]. Magnitudes 1–8 come from an 8:1
  multiplexer over 1x…8x. A digit of 0 is produced by the gate after the
  multiplexer.
* D = 3: six digits. Digits d0…d4 lie in [−4, 4] and use 4:1 multiplexers
  over 1x…4x. The top digit is −bit15 + carry, which lies in [−1, 1]. The
  2:1 multiplexer for it has inputs 1x and 2x, and with 16-bit coefficients
  only 1x is ever selected.

**Signs through the tree.** The tree has one add/subtract control per adder:
three controls for four digits, and five for six. That is one control fewer
than the number of digit signs. The tree therefore sums digit *magnitudes* as
follows. Each node joins a lower subtree L and an upper subtree U, and the
node takes the sign of L. The node subtracts U when the signs of L and U
differ. The root result T is then the product times the sign of digit 0.

The decoder outputs that sign as `neg`. It travels down the PE pipeline
together with the data. The chain adder of that tap adds T when `neg` is 0
and subtracts it when `neg` is 1. So the only extra hardware is an
add/subtract control on each chain adder.

**Timing of controls.** Each sample carries its own controls. Multiplexer
selects are used when the multiples enter the PE. Each add/sub control is
delayed to the cycle in which its adder samples its operands, and `neg` is
delayed to the PE output. Coefficients can therefore change on any cycle.
Products that are already in flight keep the coefficient they started with.

## The pipelined adders

Both adders (`csla_adder`, `cla_adder`) split the low 32 bits into eight
4-bit stages. Stage s gets its operand bits delayed by s cycles and its
carry-in from a register written by stage s−1 one cycle earlier. The stage
sum is then delayed by 8 − s cycles so that all sum bits leave together. The
top bit (bit 32) is the XOR of the two top operand bits (each delayed 8
cycles) and the registered carry out of the last stage. Every addition
takes exactly **8 cycles**, and the adder accepts a new addition every clock.

* `csla_adder`: stage 0 is one 4-bit ripple adder with the external carry in.
  Each other stage has two 4-bit ripple adders, one with carry 0 and one with
  carry 1. A 4-bit 2:1 multiplexer picks the result, and the stage's carry
  out is c0 | (c1 & cin).
* `cla_adder`: bitwise p = a^b and g = a&b. A valence-4 cell forms the group
  generate G and propagate P, and the carry out is G | (P & cin). The
  internal carries come from look-ahead equations, and the sum is p ^ carry.

`addsub_unit` wraps either adder. It inverts b and sets the carry in to
subtract, and the `KIND` parameter chooses the adder style.

## Interfaces and timing

`bss_fir` (filter) and `bss_fir_system` (top level, `fir_` / `mac_` port
prefixes):

| signal | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset (clears coefficients, chain, valid flags) |
| `coef_we`, `coef_addr`, `coef_data` | 1, log2(TAPS), 16 | write coefficient `coef_addr` at the clock edge |
| `in_valid`, `x` | 1, 16 | input sample, signed |
| `out_valid`, `y` | 1, 33 | output sample, signed, modulo 2^33 |

* **Throughput:** one sample per clock. If `in_valid` is low for a cycle, the
  chain holds its state, so gaps in the input are allowed.
* **Latency:** from `in_valid` to `out_valid` it is 1 (precomputer) + PE +
  1 (output register) cycles. That is **18 cycles** for D = 4 (PE: 2 adder
  levels × 8) and **26 cycles** for D = 3 (3 levels × 8).
* **Reconfiguration:** a coefficient written in the same cycle as a sample
  is used for that sample. Outputs change over completely to the new filter
  after TAPS further samples, as in any transposed-form filter.
* **Overflow:** 16 × 16 products are at most 2^30 in magnitude, so eight taps
  fit in 33 bits. The one exception is when every product is (−2^15)². The
  arithmetic wraps around.

`booth_mac`: on each clock with `en` = 1 it computes
`acc <= (clr ? 0 : acc) + a*b`. `a` and `b` are 16-bit signed, `acc` is 40
bits (8 guard bits), and the result appears one clock later. The rows of its
Wallace tree are:

* eight Booth partial products, each 0, ±a or ±2a shifted by 2i;
* one correction row that completes the two's-complement negation of the
  negative rows;
* the previous `acc`.

Carry-save adders reduce these rows three at a time down to two, and one
final adder sums the last two.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `bss_fir` | `KIND` | `ADDER_CSLA` | adder style in every PE (`ADDER_CLA` for carry look-ahead) |
| | `D` | 4 | digit size, 4 or 3 |
| | `TAPS` | 8 | filter length (≥ 2) |
| | `XW`, `HW` | 16, 16 | sample and coefficient width |
| `bss_fir_system` | `FIR_KIND`, `FIR_D`, `FIR_TAPS` | as above | passed to the filter |
| | `MAC_N`, `MAC_K` | 16, 8 | MAC operand width and guard bits |
| `csla_adder`, `cla_adder`, `addsub_unit` | `WIDTH` | 33 | adder width; (WIDTH−1) must be a multiple of 4 |

The adder width, the 4-bit stage size, the 8:1 / 4:1 / 2:1 multiplexer sizes,
the digit shifts and the choice of adder style come from the architecture
this RTL implements. The filter length, the 16-bit widths, the coefficient
write port, the valid handshake, reset, and the MAC's widths and timing are
choices made here.

## Where this RTL departs from the original architecture

* **Adder latency:** the original carry look-ahead drawing registers the low
  sums one cycle less than the carry-select one (latency 7 against 8) and
  shows longer delays on the top bit. Here both adders have a latency of
  exactly 8 for every bit, so that either can be used in a PE. The original
  also calls the PG and sum logic of each CLA stage, and the ripple adders of
  each CSLA stage, "pipelined". Here they are combinational within the stage,
  with one register per stage on the carry.
* **3-bit tree root shift:** the original drawing shows a shift of 3 on the
  root input that comes from the second-level adder. A shift of 6 is needed
  for the result to equal the product, and 6 is used.
* **Leftover sign:** the original shows one ± control per tree adder and no
  place for the overall sign. Here that sign is applied by the tap's chain
  adder (see above).
* **Chain adders:** these are plain single-cycle adders, not the pipelined
  CSLA/CLA. An 8-cycle adder between two Z^-1 registers would change the
  filter's response.
* **Naming:** the adder called a "carry save adder" in the original
  comparison is, by its description and drawing, a carry-select adder. It is
  built and named as a carry-select adder here.
* **Not implemented:** the original work also reports FPGA resource counts
  (logic elements, registers, memory bits) for 4-bit and 3-bit filters with
  each adder. Those numbers are neither checked nor reproduced here. The
  filter length behind them was not published.

## Files

| file | content |
|---|---|
| `rtl/fir_pkg.sv` | adder-style enum, widths, digit count |
| `rtl/delay_line.sv` | shift-register delay used for skew and control alignment |
| `rtl/csla_adder.sv`, `rtl/cla_adder.sv` | 33-bit pipelined adders |
| `rtl/addsub_unit.sv` | add/subtract unit on either adder |
| `rtl/bss_decoder.sv` | coefficient recoding, mux and add/sub control |
| `rtl/precomputer.sv` | shared multiples of x |
| `rtl/pe_bss4.sv`, `rtl/pe_bss3.sv` | processing elements for 4-bit and 3-bit digits |
| `rtl/bss_fir.sv` | the filter |
| `rtl/booth_mac.sv` | Booth / Wallace multiplier-cum-accumulator |
| `rtl/bss_fir_system.sv` | top level: filter and MAC side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/fir_stimulus_checker.sv` | filter stimulus and reference model used by the filter testbenches |

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bss_fir_system \
    -y rtl -y tb +libext+.sv rtl/fir_pkg.sv tb/tb_bss_fir_system.sv -o sim
./obj_dir/sim
```

Replace the top module and its file to run another testbench. Each one runs
in well under a second.

* `tb_bss_fir_system` runs the default build end to end. The filter side gets
  reset, a coefficient load, and 4000 cycles of samples with gaps and
  coefficient rewrites while streaming. The MAC side runs dot products with
  restarts. Every output is checked against a model, the 18-cycle latency is
  checked, and each mechanism (reconfiguration while streaming, input gaps,
  subtracting PEs, zero digits, MAC restart and idle) must occur.
* `tb_bss_fir` runs all four builds side by side with the same kind of checks:
  D = 4 or 3, each with CSLA or CLA adders.
* `tb_bss_fir_lowpass` uses the default filter as an 8-tap windowed-sinc
  low-pass. It checks the impulse response, the 18-cycle latency, and the
  outputs for a constant input and for an input at half the sample rate.
  It then rewrites the coefficients into a high-pass and checks that the two
  inputs swap roles.
* `tb_pe_bss4` and `tb_pe_bss3` run random and extreme coefficients and
  samples, with a different coefficient every cycle, through both adder
  styles.
* `tb_bss_decoder` checks all 65 536 coefficients for both digit sizes.
  It rebuilds each coefficient from the digits and evaluates the adder tree
  with the decoder's controls.
* `tb_csla_adder`, `tb_cla_adder`, `tb_addsub_unit`, `tb_precomputer` and
  `tb_booth_mac` check their unit against plain integer arithmetic, including
  cycle-exact latency.

All of these pass. Each testbench was also run against a copy of its module
with one deliberate bug, and each caught the bug. Synthesis has been run only
at the generic-gate level, not on an FPGA, so the resource figures of the
original comparison have not been reproduced.
