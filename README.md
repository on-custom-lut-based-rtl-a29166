# Customized-LUT logic obfuscation cells

Logic locking hides what a chip computes by replacing some of its gates with
elements whose function is set by a secret key, loaded after fabrication in a
trusted facility. Replacing a gate cone by a large look-up table (LUT) is a
strong form of this: a SAT-based key-recovery attack has to model an n-input
LUT as a MUX tree of depth n with 2^n unknown bits, and the attack time grows
steeply with n. On the ISCAS C7552 benchmark an 8-input LUT is the size at
which the attack stops finishing within ten days, but 8-input LUTs are very
expensive (hundreds of non-volatile bits per replaced gate and several times
the area and power of the unlocked circuit).

The idea implemented here is to keep the 8-wire footprint of that LUT while
using a much smaller LUT, and to add a cheap second layer of key-dependent
routing or logic in front of it:

* **LUT+MUX** – a 4-input LUT whose four inputs each come through a
  key-selected 2:1 MUX. Each MUX chooses between the true circuit wire and a
  dummy wire taken from elsewhere in the circuit. 16 + 4 = 20 key bits per
  cell, 2^4 × 2^16 configurations.
* **LUT+LUT** – a 3-input LUT fed through five 2-input LUTs. A 2-input LUT
  can act as a routing choice (pass one wire) or as any other 2-input
  function. 8 + 5 × 4 = 28 key bits per cell.

Both cells take 8 wires and give one output, so either can stand where an
8-input LUT would. LUT+MUX needs fewer non-volatile bits; LUT+LUT has the
lower area and power. In silicon the LUT contents live in spin-transfer-torque
(MTJ) non-volatile latches, and the LUT itself is just a MUX tree from its
inputs to its output, which is why it can be written as ordinary
synthesizable RTL.

## The cells in detail

### LUT (`stt_lut`)

`out = cfg[in]`: the N inputs address one of 2^N configuration bits, `in[0]`
being the least significant address bit. The configuration bits come from
the key store; the module is combinational.

### LUT+MUX cell (`lut_mux_cell`)

```
 x0 ─┐                       
 x1 ─┴ MUX0 (key 16) ─┐      
 x2 ─┐                │      
 x3 ─┴ MUX1 (key 17) ─┤  LUT 4
 x4 ─┐                ├─ (key 15:0) ── y
 x5 ─┴ MUX2 (key 18) ─┤      
 x6 ─┐                │      
 x7 ─┴ MUX3 (key 19) ─┘      
```

MUX j feeds LUT input j and passes `x[2j]` when its key bit is 0 and
`x[2j+1]` when it is 1. Which wire of a pair is the real one and which is
the dummy is up to whoever inserts the cell; the key decides. The
parameter `LUT_N` (2 to 7) gives the sweep configurations LUT 7 + 1 MUX
down to LUT 2 + 6 MUXes. For 4 to 7 the first `8-LUT_N` LUT inputs go
through MUXes and the rest are wired straight to the remaining `x` bits.
For 3 and 2 there are more MUXes than LUT inputs and the MUXes form small
trees: exactly the LUT+LUT arrangements below with every 2-input LUT
replaced by a 2:1 MUX (first wire on key 0).
Key layout: `key[2**LUT_N-1:0]` is the LUT truth table, `key[2**LUT_N + j]`
the select of MUX j.

### LUT+LUT cell (`lut_lut_cell`)

With the default `LUT_N = 3`, the five 2-input LUTs S0..S4 form this
arrangement (x0..x7 are the cell wires I1..I8):

```
 x0,x1 → S0 ─┐
        x2 ──┴→ S1 ─────→ LUT3 in0
 x3,x4 → S2 ────────────→ LUT3 in1      → y
        x5 ──┐
 x6,x7 → S3 ─┴→ S4 ─────→ LUT3 in2
```

For `LUT_N = 4..7` small LUT j combines `x[2j]` and `x[2j+1]` into LUT
input j, the rest of the LUT inputs are wired straight (LUT 7 + 1 has a
single small LUT on x0, x1). For `LUT_N = 2` each of the two LUT inputs is
the root of a balanced tree of three 2-input LUTs over four wires. In a
small LUT the first wire named is address bit 0, so truth table `4'b1010`
passes the first wire and `4'b1100` the second. Key layout:
`key[2**LUT_N-1:0]` main LUT, `key[2**LUT_N + 4i +: 4]` small LUT i.

## Keys and activation (`key_store`)

A key store is a `KEY_BITS`-bit register written through a serial port:
every clock with `prog_en` high shifts `prog_din` in at the top, so after
`KEY_BITS` clocks the first bit sent is in `key[0]`. Send the key least
significant bit first. The store stands for the non-volatile latches, so it
has no reset (the contents of a real part survive power cycles, and an
unprogrammed part simply computes the wrong function) and no read-out port;
it is meant to be kept off the scan chain, which gives access to every other
flip-flop. A simulation must program it before looking at any cell output.

## Top level (`custom_lut_obf_top`)

The top holds the two variants side by side, each as a bank of
`NUM_CELLS` cells (default 15, the number of gates replaced in C7552) with
its own key store and programming port:

| port | width | meaning |
|---|---|---|
| `clk` | 1 | programming clock |
| `mux_prog_en`, `mux_prog_din` | 1, 1 | serial key port of the LUT+MUX bank (15 × 20 = 300 bits) |
| `mux_x` | 15 × 8 | wires of each LUT+MUX cell |
| `mux_y` | 15 | LUT+MUX cell outputs |
| `ll_prog_en`, `ll_prog_din` | 1, 1 | serial key port of the LUT+LUT bank (15 × 28 = 420 bits) |
| `ll_x` | 15 × 8 | wires of each LUT+LUT cell |
| `ll_y` | 15 | LUT+LUT cell outputs |

Cell c of a bank uses bits `[c*W +: W]` of its bank's key, W = 20 or 28.
The cells are purely combinational from `x` to `y`; only key loading is
clocked, one bit per clock. The circuit being protected is outside this RTL:
its netlist connects to the `x` and `y` ports, with the cell wires chosen so
that no combinational loop is formed through a dummy wire.

Parameters: `NUM_CELLS`, `MUX_LUT_N` (2..7) and `LL_LUT_N` (2..7). The
benchmarks this scheme was sized on replace 12 (C2670), 15 (C7552), 28
(B12) and 50 (AES, FIR, IIR, DES) gates; set `NUM_CELLS` accordingly.

## What is taken from the scheme and what is a choice made here

Taken from the scheme: the two cell variants, their default sizes (LUT 4 +
4 MUXes, LUT 3 + 5 two-input LUTs), the 8-wire footprint, the arrangement of
the 3 + 5 and 7 + 1 LUT+LUT cells, 2:1 MUXes only, LUT = MUX tree over
stored bits, key kept in non-volatile storage outside the scan chain, 15
cells for C7552.

Choices made here: the key bit layout; the serial programming port; no
reset on the key store; which MUX input key 0 selects; the pairing of wires
to MUXes and small LUTs; the arrangement of the LUT+LUT 2 + 6 cell and the
pair order of 4 + 4 … 6 + 2; the MUX trees of the LUT+MUX 3 + 5 and 2 + 6
cells, carried over from the LUT+LUT arrangements; the two banks sharing one
top.

Not built: the magnetic (MTJ) latch cell itself and its sense circuitry,
which are a full-custom analog design; the host circuits (ISCAS benchmarks and
crypto/DSP designs); the gate-selection procedure, SAT-attack
evaluation and area/power results, which are software flows; the
traditional single 8-input LUT that the cells replace (only as a baseline);
and the suggested future extension of
encrypting the key with a PUF-derived key before it is written.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog. Cell testbenches compare
against the behavioural models in `tb/obf_ref_pkg.sv` for random keys and
all 256 input patterns, at several LUT sizes, and also key the default
cells to stand for a known gate cone and check that cone's expression
directly. `tb_key_store` checks the load takes exactly one clock per bit and
that the word holds when not programming. `tb_custom_lut_obf_top` runs the
full-size top through random keys, activation with the correct keys (every
cell then computes its cone for all 256 patterns) and keys with one bit
flipped (every cell's output is corrupted for some pattern), and reports
how often each mechanism was exercised (programming of each bank, MUX
selects 0 and 1, small LUTs used for routing and for logic, unlocking,
corruption under a wrong key). `tb_obf_config_sweep` checks every LUT size
of both cells (7 + 1 down to 2 + 6) against the reference models, and
`tb_obf_benchmark_sizes` repeats the activation and wrong-key runs on tops
of 12, 28 and 50 cells per bank (through the helper `tb/top_activation_run.sv`).

To run one testbench with Verilator from the project directory:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  rtl/obf_pkg.sv tb/obf_ref_pkg.sv rtl/stt_lut.sv rtl/key_mux2.sv \
  rtl/lut_mux_cell.sv rtl/lut_lut_cell.sv rtl/key_store.sv \
  rtl/custom_lut_obf_top.sv tb/tb_custom_lut_obf_top.sv \
  --top-module tb_custom_lut_obf_top
./obj_dir/Vtb_custom_lut_obf_top
```

Replace the testbench file and top module name for the others. All
testbenches finish in well under a second of simulation time.
