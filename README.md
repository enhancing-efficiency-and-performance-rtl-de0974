# Reversible fault-tolerant CLB fabric

An FPGA logic block is built here entirely from *reversible, parity-preserving*
gates. A reversible gate has as many outputs as inputs and maps every input
vector to a distinct output vector, so no information is erased. If the gate
also preserves parity (XOR of all outputs = XOR of all inputs), a single
flipped line anywhere in it changes the parity, so a parity check can detect
it. Two such gates carry the design:

* **MSH** (4 inputs, 4 outputs). One MSH gate with its output fed back is a
  complete D-latch.
* **MSB** (6 inputs, 6 outputs). One MSB gate is a complete 4:1 multiplexer.

From these, together with the classic Fredkin and Feynman gates, the RTL
builds look-up tables, a master-slave flip-flop and a configurable logic
block (CLB). Then it maps an N-bit ripple-carry adder onto 2·N of those CLBs.
The architecture follows the paper "Enhancing Efficiency and Performance
with RFT Gate Designs". Where that description stops, the choices made here
are listed under [Departures and own choices](#departures-and-own-choices).

All of it is synthesizable SystemVerilog (IEEE 1800-2017). Gates that would be
a single reversible device in the target technology are ordinary
combinational logic here. The reversibility and parity properties are checked
by the testbenches, not by the synthesis tool.

## The gates

| gate | inputs | outputs | module |
|---|---|---|---|
| Feynman (CNOT) | A, B | P=A, Q=A⊕B | `feynman_gate` |
| double Feynman (F2G) | A, B, C | P=A, Q=A⊕B, R=A⊕C | `f2g_gate` |
| Fredkin (controlled swap) | A, B, C | P=A, Q=A'B⊕AC, R=AB⊕A'C | `fredkin_gate` |
| MSH | A, B, C, D | P=A, Q=B⊕C, R=A'C⊕AB, S=D⊕A'C⊕AB | `msh_gate` |
| MSB | A, B, C, D, E, F | P=A, Q=B, R=A'B'C+A'BE+AB'D+ABF, S/T/U = the three unselected data lines | `msb_gate` |

The constant inputs matter. With B=0 a Feynman gate copies A (reversible
logic has no free fan-out). With B=1 it inverts A. An F2G fed (A,1,0) gives
A, A' and A again. This is how the flip-flop gets its inverted clock and its
Q/Q' outputs.

**MSH.** Its quantum realisation is a CNOT from C onto B, then a Toffoli
gate (controls A and the new B, target C), then a CNOT from C onto D. That is
six elementary gates. The middle line R therefore selects C when A=0 and B
when A=1, and S adds R onto D. Tie A=clock, B=data, C=stored value and D=0,
and S is `clk'·Q ⊕ clk·D`: exactly the next-state equation of a D-latch.

**MSB.** A and B pass through and select one of C, D, E, F onto R
(A=0,B=0→C; 0,1→E; 1,0→D; 1,1→F). The other three data values leave on S, T
and U. Here they are routed by two levels of controlled swaps: A swaps C↔D
and E↔F, then B swaps the C and E lines. The outputs are then a permutation
of the inputs. That makes the gate reversible and conservative, and so parity
preserving. With A=B=0 every line passes straight through.

## Storage: the latch and the flip-flop

Storage is the least obvious part of the design, because reversible gates
have no memory. State exists only as a loop from a gate's output back to its
input.

**`rft_dlatch`** is one MSH gate. Its S output is the next state, and its C
input is the current state. In RTL the loop is closed by an `always_latch`
that is enabled by `clk` and loads S. This gives a real latch rather than a
zero-delay combinational loop. While `clk`=1 the latch is transparent, since
MSH then routes B (data) to S. While `clk`=0, S equals C and the latch holds.
Lint tools report the path state → MSH → latch as circular logic. It is
intended: the latch breaks the loop.

**`rft_dlatch_we`** puts a Fredkin gate in front of that latch. Controlled by
the write enable `w`, the Fredkin gate feeds it `d` (w=1) or a feedback value
`q_fb` (w=0). Used alone, `q_fb` is tied to `q`. Its next state is then
`clk·(w·d + w'·Q) + clk'·Q`.

**`rft_msff`** is the master-slave flip-flop:

```
        w,d ─► Fredkin ─► MSH latch (master, open while clk=0) ─► MSH latch (slave, open while clk=1) ─► F2G(·,1,0) ─► q, qn
                  ▲                                                                                         │
                  └──────────────────────────── feedback copy ──────────────────────────────────────────────┘
   clk ─► F2G(clk,1,0) ─► clk' (master), clk (slave)
```

The flip-flop is rising-edge triggered. On the rising edge q takes
`w ? d : q`, sampled as the master closes. `d` and `w` must be stable around
that edge. Testbenches change them on the falling edge. There is no reset pin.
The CLB initialises a flip-flop by forcing `w=1` and `d=state` for one edge.

Simulation note: clock inversion goes through gates, so the master and slave
enables change in the same time step but in different delta cycles. This is
safe as long as nothing that feeds `d` changes at the rising edge. Within the
CLB and the adder, no flip-flop output feeds back into a LUT.

## Look-up tables

A LUT is a multiplexer tree whose data inputs are configuration bits and whose
select inputs are the LUT inputs:

* `rft_lut4`: four MSB 4:1 muxes select by `in[1:0]`, and a fifth selects
  among them by `in[3:2]`. Result: `y = tt[in]`, 5 gates.
* `rft_lut3`: two MSB 4:1 muxes and a Fredkin 2:1 mux, `y = tt[in]`.

`rft_mux4` (one MSB gate, `y = din[sel]`) and `rft_mux2` (one Fredkin gate,
`y = sel ? din1 : din0`) are the building blocks.

## The configurable logic block (`rft_clb`)

```
 f_in[3:0] ─► LUT4 F ─┬──────────────► F ─┐
 g_in[3:0] ─► LUT4 G ─┼──────────────► G ─┤
        h1 ───────────┴─► LUT3 H({h1,G,F}) ─► H

 d1 = S0 ? H : F   ─► FF1 (write enable: VCC or ec; state loaded on rst) ─► q1
 d2 = S1 ? H : G   ─► FF2                                               ─► q2
 f_out = S2 ? q1 : d1        g_out = S3 ? q2 : d2
```

Every selection is an `rft_mux2` (Fredkin gate). A CLB has 48 configuration
bits, defined by `rft_pkg::clb_cfg_t`, from most significant to least
significant:

| field | bits | meaning |
|---|---|---|
| `lut_f` | 16 | truth table of F, bit i = F(f_in == i) |
| `lut_g` | 16 | truth table of G |
| `lut_h` | 8 | truth table of H, index {h1, G, F} |
| `sel` | 4 | S3..S0 as above |
| `state` | 2 | value FF2/FF1 take at a rising edge while `rst`=1 |
| `ec_sel` | 2 | per FF: 1 = write enable from pin `ec`, 0 = always write (VCC) |

The configuration sits in `rft_cfg_chain`, a shift register. While `prog_en`
is 1, each rising `clk` edge shifts `prog_din` in at bit 0. Bit 47 appears on
`prog_dout`, so CLBs can be chained. Send a word MSB first: after 48 clocks
the first bit sent is in bit 47. The chain has no reset. Program it before
use.

## The adder fabric (`rft_adder`, the top)

Each bit i uses two CLBs, wired identically. Both 4-LUTs of both CLBs see
`{0, c[i], b[i], a[i]}`, and `h1` sees `c[i]`.

* the **carry CLB** delivers `c[i+1]` on its `g_out`;
* the **sum CLB** delivers `sum[i]` on `f_out`, and the same value registered
  in FF1 on `sum_q[i]`.

The wiring is fixed. What the CLBs compute comes only from the configuration.
Two working carry configurations (both are used by the testbench):

* carry through the 3-input LUT: F = a·b, G = a⊕b, H = F | (G·h1), S1=1;
* carry directly from a 4-input LUT: G = majority(a,b,c), S1=0.

Sum configuration: F = a⊕b⊕c. Set `ec_sel[0]`=1 to make the registered sum
obey `ec`, and set `state[0]` for the reset value of `sum_q`.

The configuration chain runs `prog_din` → carry CLB 0 → sum CLB 0 → carry
CLB 1 → … → sum CLB N-1 → `prog_dout`. The word for sum CLB N-1 is therefore
sent first. Loading takes 2·N·48 clocks: 12 288 at the default N=128.
`sum`/`cout` are combinational through N carry CLBs. `sum_q` is valid after
the next rising edge.

| parameter | default | note |
|---|---|---|
| `N` | 128 | operand width; the adder was evaluated at 1, 4, 16, 32, 64 and 128 bits |

The ports are `clk, rst, prog_en, prog_din, prog_dout, ec, a[N-1:0], b[N-1:0],
cin, sum[N-1:0], sum_q[N-1:0], cout`.

## Departures and own choices

What follows the original description:

* the gate equations of Feynman and Fredkin;
* the MSH circuit;
* the MSB multiplexer output;
* the one-gate latch and the one-gate 4:1 mux;
* the flip-flop's block structure (Fredkin, F2G, two latches, F2G);
* the CLB's parts (two 4-LUTs, a 3-LUT, selector S0..S3, two flip-flops with
  state and VCC-enable muxes, outputs F, G, Q1, Q2);
* the LUT → flip-flop → 2:1 mux flow;
* an adder with one carry CLB and one sum CLB per bit, rippling.

What is this design's own:

* **MSB outputs S, T, U.** Only the selected output and the pass-through of
  A, B are defined. The controlled-swap routing of the rest is chosen.
* **MSH truth table.** The MSH equations come from its quantum circuit and
  from its use as a latch. A tabulation that shows the gate as the identity
  was not followed.
* **Clock phase.** The master is open while `clk` is low, which makes the
  flip-flop rising-edge triggered.
* **CLB steering.** The exact connections of S0..S3, H's inputs `{h1,G,F}`,
  the meaning of "state" (reset value) and of the VCC muxes (write enable)
  were chosen to fit the block diagram.
* **Programming.** Configuration is one serial chain clocked by `clk` with
  `prog_en`, rather than a separate programming clock.
* **Routing.** The adder wires CLBs directly. Programmable switch matrices and
  I/O blocks are not built.
* **`rft_lut3` insides.** The decomposition into two MSB muxes and one
  Fredkin mux is chosen.
* **Gate counts.** Latch (1), 4:1 mux (1) and 4-LUT (5) match the original
  figures. The flip-flop uses 5 gates (one per block of its diagram) where 4
  were reported. The whole CLB uses 33 where 12 were reported.
* **Not in RTL.** Power, delay and transistor counts at 90/45 nm are
  properties of a transistor-level implementation and are not modelled.

## Simulation

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog. Build and run one
with Verilator 5, for example the full-width adder:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/rft_pkg.sv \
          tb/tb_rft_adder.sv --top-module tb_rft_adder -Mdir obj_adder
./obj_adder/Vtb_rft_adder
```

`-Wno-fatal` is needed. Verilator reports the latch feedback through the MSH
gate as circular logic (UNOPTFLAT) and the latch's non-blocking assignment as
COMBDLY. Both are expected. Tests that use random initial values (two-state
simulation) can add `+verilator+rand+reset+2` at run time. Every state element
is programmed or reset before it is read.

| testbench | what it shows |
|---|---|
| `tb_feynman_gate`, `tb_f2g_gate`, `tb_fredkin_gate` | exhaustive truth tables, parity, one-to-one |
| `tb_msh_gate`, `tb_msb_gate` | exhaustive equations, parity preservation, bijectivity, latch equation |
| `tb_rft_mux2`, `tb_rft_mux4`, `tb_rft_lut3`, `tb_rft_lut4` | exhaustive / random tables |
| `tb_rft_dlatch`, `tb_rft_dlatch_we` | transparency, hold, write enable |
| `tb_rft_msff` | edge capture, hold with w=0, no change between edges, qn |
| `tb_rft_cfg_chain` | W-clock load, pass-through on `prog_dout`, hold |
| `tb_rft_clb` | 40 random configurations against a reference model; H steering, registered outputs, enable hold, reset state |
| `tb_rft_adder` | default N=128: programs 256 CLBs, checks chain length, both carry configurations, full-width ripple, registered sum, hold with ec=0, reset state |
| `tb_rft_adder_widths` | adders of 1, 4, 16, 32 and 64 bits, each programmed and checked |

The full-width test runs in a few seconds. Every testbench also fails
against a deliberately broken copy of its module.

To change the design, edit the gate modules and re-run the gate testbenches
first. Those check reversibility and parity exhaustively, so a gate that
loses either property is caught before it reaches the CLB.
