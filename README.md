# Precharged dual-rail BDD S-box with a two-board SPI link

Power-analysis attacks recover keys because a circuit's current draw depends
on the data it processes: a lookup-table S-box switches a different number of
nodes for each input, and that difference shows up in the supply current.
This design computes the AES S-box in a logic style meant to make the
switching independent of the data:

* **Binary decision diagram (BDD).** Every output bit is a decision tree of
  Shannon-expansion nodes, `F = x·F_x + x'·F_x'`. The tree is complete, so
  every input-to-output path crosses exactly eight nodes.
* **Dual rail.** Every signal travels as a pair, a true rail `out_t` and a
  false rail `out_f`. After a valid evaluation `out_f = ~out_t`, so
  `out_t ^ out_f` is always `8'hFF` and the pair always has Hamming weight 8.
* **Precharge / evaluate.** Before each evaluation, both rails of every input
  and every node are forced to 0 (the "spacer"). Every evaluation then starts
  from the same state. In each bit pair exactly one rail rises, whatever the
  data.

A second board receives the result over a three-wire SPI link (SCLK, SS_N,
MOSI) and shows it on its 16 LEDs. Together the two boards form a small
demonstrator of a protected crypto primitive and a controlled inter-board
transfer.

## How the dual-rail decision tree works

`bdd_node` is one decision node. `(x_t, x_f)` is the dual-rail decision
variable, and `hi` / `lo` are the cofactors for x = 1 and x = 0:

    f_t = x_t & hi_t | x_f & lo_t
    f_f = x_t & hi_f | x_f & lo_f

The node has three input cases:

* Valid input (`x_f = ~x_t`): the node passes one cofactor pair through
  unchanged, so a valid dual-rail pair stays a valid pair.
* Spacer (`x_t = x_f = 0`): both outputs are 0, whatever the cofactors are.
* `x_t = x_f = 1`: this is not a legal code word and never occurs.

`bdd_sbox_dualrail` builds eight trees, one per output bit, of 255 nodes each.
Nodes use heap numbering: node `n` has children `2n` (variable = 0) and
`2n+1` (variable = 1). The root decides on input bit 7 and the level just
above the leaves on bit 0. Leaf `256+i` of the tree for bit `b` is the
constant `S(i)[b]` on the true rail and its complement on the false rail.
No table is stored anywhere. `arcd_pkg::aes_sbox` computes each leaf while
the design is elaborated, as the GF(2^8) inverse modulo `x^8+x^4+x^3+x+1`
(0 maps to 0) followed by the AES affine map with constant `0x63`.

Every evaluation switches the same number of node rails: each of the 2040 nodes
raises exactly one of its two rails, whatever the input byte. The evaluation
time does not depend on the data either. A node settles only after its
selected child has settled, and the leaf-level nodes wait for input bit 0.
So with all input bits arriving together, every output appears after the
same eight node delays.

Because leaves are constants, a synthesis tool will fold the trees into
ordinary logic. The equal-path, one-transition-per-pair property holds for
the RTL structure. Keeping it in a netlist needs the nodes preserved: for
example keep/dont-touch attributes, hand-placed LUTs or custom cells. Doing
that is specific to the target technology and is not part of this RTL.

## Phases and timing of the secure S-box

`secure_sbox` wraps the trees:

* `precharge_ctrl` alternates one **precharge** cycle and one **evaluate**
  cycle, starting with precharge after reset.
* On the clock edge that ends a precharge cycle, `data_in` (single-rail, from
  the switches) is captured.
* In the evaluate cycle the captured byte drives the trees as
  `x_t = d, x_f = ~d`. In a precharge cycle both rails are 0, and the tree
  outputs `live_dr` are 0 as well. An assertion checks the latter.
* On the edge that ends the evaluate cycle, the outputs are stored in `res`,
  `res_valid` pulses, and `dual_rail_checker` records whether
  `out_t ^ out_f == 8'hFF`.
  * `check_pass` shows the result of the last check.
  * `alarm` is sticky until reset.

Timing: one byte is accepted every 2 clock cycles. `res` is valid 2 clock
edges after `data_in` was sampled.

```
clk        _/‾\_/‾\_/‾\_/‾\_/‾\_
phase       PRE  EVAL PRE  EVAL
live_dr     00   S,~S  00  S',~S'
res               ---- S,~S ----
```

## The SPI link

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 100 000 000 | board clock |
| `SCLK_HZ` | 1 000 000 | SPI bit clock, equal to the bit rate |
| `WIDTH` (`SPI_PACKET_BITS`) | 16 | bits per packet |

* **`spi_clk_div`** counts board cycles while the master is busy. It pulses
  `tick` every `HALF = CLK_HZ / (2·SCLK_HZ)` = 50 cycles. It is an enable,
  not a derived clock.
* **`spi_master`** (board A) works as follows:
  * `start` loads the word and pulls SS_N low.
  * SCLK toggles on each tick.
  * The slave samples on rising SCLK, and the master shifts on falling SCLK.
    This is SPI mode 0, MSB first.
  * SS_N stays low for exactly `2·WIDTH·HALF` = 1600 cycles (16 µs), which
    gives 1 Mbit/s.
  * `done` pulses when SS_N returns high.
  * `start` is ignored while `busy` is high.
* **`spi_slave`** (board B) runs on its own clock, so it synchronises SCLK,
  SS_N and MOSI through two flip-flops each.
  * It shifts in a bit on each synchronised rising SCLK edge while SS_N is
    low.
  * After 16 bits it updates `rx_data`, which drives the LEDs, and pulses
    `rx_valid`.
  * If SS_N rises after some but fewer than 16 bits, the partial word is
    dropped and `frame_err` pulses. This happens, for example, when board A
    is reset mid-frame.
  * Each SCLK half period must last at least three slave clock cycles. At the
    defaults it lasts 50.

## Top level: `arcd_top`

Board A has the following inputs and outputs:

* Inputs: `clk_a`, `rst_a_n`, the switch byte `sw` and the `send` request.
* S-box outputs: `sbox_live`, `sbox_res`, `sbox_valid`, `xor_out`,
  `xor_ones`, `check_pass` and `alarm`.
* SPI outputs: `spi_busy`, `spi_done`, and the link wires `spi` (SCLK, SS_N,
  MOSI), which are brought out as they would appear on the header.

While `send` is high, board A sends the held result as the 16-bit packet
`{out_t, out_f}`. Board B has `clk_b` and `rst_b_n`, and shows the packet on
`led_b`. It also drives `rx_valid` and `frame_err`. Inside the top, the link
wires run straight from the master to the slave. All resets are active-low
and synchronous.

## Where this design departs from, or adds to, the original description

* **S-box function.** This RTL implements the standard AES forward S-box.
  The original hardware example reports input `8'b10000001` giving
  `out_t = 8'b11000110`, `out_f = 8'b00111001`. The standard S-box maps
  `0x81` to `0x0C`, so here `out_t = 0x0C` and `out_f = 0xF3`. The original
  mentions a "simplified" BDD over chosen input bits but does not define it.
  Both pairs satisfy the XOR-all-ones property.
* **Tree shape.** A complete tree with MSB-first variable order is this
  design's choice. The original asks for uniform paths but gives no node list
  or variable order.
* **Gate-level nodes.** Each node is written as an AND-OR on each rail, in
  place of the original pull-up/pull-down transistor networks.
* **Choices made where nothing is specified:**
  * one-cycle phases
  * input and result registers
  * the registered pass flag and sticky alarm
  * SPI mode 0, MSB first
  * the start/busy/done handshake
  * the synchronisers and the partial-frame rule
  * the packet contents `{out_t, out_f}`
* **Not built:**
  * a complete AES cipher (rounds, key schedule); only the S-box is
    described
  * the board oscillator, PMOD wiring and LEDs, which are board parts; their
    signals are ports of the top
  * the power-trace leakage analysis, which is offline software

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M` and has a watchdog. S-box expected values
come from `tb_ref_pkg::ref_sbox`, which is written independently of the RTL:
it finds the inverse by exhaustive search and uses the rotate form of the
affine map.

| Testbench | What it covers |
|---|---|
| `tb_bdd_node` | all 64 input combinations |
| `tb_bdd_sbox_dualrail` | all 256 inputs; spacer before each; `out_t`, `out_f` and XOR; every input raises exactly one rail of each of the 2040 nodes |
| `tb_precharge_ctrl` | alternation, strobes, reset mid-sequence |
| `tb_dual_rail_checker` | random good and corrupted pairs; sticky alarm; qualify input |
| `tb_secure_sbox` | all 256 inputs; 2-edge latency; spacer in every precharge cycle |
| `tb_spi_clk_div` | tick spacing of 50 cycles at the defaults; restart |
| `tb_spi_master` | received words; 16 edges per frame; SCLK period 100 cycles; SS_N low 1600 cycles; `start` while busy ignored |
| `tb_spi_slave` | asynchronous bit-banged master; latency ≤ 6 cycles; short frames dropped |
| `tb_arcd_top` | default parameters, unrelated 10 ns / 9.7 ns board clocks; all 256 inputs sent over SPI and checked on the LEDs; frame timing; a board-A reset mid-frame; counts of every mechanism (precharge, evaluate, XOR pass, SCLK edges, transfers, receptions, dropped frame) |

To simulate with Verilator (any testbench name in place of `tb_arcd_top`):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_arcd_top \
  -y rtl -y tb +libext+.sv rtl/arcd_pkg.sv tb/tb_ref_pkg.sv tb/tb_arcd_top.sv
./obj_dir/Vtb_arcd_top
```

`-Wno-fatal` is needed only for the testbenches: their check tasks take wide
arguments, and Verilator warns about the implicit widening. The RTL itself
builds without warnings under default settings. The full end-to-end run at
the default parameters takes a few seconds.

## Files

| File | Contents |
|---|---|
| `rtl/arcd_pkg.sv` | dual-rail byte and SPI link types, defaults, S-box function |
| `rtl/bdd_node.sv` | dual-rail Shannon node |
| `rtl/bdd_sbox_dualrail.sv` | eight 255-node decision trees |
| `rtl/precharge_ctrl.sv` | phase sequencer |
| `rtl/dual_rail_checker.sv` | XOR verification |
| `rtl/secure_sbox.sv` | precharged S-box with capture and check |
| `rtl/spi_clk_div.sv` | SCLK divider |
| `rtl/spi_master.sv` | SPI master |
| `rtl/spi_slave.sv` | SPI slave |
| `rtl/arcd_top.sv` | two-board top |
