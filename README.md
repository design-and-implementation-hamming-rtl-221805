# Hamming network: a one-bit NAND circuit and a word-level classifier

A Hamming network decides which of several stored binary prototypes is
closest to an input pattern. It has two layers:

* a **feed-forward layer** that scores every prototype against the pattern
  (weights times pattern, plus a bias, passed through a linear transfer);
* a **recurrent layer** that lets the scores compete. On every update each
  neuron keeps its own value and subtracts a small fraction `eps` of all
  the others. Negative results are clipped to zero (positive-linear
  transfer). The loop repeats until at most one neuron is still above
  zero, and that neuron names the closest prototype.

This RTL builds two versions of that network:

1. **`hnn_gate_net`**, a one-bit circuit of eleven NAND gates meant for a
   small FPGA board. Nine slide switches give two pattern bits, five
   weights and two biases. Two LEDs show the feed-forward output `a1` and
   the network output `F`. The output `F` feeds back into the recurrent
   layer. This is the circuit of the original design, gate for gate.
2. **`hnn_word_net`**, the same two-layer structure at word level. It
   stores `S` prototypes of `R` bits and reports the winner after a
   competition that takes several clock cycles. The original design
   describes this general form (the weight matrices, the `1` / `-eps`
   recurrent weights, the stop rule) but does not build it. Its sizes,
   number format and handshake are this RTL's own choices.

`hnn_top` places the two side by side. They share only the clock and
the reset.

## The one-bit gate network

### Feed-forward layer (`hnn_ffl`)

Four NAND gates:

```
a1 = NAND( NAND( NAND(P1,W11), NAND(P2,W12) ), b1 )
   = ~( b1 & ((P1 & W11) | (P2 & W12)) )
```

The bias `b1` works as an enable. With `b1 = 0`, `a1` is 1 whatever the
pattern is. With `b1 = 1`, `a1` drops to 0 as soon as any pattern bit
meets a set weight.

### Recurrent layer (`hnn_rcl`)

Seven NAND gates. First the layer merges its two inputs into a shared term
`s = NAND(a1, a2)`. It then gates `s` with each of the three weights and
combines the branches:

```
g3 = NAND( NAND(s,W21), NAND(s,W22) )     = s & (W21 | W22)
g5 = NAND( g3, NAND(s,W23) )
F  = NAND( g5, b2 )
   = ~b2 | ( ~(a1 & a2) & (W21 | W22) & ~W23 )
```

Like `b1`, the bias `b2` forces the output to 1 when it is 0.

### The feedback loop: the part to understand

`F` returns to the layer's `a2` input. In the original circuit this
return path is a plain wire, which makes a combinational loop. Here it
goes through a flip-flop (`hnn_delay`) that reset clears to 0, the
original's initial value for `a2`. The loop therefore becomes a defined
recurrence with one update per clock:

```
a2(0) = 0,   a2(t+1) = F(t)
```

Working through the equation gives three cases:

* `b2 = 0`: `F = 1` permanently. `a2` becomes 1 after one clock and
  stays there.
* `b2 = 1` and `a1 = 0`: the shared term is 1, so
  `F = (W21 | W22) & ~W23`. This is a constant, and the loop settles
  after one clock.
* `b2 = 1`, `a1 = 1` and `(W21 | W22) & ~W23 = 1`: now `F = ~a2`. The
  loop has no fixed point, so `F` toggles at half the clock rate. With
  the original wire loop, this setting would oscillate at a rate set by
  the gate delays.

Out of the 512 switch settings, 75 toggle and 437 settle.

### Switches and LEDs

`hnn_top` takes the switches as one 9-bit word. Bit `i` is switch `SWi`.
Inside, the word is cast onto the packed struct `hnn_pkg::hnn_sw_t`.

| bit | 0  | 1  | 2  | 3   | 4  | 5   | 6   | 7   | 8   |
|-----|----|----|----|-----|----|-----|-----|-----|-----|
| sig | b1 | b2 | P1 | W11 | P2 | W12 | W21 | W22 | W23 |

`ledr[1]` is `a1` and `ledr[0]` is `F`. The board pin names belong in
the FPGA constraint file and are not part of this RTL.

### The board experiment

The original was tested with eight input rows under four bias settings:

| row | P1 P2 | W11 W12 | W21 W22 W23 |
|-----|-------|---------|-------------|
| 1   | 0 0   | 0 0     | 0 0 0       |
| 2   | 0 1   | 0 1     | 1 0 0       |
| 3   | 1 0   | 1 0     | 0 1 0       |
| 4   | 1 1   | 1 1     | 1 1 0       |
| 5–8 | as rows 1–4 | as rows 1–4 | as rows 1–4, with W23 = 1 |

Each result below is an 8-bit word with row 1 in the rightmost bit.
The "published" columns are the original design's recorded results.
The "this RTL" columns are the values right after reset.

| b1 b2 | published a1 | this RTL a1 | published F | this RTL F |
|-------|--------------|-------------|-------------|------------|
| 0 0   | 11111111     | 11111111    | 11111111    | 11111111   |
| 1 0   | 00010001     | 00010001    | 11111111    | 11111111   |
| 0 1   | 11111111     | 11111111    | 00111111    | 00001110   |
| 1 1   | 00010001     | 00010001    | 00000000    | 00001110   |

`a1` agrees in every case. `F` agrees whenever `b2 = 0`. For `b2 = 1`,
the published `F` words follow from neither the gate equation nor any
initial value of `a2`. This RTL keeps the gate equation, which the
original defines both as source code and as a synthesized schematic. Its
testbenches check the published words only where the equation can
reproduce them.

## The word-level network

### Feed-forward scores (`hnn_ff_layer`)

Neuron `i` holds prototype `proto[i]` as its weight row. Bits are read
as bipolar values, so a 0 counts as −1 and a 1 as +1. The bias is `R`.
The linear transfer passes the sum through unchanged:

```
a1[i] = sum_j (+1 if p[j] == proto[i][j] else -1) + R
      = 2 * (R - HammingDistance(p, proto[i]))      in 0 .. 2R
```

The bipolar reading and the bias of `R` are this design's choices. They
make every score non-negative, as the competition below needs.

### Competition (`hnn_rc_layer`)

On `start`, the layer loads `a2 = a1`, scaled to fixed point with `FRAC`
fraction bits. It then makes one update per clock:

```
a2[i] <= max(0, a2[i] - ((sum_k a2[k] - a2[i]) >>> EPS_SHIFT))
```

This is the recurrent weight matrix with `1` on the diagonal and
`-eps` elsewhere, where `eps = 2^-EPS_SHIFT`. The update shrinks the
gap between the largest neuron and the rest by a factor of about
`(1 + eps)` per step. For the largest neuron to survive, `eps` must stay
below `1/S`; an elaboration check enforces this. The default of 1/4
suits `S = 3`.

The layer stops as soon as at most one neuron is non-zero:

* **One neuron left:** `valid = 1` and `winner` is its index.
* **All scores zero** (every prototype differs from the pattern in
  every bit): the layer stops at once with `valid = 0`.
* **Tie for the largest score:** symmetric updates can never separate
  the tied neurons, so the stop rule alone would never end. After
  `MAX_ITER` updates the layer gives up with `valid = 0`.

Timing: `done` pulses for one cycle `iters + 2` clocks after `start`.
One clock loads the scores, one clock is spent per update, and one clock
tests the stop rule. At the default size a unique winner needs at most
3 updates, and a tie takes the full `MAX_ITER` (64). `busy` is high from
the clock after `start` until `done`. A `start` that arrives while
`busy` is high is ignored. Two assertions in `hnn_rc_layer` check that
`done` is a single pulse and that a valid result leaves exactly one
neuron standing.

## Files

| file | contents |
|------|----------|
| `rtl/hnn_pkg.sv` | switch struct `hnn_sw_t`, controller state enum, `poslin` function |
| `rtl/hnn_ffl.sv` | one-bit feed-forward layer (4 NANDs) |
| `rtl/hnn_rcl.sv` | one-bit recurrent layer (7 NANDs) |
| `rtl/hnn_delay.sv` | feedback flip-flop, reset value 0, load enable |
| `rtl/hnn_gate_net.sv` | one-bit network: FFL → RCL, F fed back through the delay |
| `rtl/hnn_ff_layer.sv` | word-level scores, `R`-bit patterns, `S` prototypes |
| `rtl/hnn_rc_layer.sv` | word-level competition and its controller |
| `rtl/hnn_word_net.sv` | word-level classifier (scores + competition) |
| `rtl/hnn_top.sv` | both networks side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters of `hnn_top` (and of `hnn_word_net`): `R = 2` (pattern
bits), `S = 3` (prototypes), `FRAC = 6`, `EPS_SHIFT = 2`,
`MAX_ITER = 64`. `R = 2` matches the two pattern inputs of the original
circuit. `S = 3` matches the three weights of its recurrent layer. The
rest are this design's choices. The one-bit network has no parameters.

## Verification

Every testbench compares the design with values it computes on its own.
Each one ends with `TB_RESULT checks=N failures=M`.

* `tb_hnn_ffl`, `tb_hnn_rcl`: all input combinations, plus the published
  result words for `a1` and, with `b2 = 0`, for `F`.
* `tb_hnn_delay`: reset value, load, hold, and asynchronous reset.
* `tb_hnn_gate_net`: the 32 cases of the board experiment. Each runs for
  eight clocks against a reference model of the loop, and the test
  checks that both settling and toggling occur.
* `tb_hnn_ff_layer`: every case at the default size, plus random cases at
  `R = 7, S = 4`.
* `tb_hnn_rc_layer`: all 125 score triples from 0–4. The test checks the
  winner or tie result, the number of updates, the exact final state and
  the latency of `iters + 2` clocks.
* `tb_hnn_word_net`: all 256 combinations of pattern and prototypes,
  checked against a direct count of differing bits.
* `tb_hnn_top`: end to end, at the default parameters. It covers all 512
  switch settings of the one-bit network and all 256 cases of the
  word-level one. It counts how often each behaviour occurs: `b1`
  masking, `b2` masking, loop settling, loop toggling, a single winner,
  a multi-step competition, a tie, and all scores zero. It fails if any
  of these never occurs.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/hnn_pkg.sv tb/tb_hnn_top.sv --top-module tb_hnn_top
./obj_dir/Vtb_hnn_top
```

Swap in any other `tb_*` name to run a different testbench. Every run
takes well under a second.

## How far this follows the original

Taken from the original:

* the NAND structure of both one-bit layers;
* the connection of the layers, with `F` fed back into `a2` and `a2`
  starting at 0;
* the switch and LED assignment;
* for the word-level network, the layer structure, the `1` / `-eps`
  recurrent weights, the bound `0 < eps < 1/S`, the positive-linear
  transfer and the stop rule.

Where this RTL departs or adds:

* The feedback goes through a clocked flip-flop instead of a wire, so
  `F` updates once per clock. The gate network therefore needs a clock
  and a reset, which the original circuit does not have.
* The published `F` results for `b2 = 1` are not reproduced (see the
  board-experiment table above).
* The original names two transfer functions for the feed-forward layer:
  linear in its text and hard-limit in its block diagram. This design
  uses the linear one.
* The original gives one of its block diagrams `a2(0) = a1`, but its
  one-bit circuit starts from `a2 = 0`. The word-level competition uses
  `a2(0) = a1`, the standard form; the one-bit circuit uses 0.
* All word-level sizes and encodings are this design's choices: the
  bipolar reading, the bias of `R`, fixed point with `FRAC` fraction
  bits, `eps` as a power of two, the `MAX_ITER` limit for ties, and the
  start/busy/done handshake.
