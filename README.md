# Tree-structured digital neural network

This RTL implements a fixed-function, feed-forward neural network. The weights
are fixed when the design is built, and there is no on-chip learning. The whole
network is pipelined, and there is almost no global control.

- **Neurons are built from pseudo-neurons.** A neuron is split into K small
  processing elements called pseudo-neurons (PNs). Each PN has its own memory
  of PNW words, a multiplier, an adder and an accumulator.
- **PNs form a tree.** A neuron's PNs are connected as a binary-tree-like
  in-tree, not as a chain. Partial sums therefore meet in ceil(log2 K) steps
  rather than K-1.
- **The memory words carry the control.** The only signal broadcast across the
  network is a cyclic address counter. Each memory word holds a weight plus two
  control bits. These bits tell the PN to add a product, to add a partial sum
  from another PN, or to put its sum on its output.

The default build is a 6-input network with 4 hidden neurons and 4 output
neurons. It uses 8-bit weights and 6-word PN memories. A hidden neuron has 2 PNs
and an output neuron has 1 PN. The network takes a new input pattern every 6
clocks, and each result appears 13 clocks after its pattern.

## The pseudo-neuron (`pn`, `pn_memory`)

A PN has a PNW-word memory. The broadcast address `addr` reads it
combinationally. In the original chip this memory is a PLA. Each word is
`{weight[WW-1:0], sel, oe}`:

| word   | sel | oe | action in this step                                    |
|--------|-----|----|--------------------------------------------------------|
| weight | 0   | 0  | `acc += weight * x`, where `x` is the PN's input bus   |
| x      | 1   | 0  | `acc += li`, the linear input from a predecessor PN    |
| y/fire | 0   | 1  | `lo = acc` (the output is enabled), then `acc` clears  |

The three-state output is modelled as an AND gate: `lo` is 0 when the output is
not enabled. The outputs of all predecessors of a PN are OR-ed onto its `li`
line. An assertion in `neuron` checks that at most one predecessor drives that
line in any step.

Numbers are integers:

- Weights are signed, WW bits wide.
- Inputs and activations are unsigned, XW bits wide, and the value 1.0 is
  encoded as 2^(XW-1).
- The accumulator is wide enough that no sum can overflow.

**Threshold.** The threshold sits in the memory of PN1, which has no
predecessor. Its word is an x word. PN1's linear input is wired to the word's
own weight field, scaled by 1.0. The stored value is therefore the *negated*
threshold, and the net input is `sum(w*x) + T*1.0`.

## The tree and its schedule (`nn_pkg`, `neuron`)

This is the part that needs the most care. PN_i feeds PN_j when both of these
hold:

- i = 2^t·s + 2^(t-1)
- j = min(2^t·s + 2^t, K)

Here t runs over 1..ceil(log2 K) and s over 0..max(floor(K/2^t)−1, 0). With
K = 8 this gives the arcs 1→2, 3→4, 5→6, 7→8, 2→4, 6→8 and 4→8. PN8 is the root.

The depth d of a PN is the length of its longest path from a leaf. The root has
depth D = ceil(log2 K). All PNs follow the same local time tau = 0..PNW−1.
The schedule is:

- A PN at depth d outputs its partial sum (a y word) at tau = d.
- The root outputs the net input at tau = D (a fire word), which drives the
  NLF.
- A PN has an x word at each tau equal to the depth of one of its
  predecessors. It adds that predecessor's sum in the same step in which the
  sum is output.
- PN1 has its threshold word at tau = PNW−1.
- All other words hold weights.

The weights of a PN are used in the window that ends at its y step. For
K = 8 and PNW = 6 the result is this table (numbers are input indices):

```
tau   0     1    2    3    4    5
PN1   y     1    2    3    4    theta
PN2   x     y    5    6    7    8
PN3   y     9    10   11   12   13
PN4   x     x    y    14   15   16
PN5   y     17   18   19   20   21
PN6   x     y    22   23   24   25
PN7   y     26   27   28   29   30
PN8   x     x    x    fire 31   32
```

A neuron therefore handles K·(PNW−2) inputs. Two words of every PN are spent:
one on its y or fire word, and on average one on x words and the threshold.

A neuron with N inputs needs K = ceil(N/(PNW−2)) PNs. It takes one pattern
every PNW clocks. It fires PNW + D clocks after the start of a cycle.

`nn_pkg::slot_of` computes the schedule at elaboration. `neuron` uses it to fill
every PN memory from the parameters `W` (weights) and `THETA` (negated
threshold). The tree constrains the memory size: the root needs one word per
predecessor plus its fire word, so PNW ≥ D + 1. `tree_nn` stops elaboration
with an error when PNW is too small.

Two deviations to know:

- For some K, for example K = 7, the arc rule leaves a PN other than the root
  without a successor. Such a PN is connected to the root. Its predecessors'
  depths stay distinct, so the schedule still works.
- In deeper trees some weight slots fall at the start of the next cycle. For
  example, with K = 5 and PNW = 7, PN5 uses tau = 0 and 1 of the following
  cycle. The bus banks described below handle this.

## Layers, buses and synchronisation (`layer`, `input_interface`, `delay_cells`)

All neurons of a layer use the same placement of inputs. PN b of every neuron
therefore reads the same bus b, so a layer needs only K buses however many
neurons it has. All neurons of a layer fire in the same step.

**Input interface.** `input_interface` feeds the first layer:

- The inputs are split into K sets, one set per bus.
- Each set has its own register bank.
- Bank b samples its inputs at the end of step tau = depth(PN_b). That is the
  y step that closes PN_b's previous cycle.
- `synch[b]` is high during that step. Inputs of set b must be stable while
  `synch[b]` is high and may change at any other time. The bank samples on the
  clock edge that ends the pulse.
- In each weight step, the input that the schedule names is put on bus b.
  The bus is 0 at all other steps.

**Delay cells.** `delay_cells` sits between two layers:

- It captures the outputs of layer l−1 in the step in which that layer fires.
- Layer l runs PHASE = D(l−1) steps behind layer l−1. Its local tau = 0 is the
  fire step of layer l−1.
- A second `input_interface` re-times the outputs onto layer l's buses.
- Banks of depth-0 PNs sample the fired values directly. Deeper banks sample
  the captured copy.

With this arrangement every PN sees one pattern's inputs for its whole window,
while the previous layer is already working on the next pattern. An assertion
checks that the previous layer fires exactly at this layer's tau = 0.

## Nonlinear function (`nlf`)

The sigmoid is approximated by S steps:

- The level index is k = clamp(floor(net / 2^B) + (S+1)/2, 0, S). The
  breakpoints are therefore spaced 2^B apart and centred on zero.
- The output is 0 for k = 0, and 1.0 / 2^(S−k) otherwise. Every non-zero
  level is a power of two.
- With S = 1 the function is a threshold at zero.

The default network uses S = 1 in the hidden layer and S = 3 in the output
layer. With XW = 8, the smallest level of a nine-step NLF (1/256) rounds to 0.

## Top level (`tree_nn`) and timing

```
x_in -> input_interface -> K1 buses -> hidden layer -> delay_cells -> K2 buses -> output layer -> y_out
                 ^                         ^                               ^
                 +-------- addr from address_gen (cyclic 0..PNW-1) --------+
```

| parameter          | default      | meaning                                   |
|--------------------|--------------|-------------------------------------------|
| N0, N1, N2         | 6, 4, 4      | inputs, hidden neurons, output neurons    |
| PNW                | 6            | words per PN memory, clocks per pattern   |
| WW, XW             | 8, 8         | weight bits; input and activation bits    |
| S1, B1             | 1, 0         | hidden NLF steps, breakpoint spacing 2^B1 |
| S2, B2             | 3, 12        | output NLF steps, breakpoint spacing 2^B2 |
| W1, T1, W2, T2     | `nn_pkg::DEFAULT_*` | weights and negated thresholds     |

Weight (i, j), for neuron i and input j, is at bits `[(i*N_in + j)*WW +: WW]`.
Threshold i is at `[i*WW +: WW]`. The default weights are example values. To
use a real network, override W1, T1, W2 and T2.

Timing:

- Reset is synchronous and active high.
- Present a pattern on `x_in` from address 0 and hold it until every `synch`
  bit has pulsed, which happens within steps 0..D1.
- The result appears on `y_out` with `out_valid` high
  (PNW + D1) + (PNW + D2) clocks later. With the defaults that is 13 clocks,
  at address 1.
- `y_out` is 0 outside that step.

The design sustains one pattern every PNW clocks.

## Sizes that were checked

| network                        | PNW | PNs per neuron (hidden/output) | latency | throughput |
|--------------------------------|-----|--------------------------------|---------|------------|
| 6-4-4, 8-bit weights (default) | 6   | 2 / 1                          | 13      | 1 per 6    |
| 25-20-1, 12-bit weights        | 11  | 3 / 3 (63 PNs)                 | 26      | 1 per 11   |
| 25-20-1, 12-bit weights        | 7   | 5 / 4 (104 PNs)                | 19      | 1 per 7    |

The 25-20-1 runs use a nine-step hidden NLF and a one-step output NLF.

The 6-4-4 chip that this architecture was demonstrated on reports 44 µs at
250 kHz, which is 11 clocks. The per-layer latency formula PNW + ceil(log2 K),
which this RTL implements, gives 13 clocks. The same formula gives exactly the
reported 19 clocks for the PNW = 7 network. For the PNW = 11 network the report
gives about 24 clocks, where the formula gives 26.

## Departures and open points

- **Control bits.** The word layout `{weight, sel, oe}` follows the column
  order of the published memory format. The accompanying prose lists the two
  bits in the opposite order.
- **Three-state buses.** They are AND/OR logic. They are not real tri-states.
- **Synchronous control.** The clock-gated output enable and the
  edge-triggered clear of the original PN are replaced by fully synchronous
  logic.
- **Unused buses.** A tree PN that only merges partial sums needs no input
  bus. That happens when the root's few weight slots are not needed, for
  example 30 inputs with K = 8 and PNW = 6. The bus is still declared, but it
  carries a constant 0 and synthesis removes it.
- **Design choices of this RTL.** The threshold mechanism, the NLF breakpoints
  and levels, the input and activation width (8 bits, 1.0 = 128) and the
  delay-cell circuit are all choices of this design.
- **Out of scope.** The chip's pad ring and its PLA layout style are not
  modelled. Only two computing layers are supported.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/nn_pkg.sv tb/tb_tree_nn.sv --top-module tb_tree_nn
./obj_dir/Vtb_tree_nn
```

| testbench            | what it checks                                          |
|----------------------|---------------------------------------------------------|
| `tb_tree_nn`         | Default network end to end, against a reference model. Also checks latency and throughput, and counts forwarding, fire, sampling and every NLF level. |
| `tb_workloads`       | The 25-20-1 network with PNW = 11 and PNW = 7.          |
| `tb_neuron`          | The 32-input, 8-PN neuron against the schedule table above, with random values on unused bus steps. |
| `tb_neuron_sizes`    | Trees of 1, 3, 5, 6, 7 and 16 PNs with 4- to 7-word memories, every weight slot used, including weight steps that fall in the next cycle. |
| `tb_layer`           | Three neurons sharing two buses.                        |
| `tb_input_interface` | Sampling steps, synch pulses and the bus schedule.      |
| `tb_delay_cells`     | A 4-PN, 7-word output layer, including the captured-copy path. |
| `tb_pn`              | The PN's per-word behaviour.                            |
| `tb_pn_memory`       | Memory read-back.                                       |
| `tb_nlf`             | The NLF with 1, 3 and 9 steps.                          |
| `tb_address_gen`     | The address counter.                                    |

`tb/nn_run.sv` is a parameterised harness that `tb_workloads` uses. It builds
`tree_nn` at any size, with pseudo-random weights. `tb/neuron_run.sv` does the
same for a single neuron, for `tb_neuron_sizes`.
