# Memories built from neuron networks

A neuron network that only propagates forward computes a function and stores
nothing. Feed part of its output back to its input on the next iteration and it
becomes a state machine, so it can store information. This RTL builds a family of
memories on that idea, following the paper "Functional memories constructed of
neural network":

| circuit | what it stores | module |
|---|---|---|
| logic network | nothing; shows that threshold neurons give any binary function | `nn_logic_net` |
| one-bit memory | one bit, with keep/set (a D flip-flop with load enable) | `nn_bit_memory` |
| FIFO | a chain of two-bit first-in first-out stages | `nn_fifo`, `nn_fifo2` |
| addressed memory | words of one-bit memories, selected by a label (address) | `nn_addressed_memory` |
| vector register | two 8-bit words of an analogue stream, read oldest first | `nn_vector_register`, `nn_vreg_slice`, `adc_model`, `dac_model` |

`nn_memories_top` places all five side by side. They share only `clk` and
`rst_n`. The paper treats them as separate examples, not as one machine. In
every circuit, one network iteration takes one clock cycle.

## The neuron

`threshold_neuron` outputs 1 when `sum(w[i]*x[i]) >= theta`. The inputs are
binary, and the weights and threshold are small signed integers given as ports.
Every network in this RTL is built from three settings of it:

* **OR**: all weights 1, `theta = 1`.
* **AND** of n inputs: all weights 1, `theta = n`.
* **Negated input**: that input's weight is -1, and `theta` drops by one.

The paper's networks are multi-layer perceptrons trained by back-propagation,
with their output digitised after every step. It does not print their weights.
The hard-threshold neurons here have hand-set weights, and give the same digital
behaviour.

## Logic network (`nn_logic_net`)

The network has two layers:

* Layer 1 is `N_TERMS` OR neurons over the inputs `x`. Each input can be left out
  (`lit_use`), used plain, or used negated (`lit_neg`).
* Layer 2 is one AND neuron over the OR neurons enabled by `term_en`.

The result is a product of sums. To set up a function F, enable one OR neuron
for each input pattern m where F(m) = 0. In that neuron, negate the inputs that
are 1 in m. With the defaults (two inputs, four OR neurons), all 16 functions of
two inputs can be set up. The paper's text describes the same idea as a sum of
products, but its drawing shows OR units feeding an AND unit. This RTL follows
the drawing.

## One-bit memory (`nn_bit_memory`)

The network maps (stored bit `Z`, data `D`, operator `id`) to (`Q`, next `Z`):

| id | next Z | Q |
|---|---|---|
| 0 (keep) | Z | Z |
| 1 (set) | D | D |

`nn_select` computes this with three neurons: `OR(AND(Z, not id), AND(D, id))`.
A flip-flop closes the loop. `q` is combinational, and it equals the value that
`z` takes at the next edge.

## FIFO (`nn_fifo2`, `nn_fifo`)

A two-bit stage (`nn_fifo2`) has two feedback loops, `Z{0}` on the input side
and `Z{1}` on the output side:

* With `id = 1`, D moves into `Z{0}` and `Z{0}` moves into `Z{1}`.
* `Q` is always `Z{1}`, the bit that leaves on the next shift.
* `id_next` repeats `id`.

Stages are chained into a longer FIFO. Stage k takes `Q` and `id_next` of stage
k-1 as its `D` and `id`. One shift request therefore moves every bit by one place.
`nn_fifo` builds `DEPTH/2` stages. The default of 4 is the paper's example: a
four-bit FIFO made of two two-bit stages. The result is a fixed-length shift
queue. A bit written with `id = 1` shows on `q` after `DEPTH` shifts. There are
no full or empty flags.

## Addressed memory (`nn_addressed_memory`)

`WORDS x WIDTH` one-bit memories. On a write, the cells of word `addr` get
`id = set` and all others keep their value. `rdata` is the word at `addr`, read
asynchronously. The paper only gives the idea: many bit memories told apart by a
label. The decoder, the read multiplexer and the 8 x 8 size are this design's
own choices.

## Vector register (`nn_vreg_slice`, `nn_vector_register`)

This is the most involved circuit. In the paper, a single network does the work
of an up/down counter, a FIFO and the request logic. Each bit of the word has
its own copy of that network, called a bank. `nn_vreg_slice` is one bank. Its
state is:

* the words `M0 .. M(DEPTH-1)`, one bit each, with M0 the newest;
* the write counter `wc`, the number of words stored;
* the read counter `rc`, the number of words already read.

One iteration does the following:

| inputs | effect |
|---|---|
| `rs = RS_ALL` (1) | "initial reset": `wc = rc = 0`; every word becomes the meaningless value |
| `rs = RS_RC` (2) | "read-counter reset": `rc = 0`; nothing else changes |
| `w`, and `wc < DEPTH` | `M0 <= D`, `M(k) <= M(k-1)` (the words shift), `wc += 1` |
| `r`, and `rc < wc` | `Q = M[wc-1-rc]`, the oldest word not yet read; `rc += 1` |

With `DEPTH = 2`, the sequence runs like this:

1. write1 puts D in M0.
2. write2 moves M0 to M1 and puts the new D in M0.
3. The first read returns M1 and the second returns M0.
4. A read-counter reset lets the same two words be read again.

Words are not removed when they are read. The reset code `rs` takes three
values; in the paper's network they are scaled to 0, 0.5 and 1. Here it is the
two-bit enum `nn_mem_pkg::rs_e`.

**The meaningless value.** The paper gives outputs and unused words a value of
one half. After conversion that value reads as 255/256, so it is a 1 in every
bit. This RTL therefore fills the words with ones on initial reset. `q` is all
ones whenever nothing is read. `q_valid` (this design's addition) marks a real
read.

**Cases the paper does not define.** This design handles them as follows:

* A write to a full register is ignored.
* A read with `rc >= wc` is ignored.
* `rs` overrides `w` and `r`.
* `w` and `r` may be asserted together. The read sees the words from before the
  shift. This keeps the oldest-first order, because `wc` rises together with the
  shift.
* `rst_n` acts like `rs = RS_ALL`.

`nn_vector_register` has `BANKS` slices that all see the same `w`, `r` and `rs`.
Slice i stores bit i of the word. The slices' counters are therefore always
equal, and bank 0's are brought out.

**Converters.** `adc_model` and `dac_model` are behavioural models. They are not
synthesizable and stand for the analogue converters.

* The ADC rounds `ain * 256` to the nearest value, limited to 0..255.
* The DAC outputs `code / 256`.

Together they reproduce the paper's test. Written samples 0.888889 and 0.777778
read back as 0.890625 (code 228 = `11100100`) and 0.777344 (code 199). A cycle
with no read gives 0.996094.

## Top level (`nn_memories_top`)

Each circuit has its own ports, with a prefix per circuit:

* `ln_`: logic network
* `bm_`: one-bit memory
* `ff_`: FIFO
* `am_`: addressed memory
* `vr_`: vector register

`vr_d_analog` and `vr_q_analog` are `real`. The top also exports:

* `vr_d_code` and `vr_q_code`, the converted codes;
* `vr_q_valid`;
* `vr_wc` and `vr_rc`.

Default parameters are as follows. All except `AM_WORDS` and `AM_WIDTH` are the
paper's own values.

| parameter | default |
|---|---|
| `LN_IN` | 2 |
| `LN_TERMS` | 4 |
| `FIFO_DEPTH` | 4 |
| `AM_WORDS` | 8 |
| `AM_WIDTH` | 8 |
| `VR_BANKS` | 8 |
| `VR_DEPTH` | 2 |

## Timing

* All state changes on the rising edge of `clk`.
* `rst_n` is an asynchronous, active-low reset.
* The outputs of every circuit (`q`, `Q`, `rdata`, `y`) are combinational from
  the inputs and the current state. A read therefore returns its word in the
  same cycle that `r` is asserted.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a watchdog. Example for the whole design:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/nn_mem_pkg.sv tb/tb_nn_memories_top.sv --top-module tb_nn_memories_top
    ./obj_dir/Vtb_nn_memories_top

Each module `X` has a testbench `tb/tb_X.sv`. The blocks are checked against
reference models inside their testbenches, as follows:

* Every function of two inputs is checked in the logic network.
* The one-bit memory, the FIFOs and the addressed memory get random streams,
  checked against a reference model.
* `tb_nn_vreg_slice` walks through the vector register's truth table row by row,
  then runs random requests against a queue model.
* `tb_nn_memories_top` runs the top at its default sizes:
  * It replays the paper's eight-step analogue test and checks each Q value to
    six decimals, along with the stored bit patterns.
  * It then forces a full write, a read past the stored words, and a write and
    read in the same cycle.
  * It counts every mechanism and fails if any of them never happened.

## Where this design departs from, or adds to, the paper

* **Neurons**: hand-set threshold neurons replace the trained analogue
  perceptrons. The vector register's network is written as the logic function of
  its truth table, not as neurons.
* **Logic network**: follows the OR-then-AND drawing, not the text's sum of
  products.
* **FIFO stage**: on a shift, D enters `Z{0}` and `Z{0}` moves to `Z{1}`. This is
  the reading under which the stage takes in its data.
* **Vector register read order**: the oldest word is read first, and the
  numbers of the paper's test agree with this. One sentence of its explanation
  names the words the other way round.
* **Resets**: `rst_n` and `q_valid` are additions.
* **Sizes**: the addressed memory's size is this design's own.
* **Not built**: the paper also names a first-in last-out memory and an
  associative memory, but gives no function for either.
