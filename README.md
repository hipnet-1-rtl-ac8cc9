# HiPNeT-1: a neuron processor that learns one training pattern per clock

This is synthesizable SystemVerilog for the highly pipelined neural-network
training architecture HiPNeT-1. The hardware trains the output layer of a
speech-recognition network. Each neuron processor takes in one speech frame
per clock cycle and completes one training pattern per cycle: the forward sum,
the sigmoid, the error and the weight updates. That is ten connection updates
per neuron per cycle.

Several properties of this network make that rate affordable:

- **Binary, sparse inputs.** Each speech frame is vector-quantised to one of
  127 codebook features. So an input is one "active feature" address, not a
  vector. The network sees a window of 9 frames, so only 9 of its inputs (plus
  the bias) are on in any pattern. The sum needs no multipliers: it is nine
  weight look-ups and adds. Only addresses are broadcast, never values.
- **Shared weights.** The 9 frames form three groups of three: past, present
  and future. Within a group, the three frames share one weight per feature.
  So a neuron has three weight banks of 127 words, and one synapse unit per
  bank.
- **Serial input stream.** Patterns come from a sliding window over continuous
  speech. Each cycle brings one new frame, and every feature address passes
  through each bank three times. Its weight is read once and reused for the
  three patterns.
- **Simple update rule.** With binary inputs and cross-entropy error,
  `Δw = -α (o_j - d_j)` is the same for every active input of a pattern. The
  learning rate α is a power of two, so the multiplication is a shift.
- **No hidden layer.** Output neurons are independent. A few physical
  processors can be reused over the whole output layer (50–64 phonemes), a
  group at a time.

The precision is 12-bit weights, of which only the top 6 bits enter the
forward sum, and 6-bit neuron outputs.

## The neuron processor

```
                  feature stream (one 7-bit address per cycle)
                         |
                         v
   +-------------+  3 cy  +-------------+  3 cy  +-------------+
   | SU 1  past  |------->| SU 2 present|------->| SU 3 future |
   | bank 128x12 |        | bank 128x12 |        | bank 128x12 |
   +-------------+        +-------------+        +-------------+
      | ps1   ^              | ps2   ^              | ps3   ^
      v       | dw           v       | dw           v       | dw
   +--------------------------------------------------------------+
   | output processor                                             |
   |  (ps1+ps2) , (ps3+bias) -> + -> clamp 6b -> sigmoid/error PLA |
   |  -> e -> e(t)+e(t-1)+e(t-2) -> alpha shift -> dw --> SUs,bias |
   +--------------------------------------------------------------+
```

The neuron is made of the following parts:

- **Synapse unit (`synapse_unit`).** This is one weight bank and its
  datapath.
  - The incoming feature address is registered and reads the bank.
  - The word read goes onto the unit's bus. From there its top 6 bits enter a
    chain of two adders (`sum3_chain`). The chain adds each weight to the two
    weights read before it, giving the bank's *partial sum* of its three
    frames.
  - The full 12-bit weight also enters the *read weight shift register*. The
    address enters the *address shift register*, which also hands the address
    to the next synapse unit after three cycles.
  - When the increment for that feature comes back, the *update adder* adds it
    to the weight leaving the read-weight register. The result is written
    back at the address leaving the address register.
  - So the RAM does one read and one write every cycle, and each address is
    broadcast only once.
- **Output processor (`output_processor`).** It has the following parts:
  - A two-level tree of three adders. It adds the three partial sums and the
    top 6 bits of the bias register.
  - The sigmoid/error PLA (`sigmoid_pla`). It takes the sum, clamped to 6 bits,
  and the desired-output bit.
  - An error register.
  - A second two-adder chain. It adds the errors of the three consecutive
    patterns in which a feature stays in a bank, so each feature needs only
    one write per bank.
  - The α unit (`alpha_shifter`): an arithmetic shift, a sign change and a
    clamp.
  - The bias register, with its own update adder (`bias_unit`).

Counting every adder, a neuron has 15: nine in the synapse units, three in
the tree, two in the error chain and one for the bias. All are busy every
cycle.

`neuron` wires three synapse units to one output processor. It works out
the desired output by comparing the broadcast target class with its own
neuron number. It marks a pattern valid once all nine of its frames were
valid. `hipnet_array`, the top, places `N_NEURONS` (default 4) processors
side by side. They share all broadcast inputs. Processor *k* trains output
neuron `class_base + k`.

## Pipeline timing

Cycle numbers count from the cycle in which a feature is at the first
synapse unit's input. Let `f(i)` be the feature of cycle `i`. Bank *k* (0 =
SU 1) sees `f(i-3k)` at cycle `i`.

| cycle     | what happens to the feature that entered at cycle i                                          |
|-----------|----------------------------------------------------------------------------------------------|
| i         | at the feature input; address registered                                                     |
| i+1       | RAM read (sees every write completed by the end of cycle i)                                  |
| i+2       | weight on the bus; enters the forward chain and the read weight shift register               |
| i+3..i+5  | its 6-bit field is part of that bank's partial sum `ps_out` (three consecutive patterns)     |
| i+9       | update adder: read weight + increment; address from the address shift register               |
| i+10      | write register to RAM (visible to reads from cycle i+11 on)                                  |

The pattern whose newest frame entered at cycle `n` goes through these
stages:

| cycle | stage of pattern n                                                               |
|-------|----------------------------------------------------------------------------------|
| n+3   | partial sums of the three banks reach the first tree level, with the bias        |
| n+5   | PLA, with the desired bit (the target given with `f(n)`, delayed 5 cycles)       |
| n+6   | `o_out`, `err_out`, `o_valid`; error enters the accumulation chain               |
| n+6..n+8 | the error is part of `dw_out`, which the synapse units register              |

So the increment `dw_out(t)` is `clamp(-(e(t-6)+e(t-7)+e(t-8)) >>> α)`. This
is the summed error of exactly the three patterns that contain the feature
whose update is computed at cycle `t+1`. The bias is in every pattern, so it
takes `dw_out` only once every three cycles, which counts each pattern once.
A free-running counter, mod 3 from reset, sets that phase. One pattern is
accepted and one completed every cycle, with no stalls.

The read weight shift register is 7 deep (bus at `i+2` to update at `i+9`).
The address shift register is 9 deep, with a tap at 3 for the next unit.
These depths follow from the register placement above. Changing any pipeline
register means changing `UPD_DELAY`, `RW_DELAY` and `PLA_DELAY` in
`hipnet_pkg` to match.

## Hazards and update forwarding

The pipeline has two read-after-write effects.

1. **Stale reads (accepted).** A weight is read once and reused for three
   patterns. It does not see updates still in the pipeline, which can be up
   to 9 cycles old. Learning tolerates this, and the design does nothing
   about it.
2. **Lost updates.** Suppose the same feature comes again within the 9-cycle
   window between a read and its write-back. Its second update starts from the
   old read weight and overwrites the first. Without forwarding, only the last
   of such a run of updates survives.

Forwarding removes the second effect. It is split in two parts:

- `fwd_match`, one per array. It keeps the addresses of the last `FWD_DEPTH`
  updates and compares each new update address with them. The result is a
  one-hot select of the youngest match, or zero. All neurons see the same
  address stream, so one copy serves every processor. The select is
  broadcast to each bank, delayed 3 cycles per bank like the addresses.
- `fwd_value_sr`, one per synapse unit. It holds the last `FWD_DEPTH` new
  weights of that unit. The select picks one of them as the base of the
  update in place of the stale read weight.

The broadcast input `fwd_en` switches forwarding on or off at run time.

- `FWD_DEPTH = 9` (the default) covers the whole window, so no update is
  lost. The testbenches check that the final weights then equal those of a
  model that applies every update.
- `FWD_DEPTH = 1` is the cheap variant, which compares only with the previous
  update of the same bank. `neuron_tb` runs a second neuron with this
  setting beside the full one and checks it against a model with a one-entry
  window. On that test's random stream (16 codes, one frame in four repeating
  the previous one) it catches about 56% of the hazards. How many it catches
  depends on how often codes repeat in the data.

Forwarding does not change effect 1.

## Number formats

| quantity              | bits | meaning                                                     |
|-----------------------|------|-------------------------------------------------------------|
| weight (RAM, bias)    | 12   | signed, value w/256                                         |
| weight field (forward)| 6    | w[11:6], value /4                                           |
| partial sum / sum     | 8/10 | exact sums of fields, no overflow possible                  |
| PLA input             | 6    | sum clamped to −32..31, value /4 (−8.0..7.75)               |
| output o              | 6    | `min(63, round(64/(1+exp(-x/4))))`, value /64               |
| error e               | 7    | `o − 64·d`, d the desired bit                               |
| increment dw          | 8    | `clamp(−(e+e'+e'') >>> α)`, in weight LSBs                  |

Weight and bias updates saturate at the 12-bit limits. The PLA is the 64-entry
table of the output formula above, written as a `case` statement.

## Host access and ports

The host port is meant for loading and reading weights while the training
stream is idle. An assertion flags any host access while the stream is
active.

- `io_neuron` picks a processor. `io_sel` picks a bank (0–2) or the bias
  (3). `io_addr` gives the word.
- A write (`io_we`) lands two clock edges later.
- A bank read (`io_re`) returns `io_rdata` with `io_rvalid` two cycles later.
- A bias read returns in the same cycle.

The training inputs are:

- `feat_in` and `feat_valid`: one frame per cycle.
- `class_in`: the target of the pattern ending with this frame.
- `class_base`, `alpha` and `fwd_en`.

After a stream ends, hold `feat_valid` low for at least 17 cycles (the third bank sees a feature six cycles after the first) so that
the last updates reach the RAM before reading the weights back.

The outputs per processor are `o_out`, `err_out`, `o_valid` and `dw_out`.
The `upd_*` and `bias_upd` ports show each update write, for test and debug.

To train all 64 output neurons, run the stream once per group of
`N_NEURONS`, stepping `class_base`.

## Files

| file                     | content                                                      |
|--------------------------|--------------------------------------------------------------|
| `rtl/hipnet_pkg.sv`      | widths, types, latencies, saturating add                      |
| `rtl/hipnet_array.sv`    | top: row of neuron processors                                |
| `rtl/neuron.sv`          | one processor: 3 synapse units + output processor           |
| `rtl/synapse_unit.sv`    | weight bank datapath                                         |
| `rtl/weight_ram.sv`      | 128×12 one-read one-write RAM                               |
| `rtl/addr_sr.sv`         | address shift register (taps 3 and 9)                       |
| `rtl/read_weight_sr.sv`  | read weight shift register (7)                              |
| `rtl/sum3_chain.sv`      | two-adder sum of the last three samples                     |
| `rtl/fwd_match.sv`       | shared forwarding address match (one per array)              |
| `rtl/fwd_value_sr.sv`    | per-bank forwarded weight store and select                  |
| `rtl/output_processor.sv`| adder tree, PLA, error chain, α, bias                       |
| `rtl/sigmoid_pla.sv`     | sigmoid/error table                                          |
| `rtl/alpha_shifter.sv`   | learning-constant shift and clamp                           |
| `rtl/bias_unit.sv`       | bias register and update adder                              |
| `tb/hipnet_ref_pkg.sv`   | reference model of a neuron (transaction level)             |
| `tb/*_tb.sv`             | one self-checking testbench per module                      |
| `tb/hipnet_train_tb.sv`  | training workload: 64-neuron output layer in 16 passes      |

## Simulating

Use Verilator 5 with timing support. From the project root, build and run a
testbench like this:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/hipnet_pkg.sv tb/hipnet_ref_pkg.sv tb/hipnet_array_tb.sv \
    --top-module hipnet_array_tb -o sim
./obj_dir/sim
```

Replace `hipnet_array_tb` with any other testbench name. Each testbench ends
with `TB_RESULT checks=N failures=M` and has a watchdog.

- **`hipnet_array_tb`** tests the full default configuration. It runs two
  training streams of 1500 frames through all four processors:
  - It loads every weight and bias through the host port.
  - Every cycle, it compares each processor's `dw_out`, `o_out`, `err_out` and
    `o_valid` with the reference model. So the latency and the
    one-pattern-per-cycle rate are checked exactly.
  - It then reads back all weights and biases.
  - It counts that each mechanism occurred: stream gaps, desired = 1, bias
    updates, forwarding hits, overwrite hazards with forwarding off, weight,
    sum and increment clamps, host transfers, and remapping processors to
    other output neurons.
  - It runs in well under a second.
- **`hipnet_train_tb`** is a training workload. It trains a whole 64-neuron
  output layer on the four processors in 16 passes, one per group of four
  neurons, selected through `class_base`.
  - The stream is made of "phonemes": runs of 3 to 6 frames of one class c.
    Most frames carry the codes 2c and 2c+1, and one frame in five carries a
    random code.
  - Each pass trains for 3 epochs of the same 1200-frame sequence.
  - The hardware is compared with the model every cycle, as above.
  - It also checks that the network learns: the mean |error| falls from
    epoch to epoch. In the last epoch a neuron's mean output on its own class
    must be above its mean output on other patterns. A typical run prints a
    mean |error| of about 4.0, 1.9 and 1.6 output LSBs for the three epochs,
    and a mean output of about 43/64 on the neuron's own class against
    1.3/64 on the rest.
- **`neuron_tb`**, **`synapse_unit_tb`** and **`output_processor_tb`** do the
  same for one level of the hierarchy.
- **The leaf testbenches** check their units exhaustively or with random data
  against closed-form expectations. The sigmoid is checked against `$exp`.

The reference model in `hipnet_ref_pkg` states the timing as index rules on
the whole stream, for example "bank k updates at cycle u the feature it saw at
cycle u−9". It does not copy the RTL's register structure, so it is an
independent check of it.

## Relation to the published architecture, and what is not here

Taken from the architecture:

- the three shared banks with their synapse units and 3-cycle address
  hand-over;
- the read weight and address shift registers;
- the two-adder forward chain and the error accumulation chain;
- the two-level adder tree with a separate bias register and bias adder;
- the sigmoid/error PLA with a desired-output input;
- the shift-based learning constant;
- 12-bit weights with 6 bits in the forward path, and 6-bit outputs;
- 127 features per bank (the RAM is 32×48 bits = 128 words);
- the associative update-forwarding scheme.

This design's own choices:

- all binary points, rounding and clamps;
- register placement and so all latencies;
- the validity rule for patterns at the start of a stream;
- how targets align with the stream;
- updating the bias every third cycle;
- the host port protocol;
- `N_NEURONS = 4`;
- the bias adder is busy one cycle in three, not on every cycle;
- the increment width. The architecture limits an increment to 6 bits. Here
  the 7-bit error of a pattern, shifted by α ≥ 1, gives a per-pattern
  increment within 6 bits. The value sent to the banks is the shifted sum of
  three such errors, so it is 8 bits wide and clamped. α = 0 is allowed too,
  but its steps clamp.

Not included:

- The array controller (a microsequencer with microcode and training-data
  storage) and the host interface behind it. Their roles are known, but no
  instruction set or protocol is. The top exposes the broadcast signals they
  would drive.
- The simpler non-pipelined datapath (one synapse unit with a single
  accumulator and a shared output processor). It is the baseline the
  pipelined design is compared with.
- The SRAM and PLA are modelled as synthesizable arrays and tables, not as
  circuits.
