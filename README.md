# Crosstalk-avoiding bus CODEC for wire-bonded off-chip links

A wire-bond package has large self and mutual inductance. When many output
pins switch at once, three problems follow:

- The supply and ground pins bounce.
- A static pin picks up a glitch from its switching neighbours.
- A switching pin slows down when its neighbours switch the same way.

Each of these sets a ceiling on the rate at which the bus can be clocked.
The method used here does not fix the package. It restricts which bit
patterns may follow one another on the pins. A transition that would give
too much bounce, glitch or edge degradation is never sent. Fewer patterns
remain, so each transfer carries fewer data bits. Because the worst-case
noise is bounded, the bus can run much faster. In the published example,
2 data bits on 3 pins at 617 Mb/s per pin beat 3 bits on 3 pins at
222 Mb/s per pin: 1234 Mb/s against 666 Mb/s per segment.

This RTL implements that CODEC for the example bus: segments of five pins,
three segments, coupling considered two pins away. It also includes a
hardware monitor that evaluates the crosstalk rules on the live
transmit pins.

## The bus and its segments

The bus is made of identical segments of `n = 5` pins:

    position   0     1    2    3    4
    pin        VDD   S1   S2   S3   VSS

The default link has `K_SEG = 3` segments, so 15 physical pins carry 9
signals. Physical pin `5j + p` is position `p` of segment `j`. In RTL a
segment's signals are one `sig_t` (`logic [2:0]`) with S1 in bit 2 and S3
in bit 0, so a literal such as `3'b011` reads S1 S2 S3 from left to right.
Supply pins carry no logic and appear on no port.

Each pin's transition in a clock is `v = +1` (rising), `-1` (falling) or
`0` (static). Supply pins are always static. A signal pin couples to the
pins `d = 1` and `d = 2` positions away, with coefficients `k1` and `k2`.
With this reach, every neighbour outside a segment is a supply pin. A
segment's legality therefore depends only on its own three signals, and
each segment gets its own encoder and decoder.

## The eleven constraint equations

For a transition of one segment, the coupling sum seen by signal pin `i` is

    c_i = k1 * (v_{i-1} + v_{i+1}) + k2 * (v_{i-2} + v_{i+2})

There are `3n - 4 = 11` rules, numbered as below. A transition is legal
when none is violated:

| rule | pin | condition for legality |
|------|-----|------------------------|
| 1 | VDD | `L/2 * (number of rising signals) <= Pbnc` |
| 2, 5, 8 | S1, S2, S3 rising | `c_i <= P1` |
| 3, 6, 9 | S1, S2, S3 falling | `c_i >= P-1` |
| 4, 7, 10 | S1, S2, S3 static | `-P0 <= c_i <= P0` |
| 11 | VSS | `L/2 * (number of falling signals) <= Pbnc` |

In the edge rules, neighbours that switch the same way as the pin hurt its
edge and opposite ones help. A rising pin is therefore limited by how much
positive coupling it sees. The factor `L/2` arises because every signal
returns its current through two supply pins of the same kind, one on each
side.

All constants are integers in units of 1 % of VDD:

| constant | aggressive | non-aggressive | origin |
|----------|-----------:|---------------:|--------|
| `P0`, `P1`, `Pbnc` | 5 | 10 | published thresholds (5 % / 10 % of VDD) |
| `P-1` | -5 | -10 | same, mirrored |
| `k1`, `k2` | 4, 2 | 4, 2 | chosen here |
| `L/2` | 4 | 4 | chosen here |

No coupling or inductance values were published. The values chosen here
reproduce, rule number for rule number, the published list of transitions
each threshold set eliminates. The aggressive set eliminates 14 of the 27
vectors and the non-aggressive set eliminates only `111` and `-1-1-1`.
The constraint testbench checks this against the list typed in by hand.

Two points where the published material was not self-consistent:

- The printed edge inequalities have the opposite sense (`c_i >= P1` for
  rising). Taken literally, they cannot produce the published elimination
  list for any positive `k1`, `k2`. The RTL follows the list.
- The non-aggressive list gives all-rising as a VSS violation and
  all-falling as a VDD violation. The RTL reports them the other way round:
  all-rising is a rule 1 (VDD) violation and all-falling is rule 11 (VSS),
  consistent with the definitions of those rules.

## From legal transitions to a codebook

The legal transitions form a graph on the 8 pin states of a segment. For
a stateless code that can send any data sequence at one word per clock,
every pair of codewords must be joined by a legal transition in both
directions. The codebook is therefore a 4-member clique of that graph,
giving 2 data bits on 3 pins, a 33 % pin overhead.

Under the aggressive rules a transition is legal exactly when at most one
pin rises and at most one falls. The 4-cliques are `{000, 001, 010, 100}`
and `{111, 110, 101, 011}`. Both use all 12 non-zero vectors of the graph:
`00±1`, `0±10`, `±100`, `01-1`, `0-11`, `10-1`, `-101`, `1-10`, `-110`.
Under the non-aggressive rules, only `000 <-> 111` is illegal.

`xtalk_pkg::find_codebook()` computes the codebook at elaboration from the
rules. Among all 4-state cliques it takes the one with the smallest bit mask
of member states, and it assigns data words 0..3 to the members in
ascending order:

| word | aggressive | non-aggressive |
|------|------------|----------------|
| 0 | 000 | 000 |
| 1 | 001 | 001 |
| 2 | 010 | 010 |
| 3 | 100 | 011 |

The choice of clique and the word order are this design's. The method only
asks for the largest group of states with the most transitions within it.
If a threshold set admits no 4-member clique, elaboration stops with an
error.

## Modules

| file | role |
|------|------|
| `rtl/xtalk_pkg.sv` | sizes, types, threshold sets, the rule evaluation `rules_violated()`, and the codebook search |
| `rtl/xtalk_constraint_eval.sv` | keeps the previous pin state of a segment and reports the 11-bit mask of violated rules for the present transition |
| `rtl/xtalk_encoder.sv` | 2-bit word to codeword, registered pin output |
| `rtl/xtalk_decoder.sv` | codeword to 2-bit word, registered; `err_o` for a state that is no codeword, with the word held |
| `rtl/xtalk_link.sv` | top: `K_SEG` segments of encoder, monitor and decoder |

Parameters of the top are `K_SEG` (default 3) and `AGGRESSIVE` (default 1,
the 5 % thresholds; 0 selects 10 %). Both sides of a link must use the same
`AGGRESSIVE` setting.

### Timing

- `tx_data_i` is taken on every rising edge. Its codeword is on `tx_sig_o`
  after that edge.
- `rx_sig_i` is sampled on the next edge, and the word appears on
  `rx_data_o` and `rx_err_o`.
- With a zero-delay loop-back (`rx_sig_i = tx_sig_o`) the latency is two
  clocks, at one 2-bit word per segment per clock.
- `viol_o` and `viol_any_o` are combinational for the transition now on
  `tx_sig_o`. An assertion in `xtalk_link` checks that the encoders never
  cause a violation.
- Reset is synchronous and active low. It puts `000` on the pins and clears
  the decoders.

There is no valid/idle signalling: an idle transmitter simply repeats a
word, and a static segment is always legal.

### Not in the RTL

The package interconnect and the output pad drivers are analog and sit
between `tx_sig_o` and `rx_sig_i`. The electrical gain, the higher di/dt and
data rate a given package allows, cannot be shown in logic simulation. The
RTL guarantees only that no forbidden transition reaches the pins.

Only the 3-signal segment (`n = 5`, reach 2) is built. The rule code in
`xtalk_pkg` assumes every neighbour beyond the segment is a supply pin. A
wider segment, or a reach of 3 that couples across segment boundaries,
would need that code generalised and a different codebook search. Codes
for 1 to 8 signal pins, whose overhead has been published, are therefore
not available.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`:

- `tb_xtalk_constraint_eval`: all 64 ordered pin-state pairs in both threshold
  sets. The expected masks come from the published elimination list,
  typed in by hand.
- `tb_xtalk_encoder`: the codewords, 1-clock latency, reset, and legality of
  all 16 word-to-word transitions by a closed-form rule.
- `tb_xtalk_decoder`: all 8 pin states, the error flag, hold-on-error,
  latency and reset.
- `tb_xtalk_link`: the default top, with no parameter overrides. A loop-back
  channel flips single pins now and then. The test walks every word pair
  on every segment, then runs 3000 random cycles. It checks the received
  data and the 2-clock latency, error detection, legality of every pin
  transition, and a silent monitor. It also requires that static,
  single-pin and two-pin transitions, every codeword-to-codeword vector,
  and a detected corruption each occurred.
- `tb_xtalk_link_nonaggr`: the same with `AGGRESSIVE = 0`.

To run one with Verilator:

    verilator --binary --timing --assert -y rtl -y tb rtl/xtalk_pkg.sv \
        tb/tb_xtalk_link.sv --top-module tb_xtalk_link -o sim
    ./obj_dir/sim

Each run takes well under a second.

## Changing it

- Thresholds, coupling coefficients and `L/2` are the `CFG_*` constants in
  `xtalk_pkg`. The encoder, decoder and monitor recompute everything from
  them, but a new threshold set must still admit a 4-state clique.
- The hand-written expectations in the testbenches are tied to the two
  shipped threshold sets, and must be updated with them.
- `K_SEG` may be any positive number of segments.
