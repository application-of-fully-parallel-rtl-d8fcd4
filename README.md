# Two-stage pattern matcher with cascaded associative memories

A nearest-match associative memory compares a search word with every stored
reference word at once and reports the closest one. One such search on its own
is brittle: when two reference patterns are alike (an `O` and a `Q`, a `u` and
a `v`), a little noise in the input is enough to pick the wrong one. This
design cascades two fully parallel associative memories to make the decision
more reliable:

1. **Stage 1 (AM1)** holds the main reference data, for example the pixel or
   zone densities of a character. It does not stop at the best match: it
   returns the nearest, then the second nearest, and so on up to the *k*-th
   nearest row, with *k* chosen per search.
2. **Stage 2 (AM2)** holds, in the same row as each reference word, a word of
   additional features of that pattern (for characters: mass, centroid,
   eccentricity, orientation, skewness). Only the *k* rows chosen by stage 1
   are activated in AM2, and AM2's nearest match among them is the final
   winner.

Stage 1 narrows the field with the main data. Stage 2 separates look-alikes
using features that the main data does not show well. The two stages may use
different distance measures.

The RTL is fully digital and synthesizable. The memory this architecture
comes from was a mixed-signal circuit. Its unit comparators were digital. The
distance summation and the winner decision were done with analog currents and
amplifiers. Here those analog parts are replaced by exact binary arithmetic
(see *Where this RTL departs from the mixed-signal original*).

## Default size

| | rows | units per word | bits per unit | stored bits |
|---|---|---|---|---|
| AM1, main reference data | 64 | 16 | 5 | 5120 |
| AM2, feature data | 64 | 16 | 5 | 5120 |

AM1's geometry is that of the reference macro: 64 words of sixteen 5-bit
units. AM2's word size is a choice of this design. It reuses the same macro,
which has room for six or seven 5-bit moment features. Word distances are 14
bits wide: at most 16 x 31² = 15376.

## How one memory finds the k nearest rows (`knn_assoc_mem`)

```
 search data --> sd register --+
                               v
 memory field (R x W x n) --> unit comparators |a-b| (R x W)
                               --> word comparators, sum -> C_i (R)
                               --> winner-take-all over eligible rows -> M_i (one-hot)
                                      ^                                  |
                                      +-- feedback flags ("lost") <------+
                                                                         |
                              priority encoder -> address, output selector -> word
```

* **Storage and comparison are fully parallel.** `am_memory_field` shows every
  stored unit at once. Each unit has a `unit_comparator`, which subtracts and
  takes the absolute value. Each row has a `word_comparator`, which adds the
  row's unit distances into the word distance C_i. With the Euclidean measure
  each unit distance is squared first. The result is the *squared* Euclidean
  distance, which ranks rows the same way. With the Manhattan measure the
  unit distances are added as they are.
* **Winner decision.** `winner_take_all` finds the smallest C_i among the
  eligible rows. It raises exactly one match signal M_i: a 1 for the winner, a
  0 for every loser. On equal distances the lowest-numbered row wins.
* **Feedback makes the search sequential.** `winner_feedback` keeps one flag
  per row. Taking a winner sets that row's flag, and a flagged row is no longer
  eligible. So the next enable returns the next nearest row. Repeated enables
  therefore list the rows in order of increasing distance. When every eligible
  row has been returned, the result says that nothing was found. `load` starts a
  new search: it latches the search data and the measure and clears the flags.
* **Readout.** `priority_encoder` turns the one-hot match signals into the
  winner's row address. `output_selector` reads out the winner's stored word,
  the nearest-match data.
* `row_active` limits the search to some rows. AM1 ties it high. AM2 drives
  it from its activation flags.

Timing: `en` is a one-cycle pulse. On the next cycle `res_valid` pulses, and
`match`, `res_found`, `res_addr`, `res_dist` and `res_data` hold that winner
until the next enable. An enable can be given every cycle. `en` in the same
cycle as `load` is ignored. Distances follow the memory contents
combinationally, so writing during a search changes later winners. Keep
writing and searching apart.

## Linking the stages (`feature_assoc_mem`)

AM2 has a `write_search_mux` in front of its row decoder:

* **Write mode** (`search` low): the external address goes to the decoder and
  a feature word is stored. Winner addresses offered now are ignored.
* **Search mode** (`search` high): the decoder gets each winner address that
  AM1 reports. It sets that row's activation flag and writes nothing. External
  writes are ignored.

The search core behind the multiplexer is the same `knn_assoc_mem`, with
`row_active` taken from the activation flags. It can return one final winner.
It can also, with more enables, return the activated rows sorted by feature
distance. `act_clear` drops all activations.

## The top level (`two_stage_matcher`)

A small controller sequences one two-stage search:

| state | what happens |
|---|---|
| IDLE | Both memories accept writes (`am1_wr_*`, `am2_wr_*`). `start` latches `main_sd` into AM1 and `feat_sd` into AM2, clears AM2's activations and records `k` and `k2` (0 counts as 1). |
| S1_EN / S1_WAIT | One AM1 enable, then its result. Each winner appears on `s1_valid`/`s1_addr`/`s1_dist`/`s1_data` and activates its row in AM2. This repeats *k* times, or until AM1 reports no further row (k > 64). |
| S2_EN / S2_WAIT | AM2 enables, *k2* of them (0 counts as 1), or until AM2 has no activated row left. Each final winner, nearest first, pulses `final_valid` with `final_addr`, `final_dist` (feature distance), `final_data` (AM1's word of that row) and `final_feat` (its feature word). `done` pulses with the last one. If AM2 ran out of rows, `done` comes with `final_found` low. |

`busy` is high from the cycle after `start` until `done`. Each enable costs
two cycles, so `done` rises 2(e1 + e2) - 1 clock edges after the edge that
takes `start`. Here e1 and e2 are the enables given to AM1 and AM2: e1 = k and
e2 = k2, plus one extra enable for a stage that runs out of rows. With
k2 = 1, AM2 gives a single final winner; with a larger k2 the final winners
come sorted. `metric1` and `metric2` choose
each stage's distance measure per search (`am_pkg::metric_e`: Euclidean or
Manhattan). `cand_rows` shows the rows activated in AM2. `feat_rd_row` /
`feat_rd_data` read AM2 at any time.

The controller spends two cycles per first-stage winner: it enables AM1 and
then waits for the result before the next enable. That keeps the sequencing
plain. The memory itself could take an enable every cycle.

## Where this RTL departs from the mixed-signal original

* **Analog datapath replaced by arithmetic.** In the original, a current
  converter turns each unit distance into a current. For the Euclidean measure
  an analog squarer squares it, and the currents add up on the match line. A
  winner line-up amplifier then widens the winner/loser differences, a
  winner-take-all network decides, and inverters with a tuned threshold
  produce the 1/0 match signals. Here the summation is exact binary squaring
  and adding, and the decision is an exact minimum search. The amplifier and
  the current converter have no counterpart. An analog decision can fail on
  nearly equal currents; this one cannot. Exact ties, which an analog circuit
  leaves undefined, go to the lowest row.
* **Timing.** The analog macro needed a few hundred nanoseconds per winner.
  This design returns a winner one clock after each enable. At the top level it
  takes two clocks per winner.
* **Squared distance.** The reported Euclidean distance is squared: a row at
  distance 3 reports 9.
* **Choices of this design.** The original does not specify any of these:
  - the `load`/`en`/`res_valid` handshake;
  - the per-unit write mask, standing in for the column decoder;
  - asynchronous active-low reset of control and result registers;
  - storage cells without reset;
  - AM2's size;
  - the tie rule;
  - k = 0 and k2 = 0 meaning 1;
  - blocking AM2 writes during a search.

* **Feature extraction is outside.** Computing the moment features of an input
  pattern (mass, centroid, eccentricity, orientation, skewness) is software.
  The hardware stores and searches whatever feature words it is given.

## Files

| file | block |
|---|---|
| `rtl/am_pkg.sv` | default sizes, the `metric_e` type, width functions |
| `rtl/two_stage_matcher.sv` | top level: AM1, AM2 and the controller |
| `rtl/knn_assoc_mem.sv` | k-nearest-match associative memory |
| `rtl/feature_assoc_mem.sv` | second-stage memory with write/search multiplexer and row activation |
| `rtl/am_memory_field.sv` | storage array with row decoder and read/write port |
| `rtl/row_decoder.sv` | binary address to one-hot row select |
| `rtl/unit_comparator.sv` | absolute difference of two units |
| `rtl/word_comparator.sv` | sum of (squared) unit distances of a row |
| `rtl/winner_take_all.sv` | smallest distance among eligible rows, one-hot result |
| `rtl/winner_feedback.sv` | per-row flags that exclude earlier winners |
| `rtl/priority_encoder.sv` | match signals to row address |
| `rtl/output_selector.sv` | readout of the winning row's word |
| `rtl/write_search_mux.sv` | address multiplexer in front of AM2's row decoder |

Every module has a testbench `tb/tb_<module>.sv`. Each one checks the module
against values it computes itself, with integer models and sorting, and
prints `TB_RESULT checks=N failures=M`. Two testbenches exercise the whole
design at its default size:

* `tb_two_stage_matcher` runs 84 two-stage searches over six sets of random
  reference data. It checks every first-stage winner, every final winner, the
  activated rows and the cycle count. It counts that each behaviour occurs:
  - several first-stage winners;
  - several sorted final winners;
  - stage 2 running out of activated rows (k2 > k);
  - stage 2 overruling stage 1;
  - stage 1 running out of rows;
  - k = 0;
  - blocked feature writes;
  - equal distances;
  - both measures in both stages.
* `tb_char_recognition` is shaped like a handwriting experiment. It holds 26
  character classes from two reference writers (52 rows), with look-alike
  class pairs. It runs 208 test samples (4 writers x 2 sets x 26 characters)
  with k = 4 and k2 = 1: Euclidean measure on the main data, Manhattan on six
  features.
  Every search is checked against a model. It also prints how many samples the
  single-stage best match and the two-stage winner misclassify. The data are
  synthetic, so those counts show the mechanism at work, not a recognition
  rate.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/am_pkg.sv \
    tb/tb_two_stage_matcher.sv --top-module tb_two_stage_matcher -Mdir obj
./obj/Vtb_two_stage_matcher
```

Swap in any other testbench name. `am_pkg.sv` must come first, because every
module takes its default sizes from it. Each testbench runs in well under a
second.

To change the size, override the top's parameters: `R` rows, `W1`/`N1` for
the main words and `W2`/`N2` for the feature words. The derived widths (`AW`,
`KW`, `DW1`, `DW2`) follow by default. Logic grows with R x W: every unit of
every row has its own comparator and squarer.
