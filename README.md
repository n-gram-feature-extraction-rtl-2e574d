# Payload malware detector: byte n-grams and a pipelined Naive Bayes classifier

This design checks each network packet payload and calls it benign or
malware. It works in two steps. First it counts how often each n-gram of a
fixed vocabulary appears in the payload. Then it scores that count vector with
a two-class Naive Bayes model. The model is held as base-2 logarithms in
fixed point, so the classifier needs only multiplies and adds: no
probabilities, no floating point and no divider. The multiply-add work is
spread over 62 parallel processing units in a six-stage pipeline. One payload
is classified in a few cycles after its last byte, so throughput is set
almost entirely by the rate at which bytes arrive.

The overall structure comes from a published FPGA design. That structure is:
an n-gram extractor on the payload, a Naive Bayes inference module with n
parallel processing units (n = 62 being the chosen point), a six-stage
pipeline, and log2 fixed-point model parameters. That source gives no
internals. Everything below that level is this design's own choice, and is
marked as such here and in each file's header: the n-gram length, vocabulary
size, number formats, the content of each pipeline stage and the handshakes.

## The arithmetic

For a payload with feature counts `x[i]` (i = 0 .. F-1) the classifier
computes, for class c in {0 = benign, 1 = malware},

    score[c] = log2 P(c) + sum_i  x[i] * log2 P(feature i | c)

and reports malware when `score[1] > score[0]`. On equal scores it reports
benign. This is multinomial Naive Bayes in the log domain. Taking the
logarithm turns the product of probabilities into a sum and removes the
underflow a product of many small probabilities would cause.

Number formats (own choice, set in `nb_pkg`):

| quantity | format | notes |
|---|---|---|
| n-gram count `x[i]` | unsigned, `COUNT_W` = 8 bits | saturates at 255 |
| `log2 P(...)` | signed, `LL_W` = 16 bits, 10 fraction bits | range -32 .. +32 |
| product | signed, 24 bits | same scaling as the log value |
| class score | signed, `ACC_W` = 32 bits | 248 x 24-bit terms need at most 32 bits |

The model is computed offline. You count n-gram frequencies per class over a
labelled training set, take base-2 logarithms (with the smoothing of your
choice) and round to the 16-bit format: `round(log2(p) * 1024)`. A host then
writes the result through the load ports. Training is not part of the RTL.

## Feature extraction (`ngram_extractor`)

Bytes arrive one per cycle. A shift register keeps the previous
`NGRAM_LEN-1` bytes. Together with the incoming byte they form the current
n-gram, with the earliest byte in the most significant bits. That n-gram is
compared against all `NUM_FEATURES` vocabulary entries in the same cycle.
Each matching entry's counter goes up by one.

- The vocabulary lives in registers. It is loaded with `pat_we`/`pat_addr`/`pat_data`.
  A slot not written since reset never matches. Load it only while no payload is in flight.
- N-grams never span two payloads. A payload of L bytes gives L-NGRAM_LEN+1 n-grams.
- After the byte with `in_last`, the extractor raises `feat_valid` and holds the count vector.
  `in_ready` stays low until the classifier acknowledges with `feat_ready`.
  The counts then clear, and bytes are accepted again on the next cycle.

The cost is one 16-bit comparator and one 8-bit counter per vocabulary entry
(248 of each at the defaults). The parallel compare lets the extractor keep
up with one byte per cycle with no hashing or lookup memory.

## Inference pipeline (`nb_inference`)

The count vector is handled in `NUM_GROUPS = ceil(NUM_FEATURES / N_PU)`
groups of `N_PU` features. At the defaults that is 4 groups of 62. One group
is issued per cycle and passes through six registered stages:

| stage | what happens | where |
|---|---|---|
| 1 read | model memory returns 62 likelihood pairs; the matching 62 counts are registered | `nb_model_mem`, `nb_inference` |
| 2 multiply | each processing unit forms `count * log2 P(f\|c)` for both classes | `nb_pu` (x62) |
| 3 add, lower | lower 3 levels of a 6-level adder tree, one tree per class | `nb_adder_tree` |
| 4 add, upper | upper 3 levels, giving the group sum | `nb_adder_tree` |
| 5 accumulate | class score += group sum; the first group starts from `log2 P(c)` | `nb_inference` |
| 6 compare | `score[1] > score[0]` registered with both scores; `res_valid` pulses | `nb_inference` |

Valid, first-group and last-group flags travel alongside the data. Vectors
can therefore follow each other with no idle cycle: the accumulator of stage
5 reloads from the prior on the first group of the next vector while stage 6
is still reporting the previous one. Lanes of a partly filled last group get
a count of zero. So `NUM_FEATURES` need not be a multiple of `N_PU`.

**Model memory (`nb_model_mem`).** There is one bank per processing unit.
Feature i is stored in bank `i mod N_PU`, row `i div N_PU`, once for each
class. A single read of row g therefore feeds all units. The read is
registered, like a block-RAM output register, and that register is stage 1.
The likelihood arrays are not reset. The two priors are registers cleared by
reset.

**Handshake.** While `feat_valid` is high, the module issues one group per
cycle from `feat_count`, which must stay stable. It raises `feat_ready` in the
cycle it issues the last group.

## Timing

| event | cycle |
|---|---|
| last byte of a payload accepted | L |
| `feat_valid` high, group 0 issued | L+1 |
| last group issued, `feat_ready` | L+NUM_GROUPS |
| next payload's bytes accepted again | L+NUM_GROUPS+1 |
| `res_valid` (1 cycle), `res_malware`, `res_score` | L+NUM_GROUPS+6 |

At the defaults the result comes 10 cycles after the last byte. A payload of B
bytes occupies the input for B + 4 cycles. Extraction of the next payload
overlaps the last five pipeline stages of the current one. The result has no
back-pressure, so a consumer must take it in the cycle `res_valid` is high.

## Top level (`malware_detector`)

The top wires the extractor to the inference module. It brings out four
groups of ports:

- clock and synchronous active-low reset: `clk`, `rst_n`;
- vocabulary load: `pat_we`, `pat_addr`, `pat_data`;
- model load: `ll_we`, `ll_class`, `ll_feat`, `ll_wdata` for likelihoods,
  `prior_we`, `prior_class`, `prior_wdata` for priors;
- payload stream and result: `in_valid`, `in_ready`, `in_data`, `in_last`,
  `res_valid`, `res_malware`, `res_score[2]`.

On an FPGA system-on-chip these load ports would be driven by the on-chip
processor. That processor and its bus are not part of this RTL.

Parameters, with defaults:

| parameter | default | origin |
|---|---|---|
| `N_PU` | 62 | number of parallel processing units of the source design's chosen configuration |
| `NGRAM_LEN` | 2 | own choice (2 or more) |
| `NUM_FEATURES` | 248 | own choice (4 x 62) |
| `COUNT_W` | 8 | own choice |
| `LL_W` | 16 (10 fraction bits) | own choice |
| `ACC_W` | 32 | own choice; must hold the worst-case score |

## How far to trust it, and where it departs

- The source design gives the structure but not the internals. The stage
  split, the multinomial count features, the number formats and the
  stall-on-full hand-off are reasonable choices. They are not a
  reconstruction.
- The Naive Bayes training and the float-to-fixed conversion of the model
  are offline software steps. No RTL is provided for them.
- The extractor stalls the byte stream for `NUM_GROUPS` cycles per payload.
  It has a single count buffer. A second buffer would remove the stall, at
  the cost of another 248 x 8 flip-flops.
- Ties between the class scores go to benign.
- Nothing was checked against the source design's trained model or dataset.
  Classification accuracy therefore depends entirely on the model you load.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against values computed inside the testbench, has a watchdog, and ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_ngram_extractor` | counts against a direct count of the payload, random input gaps, stall while the vector is held, clearing after the acknowledge, saturation (small 4-bit counters), unwritten slots |
| `tb_nb_pu` | products for extreme and random operands, hold with `en` low |
| `tb_nb_adder_tree` | 62-input sums every cycle, extreme values, two-cycle latency |
| `tb_nb_model_mem` | bank/row mapping, partly filled last group, read latency and hold, single-word rewrites, priors |
| `tb_nb_inference` | scores, decision, `feat_ready` timing and the NUM_GROUPS+5 result latency, for back-to-back and spaced vectors; at 248/62 and at 100/31 (partly filled last group) |
| `tb_malware_detector` | the whole detector at default parameters: 60 payloads against a reference count-and-score model, result cycle L+NUM_GROUPS+6; it also requires that stall, counter saturation, overlap of extraction with inference, and both decisions each occur |

Running one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/nb_pkg.sv \
        rtl/ngram_extractor.sv rtl/nb_model_mem.sv rtl/nb_pu.sv \
        rtl/nb_adder_tree.sv rtl/nb_inference.sv rtl/malware_detector.sv \
        tb/tb_malware_detector.sv --top-module tb_malware_detector
    ./obj_dir/Vtb_malware_detector

For `tb_nb_inference`, also add `tb/tb_nb_inference_run.sv`. The full-size
end-to-end test runs in well under a second of simulation time.

## Files

- `rtl/nb_pkg.sv`: shared constants (default sizes, class indices, pipeline depth)
- `rtl/ngram_extractor.sv`: byte n-gram counter
- `rtl/nb_model_mem.sv`: banked log2 model storage
- `rtl/nb_pu.sv`: one processing unit
- `rtl/nb_adder_tree.sv`: two-stage pipelined adder tree
- `rtl/nb_inference.sv`: six-stage inference pipeline
- `rtl/malware_detector.sv`: top level
- `tb/*.sv`: testbenches as listed above
