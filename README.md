# Low-power and parallel Viterbi decoding, and early stopping for LDPC decoding

This repository holds three hardware designs for decoding error-correction codes. They share one clock and reset and sit side by side under one top module, `ecc_top`.

1. **A trace-back Viterbi decoder that reads its survivor memory less often and needs less of it** (`lpvd`). A usual trace-back decoder traces each stretch of the survivor memory twice: once to find the surviving path, and once more to read out the bits. This design traces each stretch once from its own local best state and stores that path in a small buffer. A second trace later corrects the buffer only until the corrected path joins the stored one. The bits are then read from the buffer, not from the memory. It uses four memory banks of L/2 steps, a memory depth of 2L, and its latency is 3L.
2. **A parallel register-exchange (RE) Viterbi decoder** (`par_vd`). The add-compare-select (ACS) recursion is a feedback loop, so it limits how fast one decoder can run. This design cuts the stream into overlapping blocks and gives alternate blocks to two independent RE decoder units. Each block is decoded with a warm-up stage before it and a tail stage after it. The result is bit-exact continuous decoding.
3. **An early-stopping controller for iterative LDPC decoding** (`ldpc_early_stop` with `ldpc_sign_product`). In each iteration it counts the check nodes whose product of message signs is negative; this count is S_S. From how S_S evolves, the controller spots blocks that will never decode and stops them long before the iteration limit. At high SNR it switches itself off.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). The default parameters are the evaluated configurations: rate-1/2 codes, K = 7 with generators (133,171) octal, L = D = 6K = 42, a 4000-bit (3,6) LDPC code with 2000 check nodes, and a maximum of 100 iterations.

---

## Trellis conventions (shared by both Viterbi decoders)

`vit_pkg` holds the code definition, which is used by the encoder models in the testbenches as well as by the RTL.

* **State.** A state is the last K-1 input bits, oldest in the MSB and newest in the LSB. The decoded bit of a trellis step is therefore the LSB of the state reached at that step.
* **Predecessor.** The predecessor of state `S` through decision bit `d` is `{d, S >> 1}`. The decision bit is the input bit that has just left the encoder's memory. Trace-back applies this rule and nothing else.
* **Generators.** Generators are written in octal as usual (e.g. `16'o133`). Bit K-1 taps the newest input. Code bit 0 of a symbol comes from G0 and bit 1 from G1.
* **Branch metrics** (`vit_bmu`) are hard-decision: the Hamming distance between the received 2-bit symbol and each of the four possible code symbols. These four values are shared by all ACS elements.
* **ACS** (`vit_acs`) adds, compares and selects. Path metrics are 10-bit and are never normalised: they wrap around and are compared by the sign of their difference (`pm_less`). The spread between metrics stays far below 2^9, so this is exact. On a tie the path through decision bit 0 wins.
* **ACS unit** (`vit_acsu`) holds 2^(K-1) ACS elements and the metric registers. It outputs all decision bits and the index of the best state, found by a comparator tree with the lowest index winning ties. Its outputs are registered, one cycle after the symbol.
  * `in_first` restarts the metrics.
  * With `in_known` set, the restart favours state 0: it gets 0 and every other state 128. Without it, all states start equal.

---

## 1. Low-power trace-back decoder (`lpvd`, `pm_smu`, `smu_lifo`)

`lpvd` = `vit_bmu` → `vit_acsu` → `pm_smu`. The first symbol after reset starts in encoder state 0. After that the decoder runs continuously, one symbol per `in_valid`, with no block structure visible at the ports.

### Survivor memory organisation

Time is cut into periods of H = L/2 trellis steps.

* **Banks.** Four banks each hold H steps of 2^(K-1) decision bits, so the memory depth is 4 · L/2 = 2L.
* **Buffers.** Each bank has a buffer of H entries. An entry holds a full (K-1)-bit state of a traced path.

In period *p* four processes run at once, each on a different bank:

| process | bank | what it does |
|---|---|---|
| WR | p | writes the ACSU's decision bits in increasing address order |
| TB (local trace) | p-1 | traces the bank just completed, starting from the best-metric state of its last step, and writes each visited state into that bank's buffer |
| TB Modi | p-3 | traces that bank a second time, continuing from the state where the TB of the following bank stopped one period earlier (that path has already been traced back H steps from a later best state) |
| DC | p (= p-4) | reads the buffer of the bank that is being overwritten, in decreasing address order, and pushes each state's LSB into the LIFO |

### Path merging: the step that saves memory reads

The local trace started from a best state that was only H steps old, so its path may be wrong near its start. TB Modi fixes it like this:

* At each step the state X traced in memory is compared with the state Y stored in the buffer.
* **X ≠ Y:** the buffer entry is overwritten with X, and the memory is read to find the predecessor of X. `modi_read` pulses.
* **X = Y:** the two paths have merged, and every older entry in the buffer is already correct. `merge_hit` pulses, and TB Modi reads nothing more for the rest of the period.

A conventional design reads every decision bit twice: once for the trace and once for decoding. Here the decoding reads come from the small buffer, and the second trace usually stops after a few steps. In the testbenches, single errors are placed so that they mislead the local trace. Even so, TB Modi reads the memory on about 0.5–1 % of the steps.

The path delivered is not always the one a full-length trace would give. The second trace can only correct the H steps of one bank. A path that has not merged by then keeps the rest of the locally traced path. This is the small decoding loss the scheme accepts compared with a conventional trace-back.

### Output order and latency

DC reads backwards in time, so `smu_lifo` reverses each group of H bits. The LIFO is a single H-entry memory with read-before-write. Its address runs up in one period and down in the next, so the bits going in and the bits coming out share the same locations.

Timing:

* The first decoded bit appears 5H + 2 clock cycles after the first symbol is sampled: 5 periods of pipeline plus the ACSU and LIFO registers.
* From then on, one bit is output per symbol, in order.
* Measured from the first write into a bank to the last bit of that bank leaving, the latency is 3L. This matches the 2L memory and 3L latency of the scheme. The testbenches check the first-bit latency exactly.

The pipeline only moves when symbols arrive, so the last 5H + 2 bits of a stream come out only when padding symbols follow it.

### Ports of `lpvd`

| port | dir | meaning |
|---|---|---|
| `in_valid`, `rx[1:0]` | in | one hard-decision code symbol per strobe |
| `out_valid`, `out_bit` | out | decoded bits in order |
| `modi_read` | out | TB Modi read the survivor memory this step |
| `merge_hit` | out | TB Modi found the merge this step |

Parameters: `K`, `G0`, `G1`, `L` (even), and `SMW`. `pm_smu` needs the state width `M = K-1` and `L`.

---

## 2. Parallel register-exchange decoder (`par_vd`)

```
symbols ─► block_demux ─┬► sync_fifo ─► re_vd_unit ─► sync_fifo ─┬► block_mux ─► bits
                        └► sync_fifo ─► re_vd_unit ─► sync_fifo ─┘
```

### Blocks and the overlap

The stream is cut into data blocks of N symbols, which alternate between unit 0 and unit 1. A unit receives three parts:

* **Warm-up:** the L symbols before its data block. After these, the starting metrics no longer matter.
* **Data:** the N symbols of the block itself.
* **Tail:** the D symbols after the block, which lets the survivor paths merge.

The warm-up and tail symbols also belong to the neighbouring blocks, so `block_demux` writes them into both front FIFOs in the same cycle. It accepts a symbol only when every FIFO that needs it has room.

The first block of a stream has no warm-up and starts with state 0 favoured. Every later block restarts with all metrics equal.

### The decoder unit

`re_vd_unit` = `vit_bmu` + `vit_acsu` + `re_smu`.

* `re_smu` keeps one D-bit register per state.
* Every step, each state copies the register of its chosen predecessor and appends its own newest input bit, which is the state's LSB.
* The unit's output is the oldest bit in the register of the best-metric state. The bit for symbol *j* of a block is therefore ready when symbol *j* + D − 1 has been processed.
* The unit counts symbols from the start of each block and emits exactly the N data bits. It discards what the warm-up and tail produce.

`in_ready` follows the rear FIFO's "room for 3" flag. The bits still in the unit's two pipeline registers can then always be written without a ready signal.

### Throughput and latency

One unit needs L+N+D symbol times for N bits, so two units give

  S = 2N / (L + N + D) = 2·256 / 340 ≈ 1.51 times one unit at the same clock.

S approaches 2 as N grows. In this RTL, the units, FIFOs and ports all share one clock and take at most one symbol per cycle. The speed-up is therefore a headroom figure: each unit could run at (L+N+D)/(2N) of the input rate, which is 0.66 for the defaults.

`block_mux` takes N bits from unit 0, then N from unit 1, and so on, so the output is in input order. A bit leaves only after its block's tail has been decoded. To flush the last block of a stream, at least N + D padding symbols must follow it.

### Ports and parameters

Ports:

* Input: valid/ready symbols: `in_valid`, `in_ready`, `in_sym[1:0]`.
* Output: valid/ready bits: `out_valid`, `out_ready`, `out_bit`.
* Status: `unit_busy[1:0]` shows which unit took a symbol.

Parameters: `K`, `G0`, `G1`, `D` = 42, `L` = 42, `N` = 256, and the FIFO depths `FDEPTH`/`RDEPTH` = 16. The design requires N ≥ L + D; an elaboration-time assertion checks this.

Assertions in `par_vd` check that no FIFO is pushed when full.

---

## 3. LDPC early stopping (`ldpc_sign_product`, `ldpc_early_stop`)

### What is measured

In sum-product decoding, each check node c forms S_c, the product of the signs of its incoming messages.

* `ldpc_sign_product` takes P check nodes per cycle, each with WR message sign bits (1 = negative). It outputs S_c as the XOR of the sign bits, and the number of check nodes with S_c = 1. The defaults are P = 8 and WR = 6.
* `ldpc_early_stop` adds these counts over one iteration in a ⌈log2(M+1)⌉-bit accumulator. The total is S_S, the number of unsatisfied sign products. For M = 2000 check nodes the accumulator is 11 bits.

### The stopping rule

The rule is evaluated at each `iter_done`:

1. **After the first iteration: SNR check.** Detection is enabled only if S_S^0 > THR0 (780 by default). A small S_S^0 means high SNR. There, false alarms would cost performance, so detection stays off.
2. **With detection on:** the controller forms Δ = S_S^(k-1) − S_S^k.
   * The first Δ < 0 (S_S rises) sets a sticky *fluctuation* flag.
   * Once the flag is set:
     * 0 < Δ < DTH (slow convergence) increments a counter.
     * Δ ≥ DTH (a real fall) clears the counter.
     * Δ ≤ 0 leaves the counter as it is.
   * When the counter exceeds T, the block is **undecodable** and decoding stops.
3. **Other stops.** Decoding also stops when the decoder reports a valid codeword (`parity_ok` with `iter_done`) or after MAXIT = 100 iterations. The priority is valid codeword first, then undecodable, then iteration limit.

Outputs:

* `stop` and `reason` (`stop_reason_e` in `ldpc_pkg`).
* `ss_last`, the iteration count, and the internal flags, for observation.
* `start` clears everything for a new block.

DTH = 10 and T = 5 are this design's own values; the scheme leaves them to be tuned by simulation. Tuning them to a decoder is the first thing to do before real use. For the 1974-bit (5,10) code, set `THR0 = 440`, `M = 987` and `WR = 10`. `tb/ldpc_1974_tb.sv` runs that configuration.

### What is not here

The message-passing LDPC decoder itself is not part of this RTL. Its parity-check matrix, quantisation and check-node function table would all have to be invented. In `ecc_top`, its message sign bits (`ld_sign`, `ld_sign_valid`), its end-of-iteration strobe and its parity result are top-level inputs.

---

## Top level (`ecc_top`)

Port groups:

* `lp_*`: the trace-back decoder.
* `pv_*`: the parallel decoder.
* `ld_*`: the LDPC stopping logic, with `LDPC_P`, `LDPC_WR` and `LDPC_M` as parameters.

The three designs do not exchange data.

Reset is asynchronous and active-low, and resets all control state. Survivor memories, buffers and FIFOs are not reset. They are always written before they are read, and the testbenches pass with every register started at random values.

---

## Where this design makes its own choices

These points are not fixed by the underlying scheme. They are the ones to revisit when adapting the RTL:

* Hard-decision branch metrics everywhere. Soft-decision inputs would need a wider `vit_bmu` and wider metrics; the rest is unchanged.
* The 10-bit wrap-around path metrics, and lowest-index and branch-0 tie-breaking.
* The buffer stores whole states rather than only decision bits, so TB Modi can compare X and Y directly.
* The LIFO organisation, and the choice to keep a LIFO at all (the buffer could be read upward instead).
* The RE output taken from the best-metric state.
* For the parallel decoder: L = 42 and N = 256, the restart rule for block metrics, the FIFO depths and the valid/ready handshakes.
* For early stopping: DTH = 10, T = 5, P = 8 check nodes per cycle, and reading the pseudo-code's `cnt := 0` as once per block.

---

## Simulating

Every testbench is self-checking. Each one prints `TB_RESULT checks=<n> failures=<n>`, ends with `$finish`, and has a watchdog. They need only Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vit_pkg.sv rtl/ldpc_pkg.sv tb/ecc_top_tb.sv --top-module ecc_top_tb
./obj_dir/Vecc_top_tb
```

Replace `ecc_top_tb` with any other testbench name. The packages are listed first, and `-y` finds the other modules.

| testbench | what it shows |
|---|---|
| `ecc_top_tb` | all three designs at default parameters, end to end: error-corrupted streams decoded bit-exactly by both Viterbi decoders (memory reads, merges, overlap symbols and input stalls counted), and LDPC blocks ending in each of the three stop reasons |
| `lpvd_tb` | K = 7, L = 42 decoder: every bit, first-bit latency 5L/2 + 2, merges, memory-read share |
| `lpvd_code2_tb` | the same checks with K = 9, generators (561,735), L = 54 |
| `pm_smu_tb` | survivor memory at K = 9 fed by the ACS unit |
| `par_vd_tb` | parallel decoder, 12 blocks of N = 256 in two runs separated by a reset: one with random input gaps and output back-pressure, one with continuous input that must be accepted at one symbol per cycle |
| `ldpc_early_stop_tb` | stopping rule against a model, directed and random S_S traces |
| `ldpc_1974_tb` | 1974-bit (5,10) configuration: per-check-node sign bits through `ldpc_sign_product` into the controller |
| others | one per module: `vit_bmu`, `vit_acs`, `vit_acsu`, `smu_lifo`, `re_smu`, `re_vd_unit`, `block_demux`, `sync_fifo`, `block_mux`, `ldpc_sign_product` |

The reference encoders in the testbenches are written independently of `vit_pkg`, as shift registers with tap masks. Each testbench runs in well under a second.
