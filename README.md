# 4x4 MIMO CDMA receiver

This is the digital baseband of a receiver for a CDMA link that sends over four transmit antennas and receives on four. Each transmit antenna carries its own stream. On that stream, every user's symbols are spread with the user's Walsh code, a per-antenna pilot is added, and the sum is scrambled with a per-antenna scrambling code. The channel mixes the four streams and smears each chip over several chip periods.

The receiver undoes this in three stages:

1. **Adaptive chip equalization** turns the received chips back into one chip stream per transmit antenna, then despreads it into data and pilot symbols.
2. **Sphere decoding** resolves what the equalizers leave of the cross-coupling between antennas. It gives a soft value (a log-likelihood ratio, LLR) for every coded bit.
3. **Turbo decoding** corrects the remaining bit errors.

The modulation can be switched between QPSK and 16QAM at run time.

Everything is synthesizable SystemVerilog in `rtl/`, one module per file. Shared types and constants are in `rtl/mimo_pkg.sv`. Every block has a self-checking testbench in `tb/`.

```
chips[4] -> input_buffer -> equalization (4 x equalizer) --data symbols--> sphere_decoder -> serializer -> turbo_decoder -> bits
                                         \--pilot symbols--> flat_channel_est --H--/
```

The top module is `mimo_receiver` (`rtl/mimo_receiver.sv`).

## Number formats and conventions

All of these are in `mimo_pkg`:

| item | format |
|---|---|
| received chip | complex 8+8 bit (`chip_t`) |
| symbol | complex 16+16 bit with 6 fractional bits: a constellation level of 1 is 64 (`sym_t`) |
| constellation levels | ±1, ±3 for 16QAM; ±1 for QPSK |
| FIR coefficient | 16+16 bit with 10 fractional bits |
| accumulator | 32 bit |
| LLR | 8 bit, saturated to ±127, ln P(b=0)/P(b=1): positive means 0 |

## Adaptive chip equalization

`equalization` holds four `equalizer`s, one per transmit antenna k. Each one has:

- Four 16-tap complex FIR filters (`fir_filter`), one per receive antenna. Their outputs are summed and scaled by 2^-10.
- A code generator (`cspilot_gen`), described in the next subsection.
- A despreader (`despreader`) that removes the scrambling code and sums 16 chips. The user's Walsh code gives a data symbol and the pilot code gives a pilot symbol, both scaled by 1/(2·SF).

The generator runs `DELAY` = 8 chips behind the input. The equalizer therefore estimates the chip sent 8 chips earlier. This lets it use taps on both sides of the main path.

### Code generator

`cspilot_gen` produces the scrambling code and the pilot and Walsh signs:

- **Scrambling code:** a 15-bit LFSR with polynomial x^15 + x^14 + 1. The I sign is bit 14 and the Q sign is bit 7. The four antennas start from seeds 0x0001, 0x1234, 0x2A5B and 0x4F0D.
- **Pilot:** the all-ones Walsh code, with a 4-symbol Hadamard sign pattern. Antenna k, pilot symbol m has sign parity(k & m), so the four antennas' pilots are orthogonal over 4 symbols.
- **Data:** the user's Walsh code (`user_code`, 0..15) has sign parity(code & chip index).

### Coefficient adaptation

Adaptation is correlation-based NLMS. It works in periods of `PERIOD` = 256 chips:

- **Input correlation** (`input_correlator`): for every receive antenna m and tap d, it accumulates R[m][d], the correlation between the delayed input chip and the known pilot+scrambling sequence (called C-SS in the code). At the end of the period the 64 results go to `correlation_storage`.
- **Output correlation** (`output_correlator`): it correlates the filter output z with the same sequence.
- **Error** (`nlms_error`): e = A − z, where A = 2·64·PERIOD is the value a perfectly equalized pilot would give.
- **Update** (`coeff_update`): each coefficient steps as w[m][d] += (e·conj(R[m][d])) >>> `mu_shift`.

Because z ≈ Σ w·R, this is a gradient step on |A − z|^2. The step size is a run-time power of two; it stands in for the normalisation of NLMS. The update sweeps the 64 coefficients serially, one per cycle, with a single complex multiply. The filters keep running during the sweep.

At reset, each equalizer starts as a pure delay. Coefficient `INIT_VAL` sits on tap `DELAY` of receive antenna k.

### Flat channel estimate

After equalization, a 4x4 matrix H remains between sent and equalized symbols. It comes from imperfect equalization and leakage between antennas. `flat_channel_est` estimates it from the despread pilot symbols:

    H[k][j] = 1/4 · Σ_{m=0..3} q_k(m) · p_j(m)

- q_k(m) is the pilot symbol of equalizer k.
- p_j(m) is the ±1 Hadamard sign of antenna j.

A new H is available every four pilot symbols.

## Sphere decoder

`sphere_decoder` takes one equalized symbol vector y, with one symbol per transmit antenna, and the current H. It returns an LLR for every bit of the vector: 16 for 16QAM, 8 for QPSK. It does not do a tree search with a shrinking radius. Instead it visits a fixed, precomputed list of candidate vectors around the unconstrained solution and keeps the best cost per bit value. This keeps the run time constant.

1. **Unconstrained solution** (`unconstrained_solver`): s' = H⁻¹y by Gauss-Jordan elimination, with 16 fractional bits internally.
   - No pivoting is done, because the equalizers keep H close to diagonal.
   - Each column takes 5 cycles, plus one cycle at the end: 21 cycles in all.
   - A zero pivot sets `singular`.
2. **Region and enumeration** (`matrix_enumeration`): for each antenna and each of I and Q, it finds three things:
   - the nearest constellation level q
   - the direction of the next level on the side of s' (turned around at the edge of the constellation)
   - whether s' lies more than a quarter of the level spacing from q ("far")

   The four per-antenna far flags form a 4-bit region.
3. **Path look-up memory** (`path_lookup_memory`): for each mode and region, it holds a path of 16 flip masks of 8 bits each.
   - Bit i of a mask moves dimension i from q to its neighbour.
   - The table is computed at elaboration. Masks are ordered by an approximate distance increase: moving a far dimension costs 1 unit, a near one 3 units, and ties keep the lower mask first.
   - The first entry is always the all-nearest vector.
4. **Cost evaluation** (`matrix_computation`): two lanes evaluate J(s) = ||Hs − y||^2 / 64 for two candidates per cycle.
5. **Book keeping** (`book_keeping`): for each bit it keeps the smallest cost seen with the bit at 0 and the smallest seen with it at 1. The LLR is

       (min_{b=1} J − min_{b=0} J) >>> 2, saturated

   Bits are Gray labelled per dimension: a sign bit, plus for 16QAM an "outer" bit meaning |level| = 3. A bit value that never appears on the path keeps the largest cost, so its LLR saturates toward the value that did appear.

Timing: 21 cycles in the solver, 8 cycles of search, then the result. `llr_valid` comes 31 cycles after `start`.

## Turbo decoder

The code is the classic rate-1/3 parallel concatenation, punctured to rate 1/2:

- two 8-state recursive systematic encoders (octal 13/15)
- a quadratic permutation interleaver on K = 128 bits: π(i) = (15i + 32i²) mod 128
- sent per bit: the systematic bit, then parity 1 for even bits and parity 2 for odd bits

`depuncture` rebuilds the (systematic, p1, p2) triplets, inserting zero LLRs for the missing parity, and `turbo_input_buffer` stores them.

A single max-log-MAP decoder is time-multiplexed between the two constituent codes. Even rounds decode code 1 in natural order. Odd rounds decode code 2 in interleaved order, reading the systematic LLRs through `interleaver_rom`. The extrinsic LLRs of each round go through `interleaver_ram` as a-priori input to the next. 11 rounds are run, so the last round is code 1 and the decisions come out in natural order.

### Sliding window

This is the part of the design that takes the most care. The trellis is cut into windows of W = 16 columns. Time is cut into slots of 16 cycles. In slot s, four windows are in flight:

| unit | works on | does |
|---|---|---|
| `gamma_unit` | window s | branch metrics into branch memory s mod 3 |
| pre-β (a `beta_unit`) | window s−1 | backward from equal metrics, to get a start for β of window s−2 |
| `alpha_unit` | window s−2 | forward recursion, α stored in a two-bank memory |
| β `beta_unit` + `llr_unit` | window s−3 | backward recursion and LLRs, pushed into `lifo` last bit first |
| `lifo` output | window s−4 | popped in bit order: extrinsic LLR to the interleaver RAM, decisions out in the last round |

The β unit reads branch memory s mod 3 in the same cycle in which the γ unit overwrites it. To make the read and the write hit the same word, window w is stored forwards when ⌊w/3⌋ is even and backwards when it is odd.

A round takes (K/W + 4)·W = 192 cycles. A block takes 2K = 256 cycles to load (one LLR per cycle), then 11 × 192 + 1 = 2113 cycles to decode. Loading and decoding do not overlap. The trellis is not terminated: the last window's backward recursion starts from equal metrics.

The metric units normalise by subtracting state 0's metric after every step, in 16-bit words.

## Top level: `mimo_receiver`

- **Input:** `chip_valid`/`chip_ready` take one vector of four received chips per cycle through a 64-deep FIFO. `buf_overflow` is a sticky flag for a write attempted while the FIFO was full.
- **Detection:** the sphere decoder starts on a data symbol vector only when a channel estimate exists and the detector is idle. Otherwise the vector is dropped and counted.
- **Serializer:** feeds the LLRs of each vector to the turbo decoder one per cycle. LLRs that arrive while the decoder is busy with a block are dropped and counted.
- **Mode:** `mode` is sampled per vector, so QPSK and 16QAM can change at any time.
- **Counters:** `eq_updates`, `h_updates`, `sd_vectors`, `sd_dropped` and `llr_dropped` let a test or a host see how often each mechanism ran.
- **Parameters:** SF = 16, PERIOD = 256, DELAY = 8, INIT_VAL = 8192, BUF_DEPTH = 64, K = 128, ROUNDS = 11.

At one chip per cycle, a 16-chip symbol period is shorter than one 31-cycle sphere search. At full chip rate the detector would drop vectors. The end-to-end test feeds one chip every three cycles.

## Simulating

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`. With plain verilator, for example:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/mimo_pkg.sv tb/tb_mimo_receiver.sv --top-module tb_mimo_receiver
    ./obj_dir/Vtb_mimo_receiver

The `tb_mimo_receiver` testbench runs the whole receiver at its default parameters:

- It turbo-encodes two random blocks and sends the first as 16QAM. It switches mode and sends the second as QPSK.
- The channel cross-couples the antennas and adds an echo chip and small noise.
- It checks all 256 decoded bits.
- It checks that each of these happened: coefficient updates, channel estimates, sphere searches in both modes, and the mode switch.

It runs in well under a second.

`tb_channel_sweep` runs the same two-block test on the evaluation channel of this receiver:

- Each transmit path reaches its receive antenna through 16 chip-spaced echoes of weight α^(n−1).
- It runs α = 0.3, 0.4 and 0.5, resetting the receiver between them.
- It prints the bit errors per case.

QPSK decodes without error at all three. 16QAM decodes without error at 0.3 and 0.4. At α = 0.5 the 16QAM block has a few errors: the echoes then carry about as much energy as the main path, and the equalizer has adapted only three times. The test requires 16QAM at α = 0.5 to stay below a bit error rate of 0.1.

`tb_turbo_decoder` decodes three blocks. It gives uniform noise large enough that about a tenth of the received LLRs have the wrong sign. It checks every decoded bit, the 11 rounds, and the 2113-cycle decoding time. The unit testbenches compare each block with a model written independently in the testbench. `tb_equalizer` and `tb_equalization` use a shorter correlation period so that convergence is quick. `tb/tx_model.sv` is a small transmitter model shared by those two testbenches.

## How far it goes, and where it departs from the described receiver

**Follows the described receiver:**
- the block structure of the chain
- per-antenna pilots and scrambling
- 16-tap equalizers adapted by correlation-based NLMS
- the flat channel matrix
- a sphere decoder built from an unconstrained solver, a path look-up memory, enumeration, two cost datapaths and book keeping
- a single time-multiplexed turbo decoder with 16-column sliding windows, pre-β, three branch-metric memories, a LIFO, interleaver RAM and ROM, and 11 rounds
- run-time choice of QPSK or 16QAM

**Choices of this design**, where the description is silent:
- all word widths
- the LFSR, seeds and Walsh/Hadamard pilot pattern
- the decision delay and correlation period
- the power-of-two step size
- the region rule and path ordering of the sphere decoder
- the Gray labelling and LLR scale
- the constituent code, interleaver, block length and puncturing
- all handshakes

**Not done:**
- The unconstrained solver does not form a QR decomposition of H. The cost is computed from H directly, which gives the same J.
- Vectors are dropped rather than stalled when the detector is busy.
- There is one despreading code (one user) at a time.
- The turbo decoder's recursion units are combinational between the metric registers; the datapath has no extra pipeline stages.
- The path memory is a table computed at elaboration, not a programmable memory.

**Throughput:** with K = 128 the turbo decoder needs 2369 cycles per block, about 4.3 Mbit/s of decoded data at 80 MHz. A longer block or overlapping the load with decoding would raise this. No test sweeps the noise level to give bit error rate against SNR; the tests check decoding at fixed, small noise.
