# Tail-biting trellis code with a delay processor and a signal mapper

A short convolutional code has a short constraint length, so its free distance is small. This design makes a stronger code cheaply. It feeds the output of a 4-state rate-2/4 convolutional code **C** through a **multilevel delay processor** and then a **signal mapper**. Each of the four code-bit levels is delayed by a different number of symbols. The result is a trellis code **T** whose effective memory is very large (2 + 72 + 40 + 16 delay cells at the default size), and whose minimum distance is 13. Yet it can still be decoded on the 4-state trellis of C.

Two things make it suitable for short packets:

* **Tail-biting.** No zero tail is appended. The encoder of C starts in the state given by the last message symbol. The delays are cyclic within the frame. So the encoder ends every frame in the state it started in, and 256 message bits give exactly 512 code bits.
* **Iterative suboptimal decoding.** A soft demapper and a Log-BCJR decoder of C pass extrinsic information back and forth, six times by default. There is no interleaver between them. The only permutation is the delay processor itself. To limit error propagation, the demapper weights the a priori values of the other levels with a fixed matrix Ξ.

The RTL contains the encoder (`tbt_encoder`) and the iterative decoder (`tbt_decoder`), side by side in `tbt_codec_top`. The modulator, the channel and the computation of channel LLRs lie outside the design.

## The code

Message symbols are u(t) = (u1, u2). A frame holds N = L·λ symbols; by default L = 16 and λ = 8, so N = 128.

**Code C** (`conv_encoder_c`). The generator matrix is

    G = ( 3 0 1 3 )      entries are polynomials in D, bit 0 = coefficient of D^0,
        ( 0 3 3 2 )      so 3 = 1+D, 1 = 1, 2 = D

This gives, with u' denoting the previous symbol:

    v1 = u1 + u1'      v2 = u2 + u2'      v3 = u1 + u2 + u2'      v4 = u1 + u1' + u2'

The state is u(t-1), so there are 4 states. The trellis is fully connected: every state reaches every state.

**Delay processor** (`delay_processor`). Level j is delayed by τ = (9λ, 5λ, 2λ, 0) = (72, 40, 16, 0) symbols, modulo N:

    s_j(t) = v_j((t - τ_j) mod N)

**Signal mapper** (`signal_mapper`). The mapper computes z(t) = s(t)·K1 over GF(2). The rows of K1 are 1000, 1100, 1110 and 1111, so:

    z1 = s1+s2+s3+s4    z2 = s2+s3+s4    z3 = s3+s4    z4 = s4

Flipping only s_j changes j bits of z. The weakest level, s1, is therefore the one delayed the most. Each z bit is sent as an antipodal symbol (0 → −1, 1 → +1).

The encoder testbench encodes all 63 messages whose non-zero symbols fit in three adjacent positions, some of them wrapping round the frame end. It finds minimum channel-word weight 13, the minimum distance stated for this code. Reading K1 column-wise (z = K1·s) would give 11. That is why the row-vector reading is used.

## The decoder

Each iteration of `tbt_decoder` has two passes over the stored frame.

1. **Demapper pass**, N cycles, one symbol per cycle (`demapper`). For symbol t the demapper forms the a posteriori LLR of each labelling bit:

       L(s_j) = max*_{x: x_j=1} μ_j(x) − max*_{x: x_j=0} μ_j(x)
       μ_j(x) = ½ Σ_k (2z_k(x)−1)·Lch(z_k) + ½ Σ_i ζ_ij·(2x_i−1)·La(s_i)

   The maxima run over all 16 labellings x. The first term is −‖y−w(x)‖²/N0 up to a constant, written with channel LLRs. The a priori value La(s_i(t)) is the decoder-of-C extrinsic value of v_i(t−τ_i); it is zero in the first iteration. The extrinsic value Le(s_j) = L(s_j) − La(s_j) is stored as the intrinsic value of v_j(t−τ_j).

   The weights (row i = the bit whose a priori value is used, column j = the output bit) are:

       Ξ1 = 1.00 0.83 0.83 0.83
            0.77 1.00 0.83 0.77
            0.77 0.50 1.00 0.71
            0.77 0.50 0.33 1.00

   In hardware they are stored in Q6 (64, 53, 49, 45, 32, 21 /64).

2. **Log-BCJR pass**, WARM + 3N cycles (`log_bcjr_tb`). A sliding-window Log-BCJR algorithm runs on the circular trellis of C, in windows of λ symbols. The branch metric is γ = ½ Σ_j (2v_j−1)·Lin(v_j). The outputs are the extrinsic values Lext(v_j) (APP minus Lin) and hard decisions on u.

**How the delay processor appears in the decoder.** It is not a separate unit. Each level has its own LLR memory, and the demapper reads and writes level j at address (t − τ_j) mod N. That is the whole permutation between the two units.

**How the circle and the windows are handled.** The trellis of C has no known start or end state, because it is a circle. The forward recursion runs once round the circle without restarting. Before symbol 0 it is trained from equal metrics over the last WARM symbols of the frame; WARM defaults to λ = 8. The frame is then taken one window of λ symbols at a time, in three serial phases:

* the forward recursion crosses the window and stores its λ sets of α;
* a backward recursion is trained from equal metrics over the WARM symbols after the window; for the last window these are the first symbols of the frame;
* the backward recursion crosses the window in reverse and writes the results.

So a window's extrinsic values are ready about 3λ cycles after it is entered, and only one window of α is stored. The testbench compares this with a floating-point decoder that goes round the circle three times. It finds every extrinsic value within 1.5 nats, and every confident decision equal.

**max\*.** Every ln Σ exp is a balanced tree of pairwise max*(a,b) = max(a,b) + ln(1+e^−|a−b|) (`max_star_tree`). The correction term comes from a 7-range table, so no multiplier is needed.

## Number formats

| Quantity | Format |
|---|---|
| Channel LLR input `ch` | 6-bit signed, unit 1/4 nat (±7.75) |
| A priori / extrinsic LLRs | 8-bit signed, unit 1/4 nat, saturating at ±127 |
| Metrics (μ, α, β, γ sums) | 14-bit signed, unit 1/8 nat (half-LLR sums need no shift) |
| max* correction table | round(8·ln(1+e^(−d/8))): d=0 → 6, ≤2 → 5, ≤4 → 4, ≤8 → 3, ≤12 → 2, ≤21 → 1, otherwise 0 |
| Ξ weights | Q6, ζ·La rounded to the LLR unit |

The sign convention is LLR = ln P(1)/P(0), so a positive LLR means bit 1. For an AWGN channel with noise variance σ², the channel LLR of a received value y is 2y/σ². It must be multiplied by 4, rounded and clipped to ±31 before it enters `ch`.

## Interfaces and timing

All blocks use one clock and an asynchronous active-low reset `rst_n`. The reset needs a falling edge to take effect.

**Encoder** (`tbt_encoder`). Its three phases run one after another, N cycles each:

* load: `msg_ready` is high; a symbol is taken on each cycle with `msg_valid`.
* encode.
* output: `z_valid` is high; `z` = z(0) … z(N−1), with `z_last` on the final symbol.

The first z follows the last message symbol by N+1 cycles. A frame occupies 3N cycles.

**Decoder** (`tbt_decoder`):

* load: N symbols with `ch_valid` while `ch_ready` is high. `ch[j]` holds the LLR of z_{j+1}.
* decode: `ITER` iterations of 4N + WARM + 2 cycles each. `iter_done` pulses at the end of each iteration.
* output: `u_valid` is high for N cycles, with `u_hat` = û(0) … û(N−1) and `u_last` on the final symbol.

From the last channel symbol to the first decision takes ITER·(4N + WARM + 2) + 1 cycles, which is 3133 at the defaults. The whole frame, including loading and output, takes about 3390 cycles: roughly 0.075 decoded bits per cycle. The decoder handles one frame at a time.

**Parameters** (`tbt_codec_top`, passed down):

| Parameter | Default | Meaning |
|---|---|---|
| `LAMBDA` | 8 | λ |
| `L` | 16 | frame = L·λ symbols (any size above 9λ, the largest delay) |
| `ITER` | 6 | iterations |
| `WARM` | λ | training length of the circular recursions; a parameter of `tbt_decoder` and `log_bcjr_tb` only, the top leaves it at λ |

The code itself is fixed in `tbt_pkg`: the generator matrix, K1, the delay multipliers (9, 5, 2, 0) and Ξ1.

## Measured error performance

These results come from `tb_workloads`, which runs the full top level on random frames. The AWGN channel has σ² = 1/(2·½·Eb/N0). The Rayleigh channel has an independent unit-power amplitude on each code bit, known to the receiver. Both sizes decode well below uncoded antipodal signalling:

| Frame | Channel | Eb/N0 | Decoded BER | Uncoded BER |
|---|---|---|---|---|
| λ=8, 512 code bits (default) | AWGN | 2.0 dB | 3.4e-3 | 3.8e-2 |
| | AWGN | 2.5 dB | 1.2e-4 | 3.0e-2 |
| | AWGN | 3.0 dB | 0 in 51 200 bits | 2.3e-2 |
| | Rayleigh | 4.0 dB | 9.7e-3 | 7.7e-2 |
| | Rayleigh | 5.0 dB | 3.9e-5 | 6.4e-2 |
| λ=16, 1024 code bits | AWGN | 2.0 dB | 1.6e-3 | 3.8e-2 |
| | AWGN | 2.5 dB | 3.3e-4 | 3.0e-2 |
| | AWGN | 3.0 dB | 0 in 51 200 bits | 2.3e-2 |
| | Rayleigh | 4.0 dB | 5.4e-3 | 7.7e-2 |
| | Rayleigh | 5.0 dB | 2.0e-5 | 6.4e-2 |

These are short runs of 200 frames (λ=8) and 100 frames (λ=16), so low BERs rest on a handful of errors. Six iterations remove most of the errors that one iteration leaves: in `tb_tbt_decoder`, over eight frames at 2–2.5 dB, six iterations left 45 bit errors against 222 for one iteration.

## What follows the reference method and what is this design's own

From the reference method:

* the code: G, the delays (9, 5, 2, 0)·λ, K1 and the tail-biting construction;
* the demapper formula with the weights Ξ1;
* the sliding-window Log-MAP decoder of C on a circular trellis, with windows of λ symbols;
* max* with a correction table;
* six iterations;
* the default frame of L = 16, λ = 8.

Choices made here:

* **Polynomial bit order** of G (bit 0 = D^0). The other order gives the same minimum weight of 13.
* **Row-vector labelling** z = s·K1, chosen because it gives the stated level distances 1, 2, 3, 4.
* **Iteration schedule.** Iterations are block-serial: the frame is stored, and each iteration is a whole demapper pass followed by a whole sliding-window Log-BCJR pass. Within one pass, results come out window by window. But the demapper of the next iteration waits for the whole pass, so the decoding latency is about one frame per iteration. A decoder that overlaps iterations, running continuously on a stream, would need a different control and memory organisation; it is not built here.
* **Window schedule.** The three recursions of a window (forward, backward training, backward) run one after another on one set of metric units, not in parallel. The training length WARM is a parameter, λ by default.
* **Memories.** All memories are plain arrays with combinational read. An FPGA or ASIC mapping with registered-read RAMs would need one pipeline stage added in the demapper and Log-BCJR read paths.
* **Everything else**: all word widths, the max* table, the rounding of ζ·La, the renormalisation (subtracting the metric of state 0), the interfaces, the frame-serial encoder and the reset behaviour.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Build one with Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
        rtl/tbt_pkg.sv tb/tb_tbt_codec_top.sv --top-module tb_tbt_codec_top
    ./obj_dir/Vtb_tbt_codec_top

| Testbench | What it checks |
|---|---|
| `tb_conv_encoder_c` | encoder of C against the written-out equations, with state loads |
| `tb_delay_processor` | cyclic delays at N = 128, including wrap-around |
| `tb_signal_mapper` | all 16 labellings, level distances, one-to-one |
| `tb_tbt_encoder` | frames against a reference encoder, latency, minimum weight 13 |
| `tb_max_star_tree` | against floating-point ln Σ exp |
| `tb_demapper` | against the floating-point formula with decimal Ξ1 |
| `tb_log_bcjr_tb` | against a floating-point circular Log-MAP decoder; pass length and first-window latency |
| `tb_tbt_decoder` | noiseless and noisy frames, latency, 6 iterations against 1 |
| `tb_tbt_codec_top` | end to end at the default size: encoder output, decoding from noiseless to 2 dB, latencies, and that tail-biting from a non-zero state, delay wrap-around, iterations and error correction all occur |
| `tb_workloads` | BER at both frame sizes, AWGN and Rayleigh (`wl_harness` does the work) |

Each of these runs in seconds.
