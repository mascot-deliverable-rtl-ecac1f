# QR-based MU-MIMO receiver and testbed logic

This is synthesizable SystemVerilog for the FPGA logic of a 4x4 MIMO-OFDM
testbed used for multi-user uplink experiments. The core problem is to detect
four spatial streams on every one of 48 data subcarriers within one OFDM
symbol of 4 µs, which is 320 cycles at 80 MHz. Each stream may carry a
different modulation (BPSK, QPSK, 16-QAM or 64-QAM), because in the
multi-user uplink each stream can belong to a different user.

The receiver follows the classical QR-based structure:

1. An external ASIC computes a sorted (MMSE) QR decomposition
   `H P = Q R` of every channel matrix.
2. The received vector is rotated to `ŷ = Qᴴ y`.
3. A detector works on the triangular system `ŷ = R s + n`, layer by layer.

Two detectors are provided and can be switched at run time:

- **SIC**: successive interference cancellation, which is cheap and has a
  fixed run time.
- **Sphere decoder**: two search cores with FIFO scheduling, which reach
  maximum-likelihood quality with a variable run time.

Around the receiver sit smaller parts of the testbed:

- The FPGA side of the link to the two QR ASICs.
- The per-stream sample buffers of the "offline" testbed, which a PC fills
  and reads, with loop-back and bypass paths.
- A counter that synchronizes the transmit start of uplink users.

## One grid for all modulations

The idea that makes a mixed-modulation detector cheap is to map every
constellation onto one grid: the odd integers −7…7 in each dimension, which
is 64-QAM scaled by √42. QPSK (scaled by √2) and 16-QAM (scaled by √10) are
then subsets of that grid. BPSK is scaled by √2 and rotated by 45° onto the
QPSK points (±1±j). If stream *j* is scaled by `B_jj` and rotated by `C_jj`
(`C = e^{jπ/4}` for BPSK, 1 otherwise), the detector sees

```
Q̃ᴴ_ij = C_ii Qᴴ_ij
R̃_ij  = C_ii / (C_jj B_jj) · R_ij
```

which keeps the diagonal of `R̃` real and non-negative. `const_norm` applies
this to every decomposition in a 6-cycle pipeline:

1. Input register, and look-up of each layer's modulation.
2. Rotation by (1±j).
3. Multiplication by 1/√2 to undo the gain of the rotation.
4. Multiplication by `1/B_jj`.
5. Rounding and saturation; the lower triangle of R is cleared.
6. Output register.

Layer *k* of the sorted decomposition carries stream `perm[k]`, so row and
column *k* use the modulation of stream `perm[k]`. After normalization, all
slicing and enumeration happens on small integers (`lvl_t`, 4 bits).

Fixed point (`mimo_pkg`):

- Q, R and y components are 16-bit with 12 fraction bits (`DW`, `FRAC`).
- Interference-cancelled values are 24-bit (`BW`).
- Squared distances are 56-bit (`MW`).

## Preprocessing: channel estimates to QR results

`mimo_prep_top` runs in its own clock domain, `pclk`. It has two identical
channels: channel 0 handles the even subcarriers with ASIC 1, and channel 1
the odd ones with ASIC 2.

- **`chest_mem_read`** reads the estimated channel matrices of its parity
  from the channel estimation memory. It starts as soon as four subcarriers
  are completely estimated, and each later read waits until its own
  subcarrier is estimated. This way the decompositions overlap the
  estimation. The matrix is then scaled by a power of two in
  `data_prescale`.
- **`sqrd_load`** sends each job to the ASIC as 17 words of 32 bits: the 16
  entries of H as `{re, im}`, then `{cfg, sigma}`.
- **`sqrd_retrieve`** receives 27 words: the 16 entries of Qᴴ, the 10 entries
  of the upper triangle of R, and one permutation word (2 bits per layer).
  It labels the result with the subcarrier from a 4-entry tag FIFO that the
  load unit fills. When the tag FIFO is full, no new job is sent.

Every word on the link uses a four-phase handshake, and the receiving side
acknowledges combinationally (`ack = req` when it has room). This
input-to-output path is what makes the link's timing hard at 80 MHz.

- Two 32-bit data buses plus the handshake lines give 68 signals per ASIC.
- Each word needs two to three cycles, because the sender keeps `req` low for
  at least one clock edge between words.

The ASIC itself is not part of the RTL. `tb/sqrd_asic_model.sv` is a
behavioural stand-in that performs a sorted Gram-Schmidt QR in floating
point.

## Receiver: memories, rotation and detectors

`mimo_rx_top` connects the QR results to the detectors:

- **Storage** (`pclk`): each result passes through `const_norm` and is
  written into three `prep_mem` memories: Config (permutation), Q̃ᴴ and R̃.
  Each memory has two banks (even and odd subcarriers), two write channels
  and two read channels, and is written in `pclk` and read in `clk`. A result
  can be read 7 `pclk` cycles after it arrives.
- **Rotation** (`clk`): an accepted vector `y` reads its Q̃ᴴ (1 cycle), and
  `qhy_mult` computes `ŷ = Q̃ᴴ y` with 16 complex multipliers (1 cycle).
- **Detector select**: `det_sel` chooses the detector. It may only change
  while both detectors are idle.

### SIC detector

`sic_detector` solves one layer per cycle, from the last layer up to the
first, using one partial-distance unit (`sic_pdu`):

- The PDU forms `b_i = ŷ_i − Σ_{j>i} R̃_ij ŝ_j`.
- It slices `b_i` without dividing by `R̃_ii`. Six comparators test
  `|Re b|` and `|Im b|` against `2R̃_ii`, `4R̃_ii` and `6R̃_ii`, and the
  result is clipped to the largest level of the layer's modulation.
- BPSK decides on the sign of `Re b + Im b`.

After the last layer, `symbol_reorder` puts the symbols back into stream
order (`s_out[perm[k]] = s_in[k]`), and `symbol_demap` produces Gray-coded
bits in the 802.11a style (I bits low, then Q bits).

Timing:

- A new vector is accepted every 4 cycles, so 48 vectors take 197 cycles.
- From acceptance of `y` to the decision takes about 8 cycles.

### Sphere decoder

`sphere_core` does a depth-first tree search over the layers with
Schnorr-Euchner ordering:

- At every node, the smallest not-yet-visited child in the sphere is taken
  next. The core compares the partial distances of all 64 grid candidates
  and skips the ones that are not allowed by the modulation or already
  visited.
- The first leaf it reaches is the SIC solution, and its distance becomes the
  radius.
- Every better leaf shrinks the radius. A node whose partial distance is not
  below the radius is pruned, and the search goes back up a level.
- It stops when the top level has no candidate left, which gives the ML
  solution, or when it is aborted, which gives the best leaf so far.

The core visits one node per clock cycle.

`sd_system` wraps two cores:

- **Input FIFO**: received vectors with their subcarrier index wait in a
  FIFO.
- **Control unit**: it hands the next vector to whichever core is idle, with
  core 0 first, and reads that subcarrier's R̃ and permutation on that core's
  memory read channel. This is FIFO scheduling: the variable run time of the
  searches is absorbed by whichever core is free.
- **Abort**: a search that runs for `MAX_CYCLES` (default 32) cycles is
  aborted.
- **Output buffer**: results are stored by subcarrier and released in
  subcarrier order, together with an "aborted" flag.

Under noise-free conditions, 48 vectors take about 246 cycles. Under heavy
noise the abort keeps the time bounded.

**Departure:** the original design pipelines each core over 5 stages and
interleaves 5 subcarriers in it, to reach 80 MHz on an older FPGA. Here a
core evaluates one node per cycle with a single long combinational path. The
search order and the results are the same, but the clock frequency will be
lower.

## Offline testbed streams

Each of the four `offline_stream` instances has the following parts:

- **Buffers**: a Tx and an Rx `sample_buffer` of 4096 complex samples of
  2×10 bits each. The host reads and writes them word by word.
- **Registers**:
  - 0: control. Bit 0 is FPGA loop-back, bit 1 upsampling bypass, bit 2
    downsampling bypass. Writing 1 to bit 3 transmits; writing 1 to bit 4
    arms the receiver.
  - 1: RSSI threshold.
  - 2: frame length.
- **Transmit**: the frame is played out one sample per `sample_en`, through
  the external upsampling filter or its bypass.
- **Receive**: the source is the ADC, or the stream's own DAC samples in
  loop-back. It passes the downsampling filter or its bypass into the Rx
  buffer.
- **Frame start**: recording starts when the `frame_start_detector` has seen
  the RSSI at or above the threshold for 4 consecutive samples.

The filters themselves are outside; their inputs and outputs are ports.

For the multi-user uplink:

- `tx_sync_counter` starts counting when a frame from the base station
  arrives. When it expires after the programmed delay, it starts the
  transmission of the streams selected by `tx_stream_mask`.
- The same mask drives the RF enables (`rf_enable`).

## Top level

`mimo_testbed_top` instantiates `mimo_prep_top`, `mimo_rx_top`, the
synchronization counter and the four streams, each with its own ports:

- Channel estimation memory ports.
- Two ASIC links.
- Received-vector and detection ports.
- Host register and buffer ports (selected by `host_stream`).
- Filter and converter ports.

Its defaults are the main configuration: 4 streams, 48 subcarriers, 2 sphere
cores.

## What is not here

These parts of the testbed have no RTL here:

- The QR ASIC.
- The self-test of the ASIC link.
- The automatic gain control.
- The up- and downsampling filters.
- The USB interface.
- The RF chain and converters.
- Channel and noise estimation, the FFT and the channel decoder.
- The per-user CRC and user map of the multi-user base station.

For each of them, either the function or its details are unknown, or the part
is not logic. Where these parts connect to the design, their signals are
ports.

Known differences in behaviour:

- **Preprocessing throughput**: the original reaches 4 million
  decompositions per second, which is 48 matrices in 13.75 µs. The word
  format and link assumed here move about one matrix per 77 cycles per ASIC,
  so 48 matrices take about 1840 cycles (23 µs at 80 MHz) with the
  behavioural ASIC model.
- **SIC latency**: the original gives 16 cycles for its SIC detector. This
  one needs 8 cycles from `y` to the decision. Normalization is in the
  preprocessing path.
- **Sphere core**: see the departure above.
- **Module boundaries**: the original block diagram puts the post-scaling
  and the Config/Q/R memories inside the preprocessing top. Here they sit in
  `mimo_rx_top`, which owns both sides of the clock-domain crossing. The data
  flow is the same.
- **Abort limit**: the limit of 32 cycles is a choice. The original does not
  state its abort rule.

## Simulation

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`. A simulation run looks like:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/mimo_pkg.sv tb/tb_ref_pkg.sv tb/tb_mimo_testbed_top.sv --top-module tb_mimo_testbed_top
./obj_dir/Vtb_mimo_testbed_top
```

`tb_ref_pkg` holds the reference models: random symbols and triangular
matrices, SIC and exhaustive-ML references, and Gray labels.

Block testbenches:

| Testbench | What it checks |
|---|---|
| `tb_const_norm` | Against a real-number model within 2 LSB; latency 6 |
| `tb_sic_pdu` | Against an exhaustive nearest-point search |
| `tb_sic_detector` | Against a SIC reference; rate of 48 vectors in under 320 cycles |
| `tb_sphere_core` | ML metric equal to exhaustive search; abort after the first leaf gives SIC |
| `tb_sd_system` | Ordering, aborts, use of both cores, rate |
| `tb_mimo_rx_top` | Both detectors on random unitary Qᴴ, random R̃ and permutations |
| `tb_mimo_prep_top` | `QᴴHP = R` through both ASIC links |

The other blocks (`prep_mem`, `qhy_mult`, `symbol_reorder`, `symbol_demap`,
`data_prescale`, `chest_mem_read`, `sqrd_load`, `sqrd_retrieve`,
`sample_buffer`, `frame_start_detector`, `tx_sync_counter`,
`offline_stream`) each have a testbench of the same form.

`tb_mimo_testbed_top` runs the whole design at its default parameters:

- Early-start preprocessing of 48 matrices through two ASIC models.
- SIC detection, sphere detection, and heavy-noise sphere detection with
  aborts.
- An RSSI-triggered loop-back recording.
- A transmission through the upsampling path.
- A synchronized multi-user start.

It counts each of these mechanisms and fails if one never happens. It takes
well under a minute.

Inputs in the testbenches change on the falling clock edge. The simulator
used is two-state, so all state that is read is reset or written first.
