# Polyphase channelizers for a dual-standard (WLAN + UMTS) software radio

This RTL is the digital back end of a receiver that takes both the UMTS
downlink band (2110–2170 MHz, 12 channels of 5 MHz) and the 2.4 GHz WLAN band
(2400–2484.5 MHz, 3 non-overlapping channels of 30 MHz) through one ADC and
pulls out one channel of each standard at its baseband rate.

The ADC bandpass-samples the whole 2110–2484 MHz range at 630 MHz. At that
rate the two bands alias into the first Nyquist zone without hitting each
other: WLAN lands at 36–120 MHz (spectrally inverted), UMTS at 220–280 MHz.
Each band then goes through its own branch:

```
          +--> complex BPF --> decimate 7 (90 MHz) --> x e^{+j2pi 12MHz t} --> WLAN channelizer --> 20 MHz
ADC 630 --|                                                                  3 paths, 9/2 rate change
          +--> complex BPF --> decimate 9 (70 MHz) --> x e^{+j2pi 2.5MHz t} --> UMTS channelizer --> 5 MHz --> arbitrary resampler --> 61.44 MHz
                                                                             14 paths, /14               16 x 11 taps, step 125/96
```

The channelizers make up most of the design. Each one is a polyphase filter
bank followed by a phase-coherent sum, built in the *serial polyphase,
parallel MAC* style:

- one input sample per clock;
- one bank of parallel multipliers, as many as a sub-filter has taps;
- the polyphase rows are processed one after another on that bank.

## Channel plan and the numbers behind it

The channelizer rules are `fs = N x channel spacing`, and the channels must
sit on multiples of the spacing.

| | WLAN | UMTS |
|---|---|---|
| decimation after the complex BPF | 7 (630 → 90 MHz) | 9 (630 → 70 MHz) |
| channel centres after decimation | −42, −12, +18 MHz | +12.5…+32.5, −32.5…−2.5 MHz |
| spectrum translation | +12 MHz (phasor step 2/15 per sample) | +2.5 MHz (1/28 per sample) |
| channel centres after translation | −30, 0, +30 MHz | multiples of 5 MHz |
| paths M × taps per path | 3 × 10 | 14 × 11 |
| coefficient sets | 6 (C0…C5, from a 60-tap prototype at 180 MHz) | 14 (from a 154-tap prototype) |
| output rate | 20 MHz (2 outputs per 9 inputs) | 5 MHz (1 per 14) |

The UMTS 5 MHz output goes on to an arbitrary polyphase interpolator:

- the prototype filter is designed at 80 MHz (16 × 5 MHz) and split into 16 sub-filters of 11 taps;
- for each output, the sub-filter index moves on by 16 × 5 / 61.44 = 1.302083 = **125/96** exactly;
- on average each input sample gives 12.288 outputs.

## The WLAN channelizer: 9/2 resampling without zero packing

The hardest part to follow is how the WLAN path changes the rate by 9/2 inside
the polyphase filter. Think of the input x[n] as upsampled by 2, with zeros
packed in at 180 MHz. It is then filtered by a 60-tap prototype h and
decimated by 9. Sample n sits at position 2n of that zero-packed stream, and
output p is taken at position m = 10 + 9p. The hardware never handles the
zeros:

- **Loading.** Samples go into three 10-deep shift-register rows in a fixed
  order that repeats every 9 samples. This order is `wlan_decoder`'s table.
  - State 0 takes 5 samples into rows R2, R0, R1, R2, R0.
  - State 1 takes 4 samples into rows R1, R2, R0, R1.
  - Each step is −2 modulo 3. So sample n goes to row (n+1) mod 3, counting
    from n = 1 after reset.
- **Coefficients.** Only half of the prototype meets a real sample at each
  output, so the 60 taps are split into six sets. Set Ck = h[k + 6i],
  i = 0…9. At the end of state 0, rows R0/R1/R2 use C0/C4/C2. At the end of
  state 1 they use C3/C1/C5.
- **Channel selection.** Row r is weighted by the phasor exp(j·r·k·2π/3) of
  the chosen channel k. Because a sample's row is fixed by n mod 3, this
  per-row phasor is the same as mixing the input by exp(j·2πk(n+1)/3). That
  moves the channel at −k·30 MHz to DC (channel 2 is the one at +30 MHz),
  times a fixed phase of exp(j2πk/3).
- **Sum.** The three weighted row outputs are added. This gives exactly
  `y[p] = Σ_j h[j] · x[(m−j)/2] · exp(j2πk((m−j)/2+1)/3)`, taken over even m−j.

**Read scheduling.** This part is this design's own, because the input never
stops. The three reads for an output are made during the first three loads of
the *next* state. Each read is of the row that is being loaded in that same
cycle. The 10 multiplexers see the row before it shifts, so every row is read
exactly as it stood at the output instant. State 1 is 4 samples long and
state 0 is 5, so the three reads always fit. The MAC then needs 6 of every 9
cycles.

The UMTS channelizer works the same way with one state:

- samples go into R13, R12, …, R0;
- row r uses set Cr = h[r + 14i] and phasor exp(j·r·k·2π/14);
- its 14 reads take up all 14 loads of the next period.

Here the rows hold samples in *descending* order: sample n sits in row
(−n) mod 14 at the output instant. The same phasor form therefore selects the
channel centred at **+k × 5 MHz**. In the WLAN path, where rows ascend, it
selects −k × 30 MHz.

## Datapath

| block | what it does | latency |
|---|---|---|
| `shift_reg_bank` | M rows of `shift_reg_array` (L complex registers each), a one-hot row decoder for the load, and L M:1 multiplexers for the read | read is combinational |
| `coef_bank` | NSETS × L register file of Q0.11 coefficients; one whole set is read per cycle; written one word at a time | combinational read |
| `parallel_mac` | L complex × real multiplications in one stage, then a registered adder tree with ceil(log2 L) stages (4 for L = 10 or 11). A tag carries the row number and the first/last flags along with the data | 1 + ceil(log2 L) = 5 |
| `phasor_bank` | M Q1.14 phasors of the selected channel, computed at elaboration and reloaded into a register array every cycle | channel change takes 1 cycle |
| `phasor_mult` | 4 multiplications, then 1 subtraction and 1 addition | 2 |
| `coherent_accumulator` | adds the rows of one output, restarting on `first`; on `last` it shifts right by 15 and saturates to 28 bits | 1 |
| `wlan_decoder`, `umts_decoder` | counter-and-table controllers that produce load row, read enable, coefficient set and first/last flags | combinational |

`channelizer_core` wires these blocks into one datapath. `wlan_channelizer`
(3 × 10, 6 sets) and `umts_channelizer` (14 × 11, 14 sets) each pair the core
with their decoder. From the last read of an output to `out_valid` takes
**8 cycles**.

### Number formats (package `chan_pkg`)

- Input data: 16-bit complex, Q7.8.
- Filter coefficients: 12-bit real, Q0.11.
- Phasors: 16-bit complex, Q1.14. +1.0 saturates to 16383/16384.
- Channel outputs: 28-bit complex, Q9.18.
- MAC result: full precision, 32 bits (Q.19) for L = 10 and 11.
- Phasor products: 49 bits (Q.33), accumulated in 64 bits.
- Final scaling: arithmetic shift right by 15 (truncation), then saturation
  to 28 bits.

### Front end and resampler

- **`bandpass_filter`:** a 16-tap direct-form FIR with complex coefficients
  on the real ADC stream. Write coefficients at address 2·tap (real part) and
  2·tap+1 (imaginary part). The output is shifted right by 11 and saturated to
  Q7.8, one cycle after its input.
- **`downsampler`:** keeps the first valid sample after reset, then one in M.
  Because the band is already image-free, this only translates the spectrum.
- **`spectrum_translator`:** multiplies sample n by exp(j2πKn/P), looked up in
  a table computed at elaboration. WLAN uses K = 2, P = 15; UMTS uses K = 1,
  P = 28. It re-uses `phasor_mult`, then shifts right by 14 and saturates.
  Latency 2.
- **`arb_resampler`:**
  - `in_ready` is high while the block is idle. An accepted sample goes into
    an 11-tap `shift_reg_array`.
  - Then one output is started per cycle. Each uses coefficient set
    floor(phase/96), after which phase += 125.
  - When phase reaches 1536 (= 16 · 96), 1536 is subtracted, the block goes
    idle and waits for the next sample.
  - Each input therefore keeps it busy for 12 or 13 cycles.
  - Outputs appear 6 cycles after they are started, scaled to Q9.18 (shift
    right 1, saturate).

### Top level (`msr_receiver_top`)

Both branches run side by side on **one clock**. Sample rates are carried by
valid strobes. One `adc_valid` per clock stands for 630 MHz, and the 90, 70
and 5 MHz streams are the valid pulses of the downsamplers and the UMTS
channelizer.

Configuration inputs:
- One write port loads every coefficient bank: `cfg_we`, `cfg_sel`,
  `cfg_addr`, `cfg_data`.
- `cfg_sel` picks the bank: 0 WLAN BPF, 1 UMTS BPF, 2 WLAN channelizer
  (address set·10+tap), 3 UMTS channelizer (set·11+tap), 4 resampler
  (set·11+tap).
- `wlan_channel` (0–2) and `umts_channel` (0–13) choose the channels.

Outputs:
- `wlan_out` at 20 MHz;
- `umts5_out`, the UMTS channel at 5 MHz;
- `umts_out`, the same channel at 61.44 MHz.

Between the UMTS channelizer and the resampler, the 28-bit Q9.18 sample is
shifted right by 10 and saturated to 16-bit Q7.8. An assertion checks that
the resampler is always idle when a new 5 MHz sample arrives. At full rate a
burst lasts at most 13 cycles and samples come 126 cycles apart.

## What is taken as given and what is chosen here

Taken from the channel plan and channelizer structure described above:

- the branch structure, decimation factors, translation frequencies, path
  counts and tap counts;
- the coefficient-set tables and load orders;
- the adder-tree depth and the two-step phasor multiply;
- the data, coefficient, phasor and output widths;
- the 16 × 11 interpolator and its 1.302083 step.

Chosen in this design:

- **Coefficients.** No filter coefficients are specified, so every filter
  bank is a writable register file and clears on reset. The bandpass filters
  get 16 taps; their length is also not specified.
- **Clocking.** One clock with valid strobes replaces separate 630, 90, 70
  and 80 MHz clocks. To run in real time, the top's clock must run at the ADC
  rate. A channelizer on its own needs only one clock per input sample
  (90 MHz for WLAN, 70 MHz for UMTS).
- **Read scheduling.** Each row is read in the cycle it is loaded, as
  described above.
- **Start-up.** The first WLAN state-1 output and the first UMTS output come
  only after one full period of input.
- **Scaling.** Every rescaling truncates (arithmetic shift) and saturates.
  Full precision is kept up to that point.
- **Channel order.** The channel index follows the phasor sign
  exp(+j·r·k·2π/M). WLAN channel k is centred at −k × 30 MHz (mod 90 MHz),
  with a constant phase of exp(j2πk/3). UMTS channel k is centred at
  +k × 5 MHz (mod 70 MHz).
- **Resampler phase.** The resampler uses the integer part of its phase, with
  no interpolation between neighbouring sub-filters. It works in bursts with
  a valid/ready handshake.

Not in the RTL: the ADC itself, which is analog, and the baseband processing
after the channelizers.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches compare
against reference arithmetic written independently of the RTL (helpers in
`tb/tb_util_pkg.sv`).

- `tb_wlan_channelizer` and `tb_umts_channelizer`:
  - load random prototypes and stream random samples;
  - compare every output bit-exactly with the direct formulas above, for
    several channels;
  - check the output rate (2 per 9, 1 per 14) and the 8-cycle latency.
- `tb_channel_extraction`:
  - loads Hamming-windowed sinc prototypes and feeds tones at channel
    centres;
  - the selected channel passes the tone within −2/+1 dB;
  - neighbouring channels must be at least 30 dB down. Measured: 62–72 dB
    for WLAN and 49–55 dB for UMTS, limited by the 12-bit coefficients and
    the prototype length.
- `tb_arb_resampler`:
  - checks every output against a 125/96 phase model;
  - checks 12 or 13 busy cycles per input;
  - checks exactly 1536 outputs for 125 inputs.
- `tb_msr_receiver_top`:
  - runs the whole receiver at its default parameters;
  - two runs of 2400 ADC samples with different channel selections, the
    second with gaps in the ADC stream;
  - compares every WLAN, 5 MHz UMTS and 61.44 MHz UMTS output bit-exactly
    with a chained model of all stages;
  - checks output counts against the rates;
  - counts that each mechanism occurs: writes to all five banks, outputs of
    both WLAN states, resampler bursts of 12 and of 13, a channel switch and
    ADC gaps.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_msr_receiver_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/chan_pkg.sv tb/tb_util_pkg.sv \
  tb/tb_msr_receiver_top.sv -o sim && obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`. The full receiver
test takes a few seconds.

## Changing it

- Path count, taps and sets are parameters of `channelizer_core`.
- A new standard needs only a decoder that produces, for each input sample:
  the row to load, whether this cycle reads that row for an output, the
  coefficient set, and the first/last flags of the output's reads.
- The number formats live in `chan_pkg`. The accumulator shift comes from
  them (DFRAC + CFRAC + PFRAC − OFRAC).
- The resampler's ratio is STEP/DEN per output over NPH sub-filters.
  125/96 over 16 gives 5 → 61.44 MHz.
