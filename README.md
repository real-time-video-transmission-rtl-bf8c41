# LED visible-light video link: RS(15,9) coding and pulse-position decision

This RTL is the digital core of a one-way optical link. A white LED is
modulated to carry video, and a photodiode on the other side receives it. Two
ideas make the link reliable:

* **Reed-Solomon RS(15,9) coding over GF(16).** Every 9 four-bit data symbols
  get 6 parity symbols. The receiver can then correct any 3 wrong symbols in a
  15-symbol codeword, including a burst of errors.
* **Pulse-position decision.** Each 4-bit symbol travels as one light pulse in
  one of 16 time slots. The receiver does not threshold single samples. It
  adds up a slot-wide window of consecutive ADC samples, looks for the local
  maxima of that sum, and keeps the largest one in each frame. The slot of
  that maximum is the symbol, so noise on single samples cannot produce two
  decisions in one frame.

The analog parts of such a system are not logic and are not included here.
These are the camera and video decoder, the Bias-T LED driver, the LED, the
PIN photodiode, the transimpedance and second amplifier stages, and the ADC.
`tb/optical_channel_model.sv` stands in for the whole analog path in
simulation.

## Signal chain

```
 video bytes ──► tx_cache ──► rs_encoder ──► ppm_modulator ──► led_on ──► (LED driver, light)
                 16-byte FIFO  9 → 15 symbols  16-slot frames      │ OOK test mode
                 byte → 2 nibbles                   ▲              │
                                          prbs_gen ─┘ (PRBS7)      
 (photodiode, amplifiers, 8-bit ADC) ──► adc_data ──► ppm_demod ──► rs_decoder ──► rx_unpack ──► bytes
                                                   pulse position   syndrome → key eq. →   nibbles → bytes
                                                   decision         Chien/Forney → XOR
```

`vlc_top` holds both ends side by side. They share one clock only because
they sit in one top. In a real link they are two boards, coupled only through
light: `led_on` on one side, `adc_data` on the other.

## Timing and rates (defaults)

| quantity | value | where it comes from |
|---|---|---|
| clock = ADC sample clock | 30 MHz (assumed) | below the ADC's 32 Msps maximum; gives exactly 300 kbit/s OOK |
| slot | `SAMPLES_PER_SLOT` = 4 clocks | own choice; 7.5 MHz slot rate, below the 12 Mbit/s the LED driver passes |
| frame | 16 slots = 64 clocks, one 4-bit symbol | own choice: one GF(16) symbol per frame |
| codeword | 15 frames = 960 clocks, 9 data symbols | RS(15,9) |
| payload rate | 30 MHz / 64 × 4 bit × 9/15 = 1.125 Mbit/s | follows from the above |
| OOK test | 1 bit per `OOK_DIV` = 100 clocks = 300 kbit/s | the eye-diagram test rate |

The video source therefore has to deliver reduced (compressed or subsampled)
video. The video-processing stage that would do this is not part of this RTL.
`vid_ready` pushes back when the 16-byte cache is full.

## The RS(15,9) code

The field is GF(2^4) with p(x) = x^4 + x + 1 and α = 2. The generator
polynomial is

    g(x) = x^6 + 7x^5 + 9x^4 + 3x^3 + 12x^2 + 10x + 12 = (x+α)(x+α^2)…(x+α^6)

`gf16_pkg` holds the field arithmetic. Multiplication is shift-and-add with
reduction by p(x). The inverse is a^14. Every constant multiplier folds to a
few XOR gates.

Symbols always travel highest degree first: 9 message symbols, then 6 parity
symbols.

### Encoder (`rs_encoder`)

The encoder is the usual division circuit. It has six 4-bit registers R1..R6
and constant multipliers g0..g5. The feedback is the input symbol XOR R6.
While the message passes through unchanged, the registers accumulate
x^6·u(x) mod g(x). For the next 6 output cycles the feedback is forced to zero
and the registers shift the parity out. `in_ready` is low during those cycles.
With no back-pressure, a codeword takes exactly 15 clocks.

### Decoder (`rs_decoder`): three pipelined stages

The decoder is the part that needs the most explanation.

1. **Syndromes** (`rs_syndrome`). Six parallel lanes compute S_j = R(α^j) by
   Horner's rule, s_j ← s_j·α^j ⊕ r, while the codeword arrives. After the
   15th symbol they are copied to an output register. At the same time every
   received symbol is written into `rs_delay_buffer`, a 64-entry circular
   memory. The address of each codeword's first symbol is recorded.
2. **Key equation** (`rs_keyeq`). This stage solves S(x)σ(x) = ω(x) mod x^6. It
   uses the inversionless Berlekamp–Massey algorithm, one iteration per clock:

       δ = Σ σ_i S_(r+1-i)
       σ ← γ·σ + δ·x·b
       if δ ≠ 0 and k ≥ 0:  b ← σ(old), γ ← δ, k ← −k−1, L ← r+1−L
       else:                b ← x·b,   k ← k+1

   The 6 iterations are followed by one clock that forms ω = S·σ mod x^3.
   σ and ω carry the same unknown non-zero factor, and it cancels in the
   Forney quotient. The result is ready 8 clocks after the syndromes. It is
   held until the next stage takes it.
3. **Chien search and Forney** (`rs_chien`, `rs_forney`). Register c_j starts
   at σ_j·α^j and is multiplied by α^j every clock. At step m their sum is
   σ(α^-(14-m)). Positions are therefore visited in arrival order, and a zero
   sum marks an error. The odd registers give σ_odd(X⁻¹) = X⁻¹σ'(X⁻¹). A second
   register bank gives X⁻¹ω(X⁻¹). The error value is

       e = X⁻¹ω(X⁻¹) / σ_odd(X⁻¹) = ω(X⁻¹) / σ'(X⁻¹)

   This is Forney's formula for a code whose first root is α^1. The value is
   XORed onto the symbol read back from the delay buffer.

Each stage needs at most 15 clocks per codeword. Codewords can therefore
arrive back to back at one symbol per clock. The first corrected symbol leaves
10 clocks after the last received symbol. If a stage would be overwritten, an
assertion fires and the sticky `overrun` flag is set. This cannot happen at
one symbol per clock.

A codeword is flagged with `blk_fail` (on its last output symbol) in three
cases: the locator length L is above 3, the number of Chien roots differs from
L, or the syndromes are non-zero but L = 0. A flagged codeword's symbols still
come out, with whatever corrections were applied. A word with more than 3
errors can also be "corrected" into a different valid codeword. No decoder
can detect that case.

## Pulse-position modulation and decision

### Transmitter (`ppm_modulator`)

At each frame boundary the modulator takes one symbol s. It then lights the
LED for the 4 clocks of slot s. If no symbol is ready, for example when the
cache has run dry mid-codeword, it sends a **dark frame**. The receiver skips
dark frames, so the link can idle without losing codeword alignment.

With `tx_mode_ook` high, the modulator sends the PRBS7 sequence
(x^7 + x^6 + 1, seeded with ones) as on-off keying for eye-diagram
measurements. A change of mode restarts the frame or bit timing.

### Receiver (`ppm_demod`)

The receiver keeps three small memories for each frame. All three are cleared
at the start of every frame.

* **Memory 1** holds the last 4 samples of the current frame. Their sum A is
  the energy of a slot-wide window ending at this sample.
* **Memory 2** holds the previous A, its time in the frame, and whether A was
  last rising. The previous A is a local maximum if A had risen to it and the
  new A is not larger. The frame's last sample counts as a maximum if A had
  risen to it, because it has no successor within the frame.
* **Memory 3** holds the largest maximum of the frame that is above
  `peak_min`, together with its time.

For a lit slot s, the window sum peaks on the slot's last sample, at time
4s+3. The decided symbol is therefore time / 4. The decision comes out one
sample after the frame's last sample. A frame with no maximum above
`peak_min` gives `no_peak` and no symbol.

Clearing memory 1 at each frame start matters. Without it, a pulse in slot
15 followed by one in slot 0 would form a flat window sum spread across two
frames, and the maximum could land in the wrong frame.

### Synchronisation

The receiver learns frame timing from `rx_sync`. It must be high together
with the ADC sample that holds the first sample of a frame. The frame that
starts there must carry the first symbol of a codeword.

After that, frames follow every 64 samples and codewords every 15 decided
(non-dark) frames. `tx_frame_start` is the transmitter's test point for the
first LED sample of each frame. In the testbench, `rx_sync` is that strobe
delayed by the channel's latency.

No preamble or clock recovery is built. A real receiver needs some way to
produce `rx_sync`. The slot decision has no timing margin: a channel delay
that is not absorbed into `rx_sync` moves the window-sum peak into the next
slot.

## Modules

| file | what it is |
|---|---|
| `rtl/gf16_pkg.sv` | GF(16) multiply, power, inverse; code constants |
| `rtl/rs_encoder.sv` | systematic encoder, division shift register |
| `rtl/rs_syndrome.sv` | 6 parallel syndrome lanes |
| `rtl/rs_keyeq.sv` | inversionless Berlekamp–Massey, 1 iteration/clock |
| `rtl/rs_chien.sv` | Chien search with σ_odd and ω evaluation |
| `rtl/rs_forney.sv` | error value, combinational |
| `rtl/rs_delay_buffer.sv` | 64 × 4-bit received-symbol memory |
| `rtl/rs_decoder.sv` | the three decoder stages and the XOR correction |
| `rtl/ppm_modulator.sv` | 16-slot pulse-position frames / OOK test mode |
| `rtl/prbs_gen.sv` | PRBS7 source |
| `rtl/ppm_demod.sv` | pulse-position decision |
| `rtl/tx_cache.sv` | 16-byte FIFO, bytes to nibbles, high nibble first |
| `rtl/rx_unpack.sv` | message nibbles to bytes, parity dropped |
| `rtl/vlc_top.sv` | both ends of the link |

### Top-level ports (`vlc_top`)

| port | dir | meaning |
|---|---|---|
| `vid_valid`, `vid_data[7:0]`, `vid_ready` | in/in/out | video bytes into the cache |
| `tx_mode_ook` | in | 1 = PRBS OOK test, 0 = coded pulse-position data |
| `led_on`, `tx_frame_start`, `tx_cw_start` | out | LED drive; frame and codeword test points |
| `adc_data[7:0]`, `rx_sync` | in | ADC samples (one per clock); frame alignment |
| `peak_min[9:0]` | in | pulse threshold on the 4-sample sum (e.g. halfway between the dark and lit sums) |
| `rx_valid`, `rx_data[7:0]` | out | received bytes |
| `rx_corrected`, `rx_block_fail`, `rx_no_peak`, `rx_overrun` | out | decoder and detector events |
| `rx_peak[9:0]`, `rx_cw_start`, `rx_cw_done` | out | received level of the last pulse; codeword framing |

All registers reset asynchronously on `rst_n` low.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself, or
its watchdog stops it. For example, the end-to-end run at default parameters:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_vlc_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/gf16_pkg.sv tb/rs_ref_pkg.sv tb/tb_vlc_top.sv
./obj_dir/Vtb_vlc_top
```

For a block testbench, replace the top module and file with `tb_<block>`,
building each in its own `--Mdir`. Drop
`tb/rs_ref_pkg.sv` from the command for testbenches that do not use it.

The RS testbenches compare against `tb/rs_ref_pkg.sv`. It is a separate model
built on log/antilog tables, with encoding by long division and syndromes by
direct evaluation.

`tb_vlc_top` runs the whole link in three phases:

1. It checks 60 OOK bits against the PRBS7 recurrence, while the cache fills
   and pushes back.
2. It switches to pulse-position mode and sends 40 codewords. The channel
   model jams 0..3 frames in most codewords and 6 frames in three of them.
3. It trickles in 10 more codewords, so that dark frames occur.

It checks every byte, except bytes of the codewords jammed beyond the code's
reach. It also requires each mechanism to have occurred at least once: PRBS
output, back-pressure, mode switch, dark frames, corrections, flagged
codewords and codeword framing. It runs in well under a second.

`tb_vlc_video` sends a 32 x 24 grey-scale test image (768 bytes, padded to
86 x 9 bytes) through the same top and channel model three times. Each time
the light gets weaker and the noise stronger, standing in for a longer
distance:

| run  | ADC level on / off | noise   | misjudged pulses (typical) | what is checked |
|------|--------------------|---------|----------------------------|-----------------|
| near | 200 / 30           | +/-10   | 0                          | no misjudged pulse, image exact |
| mid  | 130 / 50           | +/-55   | about 4 %                  | decoder repairs every one, image exact |
| far  | 120 / 50           | +/-70   | about 18 %                 | fewer wrong bytes after decoding than misjudged symbols |

It counts the misjudged pulses by comparing the receiver's raw decisions with
the transmitted code symbols. In the far run many codewords hold more than
three errors. Those are flagged, and their bytes go through uncorrected.

## Where this design goes beyond its source

The source describes the RS(15,9) code and its encoder and decoder structure,
the six-lane syndrome circuit, the Chien search circuit, Forney's formula, the
delay-and-XOR correction, and the pulse-position decision flow (window sums,
local maxima, three memories). The following are choices made here:

* **Frame format.** The source describes a pulse-position receiver but gives no
  frame format. 16 slots, one GF(16) symbol per frame, 4 samples per slot and
  dark idle frames are assumptions.
* **Clock and OOK receiver.** The source's eye test uses OOK. Only the OOK
  transmitter is built; there is no OOK receiver, since the eye diagram is
  measured with an oscilloscope. The 30 MHz clock is assumed.
* **Decision flow.** The two comparison branches of the source's decision flow
  are merged into one rising-then-not-larger test. The memories are cleared
  every frame. The `peak_min` threshold is added.
* **Key-equation algorithm.** The source asks for one iteration per clock but
  names no algorithm. Inversionless Berlekamp–Massey is used here.
* **Decoder organisation.** The addressed delay memory, the three-stage
  pipeline, and the failure rule are this design's.
* **Cache and byte handling.** The cache depth, the nibble order and the byte
  reassembly are this design's. The source names only a "register cache".
* **Synchronisation.** `rx_sync` is an input. The source does not describe how
  the receiver acquires frame or codeword timing.
* **Missing video processing.** The video-processing block between the video
  decoder and the coder has no described function and is not built. The
  payload rate (1.125 Mbit/s) is far below uncompressed standard-definition
  video.
