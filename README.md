# Voice-controlled robot: MFCC co-processor and robot controllers

A small two-wheel robot takes spoken direction commands ("forward", "reverse",
"left", "right"). A microphone is sampled at 8 kHz through an AC'97 codec, each
20 ms frame of speech is turned into 13 mel-frequency cepstral coefficients
(MFCCs), and a soft processor compares the sequence of coefficient vectors
with stored templates by dynamic time warping. The motors, the wheel
encoders and the IR obstacle sensors each have their own controller in the
FPGA fabric. Those controllers act in parallel with the processor: an
obstacle stops the robot even while the software is busy recognising a word.

This RTL covers the fabric side of that system:

| module | role |
|---|---|
| `feature_extractor` | MFCC co-processor: FFT words in, 13 coefficients out |
| `mag_extractor` | \|X\| of each complex FFT output (18-cycle pipeline) |
| `mel_filterbank` | 40 triangular mel filters computed on 5 time-shared MACs |
| `log_calc` | 10000·ln(x) from a leading-one detector and a 256-entry table |
| `dct_cepstral` | 13-point DCT on 13 parallel MACs |
| `sync_fifo` | stage-to-stage FIFOs |
| `ac97_controller` | serial link to the audio codec (microphone in, headphone out) |
| `pwm_gen` | 20 ms speed PWM, one per motor |
| `encoder_counter` | wheel distance and frequency counter |
| `motion_ctrl` | seven movements to the motor-driver pins, with stop on target or obstacle |
| `ir_obstacle` | obstacle flag from IR range and proximity readings |
| `robot_top` | all of the above side by side |

The processor, its bus, the FFT core and the recognition software are not
part of this RTL. `robot_top` brings out the signals they would connect to as
plain ports:
- the FFT output stream into the co-processor;
- the codec user registers;
- the movement, speed and sensor-threshold registers.

## Data flow through the MFCC co-processor

```
FFT read FIFO ──► mag_extractor ──► FIFO ──► mel_filterbank ──► FIFO ──► log_calc ──► dct_cepstral ──► cep[0..12]
 datain[31:0]      18 cycles        64       5 MACs, 40 bands   64       4 cycles     input RAM + 13 MACs
 valid_in/rd_en_out
```

**Input.** Every frame is the 256 outputs of a 256-point FFT, in natural
order. Each is one 32-bit word: the signed 16-bit imaginary part is in
`[31:16]` and the signed 16-bit real part is in `[15:0]`. A word moves when
`valid_in` and `rd_en_out` are both high. Frames are counted from reset, so
every 256 words form one frame. The co-processor accepts one word per clock
indefinitely. `rd_en_out` drops only if the first FIFO could not hold
everything still inside the magnitude pipeline, which does not happen at
full rate with the supplied filter bank.

**Magnitude.** Two 16×16 multipliers square the real and imaginary parts. An
adder sums the squares. A 16-stage digit-by-digit square root (`isqrt_pipe`)
then retires one result bit per stage. The result is the exact
`floor(sqrt(re²+im²))`, 17 bits wide, 18 cycles after the word enters. The
reference design used a vendor CORDIC core for the root. The 18-cycle figure
is kept.

**Mel filter bank: time-shared MACs.** This stage is the least obvious part
of the design. The 40 filters are overlapping triangles. As a weight matrix
they form a 40×256 sparse matrix multiplying the 256 magnitudes. The bins
arrive in order, and each filter covers only a short run of adjacent bins.
So at any moment only a few filters are collecting, and filter *j+5* never
starts before filter *j* has finished. Five multiply-accumulate units are
therefore enough:

- MAC *k* (0…4) serves filters *k*, *k+5*, *k+10*, … *k+35*.
- Each MAC has its own 64-entry region of the coefficient ROM `MEL_COEF`
  (entries 64k…64k+63 for MAC k), read through its own port. The region
  lists, in bin order, every non-zero weight of that MAC's filters as
  `{last[24], bin[23:16], weight[15:0]}`.
- The shared bin counter `count` is compared with the bin field of every
  MAC's current entry. On a match the MAC adds `magnitude × weight` and steps
  to its next entry. The ROM is read one entry ahead, which hides its
  one-cycle read latency.
- An entry marked `last` closes the filter. The sum moves to the MAC's result
  register, the accumulator restarts from zero, and the MAC's filter number
  goes up by 5.
- An output multiplexer drains the result registers one per cycle, giving
  `s` (32 bits) and `valid_ele_index` (the filter number 0…39).

If two filters could finish on the same bin, results might pile up. For that
case `hold_in` asks the source to hold its next sample while more than one
result is waiting. An assertion checks that no result is ever overwritten.
With the supplied weights no two filters end on the same bin, so `hold_in`
stays low and the stage runs at one bin per clock. Each filter output (an
"ear magnitude") leaves 1–2 cycles after the last bin it uses. Bins above 4 kHz (128…255) carry no
weights, so a frame's 40 results are out long before its last word arrives.

The weights come from this recipe:
- mel(f) = 1127·ln(1 + f/700);
- 42 edge frequencies are equally spaced in mel from 0 to 4000 Hz;
- bin *b* sits at *b*·8000/256 Hz;
- each triangle is normalised so that its weights sum to 1, then scaled by
  10000 and rounded.

This gives 247 non-zero weights in all. The reference design quotes 413
non-zero weights for its filter matrix, so its filters were wider or covered
more of the spectrum. A different bank needs only a change to the recipe in
`mk_mel_coef`. Each MAC region has 64 entries; unused entries hold bin 255
with weight 0.

**Logarithm.** Any value is *a* = 2^p·N with 0.5 ≤ N < 1, so
ln *a* = (p + log₂N)·ln 2:

- p is one more than the position of the leading one;
- the 8 bits after the leading one index the table `LOG2_LUT`, whose entry *k*
  is round(−10000·log₂(0.5 + k/512));
- the output is (10000·p − table)·ln 2, with ln 2 = 45426/65536.

`outdata` is 10000·ln(*a*) to within about 40, because N is truncated to the
table grid. Zero maps to 0. The reference design got the same table index by
dividing by 1953, which cost it 41.5 cycles. Taking the bits directly gives
a 4-cycle pipeline.

**DCT.** The 40 log values are written into the DCT's input RAM at their
filter number, so the order in which they arrive does not matter. After the
40th value a start pulse launches the DCT. A counter reads each input once
and broadcasts it to 13 MACs. MAC *i* multiplies it by its own cosine
C(i,j) = round(10000·cos(π·i·(j−½)/40)), taken from the table `DCT_COS` (row
*i*, 40 entries). `s[i]` holds the raw sum Σⱼ xⱼ·C(i,j) in 64 bits. The 2/40
normalisation is not applied. `valid_out` comes 42 cycles after start.
Values of the next frame wait in the second FIFO until the DCT has finished.

**Timing of one frame** (66.67 MHz, one FFT word per clock):

| stage | this RTL | reference design |
|---|---|---|
| magnitude | 18 | 18 |
| filter bank | 1–2 after the last contributing bin | 85 |
| logarithm | 4 | 41.5 |
| DCT | 42 | 40 |
| first word to coefficients | 196 cycles (2.9 µs) | 1046.5 cycles including an 862-cycle FFT |

A 2-second command is 100 frames. Streamed back to back, its last
coefficients appear 25,540 cycles (0.38 ms) after its first FFT word. The co-processor is therefore far from being the
bottleneck; the software recognition step is.

**Fixed-point summary.**

| signal | width | meaning |
|---|---|---|
| FFT word | 2×16 signed | imag, real |
| magnitude | 17 unsigned | floor(\|X\|) |
| filter weight | 16 unsigned | weight × 10000, weights of a filter sum to 10000 |
| ear magnitude | 32 unsigned | Σ magnitude × weight |
| log | 18 unsigned | 10000·ln(ear magnitude) |
| cosine | 16 signed | cos × 10000 |
| coefficient | 64 signed | Σ log × cosine |

The reference design also subtracted a constant from the logarithms to undo
the ×10000 weight scaling. That constant is the same on all 40 values, so it
changes only coefficient 0. It is left to software.

## AC'97 codec link

`ac97_controller` runs on the codec's 12.288 MHz BIT_CLK. A frame is 256 bits:

- a 16-bit tag slot, then twelve 20-bit slots, so frames repeat at 48 kHz;
- SYNC is high during the 16 tag bits;
- SDATA_OUT changes on the rising edge, and SDATA_IN is sampled on the
  falling edge.

Outgoing slots are loaded from the user registers at each frame start:
- slot 1 carries a register address, with bit 19 = read;
- slot 2 carries write data;
- slots 3 and 4 carry the headphone samples.

Incoming slots are captured at each frame end:
- tag bit 15 gives `codec_ready`;
- slot 2 is the register read-back;
- slots 3 and 4 give the 16 MSBs of the left and right ADC samples.

`rec_valid` pulses only for frames whose tag marks slot 3 valid. With the
codec's ADC rate register (0x32) set to 8000, that yields the 8 kHz stream
the recogniser uses. Pulse `cmd_valid` to send a command; `cmd_done` pulses
when the frame carrying it starts. The user registers are in the BIT_CLK
domain. Crossing them to a processor clock is left to the integrator.

## Locomotion and sensors

- **Movements.** `motion_ctrl` maps `move_e` (stop, forward, reverse, left,
  right, soft left, soft right) to the L293D inputs
  `motor = {L_a, L_b, R_a, R_b}`. Per wheel, forward is 10, backward is 01
  and stop is 00. Left and right spin the wheels in opposite directions. A
  soft turn stops the inner wheel.
- **Distance and angle.** A command clears both encoder distance counters. A
  non-zero `target` ends the move when either wheel reaches that many
  pulses. With 30 slots and a 2.55 cm wheel radius, one pulse is 0.534 cm of
  travel, 4.08° of a spot turn or 2.04° of a soft turn.
- **Obstacles.** `ir_obstacle` raises `obstacle` when any range reading is at
  or above `range_thr` or any proximity reading is at or below `prox_thr`.
  Range readings grow as an object approaches; proximity readings fall. This
  stops every movement except reverse and sets `buzzer` until the next
  command. The readings come from an external ADC, whose interface is not
  part of this RTL.
- **Speed.** `pwm_gen` produces a 20 ms period. The output is high for the
  first duty/255 of the period, and duty is sampled at each period start.
- **Encoder frequency.** `encoder_counter` counts encoder edges over a gate,
  one second by default, and saturates rather than wrapping.

## Where this RTL departs from the reference design

- One clock for the whole co-processor. The reference design ran the filter
  bank at twice the system clock so that it could compare ROM indices with
  the bin counter. A ROM port per MAC, read one entry ahead, makes that
  unnecessary.
- Exact integer square root instead of a CORDIC core.
- The log-table index is taken from bits, not by division, so the log stage
  takes 4 cycles instead of 41.5.
- Mel weights are computed from the recipe above; the original table was not
  published. The DCT cosine argument is the standard DCT-II one.
- The DCT takes 42 cycles instead of 40, and the 2/40 factor and the log
  offset are left to software.
- The obstacle stop sits in hardware (`motion_ctrl`) rather than only in the
  processor's main loop, and reverse is exempt from it.
- The following are this design's own choices: FIFO depths, flow control,
  tag-bit use on the codec link, the L293D level encoding, the PWM duty
  format, the encoder gate and sensor thresholds.

## Tables

The three constant tables are not stored as data. Constant functions in
`rtl/mfcc_tables_pkg.sv` compute them from their formulas during
elaboration, using `$ln`, `$exp` and `$cos`. Both simulation and synthesis
therefore see the same contents, and the tables follow the sizes set in
`mfcc_pkg`.

| table | entries | contents |
|---|---|---|
| `MEL_COEF` | 5 × 64 | `{last, bin, weight}` per MAC region, recipe above |
| `LOG2_LUT` | 256 | round(−10000·log₂(0.5 + k/512)) |
| `DCT_COS` | 13 × 40 | round(10000·cos(π·i·(j−½)/40)), row i, column j−1 |

Each filter-bank MAC and each DCT MAC receives only its own region or row, as
a separate small ROM.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`. From the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mfcc_pkg.sv rtl/mfcc_tables_pkg.sv --top-module tb_feature_extractor tb/tb_feature_extractor.sv
./obj_dir/Vtb_feature_extractor
```

- `tb_feature_extractor` streams a whole 2-second command, 100 frames back
  to back. It checks every ear magnitude and every coefficient against a
  floating-point model written in the testbench, within the error bound of
  the integer tables. It also checks that the last coefficients arrive
  25,540 cycles after the first word (99·256 + 196).
- `tb_mel_filterbank`, `tb_log_calc`, `tb_dct_cepstral` and
  `tb_mag_extractor` check their stages, including the latencies above.
- `tb_robot_top` runs the whole design at its real parameters: 66.67 MHz,
  20 ms PWM and a one-second encoder gate. It uses the behavioural codec
  model `tb/ac97_codec_model.sv`. It passes three MFCC frames, codec commands
  and samples, all seven movements, an obstacle stop, a target stop, a full
  PWM period per motor and a full encoder gate. It simulates up to two
  seconds of robot time and takes around two minutes.

To shorten the robot-level time constants, override `CLK_HZ`, `PWM_US` and
`GATE_CYCLES` on `robot_top`.
