# Key-locked image scaler: a DSP datapath obfuscated through its own switches

A multirate DSP datapath is full of periodic switches. Decimation keeps every
M-th sample, interpolation alternates original and new samples, and folding
time-shares one unit among several operations. In hardware each of these
switches is a multiplexer driven by a ring counter. This design uses that fact
to protect an image scaler. The ring counters and the filter-order switch are
set by a small reconfigurator. The reconfigurator changes its settings only
after it has seen a secret key sequence followed by a configure word.

- With the right key and configure word, the scaler low-pass filters,
  decimates by 2 and interpolates by 2, as intended.
- After reset, or with a wrong key, the same hardware runs in a
  non-meaningful mode and produces garbage at full speed.
- With the right key but other configure words, it runs in modes that give
  plausible but wrong images: other filter orders, nearest-neighbour output,
  or shifted sampling phases.

The hardware is the same in every mode. Only the reset states of the ring
counters and one static select differ, so it is hard to tell from the netlist
which schedule is the real one.

## Datapath

```
 Clock/Reset                                                        out_pix
     |      256-bit line        10 taps          cur, prev           out_valid
 image_input_block ──> line_register_block ──> combined_filter_block ──> interp_bilinear_block ──>
   (counter module)     (line buffer +          (FIR of order          (new pixel + 2:1
                         10-stage bank)          10/6/4/2 + decimator)   interleave switch)
        ^                    ^                        ^    ^                    ^
        └──── sync_clr ──────┴──────── main_control_block: fir_sel, dec_strobe, ilv_sel
                                        ^  key_valid, key_in
```

| Block | File | What it does |
|---|---|---|
| Counter module | `rtl/image_input_block.sv` | Pixel and line counters give the timing: one 256-bit line (32 pixels of 8 bits, pixel 0 in bits 7:0) every 32 cycles. The line is either a built-in test pattern or `ext_line`. |
| Line register | `rtl/line_register_block.sv` | One-line buffer. Its pixels enter a chain of ten pixel registers, one per clock, and every register is a filter tap. |
| Combined filter | `rtl/combined_filter_block.sv` | Five FIRs run in parallel over the ten taps. A switch picks one, the result is shifted right by 5 and clamped to 0..255. The decimation switch keeps the samples that `dec_strobe` marks and passes on the newest and previous kept samples. |
| Bilinear interpolator | `rtl/interp_bilinear_block.sv` | Makes a new pixel between two kept samples and emits the original and the new pixel through a 2:1 switch. |
| Main control | `rtl/main_control_block.sv` | Obfuscating FSM, reconfigurator and two ring counters. |
| Top | `rtl/image_scaler_top.sv` | Wires the above together. |

The filter computes `y[n] = sum_k h[k] x[nM-k]` with `taps[k] = x[t-k]`.
In the functional mode the coefficients are `1 2 3 4 6 6 4 3 2 1`, which sum to 32.
The lower orders are `2 4 10 10 4 2`, `4 12 12 4` and `16 16`.
The non-meaningful mode uses the alternating-sign set `1 -2 3 -4 6 -6 4 -3 2 -1`.
All sets are in `obf_pkg::fir_coef`.

The interpolator measures `Diff = |cur - prev|`. Below `THRESH` (32) the new
pixel is the rounded mean `(prev + cur + 1) / 2`. At or above it, the new pixel
repeats `prev`, so an edge stays sharp instead of gaining a blurred midpoint.
With decimation by 2 and interpolation by 2, one output pixel leaves per clock.
In the functional mode the output stream is:

    0, mid(0, d0), d0, mid(d0, d1), d1, mid(d1, d2), ...

Here `d0, d1, ...` are the filtered samples kept at even positions. Each output
pair lags one kept sample behind, and the leading 0 is the cleared register.

## The switches and the ring counters

`rtl/ring_counter.sv` is the fixed structure behind every periodic switch:

- a state register SR;
- a next-state function F, which rotates SR one place towards the MSB on each
  `adv`;
- an output function G, which returns the index of the lowest set bit;
- a reset state that SR loads on `rst` and on `load`, supplied from outside.

A one-hot reset state gives the schedule 0, 1, …, N-1, 0, …. Any other reset
state gives a different periodic schedule from identical hardware:

| reset state (N = 2) | G sequence | effect on the decimation switch | effect on the interleave switch |
|---|---|---|---|
| `01` | 0,1,0,1 | keep even samples (correct) | original, new (correct) |
| `10` | 1,0,1,0 | keep odd samples | new, original |
| `11` | 0,0,0,0 | keep every sample (no decimation) | original only (nearest neighbour) |

The decimation ring steps on every new sample (`pix_valid`). The interleave
ring steps on every output (`out_valid`). `rtl/secure_switch.sv` is the
multiplexer itself. A control value beyond the last input selects input 0.

## Key, configure data and modes

### The two-level FSM

The control is a two-level FSM (`rtl/main_control_block.sv`).

**Level 1, the obfuscating FSM (`rtl/obfuscating_fsm.sv`).** It takes
`KEY_LEN` words of `KEY_W` bits on `key_in`, one word per cycle while
`key_valid` is high, most significant word of `KEY` first. Idle cycles between
words are allowed.

- A wrong word restarts the sequence. If the wrong word equals the first key
  word, it counts as the start of a new attempt.
- Once all words have matched, the next valid word is forwarded as configure
  data, and the FSM locks again.
- A wrong key therefore never reaches the reconfigurator, and every mode
  change needs the whole key.
- The defaults are a 16-bit key of four 4-bit words, `16'hB29E`.

**Level 2, the reconfigurator (`rtl/reconfigurator.sv`).** It maps the low 4
bits of the configure word to a mode through a combinational table. Several
codes share a mode. The mode then sets the filter select and the reset states
of the two ring counters. The tables are in `rtl/obf_pkg.sv`:

| codes | mode | filter | dec ring | ilv ring | output |
|---|---|---|---|---|---|
| 5, A | FUNC | 10 taps | `01` | `01` | correct |
| 4, C | ORD6 | 6 taps | `01` | `01` | plausible, less smoothing |
| 2, 7 | ORD4 | 4 taps | `01` | `01` | plausible |
| 1, 9, E | ORD2 | 2 taps | `01` | `01` | plausible |
| 3, 8 | NEAREST | 10 taps | `01` | `11` | pixel replication |
| D | SWAP | 10 taps | `10` | `10` | shifted phase, pair order swapped |
| 0, 6, B, F | SCRAMBLE | high-pass | `11` | `10` | non-meaningful |

After reset the mode is SCRAMBLE. With a random key and a random configure word,
the chance of reaching FUNC is 2^-(KEY_W·KEY_LEN) × 2/16.

### Restart on reconfiguration

A new mode would leave the data in flight out of step with the freshly loaded
ring counters. For this reason the reconfigurator's one-cycle `reconfig` pulse
(`sync_clr`) does two things at the same clock edge:

- it reloads both ring counters;
- it restarts the whole datapath at pixel 0 of line 0.

After a reconfiguration the scaler therefore behaves exactly as after reset in
that mode.

## Timing

| Event | When |
|---|---|
| Configure word applied | clock edge E |
| Mode register updated | edge E+1 |
| Datapath restarted | edge E+2 |
| First output pixel | 5 cycles after the restart edge (6 in SWAP, which keeps odd samples) |

After the first output pixel, one pixel leaves every clock. Stage by stage:

- the line word is registered;
- the buffer is loaded;
- the first sample is in the taps;
- the kept sample is registered;
- the pixel pair is registered.

From there the output is combinational through the interleave switch. The
longest logic path is the ten-tap multiply-add in the combined filter.

## What is specified and what is chosen here

The obfuscation method defines the following, and this design follows it:

- periodic N-to-1 switches as multiplexers driven by ring counters;
- the ring counter as an FSM (SR, F, G) whose reset state comes from a
  reconfigurator;
- an obfuscating FSM that takes a configuration key;
- configure data mapped to modes by simple combinational logic, with several
  codes per mode;
- meaningful-but-wrong modes that change the filter order, plus non-meaningful
  modes;
- a scaler built from an image input (counter) block with a 256-bit data
  output, a line register of ten flip-flops with a register output, a combined
  interpolation/decimation filter, a bilinear interpolator, and a control
  block with the key input;
- the decimating-FIR dot product;
- the threshold test between a bilinear and an alternative new-pixel function.

This design chose the following:

- the 8-bit pixel (so a 256-bit word is 32 pixels);
- the frame height of 32 lines;
- the test pattern `p(x,y) = 8x + 2y + 128·(x ≥ 16) mod 256`;
- the coefficient sets and the shift-and-clamp rounding;
- M = L = 2;
- the threshold of 32;
- the edge rule (repeat the earlier pixel);
- the key length, word width and value;
- the mode table and its ring-counter reset states;
- G as a lowest-set-bit encoder and F as a rotate;
- the restart on reconfiguration;
- the external line port.

Known departures and limits:

- **One dimension only.** Interpolation and decimation work along each line.
  The lines are streamed back to back through one filter, so the taps span line
  ends. A two-dimensional bilinear scaler would also interpolate between lines.
- **Scale factor.** The scale factor is fixed at 2/2 (decimate, then
  interpolate back), so the output image has the input's size and is smoothed.
  Other factors need other ring lengths (`DEC_M`, `ILV_L` in `obf_pkg`) and a
  matching interpolator.
- **Clock rate.** A clock rate of about 340 MHz has been reported for a design
  of this kind on an FPGA. No timing analysis has been done for this RTL.
- **Key detector.** The key detector is not a full overlapping-sequence
  detector. After a partial match it only recognises a new attempt that starts
  with the first key word.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference values are
computed in the testbenches from their own copies of the tables and formulas.

| Testbench | What it covers |
|---|---|
| `tb_ring_counter` | Random loads, resets and advances for N = 4 and N = 2 against a state model. |
| `tb_secure_switch` | Every select value, including out-of-range ones. |
| `tb_obfuscating_fsm` | Correct, wrong, gapped and random key traffic. |
| `tb_reconfigurator` | All 16 codes against an independent table. |
| `tb_main_control_block` | The decimation and interleave schedules of every mode, and rejection of a wrong key. |
| `tb_image_input_block` | Line period, pattern, external lines and restart. |
| `tb_line_register_block` | The tap contents against the pixel stream, back to back and with gaps. |
| `tb_combined_filter_block` | All five filters, clamping and decimation with random strobes. |
| `tb_interp_bilinear_block` | Both branches, the exact threshold boundary and all three switch schedules. |
| `tb_image_scaler_top` | End to end at the default parameters; details below. |
| `tb_key_sizes` | The whole scaler with 8-, 16-, 32- and 64-bit keys. A key wrong in any single word must be rejected. |

`tb_image_scaler_top` runs at the default parameters:

- it checks the reset mode against a model of SCRAMBLE;
- it checks that two wrong keys are rejected;
- in the functional mode it compares a whole 32×32 frame plus the wrap into the
  next frame, output by output, with a model of the full scaler;
- it does the same for every other mode, and for a run on random external lines;
- it checks the one-pixel-per-clock rate and the start-up latency;
- it counts each mechanism: every mode, both interpolation branches, clamping,
  frame wrap-around and external input. A mechanism that never happened counts
  as a failure.

To run one testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps --top-module tb_image_scaler_top \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/obf_pkg.sv tb/tb_image_scaler_top.sv -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second.

## Changing it

- **Key.** Set `KEY_W`, `KEY_LEN` and `KEY` on `image_scaler_top`.
- **Mode table and coefficients.** Edit `cfg_to_mode`, `mode_to_cfg` and
  `fir_coef` in `rtl/obf_pkg.sv`. The testbenches hold their own copies of these
  tables (`tb_reconfigurator`, `tb_main_control_block`,
  `tb_combined_filter_block`, `tb_image_scaler_top`), so update them together.
- **Image height and threshold.** Set `LINES` and `THRESH` on the top.
- **Line width.** Follows `LINE_BITS` and `PIX_W` in the package.
