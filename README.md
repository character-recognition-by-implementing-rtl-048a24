# Character recognition with an on-chip-trained perceptron

This design recognises hand-drawn letters on a 4x4 grid. The user sets 16
toggle switches, one per grid cell, presses a button, and a single-layer
perceptron names the letter on a 16x2 character LCD. The network is not
loaded with pre-computed weights. After reset it starts from random weights
and trains itself on its built-in set of 29 characters: 20 English and
9 Arabic letters. Only then does it accept recognition requests.

The target is a Cyclone II FPGA on an Altera DE2 board. The design uses the
board's switches, push-buttons, LEDs, 256K x 16 asynchronous SRAM and
HD44780-type LCD. Everything is plain synthesizable SystemVerilog; the
bidirectional SRAM data bus is the only thing left for a board wrapper.

## Using it

| Board item  | Role |
|-------------|------|
| KEY0        | reset (active low); training starts again |
| SW17..SW2   | the 4x4 pattern, SW17 = top-left cell, row after row, up = filled |
| SW1..SW0    | which three Arabic letters are trained (group 0, 1, 2; 3 acts as 0) |
| KEY3        | recognise the pattern on the switches |
| LEDR17..0   | mirror the switches |
| LEDG0/1/2   | initialising / training / ready |
| LEDG3       | training converged |
| LEDG4       | a recognition result is shown |
| LEDG5/6/7   | Arabic group 0 / 1 / 2 is in use |

The network has 23 output neurons: the 20 English letters plus three Arabic
letters. The nine Arabic letters are split into three groups of three. If
SW1..SW0 change while the system is ready, it re-initialises and retrains for
the new group, which takes a few tens of milliseconds.

LCD contents:

```
while initialising     INITIALIZING     / PLEASE WAIT
while training         TRAINING EP 007  / PLEASE WAIT
ready                  .##.#..######..# / PRESS KEY3
after KEY3             .##.#..######..# / RESULT: A
training hit the limit .##.#..######..# / NOT CONVERGED
```

When ready, the top line always shows the switches live, one character per
cell ('#' filled, '.' empty), the four rows side by side. The bottom line
shows the last result. The LCD's character set has no Arabic letters, so
those are named in transliteration (ALIF, BA, TA, THA, JIM, HA, KHA, DAL,
DHAL). Initialisation lasts only 63 us, so its screen is seldom seen.

## The network

Each input is bipolar: a filled cell is +1 and an empty cell is -1. A
constant +1 bias input makes 17 weights per neuron. Neuron j computes

```
net_j = w_j,16 + sum over i=0..15 of (x_i ? +w_j,i : -w_j,i)
y_j   = +1 if net_j > THETA,  -1 if net_j < -THETA,  0 otherwise   (THETA = 0.2)
```

Because the inputs are ±1, the weighted sum needs no multiplications. Each
term is one floating-point add or subtract.

**Recognition.** The answer is the neuron with the largest `net_j`, not the
first neuron with `y_j = +1`. An input that matches no training pattern
still gets the nearest answer.

**Training.** This is the classic perceptron rule. Each pattern p in the
active set is presented once per epoch. Its own neuron has target
`t_p = +1`, and every other neuron has target `-1`. For each neuron with
`y_j != t_j`, every weight changes by

```
w_j,i  +=  ALPHA * t_j * x_i        (ALPHA = 0.5, x_16 = +1)
```

`ALPHA * t_j` is formed once per neuron with the ALU's multiplier. Each
weight is then updated with one add or subtract. Training stops after the
first epoch in which no weight changed, or after `MAX_EPOCH` epochs (100).
On this data set it always converges: with the default seed it takes 8 to 12
epochs, depending on the Arabic group.

Convergence is guaranteed. All 29 glyphs are different corners of the
16-dimensional cube. A plane can always cut one corner off from all the
others, so each neuron's "my letter against the rest" problem is linearly
separable. The perceptron convergence theorem then applies.

**Initial weights.** The sign and the 23 mantissa bits are random. The
exponent is 122..125, so magnitudes fall in [1/32, 1/2). The random bits
come from a 32-bit LFSR, which steps once per clock while each weight is
being written, seven steps between weights.

### One weight at a time

The engine (`ann`) is fully sequential. It has one floating-point unit and
one memory port, and every weight passes through both. This is the part of
the design that sets the speed. The weights live in the external SRAM, two
16-bit words per weight:

```
weight (j, i)  ->  32-bit word  j*17 + i      (i = 16 is the bias)
               ->  SRAM words   2*(j*17+i) (bits 15:0), 2*(j*17+i)+1 (bits 31:16)
```

Per neuron, the engine goes through these steps:

1. For i = 0..16, read the weight (1 cycle to issue and 7 to complete), then
   add or subtract it into the accumulator (2 cycles). That is 10 cycles per
   weight.
2. Compare net > THETA and -THETA > net (2 cycles each).
3. Compare net > best so far (2 cycles; skipped for neuron 0).
4. During training, if the output is wrong: multiply ALPHA by ±1 (2 cycles).
   Then for each of the 17 weights: read it (8 cycles), add or subtract the
   step (2 cycles), write it back (8 cycles).

| operation                          | cycles                     | at 50 MHz |
|------------------------------------|----------------------------|-----------|
| evaluate all 23 neurons            | 2 + 176 + 178*22 = 4,094   | 82 us     |
| extra per neuron whose weights change | 308                     | 6.2 us    |
| initialise 391 weights             | about 3,130                | 63 us     |
| one training epoch (23 patterns)   | about 94,000 + updates     | ~2 ms     |

A whole training run of 8 to 12 epochs takes roughly 20 to 30 ms.

### Arithmetic

`float_alu` works on IEEE-754 single precision. It supports add, subtract,
multiply and a greater-than compare, and gives its result one cycle after
the request. To keep it small:

- results are truncated (round toward zero);
- subnormals are flushed to zero;
- exponent overflow gives infinity;
- NaN and infinity inputs are not treated specially.

None of these cases come up with the weight ranges above. The compare treats
+0 and -0 as equal.

## Blocks

```
                 sw[17:2], KEY3            sw[1:0]
                      |                       |
                 key_edge            +--------+
                      v              v
              +------------------------+    char_rom (training set)
              |   train_supervisor     |----
              +------------------------+
                  | commands  ^ done, winner, updated
                  v           |
              +------------------------+---- lfsr
              |          ann           |---- float_alu
              +------------------------+---- sram_driver ---- SRAM chip
                                  result, state, epoch
                                          v
                  display_controller <-> lcd_driver ---- LCD module
```

| module             | what it does |
|--------------------|--------------|
| `ann_pkg`          | sizes (16 inputs, 23 outputs, 29 characters), float type, operation, command and state enums |
| `char_recog_top`   | wires the blocks to the board pins |
| `train_supervisor` | init, train until converged, recognise on request, retrain on group change |
| `ann`              | perceptron engine: `ANN_INIT`, `ANN_EVAL`, `ANN_TRAIN` commands |
| `float_alu`        | single-precision add/sub/mul/compare, 1-cycle latency |
| `lfsr`             | 32-bit Galois LFSR, x^32+x^22+x^2+x+1 |
| `sram_driver`      | 32-bit word port onto the 16-bit asynchronous SRAM |
| `char_rom`         | the 29 glyphs and their 4-letter names |
| `display_controller` | text of each LCD cell from the system state |
| `lcd_driver`       | HD44780 initialisation and continuous refresh |
| `key_edge`         | synchroniser and press detector for KEY3 |

### Handshakes and timing

- **ann command port.** Raise `cmd_valid` with `cmd`, `x` and `target`
  while `ready` is high. `done` pulses once at the end. `winner`,
  `winner_net`, `updated`, `y_pos` and `y_neg` then hold until the next
  command.
- **float_alu.** `in_valid` with `op`, `a` and `b`. `out_valid`, `result`
  and `flag` follow exactly one cycle later. A new operation may start every
  cycle.
- **sram_driver.** A `req` pulse while `ready` is high. Each 16-bit chip
  access has three cycles:
  - SETUP: address and data driven, CE low;
  - STROBE: OE_N or WE_N low, read data sampled at the end;
  - HOLD: strobe released, address and data held.

  A 32-bit word is two such accesses. `done` pulses seven cycles after the
  request, and `rdata` holds until the next request. At 50 MHz that is 20 ns
  of address set-up, a 20 ns strobe and 20 ns of hold, which suits a 10 ns
  part. The tristate data bus appears as `sram_dq_o`, `sram_dq_oe` and
  `sram_dq_i`.
- **lcd_driver.** Timing is set by these parameters (default cycles at
  50 MHz):

  | parameter     | default   | meaning |
  |---------------|-----------|---------|
  | `POWERUP_CYC` | 1,000,000 | 20 ms power-up delay |
  | `SETUP_CYC`   | 2         | RS/data set-up before E |
  | `EN_CYC`      | 16        | E high for 320 ns |
  | `CMD_CYC`     | 2,500     | 50 us per command |
  | `CLEAR_CYC`   | 100,000   | 2 ms after a clear |

  The initialisation sequence is 0x38, 0x0C, 0x01, 0x06. After that it
  refreshes forever: 0x80, 16 characters, 0xC0, 16 characters. One refresh
  takes about 1.7 ms. The driver asks the display controller for each cell
  on `char_addr` and samples `char_data` in the same cycle.
- **KEY3.** It is synchronised with two flip-flops and turned into a
  one-cycle `recog_req`. A press is ignored unless the system is ready.

All flip-flops have an asynchronous active-low reset.

## The training set

The glyphs are this design's own drawings. Bit 15 is the top-left cell.

| # | char | glyph | rows | # | char | glyph | rows |
|---|------|-------|------|---|------|-------|------|
| 0 | A | 69F9 | `.##.` `#..#` `####` `#..#` | 15 | P | E9E8 | `###.` `#..#` `###.` `#...` |
| 1 | B | EE9E | `###.` `###.` `#..#` `###.` | 16 | Q | 69B7 | `.##.` `#..#` `#.##` `.###` |
| 2 | C | 7887 | `.###` `#...` `#...` `.###` | 17 | R | E9E9 | `###.` `#..#` `###.` `#..#` |
| 3 | D | E99E | `###.` `#..#` `#..#` `###.` | 18 | S | 7C3E | `.###` `##..` `..##` `###.` |
| 4 | E | FE8F | `####` `###.` `#...` `####` | 19 | T | F666 | `####` `.##.` `.##.` `.##.` |
| 5 | F | FE88 | `####` `###.` `#...` `#...` | 20 | ALIF | 4444 | `.#..` `.#..` `.#..` `.#..` |
| 6 | G | 78B7 | `.###` `#...` `#.##` `.###` | 21 | BA | 9F04 | `#..#` `####` `....` `.#..` |
| 7 | H | 9F99 | `#..#` `####` `#..#` `#..#` | 22 | TA | 609F | `.##.` `....` `#..#` `####` |
| 8 | I | E44E | `###.` `.#..` `.#..` `###.` | 23 | THA | 4A9F | `.#..` `#.#.` `#..#` `####` |
| 9 | J | 3196 | `..##` `...#` `#..#` `.##.` | 24 | JIM | E247 | `###.` `..#.` `.#..` `.###` |
| 10 | K | 9AE9 | `#..#` `#.#.` `###.` `#..#` | 25 | HA | E487 | `###.` `.#..` `#...` `.###` |
| 11 | L | 888F | `#...` `#...` `#...` `####` | 26 | KHA | 4E87 | `.#..` `###.` `#...` `.###` |
| 12 | M | 9FF9 | `#..#` `####` `####` `#..#` | 27 | DAL | 211E | `..#.` `...#` `...#` `###.` |
| 13 | N | 9DB9 | `#..#` `##.#` `#.##` `#..#` | 28 | DHAL | A11E | `#.#.` `...#` `...#` `###.` |
| 14 | O | 6996 | `.##.` `#..#` `#..#` `.##.` | | | | |

The Arabic groups are entries 20-22 (group 0), 23-25 (group 1) and 26-28
(group 2). Neuron j < 20 stands for English letter j. Neuron 20+m stands for
entry 20 + 3*group + m.

## What is fixed and what is chosen

These points come from the original description of the system:

- a perceptron with 16 bipolar inputs and one output per character;
- 20 English and 9 Arabic training characters, only 3 Arabic trained at a time;
- the input on SW17..SW2 and the recognise button;
- the init, train and ready sequence, with no recognition during training;
- the block partition: supervisor, ANN, LFSR, floating-point unit, SRAM
  driver, LCD controller, LCD driver;
- the use of SRAM, LCD, switches and LEDs, and a multiplier in the
  arithmetic.

The following are this implementation's own choices, where the description
gave none:

- the glyphs and the letters chosen, and their LCD names;
- the Arabic group switch on SW1..SW0, and retraining when it changes;
- single-precision format and truncating arithmetic;
- the ±1/0 activation with THETA = 0.2 and ALPHA = 0.5;
- the winner-take-all readout;
- the stopping rule and `MAX_EPOCH`;
- the random weight range, LFSR polynomial and seed;
- the weight layout in SRAM and the SRAM access timing;
- the LCD layout, texts, command sequence and delays;
- the LED assignments;
- a 50 MHz clock, KEY0 as reset.

The original system's measured behaviour cannot be reproduced exactly.
Its glyphs, learning constants and random source are unknown. What this
design does reproduce is the reported outcome: every training character is
recognised.

Not included:

- the board's SRAM chip and LCD module, which are bought parts (the
  testbenches model them);
- the tristate pad for the SRAM data bus;
- any processor or software. The system is pure hardware.

## Simulation

Each testbench checks itself. It ends by printing
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
Testbench-only models are in `tb/`:

- `sram_chip_model`: a 256K x 16 asynchronous SRAM that also counts strobe
  and bus-protocol violations;
- `lcd_model`: an HD44780 subset that keeps the display memory and counts
  violations of the datasheet minimums;
- `tb_float_pkg`: converts single-precision values to reals for checking.

| testbench | what it checks |
|-----------|----------------|
| `tb_float_alu` | 3,000 random operand pairs through add, sub, mul (against double precision, within a few ulp) and compare; corner cases; 1-cycle latency |
| `tb_lfsr` | 20,000 steps against a bit-serial model of the polynomial, hold on `step` low |
| `tb_sram_driver` | 300 random words written and read back, both halves in the chip, 7-cycle access, no protocol violation |
| `tb_char_rom` | every glyph against its drawing, names, all glyphs distinct |
| `tb_display_controller` | the full screen in every state |
| `tb_lcd_driver` | power-up delay, command sequence, two refreshes, E width, data hold, gaps |
| `tb_ann` | random initial weights in range; 6 evaluations (nets, ±1/0 outputs, winner, exact cycle count); 40 training steps against the perceptron rule applied to a snapshot of the weights |
| `tb_train_supervisor` | full training for all three groups; after each, every trained pattern must give +1 on its own neuron and -1 on all others (checked from the weights in SRAM), and all 23 must be recognised; KEY3 during training ignored |
| `tb_train_limit` | training with `MAX_EPOCH` = 3: stops after exactly 3 epochs, not converged, still ready and still recognising |
| `tb_char_recog_top` | the whole board at default sizes and timing, through switches, KEY3 and the LCD only. It trains group 0, recognises its 23 characters from the LCD text, switches to groups 1 and 2 (retraining each time), and recognises the remaining Arabic letters and some English ones, so all 29 are seen. It counts initialisations, training screens, rising epochs, retrainings, ignored presses and recognitions. It runs in about 5 s (190 ms of board time). |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -Itb -y rtl -y tb \
    rtl/ann_pkg.sv tb/tb_float_pkg.sv tb/tb_char_recog_top.sv \
    --top-module tb_char_recog_top
./obj_dir/Vtb_char_recog_top
```

Swap in another testbench name to run it. The testbenches assume a 1 ns time unit, so that the 20 ns clock matches the LCD model's datasheet times. `tb_float_pkg.sv` is needed by
`tb_float_alu`, `tb_ann` and `tb_train_supervisor`.

## Changing it

- **Learning constants.** `ALPHA` and `THETA` are parameters of `ann` as
  single-precision bit patterns. The testbenches `tb_ann` and
  `tb_train_supervisor` hold matching `real` copies.
- **Network size.** The number of neurons follows `N_OUT` in `ann_pkg`.
  Widening the grid means changing `N_IN` and the glyph width in `char_rom`
  and `display_controller`.
- **Another clock.** Rescale the LCD timing parameters on `char_recog_top`.
  The SRAM timing assumes a clock period of at least 10 ns.
- **Faster evaluation.** Keep the weights in on-chip RAM, which removes 7 of
  every 10 cycles. Or use several ALUs in parallel. Both change `ann` only.
