# Tear-free host access to an LCD driver's frame memory

An LCD driver IC with an embedded frame memory lets the host write a new image
only when the picture changes, while the driver keeps refreshing the panel from
the memory at its own frame rate (typically 60 Hz). Host and driver do not know
where the other one is in its scan. When the host's *writing scan* (the line it
is writing) overtakes or is overtaken by the driver's *display scan* (the line
being sent to the panel), one displayed frame shows the top of one image and the
bottom of another. On a hold-type display this is seen as a horizontal line
through the picture, and it gets worse when the host writes often (camera,
video, games), or writes the next image before the previous one is complete.

This design removes the crossing. From the write rate and the display rate it
works out the gate line, and the frame period, at which the host has to start
writing so that its scan stays clear of the display scan of the current frame
and of the next one, with a ±10 % allowance for rate tolerance. At that position
it gives the host an *accessing flag* one gate line long. When no safe position
exists, it either raises an overflow interrupt or, if the host has chosen to
ignore overflow, lets the host follow its own frame period.

## Timing model

Everything is measured in *gate-line times* of the display, counted from the
first active line of the current frame:

| symbol | meaning |
|---|---|
| `R` | gate resolution, active lines per frame (`gate_line`) |
| `P` | porch lines per frame, `bp + fp` |
| `T = R + P` | one display frame |
| `M = R / 10` | the 10 % margin, in lines |
| `W = T * dis_rate / wr_rate` | *write line*: time the host needs for one frame |

The host writes its `R` lines at the line rate of a display running at
`wr_rate`, so it writes line `k` at time `pos + k * dis_rate / wr_rate`. A
frame is clean if, for every line, the host writes it after the display has
shown it in the current frame and before the display shows it in the next
frame. The margin scans are the display scan sped up or slowed down by 10 %.

## The seven cases and the accessing position

The state machine sorts the rates into seven cases and picks the middle of the
window of safe start positions (integer division, rounded down):

| case | condition | state | accessing line | frame period |
|---|---|---|---|---|
| 1 | `dis_rate > 2 * wr_rate` | Slow_Overflow | — | — |
| 2 | slower, and `2R + P − M − W ≤ 0` | Slow_Overflow | — | — |
| 3 | slower, `10 wr < 9 dis` | Slow_Stable | `(2R + P − M − W) / 2` | `max(2, usr_fm)` |
| 4 | slower, within 10 % | Slow_Unstable | `(3R + P − 2W) / 2` | `max(2, usr_fm)` |
| 5 | equal | Same | `(3R + P − 2W) / 2` | `max(1, usr_fm)` |
| 6 | faster, within 10 % | Fast_Unstable | `(3R + P − 2W) / 2` | `max(1, usr_fm)` |
| 7 | faster, `10 wr > 11 dis` | Fast_Stable | `(2R + P + M − W) / 2` | `max(1, usr_fm)` |

Where the bounds come from:

* Case 3. The host is well behind the display. It may start at line 0: it
  starts after the display and moves more slowly, so it never catches up with
  the current frame. It must finish before the slow (−10 %) scan of the next
  frame ends, at `2R + P − M`, so its latest start is `2R + P − M − W`.
* Cases 4 to 6. The two scans run almost in parallel. The host must end after
  the fast margin scan of the current frame, so it starts no earlier than
  `R + M − W`. It must end before the slow margin scan of the next frame, so it
  starts no later than `2R + P − M − W`. The mean of the two bounds is
  `(3R + P − 2W) / 2`; the margins cancel.
* Case 7. The host is fast. It must end after the current frame's fast margin
  scan, so it starts no earlier than `R + M − W`. It must start before the next
  frame's first line, so no later than `R + P`.

When the host writes more slowly than the display (cases 3 and 4), one write
takes more than a frame. The flag therefore comes only every second frame, or
less often: the user frame period `usr_fm`, when larger, always wins. In the
overflow cases, with `ignore = 1` the host follows its own period: the flag
comes at line 0 every `max(usr_fm, 1 + W / T)` frames, and frames may still mix
images. With `ignore = 0` the interrupt is raised instead: the flag and
`overflow` stay high, and the host stops writing.

Example at the reset settings: 40 Hz writing, 60 Hz display, `R = 160`,
`P = 8`. This gives `W = 252`, Case 3, and the flag at line 30 of every second
frame. For 160 lines at a 60 Hz display, the start lines for writing at 40,
45, …, 90 Hz are 30, 44, 55, 61, 76, 89, 100, 105, 109, 113 and 116. The
writing then ends, to within 3 lines, at lines 271, 258, 247, 235, 236, 236,
237, 233, 229, 225 and 223. These are counted on from the start of the flag's
frame, so values above 168 fall in the next frame.

## State machine (`access_state_machine`)

```
Idle(0000) -> Freq_Compare(0001) -+- wr > dis -> Fast(0010) -+- beyond +10% -> Fast_Stable(0011) ---+
                                  |                          +- within      -> Fast_Unstable(0100) -+
                                  +- equal    -> Same(1101) ----------------------------------------+
                                  +- wr < dis -> Slow(0101) -+- dis > 2 wr -> Slow_Overflow(1001)   |
                                                             +- else -> Slow_Control(0110)          |
                       Slow_Control -+- 2R+P-M-W <= 0 -> Slow_Overflow                              |
                                     +- beyond -10%   -> Slow_Stable(0111) -------------------------+
                                     +- within        -> Slow_Unstable(1000) -----------------------+
                       Slow_Overflow -+- ignore -> Follow(1010) ------------------------------------+
                                      +- else   -> Interrupt(1011) ---------------------------------+
                                                                                   Flag(1100) <-----+
```

The machine passes one state per clock. Idle samples the settings. `W` is
computed in Freq_Compare. The accessing line and frame are loaded on the way
into Flag, and `pos_valid` is high in Flag. If any setting changes while the
machine is in Flag, it goes back through Idle and computes again, so the
accessing position follows the host. The 4-bit codes in brackets are the
state codes of `ldi_pkg::sm_state_e`.

## Blocks and signals

`ldi_access_top` wires six blocks in one clock domain:

* `setting_regs`: registers for the write rate, display rate, `gate_line`,
  `bp`, `fp`, `usr_fm` and `ignore`. They are written through
  `cfg_we`/`cfg_addr`/`cfg_wdata` at addresses 0 to 6, in that order. The reset
  values are 40 Hz, 60 Hz, 160, 4, 4, 0 and 1.
* `clk_generator`: two phase accumulators. They turn `rate × T` lines per
  second into one-cycle line strobes, `wr_tick` for the host and `dis_tick`
  for the display. These strobes take the place of the separate write and
  display clocks. The system clock frequency is the `CLK_HZ` parameter.
* `access_state_machine`: the case analysis above.
* `flag_generator`: compares (`nth_line`, `nth_frame`) with the scan position
  (`ln_cnt`, `fm_cnt`). The flag is registered and stays high for exactly one
  gate line. On an interrupt it holds `flag` and `overflow` high.
* `ram_display`: the frame memory, one `DATA_W`-bit word per gate line for
  `MAX_LINES` lines. Writes go to `lnk_cnt` on `wr_tick` while `cs_n` is low.
  On each `dis_tick` the scan counter `ln_cnt` steps through the active lines
  (`0 … R−1`), then the porch lines, and wraps at `T`. Each active line is
  read out on `data_dis` with a one-cycle `dis_valid`. `fm_cnt` counts frames
  from 1 up to `nth_frame` and wraps.
* `host_system`: the host side. Each rising flag (outside an overflow) starts
  the write of one image. It pulls `cs_n` low and writes lines `0 … R−1`, one
  per `wr_tick`. Each word is `{image number, line number[7:0]}`, so every line
  on the panel shows which image it came from. A flag that comes while a write
  is still running is ignored. This block also hands the `usr_fm` and
  `ignore` settings on to the state machine.

Parameters of the top: `CLK_HZ` = 50 MHz, `MAX_LINES` = 160 and `DATA_W` = 16.

## How far it is checked

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`.

* `tb_access_state_machine` checks the state path, `W`, the accessing line
  and frame, and the interrupt. The expected values come from a separate model
  of the case table. It also checks the 11 start lines listed above, the 40/60
  Hz example, the overflow paths, user periods, 40 random operating points,
  and restarts after a setting change.
* `tb_flag_generator`, `tb_ram_display`, `tb_clk_generator`, `tb_setting_regs`
  and `tb_host_system` check their blocks clock by clock against reference
  models.
* `tb_ldi_access_top` runs the whole design at its default parameters: 50 MHz,
  about 55 s of simulated panel time, and roughly a minute of Verilator run
  time. It sweeps the write rate from 40 to 90 Hz. At each rate it checks the
  measured start and end of the host's writing against the lists above, within
  3 lines. It checks that every flag comes at the computed position, lasts one
  line and repeats every `nth_frame` frames. It also checks that no displayed
  frame mixes two images. It then runs a user period, both overflow cases in
  follow mode and with the interrupt, and a return to normal operation. It
  counts every state and mechanism, and one that never happens is a failure.

## Where this RTL makes its own choices

The case conditions, formulas, state codes, the 2-frame rule and the block
structure are the original design's. The following are not:

* `W = T · dis / wr`. The write time is defined only as "measured in gate
  lines". This form reproduces the original example (`W = 252`) and the
  original start positions exactly.
* The 10 % decisions compare rates (`10·wr` against `9·dis` and `11·dis`). The
  Case 2 boundary is where the Case 3 position would reach 0.
* In follow mode the flag comes at line 0, every `max(usr_fm, 1 + W/T)` frames.
* The accessing line is clamped to `0 … T−1`. This only matters beyond a write
  rate of twice the display rate, which is the stated dynamic range.
* The porch lines come after the active lines. The chip select is active low.
  There is one memory word per gate line, and the pixels within a line are not
  modelled. The word width is 16 bits.
* The design runs in a single clock domain with line strobes. The system clock
  is 50 MHz.
* The settings are loaded through a small register port.
* The host model writes a test pattern. A real host supplies its own data,
  which would replace `data_wr`.

The LCD panel and the real host processor and its link are not part of the
RTL. The panel data comes out on `data_dis`.

## Simulating

With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ldi_pkg.sv \
    tb/tb_ldi_access_top.sv --top-module tb_ldi_access_top -Mdir obj
./obj/Vtb_ldi_access_top
```

Replace the testbench name to run a single block, for example
`tb_access_state_machine`. Every file holds one module or package, named as
the file. `rtl/ldi_pkg.sv` must come first because it holds the shared types
(`settings_t`, the state enum). For another panel, change `MAX_LINES` (for
example, 320 for a QVGA panel in portrait). Set `CLK_HZ` to the real system
clock; it must be well above `dis_rate × T`. The resolution, porches and rates
are run-time settings.

