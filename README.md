# Tile belief propagation with a single message memory

Belief propagation (BP) for stereo matching passes four messages per pixel:
from left, right, up and down, each a vector over all disparity labels. A
straightforward tile engine keeps four message memories, one per direction,
and they dominate the chip area. This design keeps **one**. Each pixel's word
holds the sum of two messages, and the sequencing makes sure the two halves of
that sum are never needed separately. A small one-line buffer covers the only
moment when they are.

At the default size (a 32×32 tile, 64 labels, 8-bit costs, 10-bit messages),
on-chip storage is:

| storage        | organisation          | size     |
|----------------|-----------------------|----------|
| data cost      | 1024 words × 64 × 8 b  | 64 KB    |
| message memory | 1024 words × 64 × 11 b | 88 KB    |
| line buffer    | 32 words × 64 × 11 b   | 2.75 KB  |
| total          |                       | 154.75 KB |

With four separate 10-bit message memories the total would be 64 + 320 = 384 KB.

The result is bit-exact min-sum BP. The end-to-end testbench compares every
intermediate sum against a reference that keeps four separate message arrays.

## Why one word per pixel is enough

One iteration sweeps the tile in four passes, in this order:

1. to the right (horizontal forward)
2. to the left (horizontal backward)
3. down (vertical forward)
4. up (vertical backward)

The message a pixel sends to the right is
`update(C + M_left + M_up + M_down)`. The message it sends to the left is
`update(C + M_right + M_up + M_down)`. In both horizontal passes the vertical
messages appear only as the sum `V = M_up + M_down`. In both vertical passes
the horizontal messages appear only as `H = M_left + M_right`.

So the message memory holds `V` while the horizontal passes run and `H` while
the vertical passes run. The trick is to overwrite `V` with `H` at the right
moment, with nothing lost.

Take one row, swept right and then left. `j` is the position along the line
and `M_last` is the message from the previous pixel of the sweep:

```
forward  (j = 0 .. N-1):   B[j]   = M_last
                           h      = M[j] + M_last + C[j]
                           M_last = update(h)

backward (j = N-1 .. 0):   temp   = M_last + B[j]      // = M_right + M_left = H
                           h      = M[j] + M_last + C[j]
                           M_last = update(h)
                           M[j]   = temp               // V is replaced by H
```

- **Forward step.** The word `M[j]` (still `V`) is only read. The message
  arriving from the left is parked in the line buffer `B`.
- **Backward step.** `M[j]` is read for the last time as `V`. In the same clock
  it is overwritten with `H`, the message arriving from the right plus the
  parked one.

The vertical passes run the same procedure on columns, with `H` and `V`
swapped. After the upward pass the memory holds `V` again, ready for the next
iteration.

Per pixel step this costs:

| step     | memory reads          | memory writes | sums                 |
|----------|-----------------------|---------------|----------------------|
| forward  | 2 (`M`, `C`)          | 1 (`B`)       | 2 (`h`)              |
| backward | 3 (`M`, `C`, `B`)     | 1 (`M`)       | 3 (`h`, `temp`)      |

### Scheduling and lanes

The engine has `LANES` processing lanes. Each lane has its own adders,
last-pixel register, N-entry line buffer and disparity selector, and sweeps
one line. A group of `LANES` rows is swept right and then straight back left.
Then comes the next group, and after all rows the same is done with groups of
columns, down and then up.

During the horizontal passes the rows do not depend on each other, because
they only read the stored `V`. So this order gives exactly the messages of
sweeping every row to the right before any row to the left. It is also what
lets one buffer line per lane serve the whole tile.

Each lane processes one pixel, with all labels in parallel, per clock. An
iteration therefore takes `4·N·N/LANES` cycles:

- **`LANES = 1` (default).** One 32-entry line buffer, the 154.75 KB total
  above, and 4096 cycles per iteration.
- **`LANES = N`.** One lane per row: a direction takes N cycles and an
  iteration 4·N (16 cycles for a 4×4 tile). The line buffer grows to N·N
  entries, as large again as the message memory.

With more than one lane, the cost and message memories are split into
`LANES` banks. Pixel `(r, c)` lives in bank `(r + c) mod LANES`, at word
`r·(N/LANES) + c/LANES`. In a horizontal pass lane `k` is on row `line+k`,
column `pos`; in a vertical pass on row `pos`, column `line+k`. Either way
lane `k` reaches bank `(pos + k) mod LANES`, so no two lanes ever share a bank.
A rotator by `pos mod LANES` connects lanes to banks.

## Blocks

All blocks are in `rtl/`; `bp_pkg` holds the shared sizes and the `pass_e`
enum.

- **`bp_ctrl`** is the sequencer. It produces `pass` (right, left, down or up),
  the first line of the current group `line`, the line position `pos`, lane 0's
  row-major pixel address `addr`, and two flags:
  `sweep_end` on the last pixel of a sweep, and `last_iter`. A `start` pulse
  while idle runs `iters` iterations. `busy` is high during the run, and `done`
  pulses once at the end.
- **`data_cost_mem`** holds one word per pixel with all D costs. There is one
  instance per bank, of `N·N/LANES` words.
- **`message_mem`** holds one word per pixel with all D combined (11-bit)
  messages. There is one instance per bank.
- **`line_buffer`** holds N words with all D labels. Entries are 11 bits wide
  and hold zero-extended 10-bit messages.

  The three memories above have a synchronous write and an asynchronous read.
  If the same address is read and written in one cycle, the read returns the
  old word; the backward step relies on this.
- **`bp_adders`** computes `h = M + M_last + C` for every label.
- **`temp_adder`** computes `temp = M_last + B[j]`, saturating at the 11-bit
  maximum.
- **`last_pixel_reg`** is the message-from-last-pixel register. It loads the
  updated message every step. It loads zero on the last step of each sweep and
  on start, so each sweep begins with a zero message from beyond the tile edge.
- **`wta`** produces the disparity output. It runs in the final upward pass,
  where `h + B[j]` is the full belief `C + M_left + M_right + M_up + M_down`.
  It outputs the label with the lowest belief, taking the lowest index on a tie.
- **`bp_top`** wires these together, with the lane and bank addressing.

### `bp_top` interface

| port | dir | meaning |
|------|-----|---------|
| `ld_en`, `ld_addr`, `ld_cost` | in | While idle, write the cost vector of pixel `row*N+col`; this also zeroes that pixel's message word. Load the whole tile before `start`. |
| `start`, `iters` | in | Run `iters` iterations (0 counts as 1), taking `iters·4·N·N/LANES` cycles. |
| `busy`, `done` | out | Run in progress; one-cycle pulse after the last step. |
| `mu_valid`, `mu_h[k]` | out | Per lane: the sum `h` for the current pixel; the input of the message-update function. |
| `mu_msg[k]` | in | Per lane: the updated D×10-bit message, returned **in the same cycle**. It is registered inside. |
| `disp_valid`, `disp_row[k]`, `disp_col[k]`, `disp[k]`, `disp_belief[k]` | out | One result per lane and cycle during the last upward pass. |

Assertions flag a load while busy, and lane-0 addressing that disagrees with
the controller.

## What is not inside, and other departures

- **The message-update function is external.** This engine leaves open the
  function that turns `h` into the outgoing message: the smoothness term, the
  truncation and the normalisation. `bp_top` therefore brings `h` out and takes
  the result back, combinationally in the same cycle. Pairing it with a
  pipelined update unit would need a matching stall or pipeline in `bp_ctrl`.
  The testbenches use `tb/msg_update_model.sv`, a min-sum update with
  truncated-linear smoothness (`min(8·|d−d'|, 40)`), normalised so its minimum
  is zero.
- **No boundary-message sharing between tiles.** Messages entering from outside
  the tile are zero, and messages leaving the tile are dropped. A full frame is
  processed tile by tile, so tile edges do not see their neighbours.
- **One lane by default.** Only with a single lane does storage come to
  154.75 KB. The one-unit-per-row timing needs `LANES = N`, which costs
  N·N buffer entries.
- **Asynchronous memory reads.** These keep the engine at one pixel per clock
  with no read pipeline. SRAM macros with registered outputs would need one
  more pipeline stage, with the write of `M[j]` delayed by one cycle to match.
  That delay is safe, because a backward sweep never returns to a position it
  has passed.
- **Tile loading and readout are this design's own choices:** zeroing on load,
  and winner-take-all in the last pass.
- A variant with two combined-message memories, one for `V` and one for `H`,
  uses the same adders but about twice the message storage. It is not
  provided.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bp_pkg.sv tb/tb_bp_top.sv \
          --top-module tb_bp_top -Mdir obj && ./obj/Vtb_bp_top
```

- **`tb_bp_top`** uses an 8×8 tile with 16 labels, four lanes, two tiles
  and three iterations. Its reference BP keeps separate left, right, up and
  down arrays.
  The testbench checks:
  - `h` at every step;
  - every disparity and belief;
  - that the message memory holds `M_up + M_down` after each run;
  - the exact cycle count;
  - that each pixel is visited once per pass and iteration.

  It also counts each mechanism: forward and backward steps, buffer writes,
  combined-message writes, boundary clears, clears on load, each pass
  direction, disparity outputs, lanes reaching other banks and repeated
  iterations.
- **`tb_bp_top_full`** runs the same test at the default size (32×32, 64
  labels, one lane) for ten iterations. It takes a few seconds.
- **`tb_bp_top_4x4`** runs it on a 4×4 tile with four lanes, where each
  iteration must take 16 cycles.
- The unit testbenches (`tb_bp_ctrl`, `tb_message_mem`, …) check each block
  against values computed inside the testbench.

To change the tile, label count, lane count or widths, override the
parameters of `bp_top`. `N` and `LANES` must be powers of two, with
`LANES ≤ N`. The default values live in `bp_pkg`.
