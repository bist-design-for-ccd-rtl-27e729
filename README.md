# On-line soft-test and repair of CCD pixel defects

A CCD cannot repair itself. No pixel on the sensor can stand in for a broken
neighbour. This design therefore finds defective pixels in the captured
images and repairs them *off the device*, in the frame memory. It sits next to
the CCD controller and shares that controller's frame memory. Its only extra
storage is a small flash that holds a **defect map**: one 3-bit code per pixel.
Hard defects are permanent and finite in number, so the map fills up over many
images and then stops changing. From then on, every image that leaves the frame
memory has its known-bad pixels replaced.

The design follows the architecture published as "BIST Design for CCD based
Digital Imaging System". It keeps that design's algorithm, block structure,
register count and default sizes. Where the original leaves details open, this
RTL makes its own choices, listed in [Own choices](#own-choices).

## The soft test: mean of the medium four

A pixel P5 is tested against its 3x3 neighbourhood:

1. Sort the eight neighbours. Drop the two darkest and the two brightest.
2. AVG = (sum of the remaining four) / 4. This is the *mean of the medium
   four* (MMF). The division is a 2-bit shift that truncates.
3. The pixel is normal if |AVG - P5| / AVG < C, with C = 0.1. The hardware
   evaluates |AVG - P5| * 10 < AVG, so there is no divider. C is set by the
   parameters `C_NUM`/`C_DEN`.

Dropping the extremes matters when neighbours are themselves defective. Up to
two stuck-black and two stuck-white neighbours cannot move the reference
value.

An abnormal pixel is placed in a fault class. The map codes are:

| code | meaning | rule used here |
|------|---------|----------------|
| 000 | stuck low | pixel value is 0 |
| 001 | low sensitive | abnormal, 0 < P5 < AVG |
| 010 | stuck high | pixel value is full scale (4095) |
| 011 | high sensitive | abnormal, AVG <= P5 < full scale |
| 100 | normal | passes the test |
| 111 | erased: not tested yet | state of a freshly erased flash |

A code with msb 0 is a *recorded defect*.

Two edge cases follow from the strict comparison:
- A neighbourhood with AVG = 0 (all black) fails the test.
- A deviation of exactly 10 % fails the test.

## Windows: repair, then test

The design works in **windows**. Each window processes one image, like this:

```
 start ──► REPAIR ────────────────────────► TEST ─────────────────────► done
           scan the whole map,              group after group, resume
           1 entry/cycle; for each          where the last window stopped;
           recorded defect load its         before each group: is the
           3x3, write AVG back over it      window's time used up?
           (skipped while the map is empty)
```

- **Repair.** The map is scanned in row-major order, one entry per cycle, with
  pipelined flash reads. For each recorded defect, its 3x3 neighbourhood is
  loaded. The MMF average of test circuit 1 is then written into the frame
  memory in place of the bad pixel. While no defect has been recorded, the
  repair is *null* and the scan is skipped.
- **Test.** Testing continues from the saved position. A centre pixel whose
  map entry already records a defect is not tested again. Its entry is never
  overwritten, so the map only accumulates. The image being tested has
  already been repaired, so known-bad pixels no longer disturb the MMF of
  their neighbours.
- **End of a window.** The window ends when its time runs out or at the end
  of a full pass over the image, whichever comes first. Time is counted in
  clock cycles from `start`. `window_len` is the time budget, and it is
  checked before each group starts. `win_timeout` and `win_pass_end` say
  which of the two ended the window.

The repair phase always runs to completion. On a large sensor it costs one
cycle per interior pixel, plus 12 cycles per repaired pixel. A window shorter
than that repair time therefore only repairs and never moves the test
forward. See [Results](#results).

## Parallel test circuits sharing one register chain

This is the part that needs the most care.

The pixel registers P[1]..P[N_REG] form a **shift chain**. Each pixel read
from the frame memory enters P[1]. Everything already in the chain moves one
place towards P[N_REG]. With N_TC test circuits:

    N_REG = 9 + 3 (N_TC - 1)          (15 registers for 3 test circuits)

Test circuit k (k = 1..N_TC) is hard-wired to P[3(k-1)+1] .. P[3(k-1)+9].
Neighbouring circuits share six registers, which hold two pixel columns.

A **group** is N_TC horizontally adjacent pixels under test. Its pixels are
loaded column by column, top to bottom within each column. That is N_TC+2
columns of 3 pixels:

```
 columns  c-1   c   c+1  c+2  c+3        (group of 3, centres c..c+2)
 loaded    1    4    7   10   13
 order     2    5    8   11   14
           3    6    9   12   15
```

After the last load, the pixel loaded last sits in P[1]. Test circuit 1
therefore sees the right-most 3x3 block (centre c+2), and test circuit N_TC
sees the left-most one (centre c). The register in the middle of each
circuit's nine is its centre pixel, P[3(k-1)+5]. Every group is loaded in full;
no columns are carried over from the previous group.

Groups are visited column-group by column-group, top to bottom inside each
column group. Only interior pixels, which have a full neighbourhood, are
tested. If the interior width is not a multiple of N_TC, the last column
group is shifted left so that it ends at the last interior column. A few
columns are then tested twice. This is harmless: a recorded defect is
skipped, and a normal pixel is simply rewritten.

The N_TC verdicts go to the flash one per cycle, through a multiplexer. While
the group is loading, the flash is free, so the old codes of the group's
centres are read at that time.

## Timing

| operation | cycles |
|-----------|--------|
| one test group | 1 decision + N_REG loads + 1 (read latency) + N_TC stores = N_REG + N_TC + 2 |
| | 12 for 1 test circuit, 20 for 3, 28 for 5 |
| repair scan | (W-2)(H-2) + 1, or 0 while nothing is recorded |
| each repaired pixel | +12 (9 loads, latency, write, restart of the scan) |
| window, ended by time-out | repair + 20 x groups + 1 (3 test circuits) |
| window, ended at end of pass | repair + 20 x groups |

A full pass over the default 4096 x 4096 sensor with 3 test circuits takes
1365 x 4094 groups x 20 = 111,766,200 cycles. With one test circuit it takes
4094² x 12 = 201,132,432 cycles.

The test circuits are purely combinational (sorting network, adder, shift,
comparators). Their verdicts are used while the registers hold still, during
the store cycles.

## Blocks

| module | role |
|--------|------|
| `bist_pkg` | map code enum, `is_defect`, register-count function |
| `ccd_bist_top` | wires everything; test circuits, verdict multiplexer, flash port sharing |
| `ccd_controller` | window sequencer: null/real repair, test groups, time budget, counters |
| `addr_gen` | test position, repair scan position, load counter, both memories' addresses |
| `loader_storer` | frame memory port: BIST loads (one shift per returned pixel), repair write-back, host access while idle |
| `pixel_regs` | the shared P[1]..P[N_REG] shift chain |
| `test_circuit` | SORT & SELECT 4, adder, divide by 4, comparator, fault class |
| `sort_select4` | odd-even transposition sort of 8 values, ranks 3..6 out |
| `frame_memory` | single read/write port SRAM, one word per pixel, 1-cycle read |
| `flash_memory` | **behavioural model** of the flash holding the map (idealised 1-cycle read and program, bulk erase one word per cycle) |

The CCD itself, the optics and the ADC are not part of the RTL. Their
digitised pixels enter through the `img_*` port.

## Using the top (`ccd_bist_top`)

Parameters (defaults): `PIX_W` = 12, `IMG_W` = `IMG_H` = 4096, `N_TC` = 3,
`C_NUM`/`C_DEN` = 1/10, `CW` = 32 (window counter width). `N_TC` may be any
value of 1 or more, up to `IMG_W` - 3.

Operating sequence:

1. Pulse `map_erase`. Wait until `map_busy` falls; this takes one cycle per
   pixel. The erase also clears `defect_count` and returns the test position
   to the first group.
2. Write an image through `img_en`/`img_we`/`img_addr`/`img_wdata`, one pixel
   per cycle. The address is row x `IMG_W` + column.
3. Pulse `start` with `window_len` set. `busy` stays high until `window_done`
   pulses. While `busy` is high, the host ports are ignored.
4. Read the repaired image (`img_en` with `img_we` = 0), or read the map
   (`map_rd_en`). Both return data one cycle later, flagged by
   `img_rvalid`/`map_rvalid`.
5. Repeat from step 2 with the next image.

Status outputs, valid after `window_done`:
- `cycles`: length of the window.
- `cnt_repaired`, `cnt_tested`, `cnt_skipped`: counts for that window.
- `defect_count`: total recorded defects.

The memories are the largest part of the design: 201 Mbit of frame memory and
50 Mbit of map at the default size. In a real chip, `frame_memory` would be an
SRAM macro. `flash_memory` would be replaced by the real flash with its own
program and erase timing, which the controller would then have to wait for.

## Own choices

These points are not fixed by the original architecture and were decided here:

- The pixel registers are a shift chain. It is fed only at P[1].
- Groups are reloaded in full (9 + 3(N_TC-1) loads each).
- Interior-only testing. The last column group is moved left to fit.
- The classification rule for the four fault classes.
- Truncating divide by 4. AVG = 0 counts as abnormal.
- The replacement value of a repaired pixel is its MMF average.
- The repair scans the whole map each window, row-major. It is skipped while
  nothing is recorded.
- A recorded pixel is never re-tested, and its code is never overwritten.
- The window is a run-time budget in clock cycles, checked before each group.
  A window also ends at the end of a pass.
- Code 111 means "erased/untested".
- The host ports, the bulk erase, the status counters and asynchronous
  active-low reset. The memories are not reset.

## Where this RTL departs from the original

- The original's step-by-step listing sorts all nine window values and sums
  sorted positions 3, 4, 6 and 7. Its block description sorts only the eight
  neighbours and forwards the middle four. This RTL follows the block
  description, so the pixel under test never enters its own reference.
- The original gives window lengths in nanoseconds (0.1 s to 5 s for a
  16-Mpixel sensor) and names no clock. Here the window is a count of clock
  cycles. At a 10 ns clock, 5 s is 5 x 10^8 cycles, which fits the 32-bit
  counter.
- The original reports that one test circuit is two to three times slower
  than three on large sensors. In this RTL the cost per pixel does not depend
  on sensor size, so the ratio is a constant 1.8.

## Results

Testing time for one pass over a flat frame (`tb_test_time`), in cycles:

| pixels | 1 TC | 2 TC | 3 TC | 5 TC |
|--------|------|------|------|------|
| 64 x 64 | 46,128 | 30,752 | 26,040 | 22,568 |
| 128 x 128 | 190,512 | 127,008 | 105,840 | 91,728 |
| 256 x 256 | 774,192 | 516,128 | 431,800 | 362,712 |
| 512 x 512 | 3,121,200 | 2,080,800 | 1,734,000 | 1,456,560 |
| 1024 x 1024 | 12,533,808 | 8,355,872 | 6,970,040 | 5,866,280 |

The full 4096 x 4096 sensor with three circuits takes 111,766,200 cycles per
pass (`tb_ccd_bist_full`). Three test circuits are 1.8 times faster than
one. Five are only 1.15 to 1.19 times faster than three, because each group still reloads its two edge columns and
the stores are serial. Three circuits are thus the cost-effective point.

Virtual yield is the share of output pixels within 10 % of the true value,
over repeated windows (`tb_virtual_yield`). The test uses a 32 x 32 sensor
with half-white, half-black defects. Window lengths are given as fractions
of a one-circuit pass:

- Long windows (0.36 and 0.6 of a pass) reach about 100 % within 1 to 5 windows.
- At 0.12 of a pass, the yield climbs slowly over many windows. It reaches
  99 % in 20 windows with one test circuit and in 9 with three, at 3 %
  defects.
- Shorter windows stay flat after the first window. Once defects are
  recorded, the repair scan alone fills the window, as explained above.

## Simulation

Every testbench is self-checking. Each one ends with a line
`TB_RESULT checks=N failures=M`. Example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/bist_pkg.sv tb/tb_ccd_bist_top.sv --top-module tb_ccd_bist_top
./obj_dir/Vtb_ccd_bist_top
```

| testbench | what it covers |
|-----------|----------------|
| `tb_sort_select4`, `tb_test_circuit` | sorting network, MMF test, threshold edge, all fault classes |
| `tb_pixel_regs`, `tb_addr_gen`, `tb_loader_storer` | shift chain; address sequences on a 9 x 6 image; port sharing and load latency |
| `tb_frame_memory`, `tb_flash_memory` | memories, erase time |
| `tb_ccd_controller` | sequencer against a reference: loads, stores, skips, counters, cycle formula |
| `tb_ccd_bist_top` (with `ccd_bist_e2e`) | end to end against a full reference model, with 1, 3 and 5 test circuits on 16 x 12 and 17 x 12 sensors: 7 windows with time-outs, repairs, passes and an erase; compares map and repaired image after every window |
| `tb_ccd_bist_full` | the default 4096 x 4096 configuration: one complete pass, all 16.7 M map entries checked (about 2.5 minutes) |
| `tb_test_time`, `tb_virtual_yield` | the two studies above |

The simulator is two-state. Everything that is read is either reset or
written before it is used. The flash is erased before a run.
