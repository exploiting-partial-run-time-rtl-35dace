# Partial run-time reconfiguration for an FPGA coprocessor

An FPGA attached to a host processor as a coprocessor is normally
reconfigured as a whole. A new hardware function can then start only after
the complete device has been rewritten, which takes tens of milliseconds in
the best case and more than a second on real systems. When the tasks
themselves are short, this configuration time dominates.

This design splits the FPGA into a **static region** and two **partially
reconfigurable regions (PRRs)**. The static region holds everything that
never changes: the host interface, the memory interfaces, the FIFOs and a
**partial-reconfiguration controller**. Each PRR holds one hardware function
at a time. The host sends a partial bitstream for one PRR through the
ordinary host-to-FPGA data channel. The controller buffers it and writes it
into the device's internal configuration access port (ICAP). While that
happens, the other PRR keeps computing. Configuration time is therefore
hidden behind execution, and each configuration rewrites only a fraction of
the device. With the region sizes the design is based on, a dual-PRR
bitstream is 404168 bytes, against 2381764 bytes for the full device.

The hardware functions are three 3x3 image filters: median, Sobel edge
magnitude and smoothing. The application runs median → Sobel and
smoothing → Sobel on 8-bit grey-scale images. This is noise reduction
followed by edge extraction.

## Execution model, and what the hardware must make measurable

A task's time is compared with the time of a full configuration. Call the
ratio X_task; X_PRTR is the same ratio for a partial configuration. Without
partial reconfiguration, every task pays for a full configuration. With it,
a task pays only for whatever part of its region's configuration could not
be hidden behind the previous task in the other region. The gain over full
reconfiguration follows from this:

* It is at most about 2x when tasks take longer than a full configuration.
* It peaks near 1 / X_PRTR when the task time equals the partial
  configuration time.

The hardware therefore exposes both quantities as counters:

* `PR_CYCLES` holds the ICAP clock cycles of the last configuration.
* `TK_CYCLES` holds the core clock cycles of the last task.

A host can measure both terms of the model directly.

## Block structure

```
 host register port ──┬──► pr_controller ──ICAP bytes──► icap_virtex2 (model)
 (addr[15:12] = 0)    │     (200 MHz | 66 MHz)               │ cfg_loading / cfg_func
                      │                                      ▼ per region
 (addr[15:12] = 1+i)  └──► prr_task_ctrl[i] ──start──┐   ┌──────────────┐
                                                     ▼   │ prr[i]       │
 bank 2i ─► mem_reader ─► sync_fifo (in) ─────────────►  │ median       │
                                                         │ sobel        ├─► sync_fifo (out) ─► mem_writer ─► bank 2i+1
                                                         │ smoothing    │
                                                         └──────────────┘
```

| File | Role |
|---|---|
| `rtl/prtr_top.sv` | Top: one PR controller, one ICAP, and per region the task registers, reader, FIFOs, PRR and writer |
| `rtl/pr_controller.sv` | PR controller. It wraps the four blocks below |
| `rtl/pr_addr_decoder.sv` | Decodes host accesses to the controller; registered read data |
| `rtl/pr_ctrl_regs.sv` | CTRL/LENGTH/STATUS/CYCLES registers and the clock-domain handshake |
| `rtl/pr_bitstream_buffer.sv` | 16 Kb dual-clock buffer: 32-bit words in, bytes out |
| `rtl/pr_fsm.sv` | ICAP-side state machine that streams LENGTH bytes into the ICAP |
| `rtl/icap_virtex2.sv` | Behavioural model of the ICAP and of the regions' configuration memory |
| `rtl/prr.sv` | One reconfigurable region: the cores that may be loaded into it, and the selection among them |
| `rtl/prr_task_ctrl.sv` | Per-region task registers: image size, source and destination, start, done, cycle count |
| `rtl/mem_reader.sv`, `rtl/mem_writer.sv` | Stream pixels from one memory bank and into another |
| `rtl/sync_fifo.sv` | First-word-fall-through FIFO between each bank and its region |
| `rtl/window3x3.sv` | Two line buffers and a 3x3 register window shared by the cores |
| `rtl/median_filter.sv`, `rtl/sobel_filter.sv`, `rtl/smoothing_filter.sv` | The hardware functions |
| `rtl/cdc_sync.sv` | Two-flop synchroniser |
| `rtl/prtr_pkg.sv` | Types, function codes, register offsets |

Region i reads its input image from local memory bank 2i and writes its
result to bank 2i+1. This gives four banks for two regions.

## Configuration path

### Host protocol

All accesses are 32-bit register writes and reads. The register offsets
below are within the controller (host address bits 11:0, with bits 15:12
equal to 0).

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x000 | PR_CTRL | W | bit 0: start a configuration; bit 1: clear the done flag |
| 0x004 | PR_LENGTH | R/W | bitstream length in bytes. Ignored while busy |
| 0x008 | PR_STATUS | R | bit 0 busy, bit 1 done, bits 27:16 free 32-bit words in the buffer |
| 0x00C | PR_DATA | W | next 4 bitstream bytes. Byte 0 goes in bits 7:0 and is sent first |
| 0x010 | PR_CYCLES | R | ICAP clock cycles of the last configuration |

A configuration goes like this:

1. Write PR_LENGTH.
2. Write PR_CTRL = 1.
3. Write the bitstream to PR_DATA, as long as PR_STATUS shows free words.
4. Wait for the `pr_done` output, or for the done bit.

Words may also be written before the start. A write to PR_DATA while the
buffer is full is lost, and an assertion flags it in simulation. The host
must respect the free-word count.

### Clock domains

The host side and the buffer's write port run on `clk` (200 MHz). The state
machine, the buffer's read port and the ICAP run on `clk_icap` (66 MHz,
the ICAP's limit). Three things cross between them:

* The buffer uses Gray-coded read and write pointers, each synchronised
  into the other domain.
* Start is a toggle, synchronised into the ICAP domain. LENGTH is held
  stable while busy, so it can be sampled there without synchronisation.
* Done is a toggle going back. When it arrives, the registers latch the
  done flag and the cycle count.

### Timing

At full rate the ICAP takes one byte per `clk_icap` cycle. A bitstream of L
bytes gives PR_CYCLES = L + 1: the bytes themselves plus one flush cycle.
The 404168-byte dual-PRR bitstream takes 404169 cycles, which is 6.12 ms at
66 MHz. This is the lower bound on partial configuration time. If the
buffer runs empty, the state machine waits, and the count grows by the
waiting time.

### Bitstream format of the ICAP model

Real partial bitstreams encode device frames and cannot be generated or
checked in simulation. The model `icap_virtex2` therefore accepts a reduced
format with the same framing:

```
FF FF                     optional padding
AA 99 55 66               sync word
<region> <function>       target region index, function code (0 blank, 1 median, 2 Sobel, 3 smoothing)
<frame bytes ...>         any number of filler bytes standing for the frame data
30 00 80 01 00 00 00 0D   command-register write of DESYNC, ending the bitstream
```

From the header until the DESYNC, `cfg_loading[region]` is high. At the
DESYNC, `cfg_func[region]` takes the new function and `cfg_loading` falls.
Readback is not modelled: O reads zero and BUSY stays low. The state machine
ignores BUSY.

This file is the one non-synthesizable module in `rtl/`. It stands for the
device primitive plus the effect of configuration on the fabric. A real
implementation replaces it with the ICAP primitive.

## Reconfigurable regions

On the device a PRR is a fixed rectangle whose logic is replaced. Its
signals cross the region edge through fixed bus macros. In RTL, `prr`
instantiates all three cores and selects the one the configuration state
names. This is the usual way to simulate partial reconfiguration. While a
region is loading, the following hold:

* Its synchronised loading flag holds every core in reset.
* The input is not accepted and no output is produced.
* The function reads as blank.

The new function is taken only when loading ends. A region that is blank or
loading refuses a task start: the start is dropped, and the error bit in
TK_STATUS is set.

Synthesized as-is, the top would contain all three cores in both regions.
For a partial-reconfiguration flow, each core becomes its own
reconfigurable module behind the `prr` ports.

## Task path

### Task registers

Host addresses with bits 15:12 = 1 + i select region i. The offsets are:

| Offset | Name | Meaning |
|---|---|---|
| 0x000 | TK_CTRL | bit 0: start; bit 1: clear done/error |
| 0x004 | TK_STATUS | bit 0 busy, bit 1 done, bit 2 loading, bit 3 error, bits 11:8 configured function |
| 0x008 / 0x00C | TK_WIDTH / TK_HEIGHT | image size in pixels, 3 to IMG_W_MAX wide |
| 0x010 / 0x014 | TK_SRC / TK_DST | base byte addresses in the input and output banks |
| 0x018 | TK_CYCLES | `clk` cycles from start to the last result written |

A start does the following:

* The reader is loaded with width × height pixels from SRC.
* The core is started with the image size.
* The writer is loaded with (width − 2) × (height − 2) results to DST.

The task is done when the writer has written its last result. At that
point `task_done[i]` pulses.

### Streams and flow control

Every stream inside the region is valid/ready with one 8-bit pixel per
beat. The memory banks have fixed-latency, in-order reads, in the style of
QDR-II SRAM with separate read and write ports. The reader therefore issues
a read only while the following holds:

    FIFO occupancy + reads in flight < FIFO depth

This means the input FIFO can never overflow. The cores stall as a whole
when the output is not taken. The writer drains the output FIFO at one word
per cycle. With no stalls, a task on a W×H image takes about W·H + 9
cycles: one pixel per 200 MHz clock. The default 2048×2048 median task
measures 4194313 cycles.

### Filters

All three cores share `window3x3`:

* Two line buffers of IMG_W_MAX pixels and a 3x3 register window.
* An output for every pixel whose full 3x3 neighbourhood lies inside the
  image. A W×H image gives (W − 2) × (H − 2) results, in raster order.
* No border padding.

The result for a window is computed as follows:

* **Median**: the 5th smallest of the 9 pixels. It is computed by a
  9-input odd-even transposition sorting network.
* **Sobel**: |gx| + |gy|, saturated to 255. The kernels are
  gx = [−1 0 1; −2 0 2; −1 0 1] and gy = [−1 −2 −1; 0 0 0; 1 2 1].
* **Smoothing**: (Σ k·p + 8) >> 4 with the kernel [1 2 1; 2 4 2; 1 2 1]
  (a rounded binomial average).

Each core has a latency of two cycles from the window to the registered
output.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| NUM_PRR | 2 | top | reconfigurable regions (dual-region layout) |
| NUM_BANKS | 4 | top | local memory banks, two per region |
| AW | 22 | top, reader, writer | bank address bits: 4 MB per bank, 16 MB in all |
| IMG_W_MAX | 2048 | top, cores | line-buffer length. A 4 MB image is 2048 × 2048 |
| FIFO_DEPTH | 512 | top, reader | depth of each input and output FIFO (one 4 Kb block RAM of bytes) |
| BUF_BYTES | 2048 | top, PR controller | bitstream buffer: 16 Kb block RAM |

## Simulation

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog. With plain
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/prtr_pkg.sv tb/tb_ref_pkg.sv tb/tb_prtr_top.sv \
  --top-module tb_prtr_top -o sim --Mdir obj_tb_prtr_top
./obj_tb_prtr_top/sim
```

To run another testbench, substitute its name. The supporting files are:

* `tb/tb_ref_pkg.sv`: reference filters written independently of the RTL,
  plus a generator for the reduced bitstream format.
* `tb/qdr_bank_model.sv`: a fixed-latency memory bank.
* `tb/prtr_tb_harness.sv`: the end-to-end sequence, shared by both top-level
  testbenches.

The end-to-end sequence runs as follows:

1. Try a task on a blank region, which must be refused.
2. Configure region 0 with median.
3. Run median in region 0 while region 1 is configured to smoothing.
4. Run smoothing in region 1 while region 0 is reconfigured to Sobel.
5. Run Sobel on the median result.
6. Reconfigure region 1 to Sobel and run Sobel on the smoothing result.

Every output pixel is compared with the reference. The testbench also
counts the following, and fails if any of them never happens:

* refused starts;
* reconfigurations;
* configurations that overlapped a running task;
* cycles with the bitstream buffer full;
* uses of each core.

Two top-level testbenches run this sequence:

* `tb_prtr_top` uses a 160×100 image with short bitstreams and takes seconds.
* `tb_prtr_top_full` uses the top at its default parameters. It runs
  2048×2048 images with 404168-byte dual-PRR bitstreams, and takes about
  half a minute in Verilator. It checks 16.7 million values, and measures
  404169 ICAP cycles per configuration and 4194313 cycles per task.

A third testbench, `tb_prtr_top_single`, covers the single-region layout
(`NUM_PRR = 1`). It uses 887784-byte bitstreams and a 512×512 image. With
one region nothing can overlap, so the functions run in sequence. It also
tries a start half-way through every configuration, which must be refused.
The buffer is filled before each start, so every configuration must take
exactly LENGTH + 1 = 887785 ICAP cycles.

## Where this design departs from its source, and how far to trust it

The following follow the system the design is modelled on:

* the split into a static region and two PRRs;
* the PR controller's structure: decoder, registers, state machine and
  16 Kb block-RAM buffer feeding the ICAP;
* the 200 MHz and 66 MHz clocks and the 8-bit ICAP at one byte per cycle;
* two memory banks per region in 16 MB of QDR-II memory;
* FIFOs between the banks and the regions;
* the three filters and the application order;
* the bitstream sizes used for testing.

These are this design's own choices:

* All register maps and bit positions.
* The bitstream-buffer word format.
* The reduced bitstream format of the ICAP model.
* The task sequencing and refusal rule.
* The bank port protocol and read latency.
* The FIFO depth.
* The exact filter definitions: the median by sorting network, the Sobel
  magnitude as |gx| + |gy| with saturation, the smoothing kernel and its
  rounding, and interior-only outputs.
* Modelling a region by instantiating all its cores.
* Bank use with a single region. In the single-region layout the source
  system gives that region all four memory banks. Here, `NUM_PRR = 1` still
  uses only banks 0 and 1, and banks 2 and 3 stay idle.

These parts are not built:

* The host processor and its interconnect. Only register reads and writes
  at the FPGA edge are modelled.
* The vendor's host-interface core.
* The external memory chips. A behavioural bank stands in for them.
* The bus macros. They are only the `prr` port boundary.
* The FPGA's embedded processors.
* Full-device configuration. It is the baseline the design is compared
  against, not part of it.

What the testbenches establish:

* Each block matches an independent reference.
* The controller sends exactly LENGTH bytes at one per ICAP cycle.
* Configuration of one region really overlaps a task in the other.
* The data path sustains one pixel per cycle at 2048×2048.

What they cannot establish: anything about the real ICAP, real partial
bitstreams, or timing closure at 200 MHz on a device.
