# Self-checking configuration memory for SRAM-based FPGAs

An SRAM-based FPGA keeps its whole function in configuration memory. A particle
strike that flips one of those bits (a single-event upset, SEU) can turn an AND in a
look-up table into an OR or reroute a net, and the error stays until the bit is
rewritten. This RTL models a configuration layer that watches itself for such
upsets and gets the damaged frame rewritten, without stopping the rest of the
device:

* every configuration cell gets a second, read-only port;
* through that port a scan reads one frame of every column per clock and takes its
  parity;
* each frame remembers the parity of its previous scan, and a frame whose parity
  changed between two scans has suffered an odd number of bit flips;
* the scan then stops, the column and frame address of the bad frame are offered on
  the SelectMAP configuration bus, and an external controller copies that frame from
  the original bitstream in flash back into the device;
* a RECOVERED write from the controller restarts the scan.

The architecture was published by E. Kamanu, P. Reddy, K. Hsu and M. Lukowiak ("A
New Architecture for Single-Event Detection & Reconfiguration of SRAM-based FPGAs",
HASE 2007). This is an independent RTL model of it. Where the published description
stops, for example at the bus protocol or the frame width, the choices made here are
listed under [Choices beyond the published architecture](#choices-beyond-the-published-architecture).

## Structure

```
                     +-------------------------------- fpga_device ---------------------------------+
 flash  <-- A,CE,OE  |                                                                               |
 (model) -- D -->    |   selectmap_port  --cfg_we/col/frame/data-->  port 1 of every config_column    |
   |                 |     ^  |  resolved, done                                                     |
   v                 |     |  v                                                                     |
 pr_controller <--SelectMAP--> seu_detection_controller --scan_sel[63:0], scan_en--> port 2 of all   |
   (external)        |          scan_counter, frame_decoder,                 columns                 |
                     |          enable_controller, column_encoder  <--col_fault[255:0]-- columns     |
                     +-------------------------------------------------------------------------------+
 config_column (x256): frame memory 64 x 512 bits, parity_tree on the port-2 data,
                       parity_tree on the port-1 write data, detection_block per frame,
                       OR of the 64 frame faults -> col_fault
```

| Module | Role |
|---|---|
| `seu_fpga_system` | Top: `fpga_device` and `pr_controller` joined by SelectMAP; flash, status, readback and upset-injection ports brought out |
| `fpga_device` | The FPGA's configuration layer: 256 `config_column`s, the detection controller and the SelectMAP device port |
| `config_column` | One column: dual-port frame memory, parity trees, one `detection_block` per frame, column fault OR |
| `parity_tree` | Balanced XOR tree, parity of one frame |
| `detection_block` | Two parity stores per frame (this scan, previous scan); fault = their XOR |
| `seu_detection_controller` | Scan counter, 6-to-64 decoder, enable controller, global fault OR, 256-to-8 column encoder |
| `scan_counter` | 6-bit frame counter; also holds the frame address of the last scan step |
| `frame_decoder` | 6-to-64 one-hot word-line decoder |
| `enable_controller` | Starts, freezes and restarts the scan |
| `column_encoder` | Priority encoder of the column faults into the 8-bit column address |
| `selectmap_port` | Device side of the SelectMAP bus: status reads, frame writes, RECOVERED |
| `pr_controller` | External partial-reconfiguration controller between flash and FPGA |
| `seu_pkg` | Sizes and the SelectMAP port-address enumeration |

## Sizes

| Parameter | Default | Where it comes from |
|---|---|---|
| `NUM_COLS` | 256 | 256-to-8 column encoder of the published controller |
| `NUM_FRAMES` | 64 | 6-bit scan counter and 6-to-64 decoder of the published controller |
| `FRAME_BITS` | 512 | chosen: 256 x 64 frames x 64 bytes is exactly the 2^20 bytes a 20-bit flash address reaches, and the published area figures put a frame at about 16 32-bit words |
| SelectMAP data | 8 bits | published bus drawing, D(0:7) |
| Enable settle stages | 2 | published enable-controller drawing |

The default device therefore holds 16384 frames, 8,388,608 configuration bits. That
is room for the Virtex XCV150 used as reference (its 2029 frames of about 500 bits
follow from the published area figures) but not for the largest Virtex parts, which
have more than 16 million bits; those would need about 489 columns and a wider column
address.

All modules take `NUM_COLS`, `NUM_FRAMES` and `FRAME_BITS` as parameters (powers of
two, `NUM_COLS` at most 256 and `NUM_FRAMES` at most 256 since addresses travel as one
SelectMAP byte, `FRAME_BITS` a multiple of 8).

## How a frame is checked

This is the part that needs the most care, because three things happen at clock
edges in a fixed order.

**Scan step.** `scan_counter.count` selects frame *i*; `frame_decoder` raises word
line *i* in every column, so port 2 of every column presents frame *i*. Each
column's scan `parity_tree` reduces it. If `scan_en` is high, at the clock edge the
`detection_block` of frame *i* shifts: `prev <= cur`, `cur <= parity`. The counter
advances to *i+1* and copies *i* into `frame_addr`.

**Fault.** `fault = cur ^ prev` is therefore visible one clock after frame *i* was
scanned, when the counter already points at *i+1*. That is why the reported frame
address is the separate `frame_addr` register, not the live count. The column's
`col_fault` is the OR of its 64 frame faults; `global_fault` is the OR of all
columns, combinational, and `enable_controller` drops `scan_en` in that same clock,
so frame *i+1* is not scanned and the counter freezes. Latency from an upset to
`global_fault`: at most `NUM_FRAMES + 1` clocks (65 at the defaults).

**Reference parity.** A frame written through port 1 loads the parity of the new
data into both of its stores. This clears its fault and makes the fresh contents the
reference for the next scan. Without it a repaired frame would compare the good
parity with the bad one still held in its store and be reported again.

**Freeze and restart.** `enable_controller` is a two-flip-flop chain that shifts in
ones and is cleared by `resolved`. Its output, `settled`, says two clocks have passed
since the last configuration event. `enable = settled & ~fault & ~resolved`. While the
faulty frame waits for repair its stores keep the fault, so the scan stays frozen and
`frame_addr`/`column_addr` stay valid for the controller to read. After the rewrite
the fault is gone; the RECOVERED write produces a one-clock `resolved`, and the scan
resumes two clocks later at the frame after the faulty one.

**Several faults.** All frames at one scan index are checked together. If two
columns fault at once, `column_encoder` reports the lowest one; after its repair and
Resolved the other is still faulting, so the scan stays frozen and the controller
repairs it next. A flip between two scans of the same frame is caught at its next
scan. An even number of flips within one frame leaves the parity unchanged and goes
unnoticed until another flip makes the count odd. This is a property of the parity
scheme, not of this model.

**Before DONE.** The memory powers up with arbitrary contents and the detection
stores reset to 0. The detection controller is held in reset until DONE, which is
set by the first RECOVERED write, i.e. after the controller's initial configuration
has loaded every frame and therefore every reference parity.

## SelectMAP device ports and the repair sequence

The controller sees four device ports, selected by `PORT ADD(1:0)`:

| Port | Address | Read | Write |
|---|---|---|---|
| GLOBAL FAULT | 00 | bit 0 = global fault | next byte of frame data |
| COLUMN ADDRESS | 01 | column address of the fault | column for the next frame write |
| FRAME ADDRESS | 10 | frame address of the fault | frame for the next frame write; restarts the byte count |
| RECOVERED | 11 | bit 0 = DONE | one-clock Resolved pulse, sets DONE |

The names and addresses are those of the published interface; the meanings of the
writes are this design's, since the original configuration data protocol is not part
of the architecture. A bus cycle is one clock with `cs` high, `write` high for data
into the device; reads are combinational. Frame bytes go least significant first;
after `FRAME_BITS/8` bytes the device writes the frame through port 1 on the next
clock.

`pr_controller` after reset copies every frame from flash (column-major, frame by
frame), then writes RECOVERED. From then on it reads GLOBAL FAULT every other clock.
On a fault it reads COLUMN ADDRESS and FRAME ADDRESS, writes them back as the target
address, streams the frame from flash and writes RECOVERED. Byte *b* of frame
(*c*, *f*) is at flash address `(c * NUM_FRAMES + f) * FRAME_BITS/8 + b`. The flash is
assumed to return data one clock after the address. The copy is pipelined one byte per
clock: 68 clocks per frame, so the initial configuration of the default device takes
about 1.11 million clocks. A repair takes about 75 clocks from the fault appearing to
the RECOVERED write. At 80 MHz that gives at most about 0.8 us to detect plus about 1 us
to repair. The published figure for a complete detection and correction sequence is
1.2 us; the difference is in the frame transfer, whose protocol is this design's.

## Choices beyond the published architecture

* **Detection stores.** The published detection block has two latches, a parity
  input, a word-line enable and an XOR output. Here they are edge-triggered stores
  updated in master/slave order at each scan step, plus the load-on-write described
  above.
* **One scan parity tree per column.** The architecture adds a parity tree to each
  frame. Only one frame per column is on the scan word line at a time, so one tree on
  the port-2 data of each column gives the same result. A second tree on the port-1
  write data supplies the reference parity.
* **`frame_addr` register** in `scan_counter`, because faults appear one clock after
  their scan step (see above).
* **Enable equation.** `settled & ~fault & ~resolved`, taken from the described
  behaviour (stop on a fault seen after settling, restart after Resolved).
* **DONE gating** of the scan until the initial configuration is complete.
* **Column priority**: lowest column first.
* **Bus protocol, flash layout and initial configuration by the controller**, as
  described above. INIT, BUSY, PROG and CCLK of the SelectMAP bus are not modelled;
  the bus runs on the system clock, and the bidirectional data bus is split into two
  one-way buses.
* **Memory model.** The eight-transistor dual-port cell is modelled as a register
  array with a read/write port and a read-only port. The memory is not reset.
* **Test ports.** `seu_flip/seu_col/seu_frame/seu_bit` invert one stored bit to model
  a strike; `readback_col/readback_frame/readback_data` read any frame through port 1.

Not modelled: the FPGA logic fabric that the configuration bits would control, and
the flash (a behavioural model, `tb/flash_model.sv`, serves the testbenches).

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/seu_pkg.sv tb/tb_flash_pkg.sv \
          tb/tb_seu_fpga_system.sv --top-module tb_seu_fpga_system -Mdir obj -o sim
obj/sim
```

| Testbench | What it covers |
|---|---|
| `tb_parity_tree` | 512- and 37-bit trees against a count of ones |
| `tb_detection_block` | random scan/load sequences against a reference model |
| `tb_frame_decoder`, `tb_column_encoder`, `tb_scan_counter` | exhaustive or random against reference values; wrap, hold, lowest-column priority |
| `tb_enable_controller` | start two clocks after reset, stop on fault, faults while settling, restart two clocks after Resolved |
| `tb_config_column` | 64 x 512 column: readback, clean sweeps, single upsets detected the clock after their scan, fault held, cleared by rewrite, double flip not detected |
| `tb_seu_detection_controller` | scan order, freeze with correct addresses, latency, two columns at one frame |
| `tb_selectmap_port` | every port read and write, frame assembly, Resolved/DONE |
| `tb_pr_controller` | initial configuration of every frame, idle polling, repair of reported frames |
| `tb_fpga_device` | device driven directly over SelectMAP: configure, detect, freeze, repair, restart |
| `tb_seu_fpga_system` | end to end at 8 x 16 x 64 bits: 20 single upsets, 4 two-column cases, 2 even-flip cases; counts each mechanism and fails if one never happened |
| `tb_seu_fpga_system_large` | 64 columns of full-size frames (64 x 512 bits): initial configuration of all 4096 frames (about 280,000 clocks), sampled readback, one single and one two-column repair |

The default-size model is heavy for a simulator: Verilator turns it into about 200 MB
of C++, and it runs at roughly 0.85 ms per clock, so the initial configuration of its
16384 frames (1.11 million clocks) takes about a quarter of an hour. The largest size
exercised by the testbenches here is therefore 64 columns of 64 x 512-bit frames. To
run the default size, instantiate `seu_fpga_system` without parameters in a copy of
`tb_seu_fpga_system_large`, with `NC = 256` and 8-bit column and 20-bit flash address
signals.

Assertions in `seu_detection_controller` check that the scan never advances while a
settled fault is present and that the encoder's valid output matches the global
fault.
