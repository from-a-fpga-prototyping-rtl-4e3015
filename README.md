# MANGO FPGA shell: turning a prototyping FPGA into an accelerator

A large FPGA prototyping cluster (the MANGO cluster: boards of Kintex UltraScale
XCKU115 FPGAs, each with a 2 GB DDR4 bank and a PCIe link to a host server)
was built to emulate chips. Emulation needs no host-visible accelerator
structure. To run real workloads, each FPGA gets a **shell**. The shell is a
small, fixed (static) block of logic that makes the device look like an OpenCL
accelerator: the host moves buffers to and from the board's DDR memory by DMA,
programs kernel clocks and kernel registers, and loads new kernels by
*partial reconfiguration* while the shell and the PCIe link keep running.

This repository is the synthesizable SystemVerilog for that static partition.
The vendor IP it connects to appears only at its ports: the PCIe endpoint, the
DMA engine, the DDR4 controller, the clock generators and the inter-FPGA
bridge. The testbenches stand in for that IP with behavioural models.

```
              host (PCIe + DMA engine, external)
                 | AXI4-Lite control        | AXI4 data (256 bit)
                 v                          v
          +-------------+            +-------------+      watches  +------------------+
          |  axil_xbar  |            |  axi_demux  |<--------------|  axi_perf_monitor|
          |  9 windows  |            |  2 windows  |               +--------+---------+
          +--+--+--+--+-+            +--+-------+--+                        | trace records
             |  |  |  |  \              |       |                           v
   OpenCL  GPIO GPIO GPIO  clk wiz x2,  DDR4   +------------------------------+
   region  iso  fid  cal   DDR4 ctrl   (ext)   |  trace_fifo (data + control) |
   (ext)    |                (ext)             +------------------------------+
            v
      pr_decoupler ---> blocks OpenCL region, DDR4 control and DDR4 data; holds them in reset
```

## Address map

The host sees two memory-mapped address spaces. The map is the published one:

| Space | Slave | Base | Size |
|---|---|---|---|
| AXI4 data | DDR4 memory | `0x0000_0000_0000_0000` | 2 GB |
| AXI4 data | trace offload FIFO (read side) | `0x0000_0020_0000_0000` | 2 GB window |
| AXI4-Lite control | OpenCL region (kernel control) | `0x0000_0000` | 128 KB |
| AXI4-Lite control | GPIO: partial-reconfiguration isolation | `0x0003_0000` | 4 KB |
| AXI4-Lite control | GPIO: feature ID | `0x0003_1000` | 4 KB |
| AXI4-Lite control | DDR4 calibration status | `0x0003_2000` | 4 KB |
| AXI4-Lite control | clock wizard, kernel clock 2 | `0x0005_0000` | 4 KB |
| AXI4-Lite control | clock wizard, kernel clock | `0x0005_1000` | 4 KB |
| AXI4-Lite control | DDR4 controller registers | `0x0006_0000` | 128 KB |
| AXI4-Lite control | AXI performance monitor | `0x0010_0000` | 64 KB |
| AXI4-Lite control | trace offload FIFO (status) | `0x0011_0000` | 4 KB |

An access that hits no window gets **DECERR**. For reads, the full burst
length of error beats is returned, so the host never hangs. The constants are
in `rtl/mango_pkg.sv` (`CTRL_BASE`, `CTRL_SIZE`, `DATA_*`). Both interconnects
take the windows as parameters.

## Partial reconfiguration: isolating the reconfigurable partition

This is the part that needs the most care. The platform uses *expanded* partial
reconfiguration, which keeps the static region as small as possible. So the
DDR4 controller, not just the kernels, lives in the reconfigurable partition.
While a new bitstream is loaded, the partition must be held in reset. The host
(or its DMA) must not be left waiting on a bus transaction that the partition
will never answer. The static side, including the PCIe link, keeps running.

`pr_decoupler` sequences this:

1. The host writes 1 to the isolation GPIO (`0x0003_0000`, bit 0).
2. `block` rises in the same cycle. From then on, the control crossbar answers
   any new access to the OpenCL region or to the DDR4 controller's registers
   with **SLVERR**. The data demux answers any new DMA burst to the DDR window
   with SLVERR (write data drained, `len+1` read beats generated). None of
   these accesses is forwarded.
3. Transactions already in flight to the partition finish normally. The
   interconnects report them on their `busy` outputs.
4. When nothing is in flight, `decoupled` is set and `region_rst_n` goes low.
   The host polls `decoupled` at GPIO input `0x0003_0008` bit 0 before it
   starts loading the bitstream.
5. The host writes 0 to the GPIO. Reset is released at once, and `block` one
   cycle later, so no access can reach logic that is still in reset.

Accesses to the static-side slaves (GPIOs, monitor, trace FIFO, clock wizards)
still work during isolation. An assertion in `pr_decoupler` checks that nothing
is in flight while the partition is decoupled.

## Data path and DMA bandwidth

`axi_demux` carries the DMA engine's 256-bit AXI4 port. Each direction (write,
read) carries one burst at a time:

- The address beat is steered to the decoded slave in the same cycle it
  arrives.
- The data beats then pass straight through, one per cycle.
- One idle cycle separates consecutive bursts in the same direction.

With 4 KB bursts (128 beats), which DMA engines use because AXI bursts may not
cross a 4 KB boundary, the shell sustains 96–98 % of one beat per cycle. At an
assumed 250 MHz shell clock that is about 7.7 GB/s for writes and 7.8 GB/s for
reads, measured in `tb_dma_sweep` for 64 B to 32 MB transfers. This is above
what a PCIe Gen3 x8 link (8 GB/s theoretical) delivers in practice. Measured
host-to-board DMA rates on the real platform were about 3 GB/s over Gen3 x4, so
the shell is not the bottleneck.

## Profiling: performance monitor and trace offload FIFO

`axi_perf_monitor` watches the DMA data port and never drives it. While
counting is enabled, it counts:

- write and read transactions;
- data beats in each direction;
- requested bytes, `(len+1) << size` per burst;
- enabled cycles.

When tracing is enabled, it also emits one 64-bit record per address
handshake:

| bits | 63 | 62 | 61:60 | 59:56 | 55:48 | 47:0 |
|---|---|---|---|---|---|---|
| field | valid (1) | write | 0 | AXI ID | burst len | timestamp (cycles since reset) |

If a write and a read address handshake fall in the same cycle, the read
record follows one cycle later. Two such collisions in consecutive cycles lose
one record, which is counted in `TRACE_LOST`.

Monitor registers (offsets from `0x0010_0000`):

| offset | register |
|---|---|
| `0x00` | CTRL: bit 0 count enable, bit 1 trace enable. Writing bit 31 = 1 clears all counters. |
| `0x08` / `0x0C` | enabled cycles, low / high word |
| `0x10` / `0x14` | write transactions / write beats |
| `0x18` / `0x1C` | write bytes, low / high word |
| `0x20` / `0x24` | read transactions / read beats |
| `0x28` / `0x2C` | read bytes, low / high word |
| `0x30` | `TRACE_LOST` |

The records go into `trace_fifo`, which holds 512 by default. The host drains
it with ordinary DMA reads of the data window at `0x20_0000_0000`:

- Each read beat pops one record into bits 63:0 of the beat.
- A beat read while the FIFO is empty is all zeros, so its valid bit is clear.
- Writes to this window get SLVERR.

Trace FIFO status registers (offsets from `0x0011_0000`):

| offset | register |
|---|---|
| `0x0` | occupancy (records held) |
| `0x4` | records dropped because the FIFO was full |
| `0x8` | write bit 0 = 1 to flush the FIFO and clear the drop count |
| `0xC` | depth |

## GPIOs

`axil_gpio` has one output register at `0x0` (read/write, byte strobes) and one
synchronised input at `0x8` (read-only). The shell uses three instances:

| Instance | Output at `0x0` | Input at `0x8` |
|---|---|---|
| PR isolation | bit 0 = isolation request | bit 0 = decoupled |
| feature ID | unused | the 32-bit `FEATURE_ID` parameter (default `0x4D41_0115`) |
| DDR4 calibration status | unused | bit 0 = `ddr_calib_done` |

## Modules

| File | Role |
|---|---|
| `rtl/mango_pkg.sv` | widths, AXI4 / AXI4-Lite request and response structs, address map, trace record type |
| `rtl/mango_shell.sv` | top level: the static partition |
| `rtl/axil_xbar.sv` | AXI4-Lite 1-to-N crossbar with DECERR/SLVERR handling and `blocked`/`busy` per slave |
| `rtl/axi_demux.sv` | AXI4 1-to-N burst demux with the same error handling |
| `rtl/pr_decoupler.sv` | isolation / reset sequencing for partial reconfiguration |
| `rtl/axil_gpio.sv` | GPIO register block |
| `rtl/axi_perf_monitor.sv` | counters and trace record generation |
| `rtl/trace_fifo.sv` | trace buffer with AXI4 drain port and AXI4-Lite status |
| `rtl/reset_sync.sv` | reset synchroniser (asynchronous assert, 2-stage synchronous release) |
| `rtl/axil_regif.sv`, `rtl/sync_fifo.sv` | helpers: AXI4-Lite to register strobes; show-ahead FIFO |

Each bus port is a pair of packed structs: `axil_req_t`/`axil_rsp_t` and
`axi_req_t`/`axi_rsp_t`, with AXI signal names as fields (`aw_valid`,
`w_data`, `r_last`, and so on). All logic runs on one clock with a synchronous
active-low reset, taken from `reset_sync`.

### Top-level ports (`mango_shell`)

| Port | Direction | Connects to |
|---|---|---|
| `clk`, `rst_n_i` | in | shell clock; raw reset (from the PCIe block) |
| `s_axil_req/rsp`, `s_axi_req/rsp` | slave | DMA engine's control and data masters |
| `m_axi_ddr_req/rsp`, `m_axil_ddr_req/rsp`, `ddr_calib_done` | master / in | DDR4 controller |
| `m_axil_clkw_req/rsp[1:0]` | master | `[0]` kernel clock wizard (`0x0005_1000`); `[1]` kernel clock 2 wizard (`0x0005_0000`) |
| `m_axil_ocl_req/rsp`, `region_rst_n` | master / out | OpenCL region (kernel control) and partition reset |
| `region_decoupled` | out | partition is isolated and in reset |

Parameters: `FEATURE_ID` (32 bit) and `TRACE_DEPTH` (default 512, a power of two).

## What is published and what is this design's own choice

**Follows the published platform**

- The set of static-partition blocks: clock/reset logic, interconnect, GPIOs
  for isolation and feature ID, DDR calibration status, performance monitor,
  trace offload FIFO.
- The complete control and data address maps.
- The two address spaces (AXI4 for data, AXI4-Lite for control).
- The DDR controller sitting in the reconfigurable partition.
- Holding the partition in reset during reconfiguration while the static side
  and PCIe link stay up.

**This design's own choices**

- Bus widths: AXI4 data 256 bit, address 64 bit, ID 4 bit; AXI4-Lite 32/32.
- One transaction per direction in each interconnect.
- DECERR/SLVERR behaviour.
- The isolation handshake: block at once, wait for idle, then reset.
- All register maps: GPIO, monitor, trace FIFO.
- The trace record format.
- The trace FIFO depth.
- The feature ID value.
- The reset synchroniser depth.
- The 250 MHz clock used to convert cycles to bandwidth.

These are the simplest designs that do what the blocks are described as doing.
The published platform uses vendor IP for several of them, such as the GPIOs
and the performance monitor. Register layouts therefore differ from that IP.

**Not included**

- The PCIe endpoint and DMA engine.
- The DDR4 controller and PHY.
- The clock-generating PLLs.
- The die-crossing interconnect used between the two dies of the stacked FPGA.
- User kernels.
- The Chip2Chip bridge that links FPGAs over SelectIO or Aurora. In the
  two-FPGA configuration it sits in the static region of both the master and
  the slave FPGA. Its link protocol is the vendor's, and it has no window in
  the address map above, so the shell exposes no port for it.
- Kernel-side access to DDR, which goes through the reconfigurable partition's
  own interconnect.

Without the Chip2Chip bridge, remote-FPGA transfers cannot be run.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog. Build and run
any of them with plain Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mango_shell \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/mango_pkg.sv tb/tb_mango_shell.sv
./obj_dir/Vtb_mango_shell
```

| Testbench | What it shows |
|---|---|
| `tb_mango_shell` | The whole shell at default parameters, end to end. Boot checks (feature ID, calibration); every external control slave reached; a 16 KB DMA write/read with profiling on; counters and 8 trace records checked; trace overflow (520 records into 512); a full isolation cycle with refused accesses and partition reset; unmapped accesses. It counts each of these mechanisms and fails if any never happened. |
| `tb_dma_sweep` | The data-size sweep, 64 B to 32 MB, through the shell to DDR. Every beat is compared, bandwidth is printed, and at least 90 % of one beat per cycle is required for transfers of 4 KB and more. |
| `tb_axil_xbar`, `tb_axi_demux` | Routing to every window, window edges, holes, blocking, `busy`, random traffic, streaming rate. |
| `tb_pr_decoupler`, `tb_axil_gpio`, `tb_axi_perf_monitor`, `tb_trace_fifo`, `tb_reset_sync` | Block-level behaviour against independent reference models. |

The behavioural models in `tb/` are listed below. They are not synthesizable.

| Model | Stands in for |
|---|---|
| `axi_mem_model` | DDR4 memory; sparse, optional random back-pressure |
| `axil_reg_model` | register-file slaves |
| `axi_master_bfm`, `axil_master_bfm` | the DMA engine's two masters |

Verilator's `-Wall` lint reports only unused-signal and unused-parameter
warnings. These come from bus fields a block does not need, such as the
monitor ignoring write data, and from package constants a given module does
not use.
