# memory_sandbox: traffic generators for profiling FPGA HBM and DDR4

High-bandwidth memory on an FPGA such as the AMD/Xilinx Alveo U280 is reached through 32 AXI
ports, one per 256 MB pseudo-channel. Eight micro-switches sit between the ports and the memory;
each is a 4x4 crossbar that joins four ports to four pseudo-channels. What a kernel gets out of
this memory depends on several things:

- the burst length;
- whether it stays inside its own micro-switch;
- how many other masters aim at the same pseudo-channel;
- how random its addresses are, relative to the controller's row/column/bank layout.

This RTL is a tool for measuring those effects. Each memory port is driven by a *Configurable
Pattern Generator* (CPG), which stands in for a processing thread. Software programs every CPG
over AXI4-Lite with a burst size, a transaction count, a pseudo-channel range and an access mode.
The generator then sends the traffic and counts the cycles, the latency, the beats and any error
responses. A third mode replays the memory pattern of a sparse matrix-vector product (SpMV) over
four ports at once.

The design follows the hardware back end of a published FPGA memory-profiling tool of the same
name, whose original is written in VHDL. This is an independent SystemVerilog version. The section "Where this design departs or guesses" lists
everything that was filled in here.

## Structure

```
             AXI4-Lite x NUM_CPG (from a control CPU through an interconnect)
                 |            |                       |
            +----v---+   +----v---+              +----v---+
            |  cpg 0 |   |  cpg 1 |     ...      | cpg 31 |
            +----+---+   +----+---+              +----+---+
                 |a           |a                      |a
   +-------------v------------v---- group 0 ----------|----------+
   |  mode_selector x4  <--b--  spmv_trace_gen (4 streams)        |
   +------------------------------------------------------------- +
                 |m           |m        ...           |m
              AXI port 0   AXI port 1             AXI port 31   (to HBM / DDR4)
```

`memory_sandbox` (the top) holds `NUM_CPG` generators and one `mode_selector` per port. It also
holds one `spmv_trace_gen` per group of four ports, so there are eight on the 32-port HBM build. A
group of four ports matches one HBM micro-switch. A trace engine therefore keeps its four
streams inside one crossbar, and eight engines can run side by side without crossing into
another micro-switch.

The top brings out every interface the design leaves open:

- the per-generator AXI4-Lite slaves, as packed `[NUM_CPG]` arrays;
- the AXI master ports, as packed arrays;
- `trace_sel`, which shows which ports a trace engine currently drives.

The control CPU, the AXI interconnect and the memory itself are not part of the RTL.

### Memory kinds (`IS_DDR`)

| | HBM (`IS_DDR=0`, default) | DDR4 (`IS_DDR=1`) |
|---|---|---|
| AXI protocol | AXI3, burst length 4 bits (1..16 beats) | AXI4, burst length 8 bits (1..256 beats) |
| data width | 256 bits (32 B per beat) | 512 bits (64 B per beat) |
| address | 33 bits: pseudo-channel in [32:28], offset in [27:0] | 34 bits, one 16 GB bank |
| application bits (DRAM fields) | [27:5] | [33:6] |
| default port count `NUM_CPG` | 32 | 2 |
| intended clock | 450 MHz | 300 MHz |

There is one clock, `clk`, and one active-low asynchronous reset, `rst_n`. Each port is meant to
run at its memory's clock, so the whole top shares one clock.

## The pattern generator (`cpg`)

A CPG holds a register file (`cpg_regs`) and two independent paths, one for writes and one for
reads. They can run at the same time.

```
 seq_addr_gen --> rand_addr_gen --> axi_wr_engine --> AW, W, B
                                          |
                                    perf_counter (write)
 seq_addr_gen --> rand_addr_gen --> axi_rd_engine --> AR, R
                                          |
                                    perf_counter (read)
```

- **`seq_addr_gen`** makes the sequential pattern, a repeated walk through memory. It issues
  `Num_trans` bursts of `Burst_Size` beats at consecutive addresses. It starts at offset 0 of
  pseudo-channel `PSCH_Addrr_Init` and wraps at the end of that 256 MB pseudo-channel. On DDR4 it
  wraps at the end of the bank.
- **`rand_addr_gen`** is the random overlay. In random mode it replaces chosen address bits with
  bits of a 64-bit LFSR. The design-time choices are these:
  - `RAND_PSCH`: draw the pseudo-channel uniformly from `[PSCH_Addrr_Init, PSCH_Addrr_End]`.
  - `RAND_WHOLE_ADDR`: replace all application bits.
  - Otherwise, `RAND_BANK_GROUP`, `RAND_BANK`, `RAND_COL` and `RAND_ROW` each replace only that
    field.

  The fields are placed by the memory controller's address-mapping policy, the `POLICY`
  parameter. It must match the layout the controller is set to:

  | policy | layout, MSB first | | policy | layout, MSB first |
  |---|---|---|---|---|
  | `POL_HBM_RCB` | 14R-5C-2G-2B | | `POL_DDR_RCB` (DDR default) | 17R-7C-2B-2G |
  | `POL_HBM_BRC` | 2G-2B-14R-5C | | `POL_DDR_RCBI` | 17R-6C-2B-1C-2G |
  | `POL_HBM_BRGCG` | 2B-14R-1G-5C-1G | | `POL_DDR_BRC` | 2G-2B-17R-7C |
  | `POL_HBM_RBC` | 14R-2G-2B-5C | | `POL_DDR_RBC` | 17R-2G-2B-7C |
  | `POL_HBM_RGBCG` (HBM default) | 14R-1G-2B-5C-1G | | | |

  A random address is aligned down to the burst size, so every burst stays legal. The LFSR moves
  one step per random burst. It is seeded per port and per direction at reset, and it carries on
  from one run to the next.
- **`axi_wr_engine` / `axi_rd_engine`** are the AXI masters. Each keeps up to `MAX_OUTSTANDING` =
  32 bursts in flight and never waits for a response before issuing the next address. An HBM
  port accepts about 22, so the memory, not the generator, sets the limit.
  - Write bursts are queued. Their data beats go out in order, with the right `WLAST`.
  - Each 32-bit word of a write beat holds that beat's byte address.
  - `RREADY` and `BREADY` are always high.
  - Every port uses one fixed AXI ID, its port number, so responses return in order.
- **`perf_counter`** measures one direction of a run:
  - `cycles` runs from the first address valid to the last response. Throughput is then
    `Num_trans * Burst_Size * bytes_per_beat * f_clk / cycles`.
  - `latency` counts the cycles from the first address valid to the first response (B for
    writes, the first R beat for reads). The response cycle is not counted.
  - `beats` counts the data beats, and `errors` counts responses other than OKAY.

`Num_trans` counts bursts (AXI transactions), not beats. It is 33 bits wide.

### Register map (per generator, 32-bit AXI4-Lite, byte offsets)

| offset | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | W/R | write: bit 0 start write run, bit 1 start read run, bit 2 start trace run (one-shot). Bits [5:4] mode: 0 sequential, 1 random, 2 trace (read back) |
| 0x04 | STATUS | R | {trace done, trace busy, read done, write done, read busy, write busy} in bits [5:0] |
| 0x08 | BURST | R/W | `Burst_Size - 1` (reset 15 = 16 beats) |
| 0x0C / 0x10 | NTRANS_LO / HI | R/W | `Num_trans` bits [31:0] / bit 32 (reset 1) |
| 0x14 / 0x18 | PSCH_INIT / END | R/W | first / last pseudo-channel (5 bits) |
| 0x1C | XSTRIDE | R/W | trace mode: x element distance between the six x groups (reset 16) |
| 0x20 / 0x24 | WR_CYC | R | write run cycles, 64 bits |
| 0x28 / 0x2C | RD_CYC | R | read run cycles, 64 bits |
| 0x30 / 0x34 | WR_LAT / RD_LAT | R | first-response latency |
| 0x38 / 0x3C | WR_ERR / RD_ERR | R | error responses |
| 0x40 / 0x44 | WR_BEATS / RD_BEATS | R | data beats, low 32 bits |
| 0x48 / 0x4C | TR_CYC | R | trace run cycles, 64 bits (group leader only) |
| 0x50 / 0x54 | TR_ROWS / TR_ERR | R | rows finished and error responses of the trace run |

Writes honour the byte strobes, and every response is OKAY. A start bit is ignored while that
direction is busy, and the write and read start bits are ignored in trace mode. A typical run is:

1. Write BURST, NTRANS, PSCH_INIT and PSCH_END.
2. Write CTRL with the mode in [5:4] and the start bits in [1:0].
3. Poll STATUS until the done bits are set.
4. Read the counters.

## Trace mode: the SpMV access pattern

`spmv_trace_gen` turns a group of four ports into one SpMV kernel working on a matrix stored in
CSR form. The work is split into four streams, each with its own state machine and AXI master:

| port in group | stream | per matrix row r |
|---|---|---|
| 0 | indexes (read) | 108 bytes of column indices at `r * 108` |
| 1 | values (read) | 216 bytes of non-zero values at `r * 216` |
| 2 | x (read) | six groups of 24 bytes of vector x; group g starts at element `r + g * XSTRIDE` (8-byte elements) |
| 3 | y (write) | 8 bytes of the result at `r * 8`, with byte strobes |

Stream s lives in pseudo-channel `PSCH_Addrr_Init + s`, starting at offset 0. A byte span that
does not start on a beat boundary becomes one burst covering every beat it touches.

The order within a row is what makes this pattern differ from plain streaming:

1. The index and value reads start together when the row starts.
2. The x reads wait for the first index beat. In the real kernel the index values are the x
   addresses.
3. The y write waits until the index, value and all six x reads of the row are complete.
4. The next row starts only when the y write has been answered.

Because of this, x dominates the row time, and the index and value reads are hidden under it.
The cost is a gap between rows that the write forces. In the original measurements that gap
cost about 15% against a free-running stream of the same shape: 3.6 GB/s measured against an
ideal 4.2 GB/s per trace engine.

To run it:

1. On the group's first generator (port 4g), set the mode to trace (2).
2. Set NTRANS to the number of rows, PSCH_INIT to the first of the four pseudo-channels, and
   XSTRIDE.
3. Write CTRL bit 2.
4. Read the TR_* registers of that generator.

The other three generators of the group keep their registers, but they lose their ports while
the group is in trace mode.

### Handing a port over (`mode_selector`)

When the group leader's mode changes to or from trace, each of the four `mode_selector`s moves
its port to the new owner only once the port is quiet:

- no address valid;
- no write data still owed for an accepted address;
- no read or write burst waiting for its response.

Until then the old owner keeps the port and finishes its run. The side that is not selected sees
all its ready and valid inputs low, so it just waits. An assertion checks that the owner never
changes while a burst is open.

## Where this design departs or guesses

The original description names these blocks and says what they do, but not how. Everything below
is a choice made here.

- **The register map and the control protocol** (CTRL and STATUS bits, one-shot starts) are this
  design's own.
- **There is no AXI ID reordering.** The original's default controller setup used the ID feature
  to let responses come back out of order. These generators use one ID per port, so the
  controller cannot reorder across IDs. Expect throughput at or below what the ID feature gives.
- **Latency is measured per direction.** The original measured "from AWVALID to RREADY". Here
  write and read latency are counted separately, from the first address valid to the first
  response in that direction.
- **`Num_trans` counts bursts.** The original table defines it as transactions "(beats)", but
  its throughput formula multiplies it by the bytes of a whole transaction.
- **Randomising the whole address uses 23 bits on HBM.** The original table says "27 address
  bits", but its text and its mapping layouts put the application address in [27:5], which is 23
  bits. This design randomises [27:5], or [33:6] on DDR4.
- **The random number generator** (a 64-bit LFSR), the way the pseudo-channel is drawn
  (multiply and shift), and the burst alignment of random addresses are all assumed.
- **Write data contents** are not specified. This design uses an address pattern.
- **The SpMV addresses are synthetic.** The original replays a captured HPCG trace through an
  algorithm it does not publish. Here the x addresses follow a fixed stride formula and the
  streams start at offset 0. Only the per-row sizes and the ordering rules come from the
  original. The row count is `Num_trans`.
- **Trace groups follow the micro-switches.** One trace engine per four ports, and the group
  leader's mode register controls the group. The original does not say how the trace CPGs were
  placed.
- **DDR4 is a parameter setting.** The default build is the 32-port HBM one. Set `IS_DDR=1` to
  get the 2-port AXI4/512-bit build. With two ports there are no complete groups, so the DDR4
  build has no trace engine.
- **No 4 KB rule.** HBM bursts are aligned to their size and never cross 4 KB. DDR4 bursts of
  256 beats (16 KB) are issued as they are, as in the original's DDR4 measurements.

These parts are outside the RTL:

- the control CPU (a MicroBlaze in the original) and its AXI interconnect, which connect to the
  `s_*` ports;
- the HBM stacks, micro-switches and controllers, and the DDR4 banks, which connect to the
  `m_*` ports;
- the logic analyzer the original used for latency;
- the software front end.

The testbenches model one HBM port behaviourally in `tb/hbm_port_model.sv`. The model is an
in-order AXI slave with a fixed read and write latency and a limit on outstanding requests.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_seq_addr_gen` | addresses, burst lengths and counts, wrap at the 256 MB pseudo-channel end (2^19 bursts) |
| `tb_rand_addr_gen` | whole-address, bank-only and row+column settings: only the chosen bits change, they take many values, the pseudo-channel stays in range; disabled overlay passes addresses through |
| `tb_axi_wr_engine` / `tb_axi_rd_engine` | addresses and data under random stalls, stored data pattern, byte strobes, outstanding limit, full-rate streaming (64 x 16 beats in 1024 cycles after the latency), error responses |
| `tb_perf_counter` | cycles, latency, beats, errors against hand-worked event sequences |
| `tb_cpg_regs` | register read-back, strobes, start pulses, counter read-out |
| `tb_mode_selector` | switching only when the port is quiet, isolation of the idle side |
| `tb_spmv_trace_gen` | per-row burst addresses and sizes, x-after-index and y-after-reads ordering, row count |
| `tb_cpg` | sequential and random runs against the port model; latency equals the model's latency (14/48 cycles for 1-beat bursts, 17 for a 16-beat write); a DDR4 build (`IS_DDR=1`) with 256-beat bursts and 5/24-cycle latencies |
| `tb_memory_sandbox` | the full 32-port top at default parameters |

`tb_memory_sandbox` gives each port the latency of its pseudo-channel group: 14 to 37 write
cycles and 48 to 73 read cycles, rising by group. It then:

- runs all 32 generators at once;
- checks that the 22-request limit saturates every port;
- runs pseudo-random traffic across all 32 pseudo-channels;
- switches a group into trace mode while one of its ports is still busy, and checks that the
  switch waits;
- runs four SpMV rows;
- counts injected error responses.

It runs in well under a second of wall time after a build of about 20 seconds.

## Simulating

The sources need Verilator 5 with `--timing`. Always compile the package first:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_memory_sandbox rtl/ms_pkg.sv tb/tb_memory_sandbox.sv
./obj_dir/Vtb_memory_sandbox
```

Any other testbench is run the same way with its name. Because the simulator has no x state,
every testbench starts with `rst_n` high and pulls it low after 1 ns. That gives the
asynchronous reset a real edge. Keep this when writing new benches.

To build for DDR4, override the top's parameters, for example `-GIS_DDR=1`. The per-port
randomisation choices are bit vectors (`RAND_PSCH`, `RAND_WHOLE_ADDR`, `RAND_BANK_GROUP`,
`RAND_BANK`, `RAND_COL`, `RAND_ROW`), with bit p belonging to port p.

## Files

| file | contents |
|---|---|
| `rtl/ms_pkg.sv` | widths, mapping-policy masks, command/configuration/result structs, register offsets |
| `rtl/memory_sandbox.sv` | top: generators, mode selectors, trace engines per group |
| `rtl/cpg.sv` | one pattern generator |
| `rtl/cpg_regs.sv` | AXI4-Lite register file |
| `rtl/seq_addr_gen.sv`, `rtl/rand_addr_gen.sv` | address generation |
| `rtl/axi_wr_engine.sv`, `rtl/axi_rd_engine.sv` | AXI masters |
| `rtl/perf_counter.sv` | cycle, latency, beat and error counters |
| `rtl/mode_selector.sv` | port hand-over between generator and trace engine |
| `rtl/spmv_trace_gen.sv` | SpMV trace mode |
| `tb/hbm_port_model.sv` | behavioural AXI memory port used by the testbenches |
| `tb/tb_*.sv` | testbenches |
