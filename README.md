# MRP memory: a pixel-block store with many same-cycle read ports

A motion-estimation engine compares a block of the current video frame with
many candidate blocks of a reference frame, computing a sum of absolute
differences (SAD) for each. To evaluate several candidates in parallel, the
SAD datapath needs many rows of pixels per clock, and neighbouring candidates
overlap, so the same pixel row is often wanted by several consumers in the
same clock. FPGA block RAMs offer at most two ports. The usual alternatives
are:

- replicating the memory once per reader, which costs area;
- banking, where each bank serves one read per clock;
- time-multiplexing one port at a faster internal clock, which limits the
  system clock.

The multiplexed-read-port (MRP) memory takes another route. Every stored row
is wired to one multiplexer per read port, and the port's read address is that
multiplexer's select. Any number of read ports can then read any rows,
including the same row, in the same clock. No port ever waits, because nothing
is arbitrated, replicated or pumped. Writes come from the external frame
store, one bus word per clock, through a single write port.

This repository holds synthesizable SystemVerilog for the MRP memory and
self-checking testbenches for each part.

## Organisation of a pixel block

A row of the memory is one external-bus word, 64 bits by default, which is
8 luminance pixels of 8 bits. A block of video is stored as N *columns*.
Each column holds an 8-pixel-wide vertical strip of the block, one row per
pixel line:

| block size             | columns N | rows per column D | bits      |
|------------------------|-----------|-------------------|-----------|
| 16x16 (H.264/AVC)      | 16/8 = 2  | 16                | 2 048     |
| 64x64 (HEVC)           | 64/8 = 8  | 64                | 32 768    |

The defaults are the 16x16 configuration, with M = 5 read ports per column
(10 read ports in all). This is the configuration the architecture was
evaluated in. The HEVC size is reached by setting `N = 8, D = 64`.

```
             wr_en wr_col wr_addr wr_data
                 |     |     |     |
            +----v-----v-----v-----v----+
            |      mrp_write_demux      |   one column written per clock
            +--+---------+----------+---+
               |         |          |
         +-----v---+ +---v-----+  +-v-------+
         | column 0| | column 1|..|column N-1|  mrp_column: D rows of W bits,
         | M ports | | M ports |  | M ports |   one mux per read port
         +----+----+ +----+----+  +----+----+
              | M        | M           | M      (address out, data back)
         +----v----------v-------------v----+
 rd_en,  |          mrp_switch_box          |   routes P requests to column
 rd_col, |       (registered outputs)       |   ports, data back, 1 clock
 rd_row->+----------------+-----------------+
                          |
              rd_data / rd_valid / rd_conflict  (P = N*M ports)
```

## The column (`mrp_column`)

A column is D rows of W flip-flops with one write port: on a rising edge with
`we` high, `wdata` is stored in row `waddr`. Each of its M read ports is a
D-to-1 multiplexer over all rows, selected by that port's `raddr`. The read is
combinational from the stored rows. Several ports that present the same
address simply select the same row. A row written on an edge is seen by the
reads after that edge, so a read never sees half a write. An address at or
above D (possible when D is not a power of two) reads zero.

## Writing (`mrp_write_demux`)

The single write port carries the row data, the row address and a column
select. The demultiplexer passes enable, address and data only to the selected
column; the other columns see zeros. The architecture draws separate "data
select" and "address select" lines. Both pick the same column, so they are one
`wr_col` input here. Filling a 16x16 block takes 32 clocks, one 8-pixel row
per clock. An assertion checks that at most one column is written per clock.

## Reading through the switch box (`mrp_switch_box`)

This is the part that needs the most explanation.

**Port numbering.** The output read ports are numbered in column groups.
With the defaults, ports 0-4 form column 0's group and ports 5-9 form
column 1's group. Each port has a *home slot*, its position inside its group
(0-4).

**Requests.** Every output port `k` has its own request, made of `rd_en[k]`,
the column `rd_col[k]` and the row `rd_row[k]`. A port is not restricted to its
own column. Port `k` reaches column `c` through that column's read port
`home_slot(k) mod M_COL[c]`. When all columns have M ports, this is simply
`k mod M`.

**When every request is served.** Each column read port has at most one owner
per clock. A column port can be needed by several requests only if their
ports share a slot and they name the same column. Hence:

- All P ports are served together whenever, for every slot, the requests
  using it name different columns. Examples: every group reads its own
  column, or the groups read the columns in any permutation.
- Requests that need the same column port for the *same row* are all served.
  The row is shared at no cost. This is the common case in motion estimation,
  where overlapping candidates read the same line.

**Conflicts.** Two requests can need one column port for *different* rows.
Then the lowest-numbered output port gets the column port, and each other
request comes back with `rd_conflict` set and `rd_valid` clear. It is not
delayed or queued. A caller that keeps each group on distinct columns never
sees a conflict. A request naming a column at or above N is neither served nor
flagged.

**Timing.** The switch box registers its outputs. A request is set up before
a rising edge and sampled at that edge together with the column data. Right
after the edge, `rd_data`, `rd_valid` and `rd_conflict` hold the result until
the next edge. `rd_data` is zero for an unserved port. A read of the row being
written in the same clock returns the old contents:

```
clk          _/~\_/~\_/~\_
wr_en/addr   <W r3 >
rd_row[0]    <r3   ><r3  >
rd_data[0]         <old ><new >
```

An assertion checks that no port is ever both valid and in conflict.

### Different port counts per column

The number of read ports may differ from column to column. Each column can be
given the ports its share of the search needs, instead of the same M for all.
`M_COL` (type `mrp_pkg::ports_t`, one entry per column, up to 64 columns) sets
the counts, and the number of output ports becomes their sum. The same
home-slot rule applies. For example, with `M_COL = '{0:2, 1:5, 2:3, default:1}`
and N = 3, ports 0-1 belong to column 0, 2-6 to column 1 and 7-9 to
column 2. Port 5 (home slot 3) reads column 0 through that column's port
3 mod 2 = 1.

## Top level (`mrp_memory`)

`mrp_memory` connects the demultiplexer, N columns and the switch box.

| port                       | dir | width              | meaning                                      |
|----------------------------|-----|--------------------|----------------------------------------------|
| `clk`, `rst_n`             | in  | 1                  | clock; asynchronous active-low reset          |
| `wr_en`                    | in  | 1                  | write one row this clock                      |
| `wr_col`                   | in  | clog2(N)           | column to write                               |
| `wr_addr`                  | in  | clog2(D)           | row to write                                  |
| `wr_data`                  | in  | W                  | row data, W/8 pixels, pixel i in bits 8i+7:8i |
| `rd_en[P]`                 | in  | 1 each             | read request of output port k                 |
| `rd_col[P]`, `rd_row[P]`   | in  | clog2(N), clog2(D) | what port k reads                             |
| `rd_data[P]`               | out | W each             | row read, one clock after the request         |
| `rd_valid[P]`              | out | 1 each             | request served                                |
| `rd_conflict[P]`           | out | 1 each             | request refused (see above)                   |

Pixel order inside a row is whatever the writer uses; the testbenches put the
leftmost pixel of the strip in the low byte.

| parameter | default          | meaning                                |
|-----------|------------------|----------------------------------------|
| `W`       | 64               | row width = write-bus width, bits      |
| `D`       | 16               | rows per column                        |
| `N`       | 2                | columns                                |
| `M`       | 5                | read ports per column                  |
| `M_COL`   | `'{default: M}`  | per-column read-port counts            |

Reset clears all rows and all outputs.

## What is from the architecture, and what is this implementation's choice

These follow the architecture as described:

- columns of D rows with one write port;
- a multiplexer per read port, selected by its read address;
- a column-selected write of one bus word per clock;
- a switch box between the columns' read ports and the output ports;
- read-port counts that may differ per column;
- the default sizes.

These are choices made here, where the description gives no detail:

- **Read latency of one clock**, with the registers at the switch-box outputs.
  The columns themselves read combinationally.
- **The switch-box routing rule**: home slots, the fixed priority, and the
  `rd_conflict` flag. The architecture only says that any of the column read
  ports can be selected onto the outputs.
- **Reset behaviour**, and zero data for unserved ports and out-of-range
  addresses.
- **Storage in flip-flops.** The architecture stores the rows in FPGA
  distributed RAM. A generic array is used here, so the code does not depend
  on a vendor.

Not included:

- The SAD computation unit, the control unit and the external frame store
  around the memory. They are only named as the memory's surroundings. The
  write port is the interface to the frame store.
- The alternative memories the MRP scheme was compared against.

Generic synthesis of the default configuration gives 2 708 flip-flop bits:

- 2 048 bits of pixel storage;
- 640 bits of registered read data;
- 20 status bits.

The published Virtex-5 result for this configuration is 4 480 slice
registers, 4 543 LUTs and 335 MHz. Those numbers come from a vendor flow and
are not reproduced here.

## Files

| file                          | contents                                          |
|-------------------------------|---------------------------------------------------|
| `rtl/mrp_pkg.sv`              | default sizes, `ports_t`, port-numbering functions |
| `rtl/mrp_column.sv`           | one column                                        |
| `rtl/mrp_write_demux.sv`      | write-port column select                          |
| `rtl/mrp_switch_box.sv`       | request routing, conflict rule, output registers  |
| `rtl/mrp_memory.sv`           | top level                                         |
| `tb/tb_mrp_column.sv`         | column: random writes/reads, shared rows, write-then-read timing |
| `tb/tb_mrp_write_demux.sv`    | demultiplexer: every select, enable on and off    |
| `tb/tb_mrp_switch_box.sv`     | switch box against a column model: routing, sharing, conflicts, latency |
| `tb/tb_mrp_memory.sv`         | default-size top, end to end                      |
| `tb/tb_mrp_memory_hevc.sv`    | the same test at the 64x64 HEVC size (N = 8, D = 64, 40 ports) |
| `tb/tb_mrp_memory_mixed.sv`   | the same test with 2, 5 and 3 ports on three columns |

The end-to-end tests:

1. load a whole block, checking that it takes one clock per row;
2. read it back through all ports at once, checking the clock count: 4 clocks
   at the defaults, 13 for HEVC, and 8 for the mixed case, where the 2-port
   column sets the pace;
3. run random traffic against a reference model.

Each test counts the following events and fails if any of them never happened:

- all ports served in one clock;
- a row shared between ports;
- a read of a row in the clock it is written, returning the old data;
- a refused request;
- an idle port.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  --top-module tb_mrp_memory -y rtl -y tb +libext+.sv \
  rtl/mrp_pkg.sv tb/tb_mrp_memory.sv -o sim
./obj_dir/sim
```

Replace `tb_mrp_memory` with any other testbench name. Each testbench runs in
well under a second. The package must come first on the command line;
everything else is found through `-y`. To change the memory, set the
parameters of `mrp_memory`, and set the same values in a copy of the
end-to-end testbench; `tb_mrp_memory_hevc.sv` shows how.
