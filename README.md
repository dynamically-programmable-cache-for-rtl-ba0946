# Dynamically Programmable Cache (DPC)

Multimedia kernels such as motion estimation, convolution and run-length
coding touch each pixel only a few times. Hauling those pixels from the data
cache to the CPU's registers and back costs more than the arithmetic itself. The DPC
moves the arithmetic into the cache instead. Rows of small FPGA logical
elements sit between the lines of a level-1 data cache. A row reads its
operands from the lines beside it and writes its results back into them.
The data never leaves the cache.

To the CPU the unit is still an ordinary write-back data cache. It becomes an
accelerator only when configurations are written into it, and both uses can
be mixed from one cycle to the next. Each FPGA row keeps up to three
configurations in its own cache lines, called virtualization registers. Every
instruction names which of the three the row uses, so switching functions
costs no reconfiguration cycle.

## Organisation

| quantity | value |
|---|---|
| cache lines | 256 x 256 bits (32 bytes), 8 KB, direct mapped, write-back, write-allocate |
| FPGA fabric | 16 rows x 8 logical elements (LEs) |
| lines per FPGA row | 16 (row `r` owns the 512-byte block with address bits [12:9] = `r`) |
| virtualization registers | 3 per row: the first three lines of the row's block |
| LE | two 8-bit SRAM look-up tables (sum, carry) on 3 inputs, 4 result flops, output select |
| CPU port | 32-bit words, byte enables, request/acknowledge |
| instruction port | 256-bit I-cache bus, valid/ready |
| memory port | one 256-bit line per transfer, request/acknowledge |

```
             ibus (256)            cpu_* (32-bit)              mem_* (256-bit lines)
                 |                      |                              ^
           +-----v------+        +------v-----------+                  |
           | dpc_decoder|--cfg-->| cache_controller |------------------+
           +-----+------+        +---+---------+----+
                 | exec, ctx,        |         |
                 | rows, offset  tag_array  cache_data_array (256 lines)
                 |                   | cfg flags      | all lines / row stores
           +-----v-------------------v----------------v----+
           | fpga_fabric: 16 x (vr_select + fpga_row)       |
           |   fpga_row: 8 x (switch_box + logic_element)   |
           +------------------------------------------------+
```

Address split of `cpu_addr`: tag `[31:13]`, line index `[12:5]`, byte `[4:0]`.
The line index's upper four bits name the FPGA row, and its lower four bits the
line within that row's group. A program that wants row `r` to work on its data
places the data in the 512-byte block `r * 512 .. r * 512 + 511` (modulo 8 KB).
Lines 0 to 2 of that block are the row's virtualization registers. Lines 3 to 15
hold 416 bytes of operands and results.

## The logical element and the row

An LE (`logic_element`) is a pair of 8-entry SRAM look-up tables addressed by
the same three inputs. One table gives `sum`, the other `carry`, so the LE can
be a full-adder bit, a subtractor bit, an AND/OR/XOR gate or a comparator slice.
Behind `sum` is a four-flop shift register that records the last four
results. An output-select mux offers one of them back to the routing. This is
how a row keeps an accumulator, or a value from a few steps earlier, without
storing it to the cache. The history shifts only in cycles in which the row executes.

A row (`fpga_row`) is eight LEs on one byte: LE `i` handles bit `i`. A
switch box (`switch_box`) in front of each LE picks each of its three inputs
from eight sources:

| code | source |
|---|---|
| `SRC_ZERO` | constant 0 |
| `SRC_OPA`, `SRC_OPB` | bit `i` of operand byte A or B |
| `SRC_CARRY` | carry of LE `i-1`; for LE 0, the row carry-in (0, 1, previous row's carry, or its inverse) |
| `SRC_OWN_HIST` | this LE's selected history flop |
| `SRC_PREV_SUM` | bit `i` of the previous row's sum, same cycle |
| `SRC_PREV_SHL` | bit `i-1` of the previous row's sum (shift left by one) |
| `SRC_PREV_COUT` | the previous row's carry out |

The carries ripple from LE 0 to LE 7, so with full-adder tables a row is an
8-bit adder. Because a row can read the previous row's outputs in the same
cycle, several rows holding different configurations form a one-cycle
pipeline of operations. For example, a subtract row feeds an absolute-value
row, which feeds a two-row 16-bit accumulator. This is the mechanism behind
"two configurations executed in one cycle".

## Configurations and virtualization registers

A row configuration (`dpc_pkg::row_cfg_t`, 246 bits) fits in one cache line.
It holds the following fields:

- `le[8]`: sum table, carry table, output select and three switch-box sources for each LE.
- `opa`, `opb`: byte positions (line 0-15, byte 0-31) of the two operands within the row's block.
- `dst`, `store_en`: where the row's sum byte is written on each execute, if it is written at all.
- `cin_sel`: the row carry-in.

A configuration write puts a configuration into VR slot 0, 1 or 2 of a row,
which is line 0, 1 or 2 of its block. The tag entry of that line is flagged as
a configuration. It is no longer a data hit, and the row may now use it.
`vr_select` looks at the context named by the current instruction and hands
that VR's configuration to the row. If the VR holds no configuration, the row
sits out the cycle.

## Instructions on the I-cache bus

Bits [255:254] of the instruction are the opcode:

| op | fields | effect |
|---|---|---|
| `OP_EXEC` (1) | `[15:0]` row mask, `[17:16]` VR context, `[26:18]` offset | the masked rows execute once with that context; the offset is added to both operand positions |
| `OP_CFG` (2) | `[253:250]` row, `[249:248]` slot, `[245:0]` configuration | configuration write |
| `OP_NOP` (0) | none | nothing |

An execute is taken every cycle. Stepping the offset from 0 to N-1 walks a
stored configuration through N operand bytes, one per cycle. Rows in the same
instruction share the context number, but each row has its own configuration
under that number. The helper package `tb/dpc_cfg_lib.sv` builds
configurations and instruction words from named 3-input functions.

## Cache behaviour and timing

- **Data hit (read or write):** `cpu_ack` rises in the request cycle, and read data comes with it.
- **Data miss:** if the old line is dirty data, it is written back first. The new line is then fetched, and the access completes as a hit in the following cycle.
- **Configuration write:** takes one cycle (`ibus_ready` in the same cycle) when the target line does not hold dirty data. Otherwise that data is written back first.
- **Data access to a configuration line:** this is a miss. It reclaims the line for data and drops the configuration.
- **Fabric execution:** runs in parallel with CPU accesses. A row's store reaches the cache at the clock edge that ends the execute cycle. It marks the line dirty if the line holds valid data, so results reach memory when the line is evicted. If the controller and a row write the same byte in one cycle, the controller wins.
- **Line reads by the fabric:** a row reads whatever its lines contain. Before running a kernel, the program must make sure the operand and result lines are resident, for example by touching them once. A fill that lands on a result line during execution overwrites the stored results.
- **Priority:** a pending configuration write is served before a CPU access.
- **Request signals:** all requests (`cpu_req`, `ibus_valid` with a configuration, `mem_req`) are held until acknowledged.
- **Reset:** synchronous and active low. It clears all tags, all lines and all LE histories.

## Example kernels (as exercised by the testbenches)

*Sum of absolute differences* (the motion-estimation criterion) uses rows 4 to 7 and two contexts:

| row | context 0 | context 1 |
|---|---|---|
| 4 | `C - R`; carry out = `C >= R` | not configured |
| 5 | conditional negate: `x ^ ~ge` plus `~ge` | not configured |
| 6 | low accumulator byte: previous sum + own history | LUTs zero: clears the accumulator |
| 7 | high byte: own history + row 6 carry | LUTs zero: clears the accumulator |

One EXEC with context 1 clears the accumulator. Then one EXEC per pixel pair
with context 0 accumulates, with the offset stepping through the blocks. A
64-pixel SAD takes 1 + 64 execute cycles.

*Run-length compare and count* uses rows 8 and 9. Row 8 compares pixel `k`
with pixel `k+1` along its carry chain: the carry stays 1 while the bits are
equal, so the row carry out means "equal". Row 9 adds that carry to its own
history, one pixel pair per cycle.

## Where this design goes beyond its source

The source description gives the overall structure: a fabric of 8 x 16 LEs
between cache lines, 16 lines per row, 256-bit lines, a two-LUT LE with four
result flops, three virtualization registers that can switch every cycle, a
decoder fed from the I-cache bus, a write-back single-port cache, and one-cycle
configuration. It does not give the following, which are choices made here:

- The LUT input count (3).
- The switch-box sources and the row-to-row chaining.
- The placement of the VRs in the first three lines of each row's block.
- The configuration and instruction formats.
- Operand addressing with an execute offset.
- Direct mapping and write allocation.
- All handshakes, widths of the CPU and memory ports, and reset behaviour.

Two points depart from the source's wording rather than fill a gap:

- **Lines per configuration access:** the source says a configuration access replaces all 16 lines of a row. Here a row's 16-line block belongs to that row, but each configuration write fills only one VR line. The remaining lines stay available for data.
- **Clock:** the source evaluates the design at a 20 ns clock. No timing analysis has been done on this RTL, and the long combinational path through chained rows would be its critical path.

The source does not show how a multiplier is mapped onto its LEs, so no
multiplier configuration is provided. Convolution therefore has no worked
kernel here. A non-virtualized mode, in which every configuration change
costs a configuration write, is simply the case of using one VR. The CPU,
MMU, I-cache and main memory are outside this RTL. The sense amplifiers of
a real array are represented only by the read path of `cache_data_array`.

Capacity at the default size:

- **Motion estimation:** each SAD unit takes 4 rows, so at most 4 units run in parallel.
- **Run-length coding:** each routine takes 2 rows, so up to 7 fit (14 of 16 rows).
- **Per-row data:** a row has 416 bytes of data. A 526 x 438 8-bit image (230 KB) has to be streamed through the 8 KB cache block by block.

## Files and simulation

`rtl/` holds one module or package per file, with `dpc_pkg.sv` first:

- `dpc.sv`: the top-level module.
- `dpc_decoder.sv`, `cache_controller.sv`, `tag_array.sv` and `cache_data_array.sv`: the decoder and the cache.
- `fpga_fabric.sv`, `vr_select.sv`, `fpga_row.sv`, `switch_box.sv` and `logic_element.sv`: the FPGA fabric.

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`), plus
`main_memory_model.sv` (a behavioural line memory with a fixed latency) and
`dpc_cfg_lib.sv` (configuration builders). Each testbench prints
`TB_RESULT checks=N failures=M`. `tb_dpc` runs the whole unit at its full size.
It covers cache traffic, configuration writes (both clean and behind a dirty
write-back), the SAD and run-length kernels with context switching, CPU
accesses during execution, eviction of fabric results, and reclaiming of
configuration lines. It counts each of these mechanisms and fails if any
never happened. `tb_workloads` runs the two kernels at the
largest parallelism the fabric holds. It runs four SAD units on 8 x 8
macroblocks, then reconfigures the fabric in place for seven run-length
routines on 200-pixel rows. It checks each result, that every configuration
write takes one cycle, and that each step takes exactly one execute cycle. Last, it runs three
macroblocks through one SAD unit twice. The first run clears the
accumulator by switching to a second VR. The second run uses a single VR
per row, which must be rewritten with the clear and then the accumulate
configuration for every block. Per block that is 65 instruction cycles
against 69, and both runs produce the same results.

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/dpc_pkg.sv rtl/logic_element.sv rtl/switch_box.sv rtl/fpga_row.sv \
  rtl/vr_select.sv rtl/fpga_fabric.sv rtl/dpc_decoder.sv rtl/tag_array.sv \
  rtl/cache_data_array.sv rtl/cache_controller.sv rtl/dpc.sv \
  tb/dpc_cfg_lib.sv tb/main_memory_model.sv tb/tb_dpc.sv --top-module tb_dpc
./obj_dir/Vtb_dpc
```

The sizes are constants in `dpc_pkg`. The number of rows, the lines per row
and the number of VRs can be changed there. The instruction format assumes
16 rows and at most 4 contexts. The cache lines are flip-flops with reset, so
the whole 64-kbit array is visible to the fabric at once. A real
implementation would use SRAM with per-row read ports.
