# Serial-input hardware sorter with a UART test system

A data stream arrives one item at a time. The hardware keeps the most recent **N** items
sorted at all times. Each new item is sorted in within a single clock cycle, so a new item
can arrive on every clock. Typical uses are running minimum, maximum, median or rank
filters over a sliding window.

The main idea is that **data never moves**. An item is written once into one of N registers
and stays there until it becomes the oldest item and is overwritten. What changes is a
table of N *selections*: selection `k` names the register that holds the k-th smallest
item. Sorting therefore means updating N small indices, not shifting N wide words.

Around the sorter sits a small FPGA test system. A host PC sends items and commands over a
serial line, and after each item it gets one chosen value of the sorted window back. This
is how a sorter is exercised on a board.

Defaults: N = 25 items of W = 8 bits, ascending order, and a UART at 434 clocks per bit
(115200 baud from a 50 MHz clock).

## How the sorter works (`serial_sorter`)

```
            in_data ───────────────┬──────────────┬─────── ... ──┐
                                   │              │              │
 ┌───────────────┐  regs[0..N-1]  ┌▼────────────┐┌▼────────────┐  ┌▼──────────────┐
 │ sort_regfile  ├───────────────►│mux_comp. 0  ││mux_comp. 1  │..│mux_comp. N-1  │
 │ R0..R(N-1)    │                │ regs[sel0]  ││ regs[sel1]  │  │ regs[sel N-1] │
 │ wr_ptr mod N  │                └─┬────────┬──┘└─┬────────┬──┘  └─┬───────────┬─┘
 └──────┬────────┘          sorted[0]  after[0] sorted[1] after[1]   sorted[N-1] after[N-1]
        │ wr_ptr                         │                 │                     │
        └──────────────────────►┌────────▼─────────────────▼─────────────────────▼─┐
                                │ sel_update: next selections, selection registers │
                                └──────────────────────┬───────────────────────────┘
                                                       └──► sel[0..N-1] back to the muxes
```

**Registers (`sort_regfile`).** Items are written in circular order: R0, R1, …, R(N-1),
then R0 again. A modulo-N counter `wr_ptr` names the register written next. That register
always holds the oldest item, so each write replaces the oldest item of the window.

**Multiplexer-comparator pairs (`mux_comparator`).** Pair k is an N-to-1 multiplexer
driven by `sel[k]`, so its output is the k-th element of the sorted window. The `sorted`
output is simply these N multiplexer outputs. Each pair also compares its element with the
incoming item and raises `after[k]` when the new item belongs behind it. That is
`new >= value` in ascending order and `new <= value` in descending order. An item equal to
stored items goes behind them.

**Selection update (`sel_update`).** In a sorted list the comparator pattern is a
thermometer: `after` is 1 up to some position and 0 beyond it, and the new item goes where
the pattern switches. One entry is special, the one at the position of the register that
is about to be overwritten. Its comparator is meaningless, and its position must be closed
up. With `rm[k]` = "the overwritten entry sits at position k or lower" (a prefix OR of
`sel[j] == wr_ptr`), every position k computes:

```
a'[k] = rm[k] ? after[k+1] : after[k]      comparator bit of the k-th surviving entry (a'[N-1] = 0)
s'[k] = rm[k] ? sel[k+1]   : sel[k]        its register
next[k] = a'[k]                  ? s'[k]      entries before the new item
        : (k == 0 || a'[k-1])    ? wr_ptr     the new item itself
        :                          s'[k-1]    entries behind it move up by one
```

Worked example, N = 5. The registers hold R0..R4 = 7, 3, 9, 1, 5, and `wr_ptr` = 0, so
7 is the oldest item. The selections are `sel` = 3, 1, 4, 0, 2 (values 1, 3, 5, 7, 9).
Item 4 arrives.

- Comparators: `after` = 1, 1, 0, x, 0. Position 3 holds R0, the register being replaced.
- Prefix OR: `rm` = 0, 0, 0, 1, 1.
- Surviving entries: `a'` = 1, 1, 0, 0, 0 and `s'` = 3, 1, 4, 2.
- Result: `next` = 3, 1, **0**, 4, 2. R0 now holds 4, so the values read 1, 3, 4, 5, 9.

Each position looks only at its own and its neighbours' signals, plus the prefix OR, so
the logic grows linearly with N. The comparators and the update are one combinational
path, from the selection registers through the multiplexers, comparators and update logic
back to the selection registers. That path sets the clock rate.

**Timing.** Raise `in_valid` with `in_data` for one clock. At that clock edge the item is
written and the selections are updated. From the next clock on, `sorted`, `min_o`,
`max_o`, `median_o` and `pos_o` show the new window, and `res_valid` pulses once. Items may
arrive on consecutive clocks.

**Start-up.** Reset and `clear` set all registers to zero and the selections to
`sel[k] = k`, so the window starts as N zeros. This is already sorted. Until N items have
arrived, the window holds the items received so far plus the remaining zeros.

**Outputs (`sort_outputs`).** The block gives the minimum, the maximum, the median and the
element at a run-time position `pos`. These hold in either sort order: in descending order,
element 0 is the maximum. For an even N the median is the lower middle element. A `pos` of
N or more returns the last element.

## The UART test system (`sort_test_system`)

```
rxd ─► uart_rx ─┬─ data packets ─► input_adapter ─► control_module ─► serial_sorter
                └─ commands ────► cmd_module ──┐       │  ▲  (feed / stall / halt)   │ min/max/median/pos
                                               └──────►│  │                         ▼ (mode mux)
txd ◄─ uart_tx ◄──── messages / result packets ◄───────┘  └──────────── result_adapter
```

**Serial words.** Every 8-bit word carries a tag in its MSB: 0 means a data packet with 7
payload bits, 1 means a command (host to system) or a message (system to host). A W-bit
item therefore takes ⌈W/7⌉ packets: two for 8 bits, four for 24 bits. The most significant
payload comes first. Results travel back packed the same way. The frame is 8N1.

**Commands** (word = `1` followed by the 7-bit code, constants in `sort_pkg`):

| code | name | effect |
|---|---|---|
| `01` | CONNECT | system answers with the ACK message |
| `02` | CLEAR | window back to zeros, partial input dropped, warn/err cleared |
| `03` | HALT | stop feeding the sorter and stop sending results (messages still go out) |
| `04` | RUN | resume |
| `10`+m | MODE | value returned per item: m = 0 min, 1 max, 2 median, 3 chosen position |
| `40`+p | POS | chosen position p (6 bits) |

Any other code is answered with BAD_CMD.

**Messages** (system to host): `81` ACK, `82` OVERFLOW (warning: an input item was lost),
`83` BAD_CMD, `84` FRAME (a received word had a 0 stop bit). The `warn` output stays set
after an overflow until CLEAR. The `err` output does the same after BAD_CMD or FRAME.

**Flow control, the subtle part.** A serial line cannot be paused, so the input side must
absorb mismatches.

- **Holding register.** `input_adapter` keeps one finished item in a holding register
  while it collects the next one.
- **Feeding.** `control_module` passes the held item to the sorter only when all three are
  true: the result adapter is empty, no result is on its way to it, and the system is not
  halted. Otherwise the item waits. This is a *stall*: the sorter itself is never stopped
  in the middle of an update, so every item that enters it yields one result.
- **Overflow.** If another item is completed while the holding register is still full,
  that new item is discarded. OVERFLOW is queued, and `warn` is set.
- **Messages.** There is one pending flag per message kind. A repeated event of the same
  kind merges into the message not yet sent. Messages go ahead of result packets, at word
  boundaries, in the order ACK, BAD_CMD, FRAME, OVERFLOW.

With equal baud rates the result path keeps up exactly, because one item in means one
result out with the same number of words. A host whose clock runs a few percent fast makes
results fall behind slowly. Stalls then absorb the difference, and only a long burst ends
in OVERFLOW.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `serial_sorter`, `sort_test_system` | `N` | 25 | window length (number of registers and multiplexer-comparator pairs) |
| | `W` | 8 | item width in bits |
| | `ASCENDING` | 1 | 1: element 0 is the smallest; 0: the largest |
| `sort_test_system`, `uart_rx`, `uart_tx` | `CLKS_PER_BIT` | 434 | clocks per serial bit |

The POS command carries 6 bits, so a position can be set in windows of up to 64 items.
Reset is synchronous and active high throughout.

## Files

`rtl/`: `sort_pkg` (packet constants, command and message codes, `out_mode_e`),
`serial_sorter` with `sort_regfile`, `mux_comparator`, `sel_update` and `sort_outputs`,
and the test system `sort_test_system` with `uart_rx`, `cmd_module`, `input_adapter`,
`control_module`, `result_adapter` and `uart_tx`. Two assertions check invariants in
simulation: `serial_sorter` checks that its outputs are in order on every clock, and
`control_module` checks that a fed item's result finds the result adapter empty.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog. Helpers:

- `sorter_checker`: random items against a software model of the window.
- `uart_host`: a behavioural serial port for the host side.
- `system_driver`: the host-side end-to-end scenario.
- `item_file_reader`, `sort_reference_checker` and the item file `sort_items.mem`: the
  file-driven sorter test.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/sort_pkg.sv \
          tb/tb_serial_sorter.sv --top-module tb_serial_sorter
./obj_dir/Vtb_serial_sorter
```

Replace the testbench name to run any other testbench. `tb_sort_file` reads
`tb/sort_items.mem` by that relative path, so run it from the same directory.

| testbench | what it shows |
|---|---|
| `tb_serial_sorter` | Six sorters against the model, with items often on back-to-back clocks: N=25 ascending, N=25 descending, N=9, N=35 (16-bit items), and the extremes of the intended range, 3 items of 1 bit (descending) and 50 items of 32 bits. It covers many equal values and a clear halfway through. Every item must be in place one clock later. |
| `tb_sort_file` | The 25 × 8 sorter fed from the item file `tb/sort_items.mem`, one value per clock, in the classic arrangement: a file reader that rejects values wider than W, the sorter, a behavioural reference that reports mismatches as they happen, and a formatter printing min, median and max per item. |
| `tb_sel_update` | The update rule alone. The selections stay a permutation and read out the sorted window. |
| `tb_sort_regfile`, `tb_mux_comparator`, `tb_sort_outputs` | Circular write order and wrap-around; selection and comparison in both orders; min/max/median/position, including an even N. |
| `tb_uart_rx`, `tb_uart_tx` | 8N1 framing, data/command split, frame errors, ±3 % sender bit time; exact transmit bit time and handshake. |
| `tb_input_adapter`, `tb_result_adapter` | Packing for W = 8 and W = 24, holding register, overflow, clear; packet order and back-pressure. |
| `tb_cmd_module`, `tb_control_module` | Every command; feeding, stalls, halt, message order, status flags. |
| `tb_sort_test_system` | End to end over the serial line at 32 clocks per bit (see below). |
| `tb_sort_test_system_full` | The same scenario with the system at its default parameters (434 clocks per bit). It runs in about a second. |
| `tb_sort_test_system_max` | The same scenario for 50 items of 32 bits, five serial packets per item, with a 20-item fast run. |

The end-to-end scenario runs these steps, checking every returned value against the model:

1. Connect.
2. Send 81 items back to back: 36 in minimum mode, then 15 each in maximum, median and
   chosen-position mode. The host sends about 3 % fast, so stalls occur.
3. Halt, then send three items. The first waits, and the other two are lost with OVERFLOW.
   Run again.
4. Send an unknown command, then a broken frame.
5. Clear.

The scenario counts each mechanism and fails if any never occurred.

## Relation to the original description, and choices made here

The following follow the original description:

- the circular writing into N registers under a modulo-N counter;
- one multiplexer-comparator pair per position, with multiplexer 0 giving the minimum;
- new selections computed from the comparator pattern and registered for the next cycle,
  so the array is sorted within one cycle of each arrival;
- the choice of ascending or descending order;
- min, max, median and any position as outputs;
- the test system's module structure: receiving UART, command module, input adapter,
  sorter, result adapter, control module, delivery UART;
- 8-bit serial words with a data/command tag in the MSB, and 7-bit payloads
  (24-bit items in 4 words);
- an overflow counted as a warning and other faults as errors.

The following are this design's own choices:

- the per-position update rule and its handling of the overwritten entry;
- ties placed behind equal items;
- the zero-filled start-up window;
- run-time selection of the output (the original fixes the forwarded outputs when the
  code is generated);
- the 8N1 frame and baud rate;
- MSB = 1 for commands, and most-significant-payload-first packing;
- the whole command and message set;
- the holding-register, stall and halt rules of the control module;
- synchronous active-high reset.

The original also describes two software parts, which are not hardware and are not
included here:

- A code generator with a simulation testbench built around the sorter. That testbench
  reads items from a text file, checks the sorter against a behavioural model and writes
  results to a file. `tb_sort_file` follows that arrangement (hexadecimal items, results
  printed rather than written to a file), and `tb_serial_sorter` adds generated random
  data.
- A host program that drives the board and shows green, yellow and red status.
  `uart_host` and `system_driver` stand in for it in simulation.

The original reports FPGA results for N = 9, 25 and 35. For Xilinx
Spartan-3 these are about 700, 5300 and 8600 LUTs at 85, 66 and 62 MHz. This RTL
reproduces the structure, not those numbers. Coarse, technology-independent synthesis of
the default 25 × 8 sorter gives about 430 word-level cells and 331 flip-flops: 200 data
bits, 125 selection bits and a few control bits. Other sizes need only a change of `N`
and `W`. The N = 9 and N = 35 configurations are covered by `tb_serial_sorter`, which
also covers the intended range of 3 to 50 items and 1 to 32 bits at both ends.
