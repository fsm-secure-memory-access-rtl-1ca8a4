# Secure memory access controller (SMAC)

A program running on the processor of a processor-plus-FPGA SoC has to put
data into, and take data out of, a block RAM that lives in the programmable
logic (PL). It must not be able to reach any other part of that memory. This
design gives the program a narrow door: it never sends an address. Logic on
the PL side decides the address window `[base_address, upper_limit]`; the
program only says "load" or "unload", then trades one 16-bit word at a time
through two 32-bit GPIO registers, using a two-signal handshake. A small
state machine, `load_unload_mem`, walks the window and drives the RAM.

```
            GPIO_Ins[31:0]  ──►┌─────────────────────────── smac_top ───────────┐
 processor                      │  RESET_EXT,start,load_unload,done,continue,    │
 (program)                      │  DataIn ──► load_unload_mem ──addr/we/din──►   │
            GPIO_Outs[31:0] ◄── │  ready,stopped,DataOut ◄──       ◄──dout──  pnl_bram
                                │              ▲                                 │
                                └──────────────┼─────────────────────────────────┘
                                   base_address, upper_limit (from other PL logic)
```

## Files

| file | contents |
|---|---|
| `rtl/smac_pkg.sv` | widths, GPIO bit positions, state type |
| `rtl/load_unload_mem.sv` | the controller state machine |
| `rtl/pnl_bram.sv` | single-port 1K x 16 block RAM |
| `rtl/smac_top.sv` | GPIO field split/pack, controller + RAM |
| `tb/tb_pnl_bram.sv` | RAM test |
| `tb/tb_load_unload_mem.sv` | controller test with a 16-word memory |
| `tb/tb_smac_top.sv` | end-to-end test through the GPIO registers at full size |

## The GPIO register map

Both registers split into a control half (bits 31..16) and a data half
(bits 15..0).

| register | bit | name | meaning |
|---|---|---|---|
| `GPIO_Ins` (processor → PL) | 31 | `RESET_EXT` | synchronous reset of the controller |
| | 30 | `LM_ULM_start` | begin an operation (looked at in idle only) |
| | 26 | `LM_ULM_load_unload` | 0 = load (program → RAM), 1 = unload (RAM → program) |
| | 25 | `LM_ULM_done` | the program ends the operation now |
| | 24 | `LM_ULM_continue` | program side of the handshake |
| | 15..0 | DataIn | word to be written |
| `GPIO_Outs` (PL → processor) | 31 | `LM_ULM_ready` | controller idle, may be started |
| | 28 | `LM_ULM_stopped` | controller side of the handshake |
| | 15..0 | DataOut | word being unloaded (zero otherwise) |

All other bits of `GPIO_Outs` are 0; the other bits of `GPIO_Ins` are
ignored. The positions of ready, stopped, RESET_EXT and done are the
published ones; those of start, load_unload and continue were read from the
order of the fields in the register layout and are the least certain part of
the map. They are constants in `smac_pkg`, so moving one is a one-line edit.

## The per-word handshake

Every word crosses with the same four steps, in both directions:

1. The controller raises `stopped`: "I am ready for (or am showing) a word".
2. The program writes the register once, putting its data in bits 15..0 and
   raising `continue` in the same write (on an unload it has read DataOut
   first).
3. The controller takes the word (or notes that it was taken) and drops
   `stopped`.
4. The program sees `stopped` low and drops `continue`; the controller then
   moves to the next address and raises `stopped` again, or returns to idle.

Because each side waits for the other's level to change, nothing depends on
how fast either side runs; the processor can be many times faster or slower
than the PL clock. In clock cycles of the PL, with the inputs changing
between edges:

* `stopped` is high in the cycle after `start` was sampled.
* `continue` sampled high in `load_mem` → the write happens at that edge and
  `stopped` is low in the next cycle.
* `continue` sampled low in `wait_load_unload` → `stopped` is high again in
  the next cycle (or `ready` is high, after the last word).

So a word takes at least two PL clocks, and each state simply waits for as
long as the program takes to answer.

## The controller state machine

| state | outputs | leaves when | to |
|---|---|---|---|
| `idle` | `ready` | `start` | `load_mem` if load_unload=0, `unload_mem` if 1; latches base and upper limit |
| `load_mem` | `stopped`; `bram_we` = `continue & !done` | `done` | `wait_done` |
| | | `continue` | `wait_load_unload` (word written) |
| `unload_mem` | `stopped`; DataOut = RAM word | `done` | `wait_done` |
| | | `continue` | `wait_load_unload` |
| `wait_load_unload` | – | `!continue & done` | `wait_done` |
| | | `!continue & base == upper` | `idle` |
| | | `!continue`, otherwise | base+1, back to `load_mem` / `unload_mem` |
| `wait_done` | – | `!done` | `idle` |

Points that are easy to miss:

* **The window includes its upper limit.** The word at `upper_limit` is
  transferred before the controller returns to idle, so a window moves
  `upper − base + 1` words. If `base_address > upper_limit`, the address
  wraps through the end of memory (e.g. 1016..1023, 0..7).
* **`done` is the program's way out**, from any point: before the first word
  (the program may start the controller and leave without touching the
  memory), while a word is offered, or between words. `done` wins over
  `continue` in `load_mem`, so raising both writes nothing. The controller
  then sits in `wait_done` until `done` goes low, so the program always
  sees a clean return to `ready`.
* **`start` should be dropped** before the operation ends; it is checked
  again as soon as the controller is idle.
* **The window is latched at `start`.** Changing `base_address` or
  `upper_limit` during an operation has no effect on it.

`ready` and `stopped` depend only on the state (Moore outputs); the RAM
write enable also depends on `continue` and `done` (a Mealy output). The
code keeps the state register, the next-state logic and the outputs apart,
in that order.

## Reading the RAM in time

The block RAM returns a word one clock after it sees the address. To have
the right word on DataOut in the very cycle `stopped` rises, the controller
drives the RAM address with the *next* value of its address register rather
than the register itself. The RAM is therefore always one step ahead: in the
cycle after `start`, or after the increment, its output already holds the
word at the current address. In `load_mem` the address does not change, so
the same port also serves the write. DataOut is forced to zero in every
state except `unload_mem`, so memory contents never show on the GPIO
otherwise.

## Sizes and parameters

| parameter | default | where |
|---|---|---|
| `SMAC_DATA_W` / `DATA_W` | 16 | width of the GPIO data fields |
| `SMAC_ADDR_W` / `ADDR_W` | 10 | RAM address width: 1K words, one 18 Kb block RAM |

The 16-bit word comes from the register map. The memory size is this
design's choice; `ADDR_W` can be changed on `smac_top` (or in `smac_pkg`)
without other edits. `GPIO_W` (32) is fixed by the register map.

## Departures and choices

Taken from the original description: the five states and their transitions,
the Moore/Mealy split of the outputs, the handshake, the register map, the
inclusive window test, `done` handling and the use of a stand-alone block
RAM.

Chosen here, where the description says nothing:

* address width (10 bits) and RAM organisation (single port, one-clock
  read, write-first, no reset);
* synchronous active-high reset from `RESET_EXT`, clearing the state and
  the address registers (the RAM is not cleared);
* the "next address" drive of the RAM described above;
* DataOut zero outside `unload_mem`; RAM data input wired to DataIn at all
  times (only the write enable is gated);
* wrap-around for windows with `base_address > upper_limit`;
* the state encoding.

An earlier, higher-level description of the same loop stops *before* the
upper limit; the detailed state machine, which this RTL follows, includes it.

## What is not here

* **The GPIO peripheral and the bus.** `GPIO_Ins` and `GPIO_Outs` are the
  contents of the two registers; the memory-mapped peripheral that holds
  them is vendor IP and is not modelled. Both registers are assumed to be
  in the PL clock domain, as they are when the peripheral is clocked from
  the PL clock. If `GPIO_Ins` ever arrives from another clock domain, add a
  two-flop synchronizer on `continue`, `start`, `done` and `RESET_EXT`; the
  data bits need none, since the handshake keeps them stable while they
  are used.
* **The processor and its program.** Their side of the protocol exists only
  as tasks in `tb/tb_smac_top.sv`.
* **The source of the window.** `base_address` and `upper_limit` are ports
  of `smac_top`; whatever PL logic sets them is outside this design.

## Verification

Each testbench checks against values it works out itself and prints
`TB_RESULT checks=N failures=M`; a watchdog ends a hung run.

* `tb_pnl_bram` writes all 1024 words, reads them back in scrambled order,
  and checks the one-clock latency, hold and write-first behaviour.
* `tb_load_unload_mem` runs the controller on a 16-word behavioural RAM
  with random handshake delays: full, partial, one-word and wrapping
  windows in both directions; every write's address and data; every
  unloaded word; exact clock counts of each handshake step; `done` in
  `load_mem` (including together with `continue`), `unload_mem` and
  `wait_load_unload`; reset in mid-operation; data hidden in idle.
* `tb_smac_top` drives the default-size design only through the GPIO bits:
  loads and unloads the whole memory, loads windows (one wrapping), reads
  the whole memory back to show nothing outside the windows changed, takes
  each `done` exit and a `RESET_EXT` in mid-load, and checks the unused
  output bits. It counts how often each of these happened and fails if one
  never did.

The controller also carries assertions: a write happens only while
`stopped` is high and at the latched address, and `ready` and `stopped` are
never high together.

To run a test with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
  rtl/smac_pkg.sv rtl/pnl_bram.sv rtl/load_unload_mem.sv rtl/smac_top.sv \
  tb/tb_smac_top.sv --top-module tb_smac_top
./obj_dir/Vtb_smac_top
```

Use `tb/tb_load_unload_mem.sv` or `tb/tb_pnl_bram.sv` (with the files they
use) in the same way. `smac_pkg.sv` must come first.

The timing was checked only in simulation; no FPGA timing closure or
hardware run has been done. The register map bits marked above as read from
the layout should be confirmed against the software that drives them.
