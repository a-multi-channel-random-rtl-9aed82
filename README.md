# 64-channel gated random pulse counter

This unit counts random pulses on 64 detector channels at the same time. It
uses the memory of a multichannel pulse-height analyzer as 64 counters.
Time is cut into gates of 500 µs. During a gate, each channel only
remembers whether it saw a pulse, which takes one bit. When the gate closes,
those 64 bits are shifted out one at a time. Bit *n* adds 0 or 1 to
analyzer memory word *n*. The next gate is already collecting while that
transfer runs. After a run, word *n* holds the number of gates in which
channel *n* fired. That count can be read on the analyzer's oscilloscope or
printer outputs.

The method is meant for low rates, for example cosmic-ray tests,
high-voltage plateau curves, or finding dead and noisy channels in a large
detector. At these rates two pulses in one 500 µs gate are rare. The
highest countable rate is one pulse per gate, which is 2 kHz per channel.

The RTL is synchronous, with one clock. The original unit timed each step
with one-shot monostables. Here each of those is a counter of a 100 MHz
clock. The clock frequency is this design's choice. The durations are the
original's.

## Block diagram and data flow

```
 pulse_in[63:0] ──► input_buffer ──hits[63:0]──► shift_register ──ser_bit──► controller_b ──► qvt.{ext_enb, mal_latch,
        (one flag per channel)          (parallel load,           (2 µs bit cycles)        ext_ld_n, incr_reg, rw_n}
                  ▲                        serial out)  ▲   ▲           │   ▲
      buf_clear_n │                        sh_ld_n ─────┘   └ sr_clk_en ┘   │ hma
                  │                                                  asu_inc│
 btn_start_stop ─► pushbutton ─► controller_a ── asu_init_n ──► address_storage_unit ──► qvt.addr, qvt.addr_oe
 btn_clear ──────► pushbutton ─┘   (gate timing, led)                 (1..64)
                               └──────────────────────────────────────────────────────► qvt.mem_clear
```

| Module | File | Role |
|---|---|---|
| `pulse_counter_pkg` | `rtl/pulse_counter_pkg.sv` | Channel count, address width, default durations, the `qvt_bus_t` connector struct |
| `input_buffer` | `rtl/input_buffer.sv` | One hit flag per channel, set by a rising input edge and cleared at each gate start |
| `shift_register` | `rtl/shift_register.sv` | 64-bit parallel-in, serial-out register. Channel 1 comes out first |
| `controller_a` | `rtl/controller_a.sv` | Run flip-flop and the clear / gate / load cycle |
| `address_storage_unit` | `rtl/address_storage_unit.sv` | Address counter 1..64 with the HMA ("high at maximum address") flag |
| `controller_b` | `rtl/controller_b.sv` | 64 bit cycles that strobe the analyzer to add each bit to its memory word |
| `pushbutton` | `rtl/pushbutton.sv` | Debounces a button and gives one pulse per press |
| `pulse_counter_top` | `rtl/pulse_counter_top.sv` | Connects all of the above |

## The two controllers and how they hand over

Both controllers run at the same time, so the timing between them is the
hardest part to follow.

**Controller A** repeats a fixed cycle for as long as the run flip-flop is
set. At the defaults one cycle is 50 024 clocks (500.24 µs):

| Phase | Clocks | Duration | Outputs |
|---|---|---|---|
| CLEAR | `T_CLEAR` = 4 | 40 ns | `buf_clear_n` low: all hit flags cleared |
| GATE | `T_GATE` = 50 000 | 500 µs | `led` high: flags collect hits |
| LOAD | `T_LOAD` = 20 | 200 ns | `sh_ld_n` low: the shift register is in load mode. `asu_init_n` is also low for the first `T_INIT` = 4 clocks |

**The handover.** `asu_init_n` sets the address store to 1, so HMA falls.
Controller B sees the fall one clock later and starts. In the first clock of
its first bit cycle it pulses `sr_clk_en`. `sh_ld_n` is still low at that
point, so the pulse copies the 64 flags into the shift register. This
happens 3 clocks into the 20-clock load window. Controller A then returns to
CLEAR and opens the next gate. Controller B needs 128 µs for the transfer,
so it finishes long before the next load.

**Controller B** runs 64 bit cycles of `T_CYCLE` = 200 clocks (2 µs). A
cycle is counted by `phase`:

| Phase (clocks) | Signal | Meaning for the analyzer |
|---|---|---|
| 0 | `sr_clk_en`, and `asu_inc` in cycles 2..64 | Load (cycle 1) or shift (later cycles) the shift register. Advance the address |
| 1 | the bit is sampled | — |
| 1..160 | `qvt.ext_enb`, `qvt.addr_oe` | Memory under external control. Address lines driven |
| 2..21 | `qvt.mal_latch` (200 ns) | Address goes into the analyzer's memory address latch |
| 32..51 | `qvt.ext_ld_n` low | The addressed word goes into the analyzer's increment register (memory in read mode) |
| 62..81 | `qvt.incr_reg`, only when the bit is 1 | Increment register +1 |
| 92..141 | `qvt.rw_n` low (500 ns) | The increment register is written back |

In cycle 64 the address reaches 64, so HMA rises. Controller B finishes that
cycle and then stops. It stays idle until the next HMA fall. Two assertions
in `controller_b` check the strobes: they never overlap, and they only come
while `ext_enb` is high.

**Start, stop and clear.** The start/stop button toggles the run flip-flop.
A stop lets the cycle in progress finish, so the last gate is still
transferred. Then controller A goes idle. The clear button does three
things. It clears the run flip-flop, and controller A goes idle at once. It
holds `qvt.mem_clear` high for as long as it is pressed. And it blocks the
start/stop pulse. Clearing the memory is never automatic, so counts from
several runs add up until someone presses clear.

**Dead time.** Some hits are lost: those that arrive after the copy into the
shift register and before the end of the next CLEAR. That window is about
21–24 clocks (about 240 ns) per cycle, under 0.05 %. The original unit
quoted about 160 ns. The difference comes from this design's order: load
window first, then the clear.

## Interfaces

`pulse_counter_top` ports:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock. Asynchronous reset, active low |
| `pulse_in` | in | 64 | Asynchronous pulses, at least 20 ns high. Bit *k* is channel *k*+1 and goes to address *k*+1 |
| `btn_start_stop`, `btn_clear` | in | 1 | Raw push-button contacts, high when pressed. Bounce is allowed |
| `qvt` | out | `qvt_bus_t` | `addr[9:0]`, `addr_oe`, `ext_enb`, `mal_latch`, `ext_ld_n`, `incr_reg`, `rw_n`, `mem_clear` |
| `led` | out | 1 | High while a gate is open |
| `running` | out | 1 | Run flip-flop |
| `transfer_busy` | out | 1 | Controller B is transferring |

The original drives the address lines through tristate buffers. In this
design `qvt.addr` is zero while `qvt.addr_oe` is low. A board-level wrapper
can turn `addr_oe` into real tristate enables. `ext_ld_n` and `rw_n` are
active low, like the analyzer inputs they model. All other strobes are
active high.

Top-level parameters, given in clocks:

| Parameter | Default | Meaning |
|---|---|---|
| `P_T_GATE` | 50 000 | Gate length (500 µs) |
| `P_T_CYCLE` | 200 | Bit cycle (2 µs) |
| `P_DEBOUNCE` | 100 000 | Button debounce (1 ms) |

The other durations are in `pulse_counter_pkg`, and each block takes them as
parameters. `controller_b` checks during elaboration that its strobes fit
inside the bit cycle.

## Where this design makes its own choices

- **Clock and synchronisers.** One 100 MHz clock is used, so the 20 ns
  minimum pulse is always sampled. The original J-K flip-flops were clocked
  by the pulse itself. Here each input passes two synchronising flops and
  an edge detector. Flags therefore appear 3 clocks after the edge.
- **Order inside Controller A.** The address initialise starts at the
  beginning of the load window, not at its end. This guarantees that the
  shift register is loaded while the load line is low.
- **Strobe offsets in Controller B.** The original's cycle length, the
  200 ns latch, the 500 ns write and the order of the strobes are kept. The
  exact offsets, the width of EXT LD and INCR REG (200 ns each) and the
  enable window are this design's.
- **Bit order.** Channel 1 is the first bit shifted out, so channel *n*
  lands at address *n*.
- **Push-button circuit.** This is a counter debouncer with a 1 ms default.
  The original only says that both buttons use the same circuit.
- **Stop and clear.** A stop finishes the current cycle. A clear stops at
  once and drives `mem_clear` while it is pressed. How the original told
  the analyzer to clear is not specified.
- **Eight 8-bit shift registers** are one 64-bit register here. The
  function is the same.

## What is not here

The analyzer is an existing instrument and is not part of this RTL. That
covers its memory, memory address latch, increment register, display and
printer outputs. The design only produces the signals its external-control
port expects. `tb/qvt_model.sv` is a behavioural model of that port for
simulation. A rising `mal_latch` latches the address. A falling `ext_ld_n`
loads the register. A rising `incr_reg` increments it. A falling `rw_n`
writes it back. The model also counts strobes that arrive outside
`ext_enb`. The real instrument's timing limits are not modelled.

Also not modelled: TTL levels, the 5 V supply, the connector pinout and the
LED driver. The `led` output is the logic signal only.

## Capacity and rates at the default settings

- 64 channels at once. The analyzer has 10 address lines, and only
  addresses 1..64 are used.
- At most one count per channel per 500.24 µs cycle, which is 2 kHz.
- The transfer takes 64 × 2 µs = 128 µs, well inside one cycle.
- The faster variant uses 1.6 µs per bit (`P_T_CYCLE = 160`). Its transfer
  takes 102.4 µs, so the gate can shrink to about 102.2 µs
  (`P_T_GATE = 10220`), which allows about 9.8 kHz. This is not the default.
  The assertion `a_transfer_done` in the top module fires if a gate is made
  shorter than the transfer.
- A detector with about 3000 channels has to be tested in groups of 64.

## Simulation

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` at the end.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  --top-module tb_pulse_counter_top rtl/pulse_counter_pkg.sv tb/tb_pulse_counter_top.sv
./obj_dir/Vtb_pulse_counter_top
```

Replace the top module name to run another testbench:

| Testbench | What it checks |
|---|---|
| `tb_input_buffer` | Random 20–40 ns pulses at any clock phase. A level held across a clear does not count again. Clear wins over a hit. Latency |
| `tb_shift_register` | Load and serial order of random words. Zero fill |
| `tb_controller_a` | Length and order of every phase over several cycles. A stop finishes the cycle. A clear stops at once. Stop followed by start |
| `tb_address_storage_unit` | Reset to 64. Initialise to 1. HMA only at 64. Saturation. Output enable |
| `tb_controller_b` | Full 64-bit transfers against a model of the address store and shift register. Per-cycle strobe widths, order and address. INCR REG only for one bits. 128 µs total. Stops at HMA |
| `tb_pushbutton` | Bouncing presses give one pulse each. Short glitches are ignored. Delay |
| `tb_pulse_counter_top` | Whole unit at default parameters with the analyzer model. Random hits, including several in one gate. Stop, restart with accumulation, clear, run again. Hits in the dead time and just after it. Gate length, cycle period and transfer time are measured, and every one of these mechanisms must occur |
| `tb_rate_workload` | Whole unit at default parameters with per-channel pulse rates from dead to far above 2 kHz. Per-channel counts against the testbench's own tally, and saturation at one count per gate |

The end-to-end testbench covers about 30 ms of operation and needs a few
seconds of simulation.
