// pulse_counter_pkg: constants and types shared by the blocks of the
// 64-channel gated random pulse counter.
//
// All durations are counted in cycles of one system clock. The original unit
// timed everything with monostables; here a 100 MHz clock (10 ns) is assumed,
// fast enough to sample the shortest accepted input pulse (20 ns) at least
// once. The durations themselves (40 ns clear, 500 us gate, 200 ns load,
// 2 us per transferred bit, 200 ns address latch, 500 ns write) are those of
// the original design; the clock rate and the widths of the EXT LD and
// INCR REG strobes are this design's choice.
package pulse_counter_pkg;

  // Channels and qVt address bus
  localparam int unsigned N_CH      = 64;   // input lines, bits per gate
  localparam int unsigned ADDR_W    = 10;   // qVt memory address lines

  // Controller A timing, in clock cycles
  localparam int unsigned T_CLEAR   = 4;      // 40 ns buffer clear
  localparam int unsigned T_GATE    = 50000;  // 500 us collection gate
  localparam int unsigned T_LOAD    = 20;     // 200 ns shift/load low
  localparam int unsigned T_INIT    = 4;      // 40 ns ASU initialise

  // Controller B timing, in clock cycles, offsets inside one bit cycle
  localparam int unsigned T_CYCLE   = 200;    // 2 us per transferred bit
  localparam int unsigned T_MAL     = 20;     // 200 ns address latch strobe
  localparam int unsigned T_EXTLD   = 20;     // EXT LD strobe width
  localparam int unsigned T_INCR    = 20;     // INCR REG strobe width
  localparam int unsigned T_WRITE   = 50;     // 500 ns write strobe
  localparam int unsigned T_ENB     = 160;    // EXT ENB / ASU-4 window

  // Push-button debounce time: 1 ms
  localparam int unsigned T_DEBOUNCE = 100000;

  // Lines of the rear-panel connector to the qVt (address and control).
  // Strobe polarities follow the analyzer's: EXT LD and R/W are active low.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;      // memory address lines
    logic              addr_oe;   // address drivers enabled
    logic              ext_enb;   // external control of the memory
    logic              mal_latch; // latch address into the memory address latch
    logic              ext_ld_n;  // load memory word into the increment register
    logic              incr_reg;  // increment the increment register
    logic              rw_n;      // 1 = read, 0 = write back
    logic              mem_clear; // reset the analyzer memory to zero
  } qvt_bus_t;

endpackage
