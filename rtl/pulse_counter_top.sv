// pulse_counter_top: gated 64-channel random pulse register and controller
// that turns a multichannel analyzer's memory into 64 hit counters.
//
// Data path: pulse_in -> input_buffer (one hit flag per channel per gate)
// -> shift_register (parallel load, serial out) -> controller_b, which for
// bit n strobes the analyzer to add the bit to memory word n. Control:
// controller_a times the 500 us gate and the 200 ns load window and sets the
// address_storage_unit to 1; the fall of its HMA line starts controller_b,
// which steps the address through 1..64 in 2 us bit cycles (128 us in all)
// while the next gate already collects. Two pushbutton circuits give the
// start/stop toggle and the memory clear.
//
// The analyzer itself is outside this design: its rear-connector lines are
// the qvt output (address, address-enable, EXT ENB, MAL latch, EXT LD,
// INCR REG, R/W, memory clear). mem_clear is high while the clear button is
// held (debounced); the button also stops data taking and, as in the
// original, holds the start/stop circuit output inactive. led is lit while
// a gate is open; running shows the run flip-flop.
//
// Parameters are durations in clock cycles of an assumed 100 MHz clock,
// with the original's durations as defaults.
module pulse_counter_top
  import pulse_counter_pkg::*;
#(
  parameter int unsigned P_T_GATE   = pulse_counter_pkg::T_GATE,
  parameter int unsigned P_T_CYCLE  = pulse_counter_pkg::T_CYCLE,
  parameter int unsigned P_DEBOUNCE = pulse_counter_pkg::T_DEBOUNCE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] pulse_in,
  input  logic            btn_start_stop,
  input  logic            btn_clear,
  output qvt_bus_t        qvt,
  output logic            led,
  output logic            running,
  output logic            transfer_busy
);

  // Push-button circuits
  logic ss_pulse, clr_pulse, clr_level;

  pushbutton #(.DEBOUNCE(P_DEBOUNCE)) u_btn_ss (
    .clk, .rst_n, .button(btn_start_stop), .pressed(), .press_pulse(ss_pulse)
  );
  pushbutton #(.DEBOUNCE(P_DEBOUNCE)) u_btn_clr (
    .clk, .rst_n, .button(btn_clear), .pressed(clr_level), .press_pulse(clr_pulse)
  );

  // Controller A
  logic buf_clear_n, sh_ld_n, asu_init_n;

  controller_a #(
    .T_CLEAR(T_CLEAR), .T_GATE(P_T_GATE), .T_LOAD(T_LOAD), .T_INIT(T_INIT)
  ) u_ctrl_a (
    .clk, .rst_n,
    .start_stop (ss_pulse && !clr_level),
    .clear      (clr_pulse),
    .buf_clear_n, .sh_ld_n, .asu_init_n,
    .collecting (led),
    .running
  );

  // Data path
  logic [N_CH-1:0] hits;
  logic            ser_bit, sr_clk_en;

  input_buffer #(.N_CH(N_CH)) u_buf (
    .clk, .rst_n, .pulse_in, .clear_n(buf_clear_n), .data(hits)
  );

  shift_register #(.N_CH(N_CH)) u_sr (
    .clk, .rst_n, .sh_ld_n, .sr_clk_en, .par_in(hits), .ser_out(ser_bit)
  );

  // Address store and Controller B
  logic              asu_inc, asu_oe, hma;
  logic [ADDR_W-1:0] asu_addr;

  address_storage_unit #(.ADDR_W(ADDR_W), .MAX_ADDR(N_CH)) u_asu (
    .clk, .rst_n, .init_n(asu_init_n), .inc(asu_inc), .oe(asu_oe),
    .addr(asu_addr), .addr_out(qvt.addr), .addr_oe(qvt.addr_oe), .hma
  );

  controller_b #(
    .T_CYCLE(P_T_CYCLE), .T_MAL(T_MAL), .T_EXTLD(T_EXTLD), .T_INCR(T_INCR),
    .T_WRITE(T_WRITE), .T_ENB(T_ENB)
  ) u_ctrl_b (
    .clk, .rst_n, .hma, .data_bit(ser_bit),
    .sr_clk_en, .asu_inc, .asu_oe,
    .ext_enb  (qvt.ext_enb),
    .mal_latch(qvt.mal_latch),
    .ext_ld_n (qvt.ext_ld_n),
    .incr_reg (qvt.incr_reg),
    .rw_n     (qvt.rw_n),
    .busy     (transfer_busy)
  );

  assign qvt.mem_clear = clr_level;

  // The transfer of one gate must end before the next load window.
  a_transfer_done: assert property (@(posedge clk) disable iff (!rst_n)
    !(transfer_busy && !asu_init_n && !hma && asu_addr != ADDR_W'(1)))
    else $error("transfer still running when the next gate ended");

endmodule
