// controller_a: times the data collection cycle of the pulse counter.
//
// A run flip-flop toggles on every start/stop pulse and is cleared by the
// clear button. While it is set, the controller repeats one cycle:
//   CLEAR  T_CLEAR cycles (40 ns): buf_clear_n low empties the input buffer;
//   GATE   T_GATE  cycles (500 us): the buffer collects hits, collecting
//          (the front-panel LED) is high;
//   LOAD   T_LOAD  cycles (200 ns): sh_ld_n low puts the shift registers in
//          load mode; during its first T_INIT cycles (40 ns) asu_init_n low
//          sets the address store to 1, which starts Controller B, whose
//          first shift-register clock falls inside this window and copies
//          the buffer.
// Then CLEAR again. The original used four monostables (timers a to d);
// the durations are theirs, the counter implementation is this design's.
// Starting the address initialise at the beginning of the load window, not
// at its end, is this design's reading, needed for the load to happen while
// the shift/load line is low. A stop takes effect at the end of the cycle in
// progress, so the last gate's data still reach the analyzer; the clear
// button stops at once (this is also this design's choice). Hits are lost
// only between the copy into the shift registers and the end of the next
// CLEAR (under 0.05 % of a cycle at the defaults).
//
// Interface: start_stop and clear are one-cycle pulses. All outputs are
// registered state decoded combinationally; strobes are active low.
module controller_a #(
  parameter int unsigned T_CLEAR = pulse_counter_pkg::T_CLEAR,
  parameter int unsigned T_GATE  = pulse_counter_pkg::T_GATE,
  parameter int unsigned T_LOAD  = pulse_counter_pkg::T_LOAD,
  parameter int unsigned T_INIT  = pulse_counter_pkg::T_INIT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_stop,
  input  logic clear,
  output logic buf_clear_n,
  output logic sh_ld_n,
  output logic asu_init_n,
  output logic collecting,
  output logic running
);

  typedef enum logic [1:0] {IDLE, CLEAR, GATE, LOAD} state_t;

  localparam int unsigned CW = $clog2(T_GATE + 1);

  initial assert (T_INIT < T_LOAD && T_CLEAR > 0 && T_GATE > 0)
    else $error("controller_a: T_INIT must be shorter than T_LOAD");

  state_t        state;
  logic [CW-1:0] cnt;     // cycles spent in the current state

  // Run flip-flop (the 7473 of the original)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          running <= 1'b0;
    else if (clear)      running <= 1'b0;
    else if (start_stop) running <= ~running;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
    end else if (clear) begin
      state <= IDLE;
      cnt   <= '0;
    end else begin
      cnt <= cnt + CW'(1);
      unique case (state)
        IDLE: begin
          cnt <= '0;
          if (running) state <= CLEAR;
        end
        CLEAR: if (cnt == CW'(T_CLEAR - 1)) begin
          state <= GATE;
          cnt   <= '0;
        end
        GATE: if (cnt == CW'(T_GATE - 1)) begin
          state <= LOAD;
          cnt   <= '0;
        end
        LOAD: if (cnt == CW'(T_LOAD - 1)) begin
          state <= running ? CLEAR : IDLE;
          cnt   <= '0;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign buf_clear_n = (state != CLEAR);
  assign collecting  = (state == GATE);
  assign sh_ld_n     = (state != LOAD);
  assign asu_init_n  = !(state == LOAD && cnt < CW'(T_INIT));

endmodule
