// pushbutton: the switching circuit behind a front-panel push button. The
// unit has two, one for start/stop and one for clearing the analyzer memory.
//
// The raw contact is synchronized to the clock. It must then hold a new level
// for DEBOUNCE consecutive cycles before the debounced level (pressed)
// follows it, which removes contact bounce. press_pulse is high for one
// cycle when pressed rises, so each press yields exactly one pulse. The
// original's circuit is not given beyond its purpose; this counter debouncer
// is this design's choice, and so is the 1 ms default (100000 cycles at
// 100 MHz).
//
// Interface: button asynchronous, high while pressed. pressed follows a
// stable change after DEBOUNCE+3 cycles; press_pulse comes with its rise.
module pushbutton #(
  parameter int unsigned DEBOUNCE = pulse_counter_pkg::T_DEBOUNCE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic button,
  output logic pressed,
  output logic press_pulse
);

  localparam int unsigned CW = $clog2(DEBOUNCE + 1);

  logic          sync1, sync2;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1       <= 1'b0;
      sync2       <= 1'b0;
      cnt         <= '0;
      pressed     <= 1'b0;
      press_pulse <= 1'b0;
    end else begin
      sync1       <= button;
      sync2       <= sync1;
      press_pulse <= 1'b0;
      if (sync2 == pressed) begin
        cnt <= '0;
      end else if (cnt == CW'(DEBOUNCE - 1)) begin
        cnt         <= '0;
        pressed     <= sync2;
        press_pulse <= sync2;
      end else begin
        cnt <= cnt + CW'(1);
      end
    end
  end

endmodule
