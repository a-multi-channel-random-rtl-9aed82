// input_buffer: the data store (DS) of the pulse counter, one hit flag per
// input channel.
//
// Each input line is a TTL pulse from a detector channel. A rising edge on a
// line sets that channel's flag, which then stays set until Controller A
// clears the whole buffer at the start of the next gate period. A channel
// therefore records "at least one pulse during this gate", not a count.
// The original used one J-K flip-flop per channel, clocked by the pulse
// itself. Here every line passes a two-flop synchronizer and a rising-edge
// detector on the system clock; with a 10 ns clock the minimum specified
// pulse width of 20 ns is always seen. A clear and a hit in the same clock
// cycle leave the flag clear, as the asynchronous clear of a J-K flip-flop
// would.
//
// Interface: pulse_in[N_CH-1:0] asynchronous; clear_n active low, synchronous
// to clk; data[N_CH-1:0] registered. Latency from an input edge to its flag:
// three clock cycles.
module input_buffer #(
  parameter int unsigned N_CH = pulse_counter_pkg::N_CH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] pulse_in,
  input  logic            clear_n,
  output logic [N_CH-1:0] data
);

  logic [N_CH-1:0] sync1, sync2, sync3;
  logic [N_CH-1:0] rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      sync3 <= '0;
    end else begin
      sync1 <= pulse_in;
      sync2 <= sync1;
      sync3 <= sync2;
    end
  end

  assign rise = sync2 & ~sync3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        data <= '0;
    else if (!clear_n) data <= '0;
    else               data <= data | rise;
  end

endmodule
