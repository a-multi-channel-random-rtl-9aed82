// qvt_model: behavioural model of the multichannel analyzer's memory under
// external control, as the pulse counter uses it. Not synthesizable.
//
// Rising mal_latch stores the address lines in the memory address latch.
// A fall of ext_ld_n copies the addressed word into the increment register,
// a rise of incr_reg adds one to that register, and a fall of rw_n writes it
// back. mem_clear high zeroes the memory. Every strobe must come while
// ext_enb is high (and mal_latch also needs the address drivers enabled);
// violations are counted in protocol_errors.
module qvt_model
  import pulse_counter_pkg::*;
#(
  parameter int unsigned WORDS = 1 << ADDR_W
) (
  input  qvt_bus_t bus,
  output int       protocol_errors
);

  logic [15:0]       mem [WORDS];
  logic [ADDR_W-1:0] mal;
  logic [15:0]       incr;

  initial begin
    protocol_errors = 0;
    mal  = '0;
    incr = '0;
    foreach (mem[i]) mem[i] = '0;
  end

  function automatic logic [15:0] read_word(int unsigned a);
    return mem[a];
  endfunction

  always @(posedge bus.mal_latch) begin
    if (!(bus.ext_enb && bus.addr_oe)) protocol_errors++;
    mal = bus.addr;
  end

  always @(negedge bus.ext_ld_n) begin
    if (!bus.ext_enb || !bus.rw_n) protocol_errors++;
    incr = mem[mal];
  end

  always @(posedge bus.incr_reg) begin
    if (!bus.ext_enb) protocol_errors++;
    incr = incr + 16'd1;
  end

  always @(negedge bus.rw_n) begin
    if (!bus.ext_enb) protocol_errors++;
    mem[mal] = incr;
  end

  always @(posedge bus.mem_clear) begin
    foreach (mem[i]) mem[i] = '0;
  end

endmodule
