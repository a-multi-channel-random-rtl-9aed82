// address_storage_unit: the Address Storage Unit (ASU), which holds the
// analyzer memory address that the current transfer cycle works on.
//
// It is a counter that runs from 1 to MAX_ADDR (64). Controller A's
// initialise strobe (init_n low) sets it to 1; each inc pulse from
// Controller B adds one, and it stops at MAX_ADDR. The HMA ("high at maximum
// address") output is high while the address is MAX_ADDR; its fall when the
// address is initialised is what starts Controller B, and its rise ends the
// transfer. After reset the address is MAX_ADDR, as it is between transfers.
// The original drove the address lines through tristate buffers enabled by
// Controller B; here addr_out carries the address while oe is high and zero
// otherwise, and addr_oe tells the connector which state the lines are in.
//
// Interface: init_n and inc are synchronous strobes; addr and hma change one
// clock after them. addr_out and addr_oe follow oe combinationally.
module address_storage_unit #(
  parameter int unsigned ADDR_W   = pulse_counter_pkg::ADDR_W,
  parameter int unsigned MAX_ADDR = pulse_counter_pkg::N_CH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init_n,
  input  logic              inc,
  input  logic              oe,
  output logic [ADDR_W-1:0] addr,
  output logic [ADDR_W-1:0] addr_out,
  output logic              addr_oe,
  output logic              hma
);

  localparam logic [ADDR_W-1:0] MAX = ADDR_W'(MAX_ADDR);

  initial assert (MAX_ADDR < (1 << ADDR_W))
    else $error("MAX_ADDR does not fit in ADDR_W bits");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                addr <= MAX;
    else if (!init_n)          addr <= ADDR_W'(1);
    else if (inc && addr != MAX) addr <= addr + ADDR_W'(1);
  end

  assign hma      = (addr == MAX);
  assign addr_oe  = oe;
  assign addr_out = oe ? addr : '0;

endmodule
