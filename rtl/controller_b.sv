// controller_b: moves one gate's hit flags from the shift registers into the
// analyzer memory, adding each flag to the count kept at its address.
//
// A fall of HMA (the address store was just set to 1) starts a sequence of
// bit cycles of T_CYCLE clocks (2 us). Each bit cycle, counted by phase:
//   phase 0          sr_clk_en: in the first cycle this loads the shift
//                    registers (the shift/load line is still low), later it
//                    shifts the next bit out; asu_inc advances the address
//                    in every cycle but the first;
//   phase 1          the serial bit is sampled into bit_q;
//   1 .. T_ENB       asu_oe and ext_enb: address lines driven, analyzer
//                    memory under external control;
//   P_MAL, T_MAL     mal_latch (200 ns): the address enters the analyzer's
//                    memory address latch;
//   P_LD, T_EXTLD    ext_ld_n low: that memory word is loaded into the
//                    analyzer's increment register (memory in read, rw_n high);
//   P_INC, T_INCR    incr_reg, only if bit_q is one: the register counts up;
//   P_WR, T_WRITE    rw_n low (500 ns): the register is written back.
// At the end of a bit cycle the controller stops if HMA is high (the
// address reached 64 at the start of this cycle), so exactly 64 cycles run,
// 128 us at the defaults. The original used seven monostables; the cycle
// length, the latch and write widths and the order of the strobes are the
// original's, the other offsets and widths are this design's.
//
// Interface: hma from the address store, data_bit from the shift registers.
// Outputs are decoded from registered state; ext_ld_n and rw_n are active
// low, the rest active high.
module controller_b #(
  parameter int unsigned T_CYCLE = pulse_counter_pkg::T_CYCLE,
  parameter int unsigned T_MAL   = pulse_counter_pkg::T_MAL,
  parameter int unsigned T_EXTLD = pulse_counter_pkg::T_EXTLD,
  parameter int unsigned T_INCR  = pulse_counter_pkg::T_INCR,
  parameter int unsigned T_WRITE = pulse_counter_pkg::T_WRITE,
  parameter int unsigned T_ENB   = pulse_counter_pkg::T_ENB,
  parameter int unsigned T_GAP   = 10   // idle clocks between strobes
) (
  input  logic clk,
  input  logic rst_n,
  input  logic hma,
  input  logic data_bit,
  output logic sr_clk_en,
  output logic asu_inc,
  output logic asu_oe,
  output logic ext_enb,
  output logic mal_latch,
  output logic ext_ld_n,
  output logic incr_reg,
  output logic rw_n,
  output logic busy
);

  localparam int unsigned P_MAL = 2;
  localparam int unsigned P_LD  = P_MAL + T_MAL + T_GAP;
  localparam int unsigned P_INC = P_LD + T_EXTLD + T_GAP;
  localparam int unsigned P_WR  = P_INC + T_INCR + T_GAP;
  localparam int unsigned PW    = $clog2(T_CYCLE);

  initial assert (P_WR + T_WRITE <= T_ENB && T_ENB < T_CYCLE)
    else $error("controller_b: strobes do not fit in one bit cycle");

  logic          hma_q;
  logic          first;   // first bit cycle: the SR clock loads
  logic          bit_q;   // data bit of this cycle (timer l of the original)
  logic [PW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hma_q <= 1'b1;
      busy  <= 1'b0;
      first <= 1'b0;
      bit_q <= 1'b0;
      phase <= '0;
    end else begin
      hma_q <= hma;
      if (hma_q && !hma) begin
        busy  <= 1'b1;
        first <= 1'b1;
        phase <= '0;
      end else if (busy) begin
        if (phase == PW'(1)) bit_q <= data_bit;
        if (phase == PW'(T_CYCLE - 1)) begin
          phase <= '0;
          first <= 1'b0;
          if (hma) busy <= 1'b0;
        end else begin
          phase <= phase + PW'(1);
        end
      end
    end
  end

  function automatic logic in_window(logic [PW-1:0] p, int unsigned start, int unsigned len);
    return (32'(p) >= start) && (32'(p) < start + len);
  endfunction

  assign sr_clk_en = busy && phase == '0;
  assign asu_inc   = busy && phase == '0 && !first;
  assign asu_oe    = busy && in_window(phase, 1, T_ENB);
  assign ext_enb   = asu_oe;
  assign mal_latch = busy && in_window(phase, P_MAL, T_MAL);
  assign ext_ld_n  = !(busy && in_window(phase, P_LD, T_EXTLD));
  assign incr_reg  = busy && bit_q && in_window(phase, P_INC, T_INCR);
  assign rw_n      = !(busy && in_window(phase, P_WR, T_WRITE));

  // Handshake rules with the analyzer: the strobes never overlap and only
  // occur while the memory is under external control.
  a_strobes_disjoint: assert property (@(posedge clk) disable iff (!rst_n)
    !(mal_latch && !ext_ld_n) && !(!ext_ld_n && !rw_n) && !(incr_reg && !rw_n));
  a_strobes_under_enb: assert property (@(posedge clk) disable iff (!rst_n)
    ext_enb || (!mal_latch && ext_ld_n && !incr_reg && rw_n));

endmodule
