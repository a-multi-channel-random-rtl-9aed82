// shift_register: the bank of parallel-in, serial-out shift registers (SR)
// that carries one gate's hit flags from the input buffer to the analyzer.
//
// The original unit chained eight 8-bit shift registers; this is the same
// function as one N_CH-bit register. A clock pulse (sr_clk_en) with the
// shift/load line low copies the buffer into the register; a clock pulse
// with the line high shifts it by one place. Channel 1 (par_in[0]) appears
// on ser_out first, channel n after n-1 shifts, so that the n-th bit goes to
// the n-th analyzer address. Zeros are shifted in behind the data.
//
// Interface: sh_ld_n is the shift/load line from Controller A (low = load),
// sr_clk_en a one-cycle clock pulse from Controller B; ser_out is valid the
// cycle after that pulse.
module shift_register #(
  parameter int unsigned N_CH = pulse_counter_pkg::N_CH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sh_ld_n,
  input  logic            sr_clk_en,
  input  logic [N_CH-1:0] par_in,
  output logic            ser_out
);

  logic [N_CH-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
    end else if (sr_clk_en) begin
      if (!sh_ld_n) sr <= par_in;
      else          sr <= {1'b0, sr[N_CH-1:1]};
    end
  end

  assign ser_out = sr[0];

endmodule
