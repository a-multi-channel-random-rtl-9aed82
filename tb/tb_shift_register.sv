// tb_shift_register: loads random words with the shift/load line low and
// shifts them out with it high, checking that channel 1 comes first and each
// later clock presents the next channel, and that nothing moves without a
// clock pulse.
`timescale 1ns/1ps
module tb_shift_register;
  localparam int N = 64;

  logic         clk = 0, rst_n = 0, sh_ld_n = 1, sr_clk_en = 0, ser_out;
  logic [N-1:0] par_in = '0;
  int checks = 0, failures = 0;

  shift_register #(.N_CH(N)) dut (.clk, .rst_n, .sh_ld_n, .sr_clk_en, .par_in, .ser_out);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] word;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 20; w++) begin
      word = {$urandom, $urandom};
      par_in = word;
      sh_ld_n = 0;
      @(negedge clk) sr_clk_en = 1;
      @(negedge clk) sr_clk_en = 0;
      sh_ld_n = 1;
      par_in = ~word;   // later buffer changes must not reach the register
      for (int b = 0; b < N; b++) begin
        repeat ($urandom_range(1, 4)) @(negedge clk);
        checks++;
        if (ser_out !== word[b]) begin
          failures++;
          $display("FAIL word %0d bit %0d: got %b expected %b", w, b, ser_out, word[b]);
        end
        sr_clk_en = 1;
        @(negedge clk) sr_clk_en = 0;
      end
      checks++;
      if (ser_out !== 1'b0) begin failures++; $display("FAIL zero fill"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
