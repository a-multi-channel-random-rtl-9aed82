// tb_input_buffer: checks that the input buffer records one flag per channel
// for every channel that saw a rising edge since the last clear, that short
// (20 ns) pulses at any phase of the clock are caught, that a line already
// high at the clear is not counted again, and that clear wins over a hit.
`timescale 1ns/1ps
module tb_input_buffer;
  localparam int N = 64;

  logic         clk = 0, rst_n = 0, clear_n = 1;
  logic [N-1:0] pulse_in = '0, data;
  int checks = 0, failures = 0;

  input_buffer #(.N_CH(N)) dut (.clk, .rst_n, .pulse_in, .clear_n, .data);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] exp, string what);
    checks++;
    if (data !== exp) begin
      failures++;
      $display("FAIL %s: data=%h expected=%h", what, data, exp);
    end
  endtask

  task automatic do_clear();
    @(negedge clk) clear_n = 0;
    repeat (4) @(negedge clk);
    clear_n = 1;
  endtask

  // A pulse of width 20..39 ns at a random sub-clock offset on channel ch.
  task automatic pulse(int ch);
    fork
      begin
        automatic int w   = 20 + $urandom_range(0, 19);
        automatic int off = $urandom_range(0, 9);
        #(off * 1.0 + 0.3);
        pulse_in[ch] = 1;
        #(w);
        pulse_in[ch] = 0;
      end
    join_none
  endtask

  initial begin
    logic [N-1:0] exp;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check('0, "after reset");

    for (int gate = 0; gate < 40; gate++) begin
      do_clear();
      repeat (2) @(negedge clk);
      check('0, "after clear");
      exp = '0;
      for (int k = 0; k < 30; k++) begin
        automatic int ch = $urandom_range(0, N - 1);
        pulse(ch);
        exp[ch] = 1;
        repeat ($urandom_range(0, 6)) @(negedge clk);
      end
      repeat (10) @(negedge clk);
      check(exp, "hits of one gate");
    end

    // A line held high across the clear is not a new hit
    do_clear();
    pulse_in[3] = 1;
    repeat (10) @(negedge clk);
    check(64'h8, "rising edge sets flag");
    do_clear();
    repeat (10) @(negedge clk);
    check('0, "level held across clear is not a new hit");
    pulse_in[3] = 0;

    // Clear dominates: a hit whose edge reaches the flag during clear is lost
    @(negedge clk) pulse_in[5] = 1;
    @(negedge clk) clear_n = 0;
    repeat (6) @(negedge clk);
    clear_n = 1;
    pulse_in[5] = 0;
    repeat (5) @(negedge clk);
    check('0, "hit during clear is lost");

    // Latency: flag appears 3 clocks after the input edge is sampled
    do_clear();
    @(negedge clk) pulse_in[7] = 1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (data[7]) begin failures++; $display("FAIL flag too early"); end
    @(negedge clk);
    check(64'h80, "flag after three clocks");
    pulse_in[7] = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
