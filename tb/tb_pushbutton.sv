// tb_pushbutton: presses a bouncing button and checks that each press gives
// exactly one pulse, that the debounced level follows only stable changes,
// and that glitches shorter than the debounce time are ignored.
`timescale 1ns/1ps
module tb_pushbutton;
  localparam int DB = 50;

  logic clk = 0, rst_n = 0, button = 0, pressed, press_pulse;
  int checks = 0, failures = 0, pulses = 0;

  pushbutton #(.DEBOUNCE(DB)) dut (.clk, .rst_n, .button, .pressed, .press_pulse);

  always #5 clk = ~clk;
  always @(posedge clk) if (press_pulse) pulses++;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Contact bounce: toggles shorter than the debounce time, ending at level v
  task automatic bounce_to(logic v);
    for (int i = 0; i < 8; i++) begin
      button = ~v;
      repeat ($urandom_range(1, DB / 3)) @(negedge clk);
      button = v;
      if (i < 7) repeat ($urandom_range(1, DB / 3)) @(negedge clk);
    end
  endtask

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 1; p <= 10; p++) begin
      bounce_to(1);
      repeat (DB - 2) @(negedge clk);
      expect_eq(pressed, 0, "not yet debounced");
      repeat (8) @(negedge clk);
      expect_eq(pressed, 1, "pressed after stable high");
      repeat ($urandom_range(10, 100)) @(negedge clk);
      bounce_to(0);
      repeat (DB + 8) @(negedge clk);
      expect_eq(pressed, 0, "released");
      expect_eq(pulses, p, "one pulse per press");
    end
    // A lone glitch is ignored
    button = 1;
    repeat (DB - 5) @(negedge clk);
    button = 0;
    repeat (3 * DB) @(negedge clk);
    expect_eq(pulses, 10, "glitch ignored");
    expect_eq(pressed, 0, "glitch ignored (level)");
    // Delay from a clean edge to the pulse
    t0 = pulses;
    button = 1;
    repeat (DB + 2) @(negedge clk);
    expect_eq(pulses, t0, "pulse not before DEBOUNCE+3 cycles");
    @(negedge clk);
    expect_eq(pulses, t0 + 1, "pulse at DEBOUNCE+3 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
