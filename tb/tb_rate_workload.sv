// tb_rate_workload: the counter's intended use, a scan of many channels with
// different random pulse rates, at the default parameters (500 us gate).
//
// Channel 1 is dead, channel 64 is a noisy channel at 100 kHz, and channel k
// in between fires at random (exponential intervals) at 50*(k-1) Hz, from
// 50 Hz to 3.1 kHz. Pulses are only sent while a gate is well open; a
// pulse that would fall near a gate edge is dropped, as if it never came,
// so the expected count is exact: per channel, the number of gates with at
// least one pulse. After about 40 gates the analyzer memory is compared
// with that count, the dead channel must read zero, and the noisy channel
// must read exactly one count per gate (the 2 kHz ceiling of the method).
`timescale 1ns/1ps
module tb_rate_workload;
  import pulse_counter_pkg::*;

  logic            clk = 0, rst_n = 0;
  logic [N_CH-1:0] pulse_in = '0;
  logic            btn_start_stop = 0, btn_clear = 0;
  qvt_bus_t        qvt;
  logic            led, running, transfer_busy;
  int              perr;
  int checks = 0, failures = 0;

  pulse_counter_top dut (
    .clk, .rst_n, .pulse_in, .btn_start_stop, .btn_clear, .qvt, .led, .running,
    .transfer_busy
  );

  qvt_model analyzer (.bus(qvt), .protocol_errors(perr));

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Gate tracking, from the led output
  int              since_rise = 0;
  int              n_gates = 0;
  int              expected [N_CH];
  int              sent = 0, dropped = 0;
  logic [N_CH-1:0] gate_hits = '0;
  bit              generate_on = 0;

  always @(posedge clk) begin
    if (!rst_n || !led) since_rise <= 0;
    else                since_rise <= since_rise + 1;
  end

  always @(posedge led) if (rst_n) begin
    n_gates++;
    gate_hits = '0;
  end
  always @(negedge led) if (rst_n) begin
    for (int ch = 0; ch < N_CH; ch++) expected[ch] += int'(gate_hits[ch]);
  end

  function automatic real rate_hz(int ch);
    if (ch == 0)        return 0.0;
    if (ch == N_CH - 1) return 100_000.0;
    return 50.0 * ch;
  endfunction

  // One pulse source per channel
  initial begin
    foreach (expected[i]) expected[i] = 0;
    for (int c = 0; c < N_CH; c++) begin
      fork
        automatic int ch = c;
        if (rate_hz(ch) > 0.0) forever begin
          real u, dt;
          u  = ($urandom_range(1, 1_000_000) * 1.0) / 1_000_000.0;
          dt = -$ln(u) / rate_hz(ch) * 1.0e9;   // ns
          #(dt + 50.0);
          if (generate_on) begin
            if (led && since_rise >= 10 && since_rise <= T_GATE - 20) begin
              pulse_in[ch] = 1;
              #25;
              pulse_in[ch] = 0;
              gate_hits[ch] = 1;
              sent++;
            end else begin
              dropped++;
            end
          end
        end
      join_none
    end
  end

  task automatic press(ref logic b);
    b = 1;
    #2_000_000;
    b = 0;
    #1_500_000;
  endtask

  initial begin
    int g0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    generate_on = 1;
    press(btn_start_stop);
    expect_eq(running, 1, "running");
    repeat (30) @(posedge led);
    press(btn_start_stop);
    while (running || led || transfer_busy) @(posedge clk);
    repeat (100) @(posedge clk);
    generate_on = 0;

    $display("gates=%0d pulses sent=%0d dropped near gate edges=%0d", n_gates, sent, dropped);
    for (int a = 1; a <= N_CH; a++)
      expect_eq(analyzer.read_word(a), expected[a-1], $sformatf("count of channel %0d", a));
    expect_eq(analyzer.read_word(1), 0, "dead channel reads zero");
    expect_eq(analyzer.read_word(N_CH), n_gates, "noisy channel saturates at one count per gate");
    expect_eq(perr, 0, "analyzer protocol errors");
    // Ratio counted/gates should follow 1-exp(-rate*gate) roughly; check
    // that a 300 Hz and a 2 kHz channel land in a plausible band.
    g0 = n_gates;
    checks++;
    if (analyzer.read_word(7) > g0 / 2 || analyzer.read_word(41) < g0 / 3) begin
      failures++;
      $display("FAIL implausible rate response: 300 Hz -> %0d, 2 kHz -> %0d of %0d gates",
               analyzer.read_word(7), analyzer.read_word(41), g0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
