// tb_pulse_counter_top: end-to-end test of the pulse counter at its default
// timing (100 MHz clock, 500 us gate, 2 us per transferred bit, 1 ms button
// debounce), connected to a behavioural model of the analyzer memory.
//
// Random pulses are sent on the 64 inputs while gates are open, sometimes
// several on one channel in one gate. The testbench keeps its own count,
// per channel, of gates with at least one pulse, and compares it with the
// analyzer memory after each run. The sequence: start, several gates, stop
// (the running gate still finishes and is transferred); start again without
// clearing (counts accumulate); clear (memory zero); start, gates, stop.
// Pulses are also placed just after a gate closes, inside the dead time, and
// just after the next gate opens, to check where the boundary lies.
// It measures gate length, cycle period and transfer time, and counts each
// mechanism: gates, transfers, merged double hits, hits while the previous
// gate is being transferred, dead-time losses, accumulation and clearing.
`timescale 1ns/1ps
module tb_pulse_counter_top;
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
    #80_000_000;
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

  // ---------------------------------------------------------------- stimulus
  int  expected [N_CH];
  int  n_gates = 0, n_transfers = 0, n_double = 0, n_overlap = 0;
  int  n_dead_lost = 0, n_boundary = 0;
  int  n_accumulated = 0, n_cleared = 0, n_stop_finish = 0;
  bit  stopping = 0;
  logic [N_CH-1:0] gate_hits;   // channels with a pulse in the open gate

  task automatic fire(int ch);
    fork
      begin
        automatic int w = 20 + $urandom_range(0, 20);
        #($urandom_range(0, 9) * 1.0 + 0.5);
        pulse_in[ch] = 1;
        #(w);
        pulse_in[ch] = 0;
      end
    join_none
  endtask

  // Pulses of one gate, started when the gate opens (led rises)
  initial forever begin
    int offs[$], chs[$], t, order[$];
    @(posedge led);
    if (!rst_n) continue;
    n_gates++;
    gate_hits = '0;
    offs.delete(); chs.delete();
    for (int ch = 0; ch < N_CH; ch++) begin
      if ($urandom_range(0, 99) < 40) begin
        automatic int nh = $urandom_range(1, 3);
        expected[ch]++;
        gate_hits[ch] = 1;
        if (nh > 1) n_double++;
        for (int k = 0; k < nh; k++) begin
          offs.push_back($urandom_range(50, T_GATE - 100));
          chs.push_back(ch);
        end
      end
    end
    order.delete();
    foreach (offs[i]) order.push_back(i);
    order.sort() with (offs[item]);
    t = 0;
    foreach (order[k]) begin
      repeat (offs[order[k]] - t) @(posedge clk);
      t = offs[order[k]];
      if (transfer_busy) n_overlap++;
      fire(chs[order[k]]);
    end
  end

  // Dead time: a pulse 10 clocks after the gate closes is lost; one
  // 30 clocks after the gate closes falls in the next gate and is counted.
  initial forever begin
    int ch_lost, ch_next;
    @(negedge led);
    if (rst_n && !stopping) begin
      ch_lost = $urandom_range(0, N_CH - 1);
      ch_next = $urandom_range(0, N_CH - 1);
      repeat (10) @(posedge clk);
      fire(ch_lost);
      n_dead_lost++;
      repeat (20) @(posedge clk);
      fire(ch_next);
      // counted in the gate that just opened, unless that gate already
      // has a pulse on this channel
      if (!gate_hits[ch_next]) begin
        gate_hits[ch_next] = 1;
        expected[ch_next]++;
        n_boundary++;
      end
    end
  end

  // ------------------------------------------------------------ measurements
  longint gate_len = 0, led_rise_prev = 0, busy_len = 0;
  int     mal_in_transfer = 0;

  always @(posedge clk) if (rst_n) begin
    if (led) gate_len++;
    if (transfer_busy) busy_len++;
  end

  always @(posedge led) if (rst_n) begin
    gate_len = 0;
    if (led_rise_prev != 0)
      expect_eq($time / 10 - led_rise_prev, T_CLEAR + T_GATE + T_LOAD, "cycle period");
    led_rise_prev = $time / 10;
  end
  always @(negedge led) if (rst_n) begin
    expect_eq(gate_len, T_GATE, "gate length 500 us");
    gate_len = 0;
  end
  always @(posedge qvt.mal_latch) if (rst_n) mal_in_transfer++;
  always @(negedge transfer_busy) if (rst_n) begin
    n_transfers++;
    expect_eq(busy_len, N_CH * T_CYCLE, "transfer time 128 us");
    expect_eq(mal_in_transfer, N_CH, "64 addresses per transfer");
    busy_len = 0;
    mal_in_transfer = 0;
  end

  // ------------------------------------------------------------------ helpers
  task automatic press(ref logic b);
    for (int i = 0; i < 6; i++) begin
      b = 1; #($urandom_range(1000, 20000));
      b = 0; #($urandom_range(1000, 20000));
    end
    b = 1;
    #2_000_000;
    for (int i = 0; i < 6; i++) begin
      b = 0; #($urandom_range(1000, 20000));
      b = 1; #($urandom_range(1000, 20000));
    end
    b = 0;
    #1_500_000;
  endtask

  task automatic wait_gates(int n);
    repeat (n) @(posedge led);
  endtask

  task automatic wait_idle();
    while (running || led || transfer_busy) @(posedge clk);
    repeat (100) @(posedge clk);
    led_rise_prev = 0;   // the next run starts a new series of cycles
  endtask

  task automatic check_memory(string what);
    int bad = 0;
    for (int a = 0; a < 1024; a++) begin
      int exp = (a >= 1 && a <= N_CH) ? expected[a-1] : 0;
      if (analyzer.read_word(a) != exp) begin
        bad++;
        if (bad < 5) $display("  address %0d: memory %0d expected %0d", a, analyzer.read_word(a), exp);
      end
    end
    expect_eq(bad, 0, what);
  endtask

  // ---------------------------------------------------------------- sequence
  initial begin
    int gates_at_stop;
    foreach (expected[i]) expected[i] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    expect_eq(running | led | transfer_busy, 0, "idle after reset");

    // Run 1
    stopping = 0;
    press(btn_start_stop);
    expect_eq(running, 1, "running after start press");
    wait_gates(4);
    stopping = 1;
    press(btn_start_stop);
    gates_at_stop = n_gates;
    wait_idle();
    expect_eq(n_transfers, n_gates, "every gate transferred, also the one running at stop");
    if (n_transfers == n_gates) n_stop_finish++;
    check_memory("counts after run 1");

    // Run 2: no clear, counts accumulate
    stopping = 0;
    press(btn_start_stop);
    wait_gates(2);
    stopping = 1;
    press(btn_start_stop);
    wait_idle();
    expect_eq(n_transfers, n_gates, "every gate transferred in run 2");
    check_memory("accumulated counts after run 2");
    foreach (expected[i]) if (expected[i] > 0) begin n_accumulated++; break; end

    // Clear
    press(btn_clear);
    expect_eq(running, 0, "clear leaves the unit stopped");
    foreach (expected[i]) expected[i] = 0;
    check_memory("memory cleared");
    n_cleared++;

    // Run 3 after clear
    stopping = 0;
    press(btn_start_stop);
    wait_gates(3);
    stopping = 1;
    press(btn_start_stop);
    wait_idle();
    check_memory("counts after clear and run 3");

    expect_eq(perr, 0, "analyzer protocol errors");

    $display("mechanisms: gates=%0d transfers=%0d double_hits=%0d hits_during_transfer=%0d dead_time_losses=%0d next_gate_boundary=%0d accumulate=%0d clear=%0d stop_finishes_gate=%0d",
             n_gates, n_transfers, n_double, n_overlap, n_dead_lost, n_boundary,
             n_accumulated, n_cleared, n_stop_finish);
    begin
      int m[9];
      m = '{n_gates, n_transfers, n_double, n_overlap, n_dead_lost,
                   n_boundary, n_accumulated, n_cleared, n_stop_finish};
      foreach (m[i]) expect_eq(m[i] > 0, 1, $sformatf("mechanism %0d exercised", i));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
