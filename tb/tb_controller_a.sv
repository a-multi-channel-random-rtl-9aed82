// tb_controller_a: runs the collection-cycle controller with a shortened
// gate and measures every phase: buffer clear, gate, shift/load window and
// address initialise, their order and lengths, the repetition of the cycle,
// a stop that lets the running cycle finish, and a clear that stops at once.
`timescale 1ns/1ps
module tb_controller_a;
  localparam int TC = 4, TG = 300, TL = 20, TI = 4;

  logic clk = 0, rst_n = 0, start_stop = 0, clear = 0;
  logic buf_clear_n, sh_ld_n, asu_init_n, collecting, running;
  int checks = 0, failures = 0;

  controller_a #(.T_CLEAR(TC), .T_GATE(TG), .T_LOAD(TL), .T_INIT(TI)) dut (
    .clk, .rst_n, .start_stop, .clear, .buf_clear_n, .sh_ld_n, .asu_init_n,
    .collecting, .running
  );

  always #5 clk = ~clk;

  initial begin
    #500_000;
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

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  // Record, cycle by cycle, which phase the outputs show; 0 idle, 1 clear,
  // 2 gate, 3 load (4 when the initialise strobe is also low).
  int trace[$];
  always @(posedge clk) if (rst_n) begin
    int c;
    c = 0;
    if (!buf_clear_n) c = 1;
    else if (collecting) c = 2;
    else if (!sh_ld_n) c = asu_init_n ? 3 : 4;
    else if (!asu_init_n) c = 9;     // initialise outside the load window
    trace.push_back(c);
  end

  // Run-length encode the trace from index from
  typedef struct { int code; int len; } run_t;
  function automatic void runs(int from, ref run_t r[$]);
    r.delete();
    for (int i = from; i < trace.size(); i++) begin
      if (r.size() > 0 && r[$].code == trace[i]) r[$].len++;
      else r.push_back('{trace[i], 1});
    end
  endfunction

  initial begin
    run_t r[$];
    int   mark;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (running || !buf_clear_n || collecting || !sh_ld_n || !asu_init_n) begin
      failures++; $display("FAIL outputs not idle after reset");
    end

    // Start, run three full cycles, then stop inside the fourth gate
    mark = trace.size();
    pulse(start_stop);
    expect_eq(running, 1, "running after start");
    repeat (3 * (TC + TG + TL) + TC + TG / 2) @(negedge clk);
    pulse(start_stop);
    expect_eq(running, 0, "running after stop");
    repeat (TG) @(negedge clk);
    runs(mark, r);
    // expected: idle, then 4 x {clear, gate, init+load, load}, then idle
    expect_eq(r.size(), 2 + 4 * 4, "number of phases");
    if (r.size() == 18) begin
      for (int k = 0; k < 4; k++) begin
        expect_eq(r[1 + 4*k].code, 1, "phase clear");
        expect_eq(r[1 + 4*k].len, TC, "clear length (40 ns)");
        expect_eq(r[2 + 4*k].code, 2, "phase gate");
        expect_eq(r[2 + 4*k].len, TG, "gate length");
        expect_eq(r[3 + 4*k].code, 4, "phase initialise in load");
        expect_eq(r[3 + 4*k].len, TI, "initialise length (40 ns)");
        expect_eq(r[4 + 4*k].code, 3, "phase load");
        expect_eq(r[4 + 4*k].len, TL - TI, "rest of load (200 ns total)");
      end
      expect_eq(r[17].code, 0, "idle after stop");
    end

    // Restart, then clear in the middle of a gate: everything stops at once
    pulse(start_stop);
    repeat (TC + TG / 3) @(negedge clk);
    expect_eq(collecting, 1, "collecting before clear");
    pulse(clear);
    expect_eq(running, 0, "clear resets the run flip-flop");
    expect_eq(collecting, 0, "clear ends the gate");
    repeat (TG) @(negedge clk);
    expect_eq(collecting | !sh_ld_n | !asu_init_n, 0, "idle after clear");

    // Two start/stop pulses in one cycle leave it running
    pulse(start_stop);
    repeat (20) @(negedge clk);
    pulse(start_stop);
    pulse(start_stop);
    repeat (2 * (TC + TG + TL)) @(negedge clk);
    expect_eq(running, 1, "still running after stop+start");
    mark = trace.size();
    repeat (TC + TG + TL + 2) @(negedge clk);
    runs(mark, r);
    expect_eq(r.size() >= 4, 1, "cycle keeps repeating");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
