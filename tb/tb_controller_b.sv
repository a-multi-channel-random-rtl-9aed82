// tb_controller_b: drives the transfer controller with its own model of the
// address store and shift registers and checks a whole 64-bit transfer:
// 64 bit cycles of 2 us (128 us in all), one shift-register clock per cycle,
// the address advancing before cycles 2..64, the widths and order of the
// MAL latch, EXT LD, INCR REG and write strobes, INCR REG only for one
// bits, and that nothing happens after HMA rises.
`timescale 1ns/1ps
module tb_controller_b;
  localparam int TCY = 200, N = 64;

  logic clk = 0, rst_n = 0, hma, data_bit;
  logic sr_clk_en, asu_inc, asu_oe, ext_enb, mal_latch, ext_ld_n, incr_reg, rw_n, busy;
  int checks = 0, failures = 0;

  controller_b #(.T_CYCLE(TCY)) dut (
    .clk, .rst_n, .hma, .data_bit, .sr_clk_en, .asu_inc, .asu_oe, .ext_enb,
    .mal_latch, .ext_ld_n, .incr_reg, .rw_n, .busy
  );

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
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

  // Environment: address store and shift register models
  int           addr;
  logic         init_req = 0;
  logic [N-1:0] word, sr;
  int           sr_clocks;

  assign hma = (addr == N);

  always @(posedge clk) begin
    if (!rst_n) begin
      addr <= N;
    end else if (init_req) begin
      addr <= 1;
    end else if (asu_inc && addr < N) begin
      addr <= addr + 1;
    end
    if (rst_n && sr_clk_en) begin
      sr_clocks++;
      if (sr_clocks == 1) sr <= word;          // first clock loads
      else                sr <= sr >> 1;
    end
  end
  assign data_bit = sr[0];

  // Per-address observations
  int incr_seen [N+1];
  int mal_addr, mal_len, ld_len, incr_len, wr_len, enb_len;
  longint t_sr[$];
  int order_err;

  int busy_cycles;
  always @(posedge clk) if (rst_n && busy) begin
    busy_cycles++;
    if (sr_clk_en) t_sr.push_back($time / 10);
    if (mal_latch) begin mal_len++; mal_addr = addr; end
    if (!ext_ld_n) begin ld_len++; if (mal_len == 0) order_err++; end
    if (incr_reg)  begin incr_len++; if (ld_len == 0) order_err++; end
    if (!rw_n)     begin wr_len++; if (ld_len == 0) order_err++; end
    if (ext_enb)   enb_len++;
    if (!asu_oe && (mal_latch || !ext_ld_n || incr_reg || !rw_n)) order_err++;
  end

  initial begin
    for (int run = 0; run < 3; run++) begin
      logic [N-1:0] w;
      w = (run == 0) ? {N{1'b1}} : {$urandom, $urandom};
      word = w;
      sr_clocks = 0;
      t_sr.delete();
      foreach (incr_seen[i]) incr_seen[i] = 0;
      if (run == 0) begin
        repeat (3) @(negedge clk);
        rst_n = 1;
        repeat (20) @(negedge clk);
        expect_eq(busy, 0, "idle while HMA high");
      end
      @(negedge clk) init_req = 1;
      @(negedge clk) init_req = 0;
      busy_cycles = 0;
      @(posedge busy);
      for (int n = 1; n <= N; n++) begin
        mal_len = 0; ld_len = 0; incr_len = 0; wr_len = 0; enb_len = 0;
        order_err = 0;
        repeat (TCY) @(negedge clk);
        expect_eq(mal_addr, n, "address latched in cycle n");
        expect_eq(mal_len, 20, "MAL latch 200 ns");
        expect_eq(ld_len, 20, "EXT LD width");
        expect_eq(wr_len, 50, "write 500 ns");
        expect_eq(incr_len, w[n-1] ? 20 : 0, "INCR REG only for a one bit");
        expect_eq(order_err, 0, "strobe order and enable");
        expect_eq(enb_len, 160, "EXT ENB window");
      end
      @(negedge clk);
      expect_eq(busy, 0, "stopped after 64 cycles");
      expect_eq(busy_cycles, N * TCY, "transfer time 64 x 2 us");
      expect_eq(sr_clocks, N, "one SR clock per cycle");
      if (t_sr.size() == N)
        for (int i = 1; i < N; i++) expect_eq(t_sr[i] - t_sr[i-1], TCY, "bit cycle 2 us");
      expect_eq(addr, N, "address at 64 at the end");
      mal_len = 0; ld_len = 0; wr_len = 0; incr_len = 0;
      repeat (3 * TCY) @(negedge clk);
      expect_eq(busy | sr_clocks != N, 0, "HMA inhibits further cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
