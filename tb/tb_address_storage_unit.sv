// tb_address_storage_unit: checks the address store's reset value (64, HMA
// high), the initialise to 1 (HMA low), counting to 64 with HMA rising only
// there, saturation, and the output enable of the address lines.
`timescale 1ns/1ps
module tb_address_storage_unit;
  localparam int AW = 10, MAXA = 64;

  logic clk = 0, rst_n = 0, init_n = 1, inc = 0, oe = 0, addr_oe, hma;
  logic [AW-1:0] addr, addr_out;
  int checks = 0, failures = 0;

  address_storage_unit #(.ADDR_W(AW), .MAX_ADDR(MAXA)) dut (
    .clk, .rst_n, .init_n, .inc, .oe, .addr, .addr_out, .addr_oe, .hma
  );

  always #5 clk = ~clk;

  initial begin
    #200_000;
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

  initial begin
    int model;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq(addr, 64, "reset address");
    expect_eq(hma, 1, "HMA after reset");

    for (int round = 0; round < 3; round++) begin
      init_n = 0;
      repeat (4) @(negedge clk);
      init_n = 1;
      model = 1;
      expect_eq(addr, 1, "initialised address");
      expect_eq(hma, 0, "HMA low after initialise");
      for (int i = 0; i < 80; i++) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        oe = $urandom_range(0, 1);
        #1;
        expect_eq(addr_oe, oe, "address enable");
        expect_eq(addr_out, oe ? model : 0, "address lines");
        inc = 1;
        @(negedge clk) inc = 0;
        if (model < MAXA) model++;
        expect_eq(addr, model, "counted address");
        expect_eq(hma, model == MAXA, "HMA only at 64");
      end
    end

    // Initialise wins over an increment in the same cycle
    init_n = 0; inc = 1;
    @(negedge clk) init_n = 1; inc = 0;
    expect_eq(addr, 1, "initialise over increment");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
