// tb_digital_clock_full: digital_clock at its default parameters (a tick
// every 50,000,000 clocks). Runs two full seconds from Clear and samples
// the displays just before and just after each tick and at a few points in
// between: 00:00 until cycle 49,999,999, then 00:01, then 00:02 after cycle
// 99,999,999. The display is also compared on every clock of the
// last 100 cycles before each tick and the first 100 after it.
module tb_digital_clock_full;
  import clock_pkg::*;

  localparam longint P = 64'd50_000_000;   // 5 * 10**7 clocks per second

  logic  clk = 1'b0;
  logic  clear;
  seg7_t s0, s1, m0, m1;
  int    checks = 0, failures = 0, n_tick = 0;
  longint cyc;

  digital_clock dut (
    .Clock(clk), .Clear(clear),
    .SecondOut0(s0), .SecondOut1(s1), .MinuteOut0(m0), .MinuteOut1(m1)
  );

  always #5 clk = ~clk;

  localparam seg7_t ZERO = ~7'h3F, ONE = ~7'h06, TWO = ~7'h5B;

  task automatic expect_units(input seg7_t units);
    checks++;
    if (s0 != units || s1 != ZERO || m0 != ZERO || m1 != ZERO) begin
      failures++;
      if (failures < 10)
        $display("FAIL cycle %0d: seg %b %b %b %b", cyc, m1, m0, s1, s0);
    end
  endtask

  task automatic run_to(input longint target, input seg7_t units);
    while (cyc < target) begin
      @(posedge clk); #1;
      cyc++;
      if ((cyc % P) < 100 || (cyc % P) > P - 100 || (cyc % 10_000_000) == 0)
        expect_units(units);
    end
  endtask

  initial begin
    repeat (120_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    cyc = 0;
    expect_units(ZERO);
    run_to(P - 1, ZERO);        // display unchanged through the first second
    run_to(2 * P - 1, ONE);     // the tick falls in cycle P-1
    if (s0 == ONE) n_tick++;
    run_to(2 * P + 50, TWO);
    if (s0 == TWO) n_tick++;
    checks++;
    if (n_tick != 2) begin
      failures++;
      $display("FAIL: %0d ticks seen", n_tick);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
