// tb_digital_clock: end-to-end testbench for digital_clock.
// Uses a one-stage-shorter prescaler (N_DECADES = 0: one tick every 5
// clocks) so that a whole hour, 3600 ticks, plus a few more runs in about
// 19,000 cycles. After every clock the four 7-segment outputs are decoded
// back to digits and compared with a seconds count kept by the testbench
// (MM = s/60, SS = s%60, wrapping at 3600). Counts the mechanisms the clock
// has and fails if one never happened: tick, seconds-units carry,
// seconds-tens carry into minutes, minutes-units carry, the 59:59 -> 00:00
// roll-over, and a Clear in mid-count.
module tb_digital_clock;
  import clock_pkg::*;

  localparam int P = 5;   // clocks per tick at N_DECADES = 0

  logic  clk = 1'b0;
  logic  clear;
  seg7_t s0, s1, m0, m1;
  int    checks = 0, failures = 0;
  int    n_tick = 0, n_s0 = 0, n_s1 = 0, n_m0 = 0, n_hour = 0, n_clear = 0;

  digital_clock #(.N_DECADES(0)) dut (
    .Clock(clk), .Clear(clear),
    .SecondOut0(s0), .SecondOut1(s1), .MinuteOut0(m0), .MinuteOut1(m1)
  );

  always #5 clk = ~clk;

  // active-low patterns of the ten digits, bit 0 = segment a ... bit 6 = g
  function automatic int decode(input seg7_t s);
    case (~s)
      7'h3F: return 0;  7'h06: return 1;  7'h5B: return 2;  7'h4F: return 3;
      7'h66: return 4;  7'h6D: return 5;  7'h7D: return 6;  7'h07: return 7;
      7'h7F: return 8;  7'h6F: return 9;
      default: return -1;
    endcase
  endfunction

  int secs, cyc;

  task automatic check_display(input string what);
    int exp_s0, exp_s1, exp_m0, exp_m1;
    exp_s0 = secs % 10;        exp_s1 = (secs % 60) / 10;
    exp_m0 = (secs / 60) % 10; exp_m1 = secs / 600;
    checks++;
    if (decode(s0) != exp_s0 || decode(s1) != exp_s1 ||
        decode(m0) != exp_m0 || decode(m1) != exp_m1) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: shows %0d%0d:%0d%0d expected %0d%0d:%0d%0d", what,
                 decode(m1), decode(m0), decode(s1), decode(s0),
                 exp_m1, exp_m0, exp_s1, exp_s0);
    end
  endtask

  // advance one clock; the testbench's own tick comes every P clocks
  task automatic step();
    @(posedge clk); #1;
    cyc++;
    if (cyc % P == 0) begin
      n_tick++;
      if (secs % 10 == 9) n_s0++;
      if (secs % 60 == 59) n_s1++;
      if (secs % 600 == 599) n_m0++;
      if (secs == 3599) n_hour++;
      secs = (secs + 1) % 3600;
    end
    check_display("run");
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    secs = 0; cyc = 0;
    check_display("after clear");
    // a little over one hour of ticks
    repeat (P * 3605) step();
    // Clear part-way: everything, including the prescaler, restarts
    repeat (P * 73 + 2) step();
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    n_clear++;
    secs = 0; cyc = 0;
    check_display("mid-count clear");
    repeat (P * 125) step();

    checks++;
    if (n_tick == 0 || n_s0 == 0 || n_s1 == 0 || n_m0 == 0 || n_hour == 0 || n_clear == 0) begin
      failures++;
      $display("FAIL coverage: tick=%0d s0=%0d s1=%0d m0=%0d hour=%0d clear=%0d",
               n_tick, n_s0, n_s1, n_m0, n_hour, n_clear);
    end
    $display("mechanisms: tick=%0d sec-units-carry=%0d sec-tens-carry=%0d min-units-carry=%0d hour-rollover=%0d clear=%0d",
             n_tick, n_s0, n_s1, n_m0, n_hour, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
