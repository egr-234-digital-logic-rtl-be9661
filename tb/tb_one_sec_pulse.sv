// tb_one_sec_pulse: self-checking testbench for one_sec_pulse.
// Runs the prescaler with 0, 1 and 2 mod-10 stages (division by 5, 50 and
// 500) side by side. After Clear, each Pulse must be exactly one cycle wide,
// the first must come in cycle 5*10**N - 1 and every later one
// 5*10**N cycles after the previous. A Clear in the middle of a period must
// restart the count. The division ratios are computed here independently as
// powers of ten.
module tb_one_sec_pulse;
  logic clk = 1'b0;
  logic clear;
  logic [2:0] pulse;
  int   checks = 0, failures = 0;

  one_sec_pulse #(.N_DECADES(0)) dut0 (.Clock(clk), .Clear(clear), .Pulse(pulse[0]));
  one_sec_pulse #(.N_DECADES(1)) dut1 (.Clock(clk), .Clear(clear), .Pulse(pulse[1]));
  one_sec_pulse #(.N_DECADES(2)) dut2 (.Clock(clk), .Clear(clear), .Pulse(pulse[2]));

  always #5 clk = ~clk;

  int period [3] = '{5, 50, 500};
  int cnt    [3];     // cycles since clear, counted by the testbench
  int npulse [3];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pulse must be high exactly in the cycles where cnt % period == period-1
  task automatic run(input int cycles);
    for (int c = 0; c < cycles; c++) begin
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (pulse[k] != ((cnt[k] % period[k]) == period[k] - 1)) begin
          failures++;
          $display("FAIL N=%0d cycle %0d: Pulse=%0b", k, cnt[k], pulse[k]);
        end
        if (pulse[k]) npulse[k]++;
        cnt[k]++;
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    cnt = '{0, 0, 0};
    npulse = '{0, 0, 0};
    run(2100);
    // clear part-way through a period
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    cnt = '{0, 0, 0};
    run(1200);
    for (int k = 0; k < 3; k++) begin
      checks++;
      // expected pulse count: floor(2100/P) + floor(1200/P)
      if (npulse[k] != 2100 / period[k] + 1200 / period[k]) begin
        failures++;
        $display("FAIL N=%0d pulse count %0d", k, npulse[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
