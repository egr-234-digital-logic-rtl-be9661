// tb_cntr_reg: self-checking testbench for cntr_reg.
// Drives random Clear / Enable / Load / D for 2000 cycles and compares Q
// after every rising edge with a reference model kept in the testbench:
// Clear wins, then Enable with Load loads D, Enable alone increments
// modulo 16, otherwise Q holds. Counts how often each case was exercised
// and fails if one never happened.
module tb_cntr_reg;
  import clock_pkg::*;

  logic   clk = 1'b0;
  logic   clear, enable, load;
  digit_t d, q;
  int     checks = 0, failures = 0;
  int     n_clear = 0, n_load = 0, n_inc = 0, n_hold = 0, n_wrap = 0;
  int     model;

  cntr_reg dut (.Clear(clear), .Clock(clk), .Enable(enable), .Load(load), .D(d), .Q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1; enable = 1'b0; load = 1'b0; d = '0;
    @(posedge clk); #1;
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      clear  = ($urandom_range(0, 19) == 0);
      enable = ($urandom_range(0, 3) != 0);
      load   = ($urandom_range(0, 7) == 0);
      d      = digit_t'($urandom_range(0, 15));
      @(posedge clk); #1;
      if (clear) begin
        model = 0; n_clear++;
      end else if (enable && load) begin
        model = int'(d); n_load++;
      end else if (enable) begin
        if (model == 15) n_wrap++;
        model = (model + 1) % 16; n_inc++;
      end else begin
        n_hold++;
      end
      checks++;
      if (int'(q) != model) begin
        failures++;
        $display("FAIL cycle %0d: Q=%0d expected %0d", i, q, model);
      end
    end
    checks++;
    if (n_clear == 0 || n_load == 0 || n_inc == 0 || n_hold == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL coverage: clear=%0d load=%0d inc=%0d hold=%0d wrap=%0d",
               n_clear, n_load, n_inc, n_hold, n_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
