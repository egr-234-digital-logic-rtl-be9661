// tb_cntr_mod10: self-checking testbench for cntr_mod10.
// First a directed run: from Clear, 10 enabled steps must give 0..9 and
// then 0 again, with Nine high exactly at 9; a cycle with Enable low
// must hold the count; Clear must return it to 0. Then 3000 cycles of random
// Enable and occasional Clear are compared with a modulo-10 reference model
// after every rising edge.
module tb_cntr_mod10;
  import clock_pkg::*;

  localparam int MOD = 10;

  logic   clk = 1'b0;
  logic   clear, enable;
  digit_t q;
  logic   flag;
  int     checks = 0, failures = 0;
  int     model, n_wrap = 0, n_clear = 0, n_hold = 0;

  cntr_mod10 dut (.Clear(clear), .Clock(clk), .Enable(enable), .Q(q), .Nine(flag));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(q) != exp || flag != (exp == MOD - 1)) begin
      failures++;
      $display("FAIL %s: Q=%0d Nine=%0b expected Q=%0d", what, q, flag, exp);
    end
  endtask

  initial begin
    clear = 1'b1; enable = 1'b0;
    @(posedge clk); #1;
    clear = 1'b0;
    check(0, "after clear");
    // directed: full cycle 0..MOD-1 and back to 0
    enable = 1'b1;
    for (int i = 1; i <= MOD; i++) begin
      @(posedge clk); #1;
      check(i % MOD, "directed count");
    end
    // hold with Enable low, also at the terminal count
    for (int i = 1; i < MOD; i++) begin
      @(posedge clk); #1;
    end
    enable = 1'b0;
    repeat (3) begin
      @(posedge clk); #1;
      check(MOD - 1, "hold at terminal");
    end
    // synchronous clear
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    check(0, "clear");
    // random
    model = 0;
    for (int i = 0; i < 3000; i++) begin
      clear  = ($urandom_range(0, 49) == 0);
      enable = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (clear) begin
        model = 0; n_clear++;
      end else if (enable) begin
        if (model == MOD - 1) n_wrap++;
        model = (model + 1) % MOD;
      end else n_hold++;
      check(model, "random");
    end
    checks++;
    if (n_wrap == 0 || n_clear == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL coverage: wrap=%0d clear=%0d hold=%0d", n_wrap, n_clear, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
