// cntr_mod5: counter 0..4 with a terminal-count flag, the last stage of the
// one-second prescaler.
//
// A cntr_reg counts up while Enable is high. Bit 2 is set only at 4 (binary
// 0100) within 0..4, so it alone drives the register's Load with D = 0: the
// enabled step after 4 returns to 0. The decode is also the Four output,
// high for as long as the count is 4.
//
// The interface (Clear, Clock, Enable, Q, Four) is the prescaler's; the
// insides follow the pattern of the mod-10 and mod-6 counters and are this
// design's own. Clear is synchronous and active high; Four is combinational
// from Q.
module cntr_mod5
  import clock_pkg::*;
(
  input  logic   Clear,
  input  logic   Clock,
  input  logic   Enable,
  output digit_t Q,
  output logic   Four
);

  digit_t count;
  logic   at_four;

  assign at_four = count[2];

  cntr_reg u_reg (
    .Clear  (Clear),
    .Clock  (Clock),
    .Enable (Enable),
    .Load   (at_four),
    .D      (4'd0),
    .Q      (count)
  );

  assign Q    = count;
  assign Four = at_four;

endmodule
