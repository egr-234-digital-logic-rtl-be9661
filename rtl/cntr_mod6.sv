// cntr_mod6: counter 0..5 with a terminal-count flag, used for the tens of
// seconds and the tens of minutes.
//
// A cntr_reg counts up while Enable is high. When the count is 5 (binary
// 0101) the AND of bits 2 and 0 drives the register's Load with D = 0, so the
// enabled step after 5 returns to 0. The decode is also the Five output,
// high for as long as the count is 5.
//
// The terminal count is decoded at 5, as the module's name, its Five output
// and its use in a 60-count clock require. A decode of bits 2 and 1 would
// stop at 6 instead and give a seven-state counter; that is not used here.
//
// Clear is synchronous and active high (see cntr_reg); Five is combinational
// from Q.
module cntr_mod6
  import clock_pkg::*;
(
  input  logic   Clear,
  input  logic   Clock,
  input  logic   Enable,
  output digit_t Q,
  output logic   Five
);

  digit_t count;
  logic   at_five;

  // 5 is the only value 0..5 with both bit 2 and bit 0 set
  assign at_five = count[2] & count[0];

  cntr_reg u_reg (
    .Clear  (Clear),
    .Clock  (Clock),
    .Enable (Enable),
    .Load   (at_five),
    .D      (4'd0),
    .Q      (count)
  );

  assign Q    = count;
  assign Five = at_five;

endmodule
