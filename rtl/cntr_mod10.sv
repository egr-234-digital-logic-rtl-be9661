// cntr_mod10: decade counter, 0..9, with a terminal-count flag.
//
// A cntr_reg counts up while Enable is high. When the count is 9 (binary
// 1001) the AND of bits 3 and 0 drives the register's Load with D = 0, so the
// enabled step after 9 returns to 0. The same decode is brought out as Nine;
// it is high for as long as the count is 9, whether or not Enable is high,
// which lets a following stage form its enable as the AND of the Nine flags
// below it (a synchronous ripple-carry chain).
//
// Clear is synchronous and active high (see cntr_reg). Q is valid one clock
// after the edge that changes it; Nine is combinational from Q.
module cntr_mod10
  import clock_pkg::*;
(
  input  logic   Clear,
  input  logic   Clock,
  input  logic   Enable,
  output digit_t Q,
  output logic   Nine
);

  digit_t count;
  logic   at_nine;

  // 9 is the only value 0..9 with both bit 3 and bit 0 set
  assign at_nine = count[3] & count[0];

  cntr_reg u_reg (
    .Clear  (Clear),
    .Clock  (Clock),
    .Enable (Enable),
    .Load   (at_nine),
    .D      (4'd0),
    .Q      (count)
  );

  assign Q    = count;
  assign Nine = at_nine;

endmodule
