// one_sec_pulse: prescaler that turns the system clock into a one-clock-wide
// Pulse once every 5 * 10**N_DECADES clock cycles. With the default
// N_DECADES = 7 that is every 50,000,000 cycles, one pulse per second from a
// 50 MHz clock.
//
// Structure: N_DECADES cntr_mod10 stages followed by one cntr_mod5 stage,
// all clocked by Clock. The first stage is always enabled; stage k is
// enabled when every stage below it shows its terminal count (the AND of
// their Nine flags), so the chain behaves as one synchronous counter in
// mixed radix 10,10,...,10,5. Pulse is the AND of every terminal flag: it is
// high for exactly the one cycle in which the whole chain reads
// 4 999...9 and is about to roll over to zero.
//
// Timing: after Clear (synchronous, active high) the first Pulse is high
// during cycle 5*10**N_DECADES - 1 counted from the first enabled edge, and
// then every 5*10**N_DECADES cycles. Pulse is combinational from the
// counter registers.
//
// The stage count, radix order and the AND-of-flags enables and pulse
// follow the prescaler this clock is built around; N_DECADES is a parameter
// of this design so that simulations can use a shorter second.
// The stage values themselves are not brought out.
module one_sec_pulse
  import clock_pkg::*;
#(
  parameter int unsigned N_DECADES = 7   // number of mod-10 stages
) (
  input  logic Clock,
  input  logic Clear,
  output logic Pulse
);

  // carry[k] = enable of stage k = AND of the terminal flags of stages 0..k-1
  logic [N_DECADES:0] carry;
  logic               four;
  digit_t             last_q;

  assign carry[0] = 1'b1;

  for (genvar k = 0; k < int'(N_DECADES); k++) begin : g_decade
    digit_t q;
    logic   nine;

    cntr_mod10 u_mod10 (
      .Clear  (Clear),
      .Clock  (Clock),
      .Enable (carry[k]),
      .Q      (q),
      .Nine   (nine)
    );

    assign carry[k+1] = carry[k] & nine;
  end

  cntr_mod5 u_mod5 (
    .Clear  (Clear),
    .Clock  (Clock),
    .Enable (carry[N_DECADES]),
    .Q      (last_q),
    .Four   (four)
  );

  assign Pulse = carry[N_DECADES] & four;

endmodule
