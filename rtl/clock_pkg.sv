// clock_pkg: types shared by the counters, the prescaler and the display
// decoders of the minutes:seconds clock.
//
//   digit_t - one 4-bit counter value (a BCD digit for the mod-10, mod-6
//             and mod-5 counters, any hex digit for the 7-segment decoder)
//   seg7_t  - one 7-segment pattern, bit 0 = segment a ... bit 6 = segment g,
//             active low (a 0 lights the segment)
package clock_pkg;
  typedef logic [3:0] digit_t;
  typedef logic [6:0] seg7_t;
endpackage
