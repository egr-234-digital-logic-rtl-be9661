// digital_clock: minutes:seconds clock, MM:SS from 00:00 to 59:59, shown on
// four 7-segment digits.
//
// A one_sec_pulse prescaler gives a one-cycle tick every 5*10**N_DECADES
// clock cycles (once a second from 50 MHz at the default N_DECADES = 7). The
// tick advances a synchronous chain of four BCD counters:
//   seconds units  cntr_mod10  enabled by tick
//   seconds tens   cntr_mod6   enabled by tick & (units = 9)
//   minutes units  cntr_mod10  enabled by tick & (seconds = x9, tens = 5)
//   minutes tens   cntr_mod6   enabled by tick & (seconds = 59) & (units = 9)
// so 59:59 rolls over to 00:00. Each counter value is decoded by a hex7seg
// into an active-low 7-segment pattern (bit 0 = segment a ... bit 6 = g).
//
// Every enable above the first includes the tick. Without it a counter whose
// lower digits sit at their terminal count would advance on every clock
// cycle of that second instead of once per second.
//
// Interface: Clock, synchronous active-high Clear (all counters, including
// the prescaler, return to zero), and the four segment outputs. The displays
// change one clock after the edge on which the tick is high.
module digital_clock
  import clock_pkg::*;
#(
  parameter int unsigned N_DECADES = 7   // prescaler mod-10 stages; 7 -> divide by 5e7
) (
  input  logic  Clock,
  input  logic  Clear,
  output seg7_t SecondOut0,   // seconds units
  output seg7_t SecondOut1,   // seconds tens
  output seg7_t MinuteOut0,   // minutes units
  output seg7_t MinuteOut1    // minutes tens
);

  logic   tick;
  logic   nine_s0, five_s1, nine_m0, five_m1;
  logic   en_s0, en_s1, en_m0, en_m1;
  digit_t sec0, sec1, min0, min1;

  one_sec_pulse #(.N_DECADES(N_DECADES)) u_pulse (
    .Clock (Clock),
    .Clear (Clear),
    .Pulse (tick)
  );

  assign en_s0 = tick;
  assign en_s1 = tick & nine_s0;
  assign en_m0 = tick & nine_s0 & five_s1;
  assign en_m1 = tick & nine_s0 & five_s1 & nine_m0;

  cntr_mod10 u_sec0 (
    .Clear (Clear), .Clock (Clock), .Enable (en_s0), .Q (sec0), .Nine (nine_s0)
  );

  cntr_mod6 u_sec1 (
    .Clear (Clear), .Clock (Clock), .Enable (en_s1), .Q (sec1), .Five (five_s1)
  );

  cntr_mod10 u_min0 (
    .Clear (Clear), .Clock (Clock), .Enable (en_m0), .Q (min0), .Nine (nine_m0)
  );

  // five_m1 (minutes tens at 5) has no stage above it to enable
  cntr_mod6 u_min1 (
    .Clear (Clear), .Clock (Clock), .Enable (en_m1), .Q (min1), .Five (five_m1)
  );

  hex7seg u_seg_s0 (.hex (sec0), .seg (SecondOut0));
  hex7seg u_seg_s1 (.hex (sec1), .seg (SecondOut1));
  hex7seg u_seg_m0 (.hex (min0), .seg (MinuteOut0));
  hex7seg u_seg_m1 (.hex (min1), .seg (MinuteOut1));

endmodule
