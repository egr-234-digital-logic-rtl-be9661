// cntr_reg: 4-bit counter register with parallel load, the building block of
// every modulo counter in the clock.
//
// On each rising Clock edge, in priority order:
//   Clear = 1              -> Q <= 0
//   Enable = 1, Load = 1   -> Q <= D
//   Enable = 1, Load = 0   -> Q <= Q + 1 (wraps modulo 16)
//   otherwise              -> Q holds
// Clear is synchronous and active high. Load only acts together with Enable,
// so a modulo counter that decodes its terminal count onto Load waits at
// that count until it is enabled again.
//
// The port list (Clear, Clock, Enable, Load, D, Q) is the one the counters
// are built around. The priority order, the synchronous Clear and the
// Enable-qualified Load are this design's choices; they are what makes the
// decoded-terminal-count counters built on it count correctly.
module cntr_reg
  import clock_pkg::*;
(
  input  logic   Clear,
  input  logic   Clock,
  input  logic   Enable,
  input  logic   Load,
  input  digit_t D,
  output digit_t Q
);

  always_ff @(posedge Clock) begin
    if (Clear)
      Q <= '0;
    else if (Enable)
      Q <= Load ? D : digit_t'(Q + 4'd1);
  end

endmodule
