// wcrt_timer: tick-length timer of the PFU.
//
// It counts the clock cycles since the current tick started. In constant
// execution mode (const_mode = 1) the next tick may start only once the
// worst case reaction time (WCRT, in cycles, computed at compile time by WCRT
// analysis) has elapsed, so every tick lasts exactly wcrt cycles when the
// program meets its WCRT; in variable mode a tick may start at once.
//
// Timing: tick_start marks the first cycle of a tick; count is k, k cycles
// after it. release_ok is high when a tick may start now: in constant mode
// when count >= wcrt, so two tick_start pulses are wcrt cycles apart.
// overrun pulses with a tick_start that comes later than wcrt cycles after
// the previous one (the program took longer than its analysed bound), a case
// the document does not discuss; it is reported, not acted on.
// Reset counts as the start of the first tick.
module wcrt_timer #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             const_mode,
  input  logic [CNT_W-1:0] wcrt,
  input  logic             tick_start,
  output logic [CNT_W-1:0] count,
  output logic             release_ok,
  output logic             overrun
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count <= '0;
    else if (tick_start)
      count <= CNT_W'(1);
    else if (count != '1)
      count <= count + 1'b1;
  end

  always_comb begin
    release_ok = !const_mode || (count >= wcrt);
    overrun    = const_mode && tick_start && (count > wcrt);
  end

endmodule
