// Loadable 7-b countdown timer with two time bases.
//
// load copies load_val into the counter and picks the time base: the fast
// tick (pulse width and biphasic delay) or, with slow_sel, the slow tick
// (interpulse interval). The counter then decreases by one on every tick of
// the chosen base. timeout is high, combinationally, in the clock cycle that
// carries the tick which ends the count, so a controller can reload the
// timer in that same cycle with no lost cycle. A count of N therefore lasts
// N ticks; a count of 0 is treated as 1 (this design's choice). load wins
// over the running count. With a fast tick in every clock cycle, as on the
// eight-channel chip, a count of N is exactly N clock cycles after the
// loading edge.
module countdown_timer
  import stim_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               fast_tick,
  input  logic               slow_tick,
  input  logic               load,
  input  logic [TIMER_W-1:0] load_val,
  input  logic               slow_sel,
  output logic               running,
  output logic               timeout
);

  logic [TIMER_W-1:0] cnt;
  logic               use_slow;
  logic               tick;

  assign tick    = use_slow ? slow_tick : fast_tick;
  assign timeout = running && tick && (cnt <= TIMER_W'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      running  <= 1'b0;
      use_slow <= 1'b0;
    end else if (load) begin
      cnt      <= load_val;
      running  <= 1'b1;
      use_slow <= slow_sel;
    end else if (running && tick) begin
      if (timeout) begin
        cnt     <= '0;
        running <= 1'b0;
      end else begin
        cnt <= cnt - TIMER_W'(1);
      end
    end
  end

endmodule
