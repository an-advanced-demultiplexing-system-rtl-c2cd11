// Pulse controller: sequences one biphasic constant-current pulse.
//
// On start (while idle) it loads the timer with T1 and turns the DAC on for
// the first phase. At time-out it turns the DAC off and loads T2, the
// biphasic delay. At the next time-out it raises invert, which flips the
// sign of the amplitude sent to the DAC, loads T1 again and turns the DAC on
// for the second, opposite phase. At the last time-out it turns the DAC off,
// pulses done for one cycle and waits for the next start. This sequence is
// the described one. A start while busy is ignored (this design's choice).
//
// Timing with a fast tick every clock cycle: start seen at edge k puts the
// first phase in cycles k..k+T1, the delay in the next T2 cycles and the
// second phase in the T1 cycles after that; done is high in the last cycle
// of the second phase. busy covers all three intervals.
module pulse_controller
  import stim_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [TIMER_W-1:0] t1,
  input  logic [TIMER_W-1:0] t2,
  input  logic               timeout,    // from the timer
  output logic               tmr_load,
  output logic [TIMER_W-1:0] tmr_val,
  output logic               dac_on,
  output logic               invert,
  output logic               busy,
  output logic               done
);

  typedef enum logic [1:0] {P_IDLE, P_PHASE1, P_DELAY, P_PHASE2} state_e;
  state_e state, state_next;

  always_comb begin
    state_next = state;
    tmr_load   = 1'b0;
    tmr_val    = t1;
    done       = 1'b0;
    unique case (state)
      P_IDLE:   if (start)   begin tmr_load = 1'b1; tmr_val = t1; state_next = P_PHASE1; end
      P_PHASE1: if (timeout) begin tmr_load = 1'b1; tmr_val = t2; state_next = P_DELAY;  end
      P_DELAY:  if (timeout) begin tmr_load = 1'b1; tmr_val = t1; state_next = P_PHASE2; end
      P_PHASE2: if (timeout) begin done = 1'b1;                   state_next = P_IDLE;   end
      default:  state_next = P_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= P_IDLE;
    else     state <= state_next;
  end

  assign dac_on = (state == P_PHASE1) || (state == P_PHASE2);
  assign invert = (state == P_PHASE2);
  assign busy   = (state != P_IDLE);

endmodule
