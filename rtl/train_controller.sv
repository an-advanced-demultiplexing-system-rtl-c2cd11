// Train controller: the continuous pulse mode of a DAC subsystem.
//
// While enable is high (continuous mode, 110) it walks a channel counter
// through the NUM_CH channels. For each channel it loads the amplitude
// register and T1 from the pixel RAM (load_regs, one cycle), starts the
// pulse controller in the next cycle and waits for its done. After the last
// channel it loads the timer with T3 on the slow time base (ipi_load) and
// waits for the time-out, then starts over at channel 0. This is the
// described sequence. When enable falls it returns to idle at once; a pulse
// already started completes on its own. It waits for the pulse controller
// to be idle before it begins (both are this design's choices).
//
// Timing with a fast tick every cycle: each channel takes 2*T1 + T2 + 2
// cycles (load, start, pulse), and a whole frame NUM_CH of those plus the
// interpulse interval of T3 slow ticks.
module train_controller
  import stim_pkg::*;
#(
  parameter int unsigned NCH = NUM_CH
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   enable,
  input  logic                   pc_busy,
  input  logic                   pc_done,
  input  logic                   timeout,     // from the timer, during the IPI
  output logic [$clog2(NCH)-1:0] ch,
  output logic                   load_regs,
  output logic                   start_pulse,
  output logic                   ipi_load,
  output logic                   in_ipi,
  output logic                   active
);

  typedef enum logic [2:0] {T_IDLE, T_LOAD, T_START, T_WAIT, T_IPI} state_e;
  state_e state;

  localparam logic [$clog2(NCH)-1:0] LAST = $clog2(NCH)'(NCH - 1);

  assign load_regs   = (state == T_LOAD);
  assign start_pulse = (state == T_START);
  assign ipi_load    = (state == T_WAIT) && pc_done && (ch == LAST);
  assign in_ipi      = (state == T_IPI);
  assign active      = (state != T_IDLE);

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      state <= T_IDLE;
      ch    <= '0;
    end else begin
      unique case (state)
        T_IDLE:  if (!pc_busy) begin ch <= '0; state <= T_LOAD; end
        T_LOAD:  state <= T_START;
        T_START: state <= T_WAIT;
        T_WAIT:  if (pc_done) begin
                   if (ch == LAST) state <= T_IPI;
                   else begin ch <= ch + 1'b1; state <= T_LOAD; end
                 end
        T_IPI:   if (timeout) begin ch <= '0; state <= T_LOAD; end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
