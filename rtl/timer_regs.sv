// Timer registers T1, T2 and T3 of a DAC subsystem.
//
// T1 is the width of each phase of the biphasic pulse, T2 the delay between
// the phases (both in fast timer ticks, 4 us at 250 kHz) and T3 the
// interpulse interval of the continuous pulse train (in slow ticks, 1/128 of
// the fast rate). T1 is written from the data bus or from the pulse width
// pixel RAM (bus first); T2 and T3 only from the data bus. All three clear on
// reset (this design's choice). Writes take effect at the next clock edge.
module timer_regs
  import stim_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [TIMER_W-1:0] bus_data,
  input  logic               t1_we_bus,
  input  logic               t1_we_ram,
  input  logic [TIMER_W-1:0] ram_data,
  input  logic               t2_we,
  input  logic               t3_we,
  output logic [TIMER_W-1:0] t1,
  output logic [TIMER_W-1:0] t2,
  output logic [TIMER_W-1:0] t3
);

  always_ff @(posedge clk) begin
    if (rst) begin
      t1 <= '0;
      t2 <= '0;
      t3 <= '0;
    end else begin
      if (t1_we_bus)      t1 <= bus_data;
      else if (t1_we_ram) t1 <= ram_data;
      if (t2_we) t2 <= bus_data;
      if (t3_we) t3 <= bus_data;
    end
  end

endmodule
