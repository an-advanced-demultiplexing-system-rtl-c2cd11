// Tick divider.
//
// Passes on one of every DIV input ticks as an output tick, in the same clock
// cycle as the input tick it keeps; the logic runs on the master clock and
// the ticks are clock enables, not clocks. Used twice in the chip: as the
// master-clock prescaler that makes the 250 kHz timer tick (DIV = 1 on the
// eight-channel chip, whose master clock is 250 kHz; a faster master clock,
// such as 2 MHz with DIV = 8, would need more), and as the 7-b divide-by-128
// that makes the slow interpulse-interval tick from the timer tick. On the
// eight-channel chip that second divider sat off chip and arrived on the
// SLOW pin; the chip top chooses between the pin and this divider.
module clk_divider #(
  parameter int unsigned DIV = 128
) (
  input  logic clk,
  input  logic rst,
  input  logic tick_in,
  output logic tick_out
);

  if (DIV <= 1) begin : g_pass
    assign tick_out = tick_in;
  end else begin : g_div
    localparam int unsigned CW = $clog2(DIV);
    logic [CW-1:0] cnt;

    assign tick_out = tick_in && (cnt == CW'(DIV - 1));

    always_ff @(posedge clk) begin
      if (rst)          cnt <= '0;
      else if (tick_out) cnt <= '0;
      else if (tick_in)  cnt <= cnt + CW'(1);
    end
  end

endmodule
