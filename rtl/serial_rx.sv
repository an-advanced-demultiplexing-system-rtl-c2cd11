// Input controller, shift register and address latch of the input section.
//
// The DATA line is sampled on every rising clock edge (the transmitter shares
// the chip clock, so the link is synchronous). The line idles high. A low bit
// seen while idle is taken as a start bit; the next 7 bits are the address
// (LSB first), which is copied into the address latch as soon as it is
// complete, then 7 magnitude bits (LSB first), then two stop bits that must
// read 0 and then 1. If both stop bits are right the word is delivered with a
// one-cycle word_valid strobe; otherwise err is high for one cycle and the
// word is dropped. Either way the controller is back to hunting for a start
// bit in the very next cycle, so a glitch on an idle line costs at most one
// dropped word and never desynchronises the receiver.
//
// Timing: if the start bit is sampled at edge k, the last stop bit is sampled
// at edge k+16 and word_valid (or err) is high from edge k+16 to k+17. The
// addr and mag outputs hold their values until the next word overwrites them.
// Word format, bit order and stop-bit rule follow the design description;
// reporting a bad frame only at the end of the second stop bit is this
// design's choice.
module serial_rx
  import stim_pkg::*;
(
  input  logic              clk,
  input  logic              rst,        // synchronous, active high
  input  logic              data_in,    // serial DATA line
  output logic [ADDR_W-1:0] addr,       // address latch
  output logic [MAG_W-1:0]  mag,        // magnitude of the last good word
  output logic              word_valid, // one cycle per good word
  output logic              err         // one cycle per bad frame (ERR pin)
);

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_STOP0, S_STOP1} state_e;

  state_e                   state;
  logic [3:0]               bitcnt;    // data bits received so far
  logic [ADDR_W+MAG_W-1:0]  shreg;     // shift register, LSB first in
  logic                     stop0_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      bitcnt     <= '0;
      shreg      <= '0;
      stop0_ok   <= 1'b0;
      addr       <= '0;
      mag        <= '0;
      word_valid <= 1'b0;
      err        <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      err        <= 1'b0;
      unique case (state)
        S_IDLE: begin
          bitcnt <= '0;
          if (!data_in) state <= S_DATA;
        end
        S_DATA: begin
          shreg  <= {data_in, shreg[ADDR_W+MAG_W-1:1]};
          bitcnt <= bitcnt + 4'd1;
          // After the 7th address bit the address sits in the top of the register.
          if (bitcnt == 4'(ADDR_W - 1))
            addr <= {data_in, shreg[ADDR_W+MAG_W-1:MAG_W+1]};
          if (bitcnt == 4'(ADDR_W + MAG_W - 1)) state <= S_STOP0;
        end
        S_STOP0: begin
          stop0_ok <= !data_in;
          state    <= S_STOP1;
        end
        S_STOP1: begin
          state <= S_IDLE;
          if (stop0_ok && data_in) begin
            word_valid <= 1'b1;
            mag        <= shreg[ADDR_W+MAG_W-1:ADDR_W];
          end else begin
            err <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A word and an error are never reported together.
  assert property (@(posedge clk) disable iff (rst) !(word_valid && err));

endmodule
