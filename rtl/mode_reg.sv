// Chip mode register (one per chip).
//
// Three bits taken from the low end of the magnitude field of a mode-register
// write. Codes 000 load, 001 basic, 010 single pulse and 110 continuous
// pulse are the described ones; any other code is kept in mode_bits but
// decoded as load mode (no DAC activity), which is this design's choice, as
// is coming out of reset in load mode. The new mode is visible in the cycle
// after the write strobe.
module mode_reg
  import stim_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       we,
  input  logic [2:0] wdata,
  output logic [2:0] mode_bits,  // raw register contents
  output mode_e      mode        // decoded operating mode
);

  always_ff @(posedge clk) begin
    if (rst)     mode_bits <= MODE_LOAD;
    else if (we) mode_bits <= wdata;
  end

  always_comb begin
    unique case (mode_bits)
      MODE_BASIC:  mode = MODE_BASIC;
      MODE_SINGLE: mode = MODE_SINGLE;
      MODE_CONT:   mode = MODE_CONT;
      default:     mode = MODE_LOAD;
    endcase
  end

endmodule
