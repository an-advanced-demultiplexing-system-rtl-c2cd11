// Address decoder for a received word.
//
// Splits the 7-b address latched by the input section into its fields and
// classifies the word (combinational, no state). a1..a0 select a DAC
// subsystem (11 = all of them). With a6 = 0 the word is a normal channel
// write: a4..a2 name one of the eight channels and a5 says whether the
// magnitude is a current amplitude (0) or a pulse width (1). With a6 = 1 the
// word is special: a4 a3 = 10 writes T2 or T3 (a5 chooses), 11 with a2 = 0
// writes the mode register and with a2 = 1 resets the chip, 00 fills a whole
// RAM bank (a5 chooses the bank). The address map is the one of the
// described test chip; the remaining code (a4 a3 = 01) is left unused and
// decodes to CMD_NONE, which is this design's choice.
module addr_decode
  import stim_pkg::*;
(
  input  logic              valid,   // word_valid from the input section
  input  logic [ADDR_W-1:0] addr,
  input  logic [MAG_W-1:0]  mag,
  output cmd_t              cmd
);

  always_comb begin
    cmd.dsel   = addr[1:0];
    cmd.ch     = addr[4:2];
    cmd.sel_pw = addr[5];
    cmd.mag    = mag;
    if (!valid)
      cmd.cmd = CMD_NONE;
    else if (!addr[6])
      cmd.cmd = CMD_NORMAL;
    else
      unique case (addr[4:3])
        2'b10:   cmd.cmd = CMD_TREG;
        2'b11:   cmd.cmd = addr[2] ? CMD_RESET : CMD_MODE;
        2'b00:   cmd.cmd = CMD_BANK_FILL;
        default: cmd.cmd = CMD_NONE;
      endcase
  end

endmodule
