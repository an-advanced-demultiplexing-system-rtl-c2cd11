// Amplitude register of a DAC subsystem.
//
// Holds the 7-b DAC code: bit 6 is the sign of the current (0 cathodal sink,
// 1 anodal source, the polarity being this design's choice) and bits 5..0
// the magnitude. It is written from the data bus or from the amplitude pixel
// RAM (bus first if both are strobed). While the invert input is high the
// sign bit presented to the DAC is flipped; the pulse controller holds it
// high for the second phase of a biphasic pulse. Using a level that leaves
// the stored value unchanged, rather than toggling the stored bit, is this
// design's choice. Writes take effect at the next clock edge.
module amp_reg
  import stim_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             we_bus,
  input  logic [MAG_W-1:0] bus_data,
  input  logic             we_ram,
  input  logic [MAG_W-1:0] ram_data,
  input  logic             invert,
  output logic [MAG_W-1:0] value,     // stored value
  output logic [MAG_W-1:0] dac_code   // value with the phase sign applied
);

  always_ff @(posedge clk) begin
    if (rst)         value <= '0;
    else if (we_bus) value <= bus_data;
    else if (we_ram) value <= ram_data;
  end

  assign dac_code = {value[MAG_W-1] ^ invert, value[MAG_W-2:0]};

endmodule
