// Behavioural model of the current-mirror DAC (analog; not synthesizable).
//
// The real part is a bias section feeding binary-weighted, mirrored current
// sources (PMOS, anodal) and sinks (NMOS, cathodal); each weight has its own
// series switch gated by one magnitude bit, so bit k adds 2**k unit currents.
// This model returns the ideal output current in microamps: the sum of the
// enabled weights times LSB_UA, positive (sourced) when the sign bit is 1 and
// negative (sunk) when it is 0, and zero while en is low. The unit current
// is a parameter because on the chip it follows the supply voltage and is
// calibrated by trimming it; the 2 uA default is this model's assumption,
// chosen so that the 60..120 uA pulses of the eight-channel demonstration
// are codes 30..60. Mismatch, compliance and settling are not modelled.
module current_dac
  import stim_pkg::*;
#(
  parameter real LSB_UA = 2.0
) (
  input  logic [MAG_W-1:0] code,   // bit 6 sign, bits 5..0 magnitude
  input  logic             en,     // DAC on
  output real              i_ua    // output current, + = anodal (sourced)
);

  real mag_ua;

  always_comb begin
    mag_ua = 0.0;
    for (int k = 0; k < MAG_W - 1; k++)
      if (code[k]) mag_ua = mag_ua + LSB_UA * real'(1 << k);
    if (!en)                 i_ua = 0.0;
    else if (code[MAG_W-1])  i_ua = mag_ua;
    else                     i_ua = -mag_ua;
  end

endmodule
