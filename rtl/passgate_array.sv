// Behavioural model of the eight CMOS passgates of a DAC subsystem (analog).
//
// Each electrode line is switched either to the DAC output or to the EXHAUST
// line, as told by the channel demultiplexer. The model gives the current
// delivered into each electrode: the DAC current on the connected channel
// and zero on channels that sit on EXHAUST (EXHAUST is a grounded node that
// only drains residual charge). Switch resistance and charge injection are
// not modelled. Connecting more than one channel at a time is an error.
module passgate_array
  import stim_pkg::*;
#(
  parameter int unsigned NCH = NUM_CH
) (
  input  real            i_dac_ua,
  input  logic [NCH-1:0] connect,
  output real            i_ch_ua [NCH]
);

  always_comb begin
    for (int i = 0; i < NCH; i++)
      i_ch_ua[i] = connect[i] ? i_dac_ua : 0.0;
  end

  always_comb assert ($onehot0(connect)) else $error("passgate_array: more than one channel connected");

endmodule
