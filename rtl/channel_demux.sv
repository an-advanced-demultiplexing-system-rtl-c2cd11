// Channel demultiplexer control: the 3-to-8 decoder of a DAC subsystem.
//
// Decodes the 3-b channel number into the gate controls of the eight CMOS
// passgates. While active is high exactly one channel is connected to the
// DAC output (connect one-hot) and all others are tied to the EXHAUST line;
// while active is low every channel is on EXHAUST, which drains residual
// charge from the electrodes. Purely combinational.
module channel_demux
  import stim_pkg::*;
#(
  parameter int unsigned NCH = NUM_CH
) (
  input  logic [$clog2(NCH)-1:0] ch,
  input  logic                   active,
  output logic [NCH-1:0]         connect,
  output logic [NCH-1:0]         exhaust
);

  always_comb begin
    connect = '0;
    for (int i = 0; i < NCH; i++)
      connect[i] = active && (ch == i[$clog2(NCH)-1:0]);
    exhaust = ~connect;
  end

endmodule
