// Pixel RAM of a DAC subsystem: two banks of NUM_CH words of 7 bits.
//
// The amplitude bank holds one current amplitude per channel and the pulse
// width bank one pulse width per channel. Each bank has one write port,
// written from the data bus, and shares one asynchronous read port address
// with the other bank, so the amplitude and the pulse width of the same
// channel are read together. A fill strobe writes one value into every word
// of a bank at once (the bank-initialise special address). The banks clear
// on reset, which is this design's choice. Writes take effect at the next
// clock edge; a fill wins over a single-word write to the same bank.
module pixel_ram
  import stim_pkg::*;
#(
  parameter int unsigned DEPTH = NUM_CH
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [MAG_W-1:0]         wdata,
  input  logic                     we_amp,
  input  logic                     we_pw,
  input  logic                     fill_amp,
  input  logic                     fill_pw,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [MAG_W-1:0]         rd_amp,
  output logic [MAG_W-1:0]         rd_pw
);

  logic [MAG_W-1:0] amp_mem [DEPTH];
  logic [MAG_W-1:0] pw_mem  [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) begin
        amp_mem[i] <= '0;
        pw_mem[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (fill_amp || (we_amp && waddr == i[$clog2(DEPTH)-1:0])) amp_mem[i] <= wdata;
        if (fill_pw  || (we_pw  && waddr == i[$clog2(DEPTH)-1:0])) pw_mem[i]  <= wdata;
      end
    end
  end

  assign rd_amp = amp_mem[raddr];
  assign rd_pw  = pw_mem[raddr];

endmodule
