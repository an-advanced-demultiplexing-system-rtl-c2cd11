// Multi-mode electrode stimulator chip (top level).
//
// One input section serves NUM_DACS DAC subsystems of eight channels each;
// the eight-channel demonstration chip has one (DAC select 00). The input
// section receives 17-bit serial words on DATA (synchronous with CLOCK),
// raises ERR for one cycle on a bad frame, decodes the address, keeps the
// chip mode register and turns a write to the reset address into a one-cycle
// reset of everything except the serial receiver (which must stay ready for
// a word sent right behind it; that exception is this design's choice). The
// RESET pin resets everything.
//
// Time bases are clock enables on the master clock: the fast timer tick is
// the master clock divided by FAST_DIV (1 on the demonstration chip, whose
// master clock is 250 kHz), and the slow interpulse-interval tick is either
// a rising edge on the SLOW pin (ON_CHIP_SLOW = 0, as on the demonstration
// chip, where the divider was off chip) or the fast tick divided by
// SLOW_DIV = 128 on chip (ON_CHIP_SLOW = 1). SLOW is sampled by the master
// clock, so it must be much slower than it.
//
// Each subsystem drives its DAC and its passgates. The DAC and passgates
// are analog; behavioural models of them turn the digital outputs into the
// current in microamps delivered into each electrode (electrode_ua). The
// digital DAC code, DAC enable and passgate controls are also brought out.
module stim_chip
  import stim_pkg::*;
#(
  parameter int unsigned NUM_DACS     = 1,    // 1..3 (select 11 is broadcast)
  parameter int unsigned FAST_DIV     = 1,
  parameter int unsigned SLOW_DIV     = 128,
  parameter bit          ON_CHIP_SLOW = 1'b0
) (
  input  logic                    clk,        // CLOCK
  input  logic                    rst_pin,    // RESET, active high
  input  logic                    data_in,    // DATA
  input  logic                    slow_in,    // SLOW
  output logic                    err,        // ERR
  output logic [MAG_W-1:0]        dac_code   [NUM_DACS],
  output logic                    dac_en     [NUM_DACS],
  output logic [NUM_CH-1:0]       ch_connect [NUM_DACS],
  output logic [NUM_CH-1:0]       ch_exhaust [NUM_DACS],
  output mode_e                   mode,
  output real                     electrode_ua [NUM_DACS*NUM_CH]
);

  // ---- input section -------------------------------------------------------
  logic [ADDR_W-1:0] rx_addr;
  logic [MAG_W-1:0]  rx_mag;
  logic              rx_valid;
  cmd_t              cmd;
  logic              soft_rst, core_rst;
  logic [2:0]        mode_bits;

  serial_rx u_rx (
    .clk, .rst(rst_pin), .data_in,
    .addr(rx_addr), .mag(rx_mag), .word_valid(rx_valid), .err
  );

  addr_decode u_dec (.valid(rx_valid), .addr(rx_addr), .mag(rx_mag), .cmd);

  assign soft_rst = (cmd.cmd == CMD_RESET);
  assign core_rst = rst_pin || soft_rst;

  mode_reg u_mode (
    .clk, .rst(core_rst), .we(cmd.cmd == CMD_MODE), .wdata(cmd.mag[2:0]),
    .mode_bits, .mode
  );

  // ---- time bases ------------------------------------------------------------
  logic fast_tick, div_slow_tick, slow_q, slow_tick;

  clk_divider #(.DIV(FAST_DIV)) u_fast_div (
    .clk, .rst(core_rst), .tick_in(1'b1), .tick_out(fast_tick)
  );
  clk_divider #(.DIV(SLOW_DIV)) u_slow_div (
    .clk, .rst(core_rst), .tick_in(fast_tick), .tick_out(div_slow_tick)
  );

  always_ff @(posedge clk) begin
    if (rst_pin) slow_q <= 1'b0;
    else         slow_q <= slow_in;
  end

  assign slow_tick = ON_CHIP_SLOW ? div_slow_tick : (slow_in && !slow_q);

  // ---- DAC subsystems ----------------------------------------------------------
  for (genvar d = 0; d < NUM_DACS; d++) begin : g_dac
    logic pulse_busy;
    real  i_dac_ua;
    real  i_ch_ua [NUM_CH];

    dac_subsystem #(.DAC_ID(DSEL_W'(d))) u_sub (
      .clk, .rst(core_rst), .cmd, .mode, .fast_tick, .slow_tick,
      .dac_code(dac_code[d]), .dac_en(dac_en[d]),
      .connect(ch_connect[d]), .exhaust(ch_exhaust[d]), .pulse_busy
    );

    current_dac u_dac (.code(dac_code[d]), .en(dac_en[d]), .i_ua(i_dac_ua));

    passgate_array u_pg (.i_dac_ua, .connect(ch_connect[d]), .i_ch_ua);

    for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
      assign electrode_ua[d*NUM_CH + c] = i_ch_ua[c];
    end
  end

  initial assert (NUM_DACS >= 1 && NUM_DACS <= 3)
    else $error("stim_chip: NUM_DACS must be 1..3 with a 2-bit DAC select");

endmodule
