// DAC subsystem: the control element behind one DAC and its eight channels.
//
// It holds the amplitude register, the timer registers T1..T3, the timer,
// the pulse controller, the two-bank pixel RAM, the train controller and the
// channel decoder. It acts on decoded words whose DAC select field is its
// own DAC_ID or the broadcast code 11, in the way the chip mode asks:
//
//   load (000)       normal writes update the RAM and the register the
//                    magnitude names (amplitude register or T1); no output.
//   basic (001)      the magnitude is always an amplitude; it is stored and
//                    the DAC drives it continuously into the addressed channel.
//   single (010)     the magnitude goes to RAM and to its register, the other
//                    value of the pair is fetched from RAM for that channel,
//                    and one biphasic pulse is sent on it.
//   continuous (110) the train controller pulses every channel in turn from
//                    RAM, then waits T3 slow ticks; writes only update RAM.
//
// Special words write T2/T3 or fill a RAM bank in any mode. Outside the
// basic mode a channel is connected to the DAC only while a pulse is in
// progress; all others sit on EXHAUST.
//
// Which state each mode updates follows the description; what happens to a
// single-pulse write that arrives while a pulse is still running (its RAM
// update is kept, the pulse is not sent), and that writes in continuous mode
// leave the registers alone so the pulse in flight keeps its values, are this
// design's choices. Timing: a single-pulse word's pulse starts two cycles
// after its word strobe; see pulse_controller and train_controller.
module dac_subsystem
  import stim_pkg::*;
#(
  parameter logic [DSEL_W-1:0] DAC_ID = '0
) (
  input  logic               clk,
  input  logic               rst,
  input  cmd_t               cmd,        // decoded word, CMD_NONE when idle
  input  mode_e              mode,
  input  logic               fast_tick,
  input  logic               slow_tick,
  output logic [MAG_W-1:0]   dac_code,   // sign + magnitude to the DAC
  output logic               dac_en,     // DAC switched on
  output logic [NUM_CH-1:0]  connect,    // passgate to the DAC
  output logic [NUM_CH-1:0]  exhaust,    // passgate to EXHAUST
  output logic               pulse_busy
);

  // ---- address match and write classification ---------------------------
  logic hit, wr_normal, is_pw, wr_treg, wr_fill;
  assign hit       = (cmd.dsel == DAC_ID) || (cmd.dsel == DSEL_ALL);
  assign wr_normal = hit && (cmd.cmd == CMD_NORMAL);
  assign wr_treg   = hit && (cmd.cmd == CMD_TREG);
  assign wr_fill   = hit && (cmd.cmd == CMD_BANK_FILL);
  // In the basic mode the magnitude always means an amplitude.
  assign is_pw     = cmd.sel_pw && (mode != MODE_BASIC);

  // ---- sub-blocks ---------------------------------------------------------
  logic [CH_W-1:0]    ch_reg;       // subsystem channel address register
  logic [CH_W-1:0]    train_ch, ram_raddr, out_ch;
  logic [MAG_W-1:0]   ram_amp, ram_pw, amp_value;
  logic [TIMER_W-1:0] t1, t2, t3;
  logic               pc_start, pc_load, pc_dac_on, pc_invert, pc_done;
  logic [TIMER_W-1:0] pc_tmr_val;
  logic               tc_load_regs, tc_start, tc_ipi_load, tc_in_ipi, tc_active;
  logic               tmr_timeout, tmr_running;
  logic               single_go, single_start;
  logic               reg_wr_bus, amp_we_bus, t1_we_bus, amp_we_ram, t1_we_ram;

  // A single-pulse write is acted on only if no pulse or train is running.
  assign single_go = wr_normal && (mode == MODE_SINGLE) && !pulse_busy && !tc_active;

  // Register writes from the data bus.
  assign reg_wr_bus = wr_normal && ((mode == MODE_LOAD) || (mode == MODE_BASIC) || single_go);
  assign amp_we_bus = reg_wr_bus && !is_pw;
  assign t1_we_bus  = reg_wr_bus &&  is_pw;
  // Register loads from RAM: the other half of a single-pulse pair, or the
  // train controller's per-channel load.
  assign amp_we_ram = (single_go &&  is_pw) || tc_load_regs;
  assign t1_we_ram  = (single_go && !is_pw) || tc_load_regs;

  assign ram_raddr = tc_active ? train_ch : cmd.ch;

  always_ff @(posedge clk) begin
    if (rst) begin
      ch_reg       <= '0;
      single_start <= 1'b0;
    end else begin
      if (reg_wr_bus) ch_reg <= cmd.ch;
      single_start <= single_go;
    end
  end

  pixel_ram u_ram (
    .clk, .rst,
    .waddr(cmd.ch), .wdata(cmd.mag),
    .we_amp(wr_normal && !is_pw), .we_pw(wr_normal && is_pw),
    .fill_amp(wr_fill && !cmd.sel_pw), .fill_pw(wr_fill && cmd.sel_pw),
    .raddr(ram_raddr), .rd_amp(ram_amp), .rd_pw(ram_pw)
  );

  amp_reg u_amp (
    .clk, .rst,
    .we_bus(amp_we_bus), .bus_data(cmd.mag),
    .we_ram(amp_we_ram), .ram_data(ram_amp),
    .invert(pc_invert), .value(amp_value), .dac_code
  );

  timer_regs u_tregs (
    .clk, .rst, .bus_data(cmd.mag),
    .t1_we_bus, .t1_we_ram, .ram_data(ram_pw),
    .t2_we(wr_treg && !cmd.sel_pw), .t3_we(wr_treg && cmd.sel_pw),
    .t1, .t2, .t3
  );

  assign pc_start = single_start || tc_start;

  pulse_controller u_pc (
    .clk, .rst, .start(pc_start), .t1, .t2, .timeout(tmr_timeout),
    .tmr_load(pc_load), .tmr_val(pc_tmr_val),
    .dac_on(pc_dac_on), .invert(pc_invert), .busy(pulse_busy), .done(pc_done)
  );

  train_controller u_tc (
    .clk, .rst, .enable(mode == MODE_CONT),
    .pc_busy(pulse_busy), .pc_done, .timeout(tmr_timeout),
    .ch(train_ch), .load_regs(tc_load_regs), .start_pulse(tc_start),
    .ipi_load(tc_ipi_load), .in_ipi(tc_in_ipi), .active(tc_active)
  );

  // The one timer is shared: the pulse controller and the train controller
  // never load it in the same cycle (the IPI load comes with done).
  countdown_timer u_tmr (
    .clk, .rst, .fast_tick, .slow_tick,
    .load(pc_load || tc_ipi_load),
    .load_val(tc_ipi_load ? t3 : pc_tmr_val),
    .slow_sel(tc_ipi_load),
    .running(tmr_running), .timeout(tmr_timeout)
  );

  assign out_ch = (mode == MODE_CONT) ? train_ch : ch_reg;
  assign dac_en = (mode == MODE_BASIC) || pc_dac_on;

  channel_demux u_demux (
    .ch(out_ch), .active((mode == MODE_BASIC) || pulse_busy),
    .connect, .exhaust
  );

  // Handshake rules between the controllers.
  assert property (@(posedge clk) disable iff (rst) !(pc_load && tc_ipi_load));
  assert property (@(posedge clk) disable iff (rst) tc_start |-> !pulse_busy);
  assert property (@(posedge clk) disable iff (rst) $onehot0(connect));

endmodule
