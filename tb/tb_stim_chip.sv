// End-to-end testbench for stim_chip at its default parameters (the
// eight-channel chip: one DAC, 250 kHz master clock = timer clock, SLOW
// supplied from outside as the clock divided by 128).
//
// Everything goes in through the serial DATA line as framed words. The
// testbench follows the electrode currents of the DAC/passgate models and
// cuts them into pulses (channel, phase currents and widths in
// microseconds, delay), then checks:
//   - load mode: registers and RAM set up, no current;
//   - basic mode: a cathodal and an anodal amplitude sweep, steady current
//     on the addressed electrode, monotonic in the code;
//   - single pulse mode: a 20 uA, 200 us pulse from an amplitude word and
//     one from a pulse-width word, and a word sent during a pulse;
//   - continuous mode: the eight-channel set-up of the chip demonstration
//     (100 us phases, 60..120 uA, channels 0-3 cathodal first, 4-7 anodal
//     first) over several frames, with the interpulse interval on SLOW;
//   - framing errors and an idle-line glitch on ERR, a chip reset word, a
//     broadcast bank fill and words for a DAC that does not exist.
// Each of these mechanisms is counted and must have happened.
module tb_stim_chip;
  import stim_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  localparam int TCLK = 4000;              // 250 kHz

  logic clk = 1'b0, rst_pin = 1'b1, data_in = 1'b1, slow_in = 1'b0;
  logic err;
  logic [6:0] dac_code [1];
  logic       dac_en [1];
  logic [7:0] ch_connect [1], ch_exhaust [1];
  mode_e mode;
  real electrode_ua [8];

  stim_chip dut (.*);

  always #(TCLK / 2) clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Off-chip SLOW divider: clock / 128.
  always @(posedge clk) begin
    cyc++;
    if (cyc % 64 == 0) slow_in <= ~slow_in;
  end

  // ---- mechanism counters ----
  int n_err = 0, n_pulses = 0, n_frames = 0, n_ipi = 0, n_basic = 0;
  int n_single_amp = 0, n_single_pw = 0, n_dropped = 0, n_reset = 0;
  int n_fill = 0, n_other_dac = 0, n_mode_sw = 0, n_glitch = 0;
  always @(posedge clk) if (err) n_err++;

  // ---- serial words ----
  task automatic send(input logic [6:0] a, input logic [6:0] m,
                      input logic s0 = 1'b0, input logic s1 = 1'b1);
    logic [16:0] frame;
    frame = {s1, s0, m, a, 1'b0};
    for (int i = 0; i < 17; i++) @(negedge clk) data_in = frame[i];
    @(negedge clk) data_in = 1'b1;
    @(negedge clk);
  endtask
  function automatic logic [6:0] a_norm(input int ch, input bit pw, input logic [1:0] d = 2'b00);
    return {1'b0, pw, 3'(ch), d};
  endfunction
  localparam logic [6:0] A_T2 = 7'b1010000, A_T3 = 7'b1110000;
  localparam logic [6:0] A_MODE = 7'b1011000, A_RESET = 7'b1011100;
  localparam logic [6:0] A_FILL_AMP = 7'b1000011, A_FILL_PW = 7'b1100011;
  task automatic set_mode(input logic [2:0] m);
    send(A_MODE, {4'b0, m});
    n_mode_sw++;
  endtask

  // ---- pulse monitor: cut electrode currents into pulses ----
  typedef struct {
    int ch; real i1; real i2; int w1; int gap; int w2; int t_start;
  } pulse_t;
  pulse_t pulses [$];
  int     mon_ch = -1;
  pulse_t cur;
  always @(negedge clk) begin
    int act;
    act = -1;
    for (int i = 0; i < 8; i++) if (ch_connect[0][i]) act = i;
    if (mode != MODE_BASIC) begin
      if (act >= 0 && mon_ch < 0) begin
        cur = '{ch: act, i1: 0.0, i2: 0.0, w1: 0, gap: 0, w2: 0, t_start: cyc};
      end
      if (act >= 0) begin
        if (electrode_ua[act] != 0.0 && cur.gap == 0) begin cur.w1++; cur.i1 = electrode_ua[act]; end
        else if (electrode_ua[act] == 0.0) cur.gap++;
        else begin cur.w2++; cur.i2 = electrode_ua[act]; end
        for (int i = 0; i < 8; i++)
          if (i != act && electrode_ua[i] != 0.0) begin
            failures++; $display("FAIL: current on unselected electrode %0d", i);
          end
      end
      if (act < 0 && mon_ch >= 0) begin pulses.push_back(cur); n_pulses++; end
    end
    mon_ch = act;
  end

  task automatic wait_pulses(input int n, input int max_cycles = 20000);
    int t0;
    t0 = cyc;
    while (pulses.size() < n && cyc - t0 < max_cycles) @(negedge clk);
  endtask

  // Amplitude code for a current in uA (2 uA per code step), sign bit 1 = anodal.
  function automatic logic [6:0] code_of(input int ua);
    return ua < 0 ? 7'(-ua / 2) : (7'(ua / 2) | 7'h40);
  endfunction

  initial begin
    pulse_t p;
    int amps [8] = '{-60, -80, -100, -120, 120, 100, 80, 60};
    repeat (3) @(negedge clk);
    rst_pin = 1'b0;
    repeat (3) @(negedge clk);

    // ---------- load mode: timing and RAM set-up ----------
    check(mode == MODE_LOAD, "starts in load mode");
    send(A_T2, 7'd3);                       // 12 us biphasic delay (nearest to 10 us)
    send(A_T3, 7'd2);                       // IPI: 2 slow ticks of 512 us
    send(A_FILL_PW, 7'd25);                 // every channel 100 us (25 x 4 us)
    send(A_FILL_AMP, 7'd1);
    n_fill++;
    for (int c = 0; c < 8; c++) send(a_norm(c, 0), code_of(amps[c]));
    send(a_norm(3, 0, 2'b01), 7'd99);       // DAC 01 does not exist: ignored
    n_other_dac++;
    check(n_pulses == 0 && dac_en[0] == 0, "load mode drives nothing");

    // ---------- basic mode: amplitude sweeps (DAC linearity test) ----------
    set_mode(3'b001);
    begin
      real prev;
      prev = 1.0e9;
      for (int m = 0; m < 64; m += 3) begin         // cathodal sweep on electrode 2
        send(a_norm(2, 0), 7'(m));
        check(electrode_ua[2] == -2.0 * m && ch_connect[0] == 8'h04, $sformatf("basic cathodal %0d", m));
        check(electrode_ua[2] < prev || m == 0, "cathodal sweep monotonic");
        prev = electrode_ua[2];
        n_basic++;
      end
      prev = -1.0;
      for (int m = 0; m < 64; m += 3) begin         // anodal sweep on electrode 6
        send(a_norm(6, 0), 7'h40 | 7'(m));
        check(electrode_ua[6] == 2.0 * m && electrode_ua[2] == 0.0, $sformatf("basic anodal %0d", m));
        check(electrode_ua[6] > prev, "anodal sweep monotonic");
        prev = electrode_ua[6];
        n_basic++;
      end
      repeat (50) @(negedge clk);
      check(electrode_ua[6] == 126.0, "basic current held between words");
    end

    // ---------- single pulse mode ----------
    set_mode(3'b010);
    // put channel 2 back to its demonstration amplitude (basic writes went to RAM)
    send(a_norm(2, 0), code_of(amps[2]));
    wait_pulses(1); void'(pulses.pop_front());
    send(a_norm(6, 0), code_of(amps[6]));
    wait_pulses(1); void'(pulses.pop_front());
    // 20 uA cathodal-first, 200 us phases on electrode 1: width word first
    send(a_norm(1, 1), 7'd50);              // pulse width 50 ticks, amplitude from RAM (-80)
    wait_pulses(1);
    p = pulses.pop_front();
    check(p.ch == 1 && p.i1 == -80.0 && p.i2 == 80.0 && p.w1 == 50 && p.w2 == 50 && p.gap == 3,
          $sformatf("single pw pulse: ch %0d %f/%f %0d/%0d/%0d", p.ch, p.i1, p.i2, p.w1, p.gap, p.w2));
    n_single_pw++;
    send(a_norm(1, 0), code_of(-20));       // amplitude word, width from RAM (now 50)
    // a second word while this pulse runs is stored but starts no pulse
    send(a_norm(0, 0), code_of(-60));
    n_dropped++;
    wait_pulses(1);
    p = pulses.pop_front();
    check(p.ch == 1 && p.i1 == -20.0 && p.i2 == 20.0 && p.w1 * 4 == 200 && p.w2 * 4 == 200 && p.gap * 4 == 12,
          $sformatf("single amp pulse (20 uA, 200 us): ch %0d %f %0d/%0d/%0d", p.ch, p.i1, p.w1, p.gap, p.w2));
    n_single_amp++;
    repeat (300) @(negedge clk);
    check(pulses.size() == 0, "word sent during a pulse started another");
    send(a_norm(1, 1), 7'd25);              // back to 100 us for channel 1
    wait_pulses(1); void'(pulses.pop_front());
    send(a_norm(1, 0), code_of(amps[1]));
    wait_pulses(1); void'(pulses.pop_front());

    // ---------- continuous pulse mode: the eight-channel demonstration ----------
    set_mode(3'b110);
    wait_pulses(8 * 3 + 1, 60000);
    for (int k = 0; k < 8 * 3; k++) begin
      int c;
      p = pulses.pop_front();
      c = k % 8;
      check(p.ch == c && p.i1 == real'(amps[c]) && p.i2 == -real'(amps[c]),
            $sformatf("cont pulse %0d: ch %0d i %f/%f", k, p.ch, p.i1, p.i2));
      check(p.w1 * 4 == 100 && p.w2 * 4 == 100 && p.gap == 3,
            $sformatf("cont pulse %0d: %0d/%0d/%0d", k, p.w1, p.gap, p.w2));
      if (c == 7) begin
        int ipi;
        ipi = pulses[0].t_start - (p.t_start + p.w1 + p.gap + p.w2);
        // 2 slow ticks of 128 cycles: between 129 and 256 cycles, plus the reload
        check(ipi > 128 && ipi <= 256 + 3, $sformatf("IPI %0d cycles", ipi));
        n_ipi++;
        n_frames++;
      end
    end
    // Frame update while running: channel 5 gets 40 uA from its next pulse on.
    send(a_norm(5, 0), code_of(40));
    wait_pulses(10, 60000);
    begin
      bit seen;
      seen = 0;
      while (pulses.size() > 0) begin
        p = pulses.pop_front();
        if (p.ch == 5 && p.i1 == 40.0) seen = 1;
      end
      check(seen, "RAM update in continuous mode not used");
    end

    // ---------- serial errors ----------
    begin
      int e0;
      e0 = n_err;
      send(a_norm(0, 0), 7'd1, 1'b1, 1'b1);   // bad first stop bit
      send(a_norm(0, 0), 7'd1, 1'b0, 1'b0);   // bad second stop bit
      check(n_err == e0 + 2, "framing errors not reported on ERR");
      @(negedge clk) data_in = 1'b0;          // glitch on the idle line
      @(negedge clk) data_in = 1'b1;
      repeat (25) @(negedge clk);
      check(n_err == e0 + 3, "glitch not reported once");
      n_glitch++;
    end

    // ---------- chip reset word ----------
    send(A_RESET, 7'd0);
    n_reset++;
    repeat (2) @(negedge clk);
    check(mode == MODE_LOAD && dut.g_dac[0].u_sub.t2 == 0 && dut.g_dac[0].u_sub.u_ram.pw_mem[3] == 0,
          "chip reset word");
    pulses.delete();
    repeat (600) @(negedge clk);
    check(pulses.size() == 0 && ch_connect[0] == 0, "no output after reset");

    // ---------- every mechanism happened ----------
    check(n_basic > 0, "basic mode never exercised");
    check(n_single_amp > 0 && n_single_pw > 0, "single pulse modes not exercised");
    check(n_dropped > 0, "write during pulse not exercised");
    check(n_frames >= 3 && n_ipi >= 3, "continuous frames/IPI not exercised");
    check(n_err >= 3 && n_glitch > 0, "framing errors not exercised");
    check(n_reset > 0 && n_fill > 0 && n_other_dac > 0 && n_mode_sw >= 3, "special words not exercised");
    $display("mechanisms: basic=%0d single_amp=%0d single_pw=%0d dropped=%0d frames=%0d ipi=%0d err=%0d glitch=%0d reset=%0d fill=%0d other_dac=%0d mode_switch=%0d pulses=%0d",
             n_basic, n_single_amp, n_single_pw, n_dropped, n_frames, n_ipi, n_err, n_glitch,
             n_reset, n_fill, n_other_dac, n_mode_sw, n_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
