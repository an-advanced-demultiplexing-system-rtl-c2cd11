// Testbench for dac_subsystem, driven with decoded words. It walks the four
// modes: load (no output), basic (steady current on the addressed channel),
// single pulse (one biphasic pulse per word, the other parameter from RAM,
// both amplitude and pulse-width words) and continuous (all eight channels
// in turn from RAM, then the interpulse interval). It also checks the DAC
// select (other DACs' words ignored, broadcast accepted), bank fills and
// the pulse timing in cycles.
module tb_dac_subsystem;
  import stim_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  cmd_t cmd;
  mode_e mode = MODE_LOAD;
  logic fast_tick = 1'b1, slow_tick = 1'b0;
  logic [6:0] dac_code;
  logic dac_en, pulse_busy;
  logic [7:0] connect, exhaust;
  int checks = 0, failures = 0;
  int cyc = 0;

  dac_subsystem #(.DAC_ID(2'b00)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    slow_tick <= (cyc % 4 == 3);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(input cmd_e c, input logic [1:0] dsel, input logic [2:0] ch,
                     input logic p, input logic [6:0] m);
    @(negedge clk);
    cmd.cmd = c; cmd.dsel = dsel; cmd.ch = ch; cmd.sel_pw = p; cmd.mag = m;
    @(negedge clk);
    cmd.cmd = CMD_NONE;
  endtask

  // Follow one pulse from its first connected cycle; report what it did.
  task automatic grab_pulse(output int ch, output logic [6:0] code1, output logic [6:0] code2,
                            output int w1, output int gap, output int w2);
    int guard = 0;
    while (connect == 0 && guard < 3000) begin @(negedge clk); guard++; end
    ch = $clog2(connect);
    w1 = 0; gap = 0; w2 = 0; code1 = dac_code; code2 = '0;
    while (connect != 0) begin
      check(connect == 8'(1 << ch) && exhaust == ~connect, "passgates changed during a pulse");
      if (dac_en && gap == 0) w1++;
      else if (!dac_en) gap++;
      else begin w2++; code2 = dac_code; end
      @(negedge clk);
    end
  endtask

  initial begin
    int ch, w1, gap, w2;
    logic [6:0] c1, c2;
    cmd = '0; cmd.cmd = CMD_NONE;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    // ---- load mode: initialise, nothing comes out ----
    put(CMD_TREG, 2'b00, 3'd0, 1'b0, 7'd3);     // T2 = 3
    put(CMD_TREG, 2'b00, 3'd0, 1'b1, 7'd2);     // T3 = 2 slow ticks
    put(CMD_BANK_FILL, 2'b11, 3'd0, 1'b1, 7'd5);  // all pulse widths 5
    put(CMD_BANK_FILL, 2'b00, 3'd0, 1'b0, 7'd9);  // all amplitudes 9
    for (int i = 0; i < 8; i++) put(CMD_NORMAL, 2'b00, 3'(i), 1'b0, 7'(10 + i));
    put(CMD_NORMAL, 2'b01, 3'd2, 1'b0, 7'd99);  // other DAC: ignored
    check(dut.t2 == 3 && dut.t3 == 2, "timer registers");
    check(dut.u_ram.pw_mem[4] == 5 && dut.u_ram.amp_mem[2] == 12 && dut.u_ram.amp_mem[7] == 17,
          "RAM contents after load");
    check(!dac_en && connect == 0 && exhaust == 8'hFF, "output in load mode");

    // ---- basic mode: steady current on the addressed channel ----
    mode = MODE_BASIC;
    put(CMD_NORMAL, 2'b00, 3'd3, 1'b0, 7'h45);
    check(dac_en && dac_code == 7'h45 && connect == 8'b0000_1000, "basic write ch3");
    repeat (20) @(negedge clk);
    check(dac_en && dac_code == 7'h45 && connect == 8'b0000_1000, "basic held");
    put(CMD_NORMAL, 2'b11, 3'd6, 1'b1, 7'h12);  // a5 ignored in basic; broadcast
    check(dac_code == 7'h12 && connect == 8'b0100_0000, "basic broadcast, a5 ignored");
    put(CMD_NORMAL, 2'b10, 3'd1, 1'b0, 7'h33);  // other DAC
    check(dac_code == 7'h12 && connect == 8'b0100_0000, "basic ignores other DAC");

    // ---- single pulse mode ----
    mode = MODE_SINGLE;
    @(negedge clk);
    check(!dac_en && connect == 0, "single mode idle");
    // amplitude word on ch5: width from RAM (5), T2 = 3
    put(CMD_NORMAL, 2'b00, 3'd5, 1'b0, 7'h1E);
    grab_pulse(ch, c1, c2, w1, gap, w2);
    check(ch == 5 && c1 == 7'h1E && c2 == 7'h5E, $sformatf("single amp pulse ch %0d codes %h %h", ch, c1, c2));
    check(w1 == 5 && gap == 3 && w2 == 5, $sformatf("single amp pulse timing %0d/%0d/%0d", w1, gap, w2));
    // pulse-width word on ch2: amplitude from RAM (12)
    put(CMD_NORMAL, 2'b00, 3'd2, 1'b1, 7'd7);
    grab_pulse(ch, c1, c2, w1, gap, w2);
    check(ch == 2 && c1 == 7'd12 && c2 == (7'd12 | 7'h40) && w1 == 7 && w2 == 7 && gap == 3,
          $sformatf("single pw pulse ch %0d %h %0d/%0d/%0d", ch, c1, w1, gap, w2));
    check(dut.u_ram.pw_mem[2] == 7 && dut.u_ram.amp_mem[5] == 7'h1E, "single writes go to RAM");

    // ---- continuous mode ----
    put(CMD_NORMAL, 2'b00, 3'd4, 1'b0, 7'h50);   // anodal-first on ch4
    repeat (20) @(negedge clk);
    mode = MODE_CONT;
    for (int i = 0; i < 8; i++) begin
      logic [6:0] amp;
      grab_pulse(ch, c1, c2, w1, gap, w2);
      amp = (i == 5) ? 7'h1E : (i == 4) ? 7'h50 : (i == 3) ? 7'h45 : (i == 6) ? 7'h12 : 7'(10 + i);
      check(ch == i && c1 == amp && c2 == (amp ^ 7'h40),
            $sformatf("cont pulse %0d: ch %0d code %h", i, ch, c1));
      check(w1 == ((i == 2) ? 7 : 5) && gap == 3, $sformatf("cont pulse %0d timing %0d/%0d", i, w1, gap));
    end
    // Interpulse interval: T3 = 2 slow ticks of 4 cycles, between 4 and 8 cycles + reload.
    begin
      int t0, dt;
      t0 = cyc;
      while (connect == 0) @(negedge clk);
      dt = cyc - t0;
      check($clog2(connect) == 0, "frame restarts at channel 0");
      check(dt >= 4 && dt <= 12, $sformatf("IPI of %0d cycles", dt));
    end
    // An update in continuous mode (made during channel 0's pulse) is used
    // the next time channel 1 is read from RAM.
    put(CMD_NORMAL, 2'b00, 3'd1, 1'b0, 7'h2A);
    for (int i = 0; i < 2; i++) grab_pulse(ch, c1, c2, w1, gap, w2);
    check(ch == 1 && c1 == 7'h2A, $sformatf("RAM update used at next access: ch %0d %h", ch, c1));

    mode = MODE_LOAD;
    repeat (40) @(negedge clk);
    check(connect == 0 && !dac_en, "stops after leaving continuous mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
