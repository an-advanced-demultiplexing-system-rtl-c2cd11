// Repeat-rate testbench for stim_chip at its default parameters.
//
// Continuous mode: for several interpulse intervals T3 the time between
// successive pulses on channel 0 is measured and compared with the frame
// length 8 x (2*T1 + T2 + 2) cycles plus T3 slow ticks (between T3-1 and T3
// slow periods, since SLOW runs freely), and the resulting repeat rate is
// printed. T3 = 3 must reach the 300 Hz upper end of the usual stimulation
// range. Single pulse mode: all eight channels are pulsed at 150 Hz each
// with one word per pulse, and every word must produce its pulse.
module tb_stim_rates;
  import stim_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  localparam int TCLK = 4000;    // 250 kHz
  localparam int T1 = 25, T2 = 3;

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

  always @(posedge clk) begin
    cyc++;
    if (cyc % 64 == 0) slow_in <= ~slow_in;
  end

  // Start cycle of every pulse, per channel.
  int starts [8][$];
  int n_pulses = 0;
  logic [7:0] prev_conn = '0;
  always @(posedge clk) begin
    for (int i = 0; i < 8; i++)
      if (ch_connect[0][i] && !prev_conn[i]) begin starts[i].push_back(cyc); n_pulses++; end
    prev_conn <= ch_connect[0];
  end

  task automatic send(input logic [6:0] a, input logic [6:0] m);
    logic [16:0] frame;
    frame = {1'b1, 1'b0, m, a, 1'b0};
    for (int i = 0; i < 17; i++) @(negedge clk) data_in = frame[i];
    @(negedge clk) data_in = 1'b1;
  endtask

  initial begin
    int t3s [4] = '{1, 3, 10, 40};
    repeat (3) @(negedge clk);
    rst_pin = 1'b0;
    send(7'b1010000, 7'(T2));            // T2
    send(7'b1100011, 7'(T1));            // fill pulse widths
    send(7'b1000011, 7'h40 | 7'd25);     // fill amplitudes: 50 uA anodal first

    foreach (t3s[k]) begin
      int lo, hi, pulses_cyc, nper;
      send(7'b1011000, 7'b000);          // load mode
      send(7'b1110000, 7'(t3s[k]));      // T3
      for (int i = 0; i < 8; i++) starts[i].delete();
      send(7'b1011000, 7'b110);          // continuous
      repeat (6 * (8 * (2 * T1 + T2 + 2) + 128 * t3s[k]) + 200) @(negedge clk);
      pulses_cyc = 8 * (2 * T1 + T2 + 2);
      lo = pulses_cyc + 128 * (t3s[k] - 1);
      hi = pulses_cyc + 128 * t3s[k] + 2;
      nper = starts[0].size() - 1;
      check(nper >= 4, $sformatf("T3=%0d: only %0d frames", t3s[k], nper));
      for (int f = 0; f < nper; f++) begin
        int per;
        per = starts[0][f + 1] - starts[0][f];
        check(per >= lo && per <= hi, $sformatf("T3=%0d: frame of %0d cycles, expected %0d..%0d", t3s[k], per, lo, hi));
        if (f == 0)
          $display("T3=%0d: frame %0d cycles = %0d us, repeat rate %0d Hz", t3s[k], per, per * 4, 250000 / per);
      end
      for (int c = 1; c < 8; c++)
        check(starts[c].size() >= nper, $sformatf("T3=%0d: channel %0d pulsed less often", t3s[k], c));
      if (t3s[k] == 3) check(250000 / hi >= 300, "300 Hz not reachable with T3 = 3");
    end

    // Single pulse mode: 8 channels at 150 Hz each, one word per pulse.
    send(7'b1011000, 7'b000);
    repeat (100) @(negedge clk);
    send(7'b1011000, 7'b010);
    for (int i = 0; i < 8; i++) starts[i].delete();
    begin
      int t0, period;
      period = 250000 / 150;             // 1666 cycles per channel period
      for (int rep = 0; rep < 5; rep++) begin
        t0 = cyc;
        for (int c = 0; c < 8; c++) begin
          send({2'b00, 3'(c), 2'b00}, 7'h40 | 7'(10 + c));
          repeat (2 * T1 + T2 + 4) @(negedge clk);   // one pulse apart
        end
        while (cyc - t0 < period) @(negedge clk);
      end
      for (int c = 0; c < 8; c++) begin
        check(starts[c].size() == 5, $sformatf("single mode ch %0d: %0d of 5 pulses", c, starts[c].size()));
        for (int r = 0; r + 1 < starts[c].size(); r++)
          check(starts[c][r + 1] - starts[c][r] == period || starts[c][r + 1] - starts[c][r] == period + 1,
                $sformatf("single mode ch %0d period %0d", c, starts[c][r + 1] - starts[c][r]));
      end
      $display("single pulse mode: 8 channels x 150 Hz, link load %0d bit/s of 250000", 8 * 150 * 17);
    end
    check(n_pulses > 0, "no pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
