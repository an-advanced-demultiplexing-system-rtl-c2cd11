// Testbench for stim_chip with the time bases of the scaled-up chip: a
// 2 MHz master clock divided by FAST_DIV = 8 down to the 250 kHz timer tick,
// and the slow interpulse-interval tick made on chip (ON_CHIP_SLOW = 1,
// divide by 128) instead of coming in on SLOW, which is held low. Serial
// words now run at one bit per 2 MHz cycle. In continuous mode the delay and
// the second phase must last exactly 8*T2 and 8*T1 master cycles (the first
// phase starts at an arbitrary point of the tick period, so 8*(T1-1)+1 to
// 8*T1), and a frame must include an interval of T3 slow ticks of 1024 cycles.
module tb_stim_scaled_clock;
  import stim_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  localparam int T1 = 6, T2 = 2, T3 = 2;

  logic clk = 1'b0, rst_pin = 1'b1, data_in = 1'b1, slow_in = 1'b0;
  logic err;
  logic [6:0] dac_code [1];
  logic       dac_en [1];
  logic [7:0] ch_connect [1], ch_exhaust [1];
  mode_e mode;
  real electrode_ua [8];

  stim_chip #(.FAST_DIV(8), .ON_CHIP_SLOW(1'b1)) dut (.*);
  always #250 clk = ~clk;   // 2 MHz

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) cyc++;

  task automatic send(input logic [6:0] a, input logic [6:0] m);
    logic [16:0] frame;
    frame = {1'b1, 1'b0, m, a, 1'b0};
    for (int i = 0; i < 17; i++) @(negedge clk) data_in = frame[i];
    @(negedge clk) data_in = 1'b1;
  endtask

  // Per pulse: phase-1, delay and phase-2 lengths in master cycles.
  int w1, gap, w2, n_pulses = 0, last_end = 0, first_start [$];
  int state = 0;  // 0 idle, 1 phase 1, 2 delay, 3 phase 2
  always @(negedge clk) if (!rst_pin) begin
    if (ch_connect[0] != 0) begin
      if (state == 0) begin
        state = 1; w1 = 0; gap = 0; w2 = 0;
        if (ch_connect[0][0]) first_start.push_back(cyc);
      end
      if (dac_en[0] && state == 1) w1++;
      else if (!dac_en[0]) begin state = 2; gap++; end
      else begin state = 3; w2++; end
    end else if (state != 0) begin
      state = 0;
      n_pulses++;
      check(w2 == 8 * T1 && gap == 8 * T2, $sformatf("pulse %0d: delay %0d, phase 2 %0d cycles", n_pulses, gap, w2));
      check(w1 > 8 * (T1 - 1) && w1 <= 8 * T1, $sformatf("pulse %0d: phase 1 %0d cycles", n_pulses, w1));
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_pin = 1'b0;
    send(7'b1010000, 7'(T2));
    send(7'b1110000, 7'(T3));
    send(7'b1100011, 7'(T1));
    send(7'b1000011, 7'd20);
    send(7'b1011000, 7'b110);
    repeat (4 * (8 * (8 * (2 * T1 + T2) + 24) + 1024 * T3)) @(negedge clk);
    check(n_pulses >= 24, $sformatf("only %0d pulses", n_pulses));
    check(first_start.size() >= 3, "fewer than three frames");
    for (int f = 0; f + 1 < first_start.size(); f++) begin
      int per, lo, hi;
      // each channel: RAM load and start (2 cycles), a first phase that
      // waits up to 7 cycles less for its first tick, the rest exact
      per = first_start[f + 1] - first_start[f];
      lo  = 8 * (8 * (2 * T1 + T2) + 2 - 7) + 1024 * (T3 - 1);
      hi  = 8 * (8 * (2 * T1 + T2) + 2) + 1024 * T3 + 8;
      check(per >= lo && per <= hi,
            $sformatf("frame %0d: %0d cycles, expected %0d..%0d", f, per, lo, hi));
    end
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
