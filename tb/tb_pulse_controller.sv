// Testbench for pulse_controller. A simple timer model in the testbench
// answers its loads. Each pulse is sampled cycle by cycle and must be T1
// cycles of DAC on, T2 cycles off, T1 cycles on with the sign inverted,
// then idle, with done in the last cycle and starts ignored while busy.
module tb_pulse_controller;
  import stim_pkg::*;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [6:0] t1 = 7'd3, t2 = 7'd2;
  logic timeout, tmr_load, dac_on, invert, busy, done;
  logic [6:0] tmr_val;
  logic [6:0] tcnt = '0;
  logic       trun = 1'b0;
  int checks = 0, failures = 0;

  pulse_controller dut (.*);
  always #5 clk = ~clk;

  // Timer model: N cycles from the loading edge, time-out in the last one.
  assign timeout = trun && (tcnt <= 7'd1);
  always @(posedge clk) begin
    if (tmr_load) begin tcnt <= tmr_val; trun <= 1'b1; end
    else if (timeout) trun <= 1'b0;
    else if (trun) tcnt <= tcnt - 7'd1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one_pulse(input logic [6:0] w, input logic [6:0] d);
    int n;
    t1 = w; t2 = d;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    n = int'(w) * 2 + int'(d);
    for (int i = 0; i < n; i++) begin
      bit exp_on, exp_inv;
      exp_on  = (i < w) || (i >= w + d);
      exp_inv = (i >= w + d);
      check(busy && dac_on == exp_on && invert == exp_inv && done == (i == n - 1),
            $sformatf("T1=%0d T2=%0d cycle %0d: on=%0d inv=%0d done=%0d", w, d, i, dac_on, invert, done));
      if (i == 1) start = 1'b1;          // ignored while busy
      if (i == 2) start = 1'b0;
      @(negedge clk);
    end
    check(!busy && !dac_on && !invert, "idle after pulse");
    repeat (3) @(negedge clk);
    check(!busy, "start while busy must not queue a pulse");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(!busy && !dac_on, "idle after reset");
    one_pulse(7'd3, 7'd2);
    one_pulse(7'd25, 7'd3);     // 100 us phases, ~10 us delay at 4 us per tick
    one_pulse(7'd50, 7'd3);     // 200 us phases
    one_pulse(7'd1, 7'd1);
    for (int k = 0; k < 5; k++) one_pulse(7'($urandom_range(2, 60)), 7'($urandom_range(2, 20)));
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
