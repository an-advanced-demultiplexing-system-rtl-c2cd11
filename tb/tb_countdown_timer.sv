// Testbench for countdown_timer: a load of N on the fast base times out
// exactly N clock cycles later (fast tick every cycle, as on the 8-channel
// chip); on the slow base after N slow ticks; reload in the time-out cycle.
module tb_countdown_timer;
  import stim_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic fast_tick = 1'b1, slow_tick = 1'b0, load = 1'b0, slow_sel = 1'b0;
  logic [6:0] load_val = '0;
  logic running, timeout;
  int checks = 0, failures = 0;
  int cyc = 0;

  countdown_timer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Load at the next edge, return the number of cycles until time-out.
  // Load at the next edge; count the cycles after it up to and including
  // the one that carries the time-out.
  task automatic measure(input logic [6:0] n, input bit slow, output int cycles);
    @(negedge clk) load = 1'b1; load_val = n; slow_sel = slow;
    @(negedge clk) load = 1'b0;
    cycles = 1;
    while (!timeout) begin @(negedge clk); cycles++; end
    @(negedge clk);
  endtask

  // Slow tick every 8 cycles.
  always @(posedge clk) slow_tick <= (cyc % 8 == 7);

  initial begin
    int c;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 6; k++) begin
      logic [6:0] n;
      n = (k == 0) ? 7'd1 : (k == 1) ? 7'd2 : (k == 2) ? 7'd25 : (k == 3) ? 7'd127 : 7'($urandom_range(1, 127));
      measure(n, 1'b0, c);
      check(c == n, $sformatf("fast count %0d took %0d cycles", n, c));
      check(!running, "still running after time-out");
    end
    measure(7'd0, 1'b0, c);
    check(c == 1, "count 0 behaves as 1");
    // Slow base: N slow ticks, between 8(N-1)+1 and 8N cycles.
    for (int n = 1; n <= 4; n++) begin
      measure(7'(n), 1'b1, c);
      check(c > 8 * (n - 1) && c <= 8 * n, $sformatf("slow count %0d took %0d cycles", n, c));
    end
    // Reload in the time-out cycle: back-to-back intervals 3 then 5.
    @(negedge clk) load = 1'b1; load_val = 7'd3; slow_sel = 1'b0;
    @(negedge clk) load = 1'b0;
    c = 1;
    while (!timeout) begin @(negedge clk); c++; end
    check(c == 3, "first interval");
    load = 1'b1; load_val = 7'd5;
    @(negedge clk) load = 1'b0;
    c = 1;
    while (!timeout) begin @(negedge clk); c++; end
    check(c == 5, $sformatf("reloaded interval %0d", c));
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
