// Testbench for clk_divider: with DIV = 128 one output tick for every 128
// input ticks, coincident with an input tick, with the input ticking at
// random; with DIV = 8 every 8th cycle from a constant input.
module tb_clk_divider;
  logic clk = 1'b0, rst = 1'b1;
  logic tin = 1'b0, tout, tout8;
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, cyc8 = 0, last8 = -1;

  clk_divider #(.DIV(128)) dut (.clk, .rst, .tick_in(tin), .tick_out(tout));
  clk_divider #(.DIV(8))   dut8 (.clk, .rst, .tick_in(1'b1), .tick_out(tout8));
  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (tout) begin
      n_out++;
      checks++;
      if (!tin || n_in % 128 != 127) begin
        failures++; $display("FAIL: tick at input count %0d", n_in);
      end
    end
    if (tin) n_in++;
    if (tout8) begin
      checks++;
      if (cyc8 % 8 != 7) begin failures++; $display("FAIL: div8 at %0d", cyc8); end
    end
    cyc8++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (3000) @(negedge clk) tin = 1'($urandom);
    @(negedge clk) tin = 1'b0;
    checks++;
    if (n_out != n_in / 128) begin failures++; $display("FAIL: %0d ticks for %0d", n_out, n_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
