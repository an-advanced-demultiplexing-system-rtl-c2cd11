// Testbench for train_controller with testbench models of the pulse
// controller (busy for a fixed time after a start, done in its last cycle)
// and of the interpulse-interval timer. Checks the channel order 0..7, that
// every pulse is preceded by a register load of the same channel, that the
// IPI follows channel 7 only, the frame length in cycles, and stopping.
module tb_train_controller;
  logic clk = 1'b0, rst = 1'b1, enable = 1'b0;
  logic pc_busy, pc_done, timeout;
  logic [2:0] ch;
  logic load_regs, start_pulse, ipi_load, in_ipi, active;
  int pc_left = 0, ipi_left = 0;
  int checks = 0, failures = 0;
  localparam int PULSE = 9, IPI = 30;

  train_controller dut (.*);
  always #5 clk = ~clk;

  assign pc_busy = pc_left > 0;
  assign pc_done = pc_left == 1;
  assign timeout = ipi_left == 1;
  always @(posedge clk) begin
    if (start_pulse) pc_left <= PULSE; else if (pc_left > 0) pc_left <= pc_left - 1;
    if (ipi_load) ipi_left <= IPI; else if (ipi_left > 0) ipi_left <= ipi_left - 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int expect_ch = 0, frame_start = -1, cyc = 0, frames = 0, loaded = -1;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (load_regs) loaded <= ch;
    if (start_pulse) begin
      check(ch == 3'(expect_ch), $sformatf("pulse on ch %0d, expected %0d", ch, expect_ch));
      check(loaded == int'(ch), "pulse without a register load of its channel");
      check(!pc_busy, "start while busy");
      if (ch == 0) begin
        if (frame_start >= 0) begin
          // per channel: load + start + PULSE cycles; IPI of IPI cycles
          check(cyc - frame_start == 8 * (PULSE + 2) + IPI,
                $sformatf("frame took %0d cycles", cyc - frame_start));
          frames++;
        end
        frame_start = cyc;
      end
      expect_ch = (expect_ch + 1) % 8;
    end
    if (ipi_load) check(ch == 3'd7 && pc_done, "IPI not after channel 7");
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    check(!active && !start_pulse, "idle while disabled");
    enable = 1'b1;
    repeat (3 * (8 * (PULSE + 2) + IPI) + 20) @(negedge clk);
    check(frames >= 2, $sformatf("only %0d full frames", frames));
    enable = 1'b0;
    @(negedge clk);
    check(!active, "not idle after disable");
    repeat (PULSE + 2) @(negedge clk);
    check(!start_pulse && !active, "still pulsing after disable");
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
