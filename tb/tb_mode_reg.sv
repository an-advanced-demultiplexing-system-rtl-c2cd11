// Testbench for mode_reg: reset value, every 3-b code written through the
// low bits of a magnitude, decode of the four modes, hold without a write.
module tb_mode_reg;
  import stim_pkg::*;

  logic clk = 1'b0, rst = 1'b1, we = 1'b0;
  logic [2:0] wdata = '0;
  logic [2:0] mode_bits;
  mode_e mode;
  int checks = 0, failures = 0;

  mode_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(mode == MODE_LOAD && mode_bits == 3'b000, "reset mode");
    for (int c = 0; c < 8; c++) begin
      mode_e exp;
      exp = (c == 1) ? MODE_BASIC : (c == 2) ? MODE_SINGLE : (c == 6) ? MODE_CONT : MODE_LOAD;
      we = 1'b1; wdata = c[2:0];
      @(negedge clk) we = 1'b0; wdata = ~c[2:0];
      check(mode_bits == c[2:0], $sformatf("bits after writing %0d", c));
      check(mode == exp, $sformatf("decode of %0d", c));
      repeat (3) @(negedge clk);
      check(mode_bits == c[2:0], "held without write");
    end
    we = 1'b1; wdata = 3'b110;
    @(negedge clk) we = 1'b0;
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(mode == MODE_LOAD, "reset returns to load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
