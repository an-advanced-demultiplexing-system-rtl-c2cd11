// Testbench for timer_regs: random writes of T1 (bus or RAM), T2 and T3
// compared with a reference model, including the bus-over-RAM priority.
module tb_timer_regs;
  import stim_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [6:0] bus_data = '0, ram_data = '0, t1, t2, t3;
  logic t1_we_bus = 0, t1_we_ram = 0, t2_we = 0, t3_we = 0;
  logic [6:0] m1, m2, m3;
  int checks = 0, failures = 0;

  timer_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    checks++; if (t1 != 0 || t2 != 0 || t3 != 0) failures++;
    m1 = 0; m2 = 0; m3 = 0;
    for (int n = 0; n < 300; n++) begin
      {t1_we_bus, t1_we_ram, t2_we, t3_we} = 4'($urandom);
      bus_data = 7'($urandom); ram_data = 7'($urandom);
      if (t1_we_bus) m1 = bus_data; else if (t1_we_ram) m1 = ram_data;
      if (t2_we) m2 = bus_data;
      if (t3_we) m3 = bus_data;
      @(negedge clk);
      checks++;
      if (t1 != m1 || t2 != m2 || t3 != m3) begin
        failures++;
        $display("FAIL: %0d %0d %0d vs %0d %0d %0d", t1, t2, t3, m1, m2, m3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
