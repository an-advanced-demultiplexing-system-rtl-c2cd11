// Testbench for amp_reg: bus and RAM writes with bus priority, and the sign
// inversion of the second pulse phase, against a reference model.
module tb_amp_reg;
  import stim_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic we_bus = 0, we_ram = 0, invert = 0;
  logic [6:0] bus_data = '0, ram_data = '0, value, dac_code;
  logic [6:0] model;
  int checks = 0, failures = 0;

  amp_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    model = '0;
    for (int n = 0; n < 300; n++) begin
      we_bus = 1'($urandom); we_ram = 1'($urandom); invert = 1'($urandom);
      bus_data = 7'($urandom); ram_data = 7'($urandom);
      if (we_bus) model = bus_data; else if (we_ram) model = ram_data;
      @(negedge clk);
      checks++;
      if (value != model || dac_code != {model[6] ^ invert, model[5:0]}) begin
        failures++;
        $display("FAIL: value %h dac %h model %h inv %0d", value, dac_code, model, invert);
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
