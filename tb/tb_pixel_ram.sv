// Testbench for pixel_ram: random single-word writes and bank fills to both
// banks, every word read back and compared with a reference array.
module tb_pixel_ram;
  import stim_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] waddr = '0, raddr = '0;
  logic [6:0] wdata = '0, rd_amp, rd_pw;
  logic we_amp = 0, we_pw = 0, fill_amp = 0, fill_pw = 0;
  logic [6:0] ma [8], mp [8];
  int checks = 0, failures = 0;

  pixel_ram dut (.*);
  always #5 clk = ~clk;

  task automatic read_all();
    for (int i = 0; i < 8; i++) begin
      raddr = 3'(i);
      #1;
      checks++;
      if (rd_amp != ma[i] || rd_pw != mp[i]) begin
        failures++;
        $display("FAIL: word %0d amp %h/%h pw %h/%h", i, rd_amp, ma[i], rd_pw, mp[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 8; i++) begin ma[i] = '0; mp[i] = '0; end
    read_all();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      waddr = 3'($urandom); wdata = 7'($urandom);
      we_amp = 1'($urandom); we_pw = 1'($urandom);
      fill_amp = ($urandom_range(0, 15) == 0); fill_pw = ($urandom_range(0, 15) == 0);
      for (int i = 0; i < 8; i++) begin
        if (fill_amp || (we_amp && waddr == i)) ma[i] = wdata;
        if (fill_pw  || (we_pw  && waddr == i)) mp[i] = wdata;
      end
      @(negedge clk);
      {we_amp, we_pw, fill_amp, fill_pw} = '0;
      read_all();
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
