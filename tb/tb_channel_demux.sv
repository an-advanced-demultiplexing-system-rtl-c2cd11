// Testbench for channel_demux: every channel with active high and low;
// exactly the addressed passgate connects, all others exhaust.
module tb_channel_demux;
  logic [2:0] ch;
  logic active;
  logic [7:0] connect, exhaust;
  int checks = 0, failures = 0;

  channel_demux dut (.*);

  initial begin
    for (int a = 0; a < 2; a++)
      for (int c = 0; c < 8; c++) begin
        ch = 3'(c); active = a[0];
        #1;
        checks++;
        if (connect != (a ? 8'(1 << c) : 8'h00) || exhaust != ~connect) begin
          failures++;
          $display("FAIL: ch %0d active %0d -> %b %b", c, a, connect, exhaust);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
