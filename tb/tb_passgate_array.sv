// Testbench for the passgate_array model: the DAC current reaches only the
// connected electrode; with nothing connected every electrode gets zero.
module tb_passgate_array;
  real i_dac_ua;
  logic [7:0] connect;
  real i_ch_ua [8];
  int checks = 0, failures = 0;

  passgate_array dut (.*);

  initial begin
    for (int c = -1; c < 8; c++) begin
      i_dac_ua = real'($urandom_range(1, 126)) - 63.0;
      connect = (c < 0) ? 8'h00 : 8'(1 << c);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (i_ch_ua[i] != ((i == c) ? i_dac_ua : 0.0)) begin
          failures++;
          $display("FAIL: connect %b electrode %0d = %f", connect, i, i_ch_ua[i]);
        end
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
