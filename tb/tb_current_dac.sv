// Testbench for the current_dac model: every code, on and off; the current
// must be code magnitude times the unit current, with the sign bit choosing
// source (+) or sink (-), and strictly monotonic over the magnitude.
module tb_current_dac;
  logic [6:0] code;
  logic en;
  real i_ua, prev;
  int checks = 0, failures = 0;

  current_dac #(.LSB_UA(2.0)) dut (.*);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < 128; c++) begin
        real exp;
        code = 7'(c); en = e[0];
        #1;
        exp = e ? (c[6] ? 2.0 * (c % 64) : -2.0 * (c % 64)) : 0.0;
        checks++;
        if (i_ua != exp) begin failures++; $display("FAIL: code %0d en %0d: %f", c, e, i_ua); end
      end
    // Monotonic anodal sweep.
    en = 1'b1; prev = -1.0;
    for (int m = 0; m < 64; m++) begin
      code = {1'b1, 6'(m)};
      #1;
      checks++;
      if (i_ua <= prev) failures++;
      prev = i_ua;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
