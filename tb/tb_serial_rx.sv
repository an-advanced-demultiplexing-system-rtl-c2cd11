// Testbench for serial_rx: framed words, bad stop bits, an idle-line glitch
// and back-to-back words. Checks the decoded fields, the one-cycle strobes
// and that a word is reported exactly 17 bit times after its start bit.
module tb_serial_rx;
  import stim_pkg::*;

  logic clk = 1'b0, rst = 1'b1, data_in = 1'b1;
  logic [ADDR_W-1:0] addr;
  logic [MAG_W-1:0]  mag;
  logic word_valid, err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;

  serial_rx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (word_valid) n_valid++;
    if (err)        n_err++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Drive one frame, one bit per cycle; returns with the strobe cycle current.
  task automatic send(input logic [6:0] a, input logic [6:0] m,
                      input logic s0 = 1'b0, input logic s1 = 1'b1);
    logic [16:0] frame;
    frame = {s1, s0, m, a, 1'b0};          // sent LSB first
    for (int i = 0; i < 17; i++) begin
      @(negedge clk) data_in = frame[i];
      if (i < 16) check(!word_valid && !err, "strobe before frame end");
    end
    @(negedge clk) data_in = 1'b1;         // strobe from the last stop bit is visible now
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);

    // Good words, checked field by field.
    for (int n = 0; n < 40; n++) begin
      logic [6:0] a, m;
      a = 7'($urandom); m = 7'($urandom);
      send(a, m);
      check(word_valid && !err, "good word not accepted");
      check(addr == a, $sformatf("addr %h != %h", addr, a));
      check(mag == m,  $sformatf("mag %h != %h", mag, m));
      @(negedge clk) check(!word_valid, "word_valid longer than one cycle");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end

    // Bad first stop bit and bad second stop bit.
    send(7'h15, 7'h2A, 1'b1, 1'b1);
    check(err && !word_valid, "bad stop0 not flagged");
    @(negedge clk) check(!err, "err longer than one cycle");
    send(7'h15, 7'h2A, 1'b0, 1'b0);
    check(err && !word_valid, "bad stop1 not flagged");
    data_in = 1'b1;
    @(negedge clk);

    // A one-cycle glitch on an idle line: one error, then resynchronised.
    n_err = 0; n_valid = 0;
    data_in = 1'b0;
    @(negedge clk) data_in = 1'b1;
    repeat (20) @(negedge clk);
    check(n_err == 1 && n_valid == 0, "glitch not rejected as exactly one error");
    send(7'h41, 7'h7F);
    check(word_valid && addr == 7'h41 && mag == 7'h7F, "no resync after glitch");

    // Back-to-back words: the next start bit follows the last stop bit.
    @(negedge clk);
    n_valid = 0;
    for (int n = 0; n < 5; n++) begin
      logic [16:0] frame;
      frame = {1'b1, 1'b0, 7'(n * 9), 7'(n + 3), 1'b0};
      for (int i = 0; i < 17; i++) @(negedge clk) data_in = frame[i];
    end
    @(negedge clk) data_in = 1'b1;
    check(word_valid && addr == 7'd7 && mag == 7'd36, "last back-to-back word");
    @(negedge clk);
    check(n_valid == 5, $sformatf("back-to-back: %0d of 5 words", n_valid));

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
