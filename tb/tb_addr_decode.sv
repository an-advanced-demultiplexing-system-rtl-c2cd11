// Testbench for addr_decode: every address with random magnitudes, compared
// with a reference decode of the address map written out independently.
module tb_addr_decode;
  import stim_pkg::*;

  logic              valid;
  logic [ADDR_W-1:0] addr;
  logic [MAG_W-1:0]  mag;
  cmd_t              cmd;
  int checks = 0, failures = 0;

  addr_decode dut (.*);

  function automatic cmd_e ref_cmd(input logic v, input logic [6:0] a);
    if (!v) return CMD_NONE;
    if (a[6] == 1'b0) return CMD_NORMAL;
    if (a[4:3] == 2'b10) return CMD_TREG;           // 1T10XDD
    if (a[4:2] == 3'b110) return CMD_MODE;          // 1X110XX
    if (a[4:2] == 3'b111) return CMD_RESET;         // 1X111XX
    if (a[4:3] == 2'b00) return CMD_BANK_FILL;      // 1M00XDD
    return CMD_NONE;
  endfunction

  initial begin
    for (int v = 0; v < 2; v++)
      for (int a = 0; a < 128; a++) begin
        valid = v[0]; addr = a[6:0]; mag = 7'($urandom);
        #1;
        checks++;
        if (cmd.cmd != ref_cmd(valid, addr) || cmd.dsel != addr[1:0] ||
            cmd.ch != addr[4:2] || cmd.sel_pw != addr[5] || cmd.mag != mag) begin
          failures++;
          $display("FAIL: addr %b valid %0d -> %s", addr, valid, cmd.cmd.name());
        end
      end
    // A few named cases from the map.
    valid = 1'b1; mag = 7'd5;
    addr = 7'b1110100; #1 checks++; if (cmd.cmd != CMD_TREG || !cmd.sel_pw) failures++;
    addr = 7'b1011000; #1 checks++; if (cmd.cmd != CMD_MODE) failures++;
    addr = 7'b1011100; #1 checks++; if (cmd.cmd != CMD_RESET) failures++;
    addr = 7'b1100011; #1 checks++; if (cmd.cmd != CMD_BANK_FILL || !cmd.sel_pw || cmd.dsel != 2'b11) failures++;
    addr = 7'b0111000; #1 checks++; if (cmd.cmd != CMD_NORMAL || cmd.ch != 3'd6 || !cmd.sel_pw) failures++;
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
