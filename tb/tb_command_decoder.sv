// tb_command_decoder: shifts every Gen2 command code (and reserved codes) followed by random
// bits into a local shift register, pulses en_pulse_cmd once per bit and checks cmd_id and the
// bit at which end_cmd rises (2, 4 or 8 bits), and that later bits change nothing.
module tb_command_decoder;
  import rfid_pkg::*;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, en = 1'b0, end_cmd;
  logic [15:0] sr = '0;
  cmd_e id;
  int checks = 0, failures = 0;
  command_decoder dut (.clk, .rst, .clr, .en_pulse_cmd(en), .sr, .end_cmd, .cmd_id(id));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic run(input logic [7:0] code, input int n, input cmd_e exp);
    int at;
    at = -1;
    clr = 1'b1; sr = '0; @(posedge clk); #1 clr = 1'b0;
    for (int i = 0; i < 12; i++) begin
      sr = {sr[14:0], (i < n) ? code[n - 1 - i] : 1'($urandom)};
      @(posedge clk); #1;
      en = 1'b1; @(posedge clk); #1 en = 1'b0;
      if (end_cmd && at < 0) at = i + 1;
    end
    chk(id == exp, $sformatf("code %b: id %0d expected %0d", code, id, exp));
    chk(at == n, $sformatf("code %b: end_cmd after %0d bits, expected %0d", code, at, n));
  endtask
  initial begin
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    repeat (3) begin
      run(8'b00, 2, CMD_QUERYREP);
      run(8'b01, 2, CMD_ACK);
      run(8'b1000, 4, CMD_QUERY);
      run(8'b1001, 4, CMD_QUERYADJUST);
      run(8'b1010, 4, CMD_SELECT);
      run(8'b1011, 4, CMD_UNKNOWN);
      run(8'hC0, 8, CMD_NAK);
      run(8'hC1, 8, CMD_REQ_RN);
      run(8'hC2, 8, CMD_READ);
      run(8'hC3, 8, CMD_WRITE);
      run(8'hC4, 8, CMD_KILL);
      run(8'hC5, 8, CMD_LOCK);
      run(8'hC6, 8, CMD_ACCESS);
      run(8'hC7, 8, CMD_UNKNOWN);
      run(8'hE1, 8, CMD_UNKNOWN);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
