// tb_fsm_rx: plays the receive pipeline around the FSM: a local shift register, a command
// code known to the decoder stage (end_cmd/cmd_id set when the code is complete) and one
// en_pulse_rx per bit. For Read, Write, Query, QueryAdjust, NAK, Req_RN and a Select with a
// 20-bit mask it checks every stack write (address and field value) and the bit at which
// stack_ready rises.
module tb_fsm_rx;
  import rfid_pkg::*;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, en = 1'b0, end_cmd = 1'b0, we, ready;
  cmd_e id = CMD_NONE;
  logic [15:0] sr = '0, wd;
  logic [3:0] wa;
  int checks = 0, failures = 0;
  fsm_rx dut (.clk, .rst, .clr, .en_pulse_rx(en), .end_cmd, .cmd_id(id), .sr,
              .st_we(we), .st_addr(wa), .st_wdata(wd), .stack_ready(ready));
  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [15:0] wr_data[$];
  logic [3:0]  wr_addr[$];
  always @(posedge clk) if (we) begin wr_data.push_back(wd); wr_addr.push_back(wa); end

  // code: command code bits; widths/values: the fields
  task automatic run(input cmd_e c, input logic [7:0] code, input int ncode,
                     input int widths[], input logic [15:0] values[]);
    int total, at;
    total = ncode; at = -1;
    foreach (widths[i]) total += widths[i];
    wr_data = {}; wr_addr = {};
    clr = 1'b1; end_cmd = 1'b0; id = CMD_NONE; sr = '0; @(posedge clk); #1 clr = 1'b0;
    for (int i = 0; i < total + 3; i++) begin
      logic b;
      if (i < ncode) b = code[ncode - 1 - i];
      else if (i < total) begin
        int acc, f, k;
        acc = ncode; f = 0;
        while (i >= acc + widths[f]) begin acc += widths[f]; f++; end
        k = i - acc;
        b = values[f][widths[f] - 1 - k];
      end else b = 1'b1;
      sr = {sr[14:0], b};
      @(posedge clk); #1;
      if (i == ncode - 1) begin end_cmd = 1'b1; id = c; end
      en = 1'b1; @(posedge clk); #1 en = 1'b0;
      @(posedge clk); #1;
      if (ready && at < 0) at = i + 1;
    end
    chk(at == total, $sformatf("cmd %0d: stack_ready after %0d bits, expected %0d", c, at, total));
    chk(wr_data.size() == widths.size(), $sformatf("cmd %0d: %0d fields stored", c, wr_data.size()));
    foreach (widths[i]) if (i < wr_data.size()) begin
      chk(wr_addr[i] == 4'(i), "field address");
      chk(wr_data[i] == values[i], $sformatf("cmd %0d field %0d = %h expected %h", c, i, wr_data[i], values[i]));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    for (int r = 0; r < 4; r++) begin
      run(CMD_READ, 8'hC2, 8, '{2, 8, 8, 16, 16},
          '{16'(2'($urandom)), 16'(8'($urandom)), 16'(8'($urandom)), 16'($urandom), 16'($urandom)});
      run(CMD_WRITE, 8'hC3, 8, '{2, 8, 16, 16, 16},
          '{16'(2'($urandom)), 16'(8'($urandom)), 16'($urandom), 16'($urandom), 16'($urandom)});
      run(CMD_QUERY, 8'b1000, 4, '{1, 2, 1, 2, 2, 1, 4, 5},
          '{16'(1'($urandom)), 16'(2'($urandom)), 16'(1'($urandom)), 16'(2'($urandom)),
            16'(2'($urandom)), 16'(1'($urandom)), 16'(4'($urandom)), 16'(5'($urandom))});
      run(CMD_QUERYADJUST, 8'b1001, 4, '{2, 3}, '{16'(2'($urandom)), 16'(3'($urandom))});
      run(CMD_ACK, 8'b01, 2, '{16}, '{16'($urandom)});
      run(CMD_REQ_RN, 8'hC1, 8, '{16, 16}, '{16'($urandom), 16'($urandom)});
      run(CMD_NAK, 8'hC0, 8, '{}, '{});
      run(CMD_SELECT, 8'b1010, 4, '{3, 3, 2, 8, 8, 16, 4, 1, 16},
          '{16'd4, 16'd0, 16'd1, 16'd32, 16'd20, 16'($urandom), 16'(4'($urandom)), 16'd1, 16'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
