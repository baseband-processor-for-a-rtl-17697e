// tb_crc_buffer: checks that the buffer takes the CRC values only on capture, holds them while
// the inputs change, and that valid follows capture and clr.
module tb_crc_buffer;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, cap = 1'b0, valid;
  logic [4:0] c5 = '0, q5;
  logic [15:0] c16 = '0, q16;
  int checks = 0, failures = 0;
  crc_buffer dut (.clk, .rst, .clr, .capture(cap), .crc5_in(c5), .crc16_in(c16),
                  .crc5_q(q5), .crc16_q(q16), .valid);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    logic [4:0] e5; logic [15:0] e16;
    @(posedge clk); #1 rst = 1'b0;
    chk(!valid, "not valid after reset");
    for (int i = 0; i < 50; i++) begin
      c5 = 5'($urandom); c16 = 16'($urandom); e5 = c5; e16 = c16;
      cap = 1'b1; @(posedge clk); #1 cap = 1'b0;
      chk(valid && q5 == e5 && q16 == e16, "captured");
      repeat (3) begin
        c5 = 5'($urandom); c16 = 16'($urandom);
        @(posedge clk); #1;
        chk(q5 == e5 && q16 == e16, "held while inputs change");
      end
      clr = 1'b1; @(posedge clk); #1 clr = 1'b0;
      chk(!valid, "clr drops valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
