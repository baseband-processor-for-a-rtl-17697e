// tb_shift_register: random bits and triggers against a reference queue; checks clear and that
// the register only moves on en_pulse_shift.
module tb_shift_register;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, en = 1'b0, b = 1'b0;
  logic [15:0] q, model;
  int checks = 0, failures = 0;
  shift_register #(.WIDTH(16)) dut (.clk, .rst, .clr, .en_pulse_shift(en), .bit_in(b), .q);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    model = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      en  = 1'($urandom);
      b   = 1'($urandom);
      clr = ($urandom % 50) == 0;
      @(posedge clk); #1;
      if (clr) model = '0;
      else if (en) model = {model[14:0], b};
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL: q=%h expected %h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
