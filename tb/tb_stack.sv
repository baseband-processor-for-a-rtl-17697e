// tb_stack: random writes and reads against a reference array; only the addressed register
// may change.
module tb_stack;
  logic clk = 1'b0, we = 1'b0;
  logic [3:0] wa = '0, ra = '0;
  logic [15:0] wd = '0, rd;
  logic [15:0] model [16];
  int checks = 0, failures = 0;
  stack #(.DEPTH(16), .WIDTH(16)) dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) begin
      we = 1; wa = 4'(i); wd = 16'(i * 4099); model[i] = wd;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 600; i++) begin
      we = 1'($urandom); wa = 4'($urandom); wd = 16'($urandom);
      @(posedge clk); #1;
      if (we) model[wa] = wd;
      we = 0;
      for (int k = 0; k < 16; k++) begin
        ra = 4'(k); #1;
        checks++;
        if (rd !== model[k]) begin
          failures++;
          $display("FAIL: reg %0d = %h expected %h", k, rd, model[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
