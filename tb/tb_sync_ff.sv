// tb_sync_ff: checks that the synchroniser samples its input on the falling clock edge.
// Random input values are applied after each rising edge; the output is compared, just before
// the next rising edge, with the value the input had at the falling edge in between.
module tb_sync_ff;
  logic clk = 1'b0, d = 1'b0, q;
  int checks = 0, failures = 0;
  sync_ff dut (.clk, .d, .q);
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic at_fall;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1 d = 1'($urandom);
      @(negedge clk); at_fall = d;
      #1 d = 1'($urandom);   // a change after the falling edge must not pass
      #2;
      checks++;
      if (q !== at_fall) begin
        failures++;
        $display("FAIL: q=%b expected %b", q, at_fall);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
