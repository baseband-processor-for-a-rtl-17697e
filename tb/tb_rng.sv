// tb_rng: the generator must never reach zero, must hold its value while disabled, must
// produce many distinct values and must return to its seed after exactly 65535 steps
// (a maximal-length sequence) and not before.
module tb_rng;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [15:0] q;
  int checks = 0, failures = 0;
  rng #(.SEED(16'hACE1)) dut (.clk, .rst, .en, .q);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    int period = 0, zeros = 0, ones = 0;
    bit seen [logic [15:0]];
    @(posedge clk); #1 rst = 1'b0;
    chk(q == 16'hACE1, "seed after reset");
    repeat (5) @(posedge clk);
    #1 chk(q == 16'hACE1, "holds while disabled");
    en = 1'b1;
    do begin
      @(posedge clk); #1;
      period++;
      if (q == 0) zeros++;
      if (q[0]) ones++;
      if (period <= 4096) seen[q] = 1;
    end while (q != 16'hACE1 && period < 70000);
    chk(zeros == 0, "never zero");
    chk(period == 65535, $sformatf("period %0d", period));
    chk(seen.num() == 4096, "distinct values");
    chk(ones == 32768, $sformatf("bit 0 set in %0d of the states", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
