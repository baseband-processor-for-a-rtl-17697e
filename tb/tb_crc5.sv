// tb_crc5: absorbs random frames followed by their CRC-5 (computed here bit by bit from the
// polynomial x^5+x^3+1 and preset 01001) and checks the zero residue; a frame with one bit
// flipped must leave a non-zero register. Also checks the preset after clr.
module tb_crc5;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, en = 1'b0, b = 1'b0;
  logic [4:0] crc;
  int checks = 0, failures = 0;
  crc5 dut (.clk, .rst, .clr, .en_pulse(en), .bit_in(b), .crc);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic shift_in(input bit v);
    en = 1'b1; b = v; @(posedge clk); #1 en = 1'b0;
    if ($urandom % 2) begin @(posedge clk); #1; end   // idle cycles between triggers
  endtask
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    @(posedge clk); #1 rst = 1'b0;
    chk(crc == 5'b01001, "preset after reset");
    for (int f = 0; f < 60; f++) begin
      bit fr[$];
      bit [4:0] r;
      int n, flip;
      fr = {};
      r = 5'b01001;
      n = 4 + $urandom % 30;
      flip = (f % 3 == 2) ? int'($urandom % n) : -1;
      for (int i = 0; i < n; i++) fr.push_back(1'($urandom));
      foreach (fr[i]) begin
        bit fb;
        fb = r[4] ^ fr[i];
        r = {r[3:0], 1'b0} ^ (fb ? 5'b01001 : 5'b0);
      end
      for (int i = 4; i >= 0; i--) fr.push_back(r[i]);
      if (flip >= 0) fr[flip] = ~fr[flip];
      clr = 1'b1; @(posedge clk); #1 clr = 1'b0;
      chk(crc == 5'b01001, "preset after clr");
      foreach (fr[i]) shift_in(fr[i]);
      if (flip < 0) chk(crc == 5'd0, $sformatf("zero residue, got %b", crc));
      else          chk(crc != 5'd0, "corrupted frame detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
