// tb_crc16: checks the CRC-16 against the published check value of this CRC (CRC-16 with
// polynomial 1021, preset FFFF and complemented output gives 16'hD64E over the ASCII string
// "123456789"), then random frames with their complemented CRC appended must leave the residue
// 16'h1D0F, and frames with a flipped bit must not.
module tb_crc16;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, en = 1'b0, b = 1'b0;
  logic [15:0] crc;
  int checks = 0, failures = 0;
  crc16 dut (.clk, .rst, .clr, .en_pulse(en), .bit_in(b), .crc);
  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic shift_in(input bit v);
    en = 1'b1; b = v; @(posedge clk); #1 en = 1'b0;
  endtask
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    string s = "123456789";
    @(posedge clk); #1 rst = 1'b0;
    chk(crc == 16'hFFFF, "preset");
    for (int i = 0; i < s.len(); i++)
      for (int k = 7; k >= 0; k--) shift_in(s[i][k]);
    chk(~crc == 16'hD64E, $sformatf("check value, got %h", ~crc));
    for (int f = 0; f < 40; f++) begin
      bit fr[$];
      bit [15:0] r;
      int n, flip;
      fr = {};
      r = 16'hFFFF;
      n = 8 + $urandom % 60;
      flip = (f % 4 == 3) ? int'($urandom % n) : -1;
      for (int i = 0; i < n; i++) fr.push_back(1'($urandom));
      foreach (fr[i]) begin
        bit fb;
        fb = r[15] ^ fr[i];
        r = {r[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
      end
      r = ~r;
      for (int i = 15; i >= 0; i--) fr.push_back(r[i]);
      if (flip >= 0) fr[flip] = ~fr[flip];
      clr = 1'b1; @(posedge clk); #1 clr = 1'b0;
      foreach (fr[i]) shift_in(fr[i]);
      if (flip < 0) chk(crc == 16'h1D0F, $sformatf("residue, got %h", crc));
      else          chk(crc != 16'h1D0F, "corrupted frame detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
