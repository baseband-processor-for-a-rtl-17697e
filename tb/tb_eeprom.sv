// tb_eeprom: checks that a request during the power-on time is ignored, reads the initial
// EPC/TID contents, writes random words and checks the write time
// (busy for WRITE_CYCLES cycles, old value until then) and the read-back.
module tb_eeprom;
  logic clk = 1'b0, req = 1'b0, we = 1'b0, busy;
  logic [5:0] addr = '0;
  logic [15:0] wd = '0, rd;
  int checks = 0, failures = 0;
  eeprom #(.WORDS_PER_BANK(16), .WRITE_CYCLES(32)) dut (.clk, .req, .we, .addr, .wdata(wd), .rdata(rd), .busy);
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
  task automatic rd_word(input logic [5:0] a, output logic [15:0] v);
    req = 1; we = 0; addr = a; @(posedge clk); #1 req = 0; v = rd;
  endtask
  initial begin
    logic [15:0] v;
    logic [15:0] model [64];
    // a write request during the power-on time is ignored
    req = 1; we = 1; addr = 6'd0; wd = 16'hFFFF; @(posedge clk); #1 req = 0; we = 0;
    chk(!busy, "no write during power-on");
    repeat (4) @(posedge clk); #1;
    rd_word(6'd0, v); chk(v == 16'h0000, "power-on request discarded");
    rd_word(6'd17, v); chk(v == 16'h3000, "PC word");
    rd_word(6'd32, v); chk(v == 16'hE200, "TID class");
    for (int i = 0; i < 64; i++) begin rd_word(6'(i), v); model[i] = v; end
    for (int i = 0; i < 40; i++) begin
      int t;
      logic [5:0] a;
      logic [15:0] d;
      t = 0; a = 6'($urandom); d = 16'($urandom);
      req = 1; we = 1; addr = a; wd = d; @(posedge clk); #1 req = 0; we = 0;
      while (busy) begin @(posedge clk); #1; t++; end
      chk(t == 32, $sformatf("write time %0d", t));
      model[a] = d;
      rd_word(a, v); chk(v == d, "read back");
    end
    for (int i = 0; i < 64; i++) begin rd_word(6'(i), v); chk(v == model[i], "all words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
