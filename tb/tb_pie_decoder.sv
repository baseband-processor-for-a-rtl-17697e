// tb_pie_decoder: sends PIE frames with random Tari (8..48 cycles), data-1 lengths between 1.5
// and 2 Tari, RTcal = data-0 + data-1 and, for half of the frames, a TRcal between 1.1 and 3
// RTcal; checks rtcal, trcal, pivot = RTcal/2, end_prea and every decoded bit, and that the bit
// strobe comes one cycle after the rising edge that ends a symbol.
module tb_pie_decoder;
  import rfid_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, din = 1'b1;
  logic bo, bs, ep;
  logic [CNT_W-1:0] rtcal, trcal, pivot;
  int checks = 0, failures = 0;
  pie_decoder dut (.clk, .rst, .en, .data_in(din), .bit_out(bo), .bit_strobe(bs), .end_prea(ep),
                   .rtcal, .trcal, .pivot);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  bit got[$];
  int rise_cycle = -10, cyc = 0, strobe_delay_bad = 0;
  logic din_q = 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    din_q <= din;
    if (din && !din_q) rise_cycle <= cyc;
    if (bs && !rst) begin
      got.push_back(bo);
      if (cyc - rise_cycle != 1) strobe_delay_bad++;
    end
  end

  task automatic sym(input int len, input int pw);
    din = 1'b1; repeat (len - pw) @(posedge clk);
    din = 1'b0; repeat (pw) @(posedge clk);
  endtask

  initial begin
    int tari, one, rt, tr, pw;
    bit bits[$];
    bit with_tr;
    repeat (3) @(posedge clk); rst = 1'b0; en = 1'b1;
    repeat (3) @(posedge clk);
    for (int f = 0; f < 40; f++) begin
      tari = 8 + $urandom % 41;
      one  = (3 * tari + 1) / 2 + $urandom % (tari / 2 + 1);
      rt   = tari + one;
      tr   = (11 * rt + 9) / 10 + 1 + $urandom % (2 * rt - (11 * rt + 9) / 10);
      pw   = tari / 2;
      with_tr = f % 2;
      bits = {};
      for (int i = 0; i < 10 + $urandom % 30; i++) bits.push_back(1'($urandom));
      got = {};
      din = 1'b1; repeat (20) @(posedge clk);
      din = 1'b0; repeat (24) @(posedge clk);   // delimiter
      sym(tari, pw);
      sym(rt, pw);
      if (with_tr) sym(tr, pw);
      foreach (bits[i]) sym(bits[i] ? one : tari, pw);
      din = 1'b1; repeat (3) @(posedge clk);
      chk(ep, "end_prea");
      chk(rtcal == CNT_W'(rt), $sformatf("rtcal %0d expected %0d", rtcal, rt));
      chk(pivot == CNT_W'(rt / 2), "pivot = RTcal/2");
      if (with_tr) chk(trcal == CNT_W'(tr), $sformatf("trcal %0d expected %0d", trcal, tr));
      chk(got.size() == bits.size(), $sformatf("%0d bits decoded, %0d sent", got.size(), bits.size()));
      foreach (bits[i]) if (i < got.size()) chk(got[i] == bits[i], $sformatf("bit %0d", i));
      en = 1'b0; @(posedge clk); en = 1'b1;   // decoder disabled between frames
      @(posedge clk);
      chk(!ep, "end_prea cleared when disabled");
    end
    chk(strobe_delay_bad == 0, "bit strobe one cycle after the rising edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
