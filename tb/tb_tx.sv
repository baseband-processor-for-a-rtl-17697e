// tb_tx: checks N_BLF = round(TRcal/DR) for random TRcal against a real-number computation,
// then sends random symbol streams in FM0 and Miller (M = 2, 4, 8) at several N_BLF and decodes
// data_out by the line-code rules: the symbol length, the FM0 boundary inversion and the
// Miller subcarrier (low for floor(N/2) cycles of each period, then high).
module tb_tx;
  import rfid_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b1, dr = 1'b1, valid = 1'b0, ready, busy, dout;
  logic [1:0] m = '0;
  logic [CNT_W-1:0] trcal = 10'd64;
  sym_e sym = SYM_DATA0;
  logic [7:0] n_blf;
  int checks = 0, failures = 0;
  tx dut (.clk, .rst, .en, .trcal, .dr, .miller(m), .sym, .sym_valid(valid), .sym_ready(ready),
          .busy, .n_blf, .data_out(dout));
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

  bit samples[$];
  bit rec = 0;
  always @(negedge clk) if (rec) samples.push_back(dout);

  task automatic stream(input int mm, input bit d, input int tr, input int nsym);
    sym_e s[$];
    int n, L;
    bit ok;
    m = 2'(mm); dr = d; trcal = CNT_W'(tr);
    @(posedge clk); #1;
    n = n_blf;
    L = (mm == 0) ? n : n << mm;
    s = {};
    if (mm == 0) s = '{SYM_DATA1, SYM_DATA0, SYM_DATA1, SYM_DATA0, SYM_VIOL, SYM_DATA1};
    else s = '{SYM_PILOT, SYM_PILOT, SYM_PILOT, SYM_PILOT, SYM_DATA0, SYM_DATA1};
    for (int i = 0; i < nsym; i++) s.push_back($urandom % 2 ? SYM_DATA1 : SYM_DATA0);
    s.push_back(SYM_DATA1);
    samples = {};
    fork
      begin
        foreach (s[i]) begin
          sym = s[i]; valid = 1'b1;
          do @(posedge clk); while (!ready);
          #1;
        end
        valid = 1'b0;
      end
      begin
        // record from the first modulated cycle
        @(negedge clk);
        while (!busy) @(negedge clk);
        while (!dut.playing) @(negedge clk);
        rec = 1;
        while (busy) @(negedge clk);
        rec = 0;
      end
    join
    chk(samples.size() == s.size() * L, $sformatf("m=%0d n=%0d: %0d cycles for %0d symbols of %0d",
                                                   mm, n, samples.size(), s.size(), L));
    ok = 1;
    foreach (s[k]) if ((k + 1) * L <= samples.size()) begin
      bit first, last, exp;
      int i0, i1;
      i0 = k * L; i1 = k * L + L - 1;
      first = samples[i0]; last = samples[i1];
      if (mm == 0) begin
        exp = (s[k] == SYM_DATA1);
        if (s[k] != SYM_VIOL) ok &= ((first == last) == exp);
        if (k > 0) ok &= ((s[k] == SYM_VIOL) ? (samples[i0] == samples[i0 - 1]) : (samples[i0] != samples[i0 - 1]));
      end else begin
        first ^= ((i0 % n) >= n / 2);
        last  ^= ((i1 % n) >= n / 2);
        ok &= ((first != last) == (s[k] == SYM_DATA1));
        if (k > 0 && s[k] != SYM_DATA1 && s[k - 1] != SYM_DATA1)
          ok &= (samples[i0] ^ ((i0 % n) >= n / 2)) != (samples[i0 - 1] ^ (((i0 - 1) % n) >= n / 2));
      end
    end
    chk(ok, $sformatf("m=%0d n=%0d: symbols decode", mm, n));
    repeat (3) @(posedge clk);
    chk(dout == 1'b0, "idle level");
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      int tr, exp;
      real x;
      tr = 20 + $urandom % 1000;
      dr = 1'($urandom); trcal = CNT_W'(tr); #1;
      x = dr ? tr * 3.0 / 64.0 : tr / 8.0;
      exp = int'($floor(x + 0.5));
      if (exp < 2) exp = 2;
      chk(n_blf == 8'(exp), $sformatf("N_BLF for TRcal %0d DR %0d: %0d expected %0d", tr, dr, n_blf, exp));
    end
    stream(0, 1, 64, 40);    // 640 kHz at 1.92 MHz: N = 3
    stream(0, 0, 64, 40);    // N = 8
    stream(0, 0, 100, 30);   // N = 13
    stream(1, 0, 64, 30);
    stream(2, 0, 64, 20);
    stream(3, 0, 64, 12);
    stream(1, 1, 64, 30);
    stream(2, 1, 107, 20);   // N = 5
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
