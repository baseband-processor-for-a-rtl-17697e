// tb_fsm_tx: runs each of the seven actions with an EEPROM model and an encoder stub that
// accepts one symbol every few cycles, and checks the symbol stream: preamble, header, data
// words, handle, the CRC-16 residue (computed here), the dummy 1 at the end; for the sensor
// action, that exactly five conversions are taken, their mean is written and the ADC is powered
// down; and end_transfer until the order is withdrawn. The compare order (Select) is checked
// for matches inside and across word boundaries, mismatches, the empty mask, a range running
// past the end of the bank, and the absence of any reply symbols. The password order (Access,
// Kill) must reply with the handle (with header 0 for the last Kill step) only on a match, or
// always when asked to (the Req_RN password probe).
module tb_fsm_tx;
  import rfid_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b1;
  order_e ord = ORD_NONE;
  tx_params_t p;
  logic ee_req, ee_we, ee_busy, pd, ardy = 1'b0, svalid, sready, etr, mt;
  logic [5:0] ee_addr;
  logic [15:0] ee_wd, ee_rd;
  logic [9:0] adout = '0, avg;
  sym_e s;
  int checks = 0, failures = 0;
  fsm_tx #(.WORDS_PER_BANK(16), .ADC_SAMPLES(5), .ADC_BITS(10)) dut (.clk, .rst, .en, .order(ord), .params(p),
    .ee_req, .ee_we, .ee_addr, .ee_wdata(ee_wd), .ee_rdata(ee_rd), .ee_busy,
    .adc_powerdown(pd), .adc_dout(adout), .adc_data_ready(ardy), .average(avg),
    .sym(s), .sym_valid(svalid), .sym_ready(sready), .tx_busy(1'b0), .end_transfer(etr), .match(mt));
  eeprom #(.WORDS_PER_BANK(16), .WRITE_CYCLES(32)) u_ee (.clk, .req(ee_req), .we(ee_we), .addr(ee_addr),
    .wdata(ee_wd), .rdata(ee_rd), .busy(ee_busy));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string str);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", str); end
  endtask

  // encoder stub: ready one cycle in three
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign sready = (cyc % 3) == 0;
  sym_e got[$];
  always @(posedge clk) if (svalid && sready) got.push_back(s);

  // ADC stub: a conversion every 50 cycles while powered
  int nconv = 0;
  logic [9:0] codes[5] = '{10'h2AD, 10'h2AC, 10'h2AC, 10'h2AB, 10'h2AE};
  always @(posedge clk) begin
    ardy <= 1'b0;
    if (!pd && cyc % 50 == 0 && nconv < 8) begin
      adout <= codes[nconv % 5];
      ardy  <= 1'b1;
      nconv <= nconv + 1;
    end
  end

  function automatic bit [15:0] crc_of(sym_e q[$], int from, int n);
    bit [15:0] r;
    r = 16'hFFFF;
    for (int i = from; i < from + n; i++) begin
      bit fb;
      fb = r[15] ^ (q[i] == SYM_DATA1);
      r = {r[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
    end
    return r;
  endfunction
  function automatic bit [15:0] word(sym_e q[$], int from, int n);
    bit [15:0] v;
    v = 0;
    for (int i = from; i < from + n; i++) v = {v[14:0], q[i] == SYM_DATA1};
    return v;
  endfunction

  task automatic run(input order_e o);
    int t;
    got = {};
    ord = o;
    t = 0;
    while (!etr && t < 20000) begin @(posedge clk); #1; t++; end
    chk(etr, "end_transfer");
    repeat (3) @(posedge clk); #1;
    chk(etr, "end_transfer held until the order is withdrawn");
    ord = ORD_NONE;
    @(posedge clk); #1;
    chk(!etr, "end_transfer released");
    chk(got.size() > 0 && got[got.size() - 1] == SYM_DATA1, "dummy 1 at the end");
  endtask

  task automatic compare(input logic [1:0] bank, input int ptr, input int len,
                         input logic [47:0] val, input bit exp, input string str);
    int t;
    got = {};
    p.membank = bank; p.cmp_ptr = 8'(ptr); p.cmp_len = 8'(len); p.cmp_val = {val, 48'h0};
    ord = ORD_MATCH;
    t = 0;
    while (!etr && t < 2000) begin @(posedge clk); #1; t++; end
    chk(etr && mt == exp && got.size() == 0, str);
    ord = ORD_NONE;
    @(posedge clk); #1;
    chk(!etr && mt == exp, {str, ": result kept"});
  endtask

  task automatic fm0_preamble();
    chk(got.size() > 6 && got[0] == SYM_DATA1 && got[1] == SYM_DATA0 && got[2] == SYM_DATA1 &&
        got[3] == SYM_DATA0 && got[4] == SYM_VIOL && got[5] == SYM_DATA1, "FM0 preamble 1010v1");
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    p = '0; p.rn = 16'hA5C3;
    run(ORD_RN16);
    fm0_preamble();
    chk(got.size() == 23 && word(got, 6, 16) == 16'hA5C3, "A1: RN16");
    p.miller = 2'd2;
    run(ORD_RN16);
    chk(got.size() == 27 && got[0] == SYM_PILOT && got[3] == SYM_PILOT &&
        word(got, 4, 6) == 6'b010111, "Miller preamble");
    p.miller = 2'd0;
    run(ORD_EPC);
    chk(got.size() == 135, $sformatf("A2: %0d symbols", got.size()));
    chk(word(got, 6, 16) == 16'h3000 && word(got, 22, 16) == 16'h3034, "A2: PC and first EPC word");
    chk(crc_of(got, 6, 128) == 16'h1D0F, "A2: CRC-16");
    run(ORD_HANDLE);
    chk(got.size() == 39 && word(got, 6, 16) == 16'hA5C3 && crc_of(got, 6, 32) == 16'h1D0F, "A3: handle + CRC");
    p.membank = 2'd2; p.wordptr = 8'd0; p.wordcount = 8'd2;
    run(ORD_READ);
    chk(got.size() == 72 && got[6] == SYM_DATA0, "A4: length and header");
    chk(word(got, 7, 16) == 16'hE200 && word(got, 23, 16) == 16'h1234 && word(got, 39, 16) == 16'hA5C3, "A4: words and handle");
    chk(crc_of(got, 6, 65) == 16'h1D0F, "A4: CRC-16");
    p.membank = 2'd3; p.wordptr = 8'd4; p.wdata = 16'h1357;
    run(ORD_WRITE);
    chk(got.size() == 40 && got[6] == SYM_DATA0 && word(got, 7, 16) == 16'hA5C3 && crc_of(got, 6, 33) == 16'h1D0F, "A5: reply");
    chk(u_ee.mem[16 * 3 + 4] == 16'h1357, "A5: word written");
    nconv = 0;
    p.wordptr = 8'd5;
    run(ORD_SENSE);
    chk(nconv == 5, $sformatf("A6: %0d conversions", nconv));
    chk(pd, "A6: ADC powered down");
    chk(avg == 10'h2AC, $sformatf("A6: average %h", avg));
    chk(u_ee.mem[16 * 3 + 5] == 16'h02AC, "A6: average stored");
    chk(got.size() == 40 && crc_of(got, 6, 33) == 16'h1D0F, "A6: reply");
    p.errcode = 8'h03;
    run(ORD_ERROR);
    chk(got.size() == 48 && got[6] == SYM_DATA1 && word(got, 7, 8) == 8'h03 && crc_of(got, 6, 41) == 16'h1D0F, "A7: error reply");
    compare(2'd2, 0, 16, 48'hE200_0000_0000, 1'b1, "compare: whole TID word matches");
    compare(2'd2, 8, 16, 48'h0012_0000_0000, 1'b1, "compare: across a word boundary");
    compare(2'd2, 0, 16, 48'hE201_0000_0000, 1'b0, "compare: last bit differs");
    compare(2'd2, 0, 0, 48'hFFFF_FFFF_FFFF, 1'b1, "compare: empty mask matches");
    compare(2'd1, 16, 48, 48'h3000_3034_0000 | 48'(u_ee.mem[16 + 3]), 1'b1, "compare: 48 bits of PC and EPC");
    compare(2'd2, 250, 16, 48'h0, 1'b0, "compare: past the end of the bank");
    // a whole 96-bit EPC (words 2..7 of the EPC bank), and the same with its last bit flipped
    got = {};
    p.membank = 2'd1; p.cmp_ptr = 8'd32; p.cmp_len = 8'd96;
    for (int i = 0; i < 6; i++) p.cmp_val[95 - 16 * i -: 16] = u_ee.mem[16 + 2 + i];
    ord = ORD_MATCH;
    repeat (300) @(posedge clk); #1;
    chk(etr && mt && got.size() == 0, "compare: 96-bit EPC mask matches");
    ord = ORD_NONE; @(posedge clk); #1;
    p.cmp_val[0] = ~p.cmp_val[0];
    ord = ORD_MATCH;
    repeat (300) @(posedge clk); #1;
    chk(etr && !mt, "compare: 96-bit mask, last bit differs");
    ord = ORD_NONE; @(posedge clk); #1;
    // password compare: Reserved bank, access password word 2 (zero in the model)
    p.rn = 16'h6B21; p.auth_hdr = 1'b0;
    p.membank = 2'd0; p.cmp_ptr = 8'd32; p.cmp_len = 8'd16; p.cmp_val = '0;
    run(ORD_AUTH);
    chk(mt && got.size() == 39 && word(got, 6, 16) == 16'h6B21 && crc_of(got, 6, 32) == 16'h1D0F,
        "AUTH match: handle reply");
    p.auth_hdr = 1'b1;
    run(ORD_AUTH);
    chk(mt && got.size() == 40 && got[6] == SYM_DATA0 && word(got, 7, 16) == 16'h6B21 &&
        crc_of(got, 6, 33) == 16'h1D0F, "AUTH match with header 0");
    u_ee.mem[2] = 16'hDEAD;
    compare(2'd0, 32, 16, 48'h0, 1'b0, "AUTH-style compare with a wrong password");
    got = {};
    p.cmp_val = 48'h0;
    ord = ORD_AUTH;
    repeat (400) @(posedge clk); #1;
    chk(etr && !mt && got.size() == 0, "AUTH mismatch: no reply");
    ord = ORD_NONE;
    @(posedge clk); #1;
    p.cmp_val = {16'hDEAD, 80'h0};
    p.auth_hdr = 1'b0;
    run(ORD_AUTH);
    chk(mt && got.size() == 39, "AUTH with the stored password");
    p.cmp_len = 8'd32; p.cmp_val = '0; p.auth_always = 1'b1;
    run(ORD_AUTH);
    chk(!mt && got.size() == 39 && word(got, 6, 16) == 16'h6B21, "AUTH always: reply despite a mismatch");
    u_ee.mem[2] = 16'h0000;
    run(ORD_AUTH);
    chk(mt && got.size() == 39, "AUTH always: zero access password matches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
