// tb_link_range: the slowest link settings at the default parameters. The reader uses
// Tari = 25 us (48 master cycles at 1.92 MHz), data-1 = 2 Tari, RTcal = 3 Tari = 144 cycles and
// TRcal = 384 cycles with DR = 8, so N_BLF = 48 (40 kHz link frequency), and asks for Miller
// M = 8: 5 kbit/s, the slowest backward rate. Query and ACK are answered; the replies are decoded
// from data_out by the Miller rules and the EPC reply's CRC-16 residue is checked.
module tb_link_range;
  import rfid_pkg::*;
  logic clk = 1'b0, rst_async = 1'b1, data_dem = 1'b1, data_out, clk_adc;
  tag_state_e tag_state;
  logic [9:0] average;
  logic [CNT_W-1:0] rtcal, trcal, pivot;
  logic [7:0] n_blf;
  int checks = 0, failures = 0;
  rfid_top dut (.clk_master(clk), .rst_async, .data_dem, .sensor_code(10'h155), .data_out, .tag_state,
                .average, .rtcal, .trcal, .pivot, .n_blf, .clk_adc);
  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  localparam int TARI = 48, ONE = 96, RTCAL = 144, TRCAL = 384, PW = 24, DELIM = 24;
  typedef bit bitq_t[$];

  task automatic sym(input int len);
    data_dem = 1'b1; repeat (len - PW) @(posedge clk);
    data_dem = 1'b0; repeat (PW) @(posedge clk);
  endtask
  task automatic send(input bitq_t b, input bit with_trcal);
    data_dem = 1'b1; repeat (20) @(posedge clk);
    data_dem = 1'b0; repeat (DELIM) @(posedge clk);
    sym(TARI); sym(RTCAL);
    if (with_trcal) sym(TRCAL);
    foreach (b[i]) sym(b[i] ? ONE : TARI);
    data_dem = 1'b1;
  endtask
  function automatic void put(ref bitq_t b, input bit [31:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) b.push_back(v[i]);
  endfunction
  function automatic bit [15:0] crc16_of(bitq_t b, int from, int n);
    bit [15:0] r;
    r = 16'hFFFF;
    for (int i = from; i < from + n; i++) begin
      bit fb;
      fb = r[15] ^ b[i];
      r = {r[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
    end
    return r;
  endfunction
  function automatic bit [31:0] field(bitq_t b, int from, int n);
    bit [31:0] v;
    v = 0;
    for (int i = 0; i < n; i++) v = {v[30:0], b[from + i]};
    return v;
  endfunction
  // Miller M = 8 reception at N cycles per subcarrier period
  task automatic receive(input int nsym, input int n, output bitq_t bits);
    int L;
    bit s[$];
    L = 8 * n;
    bits = {};
    s = {};
    while (data_out !== 1'b1) @(negedge clk);
    for (int i = 0; i < n / 2; i++) s.push_back(1'b0);
    while (s.size() < nsym * L) begin s.push_back(data_out); @(negedge clk); end
    for (int k = 0; k < nsym; k++) begin
      bit first, last;
      first = s[k * L] ^ (((k * L) % n) >= n / 2);
      last  = s[k * L + L - 1] ^ (((k * L + L - 1) % n) >= n / 2);
      bits.push_back(first != last);
    end
  endtask

  initial begin
    bitq_t b, r;
    bit [4:0] c5;
    bit [15:0] rn;
    repeat (10) @(posedge clk); rst_async = 1'b0; repeat (10) @(posedge clk);
    // Query: DR = 8, M = 8, Q = 0; CRC-5 computed here
    b = {}; put(b, 4'b1000, 4); put(b, 0, 1); put(b, 2'd3, 2); put(b, 0, 1); put(b, 0, 2);
    put(b, 0, 2); put(b, 0, 1); put(b, 0, 4);
    c5 = 5'b01001;
    foreach (b[i]) begin
      bit fb;
      fb = c5[4] ^ b[i];
      c5 = {c5[3:0], 1'b0} ^ (fb ? 5'b01001 : 5'b0);
    end
    put(b, c5, 5);
    send(b, 1'b1);
    receive(27, 48, r);
    chk(rtcal == 10'd144 && trcal == 10'd384 && pivot == 10'd72, "timing constants");
    chk(n_blf == 8'd48, $sformatf("N_BLF %0d", n_blf));
    chk(field(r, 0, 10) == 10'b0000010111, $sformatf("Miller preamble %b", field(r, 0, 10)));
    chk(r[26] == 1'b1, "dummy 1");
    rn = field(r, 10, 16);
    b = {}; put(b, 2'b01, 2); put(b, rn, 16);
    send(b, 1'b0);
    receive(139, 48, r);
    chk(field(r, 10, 16) == 16'h3000, "PC word");
    chk(crc16_of(r, 10, 128) == 16'h1D0F, "EPC reply CRC-16");
    chk(tag_state == ST_ACKNOWLEDGED, "Acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
