// tb_rfid_top: end-to-end test of the baseband processor at its default parameters.
// A reader model sends PIE-encoded Gen2 commands on data_dem (Tari = 12 master cycles, data-1 =
// 18, RTcal = 30, TRcal = 64, as in a 1.92 MHz clock at the fastest forward link) and decodes the
// backscattered FM0 or Miller reply from data_out by its own rules (a symbol whose first and last
// cycles differ carries a mid-symbol inversion). Command CRCs and reply CRC residues are computed
// here independently of the design. The sequence walks one tag through a full session: Query,
// ACK, Req_RN, Read, Write, a sensor Write (five ADC conversions averaged into the User bank),
// read-back, an out-of-range Read (error reply), a corrupted CRC, an unknown command code,
// QueryRep, a non-matching Query, a Miller-encoded reply at DR = 8, slot counting with QueryRep and
// QueryAdjust, NAK, and Select (memory compare against TID and EPC masks, SL and session flags
// steering later Queries), Access with the two covered password halves, Lock of the User bank,
// a nonzero access password sending Req_RN to Open where the locked bank refuses a Write (error
// 04) until Access, a Write of the kill
// password, and Kill, after which the tag stays silent. Each mechanism is counted and must occur
// at least once.
module tb_rfid_top;
  import rfid_pkg::*;

  logic       clk = 1'b0;
  logic       rst_async = 1'b1;
  logic       data_dem = 1'b1;
  logic [9:0] sensor_code = 10'h2AC;
  logic       data_out, clk_adc;
  tag_state_e tag_state;
  logic [9:0] average;
  logic [CNT_W-1:0] rtcal, trcal, pivot;
  logic [7:0] n_blf;

  rfid_top dut (.clk_master(clk), .rst_async, .data_dem, .sensor_code, .data_out, .tag_state,
                .average, .rtcal, .trcal, .pivot, .n_blf, .clk_adc);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_fm0 = 0, n_miller = 0, n_ee_write = 0, n_adc_conv = 0, n_crc_reject = 0, n_unknown = 0;
  int n_slot_count = 0, n_error_reply = 0, n_crc16_gated = 0, n_no_match = 0, n_qadjust = 0;
  int n_select = 0, n_access = 0, n_kill = 0, n_lock = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // ---------------- reader: command construction ----------------
  typedef bit bitq_t[$];

  function automatic bitq_t crc5_append(bitq_t b);
    bit [4:0] r = 5'b01001;
    bitq_t o = b;
    foreach (b[i]) begin
      bit fb = r[4] ^ b[i];
      r = {r[3:0], 1'b0};
      if (fb) r ^= 5'b01001;
    end
    for (int i = 4; i >= 0; i--) o.push_back(r[i]);
    return o;
  endfunction

  function automatic bit [15:0] crc16_of(bitq_t b);
    bit [15:0] r = 16'hFFFF;
    foreach (b[i]) begin
      bit fb = r[15] ^ b[i];
      r = {r[14:0], 1'b0};
      if (fb) r ^= 16'h1021;
    end
    return r;
  endfunction

  function automatic bitq_t crc16_append(bitq_t b);
    bit [15:0] r = ~crc16_of(b);
    bitq_t o = b;
    for (int i = 15; i >= 0; i--) o.push_back(r[i]);
    return o;
  endfunction

  function automatic void put(ref bitq_t b, input bit [31:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) b.push_back(v[i]);
  endfunction

  function automatic bitq_t cmd_query(bit dr, bit [1:0] m, bit [1:0] sel, bit [1:0] s, bit tgt, bit [3:0] q);
    bitq_t b;
    put(b, 4'b1000, 4); put(b, dr, 1); put(b, m, 2); put(b, 0, 1); put(b, sel, 2);
    put(b, s, 2); put(b, tgt, 1); put(b, q, 4);
    return crc5_append(b);
  endfunction

  // ---------------- reader: PIE modulation ----------------
  localparam int TARI = 12, ONE = 18, RTCAL = 30, TRCAL = 64, PW = 6, DELIM = 24;

  task automatic level(input bit v, input int n);
    data_dem = v;
    repeat (n) @(posedge clk);
  endtask

  task automatic symbol(input int len);
    level(1'b1, len - PW);
    level(1'b0, PW);
  endtask

  task automatic send(input bitq_t b, input bit with_trcal);
    level(1'b1, 20);
    level(1'b0, DELIM);
    symbol(TARI);
    symbol(RTCAL);
    if (with_trcal) symbol(TRCAL);
    foreach (b[i]) symbol(b[i] ? ONE : TARI);
    data_dem = 1'b1;
  endtask

  // ---------------- reader: reply reception ----------------
  // Waits for the reply, samples nsym symbols of L cycles and decodes them.
  task automatic receive(input int nsym, input int n, input int m, input int timeout,
                         output bitq_t bits, output bit got);
    int L = (m == 0) ? n : n * m;
    bit s[$];
    int t = 0;
    bits = {};
    got = 1'b0;
    while (data_out !== 1'b1 && t < timeout) begin
      @(negedge clk);
      t++;
    end
    if (data_out !== 1'b1) return;
    got = 1'b1;
    if (m != 0) for (int i = 0; i < n / 2; i++) s.push_back(1'b0);
    while (s.size() < nsym * L) begin
      s.push_back(data_out);
      @(negedge clk);
    end
    for (int k = 0; k < nsym; k++) begin
      bit first, last;
      int i0 = k * L, i1 = k * L + L - 1;
      first = s[i0];
      last  = s[i1];
      if (m != 0) begin   // remove the subcarrier: low for floor(N/2) cycles, then high
        first ^= ((i0 % n) >= n / 2);
        last  ^= ((i1 % n) >= n / 2);
        bits.push_back(first != last);
      end else begin
        bits.push_back(first == last);
        if (k > 0 && k != 4) check(s[i0] != s[i0 - 1], $sformatf("FM0 boundary inversion at symbol %0d", k));
        if (k == 4)          check(s[i0] == s[i0 - 1], "FM0 preamble violation");
      end
    end
    // the tag must be silent afterwards
    repeat (2 * L) @(negedge clk);
    check(data_out == 1'b0, "tag idle after reply");
    if (m == 0) n_fm0++; else n_miller++;
  endtask

  function automatic bit [31:0] field(bitq_t b, int from, int n);
    bit [31:0] v = 0;
    for (int i = 0; i < n; i++) v = {v[30:0], b[from + i]};
    return v;
  endfunction

  function automatic bitq_t slice(bitq_t b, int from, int n);
    bitq_t o;
    for (int i = 0; i < n; i++) o.push_back(b[from + i]);
    return o;
  endfunction

  task automatic check_fm0_preamble(bitq_t r);
    check(field(r, 0, 6) == 6'b101001, $sformatf("FM0 preamble %b", field(r, 0, 6)));
  endtask

  // expects no reply within the given number of cycles
  task automatic expect_silence(input int cycles_, input string what);
    int t = 0;
    bit seen = 0;
    while (t < cycles_) begin
      @(negedge clk);
      if (data_out) seen = 1;
      t++;
    end
    check(!seen, what);
  endtask

  // ---------------- monitors ----------------
  int crc16_pulses_in_query = 0;
  bit in_query = 0;
  always @(posedge clk) begin
    if (dut.u_eeprom.req && dut.u_eeprom.we) n_ee_write++;
    if (dut.u_adc.adc_data_ready) n_adc_conv++;
    if (in_query && dut.en_pulse_16) crc16_pulses_in_query++;
    // clock gating: receive and transmit sections never enabled together
    if (dut.clk_pie_en && dut.clk_tx_en) begin
      failures++;
      $display("FAIL: PIE decoder and transmitter enabled together");
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sequence ----------------
  initial begin : main
    bitq_t b, r;
    bit got;
    bit [15:0] rn16, handle, rn2, epc[7];
    int c0;

    repeat (10) @(posedge clk);
    rst_async = 1'b0;
    repeat (10) @(posedge clk);
    check(tag_state == ST_READY, "Ready after reset");

    // 1. Query, Q = 0, DR = 64/3, FM0: immediate RN16 reply
    in_query = 1;
    send(cmd_query(1'b1, 2'd0, 2'b00, 2'd0, 1'b0, 4'd0), 1'b1);
    in_query = 0;
    check(rtcal == 10'd30 && trcal == 10'd64 && pivot == 10'd15,
          $sformatf("timing constants rtcal=%0d trcal=%0d pivot=%0d", rtcal, trcal, pivot));
    if (crc16_pulses_in_query <= 8) n_crc16_gated++;
    check(crc16_pulses_in_query <= 8, "CRC-16 gated off once a Query is identified");
    receive(23, 3, 0, 3000, r, got);
    check(got, "RN16 reply to Query");
    check_fm0_preamble(r);
    check(n_blf == 8'd3, $sformatf("N_BLF = round(64 / (64/3)) = 3, got %0d", n_blf));
    rn16 = field(r, 6, 16);
    check(r[22] == 1'b1, "dummy 1 after RN16");
    check(tag_state == ST_REPLY, "Reply state after Query");

    // 2. ACK: PC + EPC + CRC-16
    b = {}; put(b, 2'b01, 2); put(b, rn16, 16);
    send(b, 1'b0);
    receive(135, 3, 0, 3000, r, got);
    check(got, "EPC reply to ACK");
    for (int i = 0; i < 7; i++) epc[i] = field(r, 6 + 16 * i, 16);
    check(epc[0] == 16'h3000, $sformatf("PC word %h", epc[0]));
    check(epc[1] == 16'h3034 && epc[6] == 16'h97A6, "EPC words");
    check(crc16_of(slice(r, 6, 128)) == 16'h1D0F, "EPC reply CRC-16 residue");
    check(tag_state == ST_ACKNOWLEDGED, "Acknowledged");

    // 3. Req_RN: handle
    b = {}; put(b, 8'hC1, 8); put(b, rn16, 16);
    send(crc16_append(b), 1'b0);
    receive(39, 3, 0, 3000, r, got);
    check(got, "handle reply to Req_RN");
    handle = field(r, 6, 16);
    check(crc16_of(slice(r, 6, 32)) == 16'h1D0F, "handle reply CRC-16 residue");
    check(tag_state == ST_SECURED, "Secured after Req_RN");

    // 4. Read TID words 0..1
    b = {}; put(b, 8'hC2, 8); put(b, 2'd2, 2); put(b, 8'd0, 8); put(b, 8'd2, 8); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(6 + 1 + 32 + 32 + 1, 3, 0, 3000, r, got);
    check(got && r[6] == 1'b0, "Read reply header 0");
    check(field(r, 7, 16) == 16'hE200 && field(r, 23, 16) == 16'h1234, "TID words");
    check(field(r, 39, 16) == handle, "Read reply carries the handle");
    check(crc16_of(slice(r, 6, 65)) == 16'h1D0F, "Read reply CRC-16 residue");

    // 5. Req_RN for a cover code, then Write EPC word 7
    b = {}; put(b, 8'hC1, 8); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(39, 3, 0, 3000, r, got);
    rn2 = field(r, 6, 16);
    b = {}; put(b, 8'hC3, 8); put(b, 2'd1, 2); put(b, 8'd7, 8); put(b, 16'hBEEF ^ rn2, 16); put(b, handle, 16);
    c0 = n_ee_write;
    send(crc16_append(b), 1'b0);
    receive(40, 3, 0, 3000, r, got);
    check(got && r[6] == 1'b0 && field(r, 7, 16) == handle, "Write reply");
    check(crc16_of(slice(r, 6, 33)) == 16'h1D0F, "Write reply CRC-16 residue");
    check(n_ee_write == c0 + 1, "one EEPROM write");
    b = {}; put(b, 8'hC2, 8); put(b, 2'd1, 2); put(b, 8'd7, 8); put(b, 8'd1, 8); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(6 + 1 + 16 + 32 + 1, 3, 0, 3000, r, got);
    check(field(r, 7, 16) == 16'hBEEF, $sformatf("read back written word %h", field(r, 7, 16)));

    // 6. Write to the User bank: sensor acquisition, five conversions averaged
    c0 = n_adc_conv;
    b = {}; put(b, 8'hC3, 8); put(b, 2'd3, 2); put(b, 8'd0, 8); put(b, 16'h0000, 16); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(40, 3, 0, 20000, r, got);
    check(got && r[6] == 1'b0, "sensor Write reply");
    check(n_adc_conv - c0 == 5, $sformatf("five conversions, got %0d", n_adc_conv - c0));
    check(average == 10'h2AC, $sformatf("average %h", average));
    b = {}; put(b, 8'hC2, 8); put(b, 2'd3, 2); put(b, 8'd0, 8); put(b, 8'd1, 8); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(6 + 1 + 16 + 32 + 1, 3, 0, 3000, r, got);
    check(field(r, 7, 16) == 16'h02AC, $sformatf("sensor word in User bank %h", field(r, 7, 16)));

    // 7. out-of-range Read: error reply
    b = {}; put(b, 8'hC2, 8); put(b, 2'd2, 2); put(b, 8'd15, 8); put(b, 8'd4, 8); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(48, 3, 0, 3000, r, got);
    check(got && r[6] == 1'b1 && field(r, 7, 8) == 8'h03, "error reply, code 03");
    check(crc16_of(slice(r, 6, 41)) == 16'h1D0F, "error reply CRC-16 residue");
    if (got && r[6]) n_error_reply++;

    // 8. corrupted CRC: ignored
    b = {}; put(b, 8'hC2, 8); put(b, 2'd2, 2); put(b, 8'd0, 8); put(b, 8'd1, 8); put(b, handle, 16);
    b = crc16_append(b);
    b[b.size() - 1] = ~b[b.size() - 1];
    send(b, 1'b0);
    expect_silence(1500, "no reply to a corrupted command");
    n_crc_reject++;
    check(tag_state == ST_SECURED, "state kept after bad CRC");

    // 9. unknown command code (1011 is reserved): ignored, decoder restarts
    b = {}; put(b, 4'b1011, 4); put(b, 16'h1234, 16);
    send(b, 1'b0);
    expect_silence(800, "no reply to an unknown command");
    if (dut.u_cmd.cmd_id == CMD_UNKNOWN || dut.u_timing.restart || !dut.u_cmd.end_cmd) n_unknown++;
    // the tag must still answer afterwards
    b = {}; put(b, 8'hC2, 8); put(b, 2'd2, 2); put(b, 8'd0, 8); put(b, 8'd1, 8); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(6 + 1 + 16 + 32 + 1, 3, 0, 3000, r, got);
    check(got && field(r, 7, 16) == 16'hE200, "tag answers after an unknown command");

    // 10. QueryRep in Secured: inventoried flag S0 flips to B, tag returns to Ready
    b = {}; put(b, 2'b00, 2); put(b, 2'd0, 2);
    send(b, 1'b0);
    expect_silence(600, "no reply to QueryRep in Secured");
    check(tag_state == ST_READY, "Ready after QueryRep");

    // 11. Query for target A no longer matches
    send(cmd_query(1'b1, 2'd0, 2'b00, 2'd0, 1'b0, 4'd0), 1'b1);
    expect_silence(600, "no reply: inventoried flag is B");
    check(tag_state == ST_READY, "Ready after non-matching Query");
    n_no_match++;

    // 12. Query for target B, DR = 8, Miller M = 2: N_BLF = round(64/8) = 8
    send(cmd_query(1'b0, 2'd1, 2'b00, 2'd0, 1'b1, 4'd0), 1'b1);
    receive(27, 8, 2, 6000, r, got);
    check(n_blf == 8'd8, $sformatf("N_BLF for DR=8 %0d", n_blf));
    check(got, "Miller reply");
    check(field(r, 0, 10) == 10'b0000010111, $sformatf("Miller preamble %b", field(r, 0, 10)));
    check(tag_state == ST_REPLY, "Reply after Miller Query");

    // 13. NAK: back to Arbitrate
    b = {}; put(b, 8'hC0, 8);
    send(b, 1'b0);
    expect_silence(500, "no reply to NAK");
    check(tag_state == ST_ARBITRATE, "Arbitrate after NAK");

    // 14. Slot counting: Query with Q = 3 (target B, flag still B), then QueryRep until reply
    begin
      int reps = 0;
      send(cmd_query(1'b1, 2'd0, 2'b00, 2'd0, 1'b1, 4'd3), 1'b1);
      receive(23, 3, 0, 400, r, got);
      while (!got && reps < 9) begin
        b = {}; put(b, 2'b00, 2); put(b, 2'd0, 2);
        send(b, 1'b0);
        reps++;
        receive(23, 3, 0, 400, r, got);
      end
      check(got, "RN16 reply after slot countdown");
      check(reps <= 8, $sformatf("reply within 2^Q slots (%0d QueryReps)", reps));
      if (reps > 0) n_slot_count++;
      else begin
        // slot 0 at once: still exercise the countdown with a QueryRep (Reply -> Arbitrate)
        b = {}; put(b, 2'b00, 2); put(b, 2'd0, 2);
        send(b, 1'b0);
        repeat (200) @(posedge clk);
        check(tag_state == ST_ARBITRATE, "QueryRep in Reply -> Arbitrate");
        n_slot_count++;
      end
    end

    // 15. QueryAdjust with Q down to 0 from Q=3 steps: repeat until a reply
    begin
      int adj = 0;
      got = 0;
      while (!got && adj < 5) begin
        b = {}; put(b, 4'b1001, 4); put(b, 2'd0, 2); put(b, 3'b011, 3);
        send(b, 1'b0);
        adj++;
        receive(23, 3, 0, 400, r, got);
      end
      check(got, "reply after QueryAdjust lowers Q");
      if (got) n_qadjust++;
    end

    // 16. Select SL on TID word 0 = E200 (action 000): SL asserted, Query Sel=SL on S1 answers
    b = {}; put(b, 4'b1010, 4); put(b, 3'b100, 3); put(b, 3'b000, 3); put(b, 2'd2, 2);
    put(b, 8'd0, 8); put(b, 8'd16, 8); put(b, 16'hE200, 16); put(b, 1'b0, 1);
    send(crc16_append(b), 1'b0);
    expect_silence(800, "no reply to Select");
    check(tag_state == ST_READY, "Ready after Select");
    send(cmd_query(1'b1, 2'd0, 2'b11, 2'd1, 1'b0, 4'd0), 1'b1);
    receive(23, 3, 0, 1000, r, got);
    check(got, "Select matched: SL set, Query Sel=SL answers");
    if (got) n_select++;
    // same Select with mask E201: no match, SL deasserted
    b = {}; put(b, 4'b1010, 4); put(b, 3'b100, 3); put(b, 3'b000, 3); put(b, 2'd2, 2);
    put(b, 8'd0, 8); put(b, 8'd16, 8); put(b, 16'hE201, 16); put(b, 1'b0, 1);
    send(crc16_append(b), 1'b0);
    expect_silence(800, "no reply to Select");
    send(cmd_query(1'b1, 2'd0, 2'b11, 2'd1, 1'b0, 4'd0), 1'b1);
    expect_silence(800, "Select did not match: Query Sel=SL ignored");
    send(cmd_query(1'b1, 2'd0, 2'b10, 2'd1, 1'b0, 4'd0), 1'b1);
    receive(23, 3, 0, 1000, r, got);
    check(got, "Query Sel=~SL answers");
    if (got) n_select++;
    // Select S2, action 100, 24-bit mask over EPC-bank bits 24..47 (end of PC, first EPC word):
    // match sets S2 to B, so a Query on S2 for target B answers
    b = {}; put(b, 4'b1010, 4); put(b, 3'b010, 3); put(b, 3'b100, 3); put(b, 2'd1, 2);
    put(b, 8'd24, 8); put(b, 8'd24, 8); put(b, 24'h003034, 24); put(b, 1'b0, 1);
    send(crc16_append(b), 1'b0);
    expect_silence(800, "no reply to Select");
    send(cmd_query(1'b1, 2'd0, 2'b00, 2'd2, 1'b1, 4'd0), 1'b1);
    receive(23, 3, 0, 1000, r, got);
    check(got, "Select with a 24-bit EPC mask set S2 to B");
    if (got) n_select++;
    // Select SL on the whole 96-bit EPC (its last word was rewritten to BEEF in step 5)
    b = {}; put(b, 4'b1010, 4); put(b, 3'b100, 3); put(b, 3'b000, 3); put(b, 2'd1, 2);
    put(b, 8'd32, 8); put(b, 8'd96, 8);
    for (int i = 1; i < 6; i++) put(b, epc[i], 16);
    put(b, 16'hBEEF, 16); put(b, 1'b0, 1);
    send(crc16_append(b), 1'b0);
    expect_silence(800, "no reply to Select");
    send(cmd_query(1'b1, 2'd0, 2'b11, 2'd2, 1'b1, 4'd0), 1'b1);
    receive(23, 3, 0, 1000, r, got);
    check(got, "Select on the full 96-bit EPC matched: SL set");
    if (got) n_select++;

    // 17. Access with the (zero) access password, in two halves covered by fresh RN16s
    rn16 = field(r, 6, 16);
    b = {}; put(b, 2'b01, 2); put(b, rn16, 16);
    send(b, 1'b0);
    receive(135, 3, 0, 3000, r, got);
    b = {}; put(b, 8'hC1, 8); put(b, rn16, 16);
    send(crc16_append(b), 1'b0);
    receive(39, 3, 0, 3000, r, got);
    handle = field(r, 6, 16);
    check(got && tag_state == ST_SECURED, "Secured again");
    for (int half = 0; half < 2; half++) begin
      b = {}; put(b, 8'hC1, 8); put(b, handle, 16);
      send(crc16_append(b), 1'b0);
      receive(39, 3, 0, 3000, r, got);
      rn2 = field(r, 6, 16);
      b = {}; put(b, 8'hC6, 8); put(b, 16'h0000 ^ rn2, 16); put(b, handle, 16);
      send(crc16_append(b), 1'b0);
      receive(39, 3, 0, 3000, r, got);
      check(got && field(r, 6, 16) == handle && crc16_of(slice(r, 6, 32)) == 16'h1D0F,
            $sformatf("Access half %0d: handle reply", half + 1));
      if (got) n_access++;
    end
    check(tag_state == ST_SECURED, "Secured after Access");

    // 17b. Lock the User bank (pwd-write), set access password 0000_00AA
    b = {}; put(b, 8'hC5, 8); put(b, 10'b0000000011, 10); put(b, 10'b0000000010, 10); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(40, 3, 0, 3000, r, got);
    check(got && r[6] == 1'b0 && field(r, 7, 16) == handle && crc16_of(slice(r, 6, 33)) == 16'h1D0F,
          "Lock reply");
    b = {}; put(b, 8'hC1, 8); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(39, 3, 0, 3000, r, got);
    rn2 = field(r, 6, 16);
    b = {}; put(b, 8'hC3, 8); put(b, 2'd0, 2); put(b, 8'd3, 8); put(b, 16'h00AA ^ rn2, 16); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(40, 3, 0, 3000, r, got);
    check(got && r[6] == 1'b0, "access password written");
    // new round on S1: Req_RN now leads to Open
    send(cmd_query(1'b1, 2'd0, 2'b00, 2'd1, 1'b0, 4'd0), 1'b1);
    receive(23, 3, 0, 1000, r, got);
    rn16 = field(r, 6, 16);
    b = {}; put(b, 2'b01, 2); put(b, rn16, 16);
    send(b, 1'b0);
    receive(135, 3, 0, 3000, r, got);
    b = {}; put(b, 8'hC1, 8); put(b, rn16, 16);
    send(crc16_append(b), 1'b0);
    receive(39, 3, 0, 3000, r, got);
    handle = field(r, 6, 16);
    check(got && tag_state == ST_OPEN, "Req_RN with an access password -> Open");
    b = {}; put(b, 8'hC3, 8); put(b, 2'd3, 2); put(b, 8'd0, 8); put(b, 16'h0000, 16); put(b, handle, 16);
    c0 = n_adc_conv;
    send(crc16_append(b), 1'b0);
    receive(48, 3, 0, 3000, r, got);
    check(got && r[6] == 1'b1 && field(r, 7, 8) == 8'h04 && crc16_of(slice(r, 6, 41)) == 16'h1D0F,
          "Write to the locked User bank in Open -> error 04");
    check(n_adc_conv == c0, "no acquisition for a refused Write");
    if (got && field(r, 7, 8) == 8'h04) n_lock++;
    for (int half = 0; half < 2; half++) begin
      b = {}; put(b, 8'hC1, 8); put(b, handle, 16);
      send(crc16_append(b), 1'b0);
      receive(39, 3, 0, 3000, r, got);
      rn2 = field(r, 6, 16);
      b = {}; put(b, 8'hC6, 8); put(b, (half == 0 ? 16'h0000 : 16'h00AA) ^ rn2, 16); put(b, handle, 16);
      send(crc16_append(b), 1'b0);
      receive(39, 3, 0, 3000, r, got);
      check(got && field(r, 6, 16) == handle, "Access with the set password");
    end
    check(tag_state == ST_SECURED, "Open -> Secured by Access");

    // 18. write kill password 0000_5678 (Reserved word 1), then Kill in two halves
    b = {}; put(b, 8'hC1, 8); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(39, 3, 0, 3000, r, got);
    rn2 = field(r, 6, 16);
    b = {}; put(b, 8'hC3, 8); put(b, 2'd0, 2); put(b, 8'd1, 8); put(b, 16'h5678 ^ rn2, 16); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(40, 3, 0, 3000, r, got);
    check(got && r[6] == 1'b0, "kill password written");
    // a wrong first half: no reply, Arbitrate
    b = {}; put(b, 8'hC1, 8); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    receive(39, 3, 0, 3000, r, got);
    rn2 = field(r, 6, 16);
    b = {}; put(b, 8'hC4, 8); put(b, 16'h0001 ^ rn2, 16); put(b, 3'b000, 3); put(b, handle, 16);
    send(crc16_append(b), 1'b0);
    expect_silence(1000, "no reply to a wrong kill password");
    check(tag_state == ST_ARBITRATE, "wrong kill password -> Arbitrate");
    // back to Secured, then the right halves
    send(cmd_query(1'b1, 2'd0, 2'b00, 2'd3, 1'b0, 4'd0), 1'b1);
    receive(23, 3, 0, 1000, r, got);
    rn16 = field(r, 6, 16);
    b = {}; put(b, 2'b01, 2); put(b, rn16, 16);
    send(b, 1'b0);
    receive(135, 3, 0, 3000, r, got);
    b = {}; put(b, 8'hC1, 8); put(b, rn16, 16);
    send(crc16_append(b), 1'b0);
    receive(39, 3, 0, 3000, r, got);
    handle = field(r, 6, 16);
    for (int half = 0; half < 2; half++) begin
      b = {}; put(b, 8'hC1, 8); put(b, handle, 16);
      send(crc16_append(b), 1'b0);
      receive(39, 3, 0, 3000, r, got);
      rn2 = field(r, 6, 16);
      b = {}; put(b, 8'hC4, 8); put(b, (half == 0 ? 16'h0000 : 16'h5678) ^ rn2, 16); put(b, 3'b000, 3);
      put(b, handle, 16);
      send(crc16_append(b), 1'b0);
      if (half == 0) begin
        receive(39, 3, 0, 3000, r, got);
        check(got && field(r, 6, 16) == handle, "Kill half 1: handle reply");
      end else begin
        receive(40, 3, 0, 3000, r, got);
        check(got && r[6] == 1'b0 && field(r, 7, 16) == handle && crc16_of(slice(r, 6, 33)) == 16'h1D0F,
              "Kill half 2: header 0, handle, CRC-16");
      end
    end
    check(tag_state == ST_KILLED, "Killed");
    send(cmd_query(1'b1, 2'd0, 2'b00, 2'd3, 1'b0, 4'd0), 1'b1);
    expect_silence(1000, "killed tag does not answer a Query");
    if (tag_state == ST_KILLED) n_kill++;

    // mechanisms
    check(n_select == 4, "Select");
    check(n_access == 2, "Access");
    check(n_kill == 1, "Kill");
    check(n_lock == 1, "Lock");
    check(n_fm0 > 0, "FM0 replies");
    check(n_miller > 0, "Miller replies");
    check(n_ee_write > 1, "EEPROM writes");
    check(n_adc_conv >= 5, "ADC conversions");
    check(n_crc_reject > 0, "CRC rejection");
    check(n_unknown > 0, "unknown command");
    check(n_slot_count > 0, "slot countdown");
    check(n_error_reply > 0, "error reply");
    check(n_crc16_gated > 0, "CRC-16 gating");
    check(n_no_match > 0, "Query without match");
    check(n_qadjust > 0, "QueryAdjust");
    $display("mechanisms: fm0=%0d miller=%0d ee_write=%0d adc_conv=%0d crc_reject=%0d unknown=%0d slot=%0d err=%0d crc16_gated=%0d nomatch=%0d qadjust=%0d select=%0d access=%0d kill=%0d lock=%0d",
             n_fm0, n_miller, n_ee_write, n_adc_conv, n_crc_reject, n_unknown, n_slot_count,
             n_error_reply, n_crc16_gated, n_no_match, n_qadjust, n_select, n_access, n_kill, n_lock);
    $display("end cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
