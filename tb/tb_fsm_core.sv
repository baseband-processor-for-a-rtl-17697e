// tb_fsm_core: drives the core with commands whose fields sit in a stack model and checks the
// Gen2 state transitions, the orders and their parameters, the order/end_transfer/end_core
// handshake, CRC rejection and the disabled (en low) behaviour, and Select: the compare order
// with its left-aligned mask, and the action applied to SL or an inventoried flag according to
// the compare result (driven by the bench on match); Access and Kill: the password compare
// orders for each half, the decovering with the RN16, Secured/Killed after the second half,
// Arbitrate on a wrong half, and the refusal of a zero kill password; Req_RN going to Secured or
// Open after its access-password probe; Lock updates, the permalock refusal, and error 04 for
// Reads and Writes of locked fields. The random number input is held at known
// values so that slots and RN16 values are predictable.
module tb_fsm_core;
  import rfid_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b1, start = 1'b0, crc_ok = 1'b1, etr = 1'b0, ecore, mt = 1'b1;
  cmd_e id = CMD_NONE;
  logic [3:0] ra;
  logic [15:0] rd, rng = 16'h1234;
  logic [15:0] fields [16];
  order_e ord;
  tx_params_t p;
  tag_state_e st;
  int checks = 0, failures = 0;
  assign rd = fields[ra];
  fsm_core #(.WORDS_PER_BANK(16)) dut (.clk, .rst, .en, .start, .cmd_id(id), .crc_valid(crc_ok),
    .st_raddr(ra), .st_rdata(rd), .rng, .end_transfer(etr), .match(mt), .order_out(ord), .params(p),
    .end_core(ecore), .tag_state(st));
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
  // runs one command; returns the order it produced (ORD_NONE if none)
  task automatic cmd(input cmd_e c, input logic [15:0] f[], output order_e o);
    int t;
    foreach (fields[i]) fields[i] = '0;
    foreach (f[i]) fields[i] = f[i];
    id = c;
    start = 1; @(posedge clk); #1 start = 0;
    t = 0; o = ORD_NONE;
    while (!ecore && t < 100) begin
      if (ord != ORD_NONE && !etr) begin
        o = ord;
        // transmit phase: the core is disabled and must hold its order
        en = 0; repeat (5) @(posedge clk); #1;
        chk(ord == o, "order held while disabled");
        etr = 1; en = 1;
      end
      if (ord == ORD_NONE) etr = 0;
      @(posedge clk); #1; t++;
    end
    chk(ecore, "end_core");
    chk(ord == ORD_NONE, "order withdrawn at end_core");
    etr = 0;
    @(posedge clk); #1;
  endtask
  initial begin
    order_e o;
    logic [15:0] rn, h;
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    chk(st == ST_READY, "Ready after reset");
    // Query Q=0 (DR=1, M=0, sel all, S0, target A): slot 0 -> reply
    cmd(CMD_QUERY, '{1, 0, 0, 0, 0, 0, 0, 0}, o);
    chk(o == ORD_RN16 && st == ST_REPLY, "Query Q=0 -> RN16, Reply");
    rn = p.rn;
    chk(rn == 16'h3412 && p.dr == 1'b1, "RN16 taken from the generator");
    // ACK with a wrong RN16 -> Arbitrate, no reply
    cmd(CMD_ACK, '{rn ^ 16'h1}, o);
    chk(o == ORD_NONE && st == ST_ARBITRATE, "wrong ACK -> Arbitrate");
    // Query with Q=4, generator gives slot 3 -> Arbitrate; 3 QueryReps later reply
    rng = 16'h0003;
    cmd(CMD_QUERY, '{0, 1, 0, 0, 0, 0, 4, 0}, o);
    chk(o == ORD_NONE && st == ST_ARBITRATE, "Query Q=4 slot 3 -> Arbitrate");
    chk(p.miller == 2'd1 && p.dr == 1'b0, "link parameters latched");
    cmd(CMD_QUERYREP, '{0}, o); chk(o == ORD_NONE, "slot 2");
    cmd(CMD_QUERYREP, '{1}, o); chk(o == ORD_NONE && st == ST_ARBITRATE, "other session ignored");
    cmd(CMD_QUERYREP, '{0}, o); chk(o == ORD_NONE, "slot 1");
    rng = 16'hBEEF;
    cmd(CMD_QUERYREP, '{0}, o); chk(o == ORD_RN16 && st == ST_REPLY, "slot 0 -> reply");
    rn = p.rn;
    cmd(CMD_ACK, '{rn}, o);
    chk(o == ORD_EPC && st == ST_ACKNOWLEDGED, "ACK -> EPC, Acknowledged");
    rng = 16'h5A5A;
    cmd(CMD_REQ_RN, '{rn, 0}, o);
    chk(o == ORD_AUTH && p.auth_always && p.membank == 0 && p.cmp_ptr == 32 && p.cmp_len == 32 &&
        p.cmp_val == '0 && st == ST_SECURED && p.rn == 16'h5A5A, "Req_RN -> password probe, handle, Secured");
    h = p.rn;
    cmd(CMD_READ, '{2, 1, 3, h, 0}, o);
    chk(o == ORD_READ && p.membank == 2 && p.wordptr == 1 && p.wordcount == 3 && p.rn == h, "Read order");
    cmd(CMD_READ, '{2, 14, 3, h, 0}, o);
    chk(o == ORD_ERROR && p.errcode == 8'h03, "Read beyond the bank -> error");
    cmd(CMD_READ, '{2, 1, 3, h ^ 16'h8000, 0}, o);
    chk(o == ORD_NONE, "Read with a wrong handle ignored");
    rng = 16'h0F0F;
    cmd(CMD_REQ_RN, '{h, 0}, o);
    chk(o == ORD_HANDLE && p.rn == 16'h0F0F && st == ST_SECURED, "Req_RN in Secured -> new RN16");
    cmd(CMD_WRITE, '{1, 5, 16'hCAFE ^ 16'h0F0F, h, 0}, o);
    chk(o == ORD_WRITE && p.wdata == 16'hCAFE && p.wordptr == 5, "Write order, data decovered");
    cmd(CMD_WRITE, '{3, 0, 0, h, 0}, o);
    chk(o == ORD_SENSE && p.membank == 3, "Write to User bank -> sensor acquisition");
    crc_ok = 0;
    cmd(CMD_READ, '{2, 1, 3, h, 0}, o);
    chk(o == ORD_NONE && st == ST_SECURED, "bad CRC ignored");
    crc_ok = 1;
    cmd(CMD_ACK, '{h}, o);
    chk(o == ORD_EPC, "ACK with handle in Secured resends EPC");
    cmd(CMD_QUERYADJUST, '{0, 3'b000}, o);
    chk(st == ST_READY, "QueryAdjust in Secured -> Ready");
    // S0 flag is now B: Query for target A does not match, for target B it does
    cmd(CMD_QUERY, '{0, 0, 0, 0, 0, 0, 0, 0}, o);
    chk(o == ORD_NONE && st == ST_READY, "flag B, target A -> Ready");
    rng = 16'h0000;
    cmd(CMD_QUERY, '{0, 0, 0, 0, 0, 1, 1, 0}, o);
    chk(o == ORD_RN16 && st == ST_REPLY, "target B matches");
    rng = 16'h0001;
    cmd(CMD_QUERYADJUST, '{0, 3'b110}, o);
    chk(o == ORD_NONE && st == ST_ARBITRATE, "QueryAdjust Q+1, slot 1 -> Arbitrate");
    cmd(CMD_NAK, '{}, o);
    chk(st == ST_ARBITRATE, "NAK -> Arbitrate");
    // Select SL, action 0, matching: compare order, Ready, SL asserted
    mt = 1;
    cmd(CMD_SELECT, '{4, 0, 1, 32, 8, 16'hAB, 0, 0}, o);
    chk(o == ORD_MATCH && st == ST_READY, "Select -> compare order, Ready");
    chk(p.membank == 1 && p.cmp_ptr == 32 && p.cmp_len == 8 && p.cmp_val[95:48] == 48'hAB00_0000_0000 && p.cmp_val[47:0] == '0,
        "Select compare parameters");
    rng = 16'h0000;
    cmd(CMD_QUERY, '{0, 0, 0, 3, 0, 1, 0, 0}, o);
    chk(o == ORD_RN16, "SL asserted: Query Sel=SL matches");
    // same Select, not matching: SL deasserted
    mt = 0;
    cmd(CMD_SELECT, '{4, 0, 1, 32, 8, 16'hAB, 0, 0}, o);
    chk(o == ORD_MATCH && st == ST_READY, "Select from Reply -> Ready");
    cmd(CMD_QUERY, '{0, 0, 0, 3, 0, 1, 0, 0}, o);
    chk(o == ORD_NONE && st == ST_READY, "SL deasserted: Query Sel=SL skips the tag");
    cmd(CMD_QUERY, '{0, 0, 0, 2, 0, 1, 0, 0}, o);
    chk(o == ORD_RN16, "Query Sel=~SL matches");
    // S2 flag: action 3 negates on match only
    cmd(CMD_SELECT, '{2, 3, 3, 0, 20, 16'h1234, 16'h000A, 0}, o);
    chk(p.cmp_len == 20 && p.cmp_val == {48'h1234_A000_0000, 48'h0}, "20-bit mask aligned");
    cmd(CMD_QUERY, '{0, 0, 0, 0, 2, 1, 0, 0}, o);
    chk(o == ORD_NONE, "action 3 without match leaves S2 at A");
    mt = 1;
    cmd(CMD_SELECT, '{2, 3, 3, 0, 40, 16'h1234, 16'h5678, 16'h009A}, o);
    chk(p.cmp_len == 40 && p.cmp_val == {48'h1234_5678_9A00, 48'h0}, "40-bit mask aligned");
    cmd(CMD_QUERY, '{0, 0, 0, 0, 2, 1, 0, 0}, o);
    chk(o == ORD_RN16, "action 3 with match sets S2 to B");
    // action 4 on S2: match -> deassert (B), no match -> assert (A)
    mt = 0;
    cmd(CMD_SELECT, '{2, 4, 3, 0, 60, 16'h1111, 16'h2222, 16'h3333, 16'h0ABC, 0}, o);
    chk(p.cmp_len == 60 && p.cmp_val == {64'h1111_2222_3333_ABC0, 32'h0}, "60-bit mask aligned");
    cmd(CMD_SELECT, '{2, 4, 3, 0, 96, 16'h1111, 16'h2222, 16'h3333, 16'h4444, 16'h5555, 16'h6666, 0}, o);
    chk(p.cmp_len == 96 && p.cmp_val == 96'h1111_2222_3333_4444_5555_6666, "96-bit mask");
    cmd(CMD_SELECT, '{2, 4, 3, 0, 112, 16'h1111, 16'h2222, 16'h3333, 16'h4444, 16'h5555, 16'h6666, 16'h7777}, o);
    chk(p.cmp_len == 96 && p.cmp_val == 96'h1111_2222_3333_4444_5555_6666, "112-bit mask cut to 96 bits");
    cmd(CMD_QUERY, '{0, 0, 0, 0, 2, 0, 0, 0}, o);
    chk(o == ORD_RN16, "action 4 without match sets S2 to A");
    // target 5 is reserved: no flag changes
    mt = 1;
    cmd(CMD_SELECT, '{5, 0, 3, 0, 0, 0, 0, 0}, o);
    cmd(CMD_QUERY, '{0, 0, 0, 2, 2, 0, 0, 0}, o);
    chk(o == ORD_RN16, "reserved target changes nothing");
    // Access and Kill: into Open/Secured first
    rn = p.rn;
    cmd(CMD_ACK, '{rn}, o);
    rng = 16'h7777;
    cmd(CMD_REQ_RN, '{rn, 0}, o);
    h = p.rn;
    rng = 16'h1111;
    cmd(CMD_REQ_RN, '{h, 0}, o);
    chk(o == ORD_HANDLE && st == ST_SECURED, "Secured for access tests");
    mt = 1;
    cmd(CMD_ACCESS, '{16'hDEAD ^ 16'h1111, h}, o);
    chk(o == ORD_AUTH && p.membank == 0 && p.cmp_ptr == 32 && p.cmp_len == 16 &&
        p.cmp_val == {16'hDEAD, 80'h0} && p.rn == h && !p.auth_hdr, "Access half 1: compare with word 2");
    rng = 16'h2222;
    cmd(CMD_REQ_RN, '{h, 0}, o);
    cmd(CMD_ACCESS, '{16'hBEEF ^ 16'h2222, h}, o);
    chk(o == ORD_AUTH && p.cmp_ptr == 48 && p.cmp_val[95:80] == 16'hBEEF && st == ST_SECURED,
        "Access half 2: compare with word 3, Secured");
    cmd(CMD_ACCESS, '{16'h0, h ^ 16'h1}, o);
    chk(o == ORD_NONE, "Access with a wrong handle ignored");
    mt = 0;
    cmd(CMD_ACCESS, '{16'h0, h}, o);
    chk(o == ORD_AUTH && st == ST_ARBITRATE, "wrong Access password -> Arbitrate");
    cmd(CMD_ACCESS, '{16'h0, h}, o);
    chk(o == ORD_NONE, "Access ignored in Arbitrate");
    // Req_RN with a nonzero access password (probe does not match) -> Open
    mt = 0;
    cmd(CMD_QUERY, '{0, 0, 0, 0, 1, 0, 0, 0}, o);
    rn = p.rn;
    cmd(CMD_ACK, '{rn}, o);
    rng = 16'h6666;
    cmd(CMD_REQ_RN, '{rn, 0}, o);
    chk(o == ORD_AUTH && st == ST_OPEN, "Req_RN with a password set -> Open");
    h = p.rn;
    cmd(CMD_LOCK, '{10'h003, 10'h002, h}, o);
    chk(o == ORD_NONE, "Lock ignored in Open");
    cmd(CMD_WRITE, '{3, 0, 0, h, 0}, o);
    chk(o == ORD_SENSE, "unlocked User bank writable in Open");
    mt = 1;
    rng = 16'h1010;
    cmd(CMD_REQ_RN, '{h, 0}, o);
    cmd(CMD_ACCESS, '{16'h0 ^ 16'h1010, h}, o);
    rng = 16'h2020;
    cmd(CMD_REQ_RN, '{h, 0}, o);
    cmd(CMD_ACCESS, '{16'h0 ^ 16'h2020, h}, o);
    chk(st == ST_SECURED, "Open -> Secured by Access");
    // Lock User pwd-write
    cmd(CMD_LOCK, '{10'h003, 10'h002, h}, o);
    chk(o == ORD_AUTH && p.cmp_len == 0 && p.auth_hdr && !p.auth_always && p.rn == h, "Lock reply order");
    chk(dut.lockb == 10'h002, "User pwd-write set");
    cmd(CMD_WRITE, '{3, 0, 0, h, 0}, o);
    chk(o == ORD_SENSE, "pwd-write User bank writable in Secured");
    // kill password pwd-read/write + permalock
    cmd(CMD_LOCK, '{10'h300, 10'h300, h}, o);
    chk(o == ORD_AUTH && dut.lockb == 10'h302, "kill password permalocked");
    cmd(CMD_READ, '{0, 0, 1, h, 0}, o);
    chk(o == ORD_ERROR && p.errcode == 8'h04, "Read of a permalocked kill password -> error 04");
    cmd(CMD_READ, '{0, 2, 2, h, 0}, o);
    chk(o == ORD_READ, "access password still readable");
    cmd(CMD_READ, '{0, 1, 0, h, 0}, o);
    chk(o == ORD_ERROR && p.errcode == 8'h04, "Read to the end of the Reserved bank -> error 04");
    cmd(CMD_WRITE, '{0, 1, 0, h, 0}, o);
    chk(o == ORD_ERROR && p.errcode == 8'h04, "Write of a permalocked kill password -> error 04");
    cmd(CMD_LOCK, '{10'h200, 10'h000, h}, o);
    chk(o == ORD_ERROR && p.errcode == 8'h04 && dut.lockb == 10'h302, "changing a permalocked field refused");
    cmd(CMD_LOCK, '{10'h200, 10'h200, h}, o);
    chk(o == ORD_AUTH, "Lock that keeps a permalocked field accepted");
    // access password pwd-read/write (not permanent): readable in Secured only
    cmd(CMD_LOCK, '{10'h0C0, 10'h080, h}, o);
    chk(dut.lockb == 10'h382, "access password read/write locked");
    cmd(CMD_READ, '{0, 2, 2, h, 0}, o);
    chk(o == ORD_READ, "locked access password readable in Secured");
    // new round into Open: locked fields refuse
    mt = 0;
    cmd(CMD_QUERY, '{0, 0, 0, 0, 2, 0, 0, 0}, o);
    rn = p.rn;
    cmd(CMD_ACK, '{rn}, o);
    cmd(CMD_REQ_RN, '{rn, 0}, o);
    chk(st == ST_OPEN, "Open again");
    h = p.rn;
    cmd(CMD_WRITE, '{3, 0, 0, h, 0}, o);
    chk(o == ORD_ERROR && p.errcode == 8'h04, "pwd-write User bank refused in Open");
    cmd(CMD_WRITE, '{1, 4, 0, h, 0}, o);
    chk(o == ORD_WRITE, "unlocked EPC bank writable in Open");
    cmd(CMD_READ, '{0, 3, 1, h, 0}, o);
    chk(o == ORD_ERROR && p.errcode == 8'h04, "locked access password unreadable in Open");
    cmd(CMD_READ, '{0, 4, 1, h, 0}, o);
    chk(o == ORD_READ, "Reserved word 4 unaffected");
    // back to Secured for Kill
    mt = 1;
    rng = 16'h0000;
    cmd(CMD_QUERY, '{0, 0, 0, 0, 3, 0, 0, 0}, o);
    rn = p.rn;
    cmd(CMD_ACK, '{rn}, o);
    rng = 16'h4444;
    cmd(CMD_REQ_RN, '{rn, 0}, o);
    h = p.rn;
    rng = 16'h5555;
    cmd(CMD_REQ_RN, '{h, 0}, o);
    mt = 1;
    // zero kill password: first half compared, second half refused with an error
    cmd(CMD_KILL, '{16'h5555, 0, h}, o);
    chk(o == ORD_AUTH && p.cmp_ptr == 0 && p.cmp_val[95:80] == 16'h0000, "Kill half 1: compare with word 0");
    cmd(CMD_KILL, '{16'h5555, 0, h}, o);
    chk(o == ORD_ERROR && p.errcode == 8'h00 && st == ST_SECURED, "zero kill password refused");
    // nonzero kill password
    cmd(CMD_KILL, '{16'h1234 ^ 16'h5555, 0, h}, o);
    chk(o == ORD_AUTH && p.cmp_ptr == 0 && !p.auth_hdr, "Kill half 1 again");
    cmd(CMD_READ, '{2, 0, 1, h, 0}, o);
    cmd(CMD_KILL, '{16'h0000 ^ 16'h5555, 0, h}, o);
    chk(o == ORD_AUTH && p.cmp_ptr == 0, "another command drops the first half");
    cmd(CMD_KILL, '{16'h5678 ^ 16'h5555, 0, h}, o);
    chk(o == ORD_AUTH && p.cmp_ptr == 16 && p.auth_hdr && st == ST_KILLED, "Kill half 2 -> Killed");
    rng = 16'h0000;
    cmd(CMD_QUERY, '{0, 0, 0, 0, 0, 0, 0, 0}, o);
    chk(o == ORD_NONE && st == ST_KILLED, "killed tag stays silent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
