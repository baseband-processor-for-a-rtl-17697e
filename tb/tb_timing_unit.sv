// tb_timing_unit: checks the trigger-pulse train (shift, cmd, rx one cycle apart after each
// bit strobe), the CRC gating by command, the RX -> CORE -> TX -> CORE -> RX sequence with the
// block enables, the restart on an unknown command and the clk_adc period of ADC_DIV cycles.
module tb_timing_unit;
  import rfid_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic bs = 0, ep = 0, ec = 0, sready = 0, ecore = 0, etr = 0, adc_run = 0;
  cmd_e id = CMD_NONE;
  order_e ord = ORD_NONE;
  logic fclr, ps, pc, pr, p5, p16, pie_en, core_en, tx_en, cadc, ctick, cstart;
  int checks = 0, failures = 0;
  timing_unit #(.ADC_DIV(64)) dut (.clk, .rst, .bit_strobe(bs), .end_prea(ep), .end_cmd(ec), .cmd_id(id),
    .stack_ready(sready), .order_out(ord), .end_core(ecore), .end_transfer(etr), .adc_run,
    .frame_clr(fclr), .en_pulse_shift(ps), .en_pulse_cmd(pc), .en_pulse_rx(pr), .en_pulse_5(p5),
    .en_pulse_16(p16), .clk_pie_en(pie_en), .clk_core_en(core_en), .clk_tx_en(tx_en),
    .clk_adc(cadc), .clk_adc_tick(ctick), .core_start(cstart));
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
  task automatic strobe_and_check(input bit exp5, input bit exp16);
    bs = 1; @(posedge clk); #1 bs = 0;
    chk(ps && !pc && !pr, "shift pulse 1 cycle after strobe");
    @(posedge clk); #1;
    chk(!ps && pc && !pr, "cmd pulse 1 cycle later");
    @(posedge clk); #1;
    chk(!pc && pr && p5 == exp5 && p16 == exp16, $sformatf("rx pulse with crc5=%b crc16=%b", p5, p16));
    @(posedge clk); #1;
    chk(!pr && !p5 && !p16, "single-cycle pulses");
  endtask
  task automatic frame(input cmd_e c, input bit with_order);
    bit e5, e16;
    ep = 1; #1;
    chk(fclr, "frame clear when preamble read");
    @(posedge clk); #1;
    chk(pie_en && !core_en && !tx_en, "RX phase enables");
    repeat (3) strobe_and_check(1, 1);
    ec = 1; id = c; @(posedge clk); #1;
    e5 = (c == CMD_QUERY);
    e16 = c inside {CMD_SELECT, CMD_REQ_RN, CMD_READ, CMD_WRITE, CMD_KILL, CMD_LOCK, CMD_ACCESS};
    repeat (3) strobe_and_check(e5, e16);
    sready = 1; @(posedge clk); #1;
    chk(core_en && !pie_en && cstart, "CORE phase after stack_ready");
    @(posedge clk); #1;
    bs = 1; @(posedge clk); #1 bs = 0;
    @(posedge clk); #1;
    chk(!pr, "no trigger pulses outside RX");
    if (with_order) begin
      ord = ORD_READ; @(posedge clk); #1;
      chk(tx_en && !core_en && !pie_en, "TX phase after an order");
      repeat (5) @(posedge clk); #1;
      etr = 1; @(posedge clk); #1;
      chk(core_en && !tx_en, "back to CORE after end_transfer");
      ord = ORD_NONE; @(posedge clk); #1 etr = 0;
      chk(core_en, "stays in CORE");
    end
    ecore = 1; @(posedge clk); #1 ecore = 0;
    chk(fclr && !pie_en, "restart clear when RX re-entered");
    ep = 0; ec = 0; sready = 0; id = CMD_NONE;
    @(posedge clk); #1;
    chk(pie_en, "RX phase again");
  endtask
  initial begin
    int rise_prev, period_bad, nrise;
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    repeat (2) @(posedge clk); #1;
    frame(CMD_QUERY, 1);
    frame(CMD_READ, 1);
    frame(CMD_QUERYREP, 0);
    frame(CMD_NAK, 0);
    // unknown command: restart of the decoder
    ep = 1; @(posedge clk); #1;
    ec = 1; id = CMD_UNKNOWN; @(posedge clk); #1;
    chk(!pie_en && fclr, "decoder restarted on unknown command");
    ec = 0; ep = 0; id = CMD_NONE; @(posedge clk); #1;
    // clk_adc
    chk(!ctick, "no ADC ticks when not running");
    adc_run = 1; rise_prev = -1; period_bad = 0; nrise = 0;
    for (int i = 0; i < 64 * 20; i++) begin
      @(posedge clk); #1;
      if (ctick) begin
        if (rise_prev >= 0 && i - rise_prev != 64) period_bad++;
        rise_prev = i; nrise++;
      end
    end
    chk(nrise >= 19 && period_bad == 0, $sformatf("clk_adc period 64 (%0d ticks, %0d bad)", nrise, period_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
