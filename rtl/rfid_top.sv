// rfid_top: baseband processor of a passive UHF RFID sensor tag (EPC Class-1 Gen2).
// Decoding section: a falling-edge flip-flop synchronises the demodulated reader signal, the PIE
// decoder turns symbol lengths into bits, the 16-bit shift register collects them, the command
// decoder names the command, CRC-5/CRC-16 check it and the CRC buffer/check give CRC_valid.
// Processing section: the receive FSM stores the command's fields in the Stack, the core runs the
// Gen2 tag state machine with the random number generator and issues an order. Encoding section:
// the transmit controller reads/writes the EEPROM, drives the ADC and feeds the FM0/Miller
// encoder. The timing unit sequences the RX, CORE and TX phases and produces the trigger pulses
// and block enables that implement clock gating and clock management. A second synchronising
// flip-flop of the same kind turns the asynchronous reset into a synchronous one.
// The block set and the named nets follow the document's block diagram; the EEPROM and the SAR
// ADC are behavioural models; the sensor and its analog conditioning are outside, represented by
// sensor_code. Everything runs on clk_master (1.92 MHz in the document).
module rfid_top
  import rfid_pkg::*;
#(
  parameter int WORDS_PER_BANK = 16,
  parameter int ADC_DIV        = 64,
  parameter int ADC_SAMPLES    = 5,
  parameter int EE_WRITE_CYCLES = 32
) (
  input  logic       clk_master,
  input  logic       rst_async,
  input  logic       data_dem,
  input  logic [9:0] sensor_code,
  output logic       data_out,
  output tag_state_e tag_state,
  output logic [9:0] average,
  // observation of the timing constants and clocks
  output logic [rfid_pkg::CNT_W-1:0] rtcal,
  output logic [rfid_pkg::CNT_W-1:0] trcal,
  output logic [rfid_pkg::CNT_W-1:0] pivot,
  output logic [7:0] n_blf,
  output logic       clk_adc
);
  localparam int AW = 2 + $clog2(WORDS_PER_BANK);

  logic rst, data_in;
  // reset synchroniser (SyncFlipFlop0) and input synchroniser (SyncFlipFlop1)
  sync_ff u_rst_ff  (.clk(clk_master), .d(rst_async), .q(rst));
  sync_ff u_data_ff (.clk(clk_master), .d(data_dem),  .q(data_in));

  // timing unit outputs
  logic frame_clr, en_pulse_shift, en_pulse_cmd, en_pulse_rx, en_pulse_5, en_pulse_16;
  logic clk_pie_en, clk_core_en, clk_tx_en, clk_adc_tick, core_start;

  // decoding
  logic             bit_out, bit_strobe, end_prea, end_cmd, stack_ready;
  logic [15:0]      sr;
  cmd_e             cmd_id;
  logic [4:0]       crc5_r, crc5_q;
  logic [15:0]      crc16_r, crc16_q;
  logic             buf_valid, crc_valid;

  // processing
  logic        st_we;
  logic [3:0]  st_waddr, st_raddr;
  logic [15:0] st_wdata, st_rdata, rnd;
  order_e      order_out;
  tx_params_t  params;
  logic        end_core, end_transfer, match;

  // encoding
  logic          ee_req, ee_we, ee_busy;
  logic [AW-1:0] ee_addr;
  logic [15:0]   ee_wdata, ee_rdata;
  logic          adc_powerdown, adc_data_ready;
  logic [9:0]    adc_dout;
  sym_e          sym;
  logic          sym_valid, sym_ready, tx_busy;

  timing_unit #(.ADC_DIV(ADC_DIV)) u_timing (
    .clk(clk_master), .rst, .bit_strobe, .end_prea, .end_cmd, .cmd_id, .stack_ready,
    .order_out, .end_core, .end_transfer, .adc_run(!adc_powerdown),
    .frame_clr, .en_pulse_shift, .en_pulse_cmd, .en_pulse_rx, .en_pulse_5, .en_pulse_16,
    .clk_pie_en, .clk_core_en, .clk_tx_en, .clk_adc, .clk_adc_tick, .core_start);

  pie_decoder u_pie (
    .clk(clk_master), .rst, .en(clk_pie_en), .data_in, .bit_out, .bit_strobe, .end_prea,
    .rtcal, .trcal, .pivot);

  shift_register #(.WIDTH(16)) u_sr (
    .clk(clk_master), .rst, .clr(frame_clr), .en_pulse_shift, .bit_in(bit_out), .q(sr));

  command_decoder u_cmd (
    .clk(clk_master), .rst, .clr(frame_clr), .en_pulse_cmd, .sr, .end_cmd, .cmd_id);

  crc5  u_crc5  (.clk(clk_master), .rst, .clr(frame_clr), .en_pulse(en_pulse_5),  .bit_in(sr[0]), .crc(crc5_r));
  crc16 u_crc16 (.clk(clk_master), .rst, .clr(frame_clr), .en_pulse(en_pulse_16), .bit_in(sr[0]), .crc(crc16_r));

  crc_buffer u_crc_buf (
    .clk(clk_master), .rst, .clr(frame_clr), .capture(stack_ready && !buf_valid),
    .crc5_in(crc5_r), .crc16_in(crc16_r), .crc5_q, .crc16_q, .valid(buf_valid));

  crc_check u_crc_chk (.cmd_id, .buf_valid, .crc5_q, .crc16_q, .crc_valid);

  fsm_rx u_fsm_rx (
    .clk(clk_master), .rst, .clr(frame_clr), .en_pulse_rx, .end_cmd, .cmd_id, .sr,
    .st_we, .st_addr(st_waddr), .st_wdata, .stack_ready);

  stack #(.DEPTH(16), .WIDTH(16)) u_stack (
    .clk(clk_master), .we(st_we), .waddr(st_waddr), .wdata(st_wdata), .raddr(st_raddr), .rdata(st_rdata));

  rng u_rng (.clk(clk_master), .rst, .en(1'b1), .q(rnd));

  fsm_core #(.WORDS_PER_BANK(WORDS_PER_BANK)) u_core (
    .clk(clk_master), .rst, .en(clk_core_en), .start(core_start), .cmd_id, .crc_valid,
    .st_raddr, .st_rdata, .rng(rnd), .end_transfer, .match, .order_out, .params, .end_core, .tag_state);

  fsm_tx #(.WORDS_PER_BANK(WORDS_PER_BANK), .ADC_SAMPLES(ADC_SAMPLES), .ADC_BITS(10)) u_fsm_tx (
    .clk(clk_master), .rst, .en(clk_tx_en), .order(order_out), .params,
    .ee_req, .ee_we, .ee_addr, .ee_wdata, .ee_rdata, .ee_busy,
    .adc_powerdown, .adc_dout, .adc_data_ready, .average,
    .sym, .sym_valid, .sym_ready, .tx_busy, .end_transfer, .match);

  tx u_tx (
    .clk(clk_master), .rst, .en(clk_tx_en), .trcal, .dr(params.dr), .miller(params.miller),
    .sym, .sym_valid, .sym_ready, .busy(tx_busy), .n_blf, .data_out);

  eeprom #(.WORDS_PER_BANK(WORDS_PER_BANK), .WRITE_CYCLES(EE_WRITE_CYCLES)) u_eeprom (
    .clk(clk_master), .req(ee_req), .we(ee_we), .addr(ee_addr), .wdata(ee_wdata),
    .rdata(ee_rdata), .busy(ee_busy));

  sar_adc #(.BITS(10), .CONV_CYCLES(12)) u_adc (
    .clk(clk_master), .rst, .clk_adc_en(clk_adc_tick), .powerdown(adc_powerdown),
    .vin_code(sensor_code), .adc_dout, .adc_data_ready);
endmodule
