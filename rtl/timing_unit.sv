// timing_unit: phase sequencer, trigger-pulse generator and clock manager of the processor.
// The processor works in three phases. RX: the PIE decoder is enabled (clk_pie) and every decoded
// bit produces a train of one-cycle trigger pulses, each one master cycle after the previous, so
// that the blocks it wakes draw current at different moments: en_pulse_shift (shift register),
// en_pulse_cmd (command decoder), en_pulse_rx with en_pulse_5/en_pulse_16 (receive FSM, CRC
// units). Both CRC units run from the first bit; once end_cmd names the command, the unit it does
// not need is gated off. stack_ready ends RX and starts CORE (clk_core). A non-zero order_out
// moves to TX (clk_tx); end_transfer returns to CORE; end_core returns to RX, and so does an
// unknown command code. frame_clr is a one-cycle clear for the receive-side blocks, issued when a
// frame's preamble has been read and when RX is re-entered. clk_adc is the master clock divided
// by ADC_DIV, running only while adc_run is high; clk_adc_tick marks its rising edges.
// The pulse names, their order and the enable scheme follow the document; the one-cycle spacing,
// the phase encoding and the use of enables instead of gated clock nets are this design's.
module timing_unit
  import rfid_pkg::*;
#(
  parameter int ADC_DIV = 64
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   bit_strobe,
  input  logic   end_prea,
  input  logic   end_cmd,
  input  cmd_e   cmd_id,
  input  logic   stack_ready,
  input  order_e order_out,
  input  logic   end_core,
  input  logic   end_transfer,
  input  logic   adc_run,
  output logic   frame_clr,
  output logic   en_pulse_shift,
  output logic   en_pulse_cmd,
  output logic   en_pulse_rx,
  output logic   en_pulse_5,
  output logic   en_pulse_16,
  output logic   clk_pie_en,
  output logic   clk_core_en,
  output logic   clk_tx_en,
  output logic   clk_adc,
  output logic   clk_adc_tick,
  output logic   core_start
);
  typedef enum logic [1:0] {PH_RX, PH_CORE, PH_TX} phase_e;
  phase_e phase;
  logic   end_prea_q, restart, crc5_on, crc16_on, pulse3;
  localparam int AD_W = $clog2(ADC_DIV);
  localparam logic [AD_W-1:0] ADC_RISE = AD_W'(ADC_DIV / 2 - 1);
  logic [AD_W-1:0] adc_cnt;

  assign clk_pie_en  = (phase == PH_RX) && !restart;
  assign clk_core_en = (phase == PH_CORE);
  assign clk_tx_en   = (phase == PH_TX);
  assign frame_clr   = restart || (end_prea && !end_prea_q);
  assign en_pulse_5  = pulse3 && crc5_on;
  assign en_pulse_16 = pulse3 && crc16_on;
  assign en_pulse_rx = pulse3;
  assign clk_adc     = adc_cnt[AD_W-1];
  assign clk_adc_tick = adc_run && (adc_cnt == ADC_RISE);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase          <= PH_RX;
      end_prea_q     <= 1'b0;
      restart        <= 1'b1;
      crc5_on        <= 1'b1;
      crc16_on       <= 1'b1;
      en_pulse_shift <= 1'b0;
      en_pulse_cmd   <= 1'b0;
      pulse3         <= 1'b0;
      core_start     <= 1'b0;
      adc_cnt        <= '0;
    end else begin
      end_prea_q     <= end_prea;
      restart        <= 1'b0;
      core_start     <= 1'b0;
      en_pulse_shift <= bit_strobe && (phase == PH_RX);
      en_pulse_cmd   <= en_pulse_shift;
      pulse3         <= en_pulse_cmd;
      adc_cnt        <= adc_run ? adc_cnt + 1'b1 : '0;
      if (frame_clr) begin
        crc5_on  <= 1'b1;
        crc16_on <= 1'b1;
      end else if (end_cmd) begin
        crc5_on  <= (cmd_id == CMD_QUERY);
        crc16_on <= cmd_id inside {CMD_SELECT, CMD_REQ_RN, CMD_READ, CMD_WRITE,
                                   CMD_KILL, CMD_LOCK, CMD_ACCESS};
      end
      unique case (phase)
        PH_RX: if (stack_ready && !restart) begin
                 phase      <= PH_CORE;
                 core_start <= 1'b1;
               end else if (end_cmd && cmd_id == CMD_UNKNOWN) begin
                 restart <= 1'b1;
               end
        PH_CORE: if (order_out != ORD_NONE && !end_transfer) phase <= PH_TX;
                 else if (end_core) begin
                   phase   <= PH_RX;
                   restart <= 1'b1;
                 end
        PH_TX:   if (end_transfer) phase <= PH_CORE;
        default: phase <= PH_RX;
      endcase
    end
  end
endmodule
