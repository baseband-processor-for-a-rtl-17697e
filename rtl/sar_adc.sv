// sar_adc: behavioural model of the 10-bit successive-approximation ADC (a mixed-signal block;
// the comparator and DAC are modelled by comparing the trial code with vin_code).
// The ADC is clocked by clk_adc (one tick per rising edge, given here as clk_adc_en) and halves
// it internally, so one conversion step takes two ticks. A conversion takes CONV_CYCLES steps:
// one to sample, BITS trials from the MSB down, and one to publish. While powerdown is low the
// ADC converts back to back; after each conversion adc_dout is updated and adc_data_ready pulses
// for one master cycle. The resolution, the internal /2 and the 12-cycle conversion follow the
// document; back-to-back operation under powerdown control is this design's reading of it.
module sar_adc #(
  parameter int BITS        = 10,
  parameter int CONV_CYCLES = 12
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            clk_adc_en,
  input  logic            powerdown,
  input  logic [BITS-1:0] vin_code,
  output logic [BITS-1:0] adc_dout,
  output logic            adc_data_ready
);
  logic            half;       // internal divide-by-2 of clk_adc
  logic [3:0]      step;
  logic [BITS-1:0] sample, sar, trial;

  assign trial = sar | (BITS'(1) << (4'(BITS) - step));

  always @(posedge clk) begin
    adc_data_ready <= 1'b0;
    if (rst || powerdown) begin
      half <= 1'b0;
      step <= '0;
      sar  <= '0;
      if (rst) adc_dout <= '0;
    end else if (clk_adc_en) begin
      half <= ~half;
      if (half) begin
        if (step == 4'd0) begin
          sample <= vin_code;
          sar    <= '0;
          step   <= 4'd1;
        end else if (step <= 4'(BITS)) begin
          if (trial <= sample) sar <= trial;
          step <= step + 1'b1;
        end else begin
          step <= (step == 4'(CONV_CYCLES - 1)) ? 4'd0 : step + 1'b1;
          if (step == 4'(CONV_CYCLES - 1)) begin
            adc_dout       <= sar;
            adc_data_ready <= 1'b1;
          end
        end
      end
    end
  end
endmodule
