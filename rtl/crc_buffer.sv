// crc_buffer: holds the CRC-5 and CRC-16 results of a received frame.
// When reception ends (capture, the stack_ready pulse) both CRC registers are copied so that the
// CRC units can be gated off and re-preset while the CRC check and the core still use the result.
// valid tells that the buffer holds the current frame's result; clr (frame start) drops it.
// The document says only that the results "are stored in buffers"; the capture event is this
// design's choice. Timing: outputs change one cycle after capture.
module crc_buffer (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        capture,
  input  logic [4:0]  crc5_in,
  input  logic [15:0] crc16_in,
  output logic [4:0]  crc5_q,
  output logic [15:0] crc16_q,
  output logic        valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      crc5_q  <= '1;
      crc16_q <= '0;
      valid   <= 1'b0;
    end else if (capture) begin
      crc5_q  <= crc5_in;
      crc16_q <= crc16_in;
      valid   <= 1'b1;
    end else if (clr) begin
      valid   <= 1'b0;
    end
  end
endmodule
