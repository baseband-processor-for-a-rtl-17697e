// crc16: serial CRC-16/CCITT (x^16 + x^12 + x^5 + 1, preset 16'hFFFF) as used by Gen2.
// One bit per en_pulse trigger, frame MSB first. A sender appends the ones' complement of the
// register; a receiver that absorbs frame and CRC finds the residue 16'h1D0F. The receiver side
// (en_pulse_16) is the document's; reusing the same block in the transmit controller to append
// CRC-16 to replies is this design's choice. clr presets the register.
module crc16 (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        en_pulse,
  input  logic        bit_in,
  output logic [15:0] crc
);
  localparam logic [15:0] POLY = 16'h1021;
  logic fb;
  assign fb = crc[15] ^ bit_in;

  always_ff @(posedge clk) begin
    if (rst || clr)    crc <= 16'hFFFF;
    else if (en_pulse) crc <= {crc[14:0], 1'b0} ^ (fb ? POLY : 16'h0);
  end
endmodule
