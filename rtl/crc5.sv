// crc5: serial CRC-5 of the Gen2 forward link (polynomial x^5 + x^3 + 1, preset 5'b01001).
// One bit is absorbed per en_pulse trigger, most significant bit of the frame first. When the
// frame including its 5 CRC bits has been absorbed, a correct frame leaves the register at zero.
// The document names the CRC-5 and its trigger (en_pulse_5, once per received bit); polynomial
// and preset are those of the Gen2 standard. clr presets the register (frame start).
module crc5 (
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       en_pulse,
  input  logic       bit_in,
  output logic [4:0] crc
);
  localparam logic [4:0] POLY   = 5'b01001;
  localparam logic [4:0] PRESET = 5'b01001;
  logic fb;
  assign fb = crc[4] ^ bit_in;

  always_ff @(posedge clk) begin
    if (rst || clr)    crc <= PRESET;
    else if (en_pulse) crc <= {crc[3:0], 1'b0} ^ (fb ? POLY : 5'b0);
  end
endmodule
