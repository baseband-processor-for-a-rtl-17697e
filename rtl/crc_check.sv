// crc_check: decides whether the buffered CRC result makes the received command valid.
// Query is protected by CRC-5 (register must be zero); Select and the access commands (Req_RN,
// Read, Write, Kill, Lock, Access) by CRC-16 (register must equal the residue 16'h1D0F); the
// inventory commands QueryRep, ACK, QueryAdjust and NAK carry no CRC and are always valid. The
// split between CRC-5, CRC-16 and unprotected commands is the document's; the residue values
// come from the Gen2 standard. Purely combinational; crc_valid is low while no result is buffered.
module crc_check
  import rfid_pkg::*;
(
  input  cmd_e        cmd_id,
  input  logic        buf_valid,
  input  logic [4:0]  crc5_q,
  input  logic [15:0] crc16_q,
  output logic        crc_valid
);
  always_comb begin
    unique case (cmd_id)
      CMD_QUERY:                                   crc_valid = buf_valid && crc5_q == 5'd0;
      CMD_SELECT, CMD_REQ_RN, CMD_READ, CMD_WRITE,
      CMD_KILL, CMD_LOCK, CMD_ACCESS:              crc_valid = buf_valid && crc16_q == CRC16_RESIDUE;
      CMD_QUERYREP, CMD_ACK, CMD_QUERYADJUST,
      CMD_NAK:                                     crc_valid = buf_valid;
      default:                                     crc_valid = 1'b0;
    endcase
  end
endmodule
