// command_decoder: identifies the Gen2 command from its leading code bits.
// Gen2 command codes are prefix-free: 2 bits (00 QueryRep, 01 ACK), 4 bits (1000 Query,
// 1001 QueryAdjust, 1010 Select) or 8 bits (1100_0000 NAK ... 1100_0110 Access). The decoder counts
// en_pulse_cmd triggers (one per received bit, one cycle after the shift register moved) and
// compares the shift register's low bits after 2, 4 and 8 bits. When the code is known it raises
// end_cmd and holds cmd_id until the next frame (clr). A code that matches nothing yields
// CMD_UNKNOWN with end_cmd. Prefix matching, the 4-bit cmd_ID and end_cmd follow the document;
// the numeric cmd_ID values (rfid_pkg::cmd_e) are this design's.
module command_decoder
  import rfid_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        en_pulse_cmd,
  input  logic [15:0] sr,
  output logic        end_cmd,
  output cmd_e        cmd_id
);
  logic [3:0] nbits;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      nbits   <= '0;
      end_cmd <= 1'b0;
      cmd_id  <= CMD_NONE;
    end else if (en_pulse_cmd && !end_cmd) begin
      nbits <= nbits + 1'b1;
      unique case (nbits + 4'd1)
        4'd2: if (sr[1] == 1'b0) begin
                end_cmd <= 1'b1;
                cmd_id  <= sr[0] ? CMD_ACK : CMD_QUERYREP;
              end
        4'd4: if (sr[3:2] == 2'b10) begin
                end_cmd <= 1'b1;
                unique case (sr[1:0])
                  2'b00:   cmd_id <= CMD_QUERY;
                  2'b01:   cmd_id <= CMD_QUERYADJUST;
                  2'b10:   cmd_id <= CMD_SELECT;
                  default: cmd_id <= CMD_UNKNOWN;   // 1011 is reserved
                endcase
              end
        4'd8: begin
                end_cmd <= 1'b1;
                unique case (sr[7:0])
                  8'hC0:   cmd_id <= CMD_NAK;
                  8'hC1:   cmd_id <= CMD_REQ_RN;
                  8'hC2:   cmd_id <= CMD_READ;
                  8'hC3:   cmd_id <= CMD_WRITE;
                  8'hC4:   cmd_id <= CMD_KILL;
                  8'hC5:   cmd_id <= CMD_LOCK;
                  8'hC6:   cmd_id <= CMD_ACCESS;
                  default: cmd_id <= CMD_UNKNOWN;
                endcase
              end
        default: ;
      endcase
    end
  end
endmodule
