// fsm_rx: receive controller that stores the fields of the identified command in the Stack.
// The document gives one state machine per command (C1..C12) behind a demultiplexer, only the
// addressed one active. Here the per-command machines share one field sequencer: a table gives,
// for the command in cmd_id, the width of each field after the command code (Gen2 layouts). Each
// en_pulse_rx trigger (one per received bit) counts one bit of the current field; when a field
// is complete its value, the low bits of the shift register, is written to the next Stack
// register. After the last field (the CRC included) stack_ready rises and stays high until the
// next frame (clr). Select's variable-length mask is stored in 16-bit pieces while Stack
// registers remain; EBV fields are taken as one byte. These simplifications are this design's.
// Timing: the first en_pulse_rx after end_cmd belongs to the last code bit and only arms the
// sequencer; a command with no fields (NAK) raises stack_ready on that same trigger.
module fsm_rx
  import rfid_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        en_pulse_rx,
  input  logic        end_cmd,
  input  cmd_e        cmd_id,
  input  logic [15:0] sr,
  output logic        st_we,
  output logic [3:0]  st_addr,
  output logic [15:0] st_wdata,
  output logic        stack_ready
);
  localparam logic [3:0] MASK_FIELD = 4'd5;   // Select: field index of the mask

  logic        active;
  logic [3:0]  fidx;      // field index within the command
  logic [4:0]  bcnt;      // bits received of the current field
  logic [7:0]  mask_rem;  // Select: mask bits still to come
  logic [4:0]  width;     // width of the current field, 0 = no more fields
  logic [3:0]  naddr;     // next stack register to fill
  logic        full;      // all stack registers used

  // Field widths after the command code, per command (Gen2 air interface).
  function automatic logic [4:0] field_width(cmd_e c, logic [3:0] i, logic [7:0] mrem);
    unique case (c)
      CMD_QUERYREP:    return (i == 0) ? 5'd2 : 5'd0;                        // Session
      CMD_ACK:         return (i == 0) ? 5'd16 : 5'd0;                       // RN
      CMD_QUERY:       case (i)                                              // DR M TRext Sel Session Target Q CRC5
                         4'd0: return 5'd1;   4'd1: return 5'd2;   4'd2: return 5'd1;
                         4'd3: return 5'd2;   4'd4: return 5'd2;   4'd5: return 5'd1;
                         4'd6: return 5'd4;   4'd7: return 5'd5;   default: return 5'd0;
                       endcase
      CMD_QUERYADJUST: case (i)                                              // Session UpDn
                         4'd0: return 5'd2;   4'd1: return 5'd3;   default: return 5'd0;
                       endcase
      CMD_SELECT:      case (i)                                              // Target Action MemBank Pointer Length Mask.. Truncate CRC16
                         4'd0: return 5'd3;   4'd1: return 5'd3;   4'd2: return 5'd2;
                         4'd3: return 5'd8;   4'd4: return 5'd8;
                         4'd5: return (mrem > 8'd16) ? 5'd16 : 5'(mrem);
                         4'd6: return 5'd1;   4'd7: return 5'd16;  default: return 5'd0;
                       endcase
      CMD_REQ_RN:      return (i <= 1) ? 5'd16 : 5'd0;                       // RN CRC16
      CMD_READ:        case (i)                                              // MemBank WordPtr WordCount RN CRC16
                         4'd0: return 5'd2;   4'd1: return 5'd8;   4'd2: return 5'd8;
                         4'd3: return 5'd16;  4'd4: return 5'd16;  default: return 5'd0;
                       endcase
      CMD_WRITE:       case (i)                                              // MemBank WordPtr Data RN CRC16
                         4'd0: return 5'd2;   4'd1: return 5'd8;   4'd2: return 5'd16;
                         4'd3: return 5'd16;  4'd4: return 5'd16;  default: return 5'd0;
                       endcase
      CMD_KILL:        case (i)                                              // Password RFU RN CRC16
                         4'd0: return 5'd16;  4'd1: return 5'd3;   4'd2: return 5'd16;
                         4'd3: return 5'd16;  default: return 5'd0;
                       endcase
      CMD_LOCK:        case (i)                                              // Mask Action RN CRC16
                         4'd0: return 5'd10;  4'd1: return 5'd10;  4'd2: return 5'd16;
                         4'd3: return 5'd16;  default: return 5'd0;
                       endcase
      CMD_ACCESS:      case (i)                                              // Password RN CRC16
                         4'd0: return 5'd16;  4'd1: return 5'd16;  4'd2: return 5'd16;
                         default: return 5'd0;
                       endcase
      default:         return 5'd0;                                          // NAK, unknown
    endcase
  endfunction

  assign width = field_width(cmd_id, fidx, mask_rem);

  always_ff @(posedge clk) begin
    st_we <= 1'b0;
    if (rst || clr) begin
      active      <= 1'b0;
      fidx        <= '0;
      bcnt        <= '0;
      mask_rem    <= '0;
      st_addr     <= '0;
      naddr       <= '0;
      full        <= 1'b0;
      st_wdata    <= '0;
      stack_ready <= 1'b0;
    end else if (en_pulse_rx && end_cmd && !stack_ready && cmd_id != CMD_UNKNOWN) begin
      if (!active) begin
        active <= 1'b1;
        if (width == 5'd0) stack_ready <= 1'b1;
      end else if (bcnt + 5'd1 == width) begin
        // field complete: store it in the next stack register
        bcnt     <= '0;
        st_wdata <= sr & 16'((17'd1 << width) - 17'd1);
        st_we    <= !full;
        st_addr  <= naddr;
        naddr    <= naddr + 1'b1;
        if (naddr == 4'd15) full <= 1'b1;
        if (cmd_id == CMD_SELECT && fidx == 4'd4) begin
          mask_rem <= sr[7:0];
          fidx     <= (sr[7:0] == 8'd0) ? 4'd6 : 4'd5;
        end else if (cmd_id == CMD_SELECT && fidx == MASK_FIELD) begin
          mask_rem <= mask_rem - 8'(width);
          if (mask_rem == 8'(width)) fidx <= 4'd6;
        end else begin
          fidx <= fidx + 1'b1;
          if (field_width(cmd_id, fidx + 1'b1, mask_rem) == 5'd0) stack_ready <= 1'b1;
        end
      end else begin
        bcnt <= bcnt + 1'b1;
      end
    end
  end
endmodule
