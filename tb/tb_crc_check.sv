// tb_crc_check: all commands against all relevant CRC results: Query needs a zero CRC-5, the
// CRC-16 commands need the 1D0F residue, the inventory commands pass whenever a result exists.
module tb_crc_check;
  import rfid_pkg::*;
  cmd_e c;
  logic bv, ok;
  logic [4:0] c5;
  logic [15:0] c16;
  int checks = 0, failures = 0;
  crc_check dut (.cmd_id(c), .buf_valid(bv), .crc5_q(c5), .crc16_q(c16), .crc_valid(ok));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    cmd_e list[] = '{CMD_QUERYREP, CMD_ACK, CMD_QUERY, CMD_QUERYADJUST, CMD_SELECT, CMD_NAK,
                     CMD_REQ_RN, CMD_READ, CMD_WRITE, CMD_KILL, CMD_LOCK, CMD_ACCESS, CMD_UNKNOWN};
    foreach (list[i]) begin
      for (int k = 0; k < 16; k++) begin
        bit exp;
        c = list[i]; bv = (k != 0);
        c5  = (k % 2) ? 5'd0 : 5'(1 + $urandom % 31);
        c16 = (k % 4 < 2) ? 16'h1D0F : 16'h1D0E;
        #1;
        if (!bv) exp = 0;
        else if (c == CMD_QUERY) exp = (c5 == 0);
        else if (c inside {CMD_SELECT, CMD_REQ_RN, CMD_READ, CMD_WRITE, CMD_KILL, CMD_LOCK, CMD_ACCESS}) exp = (c16 == 16'h1D0F);
        else exp = (c != CMD_UNKNOWN);
        checks++;
        if (ok !== exp) begin
          failures++;
          $display("FAIL: cmd %0d bv %b c5 %h c16 %h -> %b", c, bv, c5, c16, ok);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
