// eeprom: behavioural model of the tag's non-volatile memory macro (not synthesizable logic of
// the processor; it stands for a process-specific EEPROM block).
// Four Gen2 banks (Reserved, EPC, TID, User) of WORDS_PER_BANK 16-bit words, addressed by
// {bank, word}. A read request returns the word on rdata one cycle later; a write request keeps
// busy high for WRITE_CYCLES master cycles and the word is stored at the end. The contents start
// with a fixed example: zero passwords, PC = 16'h3000 (six EPC words) and a 96-bit EPC, a TID
// class word, and an empty User bank. Like a real macro after power-up, it ignores requests during
// its first POR_CYCLES clock edges, so that flip-flops that have not yet been reset cannot start a
// write. Size, timing, power-on time and contents are this design's choices.
module eeprom #(
  parameter int WORDS_PER_BANK = 16,
  parameter int WRITE_CYCLES   = 32,
  parameter int POR_CYCLES     = 4,
  localparam int AW = 2 + $clog2(WORDS_PER_BANK)
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata,
  output logic          busy
);
  logic [15:0] mem [4*WORDS_PER_BANK];
  logic [15:0] wcnt;
  logic [AW-1:0] waddr_q;
  logic [15:0]   wdata_q;
  logic [7:0]    por;

  initial begin
    for (int i = 0; i < 4 * WORDS_PER_BANK; i++) mem[i] = 16'h0000;
    // EPC bank: StoredCRC, PC, EPC words
    mem[WORDS_PER_BANK + 1] = 16'h3000;
    mem[WORDS_PER_BANK + 2] = 16'h3034;
    mem[WORDS_PER_BANK + 3] = 16'h1F2E;
    mem[WORDS_PER_BANK + 4] = 16'h3D4C;
    mem[WORDS_PER_BANK + 5] = 16'h5B6A;
    mem[WORDS_PER_BANK + 6] = 16'h7988;
    mem[WORDS_PER_BANK + 7] = 16'h97A6;
    // TID bank: allocation class and a model number
    mem[2 * WORDS_PER_BANK + 0] = 16'hE200;
    mem[2 * WORDS_PER_BANK + 1] = 16'h1234;
    busy = 1'b0;
    wcnt = '0;
    por  = '0;
  end

  always @(posedge clk) begin
    if (por != 8'(POR_CYCLES)) begin
      por <= por + 1'b1;
    end else if (busy) begin
      if (wcnt == 16'(WRITE_CYCLES - 1)) begin
        mem[waddr_q] <= wdata_q;
        busy         <= 1'b0;
      end
      wcnt <= wcnt + 1'b1;
    end else if (req && we) begin
      busy    <= 1'b1;
      wcnt    <= '0;
      waddr_q <= addr;
      wdata_q <= wdata;
    end else if (req) begin
      rdata <= mem[addr];
    end
  end
endmodule
