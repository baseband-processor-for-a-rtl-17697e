// tx: backscatter encoder for the tag-to-reader link (FM0 or Miller-modulated subcarrier).
// The link period is N_BLF master cycles with N_BLF = round(TRcal / DR) (DR = 8 or 64/3), which
// is how the document derives the backward data rate from the master clock. Because TRcal is
// already an integer cycle count, the rounding is done exactly: (TRcal + 4) >> 3 for DR = 8 and
// (3*TRcal + 32) >> 6 for DR = 64/3. A symbol lasts N_BLF cycles in FM0 and M*N_BLF cycles in
// Miller (M = 2, 4, 8). FM0 inverts the level at every symbol boundary and a data-0 also in its
// middle; the preamble violation skips the boundary inversion. Miller inverts a data-1 in its
// middle and the boundary between two zeros, and the result is multiplied by a square-wave
// subcarrier of N_BLF cycles. When N_BLF is odd a half period is floor(N_BLF/2) cycles then the
// rest. Symbol shapes and preambles come from the Gen2 standard; the 1-deep input buffer and the
// valid/ready handshake are this design's. data_out is 0 when idle.
// Timing: a symbol offered while sym_ready is high is taken in that cycle and starts at the next
// symbol boundary (or at once when idle); busy stays high until the last symbol has been played.
module tx
  import rfid_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             en,          // clk_tx enable
  input  logic [CNT_W-1:0] trcal,
  input  logic             dr,          // 0: DR = 8, 1: DR = 64/3
  input  logic [1:0]       miller,      // 0: FM0, 1: M=2, 2: M=4, 3: M=8
  input  sym_e             sym,
  input  logic             sym_valid,
  output logic             sym_ready,
  output logic             busy,
  output logic [7:0]       n_blf,
  output logic             data_out
);
  logic [11:0] n_raw;
  logic [10:0] sym_len, half_len, cc;
  logic [7:0]  sc;                 // subcarrier phase counter, 0..n_blf-1
  logic        lvl, sub, playing;
  logic        hold_valid;
  sym_e        hold, cur;

  assign n_raw    = dr ? ((12'(trcal) * 12'd3 + 12'd32) >> 6) : ((12'(trcal) + 12'd4) >> 3);
  assign n_blf    = (n_raw < 12'd2) ? 8'd2 : 8'(n_raw);
  assign sym_len  = (miller == 2'd0) ? 11'(n_blf) : (11'(n_blf) << miller);
  assign half_len = sym_len >> 1;
  assign sym_ready = !hold_valid;
  assign busy      = playing || hold_valid;
  assign data_out  = playing && (lvl ^ ((miller != 2'd0) && sub));

  function automatic logic is_zero(sym_e s);
    return s == SYM_DATA0 || s == SYM_PILOT;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      hold_valid <= 1'b0;
      hold       <= SYM_DATA0;
      cur        <= SYM_DATA0;
      playing    <= 1'b0;
      lvl        <= 1'b0;
      sub        <= 1'b0;
      cc         <= '0;
      sc         <= '0;
    end else if (en) begin
      if (sym_valid && sym_ready) begin
        hold       <= sym;
        hold_valid <= 1'b1;
      end
      if (!playing || cc == sym_len - 1'b1) begin
        // symbol boundary: start the buffered symbol or stop
        cc <= '0;
        sc <= '0;
        if (hold_valid) begin
          playing    <= 1'b1;
          hold_valid <= 1'b0;
          cur        <= hold;
          sub        <= 1'b0;
          if (miller == 2'd0) begin
            if (hold != SYM_VIOL || !playing) lvl <= ~lvl;
          end else if (playing && is_zero(cur) && is_zero(hold)) lvl <= ~lvl;
        end else begin
          playing <= 1'b0;
          lvl     <= 1'b0;
        end
      end else begin
        cc <= cc + 1'b1;
        // subcarrier: toggles after floor(N/2) cycles and again at the end of each period
        if (sc == n_blf - 1'b1) begin
          sc  <= '0;
          sub <= 1'b0;
        end else begin
          sc <= sc + 1'b1;
          if (sc + 1'b1 == 8'(n_blf >> 1)) sub <= 1'b1;
        end
        if (cc + 1'b1 == half_len) begin
          if (miller == 2'd0) begin
            if (cur == SYM_DATA0 || cur == SYM_VIOL) lvl <= ~lvl;
          end else if (cur == SYM_DATA1) lvl <= ~lvl;
        end
      end
    end
  end
endmodule
