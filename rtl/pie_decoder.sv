// pie_decoder: Pulse-Interval-Encoding decoder for the reader-to-tag link.
// A PIE symbol is a high interval closed by a short low pulse, so every symbol ends at a rising
// edge of data_in and its length is the number of master cycles between two rising edges. A frame
// opens with a delimiter (low), then data-0, RTcal and, for a Query, TRcal. The decoder measures
// RTcal, sets pivot = RTcal/2 and decides each later symbol: shorter than pivot is a '0', otherwise
// a '1'. The symbol after RTcal is TRcal when it is longer than RTcal, else it is already the first
// data bit (frame-sync). end_prea rises once that symbol has been classified. trcal keeps the
// last TRcal received, since only a Query carries one and later replies still need it.
// Counting between rising edges and the pivot rule follow the document (the pivot is RTcal/2, as in
// its measured example RTcal=30, pivot=15); the TRcal test, the idle/timeout behaviour and the
// saturating counters are this design's choices.
// Timing: bit_out/bit_strobe are registered, valid the cycle after the rising edge that closed
// the symbol. Dropping `en` returns the decoder to idle (waiting for a delimiter).
module pie_decoder
  import rfid_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             en,          // clk_pie: decoder enable (clock gating)
  input  logic             data_in,
  output logic             bit_out,
  output logic             bit_strobe,
  output logic             end_prea,
  output logic [CNT_W-1:0] rtcal,
  output logic [CNT_W-1:0] trcal,
  output logic [CNT_W-1:0] pivot
);
  typedef enum logic [2:0] {S_IDLE, S_DELIM, S_DATA0, S_RTCAL, S_FIRST, S_DATA} state_e;
  state_e           state;
  logic             prev;
  logic [CNT_W-1:0] cnt;
  logic             rise, fall, sat;

  assign rise  = data_in & ~prev;
  assign fall  = ~data_in & prev;
  assign sat   = &cnt;
  assign pivot = rtcal >> 1;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      state      <= S_IDLE;
      prev       <= 1'b1;
      cnt        <= '0;
      bit_out    <= 1'b0;
      bit_strobe <= 1'b0;
      end_prea   <= 1'b0;
      if (rst) begin
        rtcal <= '0;
        trcal <= '0;
      end
    end else begin
      prev       <= data_in;
      bit_strobe <= 1'b0;
      cnt        <= rise ? CNT_W'(1) : (sat ? cnt : cnt + 1'b1);
      unique case (state)
        S_IDLE:  if (fall) begin
                   state    <= S_DELIM;
                   end_prea <= 1'b0;
                 end
        S_DELIM: if (rise) state <= S_DATA0;
                 else if (sat) state <= S_IDLE;
        S_DATA0: if (rise) state <= S_RTCAL;
                 else if (sat) state <= S_IDLE;
        S_RTCAL: if (rise) begin
                   rtcal <= cnt;
                   state <= S_FIRST;
                 end else if (sat) state <= S_IDLE;
        S_FIRST: if (rise) begin
                   end_prea <= 1'b1;
                   state    <= S_DATA;
                   if (cnt > rtcal) begin
                     trcal <= cnt;
                   end else begin
                     bit_out    <= (cnt >= pivot);
                     bit_strobe <= 1'b1;
                   end
                 end else if (sat) state <= S_IDLE;
        S_DATA:  if (rise) begin
                   bit_out    <= (cnt >= pivot);
                   bit_strobe <= 1'b1;
                 end else if (sat) begin
                   state    <= S_IDLE;
                   end_prea <= 1'b0;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
