// fsm_tx: transmit controller that carries out the core's order (actions A1..A7).
// The document groups everything the tag does after a command into seven action types, one state
// machine each, only one enabled at a time. Here they share one sequencer whose path depends on
// the order:
//   A1 RN16    preamble, RN16                                   (Query, QueryRep, QueryAdjust)
//   A2 EPC     preamble, PC + EPC words from the EPC bank, CRC-16 (ACK)
//   A3 HANDLE  preamble, RN16/handle, CRC-16                    (Req_RN)
//   A4 READ    preamble, header 0, words, handle, CRC-16        (Read)
//   A5 WRITE   EEPROM write, then preamble, header 0, handle, CRC-16 (Write)
//   A6 SENSE   ADC_SAMPLES conversions, their mean written to the EEPROM, then as A5
//   A7 ERROR   preamble, header 1, error code, handle, CRC-16
//   MATCH      no reply: compares cmp_len bits of the bank from bit cmp_ptr on with cmp_val, one
//              bit per cycle, reading a word whenever a word boundary is crossed; the result is
//              left on match (bits past the end of the bank count as a mismatch)
//   AUTH       the same compare of a password half (Access, Kill); on a match (or always, with
//              auth_always) preamble, handle, CRC-16; auth_hdr adds header 0 in front of the
//              handle. An empty compare gives the Lock reply; a 32-bit compare with zero tells
//              Req_RN whether the access password is set
// Every reply ends with a dummy data-1. Symbols go to the encoder through a valid/ready
// handshake; the CRC-16 of a reply is computed on the fly by a crc16 instance and sent
// complemented. When the transfer is over, end_transfer rises and stays high until the core
// withdraws the order (that release is not gated, so it works while clk_tx is off). The action
// grouping, the five averaged conversions and the EEPROM/ADC control follow the document; the
// reply formats and preambles (FM0: 1010v1, Miller: four pilot zeros then 010111) follow the Gen2
// standard; the sequencer itself is this design's, and so are the MATCH and AUTH paths, which
// give Select, Access and Kill the memory access that the document's block diagram reserves for
// this controller.
module fsm_tx
  import rfid_pkg::*;
#(
  parameter int WORDS_PER_BANK = 16,
  parameter int ADC_SAMPLES    = 5,
  parameter int ADC_BITS       = 10,
  localparam int AW = 2 + $clog2(WORDS_PER_BANK)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,            // clk_tx enable
  input  order_e              order,
  input  tx_params_t          params,
  // EEPROM
  output logic                ee_req,
  output logic                ee_we,
  output logic [AW-1:0]       ee_addr,
  output logic [15:0]         ee_wdata,
  input  logic [15:0]         ee_rdata,
  input  logic                ee_busy,
  // ADC
  output logic                adc_powerdown,
  input  logic [ADC_BITS-1:0] adc_dout,
  input  logic                adc_data_ready,
  output logic [ADC_BITS-1:0] average,
  // encoder
  output sym_e                sym,
  output logic                sym_valid,
  input  logic                sym_ready,
  input  logic                tx_busy,
  output logic                end_transfer,
  output logic                match          // result of the last MATCH order
);
  typedef enum logic [4:0] {P_IDLE, P_ADC, P_EEW, P_EEWAIT, P_PRE, P_SHIFT, P_RD, P_RDW,
                            P_RN, P_ERRC, P_CRC, P_END, P_WAIT, P_DONE,
                            P_CRD, P_CRW, P_CBIT, P_CEND} phase_e;
  phase_e      ph, after;
  logic [15:0] shreg;
  logic [4:0]  nleft;
  logic [3:0]  pidx;
  logic [7:0]  words_left;
  logic        first_word, crc_on, crc_clr, crc_en;
  logic [15:0] crc;
  logic [2:0]  nsamp;
  logic [ADC_BITS+2:0] sum;
  logic [ADC_BITS+2:0] total;
  logic        accept;
  logic [8:0]  cbit;       // MATCH: bit address being compared
  logic [7:0]  cleft;      // MATCH: bits still to compare
  logic [15:0] cword;      // MATCH: memory word, current bit in the MSB
  logic [MASK_MAX-1:0] cval;

  // preamble symbols
  function automatic sym_e pre_sym(logic miller_mode, logic [3:0] i);
    if (!miller_mode) begin
      unique case (i)
        4'd0: return SYM_DATA1; 4'd1: return SYM_DATA0; 4'd2: return SYM_DATA1;
        4'd3: return SYM_DATA0; 4'd4: return SYM_VIOL;  default: return SYM_DATA1;
      endcase
    end else begin
      unique case (i)
        4'd0, 4'd1, 4'd2, 4'd3: return SYM_PILOT;
        4'd4, 4'd6:             return SYM_DATA0;
        default:                return SYM_DATA1;
      endcase
    end
  endfunction

  logic [3:0] pre_len;
  assign pre_len = (params.miller == 2'd0) ? 4'd6 : 4'd10;

  always_comb begin
    sym_valid = 1'b0;
    sym       = SYM_DATA0;
    unique case (ph)
      P_PRE:   begin sym_valid = en; sym = pre_sym(params.miller != 2'd0, pidx); end
      P_SHIFT: begin sym_valid = en; sym = shreg[15] ? SYM_DATA1 : SYM_DATA0; end
      P_END:   begin sym_valid = en; sym = SYM_DATA1; end
      default: ;
    endcase
  end
  assign accept  = sym_valid && sym_ready;
  assign crc_en  = accept && ph == P_SHIFT && crc_on;
  assign total   = sum + (ADC_BITS+3)'(adc_dout);

  crc16 u_crc (.clk, .rst, .clr(crc_clr), .en_pulse(crc_en), .bit_in(shreg[15]), .crc);

  always_ff @(posedge clk) begin
    crc_clr <= 1'b0;
    ee_req  <= 1'b0;
    ee_we   <= 1'b0;
    if (rst) begin
      ph            <= P_IDLE;
      after         <= P_IDLE;
      shreg         <= '0;
      nleft         <= '0;
      pidx          <= '0;
      words_left    <= '0;
      first_word    <= 1'b0;
      crc_on        <= 1'b0;
      nsamp         <= '0;
      sum           <= '0;
      average       <= '0;
      adc_powerdown <= 1'b1;
      ee_addr       <= '0;
      ee_wdata      <= '0;
      end_transfer  <= 1'b0;
      match         <= 1'b0;
      cbit          <= '0;
      cleft         <= '0;
      cword         <= '0;
      cval          <= '0;
    end else if (order == ORD_NONE) begin
      end_transfer  <= 1'b0;
      adc_powerdown <= 1'b1;
      ph            <= P_IDLE;
    end else if (en) begin
      unique case (ph)
        P_IDLE: if (!end_transfer) begin
          crc_clr <= 1'b1;
          crc_on  <= 1'b0;
          pidx    <= '0;
          unique case (order)
            ORD_SENSE: begin
              ph            <= P_ADC;
              adc_powerdown <= 1'b0;
              nsamp         <= '0;
              sum           <= '0;
              ee_addr       <= AW'({params.membank, params.wordptr[AW-3:0]});
            end
            ORD_WRITE: begin
              ph       <= P_EEW;
              ee_addr  <= AW'({params.membank, params.wordptr[AW-3:0]});
              ee_wdata <= params.wdata;
            end
            ORD_MATCH, ORD_AUTH: begin
              cbit  <= 9'(params.cmp_ptr);
              cleft <= params.cmp_len;
              cval  <= params.cmp_val;
              match <= 1'b1;
              ph    <= (params.cmp_len == 8'd0) ? P_CEND : P_CRD;   // an empty mask matches
            end
            default: ph <= P_PRE;
          endcase
        end
        P_CRD: if (cbit >= 9'(16 * WORDS_PER_BANK)) begin
          match <= 1'b0;
          ph    <= P_CEND;
        end else begin
          ee_addr <= AW'({params.membank, (AW-2)'(cbit >> 4)});
          ee_req  <= 1'b1;
          ph      <= P_CRW;
        end
        P_CRW: if (!ee_req) begin
          cword <= ee_rdata << cbit[3:0];
          ph    <= P_CBIT;
        end
        P_CBIT: begin
          cword <= cword << 1;
          cval  <= cval << 1;
          cbit  <= cbit + 1'b1;
          cleft <= cleft - 1'b1;
          if (cword[15] != cval[MASK_MAX-1] || cleft == 8'd1) begin
            if (cword[15] != cval[MASK_MAX-1]) match <= 1'b0;
            ph <= P_CEND;
          end else if (cbit[3:0] == 4'd15) ph <= P_CRD;
        end
        P_CEND: if (order == ORD_AUTH && (match || params.auth_always)) ph <= P_PRE;   // reply
        else begin
          ph           <= P_DONE;
          end_transfer <= 1'b1;
        end
        P_ADC: if (adc_data_ready) begin
          sum   <= total;
          nsamp <= nsamp + 1'b1;
          if (nsamp == 3'(ADC_SAMPLES - 1)) begin
            adc_powerdown <= 1'b1;
            average       <= ADC_BITS'(total / (ADC_BITS+3)'(ADC_SAMPLES));
            ee_wdata      <= 16'(total / (ADC_BITS+3)'(ADC_SAMPLES));
            ph            <= P_EEW;
          end
        end
        P_EEW: begin
          ee_req <= 1'b1;
          ee_we  <= 1'b1;
          ph     <= P_EEWAIT;
        end
        P_EEWAIT: if (!ee_busy && !ee_req) ph <= P_PRE;
        P_PRE: if (accept) begin
          pidx <= pidx + 1'b1;
          if (pidx == pre_len - 1'b1) begin
            unique case (order)
              ORD_RN16: begin
                shreg <= params.rn; nleft <= 5'd16; after <= P_END; ph <= P_SHIFT;
              end
              ORD_EPC: begin
                crc_on     <= 1'b1;
                first_word <= 1'b1;
                words_left <= 8'd1;
                ee_addr    <= AW'(WORDS_PER_BANK + 1);   // PC word of the EPC bank
                ph         <= P_RD;
              end
              ORD_HANDLE: begin
                crc_on <= 1'b1; shreg <= params.rn; nleft <= 5'd16; after <= P_CRC; ph <= P_SHIFT;
              end
              ORD_AUTH: begin
                crc_on <= 1'b1;
                if (params.auth_hdr) begin
                  shreg <= 16'h0000; nleft <= 5'd1; after <= P_RN; ph <= P_SHIFT;
                end else begin
                  shreg <= params.rn; nleft <= 5'd16; after <= P_CRC; ph <= P_SHIFT;
                end
              end
              ORD_READ: begin
                crc_on     <= 1'b1;
                shreg      <= 16'h0000;  nleft <= 5'd1;  after <= P_RD; ph <= P_SHIFT;
                first_word <= 1'b0;
                words_left <= params.wordcount;
                ee_addr    <= AW'({params.membank, params.wordptr[AW-3:0]});
              end
              ORD_ERROR: begin
                crc_on <= 1'b1; shreg <= 16'h8000; nleft <= 5'd1; after <= P_ERRC; ph <= P_SHIFT;
              end
              default: begin   // WRITE, SENSE
                crc_on <= 1'b1; shreg <= 16'h0000; nleft <= 5'd1; after <= P_RN; ph <= P_SHIFT;
              end
            endcase
          end
        end
        P_SHIFT: if (accept) begin
          shreg <= shreg << 1;
          nleft <= nleft - 1'b1;
          if (nleft == 5'd1) ph <= after;
        end
        P_RD: begin
          ee_req <= 1'b1;
          ph     <= P_RDW;
        end
        P_RDW: if (!ee_req) begin
          shreg      <= ee_rdata;
          nleft      <= 5'd16;
          ph         <= P_SHIFT;
          ee_addr    <= ee_addr + 1'b1;
          first_word <= 1'b0;
          if (first_word) begin
            // the PC word gives the EPC length in words
            words_left <= ee_rdata[15:11] > 5'(WORDS_PER_BANK - 2) ? 8'(WORDS_PER_BANK - 2) : 8'(ee_rdata[15:11]);
            after      <= (ee_rdata[15:11] == 5'd0) ? P_CRC : P_RD;
          end else begin
            words_left <= words_left - 1'b1;
            after      <= (words_left > 8'd1) ? P_RD : (order == ORD_EPC ? P_CRC : P_RN);
          end
        end
        P_RN:   begin shreg <= params.rn; nleft <= 5'd16; after <= P_CRC; ph <= P_SHIFT; end
        P_ERRC: begin shreg <= {params.errcode, 8'h00}; nleft <= 5'd8; after <= P_RN; ph <= P_SHIFT; end
        P_CRC:  begin shreg <= ~crc; nleft <= 5'd16; crc_on <= 1'b0; after <= P_END; ph <= P_SHIFT; end
        P_END:  if (accept) ph <= P_WAIT;
        P_WAIT: if (!tx_busy) begin
          ph           <= P_DONE;
          end_transfer <= 1'b1;
        end
        P_DONE: ;
        default: ph <= P_IDLE;
      endcase
    end
  end
endmodule
