// fsm_core: the tag's protocol state machine (Gen2 states Ready, Arbitrate, Reply, Acknowledged,
// Open, Secured, Killed).
// When the receive phase ends (start), the core copies the command's fields from the Stack into
// local registers, one per cycle (NFLD of them), then evaluates the command against the tag
// state: inventory commands (Query, QueryRep, QueryAdjust) run the slot counter with Q and the
// per-session inventoried flags; ACK, NAK, Req_RN, Read and Write follow the Gen2 transitions
// with RN16 and handle checks. If a reply or memory action is needed it drives a non-zero order
// (order_out: one of the seven actions A1..A7, or a memory compare) with the reply parameters and
// waits, disabled by the timing unit, until the transmit controller reports end_transfer; it then
// drops the order, checks whether the outcome (the match input, for compares) changes its state,
// and raises end_core. Without an order it raises
// end_core at once. A command whose CRC fails is ignored.
// Select sends the tag to Ready and orders a memory compare (ORD_MATCH) of its mask; once the
// compare is done, the Select action (Gen2 table of eight actions on matching and non-matching
// tags) is applied to the SL flag or to the inventoried flag of the chosen session. The mask is
// read from the six Stack registers after Length, so only the first MASK_MAX (96) bits of a
// longer mask are compared; Truncate is ignored.
// Access and Kill (Open or Secured, right handle) each take two commands carrying the 32-bit
// password in halves, each half covered (XOR) with the latest RN16. The core orders a compare of
// the decovered half with its Reserved-bank word (ORD_AUTH: kill password at bits 0..31, access
// password at bits 32..63); the transmit side replies with the handle only on a match. A wrong
// half sends the tag to Arbitrate. The second Access half leads to Secured; the second Kill half
// leads to Killed, except with an all-zero kill password, which gets an error reply (code 00).
// A half-done sequence is dropped by any command other than itself or Req_RN.
// Req_RN in Acknowledged orders a compare of the access password with zero (always replying with
// the new handle) and moves to Secured if the password is zero, to Open otherwise.
// Lock (Secured, right handle) updates ten lock bits: for the kill password, access password,
// EPC, TID and User fields, a pwd-write (pwd-read/write) bit and a permalock bit, changed where
// the mask is set. A change to a permalocked field is refused with error 04. Write to a locked
// field, or Read of a locked password, gives error 04 unless the tag is Secured and the field is
// not permalocked. The lock bits are held here in registers, so they do not survive a reset.
// The role of the block and the order/end_transfer/end_core sequence follow the document; the
// protocol details come from the Gen2 standard in simplified form (no persistence timers).
// All work happens in cycles where en (clk_core) is high.
module fsm_core
  import rfid_pkg::*;
#(
  parameter int WORDS_PER_BANK = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        start,
  input  cmd_e        cmd_id,
  input  logic        crc_valid,
  output logic [3:0]  st_raddr,
  input  logic [15:0] st_rdata,
  input  logic [15:0] rng,
  input  logic        end_transfer,
  input  logic        match,
  output order_e      order_out,
  output tx_params_t  params,
  output logic        end_core,
  output tag_state_e  tag_state
);
  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_EVAL, C_WAIT, C_POST} cstate_e;
  cstate_e     cs;
  localparam int NMASK = MASK_MAX / 16;   // Stack registers holding a Select mask
  localparam int NFLD  = 5 + NMASK;       // fields copied from the Stack
  logic [15:0] fld [NFLD];
  logic [3:0]  q;
  logic [15:0] slot;
  logic [1:0]  session;
  logic [3:0]  inv;        // inventoried flag per session (0 = A, 1 = B)
  logic        sl;
  logic [15:0] rn16, handle;
  logic        query_match;
  logic [8:0]  last_word;
  logic        sel_pend;   // a Select waits for its compare result
  logic        acc_pend, kill_pend;   // an Access / Kill half waits for its compare result
  logic        acc_half, kill_half;   // first password half accepted
  logic        kill_zero;             // the accepted first Kill half was zero
  logic [15:0] pwd;                   // decovered password half
  logic        req_pend;              // Req_RN waits for the access-password probe
  logic [9:0]  lockb;                 // lock bits: kill, access, EPC, TID, User; (pwd, perma) each
  logic [9:0]  lock_new;
  logic        perma_viol, mem_locked;
  logic [8:0]  rd_end;
  logic [1:0]  sel_op;     // what the Select does to its target flag
  logic [MASK_MAX-1:0] mk;

  assign last_word = 9'(fld[1][7:0]) + 9'(fld[2][7:0]);
  // Select mask, left-aligned: the last Stack piece holds its bits right-aligned.
  always_comb begin
    mk = '0;
    for (int k = 0; k < NMASK; k++) begin
      if (9'(fld[4][7:0]) >= 9'(16 * (k + 1)))
        mk[MASK_MAX-1-16*k -: 16] = fld[5+k];
      else if (9'(fld[4][7:0]) > 9'(16 * k))
        mk[MASK_MAX-1-16*k -: 16] = fld[5+k] << (5'd16 - 5'(fld[4][3:0]));
    end
  end
  assign sel_op = select_op(fld[1][2:0], match);
  assign pwd    = fld[0] ^ rn16;

  // Lock payload: mask in field 0, action in field 1, both ordered kill, access, EPC, TID, User.
  assign lock_new = (lockb & ~fld[0][9:0]) | (fld[1][9:0] & fld[0][9:0]);
  always_comb begin
    perma_viol = 1'b0;
    for (int i = 0; i < 5; i++)
      if (lockb[2*i] && lock_new[2*i+1 -: 2] != lockb[2*i+1 -: 2]) perma_viol = 1'b1;
  end
  // Access rights of a Read or Write (field 0 bank, field 1 word pointer, field 2 count)
  assign rd_end = (fld[2][7:0] == 8'd0) ? 9'(WORDS_PER_BANK) : last_word;
  always_comb begin
    mem_locked = 1'b0;
    if (cmd_id == CMD_WRITE) begin
      unique case (fld[0][1:0])
        2'd0:    if (fld[1][7:0] <= 8'd1)      mem_locked = denied(lockb[9:8], tag_state);
                 else if (fld[1][7:0] <= 8'd3) mem_locked = denied(lockb[7:6], tag_state);
        2'd1:    mem_locked = denied(lockb[5:4], tag_state);
        2'd2:    mem_locked = denied(lockb[3:2], tag_state);
        default: mem_locked = denied(lockb[1:0], tag_state);
      endcase
    end else if (fld[0][1:0] == 2'd0) begin
      if (fld[1][7:0] <= 8'd1 && denied(lockb[9:8], tag_state)) mem_locked = 1'b1;
      if (fld[1][7:0] <= 8'd3 && rd_end > 9'd2 && denied(lockb[7:6], tag_state)) mem_locked = 1'b1;
    end
  end

  assign query_match = (fld[3][1] ? (sl == fld[3][0]) : 1'b1) && (inv[fld[4][1:0]] == fld[5][0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      cs        <= C_IDLE;
      st_raddr  <= '0;
      q         <= '0;
      slot      <= '0;
      session   <= '0;
      inv       <= '0;
      sl        <= 1'b0;
      rn16      <= '0;
      handle    <= '0;
      order_out <= ORD_NONE;
      params    <= '0;
      end_core  <= 1'b0;
      tag_state <= ST_READY;
      sel_pend  <= 1'b0;
      acc_pend  <= 1'b0;
      kill_pend <= 1'b0;
      acc_half  <= 1'b0;
      kill_half <= 1'b0;
      kill_zero <= 1'b0;
      req_pend  <= 1'b0;
      lockb     <= '0;
      for (int i = 0; i < NFLD; i++) fld[i] <= '0;
    end else if (en) begin
      end_core <= 1'b0;
      unique case (cs)
        C_IDLE: if (start) begin
                  st_raddr <= '0;
                  cs       <= C_LOAD;
                end
        C_LOAD: begin
                  fld[st_raddr] <= st_rdata;
                  st_raddr <= st_raddr + 1'b1;
                  if (st_raddr == 4'(NFLD - 1)) cs <= C_EVAL;
                end
        C_EVAL: begin
                  cs <= C_POST;
                  if (crc_valid && tag_state != ST_KILLED) begin
                    if (cmd_id != CMD_ACCESS && cmd_id != CMD_REQ_RN) acc_half  <= 1'b0;
                    if (cmd_id != CMD_KILL   && cmd_id != CMD_REQ_RN) kill_half <= 1'b0;
                    unique case (cmd_id)
                      CMD_QUERY: begin
                        if ((tag_state == ST_ACKNOWLEDGED || tag_state == ST_OPEN ||
                             tag_state == ST_SECURED) && session == fld[4][1:0])
                          inv[session] <= ~inv[session];
                        params.dr     <= fld[0][0];
                        params.miller <= fld[1][1:0];
                        session       <= fld[4][1:0];
                        q             <= fld[6][3:0];
                        if (query_match) begin
                          slot <= rng & 16'((17'd1 << fld[6][3:0]) - 17'd1);
                          if ((rng & 16'((17'd1 << fld[6][3:0]) - 17'd1)) == 16'd0) begin
                            tag_state <= ST_REPLY;
                            rn16      <= {rng[7:0], rng[15:8]};
                            params.rn <= {rng[7:0], rng[15:8]};
                            order_out <= ORD_RN16;
                            cs        <= C_WAIT;
                          end else tag_state <= ST_ARBITRATE;
                        end else tag_state <= ST_READY;
                      end
                      CMD_QUERYREP, CMD_QUERYADJUST: if (fld[0][1:0] == session) begin
                        if (tag_state == ST_ACKNOWLEDGED || tag_state == ST_OPEN || tag_state == ST_SECURED) begin
                          inv[session] <= ~inv[session];
                          tag_state    <= ST_READY;
                        end else if (tag_state == ST_ARBITRATE || tag_state == ST_REPLY) begin
                          if (cmd_id == CMD_QUERYREP) begin
                            if (tag_state == ST_REPLY) tag_state <= ST_ARBITRATE;
                            else if (slot == 16'd1) begin
                              slot      <= '0;
                              tag_state <= ST_REPLY;
                              rn16      <= {rng[7:0], rng[15:8]};
                              params.rn <= {rng[7:0], rng[15:8]};
                              order_out <= ORD_RN16;
                              cs        <= C_WAIT;
                            end else slot <= slot - 1'b1;
                          end else begin
                            q    <= adj_q(q, fld[1][2:0]);
                            slot <= rng & 16'((17'd1 << adj_q(q, fld[1][2:0])) - 17'd1);
                            if ((rng & 16'((17'd1 << adj_q(q, fld[1][2:0])) - 17'd1)) == 16'd0) begin
                              tag_state <= ST_REPLY;
                              rn16      <= {rng[7:0], rng[15:8]};
                              params.rn <= {rng[7:0], rng[15:8]};
                              order_out <= ORD_RN16;
                              cs        <= C_WAIT;
                            end else tag_state <= ST_ARBITRATE;
                          end
                        end
                      end
                      CMD_ACK: begin
                        if (tag_state == ST_REPLY && fld[0] == rn16) begin
                          tag_state <= ST_ACKNOWLEDGED;
                          order_out <= ORD_EPC;
                          cs        <= C_WAIT;
                        end else if ((tag_state == ST_ACKNOWLEDGED && fld[0] == rn16) ||
                                     ((tag_state == ST_OPEN || tag_state == ST_SECURED) && fld[0] == handle)) begin
                          order_out <= ORD_EPC;
                          cs        <= C_WAIT;
                        end else if (tag_state != ST_READY) tag_state <= ST_ARBITRATE;
                      end
                      CMD_NAK: if (tag_state != ST_READY) tag_state <= ST_ARBITRATE;
                      CMD_REQ_RN: begin
                        if (tag_state == ST_ACKNOWLEDGED && fld[0] == rn16) begin
                          handle             <= rng;
                          params.rn          <= rng;
                          params.membank     <= 2'd0;
                          params.cmp_ptr     <= 8'd32;       // access password, both words
                          params.cmp_len     <= 8'd32;
                          params.cmp_val     <= '0;
                          params.auth_hdr    <= 1'b0;
                          params.auth_always <= 1'b1;
                          req_pend           <= 1'b1;
                          order_out          <= ORD_AUTH;
                          cs                 <= C_WAIT;
                        end else if ((tag_state == ST_OPEN || tag_state == ST_SECURED) && fld[0] == handle) begin
                          rn16      <= rng;
                          params.rn <= rng;
                          order_out <= ORD_HANDLE;
                          cs        <= C_WAIT;
                        end
                      end
                      CMD_READ, CMD_WRITE: begin
                        if ((tag_state == ST_OPEN || tag_state == ST_SECURED) && fld[3] == handle) begin
                          params.rn        <= handle;
                          params.membank   <= fld[0][1:0];
                          params.wordptr   <= fld[1][7:0];
                          params.wordcount <= (cmd_id == CMD_READ && fld[2][7:0] == 8'd0)
                                              ? 8'(WORDS_PER_BANK) - fld[1][7:0] : fld[2][7:0];
                          params.wdata     <= fld[2] ^ rn16;
                          cs               <= C_WAIT;
                          if (fld[1][7:0] >= 8'(WORDS_PER_BANK) ||
                              (cmd_id == CMD_READ && last_word > 9'(WORDS_PER_BANK))) begin
                            params.errcode <= 8'h03;   // memory overrun
                            order_out      <= ORD_ERROR;
                          end else if (mem_locked) begin
                            params.errcode <= 8'h04;   // memory locked
                            order_out      <= ORD_ERROR;
                          end else if (cmd_id == CMD_READ) order_out <= ORD_READ;
                          else if (fld[0][1:0] == 2'b11)  order_out <= ORD_SENSE;
                          else                            order_out <= ORD_WRITE;
                        end
                      end
                      CMD_SELECT: begin
                        tag_state       <= ST_READY;
                        params.membank  <= fld[2][1:0];
                        params.cmp_ptr  <= fld[3][7:0];
                        params.cmp_len  <= (fld[4][7:0] > 8'(MASK_MAX)) ? 8'(MASK_MAX) : fld[4][7:0];
                        params.cmp_val  <= mk;
                        sel_pend        <= 1'b1;
                        order_out       <= ORD_MATCH;
                        cs              <= C_WAIT;
                      end
                      CMD_ACCESS, CMD_KILL: begin
                        if ((tag_state == ST_OPEN || tag_state == ST_SECURED) &&
                            (cmd_id == CMD_ACCESS ? fld[1] : fld[2]) == handle) begin
                          params.rn       <= handle;
                          params.membank  <= 2'd0;
                          params.cmp_len  <= 8'd16;
                          params.cmp_val  <= {pwd, {(MASK_MAX-16){1'b0}}};
                          params.auth_hdr <= 1'b0;
                          params.auth_always <= 1'b0;
                          cs              <= C_WAIT;
                          if (cmd_id == CMD_ACCESS) begin
                            params.cmp_ptr <= acc_half ? 8'd48 : 8'd32;
                            acc_pend       <= 1'b1;
                            order_out      <= ORD_AUTH;
                          end else if (kill_half && kill_zero && pwd == 16'h0) begin
                            params.errcode <= 8'h00;   // zero kill password: refuse
                            kill_half      <= 1'b0;
                            order_out      <= ORD_ERROR;
                          end else begin
                            params.cmp_ptr  <= kill_half ? 8'd16 : 8'd0;
                            params.auth_hdr <= kill_half;
                            if (!kill_half) kill_zero <= (pwd == 16'h0);
                            kill_pend       <= 1'b1;
                            order_out       <= ORD_AUTH;
                          end
                        end
                      end
                      CMD_LOCK: if (tag_state == ST_SECURED && fld[2] == handle) begin
                        params.rn <= handle;
                        cs        <= C_WAIT;
                        if (perma_viol) begin
                          params.errcode <= 8'h04;
                          order_out      <= ORD_ERROR;
                        end else begin
                          lockb              <= lock_new;
                          params.cmp_len     <= 8'd0;    // empty compare: header 0, handle, CRC
                          params.auth_hdr    <= 1'b1;
                          params.auth_always <= 1'b0;
                          order_out          <= ORD_AUTH;
                        end
                      end
                      default: ;
                    endcase
                  end
                end
        C_WAIT: if (end_transfer) begin
                  order_out <= ORD_NONE;
                  cs        <= C_POST;
                end
        C_POST: begin
                  acc_pend  <= 1'b0;
                  kill_pend <= 1'b0;
                  req_pend  <= 1'b0;
                  if (req_pend) tag_state <= match ? ST_SECURED : ST_OPEN;
                  if ((acc_pend || kill_pend) && !match) begin   // wrong password half
                    acc_half  <= 1'b0;
                    kill_half <= 1'b0;
                    tag_state <= ST_ARBITRATE;
                  end else if (acc_pend) begin
                    acc_half <= !acc_half;
                    if (acc_half) tag_state <= ST_SECURED;
                  end else if (kill_pend) begin
                    kill_half <= !kill_half;
                    if (kill_half) tag_state <= ST_KILLED;
                  end
                  if (sel_pend) begin
                    sel_pend <= 1'b0;
                    if (fld[0][2] == 1'b0) begin           // inventoried flag of session fld[0][1:0]
                      if (sel_op == 2'd1)      inv[fld[0][1:0]] <= 1'b0;
                      else if (sel_op == 2'd2) inv[fld[0][1:0]] <= 1'b1;
                      else if (sel_op == 2'd3) inv[fld[0][1:0]] <= ~inv[fld[0][1:0]];
                    end else if (fld[0][1:0] == 2'b00) begin   // SL
                      if (sel_op == 2'd1)      sl <= 1'b1;
                      else if (sel_op == 2'd2) sl <= 1'b0;
                      else if (sel_op == 2'd3) sl <= ~sl;
                    end
                  end
                  end_core <= 1'b1;
                  cs       <= C_IDLE;
                end
        default: cs <= C_IDLE;
      endcase
    end
  end

  // Select action on the target flag: 0 none, 1 assert SL / set A, 2 deassert SL / set B, 3 negate.
  function automatic logic [1:0] select_op(logic [2:0] action, logic m);
    unique case (action)
      3'd0:    return m ? 2'd1 : 2'd2;
      3'd1:    return m ? 2'd1 : 2'd0;
      3'd2:    return m ? 2'd0 : 2'd2;
      3'd3:    return m ? 2'd3 : 2'd0;
      3'd4:    return m ? 2'd2 : 2'd1;
      3'd5:    return m ? 2'd2 : 2'd0;
      3'd6:    return m ? 2'd0 : 2'd1;
      default: return m ? 2'd0 : 2'd3;
    endcase
  endfunction

  // A locked field refuses access unless the tag is Secured and the field is not permalocked.
  function automatic logic denied(logic [1:0] lb, tag_state_e s);
    return lb[1] && (lb[0] || s != ST_SECURED);
  endfunction

  // QueryAdjust: UpDn 110 increments Q, 011 decrements it, anything else keeps it.
  function automatic logic [3:0] adj_q(logic [3:0] qv, logic [2:0] updn);
    if (updn == 3'b110 && qv != 4'd15) return qv + 1'b1;
    if (updn == 3'b011 && qv != 4'd0)  return qv - 1'b1;
    return qv;
  endfunction
endmodule
