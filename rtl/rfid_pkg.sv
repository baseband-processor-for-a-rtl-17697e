// rfid_pkg: types and constants shared by the blocks of the Gen2 baseband processor.
// Command identifiers (cmd_ID, 4 bits), action orders (order_out, 5 bits), tag states and the
// record of reply parameters that the core hands to the transmit controller. The command set
// and the field layouts follow the EPC Class-1 Gen2 air interface; the numeric encodings of
// cmd_ID and order_out are this design's own.
package rfid_pkg;

  localparam int CNT_W = 10;   // width of cycle counters for PIE symbols (up to 1023 master cycles)

  typedef enum logic [3:0] {
    CMD_NONE        = 4'd0,
    CMD_QUERYREP    = 4'd1,
    CMD_ACK         = 4'd2,
    CMD_QUERY       = 4'd3,
    CMD_QUERYADJUST = 4'd4,
    CMD_SELECT      = 4'd5,
    CMD_NAK         = 4'd6,
    CMD_REQ_RN      = 4'd7,
    CMD_READ        = 4'd8,
    CMD_WRITE       = 4'd9,
    CMD_KILL        = 4'd10,
    CMD_LOCK        = 4'd11,
    CMD_ACCESS      = 4'd12,
    CMD_UNKNOWN     = 4'd15
  } cmd_e;

  // Actions of the transmit controller (A1..A7, plus two compares); zero means "nothing to do".
  typedef enum logic [4:0] {
    ORD_NONE   = 5'd0,
    ORD_RN16   = 5'd1,  // A1: backscatter a bare RN16 (Query/QueryRep/QueryAdjust)
    ORD_EPC    = 5'd2,  // A2: PC + EPC + CRC-16 (ACK)
    ORD_HANDLE = 5'd3,  // A3: RN16/handle + CRC-16 (Req_RN)
    ORD_READ   = 5'd4,  // A4: header, memory words, handle, CRC-16 (Read)
    ORD_WRITE  = 5'd5,  // A5: write a word, then header, handle, CRC-16 (Write)
    ORD_SENSE  = 5'd6,  // A6: ADC acquisition, average, write, reply (Write to User bank)
    ORD_ERROR  = 5'd7,  // A7: error header, code, handle, CRC-16
    ORD_MATCH  = 5'd8,  // memory compare for Select, no reply (this design's addition)
    ORD_AUTH   = 5'd9   // password compare (Access, Kill, Req_RN probe) or Lock reply (this design's)
  } order_e;

  localparam int MASK_MAX = 96;   // longest Select mask compared bit by bit (a 96-bit EPC)

  typedef enum logic [2:0] {
    ST_READY, ST_ARBITRATE, ST_REPLY, ST_ACKNOWLEDGED, ST_OPEN, ST_SECURED, ST_KILLED
  } tag_state_e;

  // Symbols handed to the backscatter encoder.
  typedef enum logic [1:0] {
    SYM_DATA0 = 2'd0,
    SYM_DATA1 = 2'd1,
    SYM_VIOL  = 2'd2,   // FM0 preamble violation
    SYM_PILOT = 2'd3    // Miller pilot bit (a '0' without data meaning)
  } sym_e;

  // Parameters of a reply, gathered by the core from the Stack.
  typedef struct packed {
    logic        dr;          // 0: DR = 8, 1: DR = 64/3
    logic [1:0]  miller;      // 0: FM0, 1: M=2, 2: M=4, 3: M=8
    logic [15:0] rn;          // RN16 or handle to send
    logic [1:0]  membank;
    logic [7:0]  wordptr;
    logic [7:0]  wordcount;
    logic [15:0] wdata;       // decovered write data
    logic [7:0]  errcode;
    logic [7:0]  cmp_ptr;     // Select/AUTH: first bit address in the bank
    logic [7:0]  cmp_len;     // Select/AUTH: compare length in bits (at most MASK_MAX)
    logic [MASK_MAX-1:0] cmp_val;  // Select: mask, first bit in the MSB
    logic        auth_hdr;    // AUTH: reply with header 0 (final Kill step, Lock) instead of a bare handle
    logic        auth_always; // AUTH: reply whatever the compare result (Req_RN password probe)
  } tx_params_t;

  // CRC-16 residue over a frame that includes its (complemented) CRC-16.
  localparam logic [15:0] CRC16_RESIDUE = 16'h1D0F;

endpackage
