// cm_pkg: types and constants shared by the CryptoManiac processing element
// and its system wrapper.
//
// Instruction word (32 bits), one of four in a VLIW bundle:
//   [31:28] first operation   [27:24] second operation
//   [23:19] rd  [18:14] ra  [13:9] rb  [8:4] rc  [1:0] SBOX byte select
// A combined instruction computes rd = OP2(OP1(ra, rb), rc). The operation
// classes (tiny, short, long) and the legal pairs (short-tiny, tiny-short,
// tiny-tiny, long-nop) follow the CryptoManiac instruction set; the numeric
// encoding is this design's own.
// When the first operation is OP_SPECIAL the second field is a special_e
// sub-operation (memory, control, mailbox), with a sign-extended 9-bit
// immediate in [8:0] (or 19 bits in [18:0] for SP_LDI). That class is this
// design's addition: the published instruction set lists only the ALU pairs.
package cm_pkg;

  localparam int XLEN    = 32;
  localparam int WIDTH   = 4;     // instructions per bundle
  localparam int NREGS   = 32;
  localparam int RW      = $clog2(NREGS);
  localparam int CODE_W  = 3;     // request code width
  localparam int TAG_W   = 8;     // request tag width
  localparam int NUM_SESS = 8;    // sessions held by the keystore
  localparam int SESS_W  = $clog2(NUM_SESS);
  localparam int VEC_BASE = 8;    // RECV jumps to bundle VEC_BASE + code
  localparam int PC_W    = 6;     // 64 bundles = 1 KB of instruction memory
  localparam int MEM_SLOT = 0;    // slot that may load and store
  localparam int BR_SLOT  = 3;    // slot that may branch, RECV and SEND

  // keystore context layout: 4 SBOX tables of 256 words, then 256 key words
  localparam int SBOX_WORDS = 256;
  localparam int KEY_WORDS  = 256;
  localparam int CTX_WORDS  = WIDTH * SBOX_WORDS + KEY_WORDS;   // 1280 = 5 KB
  localparam int CTX_AW     = $clog2(CTX_WORDS);

  // request codes
  localparam logic [CODE_W-1:0] RQ_CREATE  = 3'd0;
  localparam logic [CODE_W-1:0] RQ_DELETE  = 3'd1;
  localparam logic [CODE_W-1:0] RQ_ENCRYPT = 3'd2;
  localparam logic [CODE_W-1:0] RQ_DECRYPT = 3'd3;

  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,
    OP_XOR     = 4'd1,   // tiny
    OP_AND     = 4'd2,   // tiny
    OP_INC     = 4'd3,   // tiny
    OP_SEXT    = 4'd4,   // tiny: sign-extend bit 7
    OP_ADD     = 4'd5,   // short
    OP_ROL     = 4'd6,   // short
    OP_ROR     = 4'd7,   // short
    OP_SBOX    = 4'd8,   // short: own-slot table, byte selected by [1:0]
    OP_MUL     = 4'd9,   // long: low 32 bits of a*b
    OP_MULMOD  = 4'd10,  // long: a*b mod 0x10001 on 16-bit operands
    OP_SPECIAL = 4'd15
  } op_e;

  typedef enum logic [3:0] {
    SP_LD   = 4'd0,   // rd = dmem[ra + imm9]                 (slot 0)
    SP_ST   = 4'd1,   // dmem[ra + imm9] = rb                 (slot 0)
    SP_LDI  = 4'd2,   // rd = sext(imm19)
    SP_BEQZ = 4'd3,   // if (ra == 0) pc = imm9               (slot 3)
    SP_BNEZ = 4'd4,   // if (ra != 0) pc = imm9               (slot 3)
    SP_JMP  = 4'd5,   // pc = imm9                            (slot 3)
    SP_SBW  = 4'd6,   // own SBOX table[ra[7:0]] = rb
    SP_RECV = 4'd7,   // wait for a request, pc = VEC_BASE+code (slot 3)
    SP_RQR  = 4'd8,   // rd = request field imm[2:0]
    SP_RSW  = 4'd9,   // result word imm[1:0] = ra
    SP_SEND = 4'd10   // push result to the output queue      (slot 3)
  } special_e;

  typedef enum logic [1:0] {CLS_NONE, CLS_TINY, CLS_SHORT, CLS_LONG} op_class_e;

  function automatic op_class_e op_class(logic [3:0] op);
    case (op)
      OP_XOR, OP_AND, OP_INC, OP_SEXT:    return CLS_TINY;
      OP_ADD, OP_ROL, OP_ROR, OP_SBOX:    return CLS_SHORT;
      OP_MUL, OP_MULMOD:                  return CLS_LONG;
      default:                            return CLS_NONE;
    endcase
  endfunction

  typedef struct packed {
    logic [3:0]    op1;
    logic [3:0]    op2;
    logic [RW-1:0] rd;
    logic [RW-1:0] ra;
    logic [RW-1:0] rb;
    logic [RW-1:0] rc;
    logic [1:0]    rsv;
    logic [1:0]    bsel;
  } instr_t;

  typedef logic [WIDTH*XLEN-1:0] bundle_t;

  typedef struct packed {
    logic [TAG_W-1:0]   tag;
    logic [SESS_W-1:0]  sess;
    logic [CODE_W-1:0]  code;
    logic [3:0][XLEN-1:0] data;
  } request_t;

  typedef struct packed {
    logic [TAG_W-1:0]   tag;
    logic [SESS_W-1:0]  sess;
    logic [3:0][XLEN-1:0] data;
  } response_t;

  // 16-bit multiply modulo 2^16+1, 0 standing for 2^16 (IDEA convention)
  function automatic logic [15:0] mulmod16(logic [15:0] a, logic [15:0] b);
    logic [31:0] p;
    logic [15:0] lo, hi;
    if (a == 16'd0)      return 16'(17'd1 - {1'b0, b});
    else if (b == 16'd0) return 16'(17'd1 - {1'b0, a});
    p  = a * b;
    lo = p[15:0];
    hi = p[31:16];
    return (lo >= hi) ? 16'(lo - hi) : 16'(lo - hi + 16'd1);
  endfunction

endpackage
