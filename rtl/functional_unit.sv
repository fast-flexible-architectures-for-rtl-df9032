// functional_unit: one CryptoManiac functional unit, built as
// logic -> arithmetic -> logic so that two dependent operations complete in
// one cycle (instruction combining). For an instruction rd = OP2(OP1(a,b),c):
//   * pre logical unit : OP1 when it is tiny (XOR, AND, INC, SIGNEXT)
//   * short unit       : adder, rotator (barrel shifter) and SBOX cache read;
//                        takes (a,b) when OP1 is short, else (pre, c) when
//                        OP2 is short
//   * post logical unit: OP2 when it is tiny, applied to (short/pre result, c)
//   * long unit        : MUL/MULMOD, only when HAS_MUL (two of the four units)
// This gives the short-tiny, tiny-short, tiny-tiny and long-nop pairs. A
// NOP first operation passes a. SBOX indexes the unit's own 1 KB table with
// byte bsel of its input, so the VLIW slot picks the table. The result y is
// combinational except for long operations, which signal long_done after
// MUL_LAT cycles. The unit structure follows the document; SIGNEXT from
// bit 7, the rotate amount taken from bits [4:0] and the slot-owned table
// are this design's choices. The SBOX write and context ports pass through
// to the table.
// In units built without a multiplier (HAS_MUL = 0) rst_n and long_start
// are not used.
module functional_unit
  import cm_pkg::*;
#(
  parameter bit HAS_MUL = 1'b1,
  parameter int MUL_LAT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  op1,
  input  logic [3:0]  op2,
  input  logic [1:0]  bsel,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  input  logic        long_start,   // hold while the long operation runs
  output logic        long_done,
  output logic [31:0] y,
  // SBOX table write and context read
  input  logic        sbox_we,
  input  logic [7:0]  sbox_waddr,
  input  logic [31:0] sbox_wdata,
  input  logic [7:0]  sbox_cidx,
  output logic [31:0] sbox_crdata
);
  op_class_e c1, c2;
  logic [31:0] pre, sx, sy, sres, post, sbox_q, long_y;
  logic [3:0]  sop;
  logic [7:0]  sidx;

  function automatic logic [31:0] tiny_f(logic [3:0] op, logic [31:0] x, logic [31:0] z);
    case (op)
      OP_XOR:  return x ^ z;
      OP_AND:  return x & z;
      OP_INC:  return x + 32'd1;
      OP_SEXT: return {{24{x[7]}}, x[7:0]};
      default: return x;
    endcase
  endfunction

  assign c1 = op_class(op1);
  assign c2 = op_class(op2);

  always_comb begin
    pre  = (c1 == CLS_TINY) ? tiny_f(op1, a, b) : a;
    sx   = (c1 == CLS_SHORT) ? a : pre;
    sy   = (c1 == CLS_SHORT) ? b : c;
    sop  = (c1 == CLS_SHORT) ? op1 : ((c2 == CLS_SHORT && c1 != CLS_LONG) ? op2 : OP_NOP);
    sidx = sx[8*bsel +: 8];
    case (sop)
      OP_ADD:  sres = sx + sy;
      OP_ROL:  sres = (sx << sy[4:0]) | (sx >> (6'd32 - {1'b0, sy[4:0]}));
      OP_ROR:  sres = (sx >> sy[4:0]) | (sx << (6'd32 - {1'b0, sy[4:0]}));
      OP_SBOX: sres = sbox_q;
      default: sres = sx;
    endcase
    post = (c2 == CLS_TINY && c1 != CLS_LONG) ? tiny_f(op2, sres, c) : sres;
    y    = (c1 == CLS_LONG && HAS_MUL) ? long_y : post;
  end

  sbox_cache #(.ENTRIES(256), .DW(32)) u_sbox (
    .clk, .idx(sidx), .rdata(sbox_q), .cidx(sbox_cidx), .crdata(sbox_crdata),
    .we(sbox_we), .waddr(sbox_waddr), .wdata(sbox_wdata));

  if (HAS_MUL) begin : g_mul
    long_unit #(.MUL_LAT(MUL_LAT)) u_long (
      .clk, .rst_n, .start(long_start), .mulmod(op1 == OP_MULMOD),
      .a, .b, .done(long_done), .y(long_y));
  end else begin : g_nomul
    assign long_done = 1'b1;
    assign long_y    = '0;
  end
endmodule
