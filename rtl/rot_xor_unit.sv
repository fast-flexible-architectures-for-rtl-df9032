// rot_xor_unit: rotate unit of the cipher instruction-set extensions for a
// 64-bit general-purpose core.
//   ROL/ROR   y = a rotated left/right by b[5:0]           (register amount)
//   ROLX/RORX y = (a rotated by the constant rot) ^ b      (b is the old dest)
// With w32 set the low 32 bits are rotated (amount mod 32) and the result is
// zero-extended. Purely combinational: one ALU cycle. The operations follow
// the document; the 32-bit result format is this design's choice.
module rot_xor_unit #(
  parameter int XLEN = 64
) (
  input  logic [1:0]      op,     // 0 ROL, 1 ROR, 2 ROLX, 3 RORX
  input  logic            w32,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [5:0]      rot,
  output logic [XLEN-1:0] y
);
  logic [5:0]      amt;
  logic            left;
  logic [XLEN-1:0] r64;
  logic [31:0]     r32;
  always_comb begin
    amt  = op[1] ? rot : b[5:0];
    left = !op[0];
    if (left) begin
      r64 = (a << amt) | (a >> (7'(XLEN) - {1'b0, amt}));
      r32 = (a[31:0] << amt[4:0]) | (a[31:0] >> (6'd32 - {1'b0, amt[4:0]}));
    end else begin
      r64 = (a >> amt) | (a << (7'(XLEN) - {1'b0, amt}));
      r32 = (a[31:0] >> amt[4:0]) | (a[31:0] << (6'd32 - {1'b0, amt[4:0]}));
    end
    y = w32 ? XLEN'(r32) : r64;
    if (op[1]) y = y ^ b;
  end
endmodule
