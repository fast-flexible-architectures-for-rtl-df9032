// xbox_unit: partial general permutation (XBOX) of the cipher instruction-set
// extensions. map holds eight 6-bit indices; destination byte bsel receives,
// in bit j, source bit map[6j+5:6j]. All other destination bytes are zero,
// so a full 64-bit permutation takes eight XBOX operations ORed together.
// Combinational. Function from the document.
module xbox_unit (
  input  logic [2:0]  bsel,
  input  logic [63:0] src,
  input  logic [63:0] map,
  output logic [63:0] y
);
  always_comb begin
    y = '0;
    for (int j = 0; j < 8; j++)
      y[8*bsel + 3'(j)] = src[map[6*j +: 6]];
  end
endmodule
