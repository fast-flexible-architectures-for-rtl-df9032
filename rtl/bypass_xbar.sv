// bypass_xbar: full-crossbar operand bypass of the CryptoManiac execute
// stage. Each of the NOPND operand inputs of the functional units (three per
// slot) compares its source register with the destinations of all WIDTH
// results of the previous bundle (the EX/WB latch) and takes the matching
// result, else the register-file value read in decode. Any unit can feed
// any other, the full crossbar the document chose over a half crossbar.
// Purely combinational. With several matching writers the highest slot wins,
// the same rule as the register file.
module bypass_xbar #(
  parameter int WIDTH = 4,
  parameter int NOPND = 12,
  parameter int DW    = 32,
  parameter int AW    = 5
) (
  input  logic [NOPND-1:0][AW-1:0] src,
  input  logic [NOPND-1:0][DW-1:0] rf_data,
  input  logic [WIDTH-1:0]         wb_we,
  input  logic [WIDTH-1:0][AW-1:0] wb_rd,
  input  logic [WIDTH-1:0][DW-1:0] wb_data,
  output logic [NOPND-1:0][DW-1:0] opnd,
  output logic [NOPND-1:0]         fwd      // operand was bypassed
);
  always_comb
    for (int o = 0; o < NOPND; o++) begin
      opnd[o] = rf_data[o];
      fwd[o]  = 1'b0;
      for (int s = 0; s < WIDTH; s++)
        if (wb_we[s] && wb_rd[s] == src[o]) begin
          opnd[o] = wb_data[s];
          fwd[o]  = 1'b1;
        end
    end
endmodule
