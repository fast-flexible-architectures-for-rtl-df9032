// regfile: CryptoManiac register file. Every one of the WIDTH instructions
// of a bundle reads three operands and writes one result, so the array has
// 3*WIDTH read ports and WIDTH write ports (12R/4W for the 4-wide machine),
// as the document requires for instruction combining.
// Reads are combinational and see a write made in the same cycle
// (write-through), so the decode stage needs no separate forwarding from
// write-back. If two slots write one register in the same cycle the highest
// slot wins. Register count (32) and the write-through/priority rules are
// this design's choices. No reset: software initialises what it reads.
module regfile #(
  parameter int NREGS = 32,
  parameter int DW    = 32,
  parameter int NR    = 12,
  parameter int NW    = 4,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic                   clk,
  input  logic [NR-1:0][AW-1:0]  raddr,
  output logic [NR-1:0][DW-1:0]  rdata,
  input  logic [NW-1:0]          we,
  input  logic [NW-1:0][AW-1:0]  waddr,
  input  logic [NW-1:0][DW-1:0]  wdata
);
  logic [DW-1:0] regs [NREGS];

  always_ff @(posedge clk)
    for (int w = 0; w < NW; w++)
      if (we[w]) regs[waddr[w]] <= wdata[w];

  always_comb
    for (int r = 0; r < NR; r++) begin
      rdata[r] = regs[raddr[r]];
      for (int w = 0; w < NW; w++)
        if (we[w] && waddr[w] == raddr[r]) rdata[r] = wdata[w];
    end
endmodule
