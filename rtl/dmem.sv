// dmem: CryptoManiac data SRAM, 4 KB as 1024 words of 32 bits, word
// addressed. Port A serves loads and stores of the memory slot: the read is
// combinational so a load completes in the execute/memory stage like any
// other operation, and a store is written at the clock edge. Port B serves
// the keystore context transfer (combinational read, clocked write) while
// the processing element is idle. When both write the same cycle, port A is
// applied last. Size from the document; port structure is this design's.
module dmem #(
  parameter int WORDS = 1024,
  parameter int DW    = 32,
  localparam int AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  output logic [DW-1:0] a_rdata,
  input  logic          a_we,
  input  logic [DW-1:0] a_wdata,
  input  logic [AW-1:0] b_addr,
  output logic [DW-1:0] b_rdata,
  input  logic          b_we,
  input  logic [DW-1:0] b_wdata
);
  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
  end

  assign a_rdata = mem[a_addr];
  assign b_rdata = mem[b_addr];
endmodule
