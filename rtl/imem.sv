// imem: CryptoManiac instruction memory, 1 KB organised as 64 bundles of
// four 32-bit instructions (128 bits). The fetch stage presents a bundle
// address and the bundle is registered at the end of the cycle (synchronous
// read, enabled by re so a stalled pipeline keeps its bundle). A write port
// lets the host load programs. Size from the document; read timing is this
// design's choice.
module imem #(
  parameter int BUNDLES = 64,
  parameter int BW      = 128,
  localparam int AW     = $clog2(BUNDLES)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [BW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [BW-1:0] wdata
);
  logic [BW-1:0] mem [BUNDLES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
