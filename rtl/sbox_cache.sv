// sbox_cache: the 1 KB substitution table held inside each CryptoManiac
// functional unit (256 entries of 32 bits, one page-aligned table).
// Because the table is page aligned, the SBOX address is just the 8-bit
// index: no adder sits in front of the array.
// Ports: a combinational read port for the functional unit (idx -> rdata,
// same cycle, as the SBOX operation completes inside one execute cycle),
// a second combinational read port for context save (cidx -> crdata), and
// one synchronous write port (SBW instructions or keystore context loads).
// The entry count follows the document; the two read ports and the write
// timing are this design's choices.
module sbox_cache #(
  parameter int ENTRIES = 256,
  parameter int DW      = 32,
  localparam int AW     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic [AW-1:0] idx,
  output logic [DW-1:0] rdata,
  input  logic [AW-1:0] cidx,
  output logic [DW-1:0] crdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] mem [ENTRIES];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata  = mem[idx];
  assign crdata = mem[cidx];
endmodule
