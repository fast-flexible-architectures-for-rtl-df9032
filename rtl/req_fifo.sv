// req_fifo: synchronous FIFO used for the CryptoManiac input request queue
// (InQ) and output result queue (OutQ). Valid/ready on both sides: an entry
// is written when in_valid && in_ready and leaves when out_valid &&
// out_ready. The element type T is a parameter (request_t for the InQ,
// response_t for the OutQ). The queues come from the document; depth and
// handshake are this design's choices. Output data is the head entry,
// available combinationally.
// rst_n is the asynchronous reset and also disables the assertion during
// reset, which is why a linter may report it as used both ways.
module req_fifo #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 16,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [AW:0] count
);
  T              mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign in_ready  = count != (AW+1)'(DEPTH);
  assign out_valid = count != '0;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end

  always_ff @(posedge clk)
    if (push) mem[wp] <= in_data;

  // a push is never accepted when full, a pop never when empty
  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
