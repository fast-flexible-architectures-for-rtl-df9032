// btb: branch target buffer of the CryptoManiac front end. It is looked up
// with the fetch address in parallel with the instruction memory; a hit
// predicts a taken branch to the stored target, a miss predicts fall-through.
// The buffer is direct mapped on the low address bits with a full tag.
// The execute stage updates it: upd_taken writes the entry for upd_pc;
// an update without upd_taken removes the entry if it belongs to upd_pc
// (the processing element uses this only for stale entries, so a loop
// branch stays predicted taken after the loop exits). 16 entries follow the document; the
// organisation and update rule are this design's choices.
// Lookup is combinational; updates take effect at the next clock.
module btb #(
  parameter int ENTRIES = 16,
  parameter int PC_W    = 6,
  localparam int IW     = $clog2(ENTRIES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] pc,
  output logic            hit,
  output logic [PC_W-1:0] target,
  input  logic            upd_valid,
  input  logic            upd_taken,
  input  logic [PC_W-1:0] upd_pc,
  input  logic [PC_W-1:0] upd_target
);
  logic [ENTRIES-1:0]   valid;
  logic [PC_W-1:0]      tag  [ENTRIES];
  logic [PC_W-1:0]      tgt  [ENTRIES];
  logic [IW-1:0]        li, ui;

  assign li     = IW'(pc);
  assign ui     = IW'(upd_pc);
  assign hit    = valid[li] && tag[li] == pc;
  assign target = tgt[li];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) valid <= '0;
    else if (upd_valid) begin
      if (upd_taken)              valid[ui] <= 1'b1;
      else if (tag[ui] == upd_pc) valid[ui] <= 1'b0;
    end

  always_ff @(posedge clk)
    if (upd_valid && upd_taken) begin
      tag[ui] <= upd_pc;
      tgt[ui] <= upd_target;
    end
endmodule
